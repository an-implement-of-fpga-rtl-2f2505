// data_fifo -- synchronous first-word-fall-through FIFO (the DATA FIFO).
//
// Buffers the words that the PCI side writes in bursts at bus speed until
// the slower back end (the instruction register) consumes them. The word at
// the head is always visible on `rd_data` while `empty` is low; `rd_en`
// removes it at the clock edge. A write and a read may happen in the same
// clock. Writes while full and reads while empty are ignored (and flagged
// by assertions), `flush` empties the FIFO. The original design only says a FIFO
// or RAM balances the speed difference; depth and width are this design's
// choice. Storage is a plain array that synthesis maps to RAM.
module data_fifo #(
  parameter int WIDTH = 32,
  parameter int DEPTH = 512,  // power of two
  localparam int AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full,
  output logic [AW:0]      count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;  // one extra bit tells full from empty
  logic             do_wr, do_rd;

  assign do_wr   = wr_en && !full;
  assign do_rd   = rd_en && !empty;
  assign empty   = (wptr == rptr);
  assign full    = (wptr[AW-1:0] == rptr[AW-1:0]) && (wptr[AW] != rptr[AW]);
  assign count   = wptr - rptr;
  assign rd_data = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_wr) mem[wptr[AW-1:0]] <= wr_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else if (flush) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_wr) wptr <= wptr + 1'b1;
      if (do_rd) rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !flush))
    else $error("data_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty && !flush))
    else $error("data_fifo: read while empty");

endmodule
