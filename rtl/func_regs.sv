// func_regs -- functioning registers, mapped into PCI I/O space.
//
// The host sets the operating mode of the board and the parameters of an
// arc by I/O writes to these registers and reads back status. Eight 32-bit
// registers, selected by `addr` (I/O offset / 4); writes honour the byte
// enables `be` (active high):
//   0 CTRL   rw  [0] ccw  [1] improved (sawtooth elimination)
//                [2] pulse source: 1 = DDA, 0 = instruction register
//                [3] run FIFO instructions  [10:8] lambda shift k
//                [20:16] accumulator width n
//   1 CMD    wo  [0] start arc  [1] halt arc  [2] flush FIFO
//                [3] halt instruction  [4] clear positions; each bit gives
//                a one-clock strobe and reads back as 0
//   2 START  rw  [15:0] xs  [31:16] ys  (signed)
//   3 END    rw  [15:0] xe  [31:16] ye  (signed)
//   4 DIV    rw  [15:0] integral clock period - 1
//   5 PULSE  rw  [7:0] step pulse width in clocks
//   6 STATUS ro  [0] arc busy [1] arc done (sticky, cleared by start)
//                [2] instruction busy [3] FIFO empty [4] FIFO full
//                [5] pulse overrun [31:16] FIFO word count
//   7 POS    ro  [15:0] x step position  [31:16] y step position
// Writes take effect at the clock edge of the write strobe; `rdata` is a
// combinational function of `addr`; `status` shows the STATUS word
// without an address. The original design says only that writing
// these registers during I/O transactions selects the board's modes; the
// map above and the reset values (anticlockwise, sawtooth elimination on,
// lambda = 1/8, n = 16) are this design's choice.
module func_regs
  import motion_pkg::*;
#(
  parameter int CNT_W = 10  // width of the FIFO word count
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               wr_en,
  input  logic [2:0]         addr,
  input  logic [31:0]        wdata,
  input  logic [3:0]         be,
  output logic [31:0]        rdata,
  output logic [31:0]        status,     // the STATUS word, always
  // mode and arc parameters
  output logic               ccw,
  output logic               improved,
  output logic               src_dda,
  output logic               instr_en,
  output logic [2:0]         lambda_shift,
  output logic [4:0]         acc_bits,
  output logic signed [15:0] xs,
  output logic signed [15:0] ys,
  output logic signed [15:0] xe,
  output logic signed [15:0] ye,
  output logic [15:0]        div,
  output logic [7:0]         pulse_width,
  // command strobes
  output logic               dda_start,
  output logic               dda_halt,
  output logic               fifo_flush,
  output logic               instr_halt,
  output logic               pos_clear,
  // status
  input  logic               dda_busy,
  input  logic               dda_done,
  input  logic               instr_busy,
  input  logic               fifo_empty,
  input  logic               fifo_full,
  input  logic [CNT_W-1:0]   fifo_count,
  input  logic               overrun,
  input  logic signed [15:0] x_pos,
  input  logic signed [15:0] y_pos
);

  logic [31:0] ctrl_q, start_q, end_q, div_q, pulse_q;
  logic        done_q;

  function automatic logic [31:0] merge(input logic [31:0] old, input logic [31:0] nw,
                                        input logic [3:0] en);
    logic [31:0] r;
    for (int b = 0; b < 4; b++) r[b*8 +: 8] = en[b] ? nw[b*8 +: 8] : old[b*8 +: 8];
    return r;
  endfunction

  logic cmd_wr;
  assign cmd_wr = wr_en && (addr == REG_CMD) && be[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ctrl_q     <= 32'h0010_0303;  // n = 16, k = 3, improved, ccw
      start_q    <= '0;
      end_q      <= '0;
      div_q      <= 32'd15;
      pulse_q    <= 32'd4;
      done_q     <= 1'b0;
      dda_start  <= 1'b0;
      dda_halt   <= 1'b0;
      fifo_flush <= 1'b0;
      instr_halt <= 1'b0;
      pos_clear  <= 1'b0;
    end else begin
      dda_start  <= cmd_wr && wdata[0];
      dda_halt   <= cmd_wr && wdata[1];
      fifo_flush <= cmd_wr && wdata[2];
      instr_halt <= cmd_wr && wdata[3];
      pos_clear  <= cmd_wr && wdata[4];
      if (dda_start)     done_q <= 1'b0;
      else if (dda_done) done_q <= 1'b1;
      if (wr_en) begin
        unique case (addr)
          REG_CTRL:  ctrl_q  <= merge(ctrl_q,  wdata, be) & 32'h001F_070F;
          REG_START: start_q <= merge(start_q, wdata, be);
          REG_END:   end_q   <= merge(end_q,   wdata, be);
          REG_DIV:   div_q   <= merge(div_q,   wdata, be) & 32'h0000_FFFF;
          REG_PULSE: pulse_q <= merge(pulse_q, wdata, be) & 32'h0000_00FF;
          default: ;
        endcase
      end
    end
  end

  assign ccw          = ctrl_q[0];
  assign improved     = ctrl_q[1];
  assign src_dda      = ctrl_q[2];
  assign instr_en     = ctrl_q[3];
  assign lambda_shift = ctrl_q[10:8];
  assign acc_bits     = ctrl_q[20:16];
  assign xs           = start_q[15:0];
  assign ys           = start_q[31:16];
  assign xe           = end_q[15:0];
  assign ye           = end_q[31:16];
  assign div          = div_q[15:0];
  assign pulse_width  = pulse_q[7:0];

  assign status = {16'(fifo_count), 10'd0, overrun, fifo_full, fifo_empty,
                   instr_busy, done_q, dda_busy};

  always_comb begin
    unique case (addr)
      REG_CTRL:   rdata = ctrl_q;
      REG_CMD:    rdata = '0;
      REG_START:  rdata = start_q;
      REG_END:    rdata = end_q;
      REG_DIV:    rdata = div_q;
      REG_PULSE:  rdata = pulse_q;
      REG_STATUS: rdata = status;
      REG_POS:    rdata = {y_pos, x_pos};
      default:    rdata = '0;
    endcase
  end

endmodule
