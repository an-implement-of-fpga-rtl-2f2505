// instr_reg -- instruction register: turns FIFO instructions into pulses.
//
// Holds the motion instruction at the head of the data FIFO and produces
// the frequency-controlled step pulse train it asks for. An instruction
// (motion_pkg::instr_t) names an axis, a direction, a pulse period and a
// pulse count. While `enable` is high and the unit is idle, it takes the
// head word of the (first-word-fall-through) FIFO, pops it, and then issues
// one step strobe on the chosen axis every `period`+1 clocks, the first one
// `period`+1 clocks after the load, until `count` strobes have gone out; a
// count of zero is skipped. The next instruction is taken in the clock
// after the last strobe, so trains follow each other without a gap
// beyond one clock. `halt` drops the current instruction. The original design
// says only that the register keeps the instructions and produces
// frequency-controlled pulses for the two motor drivers; the word layout
// and the timing are this design's choice.
module instr_reg
  import motion_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  logic        halt,
  input  logic        fifo_empty,
  input  logic [31:0] fifo_data,
  output logic        fifo_rd,
  output logic        busy,
  output logic        step_x,
  output logic        step_y,
  output logic        dir_x,
  output logic        dir_y
);

  instr_t      cur, head;
  logic [13:0] timer;
  logic [15:0] left;

  assign head    = instr_t'(fifo_data);
  assign fifo_rd = enable && !busy && !fifo_empty && !halt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      timer  <= '0;
      left   <= '0;
      busy   <= 1'b0;
      step_x <= 1'b0;
      step_y <= 1'b0;
      dir_x  <= 1'b0;
      dir_y  <= 1'b0;
    end else begin
      step_x <= 1'b0;
      step_y <= 1'b0;
      if (halt) begin
        busy <= 1'b0;
      end else if (fifo_rd) begin
        cur   <= head;
        left  <= head.count;
        timer <= '0;
        busy  <= (head.count != 16'd0);
      end else if (busy) begin
        if (timer == cur.period) begin
          timer <= '0;
          left  <= left - 1'b1;
          if (left == 16'd1) busy <= 1'b0;
          if (cur.axis_y) begin
            step_y <= 1'b1;
            dir_y  <= cur.dir_pos;
          end else begin
            step_x <= 1'b1;
            dir_x  <= cur.dir_pos;
          end
        end else begin
          timer <= timer + 1'b1;
        end
      end
    end
  end

endmodule
