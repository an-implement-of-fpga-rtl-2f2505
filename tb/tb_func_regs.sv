// tb_func_regs -- self-checking testbench for the function registers.
//
// Checks the reset values, read/write of every read-write register with
// byte enables, the field outputs, the one-clock command strobes, the
// sticky done bit and the read-only status and position words.
module tb_func_regs;
  import motion_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic wr_en = 0;
  logic [2:0] addr = '0;
  logic [31:0] wdata = '0, rdata, status;
  logic [3:0] be = 4'hF;
  logic ccw, improved, src_dda, instr_en;
  logic [2:0] lambda_shift;
  logic [4:0] acc_bits;
  logic signed [15:0] xs, ys, xe, ye;
  logic [15:0] div;
  logic [7:0] pulse_width;
  logic dda_start, dda_halt, fifo_flush, instr_halt, pos_clear;
  logic dda_busy = 0, dda_done = 0, instr_busy = 0, fifo_empty = 1, fifo_full = 0, overrun = 0;
  logic [9:0] fifo_count = '0;
  logic signed [15:0] x_pos = 16'sd0, y_pos = 16'sd0;

  func_regs dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic wr(logic [2:0] a, logic [31:0] v, logic [3:0] b = 4'hF);
    @(negedge clk); wr_en = 1; addr = a; wdata = v; be = b;
    @(negedge clk); wr_en = 0; be = 4'hF;
  endtask
  logic [31:0] r;
  task automatic rd(logic [2:0] a);
    addr = a; #1; r = rdata;
  endtask

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int starts = 0, halts = 0, flushes = 0, ihalts = 0, clears = 0;
  always @(posedge clk) if (rst_n) begin
    starts  += int'(dda_start);
    halts   += int'(dda_halt);
    flushes += int'(fifo_flush);
    ihalts  += int'(instr_halt);
    clears  += int'(pos_clear);
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(ccw && improved && !src_dda && !instr_en, "reset mode bits");
    check(lambda_shift == 3 && acc_bits == 16, "reset lambda 1/8 and n 16");
    rd(REG_CTRL);
    check(r == 32'h0010_0303, "CTRL reset word");

    wr(REG_CTRL, 32'hFFFF_FFFF);
    rd(REG_CTRL);
    check(r == 32'h001F_070F, "CTRL writable bits");
    wr(REG_CTRL, 32'h0004_0506);
    check(!ccw && improved && src_dda && !instr_en && lambda_shift == 5 && acc_bits == 4, "CTRL fields");
    wr(REG_START, 32'hFFF6_0064);
    check(xs == 16'sd100 && ys == -16'sd10, "START fields");
    wr(REG_END, 32'h0064_0000);
    check(xe == 0 && ye == 100, "END fields");
    wr(REG_END, 32'h0000_00AA, 4'b0001);
    rd(REG_END);
    check(r == 32'h0064_00AA, "byte enable");
    wr(REG_DIV, 32'h1234_0007);
    rd(REG_DIV);
    check(div == 7 && r == 32'h7, "DIV");
    wr(REG_PULSE, 32'h0000_0103);
    check(pulse_width == 3, "PULSE");

    // each command bit on its own gives exactly its own strobe
    for (int b = 0; b < 5; b++) begin
      automatic int s0 = starts, h0 = halts, f0 = flushes, i0 = ihalts, c0 = clears;
      wr(REG_CMD, 32'(1) << b);
      @(negedge clk);
      check(starts - s0 == int'(b == 0) && halts - h0 == int'(b == 1) &&
            flushes - f0 == int'(b == 2) && ihalts - i0 == int'(b == 3) &&
            clears - c0 == int'(b == 4), $sformatf("strobe of command bit %0d", b));
    end
    wr(REG_CMD, 32'h1F);
    @(negedge clk);
    check(starts == 2 && halts == 2 && flushes == 2 && ihalts == 2 && clears == 2,
          "all command bits together");
    rd(REG_CMD);
    check(r == 0, "CMD reads as zero");

    dda_busy = 1; instr_busy = 1; fifo_empty = 0; fifo_full = 1; overrun = 1; fifo_count = 10'd300;
    rd(REG_STATUS);
    check(r == {16'd300, 10'd0, 1'b1, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1}, "STATUS word");
    check(status == r, "status output");
    @(negedge clk); dda_done = 1; @(negedge clk); dda_done = 0;
    rd(REG_STATUS);
    check(r[1], "done sticky set");
    wr(REG_CMD, 32'h1);
    @(negedge clk);
    rd(REG_STATUS);
    check(!r[1], "done cleared by start");
    x_pos = -16'sd5; y_pos = 16'sd9;
    rd(REG_POS);
    check(r == 32'h0009_FFFB, "POS word");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
