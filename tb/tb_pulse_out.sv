// tb_pulse_out -- self-checking testbench for the pulse output register.
//
// Sends step requests from both sources and checks the source select, that
// the direction is set one clock before each step edge, the pulse width,
// the signed position counters, the overrun flag for a request during a
// pulse, and clear.
module tb_pulse_out;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic clear = 0, src_dda = 0;
  logic [7:0] pulse_width = 8'd3;
  logic dda_step_x = 0, dda_step_y = 0, dda_dir_x = 0, dda_dir_y = 0;
  logic ins_step_x = 0, ins_step_y = 0, ins_dir_x = 0, ins_dir_y = 0;
  logic x_step, x_dir, y_step, y_dir, overrun;
  logic signed [15:0] x_pos, y_pos;

  pulse_out dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // measure pulses on X
  int x_rise = 0, x_high = 0, x_widths[$], cur_w = 0, setup_bad = 0;
  logic x_step_d = 0, x_dir_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (x_step && !x_step_d) begin
      x_rise++;
      if (x_dir != x_dir_d) setup_bad++;   // direction must already be stable
    end
    if (x_step) cur_w++;
    if (!x_step && x_step_d) begin x_widths.push_back(cur_w); cur_w = 0; end
    x_step_d <= x_step;
    x_dir_d  <= x_dir;
  end
  int y_rise = 0;
  logic y_step_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (y_step && !y_step_d) y_rise++;
    y_step_d <= y_step;
  end

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic req(bit dda, bit y, bit dir);
    @(negedge clk);
    if (dda) begin
      if (y) begin dda_step_y = 1; dda_dir_y = dir; end else begin dda_step_x = 1; dda_dir_x = dir; end
    end else begin
      if (y) begin ins_step_y = 1; ins_dir_y = dir; end else begin ins_step_x = 1; ins_dir_x = dir; end
    end
    @(negedge clk);
    dda_step_x = 0; dda_step_y = 0; ins_step_x = 0; ins_step_y = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // instruction source: 3 positive X pulses, 2 negative Y pulses
    repeat (3) begin req(0, 0, 1); repeat (8) @(negedge clk); end
    repeat (2) begin req(0, 1, 0); repeat (8) @(negedge clk); end
    // DDA requests are ignored while the instruction source is selected
    req(1, 0, 1); repeat (8) @(negedge clk);
    check(x_pos == 3 && y_pos == -2, $sformatf("positions %0d %0d", x_pos, y_pos));
    check(x_rise == 3 && y_rise == 2, "pulse counts");
    // switch to DDA source, 2 negative X pulses
    src_dda = 1;
    req(0, 0, 1); repeat (8) @(negedge clk);   // instruction request ignored now
    repeat (2) begin req(1, 0, 0); repeat (8) @(negedge clk); end
    check(x_pos == 1 && x_rise == 5, $sformatf("DDA source x_pos %0d", x_pos));
    check(setup_bad == 0, "direction set before step edge");
    check(x_widths.size() == 5, "five X pulses ended");
    foreach (x_widths[i]) check(x_widths[i] == 3, $sformatf("pulse width %0d", x_widths[i]));
    check(!overrun, "no overrun yet");
    // request during a pulse
    req(1, 0, 1); req(1, 0, 1);
    repeat (8) @(negedge clk);
    check(overrun, "overrun flagged");
    check(x_pos == 3, "overrun request still counted");
    clear = 1; @(negedge clk); clear = 0;
    check(!overrun && x_pos == 0 && y_pos == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
