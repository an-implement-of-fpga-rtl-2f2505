// tb_instr_reg -- self-checking testbench for the instruction register.
//
// Feeds a queue of motion instructions through a FIFO-like model and
// records every step strobe. Checks that each instruction gives exactly
// `count` strobes on its axis with its direction, spaced `period`+1 clocks
// apart, the first `period`+1 clocks after it was taken; that zero-count
// instructions are skipped; that `enable` low holds the queue; and that
// `halt` drops a running instruction.
module tb_instr_reg;
  import motion_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic enable = 0, halt = 0, fifo_rd, busy, step_x, step_y, dir_x, dir_y;
  logic [31:0] fifo_q[$];
  logic fifo_empty;
  logic [31:0] fifo_data;
  assign fifo_empty = (fifo_q.size() == 0);
  assign fifo_data  = fifo_empty ? 32'h0 : fifo_q[0];

  instr_reg dut (.*);

  int cyc = 0;
  int pop_cyc[$];
  int stp_cyc[$];
  bit stp_axis[$], stp_dir[$];
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (fifo_rd) begin void'(fifo_q.pop_front()); pop_cyc.push_back(cyc); end
    if (step_x) begin stp_cyc.push_back(cyc); stp_axis.push_back(0); stp_dir.push_back(dir_x); end
    if (step_y) begin stp_cyc.push_back(cyc); stp_axis.push_back(1); stp_dir.push_back(dir_y); end
  end

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  function automatic logic [31:0] mk(bit ax, bit dp, int per, int cnt);
    instr_t i;
    i.axis_y = ax; i.dir_pos = dp; i.period = 14'(per); i.count = 16'(cnt);
    return 32'(i);
  endfunction

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  instr_t prog[$];
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    prog.push_back(instr_t'(mk(0, 1, 3, 5)));
    prog.push_back(instr_t'(mk(1, 0, 0, 4)));
    prog.push_back(instr_t'(mk(0, 0, 9, 0)));   // no operation
    prog.push_back(instr_t'(mk(1, 1, 6, 3)));
    prog.push_back(instr_t'(mk(0, 0, 1, 7)));
    foreach (prog[i]) fifo_q.push_back(32'(prog[i]));
    repeat (5) @(posedge clk);
    check(pop_cyc.size() == 0 && stp_cyc.size() == 0, "nothing runs while disabled");
    @(negedge clk); enable = 1;
    wait (fifo_empty && !busy);
    repeat (20) @(posedge clk);
    begin
      automatic int k = 0;
      check(pop_cyc.size() == prog.size(), "all instructions taken");
      foreach (prog[p]) begin
        for (int s = 0; s < int'(prog[p].count); s++) begin
          automatic int expect_cyc = pop_cyc[p] + (s + 1) * (int'(prog[p].period) + 1) + 1;
          checks++;
          if (k >= stp_cyc.size() || stp_cyc[k] != expect_cyc ||
              stp_axis[k] != prog[p].axis_y || stp_dir[k] != prog[p].dir_pos) begin
            failures++;
            $display("FAIL instruction %0d step %0d: clock %0d axis %0d dir %0d, expected %0d %0d %0d", p, s, stp_cyc[k], stp_axis[k], stp_dir[k], expect_cyc, prog[p].axis_y, prog[p].dir_pos);
          end
          k++;
        end
        if (p > 0) begin
          automatic int prev_end = pop_cyc[p-1] + int'(prog[p-1].count) * (int'(prog[p-1].period) + 1);
          check(pop_cyc[p] == prev_end + 1, $sformatf("instruction %0d taken right after the previous", p));
        end
      end
      check(k == stp_cyc.size(), "no extra strobes");
    end
    // halt
    fifo_q.push_back(mk(0, 1, 2, 100));
    repeat (20) @(posedge clk);
    @(negedge clk); halt = 1; @(negedge clk); halt = 0; enable = 0;
    begin
      automatic int n = stp_cyc.size();
      repeat (20) @(posedge clk);
      check(!busy && stp_cyc.size() == n, "halt stops the train");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
