// tb_data_fifo -- self-checking testbench for the data FIFO.
//
// Drives random writes and reads (never writing when full or reading when
// empty), mirrors them in a queue and checks the head word, the count and
// the flags every clock. Also fills the FIFO to full, checks the full flag
// at exactly DEPTH words, and checks that flush empties it.
module tb_data_fifo;
  localparam int W = 32, D = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic flush = 0, wr_en = 0, rd_en = 0;
  logic [W-1:0] wr_data = '0, rd_data;
  logic empty, full;
  logic [$clog2(D):0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  data_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic check_state();
    check(empty == (q.size() == 0), "empty flag");
    check(full == (q.size() == D), "full flag");
    check(int'(count) == q.size(), "count");
    if (q.size() != 0) check(rd_data == q[0], "head word");
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    // random traffic
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      check_state();
      wr_en   = ($urandom_range(0, 99) < 55) && (q.size() < D);
      rd_en   = ($urandom_range(0, 99) < 45) && (q.size() > 0);
      wr_data = $urandom;
      @(posedge clk);
      if (rd_en) void'(q.pop_front());
      if (wr_en) q.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0; rd_en = 0;
    // fill to full
    while (q.size() < D) begin
      @(negedge clk); wr_en = 1; wr_data = $urandom;
      @(posedge clk); q.push_back(wr_data);
    end
    @(negedge clk); wr_en = 0;
    check_state();
    check(full, "full after DEPTH writes");
    // flush
    flush = 1; @(negedge clk); flush = 0; q = {};
    check_state();
    check(empty && count == 0, "empty after flush");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
