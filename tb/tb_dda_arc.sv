// tb_dda_arc -- self-checking testbench for the DDA arc interpolator.
//
// A behavioural reference model in this file replays the DDA recursion with
// plain integer arithmetic and produces the expected list of points. The
// testbench runs several arcs through the unit and compares every step
// with that list:
//   * the quarter arc (8,0) -> (0,8), anticlockwise, traditional DDA with a
//     4-bit accumulator, checked against the lattice path printed in the
//     example plot (17 points);
//   * a radius-100 quarter arc with lambda = 1/8 in weighted and in
//     sawtooth-eliminating mode, checking that the latter takes combined
//     steps and has a path variance no larger than the former;
//   * a clockwise arc, a half circle crossing quadrants, a tick divider
//     check (steps only on every (div+1)-th clock) and a halt.
module tb_dda_arc;
  localparam int CW = 16;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic start = 0, halt = 0, ccw = 1, improved = 0;
  logic [4:0] acc_bits = 5'd4;
  logic [2:0] lambda_shift = 3'd0;
  logic [15:0] div = 16'd0;
  logic signed [CW-1:0] xs, ys, xe, ye;
  logic busy, done, step_x, step_y, dir_x, dir_y, combined;
  logic signed [CW-1:0] x_cur, y_cur;

  int checks = 0, failures = 0;

  dda_arc dut (.*);

  // ---------------- reference model ----------------
  int ref_x[$], ref_y[$];
  int ref_ticks;

  function automatic longint iabs(longint v); return (v < 0) ? -v : v; endfunction

  task automatic ref_run_exact(int x0, int y0, int x1, int y1, bit accw, bit imp, int n, int k);
    longint t, ax, ay, sx, sy;
    int x, y, nx, ny, guard;
    bit fx, fy, ox, oy, ex, ey;
    t = longint'(1) << (n + k);
    ax = t / 2; ay = t / 2;
    x = x0; y = y0;
    ref_x = {}; ref_y = {};
    ref_ticks = 0; guard = 0;
    while (!(x == x1 && y == y1) && guard < 100000) begin
      guard++;
      ref_ticks++;
      sx = ax + iabs(longint'(y));
      sy = ay + iabs(longint'(x));
      ox = (x != x1) && (sx >= t);
      oy = (y != y1) && (sy >= t);
      ex = imp && (x != x1) && (sx + iabs(longint'(y)) >= t);
      ey = imp && (y != y1) && (sy + iabs(longint'(x)) >= t);
      fx = ox | (ex & oy);
      fy = oy | (ey & ox);
      ax = (sx >= t) ? (sx % t) : (fx ? sx - t : sx);
      ay = (sy >= t) ? (sy % t) : (fy ? sy - t : sy);
      nx = x; ny = y;
      if (fx) nx = x + (accw ? ((y < 0) ? 1 : -1) : ((y > 0) ? 1 : -1));
      if (fy) ny = y + (accw ? ((x > 0) ? 1 : -1) : ((x < 0) ? 1 : -1));
      x = nx; y = ny;
      if (fx || fy) begin ref_x.push_back(x); ref_y.push_back(y); end
    end
  endtask

  // ---------------- driver / monitor ----------------
  int got_x[$], got_y[$];
  int n_comb, clk_cnt, first_step_clk, last_step_clk, bad_phase;
  real var_sum;

  task automatic run_arc(int x0, int y0, int x1, int y1, bit accw, bit imp,
                         int n, int k, int d, int radius, output real v);
    int cyc;
    xs = CW'(x0); ys = CW'(y0); xe = CW'(x1); ye = CW'(y1);
    ccw = accw; improved = imp; acc_bits = 5'(n); lambda_shift = 3'(k);
    div = 16'(d);
    got_x = {}; got_y = {}; n_comb = 0; bad_phase = 0; var_sum = 0.0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (busy && cyc < 2000000) begin
      @(posedge clk); #1;
      cyc++;
      if (step_x || step_y) begin
        got_x.push_back(int'(x_cur)); got_y.push_back(int'(y_cur));
        var_sum += ($sqrt(real'(x_cur) * real'(x_cur) + real'(y_cur) * real'(y_cur)) - real'(radius)) ** 2;
        if (combined) n_comb++;
        // a step leaves the register one clock after its tick; ticks come
        // every d+1 clocks, the first d+1 clocks after start
        if ((cyc - 1) % (d + 1) != 0) bad_phase++;
      end
    end
    v = (got_x.size() > 1) ? var_sum / real'(got_x.size() - 1) : 0.0;
  endtask

  task automatic compare(string tag);
    int mism = 0;
    checks++;
    if (got_x.size() != ref_x.size()) begin
      failures++;
      $display("FAIL %s: %0d steps, expected %0d", tag, got_x.size(), ref_x.size());
    end else begin
      foreach (ref_x[i])
        if (got_x[i] != ref_x[i] || got_y[i] != ref_y[i]) mism++;
      if (mism != 0) begin
        failures++;
        $display("FAIL %s: %0d of %0d points differ", tag, mism, ref_x.size());
      end
    end
    checks++;
    if (bad_phase != 0) begin
      failures++;
      $display("FAIL %s: %0d steps off the integral clock grid", tag, bad_phase);
    end
  endtask

  // Lattice path read from the (8,0) -> (0,8) example plot.
  int fig_x[17] = '{8, 8, 8, 8, 7, 7, 7, 6, 6, 5, 5, 4, 3, 3, 2, 1, 0};
  int fig_y[17] = '{0, 1, 2, 3, 3, 4, 5, 5, 6, 6, 7, 7, 7, 8, 8, 8, 8};

  real v_w, v_i, v_dummy;
  int steps_w, steps_i;

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    xs = 0; ys = 0; xe = 0; ye = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // 1. example plot, traditional DDA, n = 4
    run_arc(8, 0, 0, 8, 1, 0, 4, 0, 0, 8, v_dummy);
    checks++;
    if (got_x.size() != 16) begin
      failures++; $display("FAIL example arc: %0d steps, expected 16", got_x.size());
    end else begin
      automatic int bad = 0;
      for (int i = 0; i < 16; i++)
        if (got_x[i] != fig_x[i+1] || got_y[i] != fig_y[i+1]) bad++;
      if (bad != 0) begin failures++; $display("FAIL example arc: %0d points off the plotted path", bad); end
    end
    ref_run_exact(8, 0, 0, 8, 1, 0, 4, 0);
    compare("example arc vs model");
    checks++;
    if (n_comb != 0) begin failures++; $display("FAIL traditional mode took combined steps"); end

    // 2. radius 100, lambda = 1/8, weighted versus sawtooth eliminating
    run_arc(100, 0, 0, 100, 1, 0, 5, 3, 0, 100, v_w);
    steps_w = got_x.size();
    ref_run_exact(100, 0, 0, 100, 1, 0, 5, 3);
    compare("R100 weighted");
    run_arc(100, 0, 0, 100, 1, 1, 5, 3, 0, 100, v_i);
    steps_i = got_x.size();
    ref_run_exact(100, 0, 0, 100, 1, 1, 5, 3);
    compare("R100 improved");
    $display("R=100 lambda=1/8: weighted %0d steps V=%f, improved %0d steps (%0d combined) V=%f",
             steps_w, v_w, steps_i, n_comb, v_i);
    checks++;
    if (n_comb == 0 || steps_i >= steps_w) begin failures++; $display("FAIL no sawteeth removed"); end
    checks++;
    if (v_i > v_w) begin failures++; $display("FAIL improved variance above weighted"); end

    // 3. traditional DDA at radius 100 with n = 4 degenerates to a diagonal
    run_arc(100, 0, 0, 100, 1, 0, 4, 0, 0, 100, v_dummy);
    ref_run_exact(100, 0, 0, 100, 1, 0, 4, 0);
    compare("R100 traditional");
    checks++;
    if (v_dummy < 10.0 * v_w) begin failures++; $display("FAIL traditional DDA not worse at R=100"); end

    // 4. clockwise quarter arc, n = 6
    run_arc(0, 40, 40, 0, 0, 1, 6, 0, 0, 40, v_dummy);
    ref_run_exact(0, 40, 40, 0, 0, 1, 6, 0);
    compare("clockwise");

    // 5. half circle across quadrants with the divider at 3 (tick every 4 clocks)
    run_arc(30, 0, -30, 0, 1, 1, 5, 1, 3, 30, v_dummy);
    ref_run_exact(30, 0, -30, 0, 1, 1, 5, 1);
    compare("half circle div=3");

    // 6. halt stops the unit
    xs = 50; ys = 0; xe = 0; ye = 50; div = 16'd0;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    halt = 1; @(negedge clk); halt = 0;
    checks++;
    if (busy) begin failures++; $display("FAIL halt ignored"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
