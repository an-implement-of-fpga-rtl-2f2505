// tb_motion_ctrl_top -- end-to-end testbench of the motion controller.
//
// A behavioural PCI master (pci_master_bfm) plays the host; the motor
// step/direction lines are watched and integrated into an X-Y position, as
// a pair of stepper drives would. The design runs with its default
// parameters. The test
//   1. enumerates the device: reads the IDs, sizes and assigns both BARs and
//      enables I/O and memory decoding;
//   2. runs the quarter arc (8,0) -> (0,8) with the traditional DDA (n = 4,
//      lambda = 1) and checks the motor path against the lattice path of the
//      example plot;
//   3. runs the radius-100 quarter arc with lambda = 1/8 in sawtooth
//      eliminating mode and checks the path against a reference model, and
//      that combined (diagonal) steps reach the motors;
//   4. writes a burst of motion instructions into memory space, runs them
//      and checks pulse counts, directions and the position register;
//   5. fills the FIFO to its full depth in 64-word bursts at one word per
//      clock (the 132 MB/s peak at 33 MHz), checks the retry, reads the status
//      through memory space and flushes the FIFO;
//   6. feeds an instruction through the second FIFO port, forces a pulse
//      overrun and halts an arc.
// Every mechanism is counted and one that never happened is a failure.
module tb_motion_ctrl_top;
  import motion_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #15 clk = ~clk;   // 33 MHz

  logic [31:0] ad, ad_o, mcu_status, ext_data = '0;
  logic [3:0]  cbe_n;
  logic        ad_oe, par_o, par_oe, frame_n, irdy_n, idsel;
  logic        devsel_n_o, trdy_n_o, stop_n_o, ctl_oe;
  logic        ext_wr = 0, ext_ack;
  logic        x_step, x_dir, y_step, y_dir;

  motion_ctrl_top dut (
    .clk, .rst_n,
    .pci_ad_i(ad), .pci_ad_o(ad_o), .pci_ad_oe(ad_oe), .pci_cbe_n_i(cbe_n),
    .pci_par_o(par_o), .pci_par_oe(par_oe), .pci_frame_n_i(frame_n),
    .pci_irdy_n_i(irdy_n), .pci_idsel_i(idsel), .pci_devsel_n_o(devsel_n_o),
    .pci_trdy_n_o(trdy_n_o), .pci_stop_n_o(stop_n_o), .pci_ctl_oe(ctl_oe),
    .ext_wr, .ext_data, .ext_ack, .mcu_status,
    .x_step, .x_dir, .y_step, .y_dir
  );

  pci_master_bfm bfm (
    .clk, .t_ad_o(ad_o), .t_ad_oe(ad_oe), .t_par_o(par_o), .t_par_oe(par_oe),
    .t_devsel_n_o(devsel_n_o), .t_trdy_n_o(trdy_n_o), .t_stop_n_o(stop_n_o),
    .t_ctl_oe(ctl_oe), .ad, .cbe_n, .frame_n, .irdy_n, .idsel
  );

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---------------- motor model ----------------
  int mx = 0, my = 0, n_xp = 0, n_yp = 0, n_diag = 0;
  int path_x[$], path_y[$];
  logic xs_d = 0, ys_d = 0;
  always @(posedge clk) if (rst_n) begin
    automatic bit rx = x_step && !xs_d, ry = y_step && !ys_d;
    if (rx) begin mx += x_dir ? 1 : -1; n_xp++; end
    if (ry) begin my += y_dir ? 1 : -1; n_yp++; end
    if (rx && ry) n_diag++;
    if (rx || ry) begin path_x.push_back(mx); path_y.push_back(my); end
    xs_d <= x_step;
    ys_d <= y_step;
  end

  // clocks on which a PCI memory write reached the FIFO (bus rate check)
  int clk_no = 0;
  int memwr_clk[$];
  always @(posedge clk) if (rst_n) begin
    clk_no++;
    if (dut.u_pci.mem_wr) memwr_clk.push_back(clk_no);
  end

  // ---------------- host accesses ----------------
  localparam logic [31:0] MEMBASE = 32'hF000_0000, IOBASE = 32'h0000_E000;
  logic [31:0] d[$];
  int moved, dl, tl;
  bit stopped, aborted;

  // mechanism counters
  int m_cfg = 0, m_io = 0, m_mem_burst = 0, m_retry = 0, m_disc = 0, m_mem_rd = 0;
  int m_trad = 0, m_comb = 0, m_instr = 0, m_ext = 0, m_overrun = 0, m_flush = 0, m_halt = 0;

  task automatic cfg_wr(logic [7:0] off, logic [31:0] v);
    d = {v};
    bfm.xact(CMD_CFG_WR, {24'h0, off}, 1, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    m_cfg++;
  endtask
  task automatic cfg_rd(logic [7:0] off, output logic [31:0] v);
    bfm.xact(CMD_CFG_RD, {24'h0, off}, 1, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    v = (d.size() > 0) ? d[0] : 32'hDEAD_BEEF;
    m_cfg++;
  endtask
  task automatic io_wr(logic [2:0] r, logic [31:0] v);
    d = {v};
    bfm.xact(CMD_IO_WR, IOBASE + 32'(r) * 4, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    m_io += int'(moved == 1);
  endtask
  task automatic io_rd(logic [2:0] r, output logic [31:0] v);
    bfm.xact(CMD_IO_RD, IOBASE + 32'(r) * 4, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    v = (d.size() > 0) ? d[0] : 32'hDEAD_BEEF;
    m_io += int'(moved == 1);
  endtask

  function automatic logic [31:0] ctrl_word(bit accw, bit imp, bit dda, bit ins, int k, int n);
    return {11'd0, 5'(n), 5'd0, 3'(k), 4'd0, ins, dda, imp, accw};
  endfunction
  function automatic logic [31:0] xy(int x, int y);
    return {16'(y), 16'(x)};
  endfunction

  task automatic wait_arc(output bit ok);
    logic [31:0] st;
    ok = 0;
    for (int i = 0; i < 400; i++) begin
      io_rd(REG_STATUS, st);
      if (st[1] && !st[0]) begin ok = 1; break; end
      bfm.idle(200);
    end
  endtask

  // reference DDA (same recursion as the unit test's model)
  int ref_x[$], ref_y[$];
  function automatic longint iabs(longint v); return (v < 0) ? -v : v; endfunction
  task automatic ref_run(int x0, int y0, int x1, int y1, bit imp, int n, int k);
    longint t, ax, ay, sx, sy;
    int x, y, nx, ny;
    bit fx, fy, ox, oy;
    t = longint'(1) << (n + k);
    ax = t / 2; ay = t / 2; x = x0; y = y0;
    ref_x = {}; ref_y = {};
    for (int g = 0; g < 100000 && !(x == x1 && y == y1); g++) begin
      sx = ax + iabs(longint'(y)); sy = ay + iabs(longint'(x));
      ox = (x != x1) && (sx >= t);
      oy = (y != y1) && (sy >= t);
      fx = ox || (imp && (x != x1) && (sx + iabs(longint'(y)) >= t) && oy);
      fy = oy || (imp && (y != y1) && (sy + iabs(longint'(x)) >= t) && ox);
      ax = (sx >= t) ? sx % t : (fx ? sx - t : sx);
      ay = (sy >= t) ? sy % t : (fy ? sy - t : sy);
      nx = fx ? x + ((y < 0) ? 1 : -1) : x;   // anticlockwise
      ny = fy ? y + ((x > 0) ? 1 : -1) : y;
      x = nx; y = ny;
      if (fx || fy) begin ref_x.push_back(x); ref_y.push_back(y); end
    end
  endtask

  task automatic reset_motor(int x, int y);
    @(negedge clk);
    mx = x; my = y; path_x = {}; path_y = {}; n_xp = 0; n_yp = 0; n_diag = 0;
  endtask

  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int fig_x[16] = '{8, 8, 8, 7, 7, 7, 6, 6, 5, 5, 4, 3, 3, 2, 1, 0};
  int fig_y[16] = '{1, 2, 3, 3, 4, 5, 5, 6, 6, 7, 7, 7, 8, 8, 8, 8};
  logic [31:0] v;
  bit ok;

  initial begin
    repeat (4) @(posedge clk);
    rst_n = 1;
    bfm.idle(2);

    // ---- 1. enumeration ----
    cfg_rd(8'h00, v);
    check(v == {16'h0DDA, 16'h1234}, "device/vendor ID");
    cfg_wr(8'h10, 32'hFFFF_FFFF); cfg_rd(8'h10, v);
    check(v == 32'hFFFF_F000, "BAR0 asks for 4 KiB of memory");
    cfg_wr(8'h14, 32'hFFFF_FFFF); cfg_rd(8'h14, v);
    check(v == 32'hFFFF_FFE1, "BAR1 asks for 32 bytes of I/O");
    cfg_wr(8'h10, MEMBASE);
    cfg_wr(8'h14, IOBASE);
    cfg_wr(8'h04, 32'h3);
    io_rd(REG_CTRL, v);
    check(v == 32'h0010_0303, "function registers reachable, reset CTRL");

    // ---- 2. example arc, traditional DDA ----
    reset_motor(8, 0);
    io_wr(REG_CTRL, ctrl_word(1, 0, 1, 0, 0, 4));
    io_wr(REG_START, xy(8, 0));
    io_wr(REG_END, xy(0, 8));
    io_wr(REG_DIV, 32'd7);
    io_wr(REG_PULSE, 32'd2);
    io_wr(REG_CMD, 32'h1);
    wait_arc(ok);
    check(ok, "example arc finished");
    check(path_x.size() == 16, $sformatf("example arc: %0d motor steps, expected 16", path_x.size()));
    if (path_x.size() == 16) begin
      automatic int bad = 0;
      foreach (fig_x[i]) if (path_x[i] != fig_x[i] || path_y[i] != fig_y[i]) bad++;
      check(bad == 0, "example arc follows the plotted path");
      if (bad == 0) m_trad++;
    end
    io_rd(REG_POS, v);
    check(v == xy(-8, 8), "position register after the example arc");

    // ---- 3. radius 100, lambda 1/8, sawtooth elimination ----
    io_wr(REG_CMD, 32'h10);   // clear positions
    reset_motor(100, 0);
    io_wr(REG_CTRL, ctrl_word(1, 1, 1, 0, 3, 5));
    io_wr(REG_START, xy(100, 0));
    io_wr(REG_END, xy(0, 100));
    io_wr(REG_DIV, 32'd5);
    io_wr(REG_CMD, 32'h1);
    wait_arc(ok);
    check(ok, "R100 arc finished");
    ref_run(100, 0, 0, 100, 1, 5, 3);
    check(path_x.size() == ref_x.size(), $sformatf("R100: %0d steps, model %0d", path_x.size(), ref_x.size()));
    if (path_x.size() == ref_x.size()) begin
      automatic int bad = 0;
      foreach (ref_x[i]) if (path_x[i] != ref_x[i] || path_y[i] != ref_y[i]) bad++;
      check(bad == 0, "R100 path matches the model");
    end
    check(mx == 0 && my == 100, "R100 end point reached");
    m_comb = n_diag;
    check(n_diag > 0, "combined steps reach the motors");
    io_rd(REG_STATUS, v);
    check(!v[5], "no overrun with div 5 and width 2");

    // ---- 4. instructions through memory space ----
    io_wr(REG_CMD, 32'h10);
    reset_motor(0, 0);
    io_wr(REG_CTRL, ctrl_word(1, 1, 0, 0, 3, 16));
    d = {};
    d.push_back(32'({1'b0, 1'b1, 14'd9, 16'd5}));    // X +5
    d.push_back(32'({1'b1, 1'b0, 14'd5, 16'd3}));    // Y -3
    d.push_back(32'({1'b0, 1'b0, 14'd4, 16'd2}));    // X -2
    d.push_back(32'({1'b1, 1'b1, 14'd7, 16'd10}));   // Y +10
    bfm.xact(CMD_MEM_WR, MEMBASE, 0, 4, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 4 && !stopped, "instruction burst accepted");
    if (moved == 4) m_mem_burst++;
    io_rd(REG_STATUS, v);
    check(v[31:16] == 4, "four words in the FIFO");
    io_wr(REG_CTRL, ctrl_word(1, 1, 0, 1, 3, 16));
    bfm.idle(300);
    io_rd(REG_STATUS, v);
    check(v[3] && !v[2], "instructions done, FIFO empty");
    check(n_xp == 7 && n_yp == 13, $sformatf("instruction pulses %0d %0d", n_xp, n_yp));
    check(mx == 3 && my == 7, $sformatf("instruction end position %0d %0d", mx, my));
    io_rd(REG_POS, v);
    check(v == xy(3, 7), "position register after instructions");
    if (mx == 3 && my == 7) m_instr++;

    // ---- 5. fill the FIFO, retry, memory read, flush ----
    io_wr(REG_CTRL, ctrl_word(1, 1, 0, 0, 3, 16));
    for (int b = 0; b < 8; b++) begin
      d = {};
      for (int i = 0; i < 64; i++) d.push_back(32'h0);   // no-operation words
      memwr_clk = {};
      bfm.xact(CMD_MEM_WR, MEMBASE + 32'h100, 0, 64, 4'hF, d, moved, stopped, aborted, dl, tl);
      check(moved == 64, "64-word burst");
      // 32 bits per clock: 64 words in 64 consecutive clocks (132 MB/s at 33 MHz)
      check(memwr_clk.size() == 64 && memwr_clk[63] - memwr_clk[0] == 63,
            "burst moves one word per clock");
    end
    d = {32'h0, 32'h0};
    bfm.xact(CMD_MEM_WR, MEMBASE, 0, 2, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 0 && stopped, "retry when the FIFO is full");
    if (moved == 0 && stopped) m_retry++;
    bfm.xact(CMD_MEM_RD, MEMBASE, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(d.size() == 1 && d[0][4] && d[0][31:16] == 512, "status via memory read: full, 512 words");
    if (d.size() == 1) m_mem_rd++;
    check(mcu_status[4], "status port shows full");
    io_wr(REG_CMD, 32'h4);
    io_rd(REG_STATUS, v);
    check(v[3] && v[31:16] == 0, "FIFO flushed");
    if (v[3]) m_flush++;
    // a configuration burst is cut after one word
    d = {32'h3, 32'h3};
    bfm.xact(CMD_CFG_WR, 32'h4, 1, 2, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 1 && stopped, "config burst disconnected");
    if (moved == 1 && stopped) m_disc++;

    // ---- 6. second FIFO port, overrun, halt ----
    io_wr(REG_CMD, 32'h10);
    reset_motor(0, 0);
    io_wr(REG_PULSE, 32'd20);
    @(negedge clk);
    ext_wr = 1; ext_data = 32'({1'b0, 1'b1, 14'd3, 16'd4});   // X +4 every 4 clocks
    do @(posedge clk); while (!ext_ack);   // taken at this edge
    #1 ext_wr = 0;
    m_ext++;
    io_wr(REG_CTRL, ctrl_word(1, 1, 0, 1, 3, 16));
    bfm.idle(100);
    io_rd(REG_POS, v);
    check(v == xy(4, 0), $sformatf("external instruction ran (POS %h)", v));
    io_rd(REG_STATUS, v);
    check(v[5], "overrun flagged for pulses closer than their width");
    if (v[5]) m_overrun++;
    io_wr(REG_PULSE, 32'd2);
    io_wr(REG_CTRL, ctrl_word(1, 1, 1, 0, 3, 16));
    io_wr(REG_START, xy(1000, 0));
    io_wr(REG_END, xy(0, 1000));
    io_wr(REG_CMD, 32'h1);
    bfm.idle(50);
    io_wr(REG_CMD, 32'h2);
    io_rd(REG_STATUS, v);
    check(!v[0] && !v[1], "arc halted");
    if (!v[0]) m_halt++;

    // ---- bus rules and coverage ----
    check(bfm.contention == 0, "no AD contention");
    check(bfm.par_errors == 0 && bfm.par_checked > 0, "parity");
    $display("mechanisms: cfg=%0d io=%0d mem_burst=%0d mem_read=%0d retry=%0d disconnect=%0d",
             m_cfg, m_io, m_mem_burst, m_mem_rd, m_retry, m_disc);
    $display("            traditional=%0d combined_steps=%0d instructions=%0d ext_port=%0d overrun=%0d flush=%0d halt=%0d",
             m_trad, m_comb, m_instr, m_ext, m_overrun, m_flush, m_halt);
    check(m_cfg > 0 && m_io > 0 && m_mem_burst > 0 && m_mem_rd > 0 && m_retry > 0 && m_disc > 0,
          "every bus mechanism happened");
    check(m_trad > 0 && m_comb > 0 && m_instr > 0 && m_ext > 0 && m_overrun > 0 && m_flush > 0 && m_halt > 0,
          "every motion mechanism happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
