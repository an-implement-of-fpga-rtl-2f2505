// tb_pci_target -- self-checking testbench for the PCI target.
//
// A behavioural PCI master (pci_master_bfm) drives configuration, I/O and
// memory transactions. The I/O space is backed by an eight-word register
// model and the memory space by a queue with a settable capacity that
// stands in for the data FIFO. Checked: the configuration header (IDs,
// BAR sizing and assignment, command enables, byte enables), master abort
// on unclaimed accesses, DEVSEL# within three clocks, I/O writes and reads,
// memory bursts at one word per clock, retry and disconnect when the FIFO
// is full, disconnect of a configuration burst after one word, parity, no
// AD contention, and that every state of the state machine is visited.
module tb_pci_target;
  import motion_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #15 clk = ~clk;   // 33 MHz

  logic [31:0] ad, ad_o;
  logic [3:0]  cbe_n;
  logic        ad_oe, par_o, par_oe, frame_n, irdy_n, idsel;
  logic        devsel_n_o, trdy_n_o, stop_n_o, ctl_oe;
  logic        io_wr, mem_wr, mem_full;
  logic [2:0]  io_addr;
  logic [31:0] io_wdata, io_rdata, mem_wdata, mem_rdata;
  logic [3:0]  io_be;
  pci_state_e  state;

  pci_target dut (
    .clk, .rst_n, .ad_i(ad), .ad_o, .ad_oe, .cbe_n_i(cbe_n), .par_o, .par_oe,
    .frame_n_i(frame_n), .irdy_n_i(irdy_n), .idsel_i(idsel),
    .devsel_n_o, .trdy_n_o, .stop_n_o, .ctl_oe,
    .io_wr, .io_addr, .io_wdata, .io_be, .io_rdata,
    .mem_wr, .mem_wdata, .mem_full, .mem_rdata, .state
  );

  pci_master_bfm bfm (
    .clk, .t_ad_o(ad_o), .t_ad_oe(ad_oe), .t_par_o(par_o), .t_par_oe(par_oe),
    .t_devsel_n_o(devsel_n_o), .t_trdy_n_o(trdy_n_o), .t_stop_n_o(stop_n_o),
    .t_ctl_oe(ctl_oe), .ad, .cbe_n, .frame_n, .irdy_n, .idsel
  );

  // back-end models
  logic [31:0] io_regs [8];
  logic [31:0] fifo_q[$];
  int          fifo_cap = 1000;
  int          mem_wr_clk[$];
  int          clk_no = 0;
  assign io_rdata  = io_regs[io_addr];
  assign mem_full  = (fifo_q.size() >= fifo_cap);
  assign mem_rdata = 32'h5A5A_0000 | 32'(fifo_q.size());
  always @(posedge clk) begin
    clk_no++;
    if (io_wr)
      for (int b = 0; b < 4; b++) if (io_be[b]) io_regs[io_addr][b*8 +: 8] <= io_wdata[b*8 +: 8];
    if (mem_wr) begin fifo_q.push_back(mem_wdata); mem_wr_clk.push_back(clk_no); end
  end

  int state_seen [9];
  always @(posedge clk) if (rst_n) state_seen[int'(state)]++;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  logic [31:0] d[$];
  int moved, dl, tl;
  bit stopped, aborted;

  task automatic cfg_wr(logic [7:0] off, logic [31:0] v, logic [3:0] be = 4'hF);
    d = {v};
    bfm.xact(CMD_CFG_WR, {24'h0, off}, 1, 1, be, d, moved, stopped, aborted, dl, tl);
  endtask
  task automatic cfg_rd(logic [7:0] off, output logic [31:0] v);
    bfm.xact(CMD_CFG_RD, {24'h0, off}, 1, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    v = (d.size() > 0) ? d[0] : 32'hDEAD_BEEF;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] v;
  localparam logic [31:0] MEMBASE = 32'h8000_0000, IOBASE = 32'h0000_C000;

  initial begin
    foreach (io_regs[i]) io_regs[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bfm.idle(2);

    // device and vendor ID
    cfg_rd(8'h00, v);
    check(v == {16'h0DDA, 16'h1234}, "vendor/device ID");
    check(dl >= 1 && dl <= 3, $sformatf("DEVSEL# latency %0d", dl));
    check(tl == 4, $sformatf("config read TRDY# latency %0d, expected 4", tl));
    cfg_rd(8'h08, v);
    check(v == {24'h118000, 8'h01}, "class code / revision");

    // no IDSEL: nobody answers
    d = {};
    bfm.xact(CMD_CFG_RD, 32'h0, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(aborted && moved == 0, "config read without IDSEL is not claimed");

    // I/O and memory disabled before the command register is set
    bfm.xact(CMD_IO_RD, IOBASE, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(aborted, "I/O access ignored while disabled");

    // BAR sizing
    cfg_wr(8'h10, 32'hFFFF_FFFF);
    check(tl == 2, $sformatf("config write TRDY# latency %0d, expected 2", tl));
    cfg_rd(8'h10, v);
    check(v == 32'hFFFF_F000, $sformatf("BAR0 size mask %h", v));
    cfg_wr(8'h14, 32'hFFFF_FFFF);
    cfg_rd(8'h14, v);
    check(v == 32'hFFFF_FFE1, $sformatf("BAR1 size mask %h", v));

    // assign the bases, byte enables on BAR0: upper half first, then lower
    cfg_wr(8'h10, 32'h8000_0000, 4'b1100);
    cfg_wr(8'h10, 32'h0000_0000, 4'b0011);
    cfg_rd(8'h10, v);
    check(v == MEMBASE, $sformatf("BAR0 %h", v));
    cfg_wr(8'h14, IOBASE);
    cfg_rd(8'h14, v);
    check(v == (IOBASE | 32'h1), $sformatf("BAR1 %h", v));
    cfg_wr(8'h04, 32'h0000_0003);
    cfg_rd(8'h04, v);
    check(v[1:0] == 2'b11, "command register");
    cfg_wr(8'h3C, 32'h0000_000B, 4'b0001);
    cfg_rd(8'h3C, v);
    check(v == 32'h0000_000B, "interrupt line");

    // a configuration burst is disconnected after one word
    d = {32'h0000_0003, 32'h0000_0000};
    bfm.xact(CMD_CFG_WR, 32'h4, 1, 2, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 1 && stopped, $sformatf("config burst disconnect moved=%0d", moved));
    cfg_rd(8'h04, v);
    check(v[1:0] == 2'b11, "second burst word not taken");

    // I/O write and read back, with a byte enable
    d = {32'hCAFE_F00D};
    bfm.xact(CMD_IO_WR, IOBASE + 8, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 1 && io_regs[2] == 32'hCAFE_F00D, "I/O write");
    d = {32'h0000_0077};
    bfm.xact(CMD_IO_WR, IOBASE + 8, 0, 1, 4'b0001, d, moved, stopped, aborted, dl, tl);
    check(io_regs[2] == 32'hCAFE_F077, "I/O byte write");
    io_regs[5] = 32'h1357_9BDF;
    bfm.xact(CMD_IO_RD, IOBASE + 20, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(d.size() == 1 && d[0] == 32'h1357_9BDF, "I/O read");
    check(tl == 4, $sformatf("I/O read TRDY# latency %0d", tl));
    bfm.xact(CMD_IO_RD, IOBASE + 32, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(aborted, "I/O access outside BAR1 ignored");

    // memory burst write, one word per clock
    d = {};
    for (int i = 0; i < 8; i++) d.push_back(32'h1000_0000 + i * 3);
    mem_wr_clk = {};
    bfm.xact(CMD_MEM_WR, MEMBASE + 16, 0, 8, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 8 && !stopped, "memory burst write of 8");
    check(fifo_q.size() == 8, "8 words in FIFO");
    for (int i = 0; i < 8 && i < fifo_q.size(); i++)
      check(fifo_q[i] == 32'h1000_0000 + i * 3, "FIFO word order");
    check(mem_wr_clk.size() == 8 && mem_wr_clk[7] - mem_wr_clk[0] == 7, "one word per clock");

    // FIFO full: retry, then disconnect part way
    fifo_cap = 8;
    d = {32'h1, 32'h2};
    bfm.xact(CMD_MEM_WR, MEMBASE, 0, 2, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 0 && stopped, "retry when FIFO full");
    fifo_cap = 11;
    d = {};
    for (int i = 0; i < 6; i++) d.push_back(32'hA0 + i);
    bfm.xact(CMD_MEM_WR, MEMBASE, 0, 6, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 3 && stopped, $sformatf("disconnect when FIFO fills (moved %0d)", moved));
    check(fifo_q.size() == 11 && fifo_q[10] == 32'hA2, "words before disconnect kept");
    fifo_cap = 1000;

    // memory read (status word), burst of 2
    bfm.xact(CMD_MEM_RD, MEMBASE + 4, 0, 2, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(moved == 2 && d.size() == 2 && d[0] == 32'h5A5A_000B, "memory read");
    bfm.xact(CMD_MEM_WR, MEMBASE + 32'h1000, 0, 1, 4'hF, d, moved, stopped, aborted, dl, tl);
    check(aborted, "memory access outside BAR0 ignored");

    // bus rules
    check(bfm.contention == 0, "no AD contention");
    check(bfm.par_errors == 0 && bfm.par_checked > 0,
          $sformatf("parity (%0d checked, %0d wrong)", bfm.par_checked, bfm.par_errors));
    foreach (state_seen[i])
      check(state_seen[i] > 0, $sformatf("state %s visited", pci_state_e'(i)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
