// pci_master_bfm -- behavioural PCI bus master for the testbenches.
//
// Plays the host side of a 32-bit PCI bus towards a target that uses split
// input/output/enable lines. The task `xact` runs one transaction: address
// phase, then up to `n` data phases (a burst when n > 1), honouring TRDY#,
// STOP# (retry and disconnect) and master abort when no DEVSEL# comes
// within five clocks. It reports how many words moved, whether the target
// stopped the burst, and the latencies of DEVSEL# and the first TRDY#.
// Alongside, it checks every clock that master and target never drive AD
// together and that PAR matches AD and C/BE# of the clock before whenever
// the target drives it. Undriven control lines read high (bus pull-ups).
module pci_master_bfm (
  input  logic        clk,
  // from the target
  input  logic [31:0] t_ad_o,
  input  logic        t_ad_oe,
  input  logic        t_par_o,
  input  logic        t_par_oe,
  input  logic        t_devsel_n_o,
  input  logic        t_trdy_n_o,
  input  logic        t_stop_n_o,
  input  logic        t_ctl_oe,
  // to the target
  output logic [31:0] ad,
  output logic [3:0]  cbe_n,
  output logic        frame_n,
  output logic        irdy_n,
  output logic        idsel
);

  logic [31:0] m_ad = '0;
  logic        m_ad_oe = 1'b0;
  logic [3:0]  m_cbe_n = 4'hF;
  logic        m_frame_n = 1'b1, m_irdy_n = 1'b1, m_idsel = 1'b0;

  assign ad      = t_ad_oe ? t_ad_o : (m_ad_oe ? m_ad : 32'hFFFF_FFFF);
  assign cbe_n   = m_cbe_n;
  assign frame_n = m_frame_n;
  assign irdy_n  = m_irdy_n;
  assign idsel   = m_idsel;

  wire devsel_n = t_ctl_oe ? t_devsel_n_o : 1'b1;
  wire trdy_n   = t_ctl_oe ? t_trdy_n_o   : 1'b1;
  wire stop_n   = t_ctl_oe ? t_stop_n_o   : 1'b1;

  int contention = 0;
  int par_errors = 0;
  int par_checked = 0;
  logic [31:0] ad_prev;
  logic [3:0]  cbe_prev;

  bit armed = 0;   // checks start with the first transaction, after reset

  always @(posedge clk) if (armed) begin
    if (t_ad_oe && m_ad_oe) contention++;
    if (t_par_oe) begin
      par_checked++;
      if (t_par_o != ^{ad_prev, cbe_prev}) par_errors++;
    end
    ad_prev  <= ad;
    cbe_prev <= cbe_n;
  end

  task automatic idle(int n);
    repeat (n) @(posedge clk);
  endtask

  // One transaction. For writes `data` holds the words to send; for reads
  // the words received are pushed into it.
  task automatic xact(input logic [3:0] cmd, input logic [31:0] addr,
                      input bit is_cfg, input int n, input logic [3:0] be,
                      ref logic [31:0] data[$],
                      output int moved, output bit stopped, output bit aborted,
                      output int devsel_lat, output int trdy_lat);
    bit is_read;
    int cyc;
    bit xferd;
    is_read    = !cmd[0];
    moved      = 0;
    stopped    = 0;
    aborted    = 0;
    devsel_lat = -1;
    trdy_lat   = -1;
    if (is_read) data = {};
    armed = 1;
    @(posedge clk); #1;
    m_frame_n = 0; m_ad_oe = 1; m_ad = addr; m_cbe_n = cmd; m_idsel = is_cfg;
    @(posedge clk); #1;   // address phase taken
    m_idsel  = 0;
    m_cbe_n  = ~be;
    m_irdy_n = 0;
    if (is_read) m_ad_oe = 0; else m_ad = data[0];
    if (n == 1) m_frame_n = 1;
    cyc = 0;
    forever begin
      @(posedge clk);
      cyc++;
      if (!devsel_n && devsel_lat < 0) devsel_lat = cyc;
      xferd = !trdy_n && !m_irdy_n;
      if (xferd) begin
        if (trdy_lat < 0) trdy_lat = cyc;
        if (is_read) data.push_back(ad);
        moved++;
      end
      if (!stop_n) stopped = 1;
      if (devsel_lat < 0 && cyc >= 5) begin
        // master abort
        aborted = 1;
        #1; m_frame_n = 1;
        @(posedge clk); #1;
        m_irdy_n = 1; m_ad_oe = 0; m_cbe_n = 4'hF;
        break;
      end
      if (m_frame_n && (xferd || !stop_n)) begin
        #1; m_irdy_n = 1; m_ad_oe = 0; m_cbe_n = 4'hF;
        break;
      end
      #1;
      if (!stop_n) m_frame_n = 1;
      else if (xferd) begin
        if (!is_read) m_ad = data[moved];
        if (moved == n - 1) m_frame_n = 1;
      end
    end
    @(posedge clk);  // bus idle clock
  endtask

endmodule
