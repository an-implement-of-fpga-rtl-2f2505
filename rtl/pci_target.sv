// pci_target -- PCI protocol decoding block (32-bit, 33 MHz PCI target).
//
// Separates address and data on the multiplexed AD lines, claims the
// accesses meant for this device and carries out their data phases. It
// answers three kinds of access:
//   * configuration read/write (IDSEL high, type 0) to a 256-byte header:
//     vendor/device ID, command register (I/O and memory enable), class
//     code, BAR0 (memory, 2^MEM_LOG2 bytes), BAR1 (I/O, 2^IO_LOG2 bytes)
//     and interrupt line; the host writes the assigned base addresses back
//     into the BARs;
//   * I/O read/write hitting BAR1, passed to the function registers;
//   * memory read/write hitting BAR0; writes (bursts allowed) go into the
//     data FIFO, reads return `mem_rdata` (the status word).
//
// The kernel is a state machine whose states follow the state diagram:
// idle -> con_wait / io_wait / mem_wait for a write, or idle -> read_wait
// (AD turnaround) -> read_wait2 (back-end data fetched) -> the wait state
// of its space for a read; then con (configuration data phase) or rw (I/O
// or memory data phases) and finally backoff, where DEVSEL#, TRDY# and
// STOP# are driven high for one clock before they are released in idle.
// The conditions on the transitions are this design's choice.
//
// Timing, counted from the address phase clock (clock 0): DEVSEL# is
// asserted in clock 1 (fast decode, within the three clocks a target has).
// A write's TRDY# comes in clock 2, a read's in clock 4. Configuration and
// I/O accesses transfer one word: STOP# goes with TRDY# so a master that
// tries a burst is disconnected after the first data phase. Memory writes
// transfer one word per clock while IRDY# is low; when the FIFO is full the
// target drops TRDY# and asserts STOP# (retry or disconnect without data)
// and keeps them so until FRAME# is released. PAR is driven for reads one
// clock after AD. An address phase that starts during backoff (fast
// back-to-back) is not claimed. The level converters sit outside: every bus line comes
// as separate input, output and output-enable signals. No parity error or
// SERR# reporting, no 64-bit or dual-address cycles, no interrupts.
module pci_target
  import motion_pkg::*;
#(
  parameter logic [15:0] VENDOR_ID  = 16'h1234,
  parameter logic [15:0] DEVICE_ID  = 16'h0DDA,
  parameter logic [7:0]  REVISION   = 8'h01,
  parameter logic [23:0] CLASS_CODE = 24'h118000,  // data acquisition, other
  parameter int          MEM_LOG2   = 12,          // BAR0 size 4 KiB
  parameter int          IO_LOG2    = 5            // BAR1 size 32 bytes
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI bus
  input  logic [31:0] ad_i,
  output logic [31:0] ad_o,
  output logic        ad_oe,
  input  logic [3:0]  cbe_n_i,
  output logic        par_o,
  output logic        par_oe,
  input  logic        frame_n_i,
  input  logic        irdy_n_i,
  input  logic        idsel_i,
  output logic        devsel_n_o,
  output logic        trdy_n_o,
  output logic        stop_n_o,
  output logic        ctl_oe,      // enables DEVSEL#, TRDY#, STOP#
  // back end: I/O space (function registers)
  output logic        io_wr,
  output logic [IO_LOG2-3:0] io_addr,
  output logic [31:0] io_wdata,
  output logic [3:0]  io_be,       // active high
  input  logic [31:0] io_rdata,
  // back end: memory space (data FIFO)
  output logic        mem_wr,
  output logic [31:0] mem_wdata,
  input  logic        mem_full,
  input  logic [31:0] mem_rdata,
  // visibility
  output pci_state_e  state
);

  pci_state_e  state_q, state_d;
  pci_space_e  space_q;
  logic        read_q;
  logic [31:0] addr_q;
  logic [31:0] rdata_q;
  logic        frame_prev_n;
  logic        retry_q;

  // configuration registers
  logic [1:0]  cmd_q;          // [0] I/O space enable, [1] memory enable
  logic [31:MEM_LOG2] bar0_q;
  logic [31:IO_LOG2]  bar1_q;
  logic [7:0]  int_line_q;

  assign state = state_q;

  // ---- address phase decode ----------------------------------------------
  pci_cmd_e cmd_in;
  logic     addr_phase, hit_cfg, hit_io, hit_mem, is_read_cmd;

  assign cmd_in     = pci_cmd_e'(cbe_n_i);
  assign addr_phase = (state_q == ST_IDLE) && !frame_n_i && frame_prev_n;

  always_comb begin
    hit_cfg = idsel_i && (ad_i[1:0] == 2'b00) &&
              (cmd_in == CMD_CFG_RD || cmd_in == CMD_CFG_WR);
    hit_io  = cmd_q[0] && (ad_i[31:IO_LOG2] == bar1_q) &&
              (cmd_in == CMD_IO_RD || cmd_in == CMD_IO_WR);
    hit_mem = cmd_q[1] && (ad_i[31:MEM_LOG2] == bar0_q) &&
              (cmd_in == CMD_MEM_RD || cmd_in == CMD_MEM_WR ||
               cmd_in == CMD_MEM_RDMUL || cmd_in == CMD_MEM_RDLN ||
               cmd_in == CMD_MEM_WRINV);
    is_read_cmd = !cbe_n_i[0];  // even command codes are reads
  end

  // ---- configuration space read ------------------------------------------
  function automatic logic [31:0] cfg_read(input logic [5:0] idx);
    unique case (idx)
      6'h00:   return {DEVICE_ID, VENDOR_ID};
      6'h01:   return {16'h0000, 14'd0, cmd_q};       // status: fast DEVSEL#
      6'h02:   return {CLASS_CODE, REVISION};
      6'h04:   return {bar0_q, MEM_LOG2'(0)};         // 32-bit, non-prefetchable
      6'h05:   return {bar1_q, IO_LOG2'(1)};          // bit 0 set: I/O BAR
      6'h0B:   return {DEVICE_ID, VENDOR_ID};         // subsystem IDs
      6'h0F:   return {24'h000000, int_line_q};       // no interrupt pin
      default: return 32'h0000_0000;
    endcase
  endfunction

  // ---- data phase signals --------------------------------------------------
  logic in_data, blocked, trdy, stop, xfer, last;

  assign in_data = (state_q == ST_CON) || (state_q == ST_RW);
  assign blocked = in_data && (retry_q ||
                   (space_q == SP_MEM && !read_q && mem_full));
  assign trdy    = in_data && !blocked;
  assign stop    = in_data && (blocked || space_q != SP_MEM);
  assign xfer    = trdy && !irdy_n_i;
  assign last    = in_data && frame_n_i && !irdy_n_i && (trdy || stop);

  assign devsel_n_o = !(state_q != ST_IDLE && state_q != ST_BACKOFF);
  assign trdy_n_o   = !trdy;
  assign stop_n_o   = !stop;
  assign ctl_oe     = (state_q != ST_IDLE);
  assign ad_oe      = read_q && (state_q == ST_READ_WAIT2 || state_q == ST_CON_WAIT ||
                                 state_q == ST_IO_WAIT || state_q == ST_MEM_WAIT || in_data);
  assign ad_o       = rdata_q;

  // back-end strobes: one per completed write data phase
  assign io_wr     = xfer && !read_q && space_q == SP_IO;
  assign io_addr   = addr_q[IO_LOG2-1:2];
  assign io_wdata  = ad_i;
  assign io_be     = ~cbe_n_i;
  assign mem_wr    = xfer && !read_q && space_q == SP_MEM;
  assign mem_wdata = ad_i;

  function automatic pci_state_e wait_state(input pci_space_e sp);
    unique case (sp)
      SP_CFG:  return ST_CON_WAIT;
      SP_IO:   return ST_IO_WAIT;
      default: return ST_MEM_WAIT;
    endcase
  endfunction

  // ---- state machine --------------------------------------------------------
  always_comb begin
    state_d = state_q;
    unique case (state_q)
      ST_IDLE:
        if (addr_phase && (hit_cfg || hit_io || hit_mem)) begin
          if (is_read_cmd)  state_d = ST_READ_WAIT;
          else if (hit_cfg) state_d = ST_CON_WAIT;
          else if (hit_io)  state_d = ST_IO_WAIT;
          else              state_d = ST_MEM_WAIT;
        end
      ST_READ_WAIT:  state_d = ST_READ_WAIT2;
      ST_READ_WAIT2: state_d = wait_state(space_q);
      ST_CON_WAIT:   state_d = ST_CON;
      ST_IO_WAIT,
      ST_MEM_WAIT:   state_d = ST_RW;
      ST_CON,
      ST_RW:         if (last) state_d = ST_BACKOFF;
      ST_BACKOFF:    state_d = ST_IDLE;
      default:       state_d = ST_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q      <= ST_IDLE;
      space_q      <= SP_CFG;
      read_q       <= 1'b0;
      addr_q       <= '0;
      rdata_q      <= '0;
      frame_prev_n <= 1'b1;
      retry_q      <= 1'b0;
      cmd_q        <= '0;
      bar0_q       <= '0;
      bar1_q       <= '0;
      int_line_q   <= '0;
      par_o        <= 1'b0;
      par_oe       <= 1'b0;
    end else begin
      state_q      <= state_d;
      frame_prev_n <= frame_n_i;
      // parity of the AD and C/BE# lines of a read data phase, one clock late
      par_o        <= ^{ad_o, cbe_n_i};
      par_oe       <= ad_oe;

      if (state_q == ST_IDLE) begin
        retry_q <= 1'b0;
        if (addr_phase) begin
          addr_q  <= ad_i;
          read_q  <= is_read_cmd;
          space_q <= hit_cfg ? SP_CFG : (hit_io ? SP_IO : SP_MEM);
        end
      end

      // STOP# stays once asserted; a single-word space also holds TRDY#
      // off after its one transfer
      if (blocked || (xfer && space_q != SP_MEM)) retry_q <= 1'b1;

      // fetch read data from the selected space
      if (state_q == ST_READ_WAIT2 || (state_q == ST_RW && xfer)) begin
        unique case (space_q)
          SP_CFG:  rdata_q <= cfg_read(addr_q[7:2]);
          SP_IO:   rdata_q <= io_rdata;
          default: rdata_q <= mem_rdata;
        endcase
      end

      // configuration writes, byte by byte
      if (state_q == ST_CON && xfer && !read_q) begin
        unique case (addr_q[7:2])
          6'h01: if (!cbe_n_i[0]) cmd_q <= ad_i[1:0];
          6'h04: begin
            for (int b = 0; b < 4; b++)
              if (!cbe_n_i[b])
                for (int i = b * 8; i < b * 8 + 8; i++)
                  if (i >= MEM_LOG2) bar0_q[i] <= ad_i[i];
          end
          6'h05: begin
            for (int b = 0; b < 4; b++)
              if (!cbe_n_i[b])
                for (int i = b * 8; i < b * 8 + 8; i++)
                  if (i >= IO_LOG2) bar1_q[i] <= ad_i[i];
          end
          6'h0F: if (!cbe_n_i[0]) int_line_q <= ad_i[7:0];
          default: ;
        endcase
      end
    end
  end

  // ---- bus rules -------------------------------------------------------------
  // DEVSEL# must be asserted before TRDY# or STOP# and stay asserted
  // until the transaction ends.
  a_trdy_needs_devsel: assert property (@(posedge clk) disable iff (!rst_n)
    (!trdy_n_o || !stop_n_o) |-> !devsel_n_o);
  // AD is only driven for reads that this target has claimed.
  a_ad_only_on_read: assert property (@(posedge clk) disable iff (!rst_n)
    ad_oe |-> (read_q && !devsel_n_o));
  // Once STOP# is asserted it stays until the data phase ends.
  a_stop_holds: assert property (@(posedge clk) disable iff (!rst_n)
    (!stop_n_o && !last) |=> !stop_n_o);

endmodule
