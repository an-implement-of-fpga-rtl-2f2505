// motion_ctrl_top -- FPGA logic of a PCI motion control board for a
// two-axis (X-Y) machine.
//
// The host reaches the board as a PCI target. Configuration space holds the
// IDs and two base address registers; I/O space (BAR1) holds the function
// registers that choose the mode and set up an arc; memory space (BAR0)
// takes bursts of motion instructions into the data FIFO. Two pulse
// sources drive the X and Y stepper drivers through the pulse output
// register: the instruction register, which plays the FIFO's instructions
// as frequency-controlled pulse trains, and the DDA arc interpolator, which
// moves the cursor along a circular arc. Which one drives the motors is a
// function register bit.
//
//   PCI bus -> pci_target -+-> func_regs --(mode, arc)--> dda_arc ---+
//                          +-> data_fifo ---> instr_reg -------------+-> pulse_out -> motors
//
// The bus lines come as separate input, output and output-enable signals
// for the external level converters. The FIFO has a second write port,
// `ext_*`, for the board's CAN controller; a PCI write wins a clash and
// the external word waits (`ext_ack` low). `mcu_status` shows the status
// word to the board's microcontroller. The block partition follows the
// board's block diagram; how the blocks talk to each other is this
// design's choice. Everything runs on the 33 MHz PCI clock.
module motion_ctrl_top
  import motion_pkg::*;
#(
  parameter int FIFO_DEPTH = 512
) (
  input  logic        clk,
  input  logic        rst_n,
  // PCI bus (through the level converters)
  input  logic [31:0] pci_ad_i,
  output logic [31:0] pci_ad_o,
  output logic        pci_ad_oe,
  input  logic [3:0]  pci_cbe_n_i,
  output logic        pci_par_o,
  output logic        pci_par_oe,
  input  logic        pci_frame_n_i,
  input  logic        pci_irdy_n_i,
  input  logic        pci_idsel_i,
  output logic        pci_devsel_n_o,
  output logic        pci_trdy_n_o,
  output logic        pci_stop_n_o,
  output logic        pci_ctl_oe,
  // second FIFO write port (CAN controller side)
  input  logic        ext_wr,
  input  logic [31:0] ext_data,
  output logic        ext_ack,
  // to the microcontroller
  output logic [31:0] mcu_status,
  // motor drivers
  output logic        x_step,
  output logic        x_dir,
  output logic        y_step,
  output logic        y_dir
);

  localparam int CNT_W = $clog2(FIFO_DEPTH) + 1;

  // PCI target <-> back end
  logic        io_wr, mem_wr;
  logic [2:0]  io_addr;
  logic [31:0] io_wdata, io_rdata, mem_wdata;
  logic [3:0]  io_be;

  // function register fields
  logic        ccw, improved, src_dda, instr_en;
  logic [2:0]  lambda_shift;
  logic [4:0]  acc_bits;
  logic signed [15:0] xs, ys, xe, ye, x_pos, y_pos;
  logic [15:0] div;
  logic [7:0]  pulse_width;
  logic        dda_start, dda_halt, fifo_flush, instr_halt, pos_clear;

  // FIFO
  logic        fifo_wr, fifo_rd, fifo_empty, fifo_full;
  logic [31:0] fifo_wdata, fifo_rdata;
  logic [CNT_W-1:0] fifo_count;

  // pulse sources
  logic dda_busy, dda_done, dda_sx, dda_sy, dda_dx, dda_dy;
  logic ins_busy, ins_sx, ins_sy, ins_dx, ins_dy;
  logic overrun;

  pci_target u_pci (
    .clk, .rst_n,
    .ad_i(pci_ad_i), .ad_o(pci_ad_o), .ad_oe(pci_ad_oe), .cbe_n_i(pci_cbe_n_i),
    .par_o(pci_par_o), .par_oe(pci_par_oe), .frame_n_i(pci_frame_n_i),
    .irdy_n_i(pci_irdy_n_i), .idsel_i(pci_idsel_i), .devsel_n_o(pci_devsel_n_o),
    .trdy_n_o(pci_trdy_n_o), .stop_n_o(pci_stop_n_o), .ctl_oe(pci_ctl_oe),
    .io_wr, .io_addr, .io_wdata, .io_be, .io_rdata,
    .mem_wr, .mem_wdata, .mem_full(fifo_full), .mem_rdata(mcu_status),
    .state()
  );

  func_regs #(.CNT_W(CNT_W)) u_regs (
    .clk, .rst_n,
    .wr_en(io_wr), .addr(io_addr), .wdata(io_wdata), .be(io_be), .rdata(io_rdata),
    .status(mcu_status),
    .ccw, .improved, .src_dda, .instr_en, .lambda_shift, .acc_bits,
    .xs, .ys, .xe, .ye, .div, .pulse_width,
    .dda_start, .dda_halt, .fifo_flush, .instr_halt, .pos_clear,
    .dda_busy, .dda_done, .instr_busy(ins_busy), .fifo_empty, .fifo_full,
    .fifo_count, .overrun, .x_pos, .y_pos
  );

  // PCI writes first; the external port fills the free clocks
  assign fifo_wr    = mem_wr || (ext_wr && !fifo_full);
  assign fifo_wdata = mem_wr ? mem_wdata : ext_data;
  assign ext_ack    = ext_wr && !mem_wr && !fifo_full;

  data_fifo #(.WIDTH(32), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .flush(fifo_flush),
    .wr_en(fifo_wr), .wr_data(fifo_wdata),
    .rd_en(fifo_rd), .rd_data(fifo_rdata),
    .empty(fifo_empty), .full(fifo_full), .count(fifo_count)
  );

  instr_reg u_instr (
    .clk, .rst_n, .enable(instr_en), .halt(instr_halt),
    .fifo_empty, .fifo_data(fifo_rdata), .fifo_rd,
    .busy(ins_busy), .step_x(ins_sx), .step_y(ins_sy), .dir_x(ins_dx), .dir_y(ins_dy)
  );

  dda_arc #(.COORD_W(16), .N_MAX(16), .SHIFT_MAX(7), .DIV_W(16)) u_dda (
    .clk, .rst_n, .start(dda_start), .halt(dda_halt),
    .ccw, .improved, .acc_bits, .lambda_shift, .div,
    .xs, .ys, .xe, .ye,
    .busy(dda_busy), .done(dda_done),
    .step_x(dda_sx), .step_y(dda_sy), .dir_x(dda_dx), .dir_y(dda_dy),
    .combined(), .x_cur(), .y_cur()
  );

  pulse_out #(.PW_W(8), .POS_W(16)) u_pulse (
    .clk, .rst_n, .clear(pos_clear), .src_dda, .pulse_width,
    .dda_step_x(dda_sx), .dda_step_y(dda_sy), .dda_dir_x(dda_dx), .dda_dir_y(dda_dy),
    .ins_step_x(ins_sx), .ins_step_y(ins_sy), .ins_dir_x(ins_dx), .ins_dir_y(ins_dy),
    .x_step, .x_dir, .y_step, .y_dir, .x_pos, .y_pos, .overrun
  );

endmodule
