// pulse_out -- pulse output register for the X and Y motor drivers.
//
// Turns one-clock step requests into step/direction signals for two
// stepper drivers. The request source is chosen by `src_dda`: the DDA arc
// interpolator (1) or the instruction register (0). For each axis, a
// request first latches the direction; the step line rises on the next
// clock, so the direction is stable for one clock before the edge, and
// stays high for `pulse_width` clocks (0 counts as 1). A request that comes
// while the previous pulse is still high cannot be shown to the driver: it
// is counted in the position anyway and sets the sticky `overrun` flag,
// which `clear` resets. The signed counters `x_pos`/`y_pos` track the net
// number of steps sent, per axis; `clear` also zeroes them. The original design
// names this register and its outputs; widths, the direction setup clock
// and the overrun flag are this design's choice.
module pulse_out #(
  parameter int PW_W  = 8,   // width of the pulse width setting
  parameter int POS_W = 16   // width of the position counters
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    src_dda,
  input  logic [PW_W-1:0]         pulse_width,
  input  logic                    dda_step_x,
  input  logic                    dda_step_y,
  input  logic                    dda_dir_x,
  input  logic                    dda_dir_y,
  input  logic                    ins_step_x,
  input  logic                    ins_step_y,
  input  logic                    ins_dir_x,
  input  logic                    ins_dir_y,
  output logic                    x_step,
  output logic                    x_dir,
  output logic                    y_step,
  output logic                    y_dir,
  output logic signed [POS_W-1:0] x_pos,
  output logic signed [POS_W-1:0] y_pos,
  output logic                    overrun
);

  logic req_x, req_y, dir_req_x, dir_req_y, ovr_x, ovr_y;

  assign req_x     = src_dda ? dda_step_x : ins_step_x;
  assign req_y     = src_dda ? dda_step_y : ins_step_y;
  assign dir_req_x = src_dda ? dda_dir_x  : ins_dir_x;
  assign dir_req_y = src_dda ? dda_dir_y  : ins_dir_y;

  pulse_axis #(.PW_W(PW_W), .POS_W(POS_W)) u_x (
    .clk, .rst_n, .clear, .pulse_width,
    .req(req_x), .dir_req(dir_req_x),
    .step(x_step), .dir(x_dir), .pos(x_pos), .overrun(ovr_x)
  );

  pulse_axis #(.PW_W(PW_W), .POS_W(POS_W)) u_y (
    .clk, .rst_n, .clear, .pulse_width,
    .req(req_y), .dir_req(dir_req_y),
    .step(y_step), .dir(y_dir), .pos(y_pos), .overrun(ovr_y)
  );

  assign overrun = ovr_x || ovr_y;

endmodule
