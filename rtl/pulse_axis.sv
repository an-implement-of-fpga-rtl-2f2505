// pulse_axis -- step/direction pulse shaper for one motor axis.
//
// A one-clock `req` latches `dir_req` into `dir` at once, raises `step` one
// clock later and holds it high for `pulse_width` clocks (0 counts as 1).
// `pos` counts +1 or -1 per request. A request that arrives while a pulse
// is pending or high is still counted but sets the sticky `overrun` flag;
// `clear` zeroes `pos` and `overrun`. Used twice by pulse_out.
module pulse_axis #(
  parameter int PW_W  = 8,
  parameter int POS_W = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic [PW_W-1:0]         pulse_width,
  input  logic                    req,
  input  logic                    dir_req,
  output logic                    step,
  output logic                    dir,
  output logic signed [POS_W-1:0] pos,
  output logic                    overrun
);

  logic            pending;
  logic [PW_W-1:0] hold;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pending <= 1'b0;
      step    <= 1'b0;
      dir     <= 1'b0;
      hold    <= '0;
      pos     <= '0;
      overrun <= 1'b0;
    end else begin
      if (clear) begin
        pos     <= '0;
        overrun <= 1'b0;
      end
      if (req) begin
        if (pending || step) overrun <= 1'b1;
        dir     <= dir_req;
        pending <= 1'b1;
        if (!clear) pos <= dir_req ? pos + 1'b1 : pos - 1'b1;
      end else if (pending) begin
        pending <= 1'b0;
        step    <= 1'b1;
        hold    <= (pulse_width == '0) ? PW_W'(1) : pulse_width;
      end else if (step) begin
        if (hold == PW_W'(1)) step <= 1'b0;
        hold <= hold - 1'b1;
      end
    end
  end

endmodule
