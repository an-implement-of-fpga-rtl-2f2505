// dda_arc -- improved DDA circular arc interpolator.
//
// A digital differential analyser walks the cursor along a circular arc
// centred on the origin, one unit step per axis at a time. Each axis has an
// integrand and an integral accumulator: the X integrand is |y| of the
// current point and the Y integrand is |x|. On every tick of the integral
// clock both accumulators add their integrand; a sum that reaches the
// threshold T = 2^(n+k) overflows and steps that axis by one unit. The
// accumulators start half loaded (T/2). Dividing T by 2^k is the same as
// weighting the integrand by lambda = 2^-k before it is added, which keeps
// the path close to the arc when the radius is large next to 2^n.
//
// Sawtooth elimination (`improved`): when one axis overflows on a tick and
// the other axis would overflow on the next tick (its accumulator plus twice
// its weighted integrand reaches T), the second axis is stepped now as well,
// so the two unit steps become one combined diagonal step. The accumulator
// of an axis stepped early holds sum - T, a negative value, so the
// accumulators carry a sign bit and a carry bit beyond the n+k magnitude
// bits. An ordinary overflow keeps sum mod T. With `improved` clear the unit
// is the weighted DDA; with k = 0 as well it is the traditional DDA.
//
// Each axis stops stepping once it has arrived at its end coordinate (the
// "arriving trigger"); the arc is finished when both have arrived. Step
// directions follow from the sign of the current coordinates and `ccw`, so
// an arc may cross quadrant boundaries (the derivation is for the first
// quadrant; the sign handling is this design's extension of it).
//
// Interface: pulse `start` for one clock with the start point, end point
// and mode inputs stable; they are captured then. `busy` is high until the
// end point is reached or `halt` is pulsed; `done` pulses for one clock at
// the end. `step_x`/`step_y` are one-clock strobes with `dir_x`/`dir_y`
// (1 = positive) valid in the same clock; `x_cur`/`y_cur` are the point
// after the step. Timing: one integral-clock tick every `div`+1 clocks, at
// most one step per axis per tick, the first tick `div`+1 clocks after
// `start`. The end point must lie on the arc's lattice path, otherwise the
// unit runs until `halt`.
module dda_arc #(
  parameter int COORD_W   = 16,  // signed coordinate width
  parameter int N_MAX     = 16,  // largest accumulator magnitude width n
  parameter int SHIFT_MAX = 7,   // largest weighting shift k (lambda = 2^-k)
  parameter int DIV_W     = 16   // width of the integral clock divider
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic                      halt,
  input  logic                      ccw,           // 1: anticlockwise
  input  logic                      improved,      // sawtooth elimination
  input  logic [4:0]                acc_bits,      // n, 1..N_MAX
  input  logic [2:0]                lambda_shift,  // k, 0..SHIFT_MAX
  input  logic [DIV_W-1:0]          div,           // tick period - 1
  input  logic signed [COORD_W-1:0] xs,
  input  logic signed [COORD_W-1:0] ys,
  input  logic signed [COORD_W-1:0] xe,
  input  logic signed [COORD_W-1:0] ye,
  output logic                      busy,
  output logic                      done,
  output logic                      step_x,
  output logic                      step_y,
  output logic                      dir_x,
  output logic                      dir_y,
  output logic                      combined,      // both axes stepped
  output logic signed [COORD_W-1:0] x_cur,
  output logic signed [COORD_W-1:0] y_cur
);

  // Accumulator: n+k magnitude bits plus carry and sign, and room for an
  // integrand that is wider than the accumulator.
  localparam int MAG_W = (N_MAX + SHIFT_MAX > COORD_W) ? N_MAX + SHIFT_MAX : COORD_W;
  localparam int ACC_W = MAG_W + 3;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t             acc_x, acc_y;
  logic [DIV_W-1:0] tick_cnt;
  logic             tick;
  logic             ccw_q, improved_q;
  logic [5:0]       nk_q;  // n + k
  logic signed [COORD_W-1:0] xe_q, ye_q;

  // ---- integral clock ----------------------------------------------------
  assign tick = busy && (tick_cnt == div);

  // ---- one interpolation step (combinational) ----------------------------
  // n + k of a new arc, n clamped to 1..N_MAX and k to 0..SHIFT_MAX.
  logic [5:0] nk_in, n_in, k_in;
  always_comb begin
    n_in = {1'b0, acc_bits};
    if (n_in == 6'd0)        n_in = 6'd1;
    if (n_in > 6'(N_MAX))    n_in = 6'(N_MAX);
    k_in = {3'b0, lambda_shift};
    if (k_in > 6'(SHIFT_MAX)) k_in = 6'(SHIFT_MAX);
    nk_in = n_in + k_in;
  end

  acc_t thr, int_x, int_y, sum_x, sum_y, nxt_x, nxt_y;
  logic arrive_x, arrive_y, ov_x, ov_y, adv_x, adv_y, go_x, go_y;
  logic dpos_x, dpos_y;

  function automatic acc_t abs_ext(input logic signed [COORD_W-1:0] v);
    acc_t e;
    e = acc_t'(v);
    return (e < 0) ? -e : e;
  endfunction

  always_comb begin
    thr   = acc_t'(1) <<< nk_q;
    int_x = abs_ext(y_cur);  // X integrand register holds |y|
    int_y = abs_ext(x_cur);  // Y integrand register holds |x|
    sum_x = acc_x + int_x;
    sum_y = acc_y + int_y;
    arrive_x = (x_cur == xe_q);
    arrive_y = (y_cur == ye_q);
    ov_x  = !arrive_x && (sum_x >= thr);
    ov_y  = !arrive_y && (sum_y >= thr);
    adv_x = improved_q && !arrive_x && (sum_x + int_x >= thr);
    adv_y = improved_q && !arrive_y && (sum_y + int_y >= thr);
    go_x  = ov_x || (adv_x && ov_y);
    go_y  = ov_y || (adv_y && ov_x);
    // Ordinary overflow keeps the remainder; an early step goes negative.
    if (sum_x >= thr)  nxt_x = sum_x & (thr - acc_t'(1));
    else if (go_x)     nxt_x = sum_x - thr;
    else               nxt_x = sum_x;
    if (sum_y >= thr)  nxt_y = sum_y & (thr - acc_t'(1));
    else if (go_y)     nxt_y = sum_y - thr;
    else               nxt_y = sum_y;
    // Tangent direction: anticlockwise (dx, dy) ~ (-y, x); clockwise (y, -x).
    dpos_x = ccw_q ? (y_cur < 0) : (y_cur > 0);
    dpos_y = ccw_q ? (x_cur > 0) : (x_cur < 0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      step_x     <= 1'b0;
      step_y     <= 1'b0;
      dir_x      <= 1'b0;
      dir_y      <= 1'b0;
      combined   <= 1'b0;
      x_cur      <= '0;
      y_cur      <= '0;
      xe_q       <= '0;
      ye_q       <= '0;
      acc_x      <= '0;
      acc_y      <= '0;
      tick_cnt   <= '0;
      ccw_q      <= 1'b0;
      improved_q <= 1'b0;
      nk_q       <= 6'd1;
    end else begin
      step_x   <= 1'b0;
      step_y   <= 1'b0;
      combined <= 1'b0;
      done     <= 1'b0;
      if (start) begin
        busy       <= 1'b1;
        x_cur      <= xs;
        y_cur      <= ys;
        xe_q       <= xe;
        ye_q       <= ye;
        ccw_q      <= ccw;
        improved_q <= improved;
        nk_q       <= nk_in;
        acc_x      <= acc_t'(1) <<< (nk_in - 6'd1);  // half loaded
        acc_y      <= acc_t'(1) <<< (nk_in - 6'd1);
        tick_cnt   <= '0;
      end else if (halt) begin
        busy <= 1'b0;
      end else if (busy) begin
        tick_cnt <= tick ? '0 : tick_cnt + 1'b1;
        if (arrive_x && arrive_y) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else if (tick) begin
          acc_x    <= nxt_x;
          acc_y    <= nxt_y;
          step_x   <= go_x;
          step_y   <= go_y;
          combined <= go_x && go_y;
          dir_x    <= dpos_x;
          dir_y    <= dpos_y;
          if (go_x) x_cur <= dpos_x ? x_cur + 1'b1 : x_cur - 1'b1;
          if (go_y) y_cur <= dpos_y ? y_cur + 1'b1 : y_cur - 1'b1;
        end
      end
    end
  end

endmodule
