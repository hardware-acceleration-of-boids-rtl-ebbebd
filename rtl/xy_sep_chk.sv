// xy_sep_chk: Accumulation unit (separation / alignment / cohesion check).
//
// Compares the boid held in the Boid State registers (x, y) with one boid
// read from memory (x_in, y_in, vx_in, vy_in). It squares the X and Y
// differences with fixed-point multipliers, adds them and compares the sum
// with two thresholds:
//   * sum < PROTECT_SQ (8 px squared): the boids are too close; the
//     difference (x - x_in, y - y_in) is added to close_x / close_y and
//     nothing else changes;
//   * otherwise, sum < VISUAL_SQ (40 px squared) and the neighbour counter
//     is not saturated (all ones): the other boid's position and velocity
//     are added to the near_* sums and the counter is incremented.
// A saturated counter leaves the near_* sums alone but separation is still
// checked. The result is combinational and is latched by the Boid
// Accumulation registers in the sa_calc state.
//
// The thresholds, the order of the checks and the saturation rule follow the
// reference design. Clamping each difference to +/-127 px before squaring is
// this design's addition: it keeps the 16.16 sum of squares from wrapping
// for far-away boids, without changing any result inside the visual range.
module xy_sep_chk
  import boids_pkg::*;
#(
  parameter int   CW         = CTR_W,
  parameter fix_t VISUAL     = VISUAL_SQ,
  parameter fix_t PROTECT    = PROTECT_SQ
)(
  input  fix_t          x,
  input  fix_t          y,
  input  boid_t         other,
  input  accum_t        acc,
  input  logic [CW-1:0] boid_ctr,
  output accum_t        acc_next,
  output logic [CW-1:0] boid_ctr_next,
  output logic          too_close,   // other boid inside protected range
  output logic          visible,     // inside visual range, outside protected
  output logic          saturated    // visible, but counter already full
);
  fix_t dx, dy, dxc, dyc, dx2, dy2, dist_sq;

  function automatic fix_t clamp(input fix_t v);
    if (v > DIST_CLAMP)       return DIST_CLAMP;
    else if (v < -DIST_CLAMP) return -DIST_CLAMP;
    else                      return v;
  endfunction

  assign dx  = x - other.x;
  assign dy  = y - other.y;
  assign dxc = clamp(dx);
  assign dyc = clamp(dy);

  fix15_mul u_xmul (.a(dxc), .b(dxc), .q(dx2));
  fix15_mul u_ymul (.a(dyc), .b(dyc), .q(dy2));

  assign dist_sq = dx2 + dy2;

  always_comb begin
    too_close     = dist_sq < PROTECT;
    visible       = !too_close && (dist_sq < VISUAL);
    saturated     = visible && (boid_ctr == '1);
    acc_next      = acc;
    boid_ctr_next = boid_ctr;
    if (too_close) begin
      acc_next.close_x = acc.close_x + dx;
      acc_next.close_y = acc.close_y + dy;
    end else if (visible && !saturated) begin
      acc_next.near_x  = acc.near_x  + other.x;
      acc_next.near_y  = acc.near_y  + other.y;
      acc_next.near_vx = acc.near_vx + other.vx;
      acc_next.near_vy = acc.near_vy + other.vy;
      boid_ctr_next    = boid_ctr + 1'b1;
    end
  end
endmodule
