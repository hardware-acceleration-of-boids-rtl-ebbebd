// xy_writeback: Writeback unit, the whole per-boid update in one cycle.
//
// Inputs are the boid being updated (Boid State registers), the sums
// gathered while it scanned the swarm (Boid Accumulation registers) and the
// neighbour count. Everything is combinational:
//   1. div = 1/count from the reciprocal table (lut_divider); the four
//      neighbour sums are multiplied by it to give average position and
//      velocity (four multipliers in parallel).
//   2. The boid's own position / velocity is subtracted from the averages;
//      when the count is 0 these four differences are forced to 0.
//   3. Cohesion = diff_pos * CENTER, alignment = diff_vel * MATCH,
//      separation = close * AVOID (six multipliers in parallel); all three
//      are added to the boid's velocity.
//   4. xy_bound_chk applies the edge and speed rules to that velocity.
//   5. The bounded velocity is added to the position.
// The result is written to memory directly in the ac_wb state.
//
// The structure (table-based division, zeroing on an empty neighbourhood,
// weighted sum into the velocity, bounding, then position update) follows
// the reference design; the factor values are this design's defaults.
module xy_writeback
  import boids_pkg::*;
#(
  parameter int   CW     = CTR_W,
  parameter fix_t CENTER = CENTER_FACTOR,
  parameter fix_t MATCH  = MATCH_FACTOR,
  parameter fix_t AVOID  = AVOID_FACTOR
)(
  input  boid_t         st,
  input  accum_t        acc,
  input  logic [CW-1:0] boid_ctr,
  output boid_t         nxt,
  output logic          no_neighbours, // count was 0, averages ignored
  output logic          turned,
  output logic          too_fast,
  output logic          too_slow
);
  fix_t div_val;
  fix_t avg_x, avg_y, avg_vx, avg_vy;
  fix_t dpx, dpy, dvx, dvy;
  fix_t coh_x, coh_y, ali_x, ali_y, sep_x, sep_y;
  fix_t vx_new, vy_new, vx_b, vy_b;

  lut_divider #(.IDX_W(CW)) u_lut (.idx(boid_ctr), .div_val(div_val));

  fix15_mul u_f15_1 (.a(acc.near_x),  .b(div_val), .q(avg_x));
  fix15_mul u_f15_2 (.a(acc.near_y),  .b(div_val), .q(avg_y));
  fix15_mul u_f15_3 (.a(acc.near_vx), .b(div_val), .q(avg_vx));
  fix15_mul u_f15_4 (.a(acc.near_vy), .b(div_val), .q(avg_vy));

  assign no_neighbours = (boid_ctr == '0);

  always_comb begin
    if (no_neighbours) begin
      dpx = '0; dpy = '0; dvx = '0; dvy = '0;
    end else begin
      dpx = avg_x  - st.x;
      dpy = avg_y  - st.y;
      dvx = avg_vx - st.vx;
      dvy = avg_vy - st.vy;
    end
  end

  fix15_mul u_f15_11 (.a(dpx),         .b(CENTER), .q(coh_x));
  fix15_mul u_f15_12 (.a(dpy),         .b(CENTER), .q(coh_y));
  fix15_mul u_f15_21 (.a(dvx),         .b(MATCH),  .q(ali_x));
  fix15_mul u_f15_22 (.a(dvy),         .b(MATCH),  .q(ali_y));
  fix15_mul u_f15_31 (.a(acc.close_x), .b(AVOID),  .q(sep_x));
  fix15_mul u_f15_41 (.a(acc.close_y), .b(AVOID),  .q(sep_y));

  assign vx_new = st.vx + coh_x + ali_x + sep_x;
  assign vy_new = st.vy + coh_y + ali_y + sep_y;

  xy_bound_chk u_bound (
    .x(st.x), .y(st.y), .vx(vx_new), .vy(vy_new),
    .vx_bounded(vx_b), .vy_bounded(vy_b),
    .turned(turned), .too_fast(too_fast), .too_slow(too_slow)
  );

  assign nxt.x  = st.x + vx_b;
  assign nxt.y  = st.y + vy_b;
  assign nxt.vx = vx_b;
  assign nxt.vy = vy_b;
endmodule
