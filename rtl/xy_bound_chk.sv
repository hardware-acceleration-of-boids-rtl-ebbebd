// xy_bound_chk: screen-edge turning and speed limiting of a new velocity.
//
// Takes a boid's position and its freshly computed velocity and returns the
// bounded velocity, combinationally:
//   1. Edge turning: if x is left of LEFT the turn factor is added to vx, if
//      right of RIGHT it is subtracted; likewise vy against TOP and BOTTOM
//      (screen Y grows downward).
//   2. Speed: an approximation of |v| is formed as
//      max(|vx|,|vy|) + (min(|vx|,|vy|) >>> 2). If it exceeds MAX both
//      components shrink by a quarter (v - (v >>> 2)); if it is below MIN
//      both grow by a quarter (v + (v >>> 2)).
// The speed approximation, the shift-based scaling and the 3/6 limits follow
// the reference design; the margins and turn factor are parameters whose
// defaults are this design's choice.
module xy_bound_chk
  import boids_pkg::*;
#(
  parameter fix_t LEFT   = LEFT_MARGIN,
  parameter fix_t RIGHT  = RIGHT_MARGIN,
  parameter fix_t TOP    = TOP_MARGIN,
  parameter fix_t BOTTOM = BOTTOM_MARGIN,
  parameter fix_t TURN   = TURN_FACTOR,
  parameter fix_t MAXS   = MAX_SPEED,
  parameter fix_t MINS   = MIN_SPEED
)(
  input  fix_t x,
  input  fix_t y,
  input  fix_t vx,
  input  fix_t vy,
  output fix_t vx_bounded,
  output fix_t vy_bounded,
  output logic turned,     // an edge rule changed the velocity
  output logic too_fast,   // speed was scaled down
  output logic too_slow    // speed was scaled up
);
  fix_t vxt, vyt, ax, ay, vmax, vmin, speed;

  always_comb begin
    vxt = vx;
    vyt = vy;
    if (x < LEFT)   vxt = vxt + TURN;
    if (x > RIGHT)  vxt = vxt - TURN;
    if (y < TOP)    vyt = vyt + TURN;
    if (y > BOTTOM) vyt = vyt - TURN;
    turned = (x < LEFT) || (x > RIGHT) || (y < TOP) || (y > BOTTOM);

    ax = (vxt < 0) ? -vxt : vxt;
    ay = (vyt < 0) ? -vyt : vyt;
    if (ax > ay) begin vmax = ax; vmin = ay; end
    else         begin vmax = ay; vmin = ax; end
    speed = vmax + (vmin >>> 2);

    too_fast = speed > MAXS;
    too_slow = speed < MINS;
    if (too_fast) begin
      vx_bounded = vxt - (vxt >>> 2);
      vy_bounded = vyt - (vyt >>> 2);
    end else if (too_slow) begin
      vx_bounded = vxt + (vxt >>> 2);
      vy_bounded = vyt + (vyt >>> 2);
    end else begin
      vx_bounded = vxt;
      vy_bounded = vyt;
    end
  end
endmodule
