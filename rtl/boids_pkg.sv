// boids_pkg: types and constants shared by the boids accelerator.
//
// Every arithmetic value is a signed 32-bit fixed-point number with 16
// fraction bits (one sign bit, 15 integer bits, 16 fraction bits), so 1.0 is
// 32'h0001_0000. In the boid memory the fields are stored narrower
// (X 28 bits, Y 27 bits, VX/VY 21 bits) and sign-extended on the way out.
//
// The range thresholds (visual range 40 px, squared 1600; protected range
// 8 px, squared 64) and the speed window (3..6 px/frame) follow the
// reference design. The weighting factors, turn factor and screen margins
// are not given there; the values below are the usual ones for this
// 640x480 boids demo and are this design's choice.
package boids_pkg;

  localparam int FRAC_BITS = 16;
  localparam int FIX_W     = 32;

  typedef logic signed [FIX_W-1:0] fix_t;

  // Stored widths of the memory fields
  localparam int X_W = 28;
  localparam int Y_W = 27;
  localparam int V_W = 21;

  // Width of the neighbour counter (saturates at all ones)
  localparam int CTR_W = 10;

  // Pixel coordinate width used by the VGA driver interface
  localparam int PIX_W = 10;

  // Integer value n as a fixed-point number
  function automatic fix_t int2fix(input int n);
    return fix_t'(n) <<< FRAC_BITS;
  endfunction

  // Algorithm constants (16.16)
  localparam fix_t VISUAL_SQ  = 32'h0640_0000; // 1600 = 40^2
  localparam fix_t PROTECT_SQ = 32'h0040_0000; // 64 = 8^2
  localparam fix_t MAX_SPEED  = 32'h0006_0000; // 6
  localparam fix_t MIN_SPEED  = 32'h0003_0000; // 3
  localparam fix_t TURN_FACTOR   = 32'h0000_3333; // 0.2
  localparam fix_t CENTER_FACTOR = 32'h0000_0021; // ~0.0005
  localparam fix_t AVOID_FACTOR  = 32'h0000_0CCD; // ~0.05
  localparam fix_t MATCH_FACTOR  = 32'h0000_0CCD; // ~0.05
  localparam fix_t LEFT_MARGIN   = 32'h0064_0000; // 100
  localparam fix_t RIGHT_MARGIN  = 32'h021C_0000; // 540
  localparam fix_t TOP_MARGIN    = 32'h0064_0000; // 100
  localparam fix_t BOTTOM_MARGIN = 32'h017C_0000; // 380

  // Largest distance component (in pixels) fed to the squarer; beyond it
  // the boid is far outside the visual range anyway and clamping keeps the
  // 16.16 sum of squares from wrapping.
  localparam fix_t DIST_CLAMP = 32'h007F_0000; // 127

  typedef struct packed {
    fix_t x;
    fix_t y;
    fix_t vx;
    fix_t vy;
  } boid_t;

  // Sums kept while one boid scans the swarm
  typedef struct packed {
    fix_t near_x;
    fix_t near_y;
    fix_t near_vx;
    fix_t near_vy;
    fix_t close_x;
    fix_t close_y;
  } accum_t;

  typedef enum logic [2:0] {
    ST_INIT    = 3'd0,
    ST_SA_INIT = 3'd1,
    ST_SA_LD   = 3'd2,
    ST_SA_CALC = 3'd3,
    ST_AC_WB   = 3'd4
  } state_t;

endpackage
