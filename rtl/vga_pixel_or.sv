// vga_pixel_or: the "combinational logic" between boid memory and VGA driver.
//
// The VGA driver announces the pixel it will draw next (next_x, next_y).
// Every stored boid position is compared with it: the integer part of X
// (bits above the 16 fraction bits) must equal next_x and the integer part
// of Y must equal next_y. The per-boid matches are ORed together, so
// `hit` is 1 when any boid sits on that pixel; `color` is then white
// (8'hFF) and otherwise black. Negative positions never match. Purely
// combinational, one comparator pair per boid, which is why this direct
// scheme scales poorly with the swarm size.
// Comparing every register against the driver's next pixel and ORing the
// results follows the reference design; the colour encoding (8-bit, white
// on black) is this design's choice.
module vga_pixel_or
  import boids_pkg::*;
#(
  parameter int NUM_BOIDS = 100
)(
  input  logic [X_W-1:0]   xs [NUM_BOIDS],
  input  logic [Y_W-1:0]   ys [NUM_BOIDS],
  input  logic [PIX_W-1:0] next_x,
  input  logic [PIX_W-1:0] next_y,
  output logic             hit,
  output logic [7:0]       color
);
  localparam int XI_W = X_W - FRAC_BITS;
  localparam int YI_W = Y_W - FRAC_BITS;

  logic [NUM_BOIDS-1:0] match;

  for (genvar i = 0; i < NUM_BOIDS; i++) begin : g_cmp
    assign match[i] = (xs[i][X_W-1:FRAC_BITS] == XI_W'({1'b0, next_x})) &&
                      (ys[i][Y_W-1:FRAC_BITS] == YI_W'({1'b0, next_y}));
  end

  assign hit   = |match;
  assign color = hit ? 8'hFF : 8'h00;
endmodule
