// boid_state_regs: Boid State registers (X, Y, VX, VY of the boid being
// updated).
//
// On a clock edge with `ld` high the registers take the boid read from
// memory; otherwise they hold. The control unit raises `ld` in the sa_init
// state, so the registers keep one boid for its whole scan and writeback.
// Synchronous active-high reset to zero (this design's choice).
module boid_state_regs
  import boids_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld,
  input  boid_t d,
  output boid_t q
);
  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (ld) q <= d;
  end
endmodule
