// boid_accum_regs: Boid Accumulation registers and Boid Counter.
//
// Hold Near_X, Near_Y, Near_VX, Near_VY (sums over visible neighbours),
// Close_X, Close_Y (summed offsets from boids in the protected range) and
// the neighbour counter. `clr` (sa_init state) zeroes them all before a new
// boid's scan; `en` (sa_calc state) latches the Accumulation unit's
// feedback. `clr` wins over `en`. Synchronous active-high reset to zero.
// Clearing at the start of each scan is this design's reading of how the
// sums restart for every boid.
module boid_accum_regs
  import boids_pkg::*;
#(
  parameter int CW = CTR_W
)(
  input  logic          clk,
  input  logic          rst,
  input  logic          clr,
  input  logic          en,
  input  accum_t        acc_d,
  input  logic [CW-1:0] ctr_d,
  output accum_t        acc_q,
  output logic [CW-1:0] ctr_q
);
  always_ff @(posedge clk) begin
    if (rst || clr) begin
      acc_q <= '0;
      ctr_q <= '0;
    end else if (en) begin
      acc_q <= acc_d;
      ctr_q <= ctr_d;
    end
  end
endmodule
