// fix15_mul: signed 16.16 fixed-point multiplier.
//
// Forms the full 64-bit signed product of the two operands and keeps bits
// [47:16], i.e. the product shifted right by the 16 fraction bits and
// truncated (rounding toward minus infinity) to 32 bits. Purely
// combinational; overflow beyond the 16.16 range wraps. Fixed-point
// multiplication by keeping the middle bits of an integer product is the
// reference design's method; the truncating rounding is this design's choice.
// The top 16 and bottom 16 product bits are discarded by design, so a lint
// tool reports them as unused.
module fix15_mul
  import boids_pkg::*;
(
  input  fix_t a,
  input  fix_t b,
  output fix_t q
);
  logic signed [2*FIX_W-1:0] prod;

  always_comb begin
    prod = a * b;
    q    = prod[FRAC_BITS +: FIX_W];
  end
endmodule
