// lut_divider: reciprocal lookup table used in place of a divider.
//
// For a neighbour count n the table returns 1/n in 16.16 fixed point
// (floor(65536/n)); entry 0 returns 0. Multiplying a sum by this value
// gives the average without a hardware divider. The table has one entry per
// counter value (2**IDX_W entries) and is computed at elaboration time, so
// it synthesises to a ROM. Purely combinational.
module lut_divider
  import boids_pkg::*;
#(
  parameter int IDX_W = CTR_W
)(
  input  logic [IDX_W-1:0] idx,
  output fix_t             div_val
);
  localparam int DEPTH = 2 ** IDX_W;

  fix_t rom [DEPTH];

  for (genvar i = 0; i < DEPTH; i++) begin : g_rom
    assign rom[i] = (i == 0) ? '0 : fix_t'((1 << FRAC_BITS) / i);
  end

  assign div_val = rom[idx];
endmodule
