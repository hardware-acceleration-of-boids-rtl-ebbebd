// sign_extend: configurable sign extension of a narrow stored field.
//
// Copies the IN_W-bit input into the low bits of the OUT_W-bit output and
// fills the upper bits with the input's sign bit. Used on every field read
// from the boid memory. Combinational; the upper output bits are copies
// of the input's sign bit by construction.
module sign_extend #(
  parameter int IN_W  = 28,
  parameter int OUT_W = 32
)(
  input  logic [IN_W-1:0]  din,
  output logic [OUT_W-1:0] dout
);
  initial assert (IN_W <= OUT_W) else $error("sign_extend: IN_W > OUT_W");

  if (OUT_W > IN_W) begin : g_ext
    assign dout = {{(OUT_W-IN_W){din[IN_W-1]}}, din};
  end else begin : g_same
    assign dout = din;
  end
endmodule
