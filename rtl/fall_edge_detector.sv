// fall_edge_detector: one-cycle pulse on a falling edge of a level signal.
//
// Keeps the previous sample of `sig` in a flip-flop and raises `fall` while
// the previous sample is 1 and the current one is 0. Used on the VGA
// vertical sync to start a frame's update. Reset loads the register with 0,
// so a signal that is low out of reset gives no pulse (this design's choice).
module fall_edge_detector (
  input  logic clk,
  input  logic rst,
  input  logic sig,
  output logic fall
);
  logic prev;

  always_ff @(posedge clk) begin
    if (rst) prev <= 1'b0;
    else     prev <= sig;
  end

  assign fall = prev & ~sig;
endmodule
