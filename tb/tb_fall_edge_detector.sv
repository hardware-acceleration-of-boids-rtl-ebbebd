// tb_fall_edge_detector: drives a random level and checks that `fall` is
// high exactly when the previous sampled value was 1 and the current is 0.
module tb_fall_edge_detector;
  logic clk = 0, rst = 1, sig = 0, fall;
  logic prev_model = 0;
  int checks = 0, failures = 0, edges = 0;

  fall_edge_detector dut (.clk(clk), .rst(rst), .sig(sig), .fall(fall));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(posedge clk);
    rst <= 0;
    prev_model = 0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      sig = ($urandom % 3) == 0 ? ~sig : sig;
      #1;
      checks++;
      if (fall !== (prev_model & ~sig)) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d prev=%b sig=%b fall=%b", i, prev_model, sig, fall);
      end
      if (fall) edges++;
      @(posedge clk);
      prev_model = sig;
    end
    checks++;
    if (edges == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
