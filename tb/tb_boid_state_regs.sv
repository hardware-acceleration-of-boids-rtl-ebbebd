// tb_boid_state_regs: random load/hold sequence; the registers must follow
// a simple model: reset to zero, take `d` when `ld` is high, hold otherwise.
module tb_boid_state_regs;
  import boids_pkg::*;
  logic clk = 0, rst = 1, ld = 0;
  boid_t d, q, model;
  int checks = 0, failures = 0, loads = 0;

  boid_state_regs dut (.clk(clk), .rst(rst), .ld(ld), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    d = '0;
    @(posedge clk); @(negedge clk);
    checks++; if (q !== '0) failures++;
    rst = 0; model = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      ld = ($urandom % 3) == 0;
      d = {$urandom, $urandom, $urandom, $urandom};
      @(posedge clk);
      if (ld) begin model = d; loads++; end
      @(negedge clk);
      checks++;
      if (q !== model) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d", i);
      end
    end
    checks++; if (loads == 0) failures++;
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
