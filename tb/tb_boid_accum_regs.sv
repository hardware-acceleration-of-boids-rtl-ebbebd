// tb_boid_accum_regs: random clear/enable sequence; the sums and counter
// must be zero after reset or clear (clear wins over enable), take the
// new values when enabled, and hold otherwise.
module tb_boid_accum_regs;
  import boids_pkg::*;
  logic clk = 0, rst = 1, clr = 0, en = 0;
  accum_t acc_d, acc_q, m_acc;
  logic [CTR_W-1:0] ctr_d, ctr_q, m_ctr;
  int checks = 0, failures = 0, n_clr = 0, n_en = 0;

  boid_accum_regs dut (.clk(clk), .rst(rst), .clr(clr), .en(en),
                       .acc_d(acc_d), .ctr_d(ctr_d), .acc_q(acc_q), .ctr_q(ctr_q));

  always #5 clk = ~clk;

  initial begin
    acc_d = '0; ctr_d = '0;
    @(posedge clk); @(negedge clk);
    rst = 0; m_acc = '0; m_ctr = '0;
    checks++; if (acc_q !== '0 || ctr_q !== '0) failures++;
    for (int i = 0; i < 600; i++) begin
      @(negedge clk);
      clr = ($urandom % 6) == 0;
      en  = ($urandom % 2) == 0;
      acc_d = {$urandom, $urandom, $urandom, $urandom, $urandom, $urandom};
      ctr_d = CTR_W'($urandom);
      @(posedge clk);
      if (clr) begin m_acc = '0; m_ctr = '0; n_clr++; end
      else if (en) begin m_acc = acc_d; m_ctr = ctr_d; n_en++; end
      @(negedge clk);
      checks++;
      if (acc_q !== m_acc || ctr_q !== m_ctr) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d clr=%b en=%b", i, clr, en);
      end
    end
    checks++; if (n_clr == 0 || n_en == 0) failures++;
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
