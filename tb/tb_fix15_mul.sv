// tb_fix15_mul: checks the 16.16 multiplier against 64-bit integer products
// on fixed corner cases and random operands. Combinational; a watchdog ends
// the run if it hangs.
module tb_fix15_mul;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  fix_t a, b, q;
  int checks = 0, failures = 0;

  fix15_mul dut (.a(a), .b(b), .q(q));

  task automatic check(input fix_t ta, input fix_t tb_, input fix_t expq);
    a = ta; b = tb_;
    #1;
    checks++;
    if (q !== expq) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, q, expq);
    end
  endtask

  initial begin
    check(32'h0001_0000, 32'h0001_0000, 32'h0001_0000); // 1 * 1
    check(32'h0002_0000, 32'h0003_8000, 32'h0007_0000); // 2 * 3.5
    check(32'hFFFF_0000, 32'h0004_0000, 32'hFFFC_0000); // -1 * 4
    check(32'h0000_8000, 32'h0000_8000, 32'h0000_4000); // .5 * .5
    check(32'h0028_0000, 32'h0028_0000, 32'h0640_0000); // 40^2 = 1600
    check(32'hFFFF_FFFF, 32'h0000_0001, 32'hFFFF_FFFF); // rounds toward -inf
    for (int i = 0; i < 2000; i++) begin
      fix_t ra, rb;
      ra = fix_t'($urandom);
      rb = fix_t'($urandom);
      if (i % 2) begin ra = ra >>> 12; rb = rb >>> 10; end
      check(ra, rb, r_mul(ra, rb));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
