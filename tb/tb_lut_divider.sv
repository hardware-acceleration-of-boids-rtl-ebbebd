// tb_lut_divider: checks every entry of the reciprocal table: entry 0 is 0
// and entry n is the largest d with d*n <= 65536 (1/n in 16.16).
module tb_lut_divider;
  import boids_pkg::*;
  logic [CTR_W-1:0] idx;
  fix_t div_val;
  int checks = 0, failures = 0;

  lut_divider dut (.idx(idx), .div_val(div_val));

  initial begin
    for (int n = 0; n < (1 << CTR_W); n++) begin
      logic ok;
      idx = CTR_W'(n);
      #1;
      if (n == 0) ok = (div_val == 0);
      else ok = (longint'(div_val) * n <= 65536) && ((longint'(div_val) + 1) * n > 65536);
      checks++;
      if (!ok) begin
        failures++;
        if (failures < 10) $display("FAIL idx=%0d div=%h", n, div_val);
      end
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
