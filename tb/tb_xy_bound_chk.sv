// tb_xy_bound_chk: random positions across and beyond the screen and random
// velocities; checks the bounded velocity against the reference model and
// that edge turning, slowing down and speeding up all occur. Also checks
// two hand-worked cases.
module tb_xy_bound_chk;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  fix_t x, y, vx, vy, vxb, vyb;
  logic turned, too_fast, too_slow;
  int checks = 0, failures = 0, n_turn = 0, n_fast = 0, n_slow = 0;

  xy_bound_chk dut (.x(x), .y(y), .vx(vx), .vy(vy), .vx_bounded(vxb), .vy_bounded(vyb),
                    .turned(turned), .too_fast(too_fast), .too_slow(too_slow));

  task automatic expect_v(input fix_t ex, input fix_t ey, input string what);
    checks++;
    if (vxb !== ex || vyb !== ey) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got (%h,%h) expected (%h,%h)", what, vxb, vyb, ex, ey);
    end
  endtask

  initial begin
    // In the middle, speed 4 (within 3..6): unchanged
    x = 32'd320 << 16; y = 32'd240 << 16; vx = 32'h0004_0000; vy = 32'h0000_0000; #1;
    expect_v(32'h0004_0000, 32'h0, "cruise");
    // Left of margin, vx=8: +0.2 then 8.2 > 6 so scaled by 3/4
    x = 32'd10 << 16; vx = 32'h0008_0000; vy = 0; #1;
    expect_v(fix_t'(32'h0008_3333 - (32'h0008_3333 >>> 2)), 32'h0, "left+fast");
    for (int i = 0; i < 3000; i++) begin
      fix_t ex, ey;
      x  = fix_t'(int'($urandom % 840) - 100) <<< 16;
      y  = fix_t'(int'($urandom % 680) - 100) <<< 16;
      vx = fix_t'($urandom) >>> 12;
      vy = fix_t'($urandom) >>> 12;
      #1;
      r_bound(x, y, vx, vy, ex, ey);
      expect_v(ex, ey, "random");
      if (turned) n_turn++;
      if (too_fast) n_fast++;
      if (too_slow) n_slow++;
    end
    $display("turned=%0d fast=%0d slow=%0d", n_turn, n_fast, n_slow);
    checks++;
    if (n_turn == 0 || n_fast == 0 || n_slow == 0) failures++;
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
