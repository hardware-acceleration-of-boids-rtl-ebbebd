// tb_xy_writeback: feeds the Writeback unit with boid states and sums built
// by accumulating random neighbours through the reference model (so the
// sums are realistic), including empty neighbourhoods, and compares the new
// boid with the reference model. Also checks one hand-worked case.
module tb_xy_writeback;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  boid_t st, nxt;
  accum_t acc;
  logic [CTR_W-1:0] ctr;
  logic none, turned, fast, slow;
  int checks = 0, failures = 0, n_none = 0;

  xy_writeback dut (.st(st), .acc(acc), .boid_ctr(ctr), .nxt(nxt),
                    .no_neighbours(none), .turned(turned), .too_fast(fast), .too_slow(slow));

  initial begin
    // Lone boid at (320,240) moving (4,0): nothing changes but the position
    st = mk_boid(320.0, 240.0, 4.0, 0.0); acc = '0; ctr = '0; #1;
    checks++;
    if (nxt !== mk_boid(324.0, 240.0, 4.0, 0.0) || !none) begin
      failures++; $display("FAIL lone boid: %p", nxt);
    end
    for (int i = 0; i < 2000; i++) begin
      accum_t a;
      int c, k, nn, r0, r1, r2, r3;
      boid_t e;
      r0 = int'($urandom % 640); r1 = int'($urandom % 480);
      r2 = int'($urandom % 16) - 8; r3 = int'($urandom % 16) - 8;
      st = r_store(mk_boid(r0, r1, r2 / 2.0, r3 / 2.0));
      st.x += fix_t'($urandom & 16'hFFFF);
      a = '0; c = 0;
      nn = (i % 5 == 0) ? 0 : int'($urandom % 30);
      for (int j = 0; j < nn; j++) begin
        boid_t o;
        r0 = int'($urandom % 80) - 40; r1 = int'($urandom % 80) - 40;
        r2 = int'($urandom % 14) - 7;  r3 = int'($urandom % 14) - 7;
        o = r_store(mk_boid(st.x / 65536.0 + r0, st.y / 65536.0 + r1, r2 / 1.5, r3 / 1.5));
        k = r_sep(st, o, a, c, (1 << CTR_W) - 1);
      end
      acc = a; ctr = CTR_W'(c);
      #1;
      e = r_wb(st, a, c);
      if (none) n_none++;
      checks++;
      if (nxt !== e) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d ctr=%0d got %p expected %p", i, c, nxt, e);
      end
    end
    checks++;
    if (n_none == 0) failures++;
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
