// tb_xy_sep_chk: drives the Accumulation unit with random pairs of boids
// placed so that all three outcomes occur (too close, visible, out of
// range), with random running sums and counter values including the
// saturated one, and compares every output with the reference model.
module tb_xy_sep_chk;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  fix_t x, y;
  boid_t other;
  accum_t acc, acc_next;
  logic [CTR_W-1:0] ctr, ctr_next;
  logic too_close, visible, saturated;
  int checks = 0, failures = 0;
  int n_close = 0, n_vis = 0, n_sat = 0, n_far = 0;

  xy_sep_chk dut (.x(x), .y(y), .other(other), .acc(acc), .boid_ctr(ctr),
                  .acc_next(acc_next), .boid_ctr_next(ctr_next),
                  .too_close(too_close), .visible(visible), .saturated(saturated));

  initial begin
    for (int i = 0; i < 4000; i++) begin
      accum_t ea;
      int ec, kind;
      real r;
      x = fix_t'(($urandom % 640) << 16 | ($urandom & 16'hFFFF));
      y = fix_t'(($urandom % 480) << 16 | ($urandom & 16'hFFFF));
      r = (i % 4 == 0) ? 12.0 : (i % 4 == 1) ? 60.0 : (i % 4 == 2) ? 700.0 : 4.0;
      other.x  = x + fix_t'($rtoi(($urandom % 2000 - 1000) / 1000.0 * r * 65536.0));
      other.y  = y + fix_t'($rtoi(($urandom % 2000 - 1000) / 1000.0 * r * 65536.0));
      other.vx = fix_t'($urandom) >>> 12;
      other.vy = fix_t'($urandom) >>> 12;
      acc = {fix_t'($urandom) >>> 4, fix_t'($urandom) >>> 4, fix_t'($urandom) >>> 8,
             fix_t'($urandom) >>> 8, fix_t'($urandom) >>> 10, fix_t'($urandom) >>> 10};
      ctr = (i % 7 == 0) ? '1 : CTR_W'($urandom);
      #1;
      ea = acc;
      ec = int'(ctr);
      kind = r_sep('{x: x, y: y, vx: 0, vy: 0}, other, ea, ec, (1 << CTR_W) - 1);
      case (kind)
        0: n_far++;
        1: n_close++;
        2: n_vis++;
        default: n_sat++;
      endcase
      checks++;
      if (acc_next !== ea || int'(ctr_next) != ec || too_close != (kind == 1) ||
          visible != (kind >= 2) || saturated != (kind == 3)) begin
        failures++;
        if (failures < 10) $display("FAIL case %0d kind=%0d close=%b vis=%b sat=%b ctr %0d->%0d exp %0d",
                                    i, kind, too_close, visible, saturated, ctr, ctr_next, ec);
      end
    end
    $display("outcomes: close=%0d visible=%0d saturated=%0d far=%0d", n_close, n_vis, n_sat, n_far);
    checks++;
    if (n_close == 0 || n_vis == 0 || n_sat == 0 || n_far == 0) failures++;
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
