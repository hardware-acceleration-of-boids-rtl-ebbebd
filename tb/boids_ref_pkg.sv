// boids_ref_pkg: behavioural reference model of the boids update, used by
// the testbenches to work out expected values independently of the RTL.
//
// Arithmetic is done on 64-bit integers with the constants written out in
// pixels, then reduced to the 32-bit 16.16 format: product = (a*b) >>> 16
// truncated to 32 bits; memory fields are kept sign-extended from 28, 27,
// 21 and 21 bits. The frame model updates boids in place, in index order.
package boids_ref_pkg;
  import boids_pkg::*;

  localparam longint ONE = 65536;

  function automatic fix_t r_mul(input fix_t a, input fix_t b);
    longint p;
    p = longint'(a) * longint'(b);
    return fix_t'(p >>> 16);
  endfunction

  function automatic fix_t r_sext(input fix_t v, input int w);
    longint t;
    t = longint'(v) & ((64'sd1 <<< w) - 1);
    if (t >= (64'sd1 <<< (w-1))) t = t - (64'sd1 <<< w);
    return fix_t'(t);
  endfunction

  function automatic boid_t r_store(input boid_t b);
    boid_t r;
    r.x  = r_sext(b.x, 28);
    r.y  = r_sext(b.y, 27);
    r.vx = r_sext(b.vx, 21);
    r.vy = r_sext(b.vy, 21);
    return r;
  endfunction

  function automatic fix_t r_clamp(input fix_t v);
    longint lim = 127 * ONE;
    if (longint'(v) > lim)  return fix_t'(lim);
    if (longint'(v) < -lim) return fix_t'(-lim);
    return v;
  endfunction

  // One accumulation step; returns the kind: 0 none, 1 close, 2 visible, 3 saturated
  function automatic int r_sep(input boid_t st, input boid_t o, inout accum_t a,
                               inout int ctr, input int ctr_max);
    fix_t dx, dy;
    longint s;
    dx = st.x - o.x;
    dy = st.y - o.y;
    s = longint'(r_mul(r_clamp(dx), r_clamp(dx))) + longint'(r_mul(r_clamp(dy), r_clamp(dy)));
    s = longint'(fix_t'(s));
    if (s < 64 * ONE) begin
      a.close_x += dx;
      a.close_y += dy;
      return 1;
    end
    if (s < 1600 * ONE) begin
      if (ctr == ctr_max) return 3;
      a.near_x  += o.x;
      a.near_y  += o.y;
      a.near_vx += o.vx;
      a.near_vy += o.vy;
      ctr++;
      return 2;
    end
    return 0;
  endfunction

  function automatic void r_bound(input fix_t x, input fix_t y, input fix_t vx, input fix_t vy,
                                  output fix_t vxo, output fix_t vyo);
    fix_t ax, ay, mx, mn, sp;
    longint turn = 13107;
    if (longint'(x) < 100 * ONE) vx = fix_t'(vx + turn);
    if (longint'(x) > 540 * ONE) vx = fix_t'(vx - turn);
    if (longint'(y) < 100 * ONE) vy = fix_t'(vy + turn);
    if (longint'(y) > 380 * ONE) vy = fix_t'(vy - turn);
    ax = (vx < 0) ? -vx : vx;
    ay = (vy < 0) ? -vy : vy;
    mx = (ax > ay) ? ax : ay;
    mn = (ax > ay) ? ay : ax;
    sp = mx + (mn >>> 2);
    if (longint'(sp) > 6 * ONE) begin
      vxo = vx - (vx >>> 2); vyo = vy - (vy >>> 2);
    end else if (longint'(sp) < 3 * ONE) begin
      vxo = vx + (vx >>> 2); vyo = vy + (vy >>> 2);
    end else begin
      vxo = vx; vyo = vy;
    end
  endfunction

  function automatic boid_t r_wb(input boid_t st, input accum_t a, input int ctr);
    fix_t div, dpx, dpy, dvx, dvy, vx, vy, vxb, vyb;
    boid_t r;
    div = (ctr == 0) ? 0 : fix_t'(ONE / ctr);
    if (ctr == 0) begin
      dpx = 0; dpy = 0; dvx = 0; dvy = 0;
    end else begin
      dpx = r_mul(a.near_x, div)  - st.x;
      dpy = r_mul(a.near_y, div)  - st.y;
      dvx = r_mul(a.near_vx, div) - st.vx;
      dvy = r_mul(a.near_vy, div) - st.vy;
    end
    vx = st.vx + r_mul(dpx, 33) + r_mul(dvx, 3277) + r_mul(a.close_x, 3277);
    vy = st.vy + r_mul(dpy, 33) + r_mul(dvy, 3277) + r_mul(a.close_y, 3277);
    r_bound(st.x, st.y, vx, vy, vxb, vyb);
    r.x = st.x + vxb;
    r.y = st.y + vyb;
    r.vx = vxb;
    r.vy = vyb;
    return r;
  endfunction

  // One full frame over the first n entries of m, in place
  function automatic void r_frame(ref boid_t m [], input int n, input int cw);
    for (int i = 0; i < n; i++) begin
      accum_t a = '0;
      int ctr = 0;
      int k;
      for (int j = 0; j < n; j++)
        if (j != i) k = r_sep(m[i], m[j], a, ctr, (1 << cw) - 1);
      m[i] = r_store(r_wb(m[i], a, ctr));
    end
  endfunction

  function automatic boid_t mk_boid(input real x, input real y, input real vx, input real vy);
    boid_t b;
    b.x  = fix_t'($rtoi(x * 65536.0));
    b.y  = fix_t'($rtoi(y * 65536.0));
    b.vx = fix_t'($rtoi(vx * 65536.0));
    b.vy = fix_t'($rtoi(vy * 65536.0));
    return b;
  endfunction
endpackage
