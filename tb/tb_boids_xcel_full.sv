// tb_boids_xcel_full: the accelerator at its default size (100 boids,
// 10-bit neighbour counter), three complete frames. The host loads a
// 10 x 10 grid of boids with jittered positions and random velocities
// (some near the screen edges, every fifth one right next to its
// predecessor); each frame must take 100*(2 + 2*99) =
// 20000 cycles and leave the memory equal to the reference model. The VGA
// pixel output is checked at every boid after the last frame, and the
// separation, visible-neighbour, edge-turn, speed and index-skip events
// must all occur.
module tb_boids_xcel_full;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  localparam int N = 100;
  localparam int AW = $clog2(N);
  localparam int FRAMES = 3;

  logic clk = 0, rst = 1, vga_vs = 1, host_we = 0;
  logic [PIX_W-1:0] next_x = '0, next_y = '0;
  logic [AW-1:0] host_addr = '0;
  boid_t host_wdata = '0;
  logic [7:0] pixel_color;
  logic pixel_hit, busy, frame_done;
  state_t state;
  logic e_close, e_vis, e_sat, e_none, e_turn, e_fast, e_slow, e_skip;
  boid_t rmem [];
  int checks = 0, failures = 0;
  int n_close = 0, n_vis = 0, n_turn = 0, n_fast = 0, n_slow = 0, n_skip = 0, n_pix = 0;

  boids_xcel dut (
    .clk(clk), .rst(rst), .vga_vs(vga_vs), .next_x(next_x), .next_y(next_y),
    .pixel_color(pixel_color), .pixel_hit(pixel_hit),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .busy(busy), .frame_done(frame_done), .state(state),
    .ev_close(e_close), .ev_visible(e_vis), .ev_saturated(e_sat),
    .ev_no_neighbours(e_none), .ev_turned(e_turn), .ev_too_fast(e_fast),
    .ev_too_slow(e_slow), .ev_itr_skip(e_skip));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    n_close += int'(e_close); n_vis += int'(e_vis); n_turn += int'(e_turn);
    n_fast += int'(e_fast); n_slow += int'(e_slow); n_skip += int'(e_skip);
  end

  function automatic boid_t dut_entry(input int k);
    boid_t b;
    b.x  = r_sext(fix_t'(dut.u_mem.x_mem[k]), X_W);
    b.y  = r_sext(fix_t'(dut.u_mem.y_mem[k]), Y_W);
    b.vx = r_sext(fix_t'(dut.u_mem.vx_mem[k]), V_W);
    b.vy = r_sext(fix_t'(dut.u_mem.vy_mem[k]), V_W);
    return b;
  endfunction

  initial begin
    rmem = new[N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < N; k++) begin
      int jx, jy, vx, vy;
      jx = int'($urandom % 12);
      jy = int'($urandom % 12);
      vx = int'($urandom % 25) - 12;
      vy = int'($urandom % 25) - 12;
      rmem[k] = r_store(mk_boid(60 + 52 * (k % 10) + jx, 60 + 38 * (k / 10) + jy, vx / 2.0, vy / 2.0));
      // every fifth boid starts right next to the previous one
      if (k % 5 == 4) rmem[k] = r_store(mk_boid(rmem[k-1].x / 65536.0 + 3, rmem[k-1].y / 65536.0 + 2, vx / 2.0, vy / 2.0));
      @(negedge clk);
      host_we = 1; host_addr = AW'(k); host_wdata = rmem[k];
    end
    @(negedge clk) host_we = 0;

    for (int f = 0; f < FRAMES; f++) begin
      int cycles;
      repeat (4) @(negedge clk);
      vga_vs = 0;
      @(negedge clk) vga_vs = 1;
      r_frame(rmem, N, CTR_W);
      cycles = 0;
      while (busy && cycles < 30000) begin
        cycles++;
        @(negedge clk);
      end
      checks++;
      if (cycles != N * (2 + 2 * (N - 1))) begin
        failures++; $display("FAIL frame %0d took %0d cycles", f, cycles);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (dut_entry(k) !== rmem[k]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d boid %0d: %p expected %p", f, k, dut_entry(k), rmem[k]);
        end
      end
      $display("frame %0d: %0d cycles", f, cycles);
    end
    for (int k = 0; k < N; k++) begin
      int px, py;
      px = int'(rmem[k].x >>> 16);
      py = int'(rmem[k].y >>> 16);
      if (px < 0 || py < 0 || px > 639 || py > 479) continue;
      next_x = PIX_W'(px); next_y = PIX_W'(py);
      #1;
      checks++;
      if (!pixel_hit || pixel_color != 8'hFF) failures++; else n_pix++;
    end
    $display("close=%0d visible=%0d turned=%0d fast=%0d slow=%0d skip=%0d pixel_hits=%0d",
             n_close, n_vis, n_turn, n_fast, n_slow, n_skip, n_pix);
    checks++;
    if (n_close == 0 || n_vis == 0 || n_turn == 0 || n_fast == 0 || n_slow == 0 ||
        n_skip == 0 || n_pix == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * 21000 + 2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
