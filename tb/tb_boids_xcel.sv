// tb_boids_xcel: end-to-end test of the accelerator with 8 boids and a 2-bit
// neighbour counter (so the counter saturates), over 25 frames.
// The host loads a swarm with a tight cluster, a lone boid near a corner
// and slow and fast boids. Each frame is started by a falling VGA_VS edge
// after an idle stretch; the frame must take N*(2 + 2*(N-1)) cycles and the
// memory afterwards must equal the reference model's in-place update.
// Host writes during a frame must be ignored; the VGA pixel output must be
// white exactly on boid pixels. Every mechanism (separation, visible
// accumulation, counter saturation, empty neighbourhood, edge turn, slow
// down, speed up, index skip, waiting for VGA_VS, blocked host write, pixel
// hit) must occur at least once.
module tb_boids_xcel;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  localparam int N = 8;
  localparam int CW = 2;
  localparam int FRAMES = 25;
  localparam int AW = $clog2(N);

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
  int n_close = 0, n_vis = 0, n_sat = 0, n_none = 0, n_turn = 0, n_fast = 0, n_slow = 0;
  int n_skip = 0, n_wait = 0, n_block = 0, n_pix = 0;

  boids_xcel #(.NUM_BOIDS(N), .CW(CW)) dut (
    .clk(clk), .rst(rst), .vga_vs(vga_vs), .next_x(next_x), .next_y(next_y),
    .pixel_color(pixel_color), .pixel_hit(pixel_hit),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .busy(busy), .frame_done(frame_done), .state(state),
    .ev_close(e_close), .ev_visible(e_vis), .ev_saturated(e_sat),
    .ev_no_neighbours(e_none), .ev_turned(e_turn), .ev_too_fast(e_fast),
    .ev_too_slow(e_slow), .ev_itr_skip(e_skip));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    n_close += int'(e_close); n_vis += int'(e_vis); n_sat += int'(e_sat);
    n_none += int'(e_none); n_turn += int'(e_turn); n_fast += int'(e_fast);
    n_slow += int'(e_slow); n_skip += int'(e_skip);
  end

  function automatic boid_t dut_entry(input int k);
    boid_t b;
    b.x  = r_sext(fix_t'(dut.u_mem.x_mem[k]), X_W);
    b.y  = r_sext(fix_t'(dut.u_mem.y_mem[k]), Y_W);
    b.vx = r_sext(fix_t'(dut.u_mem.vx_mem[k]), V_W);
    b.vy = r_sext(fix_t'(dut.u_mem.vy_mem[k]), V_W);
    return b;
  endfunction

  task automatic host_write(input int k, input boid_t b);
    @(negedge clk);
    host_we = 1; host_addr = AW'(k); host_wdata = b;
    @(negedge clk);
    host_we = 0;
  endtask

  initial begin
    rmem = new[N];
    rmem[0] = mk_boid(300, 200, 1, 0);
    rmem[1] = mk_boid(304, 202, -1, 0.5);
    rmem[2] = mk_boid(320, 215, 0.5, 0.5);
    rmem[3] = mk_boid(290, 190, 7, 0);
    rmem[4] = mk_boid(310, 205, 0, -1);
    rmem[5] = mk_boid(315, 185, 2, 2);
    rmem[6] = mk_boid(50, 450, 0.2, 0.2);
    rmem[7] = mk_boid(600, 40, -3, 3);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < N; k++) begin
      rmem[k] = r_store(rmem[k]);
      host_write(k, rmem[k]);
    end
    for (int k = 0; k < N; k++) begin
      checks++;
      if (dut_entry(k) !== rmem[k]) begin failures++; $display("FAIL load %0d", k); end
    end

    for (int f = 0; f < FRAMES; f++) begin
      int cycles;
      cycles = 0;
      // idle with VGA_VS high: nothing may start
      repeat (5 + f % 3) begin
        @(negedge clk);
        checks++;
        if (busy) failures++; else n_wait++;
      end
      @(negedge clk) vga_vs = 0;
      @(negedge clk) vga_vs = 1;
      r_frame(rmem, N, CW);
      // run the frame, poking the host port and the VGA port on the way
      while (busy) begin
        cycles++;
        if (cycles == 7) begin
          host_we = 1; host_addr = AW'(f % N); host_wdata = mk_boid(1, 1, 1, 1);
          n_block++;
        end else host_we = 0;
        @(negedge clk);
        if (cycles > 4 * N * N) break;
      end
      host_we = 0;
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
      // VGA: each on-screen boid's pixel is white, a pixel next to it matches the model
      for (int k = 0; k < N; k++) begin
        int px, py;
        logic e;
        px = int'(rmem[k].x >>> 16);
        py = int'(rmem[k].y >>> 16);
        if (px < 0 || py < 0 || px > 639 || py > 479) continue;
        next_x = PIX_W'(px); next_y = PIX_W'(py);
        #1;
        checks++;
        if (!pixel_hit || pixel_color != 8'hFF) failures++; else n_pix++;
        next_x = PIX_W'(px + 3);
        #1;
        e = 0;
        for (int m = 0; m < N; m++)
          if (int'(rmem[m].x >>> 16) == px + 3 && int'(rmem[m].y >>> 16) == py) e = 1;
        checks++;
        if (pixel_hit != e) failures++;
      end
    end
    $display("close=%0d visible=%0d saturated=%0d none=%0d turned=%0d fast=%0d slow=%0d",
             n_close, n_vis, n_sat, n_none, n_turn, n_fast, n_slow);
    $display("skip=%0d vs_wait=%0d host_blocked=%0d pixel_hits=%0d", n_skip, n_wait, n_block, n_pix);
    foreach (rmem[k]) $display("boid %0d at (%0d,%0d)", k, rmem[k].x >>> 16, rmem[k].y >>> 16);
    checks++;
    if (n_close == 0 || n_vis == 0 || n_sat == 0 || n_none == 0 || n_turn == 0 || n_fast == 0 ||
        n_slow == 0 || n_skip == 0 || n_wait == 0 || n_block == 0 || n_pix == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (FRAMES * (N * 2 * N + 20) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
