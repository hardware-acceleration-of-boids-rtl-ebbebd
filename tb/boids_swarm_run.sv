// boids_swarm_run: test harness that builds the accelerator for a swarm of
// N boids, loads a jittered grid covering the screen, runs FRAMES frames
// and compares the memory with the reference model after each one. It also
// checks the cycle count N*(2 + 2*(N-1)) per frame. Results are reported
// through `checks`, `failures` and `done` so that one testbench can run
// several swarm sizes side by side.
module boids_swarm_run
  import boids_pkg::*;
  import boids_ref_pkg::*;
#(
  parameter int N      = 2,
  parameter int FRAMES = 2
)(
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int AW   = (N > 1) ? $clog2(N) : 1;
  localparam int COLS = (N < 20) ? N : 20;
  localparam int ROWS = (N + COLS - 1) / COLS;

  logic clk = 0, rst = 1, vga_vs = 1, host_we = 0;
  logic [PIX_W-1:0] next_x = '0, next_y = '0;
  logic [AW-1:0] host_addr = '0;
  boid_t host_wdata = '0;
  logic [7:0] pixel_color;
  logic pixel_hit, busy, frame_done;
  state_t state;
  logic e_close, e_vis, e_sat, e_none, e_turn, e_fast, e_slow, e_skip;
  boid_t rmem [];

  boids_xcel #(.NUM_BOIDS(N)) dut (
    .clk(clk), .rst(rst), .vga_vs(vga_vs), .next_x(next_x), .next_y(next_y),
    .pixel_color(pixel_color), .pixel_hit(pixel_hit),
    .host_we(host_we), .host_addr(host_addr), .host_wdata(host_wdata),
    .busy(busy), .frame_done(frame_done), .state(state),
    .ev_close(e_close), .ev_visible(e_vis), .ev_saturated(e_sat),
    .ev_no_neighbours(e_none), .ev_turned(e_turn), .ev_too_fast(e_fast),
    .ev_too_slow(e_slow), .ev_itr_skip(e_skip));

  always #5 clk = ~clk;

  function automatic boid_t dut_entry(input int k);
    boid_t b;
    b.x  = r_sext(fix_t'(dut.u_mem.x_mem[k]), X_W);
    b.y  = r_sext(fix_t'(dut.u_mem.y_mem[k]), Y_W);
    b.vx = r_sext(fix_t'(dut.u_mem.vx_mem[k]), V_W);
    b.vy = r_sext(fix_t'(dut.u_mem.vy_mem[k]), V_W);
    return b;
  endfunction

  initial begin
    checks = 0; failures = 0; done = 0;
    rmem = new[N];
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < N; k++) begin
      int jx, jy, vx, vy;
      jx = int'($urandom % 6);
      jy = int'($urandom % 6);
      vx = int'($urandom % 25) - 12;
      vy = int'($urandom % 25) - 12;
      rmem[k] = r_store(mk_boid(40 + (560 * (k % COLS)) / COLS + jx,
                                40 + (400 * (k / COLS)) / ROWS + jy, vx / 2.0, vy / 2.0));
      @(negedge clk);
      host_we = 1; host_addr = AW'(k); host_wdata = rmem[k];
    end
    @(negedge clk) host_we = 0;
    for (int f = 0; f < FRAMES; f++) begin
      int cycles, bad;
      repeat (4) @(negedge clk);
      vga_vs = 0;
      @(negedge clk) vga_vs = 1;
      r_frame(rmem, N, CTR_W);
      cycles = 0;
      while (busy && cycles < 2 * N * (2 + 2 * N)) begin
        cycles++;
        @(negedge clk);
      end
      checks++;
      if (cycles != N * (2 + 2 * (N - 1))) begin
        failures++; $display("FAIL N=%0d frame %0d took %0d cycles", N, f, cycles);
      end
      bad = 0;
      for (int k = 0; k < N; k++) if (dut_entry(k) !== rmem[k]) bad++;
      checks++;
      if (bad != 0) begin failures++; $display("FAIL N=%0d frame %0d: %0d boids differ", N, f, bad); end
      $display("N=%0d frame %0d: %0d cycles, %0d boids differ", N, f, cycles, bad);
    end
    done = 1;
  end
endmodule
