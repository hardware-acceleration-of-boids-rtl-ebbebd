// tb_boids_swarm_sizes: runs the accelerator at the swarm sizes it is
// evaluated at - 2, 10, 50 and 200 boids, about 340 (the largest build of
// the original board) and 912 (the most that fits the cycle budget of a
// 30 frames/s display at 50 MHz) - two frames each, all side by side. Each
// size must match the reference model and take N*(2 + 2*(N-1)) cycles per
// frame; for 912 boids that is 1,663,488 cycles, inside the 1,666,667-cycle
// budget of one 30 Hz frame at 50 MHz, which is also checked.
module tb_boids_swarm_sizes;
  localparam int NS = 6;
  int   c [NS];
  int   f [NS];
  logic d [NS];
  int checks, failures;

  boids_swarm_run #(.N(2))   r2   (.checks(c[0]), .failures(f[0]), .done(d[0]));
  boids_swarm_run #(.N(10))  r10  (.checks(c[1]), .failures(f[1]), .done(d[1]));
  boids_swarm_run #(.N(50))  r50  (.checks(c[2]), .failures(f[2]), .done(d[2]));
  boids_swarm_run #(.N(200)) r200 (.checks(c[3]), .failures(f[3]), .done(d[3]));
  boids_swarm_run #(.N(340)) r340 (.checks(c[4]), .failures(f[4]), .done(d[4]));
  boids_swarm_run #(.N(912), .FRAMES(1)) r912 (.checks(c[5]), .failures(f[5]), .done(d[5]));

  initial begin
    checks = 0; failures = 0;
    wait (d[0] && d[1] && d[2] && d[3] && d[4] && d[5]);
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
    checks++;
    if (912 * (2 + 2 * 911) > 50_000_000 / 30) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40_000_000;
    for (int i = 0; i < NS; i++) begin checks += c[i]; failures += f[i]; end
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
