// tb_vga_pixel_or: places 8 boids at random (some off screen, some on the
// same pixel) and scans a window of pixels around each and at random
// spots, comparing `hit`/`color` with a direct search over the boids.
module tb_vga_pixel_or;
  import boids_pkg::*;
  localparam int N = 8;
  logic [X_W-1:0] xs [N];
  logic [Y_W-1:0] ys [N];
  logic [PIX_W-1:0] nx, ny;
  logic hit;
  logic [7:0] color;
  int checks = 0, failures = 0, hits = 0;

  vga_pixel_or #(.NUM_BOIDS(N)) dut (.xs(xs), .ys(ys), .next_x(nx), .next_y(ny),
                                     .hit(hit), .color(color));

  task automatic probe(input int px, input int py);
    logic e;
    if (px < 0 || py < 0) return;  // the driver only asks for on-screen pixels
    e = 0;
    nx = PIX_W'(px); ny = PIX_W'(py);
    #1;
    for (int k = 0; k < N; k++)
      if ((int'($signed(xs[k])) >>> 16) == px && (int'($signed(ys[k])) >>> 16) == py) e = 1;
    checks++;
    if (hit !== e || color !== (e ? 8'hFF : 8'h00)) begin
      failures++;
      if (failures < 10) $display("FAIL pixel (%0d,%0d) hit=%b expected %b", px, py, hit, e);
    end
    if (hit) hits++;
  endtask

  initial begin
    for (int r = 0; r < 20; r++) begin
      for (int k = 0; k < N; k++) begin
        int px, py;
        px = int'($urandom % 700) - 30;
        py = int'($urandom % 540) - 30;
        xs[k] = X_W'((px <<< 16) | ($urandom & 16'hFFFF));
        ys[k] = Y_W'((py <<< 16) | ($urandom & 16'hFFFF));
      end
      xs[1] = xs[0]; ys[1] = ys[0] + 1; // two boids on one pixel
      for (int k = 0; k < N; k++)
        for (int dx = -1; dx <= 1; dx++)
          for (int dy = -1; dy <= 1; dy++)
            probe((int'($signed(xs[k])) >>> 16) + dx, (int'($signed(ys[k])) >>> 16) + dy);
      for (int k = 0; k < 50; k++) probe(int'($urandom % 640), int'($urandom % 480));
    end
    checks++;
    if (hits == 0) failures++;
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
