// boid_mem: register-based boid memory with truncating write, sign-extending
// read and the VGA pixel interface.
//
// One entry per boid, stored as X[27:0], Y[26:0], VX[20:0] and VY[20:0]:
// the 16.16 values with their upper bits dropped (X up to +/-2048 px,
// Y up to +/-1024 px, velocities up to +/-16 px/frame). A write (`we`)
// stores the low bits of `wdata` at `waddr` on the clock edge. The read port
// is combinational: `raddr` selects an entry and each field is sign-extended
// back to 32 bits. All X and Y registers also feed vga_pixel_or, which
// tells the VGA driver whether a boid sits on the pixel it draws next.
// Synchronous active-high reset clears every entry.
//
// Field widths, truncate-on-write, sign-extend-on-read and the direct
// register-to-VGA comparison follow the reference design.
module boid_mem
  import boids_pkg::*;
#(
  parameter int NUM_BOIDS = 100,
  parameter int AW = (NUM_BOIDS > 1) ? $clog2(NUM_BOIDS) : 1
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  boid_t            wdata,
  input  logic [AW-1:0]    raddr,
  output boid_t            rdata,
  input  logic [PIX_W-1:0] next_x,
  input  logic [PIX_W-1:0] next_y,
  output logic             pixel_hit,
  output logic [7:0]       pixel_color
);
  logic [X_W-1:0] x_mem  [NUM_BOIDS];
  logic [Y_W-1:0] y_mem  [NUM_BOIDS];
  logic [V_W-1:0] vx_mem [NUM_BOIDS];
  logic [V_W-1:0] vy_mem [NUM_BOIDS];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NUM_BOIDS; i++) begin
        x_mem[i]  <= '0;
        y_mem[i]  <= '0;
        vx_mem[i] <= '0;
        vy_mem[i] <= '0;
      end
    end else if (we && int'(waddr) < NUM_BOIDS) begin
      x_mem[waddr]  <= wdata.x[X_W-1:0];
      y_mem[waddr]  <= wdata.y[Y_W-1:0];
      vx_mem[waddr] <= wdata.vx[V_W-1:0];
      vy_mem[waddr] <= wdata.vy[V_W-1:0];
    end
  end

  logic [X_W-1:0] x_rd;
  logic [Y_W-1:0] y_rd;
  logic [V_W-1:0] vx_rd, vy_rd;

  always_comb begin
    if (int'(raddr) < NUM_BOIDS) begin
      x_rd  = x_mem[raddr];
      y_rd  = y_mem[raddr];
      vx_rd = vx_mem[raddr];
      vy_rd = vy_mem[raddr];
    end else begin
      x_rd = '0; y_rd = '0; vx_rd = '0; vy_rd = '0;
    end
  end

  sign_extend #(.IN_W(X_W), .OUT_W(FIX_W)) u_sx_x  (.din(x_rd),  .dout(rdata.x));
  sign_extend #(.IN_W(Y_W), .OUT_W(FIX_W)) u_sx_y  (.din(y_rd),  .dout(rdata.y));
  sign_extend #(.IN_W(V_W), .OUT_W(FIX_W)) u_sx_vx (.din(vx_rd), .dout(rdata.vx));
  sign_extend #(.IN_W(V_W), .OUT_W(FIX_W)) u_sx_vy (.din(vy_rd), .dout(rdata.vy));

  vga_pixel_or #(.NUM_BOIDS(NUM_BOIDS)) u_pix (
    .xs(x_mem), .ys(y_mem), .next_x(next_x), .next_y(next_y),
    .hit(pixel_hit), .color(pixel_color)
  );
endmodule
