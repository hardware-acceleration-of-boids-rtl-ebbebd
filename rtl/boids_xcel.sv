// boids_xcel: boids flocking accelerator, top level.
//
// Once per video frame (falling edge of VGA_VS) the accelerator updates
// every boid of the swarm in turn. For boid i it loads i into the Boid State
// registers, streams every other boid through the Accumulation unit (two
// cycles each), then computes the new velocity and position in one cycle
// and writes them back in place, so later boids already see the new state
// of earlier ones. A frame takes NUM_BOIDS*(2 + 2*(NUM_BOIDS-1)) cycles.
// Meanwhile the VGA driver asks for the colour of the pixel it draws next
// and gets white where a boid is.
//
// Interface:
//   vga_vs, next_x, next_y, pixel_color  to/from the VGA driver
//   host_we, host_addr, host_wdata       load initial boid states; accepted
//                                        only while the accelerator is idle
//                                        (in init), ignored while busy
//   busy, frame_done                     status; frame_done pulses in the
//                                        last writeback cycle of a frame
//   state, ev_*                          current FSM state and per-cycle
//                                        events, for observation
// The host load port and the status outputs are this design's additions:
// the reference design does not say how the swarm is first placed in memory.
module boids_xcel
  import boids_pkg::*;
#(
  parameter int NUM_BOIDS = 100,
  parameter int CW        = CTR_W,
  parameter int AW        = (NUM_BOIDS > 1) ? $clog2(NUM_BOIDS) : 1
)(
  input  logic             clk,
  input  logic             rst,
  input  logic             vga_vs,
  input  logic [PIX_W-1:0] next_x,
  input  logic [PIX_W-1:0] next_y,
  output logic [7:0]       pixel_color,
  output logic             pixel_hit,
  input  logic             host_we,
  input  logic [AW-1:0]    host_addr,
  input  boid_t            host_wdata,
  output logic             busy,
  output logic             frame_done,
  output state_t           state,
  output logic             ev_close,
  output logic             ev_visible,
  output logic             ev_saturated,
  output logic             ev_no_neighbours,
  output logic             ev_turned,
  output logic             ev_too_fast,
  output logic             ev_too_slow,
  output logic             ev_itr_skip
);
  logic          ld_state, acc_clr, acc_en, wb_en;
  logic [AW-1:0] rd_addr, wr_addr, mem_waddr;
  boid_t         mem_rd, wb_data, mem_wdata;
  logic          mem_we;

  xcel_ctrl #(.NUM_BOIDS(NUM_BOIDS), .AW(AW)) u_ctrl (
    .clk(clk), .rst(rst), .vga_vs(vga_vs), .state(state),
    .ld_state(ld_state), .acc_clr(acc_clr), .acc_en(acc_en), .wb_en(wb_en),
    .rd_addr(rd_addr), .wr_addr(wr_addr), .busy(busy), .frame_done(frame_done),
    .itr_skip(ev_itr_skip)
  );

  xcel_datapath #(.CW(CW)) u_dp (
    .clk(clk), .rst(rst), .ld_state(ld_state), .acc_clr(acc_clr),
    .acc_en(acc_en), .wb_en(wb_en), .mem_rd(mem_rd), .wb_data(wb_data),
    .ev_close(ev_close), .ev_visible(ev_visible), .ev_saturated(ev_saturated),
    .ev_no_neighbours(ev_no_neighbours), .ev_turned(ev_turned),
    .ev_too_fast(ev_too_fast), .ev_too_slow(ev_too_slow)
  );

  // Writeback owns the write port while busy; the host only when idle
  assign mem_we    = wb_en | (host_we & ~busy);
  assign mem_waddr = wb_en ? wr_addr : host_addr;
  assign mem_wdata = wb_en ? wb_data : host_wdata;

  boid_mem #(.NUM_BOIDS(NUM_BOIDS), .AW(AW)) u_mem (
    .clk(clk), .rst(rst), .we(mem_we), .waddr(mem_waddr), .wdata(mem_wdata),
    .raddr(rd_addr), .rdata(mem_rd),
    .next_x(next_x), .next_y(next_y), .pixel_hit(pixel_hit), .pixel_color(pixel_color)
  );
endmodule
