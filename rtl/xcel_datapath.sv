// xcel_datapath: accelerator datapath.
//
// Holds the Boid State registers, the Boid Accumulation registers with the
// Boid Counter, the Accumulation unit (xy_sep_chk) and the Writeback unit
// (xy_writeback). The single memory read port feeds both the Boid State
// registers (loaded when `ld_state` is high, sa_init) and the Accumulation
// unit, with no register in between because the memory is read
// combinationally. In sa_calc (`acc_en`) the accumulation result is latched;
// in sa_init (`acc_clr`) the sums are cleared. The Writeback unit's inputs
// are forced to zero except while `wb_en` is high (ac_wb), to keep that
// large block quiet; its output `wb_data` goes straight to memory.
//
// Timing: one cycle per control state; wb_data is valid combinationally in
// the cycle wb_en is high. The event outputs report, for the current cycle,
// which rule the accumulation or writeback applied (used for observation
// only).
module xcel_datapath
  import boids_pkg::*;
#(
  parameter int CW = CTR_W
)(
  input  logic  clk,
  input  logic  rst,
  input  logic  ld_state,
  input  logic  acc_clr,
  input  logic  acc_en,
  input  logic  wb_en,
  input  boid_t mem_rd,
  output boid_t wb_data,
  output logic  ev_close,
  output logic  ev_visible,
  output logic  ev_saturated,
  output logic  ev_no_neighbours,
  output logic  ev_turned,
  output logic  ev_too_fast,
  output logic  ev_too_slow
);
  boid_t         st;
  accum_t        acc_q, acc_d;
  logic [CW-1:0] ctr_q, ctr_d;
  boid_t         wb_st;
  accum_t        wb_acc;
  logic [CW-1:0] wb_ctr;
  logic          close_c, visible_c, sat_c, none_c, turned_c, fast_c, slow_c;

  boid_state_regs u_state (.clk(clk), .rst(rst), .ld(ld_state), .d(mem_rd), .q(st));

  boid_accum_regs #(.CW(CW)) u_accum (
    .clk(clk), .rst(rst), .clr(acc_clr), .en(acc_en),
    .acc_d(acc_d), .ctr_d(ctr_d), .acc_q(acc_q), .ctr_q(ctr_q)
  );

  xy_sep_chk #(.CW(CW)) u_sep (
    .x(st.x), .y(st.y), .other(mem_rd), .acc(acc_q), .boid_ctr(ctr_q),
    .acc_next(acc_d), .boid_ctr_next(ctr_d),
    .too_close(close_c), .visible(visible_c), .saturated(sat_c)
  );

  // Writeback inputs are zero unless a writeback is under way
  assign wb_st  = wb_en ? st    : '0;
  assign wb_acc = wb_en ? acc_q : '0;
  assign wb_ctr = wb_en ? ctr_q : '0;

  xy_writeback #(.CW(CW)) u_wb (
    .st(wb_st), .acc(wb_acc), .boid_ctr(wb_ctr), .nxt(wb_data),
    .no_neighbours(none_c), .turned(turned_c), .too_fast(fast_c), .too_slow(slow_c)
  );

  assign ev_close         = acc_en & close_c;
  assign ev_visible       = acc_en & visible_c & ~sat_c;
  assign ev_saturated     = acc_en & sat_c;
  assign ev_no_neighbours = wb_en & none_c;
  assign ev_turned        = wb_en & turned_c;
  assign ev_too_fast      = wb_en & fast_c;
  assign ev_too_slow      = wb_en & slow_c;
endmodule
