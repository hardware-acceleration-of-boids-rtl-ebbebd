// xcel_ctrl: control unit of the boids accelerator.
//
// A five-state FSM with two loop counters:
//   init     wait for a falling edge of VGA_VS (start of a new screen);
//   sa_init  read boid `boid_tot_ctr` into the Boid State registers and
//            clear the accumulation registers; boid_itr_ctr restarts at the
//            first index other than boid_tot_ctr;
//   sa_ld    present boid `boid_itr_ctr` to the datapath (memory read);
//   sa_calc  latch the Accumulation unit's result; advance boid_itr_ctr,
//            skipping boid_tot_ctr; back to sa_ld while boids remain,
//            otherwise to ac_wb;
//   ac_wb    write the updated boid back to address boid_tot_ctr; go to
//            sa_init for the next boid or, after the last one, to init.
// The one memory read address `rd_addr` is boid_tot_ctr in sa_init and
// boid_itr_ctr otherwise. A full pass over N boids takes N*(2 + 2*(N-1))
// cycles from the first sa_init to the return to init.
//
// States, transitions, counter roles, the skip of boid_tot_ctr and the
// cycle count follow the reference design. Evaluating the end of the scan
// on the next (skipped-ahead) index, so that the last boid also sees
// exactly N-1 others, is this design's reading of the loop condition.
// Synchronous active-high reset to init. Requires NUM_BOIDS >= 2.
module xcel_ctrl
  import boids_pkg::*;
#(
  parameter int NUM_BOIDS = 100,
  parameter int AW = (NUM_BOIDS > 1) ? $clog2(NUM_BOIDS) : 1
)(
  input  logic          clk,
  input  logic          rst,
  input  logic          vga_vs,
  output state_t        state,
  output logic          ld_state,
  output logic          acc_clr,
  output logic          acc_en,
  output logic          wb_en,
  output logic [AW-1:0] rd_addr,
  output logic [AW-1:0] wr_addr,
  output logic          busy,
  output logic          frame_done,
  output logic          itr_skip   // boid_itr_ctr jumped over boid_tot_ctr
);
  // Wide enough to hold NUM_BOIDS + 1 (the index after a skip at the end)
  localparam int CW = $clog2(NUM_BOIDS + 2);
  localparam logic [CW-1:0] LAST = CW'(NUM_BOIDS - 1);

  state_t        state_n;
  logic [CW-1:0] tot_ctr, itr_ctr, itr_plus1, itr_next, itr_first;
  logic          vs_fall, scan_done;

  initial assert (NUM_BOIDS >= 2) else $error("xcel_ctrl: NUM_BOIDS must be >= 2");

  fall_edge_detector u_fed (.clk(clk), .rst(rst), .sig(vga_vs), .fall(vs_fall));

  assign itr_plus1 = itr_ctr + 1'b1;
  assign itr_skip  = (state == ST_SA_CALC) && (itr_plus1 == tot_ctr);
  assign itr_next  = (itr_plus1 == tot_ctr) ? itr_plus1 + 1'b1 : itr_plus1;
  assign itr_first = (tot_ctr == '0) ? CW'(1) : '0;
  assign scan_done = itr_next > LAST;

  // Next-state logic
  always_comb begin
    state_n = state;
    unique case (state)
      ST_INIT:    if (vs_fall) state_n = ST_SA_INIT;
      ST_SA_INIT: state_n = ST_SA_LD;
      ST_SA_LD:   state_n = ST_SA_CALC;
      ST_SA_CALC: state_n = scan_done ? ST_AC_WB : ST_SA_LD;
      ST_AC_WB:   state_n = (tot_ctr >= LAST) ? ST_INIT : ST_SA_INIT;
      default:    state_n = ST_INIT;
    endcase
  end

  // State register and loop counters
  always_ff @(posedge clk) begin
    if (rst) begin
      state   <= ST_INIT;
      tot_ctr <= '0;
      itr_ctr <= '0;
    end else begin
      state <= state_n;
      unique case (state)
        ST_INIT:    tot_ctr <= '0;
        ST_SA_INIT: itr_ctr <= itr_first;
        ST_SA_CALC: if (!scan_done) itr_ctr <= itr_next;
        ST_AC_WB:   tot_ctr <= (tot_ctr >= LAST) ? '0 : tot_ctr + 1'b1;
        default:    ;
      endcase
    end
  end

  // Current-state outputs
  assign ld_state   = (state == ST_SA_INIT);
  assign acc_clr    = (state == ST_SA_INIT);
  assign acc_en     = (state == ST_SA_CALC);
  assign wb_en      = (state == ST_AC_WB);
  assign rd_addr    = AW'((state == ST_SA_INIT) ? tot_ctr : itr_ctr);
  assign wr_addr    = AW'(tot_ctr);
  assign busy       = (state != ST_INIT);
  assign frame_done = wb_en && (tot_ctr >= LAST);

  // The scan never reads the boid being updated, nor past the swarm
  a_itr_in_range: assert property (@(posedge clk) disable iff (rst)
    (state == ST_SA_CALC) |-> (itr_ctr != tot_ctr && itr_ctr <= LAST));
endmodule
