// tb_xcel_datapath: plays the control unit's role by hand for a 6-boid
// swarm held in a testbench array (read combinationally, as the real
// memory is), over several frames with a 2-bit neighbour counter so that it
// saturates. Each writeback result is compared with the reference model
// and written back in place. Every event output must fire at least once.
module tb_xcel_datapath;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  localparam int N = 6;
  localparam int CW = 2;
  logic clk = 0, rst = 1, ld_state = 0, acc_clr = 0, acc_en = 0, wb_en = 0;
  boid_t mem_rd, wb_data;
  boid_t mem [N];
  boid_t rmem [];
  logic e_close, e_vis, e_sat, e_none, e_turn, e_fast, e_slow;
  int checks = 0, failures = 0;
  int n_close = 0, n_vis = 0, n_sat = 0, n_none = 0, n_turn = 0, n_fast = 0, n_slow = 0;

  xcel_datapath #(.CW(CW)) dut (
    .clk(clk), .rst(rst), .ld_state(ld_state), .acc_clr(acc_clr), .acc_en(acc_en),
    .wb_en(wb_en), .mem_rd(mem_rd), .wb_data(wb_data),
    .ev_close(e_close), .ev_visible(e_vis), .ev_saturated(e_sat),
    .ev_no_neighbours(e_none), .ev_turned(e_turn), .ev_too_fast(e_fast), .ev_too_slow(e_slow));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    n_close += int'(e_close); n_vis += int'(e_vis); n_sat += int'(e_sat);
    n_none += int'(e_none); n_turn += int'(e_turn); n_fast += int'(e_fast); n_slow += int'(e_slow);
  end

  task automatic cyc(input logic l, input logic c, input logic a, input logic w, input int addr);
    @(negedge clk);
    ld_state = l; acc_clr = c; acc_en = a; wb_en = w;
    mem_rd = mem[addr];
  endtask

  initial begin
    rmem = new[N];
    mem[0] = mk_boid(300, 200, 1, 0);
    mem[1] = mk_boid(304, 202, -1, 0.5);   // close to 0
    mem[2] = mk_boid(320, 215, 0.5, 0.5);  // visible to 0 and 1
    mem[3] = mk_boid(290, 190, 7, 0);      // fast, visible
    mem[4] = mk_boid(310, 205, 0, -1);     // 4 visible neighbours -> saturates
    mem[5] = mk_boid(50, 450, 0.2, 0.2);   // alone, slow, past two margins
    for (int k = 0; k < N; k++) begin mem[k] = r_store(mem[k]); rmem[k] = mem[k]; end
    mem_rd = '0;
    repeat (2) @(posedge clk);
    rst = 0;
    for (int f = 0; f < 4; f++) begin
      r_frame(rmem, N, CW);
      for (int i = 0; i < N; i++) begin
        cyc(1, 1, 0, 0, i);                  // sa_init
        for (int j = 0; j < N; j++) begin
          if (j == i) continue;
          cyc(0, 0, 0, 0, j);                // sa_ld
          cyc(0, 0, 1, 0, j);                // sa_calc
        end
        cyc(0, 0, 0, 1, i);                  // ac_wb
        #1;
        checks++;
        if (r_store(wb_data) !== rmem[i]) begin
          failures++;
          if (failures < 10) $display("FAIL frame %0d boid %0d: %p expected %p", f, i, r_store(wb_data), rmem[i]);
        end
        mem[i] = r_store(wb_data);
      end
    end
    cyc(0, 0, 0, 0, 0);
    @(posedge clk);
    $display("close=%0d visible=%0d saturated=%0d none=%0d turned=%0d fast=%0d slow=%0d",
             n_close, n_vis, n_sat, n_none, n_turn, n_fast, n_slow);
    checks++;
    if (n_close == 0 || n_vis == 0 || n_sat == 0 || n_none == 0 || n_turn == 0 ||
        n_fast == 0 || n_slow == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
