// tb_xcel_ctrl: runs the control unit for a 5-boid swarm over three frames.
// For each frame it checks that nothing starts before VGA_VS falls, that
// the sequence of states and read addresses is exactly
//   for i in 0..N-1: sa_init(rd=i), then for each j != i: sa_ld(rd=j), sa_calc(rd=j);
//                    then ac_wb(wr=i)
// and that a frame takes N*(2 + 2*(N-1)) cycles. Skips of the boid being
// updated are counted and must occur.
module tb_xcel_ctrl;
  import boids_pkg::*;
  localparam int N = 5;
  localparam int AW = $clog2(N);
  logic clk = 0, rst = 1, vga_vs = 1;
  state_t state;
  logic ld_state, acc_clr, acc_en, wb_en, busy, frame_done, itr_skip;
  logic [AW-1:0] rd_addr, wr_addr;
  int checks = 0, failures = 0, skips = 0;

  xcel_ctrl #(.NUM_BOIDS(N)) dut (
    .clk(clk), .rst(rst), .vga_vs(vga_vs), .state(state), .ld_state(ld_state),
    .acc_clr(acc_clr), .acc_en(acc_en), .wb_en(wb_en), .rd_addr(rd_addr),
    .wr_addr(wr_addr), .busy(busy), .frame_done(frame_done), .itr_skip(itr_skip));

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst && itr_skip) skips++;

  task automatic expect_cycle(input state_t es, input int addr, input string what);
    #1;
    checks++;
    if (state != es || (es == ST_AC_WB ? int'(wr_addr) : int'(rd_addr)) != addr ||
        ld_state != (es == ST_SA_INIT) || acc_clr != (es == ST_SA_INIT) ||
        acc_en != (es == ST_SA_CALC) || wb_en != (es == ST_AC_WB)) begin
      failures++;
      if (failures < 10) $display("FAIL %s: state=%s rd=%0d wr=%0d, expected %s addr %0d",
                                  what, state.name(), rd_addr, wr_addr, es.name(), addr);
    end
    @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int f = 0; f < 3; f++) begin
      int cycles;
      // Idle while VGA_VS is high: must stay in init
      repeat (7) begin
        @(negedge clk);
        checks++;
        if (state != ST_INIT || busy) failures++;
      end
      @(negedge clk) vga_vs = 0;      // falling edge
      @(posedge clk);                  // init -> sa_init here
      @(negedge clk) vga_vs = 1;
      cycles = 0;
      // The first expect_cycle samples the first sa_init cycle
      for (int i = 0; i < N; i++) begin
        expect_cycle(ST_SA_INIT, i, "load");
        cycles++;
        for (int j = 0; j < N; j++) begin
          if (j == i) continue;
          expect_cycle(ST_SA_LD, j, "ld");
          expect_cycle(ST_SA_CALC, j, "calc");
          cycles += 2;
        end
        checks++;
        if (wb_en && i == N-1 && !frame_done) failures++;
        expect_cycle(ST_AC_WB, i, "wb");
        cycles++;
      end
      #1;
      checks++;
      if (state != ST_INIT) begin failures++; $display("FAIL frame %0d did not end", f); end
      checks++;
      if (cycles != N * (2 + 2 * (N - 1))) failures++;
      $display("frame %0d: %0d cycles", f, cycles);
    end
    checks++;
    if (skips == 0) failures++;
    $display("skips=%0d", skips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
