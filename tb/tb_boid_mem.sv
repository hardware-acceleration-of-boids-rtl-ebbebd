// tb_boid_mem: writes random boids (including values with bits beyond the
// stored widths) to a 12-entry memory, reads every entry back through the
// combinational port and checks truncation and sign extension against the
// reference model; also checks the VGA pixel output at each stored boid.
module tb_boid_mem;
  import boids_pkg::*;
  import boids_ref_pkg::*;
  localparam int N = 12;
  localparam int AW = $clog2(N);
  logic clk = 0, rst = 1, we = 0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  boid_t wdata, rdata;
  logic [PIX_W-1:0] nx = '0, ny = '0;
  logic hit;
  logic [7:0] color;
  boid_t model [N];
  int checks = 0, failures = 0;

  boid_mem #(.NUM_BOIDS(N)) dut (.clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
                                 .raddr(raddr), .rdata(rdata), .next_x(nx), .next_y(ny),
                                 .pixel_hit(hit), .pixel_color(color));

  always #5 clk = ~clk;

  initial begin
    wdata = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int k = 0; k < N; k++) model[k] = '0;
    for (int r = 0; r < 40; r++) begin
      // a burst of writes
      repeat (8) begin
        @(negedge clk);
        we = 1;
        waddr = AW'($urandom % N);
        wdata = {$urandom, $urandom, $urandom, $urandom};
        if (r % 2) begin
          wdata.x = fix_t'($urandom % 640) <<< 16;
          wdata.y = fix_t'($urandom % 480) <<< 16;
        end
        @(posedge clk);
        model[waddr] = r_store(wdata);
      end
      @(negedge clk) we = 0;
      for (int k = 0; k < N; k++) begin
        raddr = AW'(k);
        #1;
        checks++;
        if (rdata !== model[k]) begin
          failures++;
          if (failures < 10) $display("FAIL entry %0d read %p expected %p", k, rdata, model[k]);
        end
        if (model[k].x >= 0 && model[k].y >= 0 && (model[k].x >>> 16) < 1024 && (model[k].y >>> 16) < 1024) begin
          nx = PIX_W'(model[k].x >>> 16);
          ny = PIX_W'(model[k].y >>> 16);
          #1;
          checks++;
          if (!hit || color != 8'hFF) begin failures++; $display("FAIL no pixel for entry %0d", k); end
        end
      end
    end
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
