// tb_taco_interconnect: self-checking test of the bus interconnect. Random
// sets of drivers are enabled on each bus with random values (disabled drivers
// carry random garbage that must be masked off). The data line must be the OR
// of the enabled drivers' values, the address fields must pass through, and
// the collision flag must be raised exactly when more than one driver is
// enabled on a bus. Collisions are only produced in a phase of their own, as
// the unit also reports them as assertion errors.
module tb_taco_interconnect;
  import taco_pkg::*;
  localparam int NDRV = 6;
  addr_t [BUSES-1:0]           src, dst;
  data_t [NDRV-1:0][BUSES-1:0] drv;
  logic  [NDRV-1:0][BUSES-1:0] en;
  bus_t  [BUSES-1:0]           bus;
  logic  [BUSES-1:0]           coll;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  taco_interconnect #(.NDRV(NDRV)) dut
    (.src_i(src), .dst_i(dst), .drv_i(drv), .drv_en_i(en), .bus_o(bus), .collision_o(coll));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t d;
    int    cnt;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int b = 0; b < BUSES; b++) begin
        src[b] = addr_t'($urandom);
        dst[b] = addr_t'($urandom);
        for (int k = 0; k < NDRV; k++) begin
          drv[k][b] = $urandom;
          en[k][b]  = 1'b0;
        end
        if ($urandom_range(0, 3) != 0) en[$urandom_range(0, NDRV - 1)][b] = 1'b1;
      end
      #1;
      for (int b = 0; b < BUSES; b++) begin
        d = '0;
        for (int k = 0; k < NDRV; k++) if (en[k][b]) d = drv[k][b];
        checks++;
        if (bus[b].data !== d || bus[b].src !== src[b] || bus[b].dst !== dst[b] || coll[b] !== 1'b0) begin
          failures++;
          $display("FAIL bus %0d: data %h expected %h", b, bus[b].data, d);
        end
      end
    end
    $display("note: the following collision warnings are expected");
    for (int n = 0; n < 20; n++) begin
      @(negedge clk);
      for (int b = 0; b < BUSES; b++)
        for (int k = 0; k < NDRV; k++) begin
          drv[k][b] = $urandom;
          en[k][b]  = ($urandom_range(0, 1) == 1);
        end
      #1;
      for (int b = 0; b < BUSES; b++) begin
        d = '0;
        cnt = 0;
        for (int k = 0; k < NDRV; k++) if (en[k][b]) begin d = d | drv[k][b]; cnt++; end
        checks++;
        if (bus[b].data !== d || coll[b] !== (cnt > 1)) begin
          failures++;
          $display("FAIL collision phase bus %0d: data %h expected %h coll %b", b, bus[b].data, d, coll[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
