// tb_out_socket: self-checking test of an output (result) socket. The test
// drives random source addresses on both buses and a random unit value. One
// cycle after a bus names the socket as its source, the socket must drive the
// unit value it saw on that bus (and raise its enable); on every other bus and
// cycle it must drive zero with the enable low, so that buses can be built as
// an OR of all drivers.
module tb_out_socket;
  import taco_pkg::*;
  localparam addr_t ID = 8'd58;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t             val;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] en;
  int checks = 0, failures = 0;
  int drives = 0;

  out_socket #(.ID(ID)) dut (.clk, .rst_n, .bus_i(bus), .fu_data_i(val), .drv_o(drv), .drv_en_o(en));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic  [BUSES-1:0] sel;
    data_t             v;
    bus = '0;
    val = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      val = $urandom;
      for (int b = 0; b < BUSES; b++) begin
        bus[b].dst  = addr_t'($urandom);
        bus[b].data = $urandom;
        bus[b].src  = ($urandom_range(0, 2) == 0) ? ID : addr_t'($urandom_range(0, 255));
        sel[b]      = (bus[b].src == ID);
      end
      v = val;
      @(posedge clk);
      #1;
      for (int b = 0; b < BUSES; b++) begin
        checks++;
        if (en[b] !== sel[b] || drv[b] !== (sel[b] ? v : '0)) begin
          failures++;
          $display("FAIL cycle %0d bus %0d: en=%b drv=%h expected en=%b value %h", n, b, en[b], drv[b], sel[b], v);
        end
        if (en[b]) drives++;
      end
    end
    checks++;
    if (drives == 0) begin
      failures++;
      $display("FAIL the socket never drove a bus");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
