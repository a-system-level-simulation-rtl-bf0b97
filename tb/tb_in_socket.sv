// tb_in_socket: self-checking test of an input (operand) socket. The test
// drives both buses directly with random destination addresses and data. The
// socket must take the data line of the bus that carried its address in the
// previous cycle, hold its value otherwise, and raise loaded_o for exactly the
// cycles in which it loaded. A model with the same one-cycle rule predicts
// every register value.
module tb_in_socket;
  import taco_pkg::*;
  localparam addr_t ID = 8'd21;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t [BUSES-1:0] bus;
  data_t q;
  logic  loaded;
  int checks = 0, failures = 0;
  int loads = 0;

  in_socket #(.ID(ID)) dut (.clk, .rst_n, .bus_i(bus), .fu_data_o(q), .loaded_o(loaded));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t m;
    int    hit_prev;   // bus that addressed the socket in the previous cycle, or -1
    int    hit_now;
    bus = '0;
    m = '0;
    hit_prev = -1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      // new cycle: addresses and data for this cycle
      hit_now = -1;
      for (int b = 0; b < BUSES; b++) begin
        bus[b].src  = addr_t'($urandom);
        bus[b].data = $urandom;
        bus[b].dst  = ($urandom_range(0, 3) == 0) ? ID : addr_t'($urandom_range(0, 255));
        if (bus[b].dst == ID) hit_now = b;
      end
      if (hit_now >= 0 && $urandom_range(0, 1) == 1) begin
        // keep only one bus addressing the socket
        for (int b = 0; b < BUSES; b++) if (b != hit_now && bus[b].dst == ID) bus[b].dst = ID + 8'd1;
      end
      @(posedge clk);
      if (hit_prev >= 0) m = bus[hit_prev].data;
      #1;
      checks++;
      if (q !== m || loaded !== (hit_prev >= 0)) begin
        failures++;
        $display("FAIL cycle %0d: q=%h expected %h loaded=%b", n, q, m, loaded);
      end
      if (loaded) loads++;
      hit_prev = hit_now;
    end
    checks++;
    if (loads == 0) begin
      failures++;
      $display("FAIL the socket was never loaded");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
