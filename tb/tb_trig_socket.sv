// tb_trig_socket: self-checking test of a trigger socket with several
// addresses (one per operation). Random destination addresses around the
// socket's range are driven on both buses. One cycle after a bus names one of
// the socket's addresses, the socket must load that bus's data, present the
// operation number (address minus base address) and pulse the trigger for
// exactly one cycle; with no hit the trigger stays low and the data and
// operation are held.
module tb_trig_socket;
  import taco_pkg::*;
  localparam addr_t BASE = 8'd8;
  localparam int    NIDS = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t [BUSES-1:0] bus;
  data_t   q;
  opcode_t opc;
  logic    trig;
  int checks = 0, failures = 0;
  int triggers = 0;
  logic [NIDS-1:0] ops_seen = '0;

  trig_socket #(.BASE_ID(BASE), .NIDS(NIDS)) dut
    (.clk, .rst_n, .bus_i(bus), .fu_data_o(q), .opcode_o(opc), .trig_o(trig));

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t   m;
    opcode_t mo;
    int      hit_prev, hit_now, op_prev, op_now;
    bus = '0;
    m = '0;
    mo = '0;
    hit_prev = -1;
    op_prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      hit_now = -1;
      op_now  = 0;
      for (int b = 0; b < BUSES; b++) begin
        bus[b].src  = addr_t'($urandom);
        bus[b].data = $urandom;
        bus[b].dst  = addr_t'($urandom_range(int'(BASE) - 2, int'(BASE) + NIDS + 1));
      end
      // at most one move to the unit per cycle, as a program would issue
      if (bus[0].dst >= BASE && bus[0].dst < BASE + NIDS &&
          bus[1].dst >= BASE && bus[1].dst < BASE + NIDS)
        bus[0].dst = BASE - 8'd1;
      for (int b = 0; b < BUSES; b++)
        if (bus[b].dst >= BASE && bus[b].dst < BASE + NIDS) begin
          hit_now = b;
          op_now  = int'(bus[b].dst - BASE);
        end
      @(posedge clk);
      if (hit_prev >= 0) begin
        m  = bus[hit_prev].data;
        mo = opcode_t'(op_prev);
      end
      #1;
      checks++;
      if (trig !== (hit_prev >= 0) || q !== m || opc !== mo) begin
        failures++;
        $display("FAIL cycle %0d: trig=%b q=%h op=%0d expected trig=%b q=%h op=%0d",
                 n, trig, q, opc, hit_prev >= 0, m, mo);
      end
      if (trig) begin
        triggers++;
        ops_seen[opc] = 1'b1;
      end
      hit_prev = hit_now;
      op_prev  = op_now;
    end
    checks++;
    if (triggers == 0 || ops_seen != '1) begin
      failures++;
      $display("FAIL not every operation address was exercised: %b", ops_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
