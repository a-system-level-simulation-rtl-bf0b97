// tb_fu_matcher: self-checking test of the matcher unit, which answers whether
// the trigger value equals the data operand (OD) in the bits selected by the
// mask (OP). Half of the cases are built to match. The 0/1 result and the
// matcher's guard line are compared with a model.
module tb_fu_matcher;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  logic guard;
  fu_matcher dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en), .guard_o(guard));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t op, od, tr, v;
    int    b;
    logic  e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      op = (n % 7 == 0) ? '0 : $urandom;
      od = $urandom;
      tr = (n % 2 == 0) ? ((od & op) | ($urandom & ~op)) : $urandom;
      if (n % 4 == 1) tr = tr ^ (data_t'(1) << $urandom_range(0, 31));
      b  = int'($urandom_range(0, 1));
      u_bfm.put(ID_OPMS1, op, b);
      u_bfm.cyc('0, ID_ODMS1, od, '0, ID_TMS1, tr);
      u_bfm.nop(2);
      e = ((tr & op) == (od & op));
      u_bfm.get(ID_RMS1, b, v);
      checks++;
      if (guard !== e) begin
        failures++;
        $display("FAIL guard mask %h od %h tr %h", op, od, tr);
      end
      check($sformatf("mask %h od %h tr %h", op, od, tr), v, data_t'(e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
