// tb_fu_counter: self-checking test of the counter unit. A random sequence of
// set (TSC), increment (TIC) and decrement (TDC) triggers is applied, including
// wrap-around at zero, and after each one the count is read back (three
// instructions later) and compared with a model, together with the
// "count is zero" guard line.
module tb_fu_counter;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  logic guard;
  fu_counter dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en), .guard_o(guard));

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
    data_t m, v, tr;
    int    opc, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    m = '0;
    for (int n = 0; n < 400; n++) begin
      opc = (n % 25 == 0) ? 0 : int'($urandom_range(0, 2));
      tr  = (opc == 0) ? data_t'($urandom_range(0, 3)) : $urandom;
      b   = int'($urandom_range(0, 1));
      u_bfm.put(addr_t'(int'(ID_TC1) + opc), tr, b);
      u_bfm.nop(2);
      case (opc)
        0: m = tr;
        1: m = m + 1;
        default: m = m - 1;
      endcase
      u_bfm.get(ID_RC1, b, v);
      checks++;
      if (guard !== (m == 0)) begin
        failures++;
        $display("FAIL zero guard, count %h", m);
      end
      check($sformatf("count after op%0d", opc), v, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
