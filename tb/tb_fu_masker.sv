// tb_fu_masker: self-checking test of the masker unit, which replaces the bits
// of the trigger value selected by the mask (OP) with the bits of the data
// operand (OD). Random values, with masks of all-zero, all-one, field-shaped
// and random patterns, are compared with a model.
module tb_fu_masker;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_masker dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en));

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
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      case ($urandom_range(0, 3))
        0: op = '0;
        1: op = '1;
        2: op = data_t'(32'hFFFF) << $urandom_range(0, 16);
        default: op = $urandom;
      endcase
      od = $urandom;
      tr = $urandom;
      b  = int'($urandom_range(0, 1));
      u_bfm.cyc('0, ID_OPM1, op, '0, ID_ODM1, od);
      u_bfm.put(ID_TM1, tr, b);
      u_bfm.nop(2);
      u_bfm.get(ID_RM1, 1 - b, v);
      check($sformatf("mask %h od %h tr %h", op, od, tr), v, (tr & ~op) | (od & op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
