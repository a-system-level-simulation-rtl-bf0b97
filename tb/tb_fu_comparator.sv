// tb_fu_comparator: self-checking test of the comparator unit. Random operand
// and trigger values (with a bias towards equal and zero values) are moved to
// OPCM1 and to one of the eight trigger addresses (EQ, LZ, GZ, EQZ, LEQ, LT,
// GEQ, GT); three instructions later the 0/1 result is read back and the guard
// output, which the processor uses for conditional moves, is compared too.
module tb_fu_comparator;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  logic guard;
  fu_comparator dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en), .guard_o(guard));

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

  function automatic logic ref_cmp(input int opc, input data_t tr, input data_t op);
    case (opc)
      0: return tr == op;
      1: return $signed(tr) < 0;
      2: return $signed(tr) > 0;
      3: return tr == 0;
      4: return tr <= op;
      5: return tr < op;
      6: return tr >= op;
      default: return tr > op;
    endcase
  endfunction

  initial begin
    data_t op, tr, v;
    int    opc, b;
    logic  e;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 400; n++) begin
      opc = int'($urandom_range(0, 7));
      op  = $urandom;
      case ($urandom_range(0, 3))
        0: tr = op;
        1: tr = '0;
        2: tr = op + data_t'($urandom_range(0, 2)) - 1;
        default: tr = $urandom;
      endcase
      b = int'($urandom_range(0, 1));
      u_bfm.put(ID_OPCM1, op, b);
      u_bfm.put(addr_t'(int'(ID_TCM1) + opc), tr, b);
      u_bfm.nop(2);
      e = ref_cmp(opc, tr, op);
      u_bfm.get(ID_RCM1, 1 - b, v);
      checks++;
      if (guard !== e) begin
        failures++;
        $display("FAIL guard op%0d tr=%h op=%h", opc, tr, op);
      end
      check($sformatf("op%0d tr=%h op=%h", opc, tr, op), v, data_t'(e));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
