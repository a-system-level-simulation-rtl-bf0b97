// tb_fu_shifter: self-checking test of the shifter unit through its sockets.
// A bus stand-in issues moves with the processor's timing: operand (OP) and
// trigger (TLRSH/TLLSH/TLSH) moves with random data, then a read of the result
// socket three instructions after the trigger. Results are compared with a
// shift computed here. It also checks that operand and trigger may travel in
// the same instruction on different buses, and that the result socket drives
// nothing when it is not addressed.
module tb_fu_shifter;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_shifter dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic data_t ref_shift(input int opc, input data_t tr, input data_t op);
    data_t r;
    int    s;
    case (opc)
      0: r = (op >= 32) ? '0 : tr >> op;
      1: r = (op >= 32) ? '0 : tr << op;
      default: begin
        s = int'(op[4:0]);
        r = tr;
        for (int i = 0; i < s; i++) r = {r[30:0], r[31]};
      end
    endcase
    return r;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t op, tr, v;
    int    opc, b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 300; n++) begin
      opc = int'($urandom_range(0, 2));
      tr  = $urandom;
      op  = (n % 10 == 0) ? data_t'($urandom_range(32, 40)) : data_t'($urandom_range(0, 31));
      b   = int'($urandom_range(0, 1));
      if (n % 2 == 0) begin
        // operand then trigger, on a random bus
        u_bfm.put(ID_OPSH1, op, b);
        u_bfm.put(addr_t'(int'(ID_TSH1) + opc), tr, 1 - b);
      end else begin
        // operand and trigger in the same instruction
        if (b == 0) u_bfm.cyc('0, ID_OPSH1, op, '0, addr_t'(int'(ID_TSH1) + opc), tr);
        else        u_bfm.cyc('0, addr_t'(int'(ID_TSH1) + opc), tr, '0, ID_OPSH1, op);
      end
      u_bfm.nop(2);
      if (opc == 2 && op >= 32) continue;
      checks++;
      if (bus[0].data !== '0 || bus[1].data !== '0) begin
        failures++;
        $display("FAIL result socket drives while not addressed");
      end
      u_bfm.get(ID_RSH1, b, v);
      check($sformatf("op%0d tr=%h op=%h", opc, tr, op), v, ref_shift(opc, tr, op));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
