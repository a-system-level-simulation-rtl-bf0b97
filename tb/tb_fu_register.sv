// tb_fu_register: self-checking test of a general purpose register. Random
// values are written through the trigger socket and read back through the
// result socket on either bus; a register is also read in the same
// instruction as its new value is written and must still give the old value,
// as the write lands two cycles after the move is issued.
module tb_fu_register;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_register dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en));

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
    data_t m, v, w;
    int    b;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    m = '0;
    u_bfm.get(ID_RR1, 0, v);
    check("reset value", v, '0);
    for (int n = 0; n < 300; n++) begin
      w = $urandom;
      b = int'($urandom_range(0, 1));
      if (n % 3 == 0) begin
        // read old value on one bus while writing the new one on the other
        if (b == 0) u_bfm.cyc(ID_RR1, '0, '0, '0, ID_RR1 + 8'd1, w);
        else        u_bfm.cyc('0, ID_RR1 + 8'd1, w, ID_RR1, '0, '0);
        u_bfm.nop(1);
        check("read during write", bus[b].data, m);
        u_bfm.nop(1);
      end else begin
        u_bfm.put(ID_RR1 + 8'd1, w, b);
        u_bfm.nop(2);
      end
      m = w;
      u_bfm.get(ID_RR1, 1 - b, v);
      check("read back", v, m);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
