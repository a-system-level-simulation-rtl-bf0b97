// tb_fu_mmu: self-checking test of the user memory unit (a small word memory
// with a base + offset address). It checks the initial table contents, then
// writes random words at random addresses (OP = base, trigger = offset, OD =
// data, opcode 1) and reads them back (opcode 0) four instructions after the
// trigger, against a model of the memory.
module tb_fu_mmu;
  import taco_pkg::*;
  localparam int WORDS = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_mmu dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  data_t model [WORDS];

  task automatic rd(input data_t base, input data_t off, input int b, output data_t v);
    u_bfm.cyc('0, ID_OPUMMU1, base, '0, ID_TUMMU1, off);
    u_bfm.nop(3);
    u_bfm.get(ID_RUMMU1, b, v);
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t v, base, off, d;
    int    a;
    for (int i = 0; i < WORDS; i++) model[i] = '0;
    model[1] = 32'hFFFF_FFFF;
    model[2] = 32'd2;
    model[3] = 32'd375;
    model[4] = 32'd1460;
    model[5] = 32'd375;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < WORDS; i++) begin
      rd('0, data_t'(i), i % 2, v);
      check($sformatf("initial word %0d", i), v, model[i]);
    end
    for (int n = 0; n < 300; n++) begin
      a    = int'($urandom_range(0, WORDS - 1));
      base = data_t'($urandom_range(0, a));
      off  = data_t'(a) - base;
      if ($urandom_range(0, 1) == 1) begin
        d = $urandom;
        u_bfm.put(ID_OPUMMU1, base, 0);
        u_bfm.cyc('0, ID_ODUMMU1, d, '0, ID_TUMMU1 + 8'd1, off);
        u_bfm.nop(1);
        model[a] = d;
      end else begin
        rd(base, off, n % 2, v);
        check($sformatf("read word %0d", a), v, model[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
