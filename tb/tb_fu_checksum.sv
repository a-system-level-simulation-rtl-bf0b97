// tb_fu_checksum: self-checking test of the Internet checksum unit. Each case
// resets the accumulator (TRC), then feeds a random number of calculate moves
// (TCC), each with three 32-bit words on OP, OD and the trigger, and reads the
// result. The model adds the complemented 16-bit halves in ones' complement
// arithmetic; the unit returns the complement of that sum, so a block of data
// whose ones' complement sum is 0xFFFF (a correct checksum) reads back as 0.
// Every few cases the last word is chosen to make the sum correct.
module tb_fu_checksum;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  int checks = 0, failures = 0;
  int zero_results = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_checksum dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ones' complement addition of two 16-bit values
  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + 16'(s[16]);
  endfunction

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t       op, od, tr, v;
    logic [15:0] acc, plain;
    int          nw;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < 150; n++) begin
      u_bfm.put(ID_TCH1, '0, 0);   // TRC
      u_bfm.nop(2);
      u_bfm.get(ID_RCH1, 1, v);
      check("after reset", v, '0);
      acc   = '0;
      plain = '0;
      nw    = int'($urandom_range(1, 6));
      for (int w = 0; w < nw; w++) begin
        op = $urandom;
        od = $urandom;
        tr = $urandom;
        if (n % 3 == 0 && w == nw - 1) begin
          // make the plain ones' complement sum of all halves 0xFFFF
          plain = oc_add(plain, op[31:16]); plain = oc_add(plain, op[15:0]);
          plain = oc_add(plain, od[31:16]); plain = oc_add(plain, od[15:0]);
          plain = oc_add(plain, tr[31:16]);
          tr[15:0] = ~plain;
          plain = 16'hFFFF;
        end else begin
          plain = oc_add(plain, op[31:16]); plain = oc_add(plain, op[15:0]);
          plain = oc_add(plain, od[31:16]); plain = oc_add(plain, od[15:0]);
          plain = oc_add(plain, tr[31:16]); plain = oc_add(plain, tr[15:0]);
        end
        acc = oc_add(acc, ~op[31:16]); acc = oc_add(acc, ~op[15:0]);
        acc = oc_add(acc, ~od[31:16]); acc = oc_add(acc, ~od[15:0]);
        acc = oc_add(acc, ~tr[31:16]); acc = oc_add(acc, ~tr[15:0]);
        u_bfm.cyc('0, ID_OPCH1, op, '0, ID_ODCH1, od);
        u_bfm.put(ID_TCH1 + 8'd1, tr, w % 2);   // TCC
        u_bfm.nop(2);
      end
      u_bfm.get(ID_RCH1, n % 2, v);
      check($sformatf("checksum of %0d words", 3 * nw), v, {16'h0, ~acc});
      if (plain == 16'hFFFF) begin
        checks++;
        if (v != '0 && v != 32'hFFFF) begin
          failures++;
          $display("FAIL correct checksum not reported as zero: %h", v);
        end
        if (v == '0) zero_results++;
      end
    end
    checks++;
    if (zero_results == 0) begin
      failures++;
      $display("FAIL no correct-checksum case was produced");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
