// tb_fu_dmmu: self-checking test of the data memory unit with its three paths.
//  1. Program path: random writes and reads through the bus sockets (read
//     result four instructions after the trigger), against a memory model.
//  2. DMA input: PDUs of random length are streamed in as the input unit does;
//     each must land in the lowest free 375-word slot, with the "storing"
//     guard high meanwhile. After four PDUs no slot is left.
//  3. DMA output: a stored PDU is streamed out word by word and compared; when
//     the trigger falls the slot is freed and is the next one claimed. A
//     one-cycle trigger frees a slot without sending.
// Memory contents read back through the program path are checked as well.
module tb_fu_dmmu;
  import taco_pkg::*;
  localparam int WORDS = 4 * PDULENGTH;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  logic  in_trigger = 1'b0, in_valid = 1'b0, out_trigger = 1'b0, out_next = 1'b0;
  data_t in_data = '0, out_address = '0;
  data_t in_address, out_data;
  logic  slot_avail, out_ack, in_busy, out_busy;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_dmmu dut (.clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en),
               .in_trigger_i(in_trigger), .in_valid_i(in_valid), .in_data_i(in_data),
               .in_address_o(in_address), .slot_avail_o(slot_avail),
               .out_trigger_i(out_trigger), .out_address_i(out_address), .out_next_i(out_next),
               .out_ack_o(out_ack), .out_data_o(out_data),
               .dma_in_busy_o(in_busy), .dma_out_busy_o(out_busy));

  data_t model [WORDS];
  int    slot_len [4];
  bit    written [WORDS];
  int    last_written [75];

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic prog_write(input int a, input data_t d);
    data_t base;
    base = data_t'($urandom_range(0, a));
    u_bfm.cyc('0, ID_OPDMMU1, base, '0, ID_ODDMMU1, d);
    u_bfm.put(ID_TDMMU1 + 8'd1, data_t'(a) - base, 1);
    u_bfm.nop(1);
    model[a] = d;
    written[a] = 1'b1;
  endtask

  task automatic prog_read(input int a, output data_t v);
    data_t base;
    base = data_t'($urandom_range(0, a));
    u_bfm.cyc('0, ID_OPDMMU1, base, '0, ID_TDMMU1, data_t'(a) - base);
    u_bfm.nop(3);
    u_bfm.get(ID_RDMMU1, a % 2, v);
  endtask

  // stream one PDU in; returns the slot base the unit chose
  task automatic dma_in(input int len, output data_t base);
    @(negedge clk);
    in_trigger = 1'b1;
    @(negedge clk);
    base = in_address;
    checks++;
    if (!in_busy) begin
      failures++;
      $display("FAIL storing guard low during DMA input");
    end
    for (int i = 0; i < len; i++) begin
      in_valid = 1'b1;
      in_data  = $urandom;
      model[int'(base) + i]   = in_data;
      written[int'(base) + i] = 1'b1;
      @(negedge clk);
    end
    in_valid   = 1'b0;
    in_trigger = 1'b0;
    @(negedge clk);
    checks++;
    if (in_busy) begin
      failures++;
      $display("FAIL storing guard still high after DMA input");
    end
  endtask

  // stream a PDU out from base and compare; full = 0 gives a one-cycle discard
  task automatic dma_out(input data_t base, input int len, input bit full);
    @(negedge clk);
    out_trigger = 1'b1;
    out_address = base;
    @(negedge clk);
    if (full) begin
      checks++;
      if (!out_ack || !out_busy) begin
        failures++;
        $display("FAIL no acknowledge on DMA output");
      end
      for (int i = 0; i < len; i++) begin
        check($sformatf("DMA out word %0d of slot %0d", i, base), out_data, model[int'(base) + i]);
        out_next = 1'b1;
        @(negedge clk);
        out_next = 1'b0;
        if ($urandom_range(0, 3) == 0) @(negedge clk);   // stall now and then
      end
    end
    out_trigger = 1'b0;
    @(negedge clk);
    checks++;
    if (out_ack || out_busy) begin
      failures++;
      $display("FAIL acknowledge still high after DMA output");
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t v, base;
    int    a, len;
    data_t bases [4];
    for (int i = 0; i < WORDS; i++) begin
      model[i]   = '0;
      written[i] = 1'b0;
    end
    // the memory starts undefined: clear it through the program path below
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    check("slot available after reset", data_t'(slot_avail), 1);
    // 1. program path
    for (int n = 0; n < 150; n++) begin
      a = int'($urandom_range(0, WORDS - 1));
      if (n < 75) begin
        prog_write(a, $urandom);
        last_written[n] = a;
      end
      else begin
        if (n % 2 == 0) a = last_written[$urandom_range(0, 74)];
        prog_read(a, v);
        if (written[a]) check($sformatf("program read %0d", a), v, model[a]);
      end
    end
    // 2. DMA input into all four slots
    for (int s = 0; s < 4; s++) begin
      len = (s == 3) ? PDULENGTH : int'($urandom_range(10, 60));
      slot_len[s] = len;
      dma_in(len, bases[s]);
      check($sformatf("slot base of PDU %0d", s), bases[s], data_t'(s * PDULENGTH));
    end
    check("no slot left after four PDUs", data_t'(slot_avail), 0);
    // program reads of stored words
    for (int n = 0; n < 20; n++) begin
      a = int'(bases[n % 4]) + int'($urandom_range(0, slot_len[n % 4] - 1));
      prog_read(a, v);
      check($sformatf("program read of PDU word %0d", a), v, model[a]);
    end
    // 3. DMA output of slot 1, discard of slot 2
    dma_out(bases[1], slot_len[1], 1'b1);
    check("slot free after sending", data_t'(slot_avail), 1);
    dma_in(20, base);
    check("freed slot is reused", base, data_t'(PDULENGTH));
    dma_out(bases[2], 0, 1'b0);
    dma_in(15, base);
    check("discarded slot is reused", base, data_t'(2 * PDULENGTH));
    dma_out(bases[3], slot_len[3], 1'b1);
    dma_out(bases[0], slot_len[0], 1'b1);
    dma_out(data_t'(PDULENGTH), 20, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
