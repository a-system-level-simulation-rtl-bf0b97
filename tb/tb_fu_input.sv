// tb_fu_input: self-checking test of the input unit (receive side).
// A network model offers PDUs of random length; a data-memory model answers the
// unit's DMA requests with slot base addresses and records the stored words.
// The test checks that every word reaches the memory in order, one per cycle,
// that the acknowledge is high for exactly `length` cycles, and that the
// program, triggering the unit through the bus, pops descriptors {address,
// interface 0, length} in arrival order, with zeros from an empty queue. The
// queue is made three deep here to show that a full queue, or a data memory
// with no free slot, holds the next PDU back until there is room.
module tb_fu_input;
  import taco_pkg::*;
  localparam int DEPTH = 3;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  [BUSES-1:0] drv_en;
  logic  net_trigger = 1'b0, slot_avail = 1'b1;
  data_t net_length = '0, net_data = '0, dma_address = '0;
  logic  net_ack, dma_trigger, dma_valid, empty, full;
  data_t dma_data;
  int checks = 0, failures = 0;

  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_input #(.FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .bus_i(bus), .drv_o(drv), .drv_en_o(drv_en),
    .net_trigger_i(net_trigger), .net_length_i(net_length), .net_data_i(net_data),
    .net_ack_o(net_ack), .dma_trigger_o(dma_trigger), .dma_valid_o(dma_valid),
    .dma_data_o(dma_data), .dma_address_i(dma_address), .slot_avail_i(slot_avail),
    .empty_o(empty), .full_o(full));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---- data memory model: a new base per PDU, records the stored words ----
  data_t stored [$];
  data_t bases [$];
  int    next_base = 0;
  logic  dma_trigger_d = 1'b0;
  always @(posedge clk) begin
    dma_trigger_d <= dma_trigger;
    if (rst_n && dma_trigger && !dma_trigger_d) begin
      dma_address <= data_t'(next_base);
      bases.push_back(data_t'(next_base));
      next_base = next_base + PDULENGTH;
    end
    if (rst_n && dma_trigger && dma_valid) stored.push_back(dma_data);
  end

  // ---- network model ----
  data_t sent [$];
  int    ack_cycles = 0;
  int    acks_while_blocked = 0;
  always @(posedge clk) if (rst_n && net_ack) ack_cycles++;

  task automatic send(input int len);
    int i;
    @(negedge clk);
    net_trigger = 1'b1;
    net_length  = data_t'(len);
    net_data    = $urandom;
    i = 0;
    while (i < len) begin
      if (net_ack) begin
        sent.push_back(net_data);
        i++;
        @(negedge clk);
        net_data = (i < len) ? data_t'($urandom) : '0;
      end else begin
        @(negedge clk);
      end
    end
    net_trigger = 1'b0;
    net_length  = '0;
  endtask

  task automatic pop(output data_t a, output data_t f, output data_t l);
    u_bfm.put(ID_TIN1, '0, 1);
    u_bfm.nop(2);
    u_bfm.cyc(ID_RIN1, '0, '0, ID_RIN1 + 8'd2, '0, '0);
    u_bfm.nop(1);
    a = bus[0].data;
    l = bus[1].data;
    u_bfm.get(ID_RIN1 + 8'd1, 0, f);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t a, f, l;
    int    lens [$];
    int    expect_acks;
    int    k;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check("empty guard after reset", data_t'(empty), 1);
    pop(a, f, l);
    check("pop from empty queue: address", a, '0);
    check("pop from empty queue: length", l, '0);
    expect_acks = 0;
    k = 0;
    for (int round = 0; round < 6; round++) begin
      // receive two or three PDUs, then pop them all
      int n;
      n = int'($urandom_range(2, 3));
      for (int p = 0; p < n; p++) begin
        int len;
        len = (round == 5 && p == 0) ? PDULENGTH : int'($urandom_range(1, 40));
        lens.push_back(len);
        expect_acks += len;
        send(len);
      end
      repeat (3) @(negedge clk);
      check("empty guard with PDUs queued", data_t'(empty), 0);
      for (int p = 0; p < n; p++) begin
        pop(a, f, l);
        check($sformatf("descriptor %0d address", k), a, bases[k]);
        check($sformatf("descriptor %0d interface", k), f, '0);
        check($sformatf("descriptor %0d length", k), l, data_t'(lens[k]));
        k++;
      end
      check("empty guard after popping", data_t'(empty), 1);
    end
    // a full queue holds the next PDU back
    for (int p = 0; p < DEPTH; p++) begin
      lens.push_back(5);
      expect_acks += 5;
      send(5);
    end
    repeat (2) @(negedge clk);
    check("full guard", data_t'(full), 1);
    lens.push_back(7);
    expect_acks += 7;
    fork
      send(7);
      begin
        repeat (20) begin
          @(negedge clk);
          if (net_ack) acks_while_blocked++;
        end
        check("no acknowledge while the queue is full", data_t'(acks_while_blocked), '0);
        pop(a, f, l);
        check("descriptor after full: length", l, data_t'(lens[k]));
        k++;
      end
    join
    // no free slot holds the next PDU back too
    slot_avail = 1'b0;
    for (int p = 0; p < DEPTH; p++) begin
      pop(a, f, l);
      check($sformatf("descriptor %0d length", k), l, data_t'(lens[k]));
      k++;
    end
    lens.push_back(4);
    expect_acks += 4;
    fork
      send(4);
      begin
        repeat (20) begin
          @(negedge clk);
          if (net_ack) acks_while_blocked++;
        end
        check("no acknowledge without a free slot", data_t'(acks_while_blocked), '0);
        slot_avail = 1'b1;
      end
    join
    repeat (3) @(negedge clk);
    pop(a, f, l);
    check("last descriptor length", l, data_t'(lens[k]));
    check("last descriptor address", a, bases[k]);
    // data path: every word, in order
    check("number of stored words", data_t'(stored.size()), data_t'(sent.size()));
    for (int i = 0; i < sent.size() && i < stored.size(); i++)
      check($sformatf("stored word %0d", i), stored[i], sent[i]);
    check("acknowledge cycles", data_t'(ack_cycles), data_t'(expect_acks));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
