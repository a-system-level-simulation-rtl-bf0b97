// tb_fu_output: self-checking test of the output unit (transmit side).
// The program side (through the bus) queues descriptors {address, interface,
// length}; a data-memory model answers DMA requests (the word at address a
// reads as a function of a) and a network model accepts PDUs after a random
// delay. The test checks that each PDU reaches the network whole and in queue
// order, that interface numbers 4 and up discard the PDU (a one-cycle DMA
// trigger, nothing on the network), that a zero length is ignored, and, with a
// two-deep queue and a stalled network, that the full guard rises and a
// descriptor offered to a full queue is dropped.
module tb_fu_output;
  import taco_pkg::*;
  localparam int DEPTH = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  bus_t  [BUSES-1:0] bus;
  data_t [BUSES-1:0] drv;
  logic  net_trigger, net_valid, dma_trigger, dma_next, full;
  logic  net_ack = 1'b0, dma_ack = 1'b0;
  data_t net_length, net_data, dma_address, dma_data;
  int checks = 0, failures = 0;

  assign drv = '0;
  bus_bfm u_bfm (.clk, .dut_drv_i(drv), .bus_o(bus));
  fu_output #(.FIFO_DEPTH(DEPTH)) dut (
    .clk, .rst_n, .bus_i(bus),
    .net_trigger_o(net_trigger), .net_length_o(net_length), .net_data_o(net_data),
    .net_valid_o(net_valid), .net_ack_i(net_ack),
    .dma_trigger_o(dma_trigger), .dma_address_o(dma_address), .dma_next_o(dma_next),
    .dma_ack_i(dma_ack), .dma_data_i(dma_data), .full_o(full));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  function automatic data_t word_at(input data_t a);
    return (a * 32'h9E37_79B9) ^ 32'h5A5A_0000;
  endfunction

  // ---- data memory model ----
  logic  dma_trigger_d = 1'b0;
  data_t base = '0, cnt = '0;
  int    dma_requests = 0, discards = 0;
  assign dma_data = word_at(base + cnt);
  always @(posedge clk) begin
    dma_trigger_d <= dma_trigger;
    if (rst_n && dma_trigger && !dma_trigger_d) begin
      base    <= dma_address;
      cnt     <= '0;
      dma_ack <= 1'b1;
      dma_requests++;
    end else if (dma_trigger && dma_next) begin
      cnt <= cnt + 1;
    end else if (!dma_trigger && dma_trigger_d) begin
      dma_ack <= 1'b0;
    end
  end

  // ---- network model: accepts after a random delay, records words ----
  logic  stall = 1'b0;
  data_t rx [$];
  data_t rx_len [$];
  int    delay = 0;
  logic  net_trigger_d = 1'b0;
  always @(posedge clk) begin
    net_trigger_d <= net_trigger;
    if (rst_n && net_trigger && !net_trigger_d) begin
      rx_len.push_back(net_length);
      delay = int'($urandom_range(0, 4));
    end
    if (net_trigger && !stall) begin
      if (delay > 0) delay--;
      else net_ack <= 1'b1;
    end
    if (!net_trigger) net_ack <= 1'b0;
    if (rst_n && net_valid) rx.push_back(net_data);
  end

  // count one-cycle DMA triggers with no network transfer (discards)
  always @(posedge clk)
    if (rst_n && dma_trigger_d && !dma_trigger && !net_trigger_d) discards++;

  task automatic send(input data_t a, input data_t len, input data_t iface);
    u_bfm.cyc('0, ID_OPOUT1, a, '0, ID_ODOUT1, len);
    u_bfm.put(ID_TOUT1, iface, 0);
    u_bfm.nop(1);
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t exp_words [$];
    data_t exp_lens [$];
    int    exp_discards, nq;
    data_t a, len, f;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    exp_discards = 0;
    for (int n = 0; n < 40; n++) begin
      a   = data_t'($urandom_range(0, 3) * PDULENGTH);
      len = (n == 7) ? data_t'(PDULENGTH) : data_t'($urandom_range(1, 30));
      f   = data_t'($urandom_range(0, 5));
      if (n % 9 == 4) len = '0;              // ignored
      send(a, len, f);
      if (len != '0) begin
        if (f >= 4) exp_discards++;
        else begin
          exp_lens.push_back(len);
          for (int i = 0; i < int'(len); i++) exp_words.push_back(word_at(a + data_t'(i)));
        end
      end
      // wait until the unit has taken this descriptor and finished
      repeat (int'(len) + 12) @(negedge clk);
    end
    // full queue: stall the network, queue DEPTH + 2 descriptors
    stall = 1'b1;
    nq = 0;
    for (int n = 0; n < DEPTH + 2; n++) begin
      send(data_t'(n * PDULENGTH), 3, 0);
      repeat (3) @(negedge clk);
    end
    check("full guard with a stalled network", data_t'(full), 1);
    // one is being sent, DEPTH are queued, the last one was dropped
    for (int n = 0; n < DEPTH + 1; n++) begin
      exp_lens.push_back(3);
      for (int i = 0; i < 3; i++) exp_words.push_back(word_at(data_t'(n * PDULENGTH + i)));
    end
    stall = 1'b0;
    repeat (80) @(negedge clk);
    check("full guard cleared", data_t'(full), 0);
    check("PDUs sent", data_t'(rx_len.size()), data_t'(exp_lens.size()));
    for (int i = 0; i < rx_len.size() && i < exp_lens.size(); i++)
      check($sformatf("length of PDU %0d", i), rx_len[i], exp_lens[i]);
    check("words sent", data_t'(rx.size()), data_t'(exp_words.size()));
    for (int i = 0; i < rx.size() && i < exp_words.size(); i++)
      check($sformatf("word %0d", i), rx[i], exp_words[i]);
    check("discards", data_t'(discards), data_t'(exp_discards));
    checks++;
    if (exp_discards == 0) begin
      failures++;
      $display("FAIL no discard was exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
