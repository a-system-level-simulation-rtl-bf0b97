// tb_taco_top: end-to-end test of the TACO protocol processor running an
// IPv6/TCP packet validation program, with every parameter at its default.
//
// The program (49 instruction words, loaded through the program port) waits
// for a received packet, pops its descriptor, checks the IP version (matcher,
// mask 0xF0000000), checks that the next header is TCP (matcher, mask 0xFF00),
// builds the pseudo-header word {payload length, 6} with the masker, runs the
// Internet checksum over the addresses and the whole TCP segment in a loop
// (counter + comparator + guarded backward jump, one word per iteration), adds
// the pseudo-header word and tests the result for zero. A valid packet is
// queued to the output unit on interface 0; an invalid one is queued with
// interface 4, which frees its memory slot without sending it.
//
// A network model sends random packets (valid ones and ones with a bad
// checksum, a bad version or a UDP next header), including a burst that
// fills all four packet slots and a full 1500-byte packet, and records what
// the processor transmits. Checked: every valid packet comes out whole and in
// order, no invalid one does, no bus ever has two drivers, the checksum loop
// takes exactly 13 cycles per word (9 instructions plus the 4-cycle jump
// bubble). Counted, and failed if never seen: taken jumps, jump stall cycles,
// guarded moves squashed and executed (both ways of every check), immediates,
// program reads of the packet memory while a packet is still being stored,
// receive back-pressure when no slot is free, forwards and discards.
module tb_taco_top;
  import taco_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                pm_we = 1'b0, run = 1'b0;
  logic [PCWIDTH-1:0]  pm_addr = '0;
  instr_t              pm_data = '0;
  logic                halted;
  pc_t                 pc;
  logic [31:0]         cycles, jumps, stalls;
  logic [GUARDCNT-1:0] guards;
  bus_t [BUSES-1:0]    bus;
  logic [BUSES-1:0]    collision;
  logic                in_trigger = 1'b0, in_ack;
  data_t               in_length = '0, in_data = '0;
  logic                out_trigger, out_valid, out_ack = 1'b0;
  data_t               out_length, out_data;
  data_t               rli_op, rli_od, rli_tr, ic_op, ic_od, ic_tr;
  opcode_t             rli_opcode;
  logic                rli_trig, ic_trig;
  int checks = 0, failures = 0;

  taco_top dut (
    .clk, .rst_n, .pm_we_i(pm_we), .pm_addr_i(pm_addr), .pm_data_i(pm_data), .run_i(run),
    .halted_o(halted), .pc_o(pc), .cycle_cnt_o(cycles), .jump_cnt_o(jumps), .stall_cnt_o(stalls),
    .guards_o(guards), .bus_o(bus), .collision_o(collision),
    .net_in_trigger_i(in_trigger), .net_in_length_i(in_length), .net_in_data_i(in_data),
    .net_in_ack_o(in_ack),
    .net_out_trigger_o(out_trigger), .net_out_length_o(out_length), .net_out_data_o(out_data),
    .net_out_valid_o(out_valid), .net_out_ack_i(out_ack),
    .rli_op_o(rli_op), .rli_od_o(rli_od), .rli_tr_o(rli_tr), .rli_opcode_o(rli_opcode),
    .rli_trig_o(rli_trig), .rli_result_i('0),
    .ic_op_o(ic_op), .ic_od_o(ic_od), .ic_tr_o(ic_tr), .ic_trig_o(ic_trig), .ic_result_i('0));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------------------
  // validation program
  // ---------------------------------------------------------------------------
  localparam guard_t G_A = 9'd0, G_NA = 9'd1, G_B = 9'd2, G_NB = 9'd3, G_C = 9'd4, G_E = 9'd8;
  localparam guard_t GA  = GUARD_ALWAYS;
  localparam addr_t  TLRSH1 = ID_TSH1, TLLSH1 = ID_TSH1 + 8'd1;
  localparam addr_t  TEQZCM1 = ID_TCM1 + 8'd3, TLTCM1 = ID_TCM1 + 8'd5;
  localparam addr_t  TSC1 = ID_TC1, TIC1 = ID_TC1 + 8'd1;
  localparam addr_t  TRC1 = ID_TCH1, TCC1 = ID_TCH1 + 8'd1;
  localparam addr_t  TR1 = ID_RR1 + 8'd1, TR2 = ID_RR1 + 8'd3, TR3 = ID_RR1 + 8'd5, TR4 = ID_RR1 + 8'd7;
  localparam addr_t  RR1 = ID_RR1, RR2 = ID_RR1 + 8'd2, RR4 = ID_RR1 + 8'd6;
  localparam int     LOOP = 24, DISC = 45, FWD_WAIT = 41, NWORDS = 49;
  localparam int     TCC_PC = 28;

  instr_t prog [NWORDS];

  // one word: bus 0 and bus 1 moves, with per-bus immediate flags
  function automatic instr_t w(input guard_t g0, input addr_t s0, input addr_t d0, input bit i0,
                               input guard_t g1, input addr_t s1, input addr_t d1, input bit i1);
    return make_instr(g0, s0, d0, g1, s1, d1, {2'b00, i1, i0});
  endfunction

  localparam addr_t NONE = 8'd0;

  task automatic build_program();
    instr_t nop_w;
    nop_w = w(GA, NONE, NONE, 0, GA, NONE, NONE, 0);
    for (int k = 0; k < NWORDS; k++) prog[k] = nop_w;
    // wait for a received packet, then pop its descriptor
    prog[0]  = w(G_C, 8'd0, ID_TPC, 1,        GA, NONE, NONE, 0);
    prog[1]  = w(GA, 8'd0, ID_TIN1, 1,        GA, 8'd28, ID_OPSH1, 1);
    prog[2]  = w(GA, 8'd15, TLLSH1, 1,        GA, NONE, NONE, 0);         // 0xF0000000
    prog[3]  = w(GA, 8'd0, ID_OPUMMU1, 1,     GA, 8'd1, ID_TUMMU1, 1);    // read 0xFFFFFFFF
    prog[4]  = w(GA, ID_RIN1, TR1, 0,         GA, ID_RIN1 + 8'd2, TR2, 0); // R1 = address, R2 = words
    prog[5]  = w(GA, ID_RSH1, ID_OPMS1, 0,    GA, 8'd6, TLLSH1, 1);       // 0x60000000
    prog[6]  = w(GA, 8'd16, ID_OPSH1, 1,      GA, NONE, NONE, 0);
    prog[7]  = w(GA, RR1, ID_OPDMMU1, 0,      GA, 8'd0, ID_TDMMU1, 1);    // read word 0
    prog[8]  = w(GA, ID_RSH1, ID_ODMS1, 0,    GA, 8'd1, ID_TDMMU1, 1);    // read word 1
    prog[9]  = w(GA, ID_RUMMU1, TLRSH1, 0,    GA, NONE, NONE, 0);         // 0x0000FFFF
    prog[10] = w(GA, 8'd8, ID_OPSH1, 1,       GA, NONE, NONE, 0);
    prog[11] = w(GA, ID_RDMMU1, ID_TMS1, 0,   GA, NONE, NONE, 0);         // version check
    prog[12] = w(GA, ID_RDMMU1, TR3, 0,       GA, ID_RSH1, ID_OPM1, 0);
    prog[13] = w(GA, ID_RDMMU1, ID_TM1, 0,    GA, 8'd6, ID_ODM1, 1);      // {length, 6}
    prog[14] = w(GA, 8'd255, TLLSH1, 1,       GA, NONE, NONE, 0);         // 0x0000FF00
    prog[15] = w(G_NA, 8'(DISC), ID_TPC, 1,   GA, NONE, NONE, 0);
    prog[16] = w(GA, ID_RM1, TR4, 0,          GA, 8'd6, TLLSH1, 1);       // 0x00000600
    prog[17] = w(GA, ID_RSH1, ID_OPMS1, 0,    GA, NONE, NONE, 0);
    prog[19] = w(GA, ID_RSH1, ID_ODMS1, 0,    GA, ID_RDMMU1, ID_TMS1, 0); // next header check
    prog[20] = w(GA, 8'd0, ID_OPCH1, 1,       GA, 8'd0, ID_ODCH1, 1);
    prog[21] = w(GA, 8'd0, TRC1, 1,           GA, 8'd2, TSC1, 1);         // checksum := 0, i := 2
    prog[22] = w(GA, NONE, NONE, 0,           GA, RR2, ID_OPCM1, 0);
    prog[23] = w(G_NA, 8'(DISC), ID_TPC, 1,   GA, NONE, NONE, 0);
    // checksum loop over words 2 .. length-1
    prog[LOOP]   = w(GA, ID_RC1, ID_TDMMU1, 0, GA, 8'd0, TIC1, 1);
    prog[TCC_PC] = w(GA, ID_RDMMU1, TCC1, 0,   GA, ID_RC1, TLTCM1, 0);
    prog[32] = w(G_B, 8'(LOOP), ID_TPC, 1,    GA, NONE, NONE, 0);
    prog[33] = w(GA, RR4, TCC1, 0,            GA, NONE, NONE, 0);         // pseudo-header word
    prog[36] = w(GA, ID_RCH1, TEQZCM1, 0,     GA, NONE, NONE, 0);
    prog[40] = w(G_NB, 8'(DISC), ID_TPC, 1,   GA, NONE, NONE, 0);
    // forward on interface 0
    prog[FWD_WAIT] = w(G_E, 8'(FWD_WAIT), ID_TPC, 1, GA, NONE, NONE, 0);
    prog[42] = w(GA, RR1, ID_OPOUT1, 0,       GA, RR2, ID_ODOUT1, 0);
    prog[43] = w(GA, 8'd0, ID_TOUT1, 1,       GA, NONE, NONE, 0);
    prog[44] = w(GA, 8'd0, ID_TPC, 1,         GA, NONE, NONE, 0);
    // discard (interface 4)
    prog[DISC] = w(G_E, 8'(DISC), ID_TPC, 1,  GA, NONE, NONE, 0);
    prog[46] = w(GA, RR1, ID_OPOUT1, 0,       GA, RR2, ID_ODOUT1, 0);
    prog[47] = w(GA, 8'd4, ID_TOUT1, 1,       GA, NONE, NONE, 0);
    prog[48] = w(GA, 8'd0, ID_TPC, 1,         GA, NONE, NONE, 0);
  endtask

  // ---------------------------------------------------------------------------
  // packets
  // ---------------------------------------------------------------------------
  typedef enum int {P_VALID, P_BADSUM, P_BADVER, P_UDP} kind_e;

  function automatic logic [15:0] oc_add(input logic [15:0] a, input logic [15:0] b);
    logic [16:0] s;
    s = {1'b0, a} + {1'b0, b};
    return s[15:0] + 16'(s[16]);
  endfunction

  // 10 words of IPv6 header followed by the TCP segment; nseg segment words
  task automatic make_packet(input kind_e kind, input int nseg, output data_t p [$]);
    logic [15:0] s;
    int          plen;
    p.delete();
    plen = 4 * nseg;
    p.push_back({4'd6, 8'($urandom), 20'($urandom)});
    p.push_back({16'(plen), (kind == P_UDP) ? 8'd17 : 8'd6, 8'd64});
    for (int i = 0; i < 8; i++) p.push_back($urandom);        // addresses
    for (int i = 0; i < nseg; i++) p.push_back($urandom);     // TCP header + data
    p[14][31:16] = 16'h0;                                     // checksum field
    s = 16'h0;
    for (int i = 2; i < p.size(); i++) s = oc_add(oc_add(s, p[i][31:16]), p[i][15:0]);
    s = oc_add(oc_add(s, 16'(plen)), 16'd6);
    p[14][31:16] = ~s;
    if (kind == P_BADSUM) begin
      int k;
      k = 10 + int'($urandom_range(0, nseg - 1));
      p[k] = p[k] ^ (32'h0001_0000 << $urandom_range(0, 15));
    end
    if (kind == P_BADVER) p[0][31:28] = 4'd4;
  endtask

  // ---- receive side: the network offering packets ----
  data_t rx_queue [$][$];
  int    backpressure = 0, max_wait = 0;

  task automatic send_packet(input data_t p [$]);
    int i, waited;
    @(negedge clk);
    in_trigger = 1'b1;
    in_length  = data_t'(p.size());
    in_data    = p[0];
    i = 0;
    waited = 0;
    while (i < p.size()) begin
      if (in_ack) begin
        i++;
        @(negedge clk);
        in_data = (i < p.size()) ? p[i] : '0;
      end else begin
        if (i == 0) waited++;
        @(negedge clk);
      end
    end
    in_trigger = 1'b0;
    in_length  = '0;
    if (waited > max_wait) max_wait = waited;
    if (waited > 6) backpressure++;
  endtask

  // ---- transmit side: records PDUs ----
  data_t out_words [$];
  data_t out_lens [$];
  logic  out_trigger_d = 1'b0;
  always @(posedge clk) begin
    out_trigger_d <= out_trigger;
    if (rst_n && out_trigger && !out_trigger_d) out_lens.push_back(out_length);
    out_ack <= out_trigger && ($urandom_range(0, 2) != 0 || out_ack);
    if (rst_n && out_valid) out_words.push_back(out_data);
  end

  // ---- mechanism monitors ----
  int collisions = 0, overlap_reads = 0, imm_moves = 0, tcc_gap_bad = 0, tcc_gaps = 0;
  int last_tcc = -1, cyc = 0, cur_words = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (collision != '0) collisions++;
    for (int b = 0; b < BUSES; b++) begin
      if (bus[b].dst == ID_TDMMU1 && guards[G_DMAIN]) overlap_reads++;
      if (bus[b].dst != '0 && bus[b].src == '0) imm_moves++;
    end
    // the loop's checksum moves: bus 0 carries RDMMU1 -> TCC
    if (bus[0].src == ID_RDMMU1 && bus[0].dst == TCC1) begin
      if (last_tcc >= 0 && cyc - last_tcc < 40) begin
        tcc_gaps++;
        if (cyc - last_tcc != 13) tcc_gap_bad++;
      end
      last_tcc = cyc;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    data_t p [$];
    data_t expect_words [$];
    data_t expect_lens [$];
    int    n_valid, n_bad, nseg, idle;
    int    big_start, big_cycles;
    kind_e kind;
    kind_e kinds [$];
    int    segs [$];
    build_program();
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int k = 0; k < PROGRAMMEM; k++) begin
      pm_we   = 1'b1;
      pm_addr = PCWIDTH'(k);
      pm_data = (k < NWORDS) ? prog[k] : '0;
      @(negedge clk);
    end
    pm_we = 1'b0;
    run   = 1'b1;
    repeat (20) @(negedge clk);
    // packet list: spaced packets of every kind, a burst of six, one of 1500 bytes
    for (int n = 0; n < 8; n++) begin
      kinds.push_back((n < 4) ? kind_e'(n) : kind_e'($urandom_range(0, 3)));
      segs.push_back(int'($urandom_range(5, 30)));
    end
    for (int n = 0; n < 6; n++) begin
      kinds.push_back((n % 3 == 1) ? P_BADSUM : P_VALID);
      segs.push_back(int'($urandom_range(5, 12)));
    end
    kinds.push_back(P_VALID);
    segs.push_back(PDULENGTH - 10);
    n_valid = 0;
    n_bad   = 0;
    for (int n = 0; n < kinds.size(); n++) begin
      kind = kinds[n];
      make_packet(kind, segs[n], p);
      if (kind == P_VALID) begin
        n_valid++;
        expect_lens.push_back(data_t'(p.size()));
        foreach (p[i]) expect_words.push_back(p[i]);
      end else n_bad++;
      if (n == kinds.size() - 1) big_start = int'(cycles);
      send_packet(p);
      // spaced packets wait for the processor; the burst does not
      idle = (n < 8 || n == kinds.size() - 2) ? 20 * p.size() : 2;
      repeat (idle) @(negedge clk);
    end
    // let the last packet finish, then stop fetching
    big_cycles = 0;
    for (int t = 0; t < 16 * PDULENGTH && out_words.size() < expect_words.size(); t++) begin
      if (big_cycles == 0 && out_lens.size() == n_valid) big_cycles = int'(cycles) - big_start;
      @(negedge clk);
    end
    if (big_cycles == 0 && out_lens.size() == n_valid) big_cycles = int'(cycles) - big_start;
    repeat (20) @(negedge clk);
    run = 1'b0;
    repeat (6) @(negedge clk);

    check("packets forwarded", data_t'(out_lens.size()), data_t'(n_valid));
    for (int i = 0; i < out_lens.size() && i < expect_lens.size(); i++)
      check($sformatf("length of forwarded packet %0d", i), out_lens[i], expect_lens[i]);
    check("words forwarded", data_t'(out_words.size()), data_t'(expect_words.size()));
    for (int i = 0; i < out_words.size() && i < expect_words.size(); i++)
      check($sformatf("forwarded word %0d", i), out_words[i], expect_words[i]);
    check("bus collisions", data_t'(collisions), '0);
    check("checksum loop cycles per word off 13", data_t'(tcc_gap_bad), '0);
    check("stall cycles per jump", stalls, 3 * jumps);

    $display("mechanisms: jumps %0d, stall cycles %0d, immediates %0d, packet reads while storing %0d,",
             jumps, stalls, imm_moves, overlap_reads);
    $display("            receive back-pressure %0d (longest wait %0d cycles), forwarded %0d, discarded %0d,",
             backpressure, max_wait, n_valid, n_bad);
    $display("            checksum loop iterations %0d, cycles %0d", tcc_gaps, cycles);
    $display("1500-byte packet: %0d cycles from its first word arriving to its forwarding", big_cycles);
    checks++;
    if (jumps == 0 || stalls == 0 || imm_moves == 0 || overlap_reads == 0 || backpressure == 0 ||
        n_valid == 0 || n_bad == 0 || tcc_gaps == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
