// tb_network_controller: self-checking test of the network controller.
// The controller alone drives the buses (its source/destination addresses and
// its immediate data). Random programs of 256 words are loaded through the
// load port: random moves on both buses, random guard expressions and
// immediate bits, and on bus 0 absolute, forward-relative and
// backward-relative jumps. The guard lines change randomly every cycle. An
// instruction-level model of the controller, written from its timing rules,
// predicts for every cycle which source/destination pair each bus carries
// and what the immediate data line holds one cycle later:
//   * word 0 is fetched on the first clock edge with run high and is on the
//     buses one cycle later; then one word a cycle,
//   * a subinstruction whose guard is false puts no move on its bus,
//   * an immediate drives the zero-extended source field in the next cycle,
//   * a taken jump leaves four cycles without moves before its target
//     (three counted as stall cycles), relative jumps count from the word
//     after the jump,
//   * at the end of memory the controller halts.
// The jump and stall counters are compared as well.
module tb_network_controller;
  import taco_pkg::*;
  localparam int WIN = 700;       // cycles compared per run
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic               pm_we = 1'b0, run = 1'b0;
  logic [PCWIDTH-1:0] pm_addr = '0;
  instr_t             pm_data = '0;
  logic [GUARDCNT-1:0] guards = '0;
  addr_t [BUSES-1:0]  src, dst;
  data_t [BUSES-1:0]  drv;
  logic  [BUSES-1:0]  drv_en;
  bus_t  [BUSES-1:0]  bus;
  pc_t                pc;
  logic               halted;
  logic [31:0]        cycles, jumps, stalls;
  int checks = 0, failures = 0;
  int jumps_seen = 0, squashed_seen = 0, imm_seen = 0;

  always_comb
    for (int b = 0; b < BUSES; b++) bus[b] = '{src: src[b], dst: dst[b], data: drv[b]};

  network_controller dut (
    .clk, .rst_n, .pm_we_i(pm_we), .pm_addr_i(pm_addr), .pm_data_i(pm_data), .run_i(run),
    .guards_i(guards), .bus_i(bus), .src_o(src), .dst_o(dst), .drv_o(drv), .drv_en_o(drv_en),
    .pc_o(pc), .halted_o(halted), .cycle_cnt_o(cycles), .jump_cnt_o(jumps), .stall_cnt_o(stalls));

  task automatic check(input string what, input data_t got, input data_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  instr_t prog [PROGRAMMEM];
  logic [GUARDCNT-1:0] gseq [WIN + 2];
  // expected per cycle and bus: source, destination, immediate data
  addr_t e_src [WIN + 2][BUSES];
  addr_t e_dst [WIN + 2][BUSES];
  data_t e_dat [WIN + 2][BUSES];
  int    e_jump_t [$];
  int    e_halt_t;

  function automatic guard_t rand_guard();
    int r;
    r = int'($urandom_range(0, 19));
    return (r < 14) ? guard_t'(r) : GUARD_ALWAYS;
  endfunction

  function automatic addr_t rand_dst();
    return ($urandom_range(0, 5) == 0) ? addr_t'(0) : addr_t'($urandom_range(1, 252));
  endfunction

  // random program; jumps only on bus 0, none in the last word
  task automatic make_program(input bit with_jumps);
    guard_t g0, g1;
    addr_t  s0, d0, s1, d1;
    logic [IMMCNT-1:0] imm;
    int r;
    for (int k = 0; k < PROGRAMMEM; k++) begin
      g0 = rand_guard();  g1 = rand_guard();
      s0 = addr_t'($urandom); s1 = addr_t'($urandom);
      d0 = rand_dst();    d1 = rand_dst();
      imm = IMMCNT'($urandom_range(0, 3));
      r = int'($urandom_range(0, 99));
      if (with_jumps && k < PROGRAMMEM - 1 && r < 8) begin
        imm[0] = 1'b1;
        case (r % 3)
          0: begin d0 = ID_TPC;        s0 = addr_t'($urandom_range(0, 255)); end
          1: begin d0 = ID_TPC + 8'd1; s0 = addr_t'($urandom_range(0, 40)); end
          default: begin
            d0 = ID_TPC + 8'd2;
            s0 = addr_t'($urandom_range(0, (k + 1 < 60) ? k + 1 : 60));
          end
        endcase
      end
      prog[k] = make_instr(g0, s0, d0, g1, s1, d1, imm);
    end
  endtask

  // instruction-level model of the controller
  task automatic model();
    int t, pc_m, stop;
    subinstr_t s;
    logic go;
    for (int n = 0; n < WIN + 2; n++)
      for (int b = 0; b < BUSES; b++) begin
        e_src[n][b] = '0; e_dst[n][b] = '0; e_dat[n][b] = '0;
      end
    e_jump_t.delete();
    e_halt_t = -1;
    t = 2;
    pc_m = 0;
    stop = 0;
    while (!stop && t <= WIN) begin
      int next_pc;
      bit jumped;
      next_pc = pc_m + 1;
      jumped  = 1'b0;
      for (int b = 0; b < BUSES; b++) begin
        s  = get_sub(prog[pc_m], b);
        go = eval_guard(s.guard, gseq[t - 1]);
        if (!go && s.dst != '0) squashed_seen++;
        if (go) begin
          e_dst[t][b] = s.dst;
          if (prog[pc_m][b]) e_dat[t + 1][b] = data_t'(s.src);
          else               e_src[t][b]     = s.src;
          if (s.dst >= ID_TPC && int'(s.dst) <= int'(ID_TPC) + 2) begin
            jumped = 1'b1;
            case (int'(s.dst) - int'(ID_TPC))
              0: next_pc = int'(s.src);
              1: next_pc = pc_m + 1 + int'(s.src);
              default: next_pc = pc_m + 1 - int'(s.src);
            endcase
          end
        end
      end
      if (jumped) begin
        e_jump_t.push_back(t);
        t = t + 5;
      end else begin
        t = t + 1;
      end
      pc_m = next_pc;
      if (pc_m >= PROGRAMMEM) begin
        stop = 1;
        // halted rises when the IR is empty and no jump is pending
        e_halt_t = jumped ? t - 1 : t;
      end
    end
  endtask

  task automatic run_once(input bit with_jumps);
    int exp_j, exp_s;
    make_program(with_jumps);
    for (int n = 0; n < WIN + 2; n++) gseq[n] = GUARDCNT'($urandom);
    // reset and load
    @(negedge clk);
    rst_n = 1'b0;
    run   = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < PROGRAMMEM; k++) begin
      pm_we   = 1'b1;
      pm_addr = PCWIDTH'(k);
      pm_data = prog[k];
      @(negedge clk);
    end
    pm_we = 1'b0;
    model();
    // run: cycle n is the one after the n-th rising edge with run high
    guards = gseq[0];
    run = 1'b1;
    for (int n = 1; n <= WIN; n++) begin
      @(negedge clk);
      guards = gseq[n];
      for (int b = 0; b < BUSES; b++) begin
        checks++;
        if (src[b] !== e_src[n][b] || dst[b] !== e_dst[n][b] || drv[b] !== e_dat[n][b]) begin
          failures++;
          if (failures < 10)
            $display("FAIL cycle %0d bus %0d: src %0d dst %0d data %h, expected %0d %0d %h",
                     n, b, src[b], dst[b], drv[b], e_src[n][b], e_dst[n][b], e_dat[n][b]);
        end
        if (e_dat[n][b] != '0) imm_seen++;
      end
      if (e_halt_t > 0 && n == e_halt_t - 1) check("not halted yet", data_t'(halted), 0);
      if (e_halt_t > 0 && n == e_halt_t)     check("halted", data_t'(halted), 1);
      if (n == WIN || (e_halt_t > 0 && n == e_halt_t)) begin
        exp_j = 0;
        exp_s = 0;
        foreach (e_jump_t[i]) if (e_jump_t[i] <= n) begin
          exp_j++;
          exp_s += (n - e_jump_t[i] >= 3) ? 3 : n - e_jump_t[i];
        end
        check("jump counter", jumps, data_t'(exp_j));
        check("stall counter", stalls, data_t'(exp_s));
        jumps_seen += exp_j;
        if (e_halt_t > 0) begin
          check("cycle counter at halt", cycles, data_t'(n));
          break;
        end
      end
    end
    run = 1'b0;
  endtask

  initial begin
    repeat (30 * (WIN + 2 * PROGRAMMEM)) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    run_once(1'b0);            // straight-line program: runs to the end and halts
    for (int r = 0; r < 12; r++) run_once(1'b1);
    checks++;
    if (jumps_seen == 0 || squashed_seen == 0 || imm_seen == 0) begin
      failures++;
      $display("FAIL a mechanism was not exercised: jumps %0d squashed %0d immediates %0d",
               jumps_seen, squashed_seen, imm_seen);
    end
    $display("jumps %0d, squashed moves %0d, immediates %0d", jumps_seen, squashed_seen, imm_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
