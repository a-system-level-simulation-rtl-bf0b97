// network_controller: the interconnection network controller, the only
// control unit of the TTA processor. It owns the program memory and the
// program counter, evaluates guard expressions and dispatches one move per bus
// per cycle.
//
// Pipeline (one instruction word per cycle, four stages):
//   fetch   edge F:   IR = program[pc], pc = pc + 1
//   decode  edge F+1: for each bus i, the subinstruction's guard expression is
//                     evaluated on the guard lines; if true its source and
//                     destination addresses go onto bus i (else both are 0).
//                     Sockets compare the addresses during this cycle.
//   move    edge F+2: the selected output socket (or this controller, for an
//                     immediate) drives bus i's data line for one cycle.
//   execute edge F+3: input/trigger sockets take the data; a triggered FU
//                     computes and writes its result at edge F+4.
// Immediates: if bit i of the word's immediate field is set (buses 0..IMMCNT-1),
// the 8-bit source field of subinstruction i is zero-extended and driven on the
// data line of bus i in the move cycle instead of naming an output socket.
// Jumps: the program counter is a trigger socket of this controller with three
// operations at ID_TPC, ID_TPC+1, ID_TPC+2: pc = TR, pc = pc + TR, pc = pc - TR.
// When a move to one of them is dispatched, the word fetched behind it is
// dropped, pc is left pointing just past the jump word (so relative jumps count
// from there), and fetching pauses for three cycles while the move reaches the
// program counter; the first word of the target is fetched on the fourth edge.
// The other subinstructions of the jump word are still executed.
// Halting: when pc reaches PROGRAMMEM, fetching stops and halted_o rises.
// Running: the program is loaded through pm_we_i/pm_addr_i/pm_data_i while
// run_i is low; execution starts at address 0 when run_i rises and continues
// while run_i stays high. cycle_cnt_o counts the cycles run until halting,
// jump_cnt_o the jumps taken and stall_cnt_o the fetch cycles lost to them.
// The program memory array, the four-stage pipeline, the three-cycle jump
// wait, the immediate bits and the guard numbering follow the original model;
// the exact cycle alignment and the load port are this design's.
module network_controller
  import taco_pkg::*;
#(
  parameter int    PMEM   = PROGRAMMEM,
  parameter addr_t ID_PC  = ID_TPC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // program load port
  input  logic                 pm_we_i,
  input  logic [PCWIDTH-1:0]   pm_addr_i,
  input  instr_t               pm_data_i,
  input  logic                 run_i,
  // guard lines from the FUs
  input  logic [GUARDCNT-1:0]  guards_i,
  // interconnection network
  input  bus_t  [BUSES-1:0]    bus_i,
  output addr_t [BUSES-1:0]    src_o,
  output addr_t [BUSES-1:0]    dst_o,
  output data_t [BUSES-1:0]    drv_o,
  output logic  [BUSES-1:0]    drv_en_o,
  // status
  output pc_t                  pc_o,
  output logic                 halted_o,
  output logic [31:0]          cycle_cnt_o,
  output logic [31:0]          jump_cnt_o,
  output logic [31:0]          stall_cnt_o
);
  instr_t  pmem [PMEM];
  instr_t  ir_q;
  logic    ir_v_q;
  pc_t     pc_q;
  logic [1:0] wait_q;
  data_t   [BUSES-1:0] imm_q;
  logic    [BUSES-1:0] imm_v_q;

  // program counter trigger socket
  data_t   pc_tr;
  opcode_t pc_op;
  logic    pc_trig;
  trig_socket #(.BASE_ID(ID_PC), .NIDS(3)) u_pc
    (.clk, .rst_n, .bus_i, .fu_data_o(pc_tr), .opcode_o(pc_op), .trig_o(pc_trig));

  // decode of the word in IR
  logic      [BUSES-1:0] go;
  logic      jump_now;
  subinstr_t [BUSES-1:0] sub;
  always_comb begin
    jump_now = 1'b0;
    for (int b = 0; b < BUSES; b++) begin
      sub[b] = get_sub(ir_q, b);
      go[b]  = ir_v_q && eval_guard(sub[b].guard, guards_i);
      if (go[b] && sub[b].dst >= ID_PC && int'(sub[b].dst) <= int'(ID_PC) + 2)
        jump_now = 1'b1;
    end
  end

  logic fetch;
  assign fetch = run_i && !halted_o && (wait_q == 2'd0) && !jump_now && (int'(pc_q) < PMEM);

  always_ff @(posedge clk) begin
    if (pm_we_i && !run_i && int'(pm_addr_i) < PMEM) pmem[pm_addr_i[$clog2(PMEM)-1:0]] <= pm_data_i;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ir_q        <= '0;
      ir_v_q      <= 1'b0;
      pc_q        <= '0;
      wait_q      <= '0;
      halted_o    <= 1'b0;
      src_o       <= '0;
      dst_o       <= '0;
      imm_q       <= '0;
      imm_v_q     <= '0;
      drv_o       <= '0;
      drv_en_o    <= '0;
      cycle_cnt_o <= '0;
      jump_cnt_o  <= '0;
      stall_cnt_o <= '0;
    end else begin
      // move stage: immediates onto the data lines
      for (int b = 0; b < BUSES; b++) begin
        drv_o[b]    <= imm_v_q[b] ? imm_q[b] : '0;
        drv_en_o[b] <= imm_v_q[b];
      end
      // decode stage: addresses onto the buses
      for (int b = 0; b < BUSES; b++) begin
        if (go[b]) begin
          dst_o[b] <= sub[b].dst;
          if (b < IMMCNT && ir_q[b]) begin
            src_o[b]   <= '0;
            imm_q[b]   <= data_t'(sub[b].src);
            imm_v_q[b] <= 1'b1;
          end else begin
            src_o[b]   <= sub[b].src;
            imm_v_q[b] <= 1'b0;
          end
        end else begin
          src_o[b]   <= '0;
          dst_o[b]   <= '0;
          imm_v_q[b] <= 1'b0;
        end
      end
      // fetch stage
      if (fetch) begin
        ir_q   <= pmem[pc_q[$clog2(PMEM)-1:0]];
        ir_v_q <= 1'b1;
        pc_q   <= pc_q + 1'b1;
      end else begin
        ir_v_q <= 1'b0;
      end
      if (run_i && !halted_o && int'(pc_q) >= PMEM && wait_q == 2'd0 && !jump_now && !ir_v_q)
        halted_o <= 1'b1;
      // jumps
      if (jump_now) begin
        wait_q     <= 2'd3;
        jump_cnt_o <= jump_cnt_o + 1'b1;
      end else if (wait_q != 2'd0) begin
        wait_q      <= wait_q - 1'b1;
        stall_cnt_o <= stall_cnt_o + 1'b1;
      end
      if (pc_trig) begin
        unique case (pc_op)
          3'd0:    pc_q <= pc_t'(pc_tr);
          3'd1:    pc_q <= pc_q + pc_t'(pc_tr);
          3'd2:    pc_q <= pc_q - pc_t'(pc_tr);
          default: pc_q <= pc_q;
        endcase
      end
      if (run_i && !halted_o) cycle_cnt_o <= cycle_cnt_o + 1'b1;
    end
  end

  assign pc_o = pc_q;

  a_no_fetch_on_jump: assert property (@(posedge clk) disable iff (!rst_n) pc_trig |-> !fetch)
    else $error("network_controller: fetch while the program counter is updated");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n)
                                   (pc_trig && pc_op == 3'd2) |-> (data_t'(pc_q) >= pc_tr))
    else $error("network_controller: jump below address 0");
endmodule
