// taco_top: a TACO protocol processor configured for IPv6/TCP packet
// validation: it checks the IPv6 header of each received packet, builds the
// TCP pseudo header, verifies the TCP checksum and forwards or discards the
// packet.
//
// The processor is a transport triggered architecture: a network controller
// issues one move per bus per cycle over two 32-bit buses, and the moves into
// trigger sockets start the functional units (FUs). The FUs of this instance:
//   SH1 shifter, CM1 comparator (guard b), C1 counter, M1 masker,
//   MS1 matcher (guard a), CH1 checksum, R1..R4 registers, UMMU1 user memory
//   (wide constants), DMMU1 data memory with DMA, IN1 input FU, OUT1 output FU.
// IN1 and OUT1 talk directly to DMMU1, which stores each packet in a 375-word
// slot while the program is already working on its first words.
// Two further units of the instance, RLI and IC, are present only as their
// sockets: their operand, trigger and operation code registers are brought out
// as ports and their result words come in as ports, so their function can be
// supplied from outside.
// Guard lines: 0 a = matcher, 1 b = comparator, 2 c = IN1 queue empty,
//   3 d = DMMU1 storing a packet, 4 e = OUT1 queue full, 5 IN1 queue full,
//   6 DMMU1 sending a packet, 7 counter zero, 8 unused.
// Interfaces: program load port and run/halt as in network_controller;
// receive port (net_in_*) as in fu_input; transmit port (net_out_*) as in
// fu_output. Socket addresses are those of taco_pkg.
module taco_top
  import taco_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  // program
  input  logic                 pm_we_i,
  input  logic [PCWIDTH-1:0]   pm_addr_i,
  input  instr_t               pm_data_i,
  input  logic                 run_i,
  output logic                 halted_o,
  output pc_t                  pc_o,
  output logic [31:0]          cycle_cnt_o,
  output logic [31:0]          jump_cnt_o,
  output logic [31:0]          stall_cnt_o,
  output logic [GUARDCNT-1:0]  guards_o,
  output bus_t  [BUSES-1:0]    bus_o,
  output logic  [BUSES-1:0]    collision_o,
  // network receive
  input  logic                 net_in_trigger_i,
  input  data_t                net_in_length_i,
  input  data_t                net_in_data_i,
  output logic                 net_in_ack_o,
  // network transmit
  output logic                 net_out_trigger_o,
  output data_t                net_out_length_o,
  output data_t                net_out_data_o,
  output logic                 net_out_valid_o,
  input  logic                 net_out_ack_i,
  // RLI unit, supplied from outside
  output data_t                rli_op_o,
  output data_t                rli_od_o,
  output data_t                rli_tr_o,
  output opcode_t              rli_opcode_o,
  output logic                 rli_trig_o,
  input  data_t                rli_result_i,
  // IC unit, supplied from outside
  output data_t                ic_op_o,
  output data_t                ic_od_o,
  output data_t                ic_tr_o,
  output logic                 ic_trig_o,
  input  data_t                ic_result_i
);
  localparam int NDRV = 16;

  bus_t  [BUSES-1:0]            bus;
  addr_t [BUSES-1:0]            src, dst;
  data_t [NDRV-1:0][BUSES-1:0]  drv;
  logic  [NDRV-1:0][BUSES-1:0]  drv_en;
  logic  [GUARDCNT-1:0]         guards;

  // DMMU <-> IN1 / OUT1
  logic  in_dma_trig, in_dma_valid, slot_avail;
  data_t in_dma_data, in_dma_addr;
  logic  out_dma_trig, out_dma_next, out_dma_ack;
  data_t out_dma_addr, out_dma_data;

  taco_interconnect #(.NDRV(NDRV)) u_net (
    .src_i(src), .dst_i(dst), .drv_i(drv), .drv_en_i(drv_en),
    .bus_o(bus), .collision_o);

  network_controller u_ctrl (
    .clk, .rst_n, .pm_we_i, .pm_addr_i, .pm_data_i, .run_i,
    .guards_i(guards), .bus_i(bus), .src_o(src), .dst_o(dst),
    .drv_o(drv[0]), .drv_en_o(drv_en[0]),
    .pc_o, .halted_o, .cycle_cnt_o, .jump_cnt_o, .stall_cnt_o);

  fu_shifter    u_sh1 (.clk, .rst_n, .bus_i(bus), .drv_o(drv[1]), .drv_en_o(drv_en[1]));
  fu_comparator u_cm1 (.clk, .rst_n, .bus_i(bus), .drv_o(drv[2]), .drv_en_o(drv_en[2]),
                       .guard_o(guards[G_CMP]));
  fu_counter    u_c1  (.clk, .rst_n, .bus_i(bus), .drv_o(drv[3]), .drv_en_o(drv_en[3]),
                       .guard_o(guards[G_CNTZERO]));
  fu_masker     u_m1  (.clk, .rst_n, .bus_i(bus), .drv_o(drv[4]), .drv_en_o(drv_en[4]));
  fu_matcher    u_ms1 (.clk, .rst_n, .bus_i(bus), .drv_o(drv[5]), .drv_en_o(drv_en[5]),
                       .guard_o(guards[G_MATCH]));
  fu_checksum   u_ch1 (.clk, .rst_n, .bus_i(bus), .drv_o(drv[6]), .drv_en_o(drv_en[6]));

  for (genvar r = 0; r < 4; r++) begin : g_reg
    fu_register #(.ID_R(addr_t'(int'(ID_RR1) + 2*r)), .ID_TRG(addr_t'(int'(ID_RR1) + 2*r + 1)))
      u_r (.clk, .rst_n, .bus_i(bus), .drv_o(drv[7+r]), .drv_en_o(drv_en[7+r]));
  end

  fu_mmu u_ummu1 (.clk, .rst_n, .bus_i(bus), .drv_o(drv[11]), .drv_en_o(drv_en[11]));

  fu_dmmu u_dmmu1 (
    .clk, .rst_n, .bus_i(bus), .drv_o(drv[12]), .drv_en_o(drv_en[12]),
    .in_trigger_i(in_dma_trig), .in_valid_i(in_dma_valid), .in_data_i(in_dma_data),
    .in_address_o(in_dma_addr), .slot_avail_o(slot_avail),
    .out_trigger_i(out_dma_trig), .out_address_i(out_dma_addr), .out_next_i(out_dma_next),
    .out_ack_o(out_dma_ack), .out_data_o(out_dma_data),
    .dma_in_busy_o(guards[G_DMAIN]), .dma_out_busy_o(guards[G_DMAOUT]));

  fu_input u_in1 (
    .clk, .rst_n, .bus_i(bus), .drv_o(drv[13]), .drv_en_o(drv_en[13]),
    .net_trigger_i(net_in_trigger_i), .net_length_i(net_in_length_i),
    .net_data_i(net_in_data_i), .net_ack_o(net_in_ack_o),
    .dma_trigger_o(in_dma_trig), .dma_valid_o(in_dma_valid), .dma_data_o(in_dma_data),
    .dma_address_i(in_dma_addr), .slot_avail_i(slot_avail),
    .empty_o(guards[G_INEMPTY]), .full_o(guards[G_INFULL]));

  fu_output u_out1 (
    .clk, .rst_n, .bus_i(bus),
    .net_trigger_o(net_out_trigger_o), .net_length_o(net_out_length_o),
    .net_data_o(net_out_data_o), .net_valid_o(net_out_valid_o), .net_ack_i(net_out_ack_i),
    .dma_trigger_o(out_dma_trig), .dma_address_o(out_dma_addr), .dma_next_o(out_dma_next),
    .dma_ack_i(out_dma_ack), .dma_data_i(out_dma_data),
    .full_o(guards[G_OUTFULL]));

  // RLI unit: sockets only
  in_socket  #(.ID(ID_OPRLI)) u_rli_op (.clk, .rst_n, .bus_i(bus), .fu_data_o(rli_op_o), .loaded_o());
  in_socket  #(.ID(ID_ODRLI)) u_rli_od (.clk, .rst_n, .bus_i(bus), .fu_data_o(rli_od_o), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRLI), .NIDS(8)) u_rli_t
    (.clk, .rst_n, .bus_i(bus), .fu_data_o(rli_tr_o), .opcode_o(rli_opcode_o), .trig_o(rli_trig_o));
  out_socket #(.ID(ID_RRLI)) u_rli_r
    (.clk, .rst_n, .bus_i(bus), .fu_data_i(rli_result_i), .drv_o(drv[14]), .drv_en_o(drv_en[14]));

  // IC unit: sockets only
  in_socket  #(.ID(ID_OPIC)) u_ic_op (.clk, .rst_n, .bus_i(bus), .fu_data_o(ic_op_o), .loaded_o());
  in_socket  #(.ID(ID_ODIC)) u_ic_od (.clk, .rst_n, .bus_i(bus), .fu_data_o(ic_od_o), .loaded_o());
  trig_socket #(.BASE_ID(ID_TIC), .NIDS(1)) u_ic_t
    (.clk, .rst_n, .bus_i(bus), .fu_data_o(ic_tr_o), .opcode_o(), .trig_o(ic_trig_o));
  out_socket #(.ID(ID_RIC)) u_ic_r
    (.clk, .rst_n, .bus_i(bus), .fu_data_i(ic_result_i), .drv_o(drv[15]), .drv_en_o(drv_en[15]));

  assign guards[G_SPARE] = 1'b0;
  assign guards_o = guards;
  assign bus_o    = bus;
endmodule
