// fu_dmmu: data memory management unit (DMMU1 of the validation processor).
// It stores received packets (protocol data units, PDUs) and serves them both
// to the program, through the normal MMU sockets, and to the input and output
// FUs, through two direct DMA paths.
//
// The memory of WORDS 32-bit words is divided into slots of PDULENGTH (375)
// words, one 1500-byte PDU each; a slot is "in use" from the moment the input
// FU starts storing a PDU into it until the output FU has sent or discarded it.
//
// Program side (same as fu_mmu; TR is the offset):
//   opcode 0 TRMM: R = mem[OP + TR]     opcode 1 TWMM: mem[OP + TR] = OD
//   with one extra cycle of latency after the trigger pulse.
// DMA input (from fu_input): a rising in_trigger_i claims the lowest free slot;
//   its base address is on in_address_o from the next cycle on. While
//   in_trigger_i stays high, every cycle with in_valid_i writes in_data_i to the
//   next word of the slot. slot_avail_o is high while a slot is free.
// DMA output (to fu_output): a rising out_trigger_i latches out_address_i as
//   the base and raises out_ack_o. While out_trigger_i stays high, out_data_o
//   shows the current word (combinational read) and out_next_i steps to the
//   next word. When out_trigger_i falls the slot holding the base is freed;
//   a one-cycle trigger therefore just discards the PDU.
// Guards: dma_in_busy_o (storing a PDU) and dma_out_busy_o (sending one).
// Memory writes: the DMA input and the program can both write in one cycle;
// the program's write wins if they hit the same word.
// The slot scheme, PDULENGTH and the three paths follow the original unit;
// the handshake details and the memory size (4 slots) are this design's.
module fu_dmmu
  import taco_pkg::*;
#(
  parameter int    WORDS  = 4 * PDULENGTH,
  parameter addr_t ID_OP  = ID_OPDMMU1,
  parameter addr_t ID_OD  = ID_ODDMMU1,
  parameter addr_t ID_R   = ID_RDMMU1,
  parameter addr_t ID_TRG = ID_TDMMU1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o,
  // DMA input from the input FU
  input  logic               in_trigger_i,
  input  logic               in_valid_i,
  input  data_t              in_data_i,
  output data_t              in_address_o,
  output logic               slot_avail_o,
  // DMA output to the output FU
  input  logic               out_trigger_i,
  input  data_t              out_address_i,
  input  logic               out_next_i,
  output logic               out_ack_o,
  output data_t              out_data_o,
  // guard lines
  output logic               dma_in_busy_o,
  output logic               dma_out_busy_o
);
  localparam int AW      = $clog2(WORDS);
  localparam int SLOTCNT = WORDS / PDULENGTH;

  data_t   op, od, tr, res_q, wdata_q;
  opcode_t opc;
  logic    trig, pend_q, wr_q, inrange_q;
  logic [AW-1:0] addr_q;
  data_t   mem [WORDS];
  data_t   full_addr;

  logic [SLOTCNT-1:0] used_q;
  logic               in_trig_d, out_trig_d;
  data_t              in_cnt_q, out_base_q, out_cnt_q;
  logic               free_found;
  int unsigned        free_slot;
  data_t              in_waddr, out_raddr;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  in_socket  #(.ID(ID_OD)) u_od (.clk, .rst_n, .bus_i, .fu_data_o(od), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(2)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(opc), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(res_q), .drv_o, .drv_en_o);

  assign full_addr = op + tr;

  // lowest free slot
  always_comb begin
    free_found = 1'b0;
    free_slot  = 0;
    for (int k = SLOTCNT - 1; k >= 0; k--) begin
      if (!used_q[k]) begin
        free_found = 1'b1;
        free_slot  = k;
      end
    end
  end
  assign slot_avail_o = free_found;

  assign in_waddr   = in_address_o + in_cnt_q;
  assign out_raddr  = out_base_q + out_cnt_q;
  assign out_data_o = (out_raddr < data_t'(WORDS)) ? mem[out_raddr[AW-1:0]] : '0;

  // program request stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q    <= 1'b0;
      wr_q      <= 1'b0;
      inrange_q <= 1'b0;
      addr_q    <= '0;
      wdata_q   <= '0;
      res_q     <= '0;
    end else begin
      pend_q <= trig;
      if (trig) begin
        wr_q      <= (opc == 3'd1);
        inrange_q <= (full_addr < data_t'(WORDS));
        addr_q    <= full_addr[AW-1:0];
        wdata_q   <= od;
      end
      if (pend_q && !wr_q) res_q <= inrange_q ? mem[addr_q] : '0;
    end
  end

  // memory writes: DMA input first, program write last (wins on a clash)
  always_ff @(posedge clk) begin
    if (dma_in_busy_o && in_trigger_i && in_valid_i && (in_waddr < data_t'(WORDS)))
      mem[in_waddr[AW-1:0]] <= in_data_i;
    if (pend_q && wr_q && inrange_q)
      mem[addr_q] <= wdata_q;
  end

  // DMA bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used_q         <= '0;
      in_trig_d      <= 1'b0;
      out_trig_d     <= 1'b0;
      in_address_o   <= '0;
      in_cnt_q       <= '0;
      dma_in_busy_o  <= 1'b0;
      out_base_q     <= '0;
      out_cnt_q      <= '0;
      out_ack_o      <= 1'b0;
      dma_out_busy_o <= 1'b0;
    end else begin
      in_trig_d  <= in_trigger_i;
      out_trig_d <= out_trigger_i;
      // input: claim a slot on the rising edge of the trigger
      if (in_trigger_i && !in_trig_d) begin
        if (free_found) begin
          used_q[free_slot] <= 1'b1;
          in_address_o      <= data_t'(free_slot * PDULENGTH);
          dma_in_busy_o     <= 1'b1;
        end
        in_cnt_q <= '0;
      end else if (dma_in_busy_o && in_trigger_i && in_valid_i) begin
        in_cnt_q <= in_cnt_q + 1'b1;
      end else if (!in_trigger_i) begin
        dma_in_busy_o <= 1'b0;
      end
      // output: latch the base on the rising edge, free the slot on the falling edge
      if (out_trigger_i && !out_trig_d) begin
        out_base_q     <= out_address_i;
        out_cnt_q      <= '0;
        out_ack_o      <= 1'b1;
        dma_out_busy_o <= 1'b1;
      end else if (out_trigger_i && out_next_i) begin
        out_cnt_q <= out_cnt_q + 1'b1;
      end else if (!out_trigger_i && out_trig_d) begin
        out_ack_o      <= 1'b0;
        dma_out_busy_o <= 1'b0;
        for (int k = 0; k < SLOTCNT; k++)
          if (out_base_q == data_t'(k * PDULENGTH)) used_q[k] <= 1'b0;
      end
    end
  end

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) pend_q |-> inrange_q)
    else $error("fu_dmmu: program address out of range");
  a_slot_free: assert property (@(posedge clk) disable iff (!rst_n)
                                (in_trigger_i && !in_trig_d) |-> free_found)
    else $error("fu_dmmu: PDU arrived with no free slot");
  a_pdu_fits: assert property (@(posedge clk) disable iff (!rst_n)
                               (dma_in_busy_o && in_trigger_i && in_valid_i) |-> (in_cnt_q < PDULENGTH))
    else $error("fu_dmmu: PDU longer than a slot");
endmodule
