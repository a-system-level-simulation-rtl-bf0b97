// fu_input: input functional unit (IN1 of the validation processor), the
// receive side of the processor's network interface.
//
// Receiving (runs by itself): when the network raises net_trigger_i with a
// PDU length in words on net_length_i, the queue is not full and the data MMU
// has a free slot, the unit
//   1. raises dma_trigger_o; the data MMU claims a slot,
//   2. two cycles later (the data MMU registers the claim, then the base)
//      reads the slot base from dma_address_i and queues the descriptor
//      {base address, interface 0, length},
//   3. raises net_ack_o for exactly `length` cycles; the network presents one
//      word on net_data_i in each of them (a word is taken on every rising
//      edge with net_ack_o high) and the unit forwards it to the data MMU
//      (dma_valid_o / dma_data_o) one cycle later,
//   4. drops dma_trigger_o after the last word.
// A length of zero is ignored. The network must drop net_trigger_i with the
// last word.
// Program side: a trigger (any data) pops the oldest descriptor into the
// three result registers RIN1[0] = address, RIN1[1] = interface, RIN1[2] =
// length; with an empty queue all three become zero.
// Guards: empty_o (no descriptor waiting) and full_o.
// Because the descriptor is queued before the data arrive, the program can
// start on the header while the rest of the PDU is still being stored.
// The queue depth is this design's choice (the original gives 50 for the
// output FU only); so is the exact handshake.
module fu_input
  import taco_pkg::*;
#(
  parameter int    FIFO_DEPTH = 50,
  parameter addr_t ID_R       = ID_RIN1,
  parameter addr_t ID_TRG     = ID_TIN1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o,
  // network interface (receive)
  input  logic               net_trigger_i,
  input  data_t              net_length_i,
  input  data_t              net_data_i,
  output logic               net_ack_o,
  // data MMU
  output logic               dma_trigger_o,
  output logic               dma_valid_o,
  output data_t              dma_data_o,
  input  data_t              dma_address_i,
  input  logic               slot_avail_i,
  // guard lines
  output logic               empty_o,
  output logic               full_o
);
  typedef struct packed {
    data_t addr;
    data_t iface;
    data_t len;
  } desc_t;

  typedef enum logic [2:0] {S_IDLE, S_ALLOC, S_PUSH, S_STREAM, S_END} state_e;
  state_e state_q;

  logic  trig, push;
  desc_t head, din;
  data_t len_q, cnt_q;
  data_t res_q [3];
  data_t [2:0][BUSES-1:0] sdrv;
  logic  [2:0][BUSES-1:0] sen;

  trig_socket #(.BASE_ID(ID_TRG), .NIDS(1)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(), .opcode_o(), .trig_o(trig));
  for (genvar r = 0; r < 3; r++) begin : g_res
    out_socket #(.ID(addr_t'(int'(ID_R) + r))) u_r
      (.clk, .rst_n, .bus_i, .fu_data_i(res_q[r]), .drv_o(sdrv[r]), .drv_en_o(sen[r]));
  end
  assign drv_o    = sdrv[0] | sdrv[1] | sdrv[2];
  assign drv_en_o = sen[0] | sen[1] | sen[2];

  assign din  = '{addr: dma_address_i, iface: '0, len: len_q};
  assign push = (state_q == S_PUSH);

  sync_fifo #(.WIDTH($bits(desc_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push_i(push), .din_i(din), .pop_i(trig && !empty_o),
    .dout_o(head), .empty_o, .full_o, .count_o());

  // program side
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q <= '{default: '0};
    end else if (trig) begin
      if (!empty_o) res_q <= '{head.addr, head.iface, head.len};
      else          res_q <= '{default: '0};
    end
  end

  // receive state machine
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      len_q         <= '0;
      cnt_q         <= '0;
      net_ack_o     <= 1'b0;
      dma_trigger_o <= 1'b0;
      dma_valid_o   <= 1'b0;
      dma_data_o    <= '0;
    end else begin
      dma_valid_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (net_trigger_i && !full_o && slot_avail_i && net_length_i != '0) begin
            len_q         <= net_length_i;
            dma_trigger_o <= 1'b1;
            state_q       <= S_ALLOC;
          end
        end
        S_ALLOC: begin          // the data MMU claims a slot at this edge
          state_q <= S_PUSH;
        end
        S_PUSH: begin           // slot base valid now; descriptor is pushed
          net_ack_o <= 1'b1;
          cnt_q     <= '0;
          state_q   <= S_STREAM;
        end
        S_STREAM: begin         // one word per cycle
          dma_valid_o <= 1'b1;
          dma_data_o  <= net_data_i;
          cnt_q       <= cnt_q + 1'b1;
          if (cnt_q == len_q - 1'b1) begin
            net_ack_o <= 1'b0;
            state_q   <= S_END;
          end
        end
        S_END: begin            // last word is written by the data MMU now
          dma_trigger_o <= 1'b0;
          dma_data_o    <= '0;
          state_q       <= S_IDLE;
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
