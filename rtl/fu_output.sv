// fu_output: output functional unit (OUT1 of the validation processor), the
// transmit side of the processor's network interface.
//
// Program side: operands OP (PDU start address in the data memory) and OD
// (length in words); a trigger with TR = interface number queues the
// descriptor {OP, TR, OD} unless OD is zero or the queue is full.
// Sending (runs by itself): the oldest descriptor is taken from the queue.
//   * Interface 4 or higher means "discard": the unit raises dma_trigger_o for
//     one cycle with the address, which makes the data MMU free the slot.
//   * Otherwise it raises dma_trigger_o and net_trigger_o with the address and
//     net_length_o, waits until both dma_ack_i and net_ack_i are high, then
//     sends one word per cycle: net_data_o with net_valid_o high for `length`
//     cycles, stepping the data MMU with dma_next_o. Afterwards both triggers
//     drop (the data MMU frees the slot) and, after one idle cycle, the next
//     descriptor is taken.
// Guard: full_o (queue full).
// Queue depth 50 follows the original unit; the handshake details are this
// design's.
module fu_output
  import taco_pkg::*;
#(
  parameter int    FIFO_DEPTH = 50,
  parameter addr_t ID_OP      = ID_OPOUT1,
  parameter addr_t ID_OD      = ID_ODOUT1,
  parameter addr_t ID_TRG     = ID_TOUT1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  // network interface (transmit)
  output logic               net_trigger_o,
  output data_t              net_length_o,
  output data_t              net_data_o,
  output logic               net_valid_o,
  input  logic               net_ack_i,
  // data MMU
  output logic               dma_trigger_o,
  output data_t              dma_address_o,
  output logic               dma_next_o,
  input  logic               dma_ack_i,
  input  data_t              dma_data_i,
  // guard line
  output logic               full_o
);
  typedef struct packed {
    data_t addr;
    data_t iface;
    data_t len;
  } desc_t;

  typedef enum logic [2:0] {S_IDLE, S_DISCARD, S_WAIT, S_SEND, S_DONE, S_GAP} state_e;
  state_e state_q;

  data_t op, od, tr, len_q, cnt_q;
  logic  trig, empty, pop;
  desc_t head, din;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  in_socket  #(.ID(ID_OD)) u_od (.clk, .rst_n, .bus_i, .fu_data_o(od), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(1)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(), .trig_o(trig));

  assign pop = (state_q == S_IDLE) && !empty;
  assign din = '{addr: op, iface: tr, len: od};

  sync_fifo #(.WIDTH($bits(desc_t)), .DEPTH(FIFO_DEPTH)) u_fifo (
    .clk, .rst_n, .push_i(trig && !full_o && od != '0),
    .din_i(din), .pop_i(pop),
    .dout_o(head), .empty_o(empty), .full_o, .count_o());

  assign dma_next_o = (state_q == S_SEND);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q       <= S_IDLE;
      len_q         <= '0;
      cnt_q         <= '0;
      net_trigger_o <= 1'b0;
      net_length_o  <= '0;
      net_data_o    <= '0;
      net_valid_o   <= 1'b0;
      dma_trigger_o <= 1'b0;
      dma_address_o <= '0;
    end else begin
      net_valid_o <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (!empty) begin
            dma_trigger_o <= 1'b1;
            dma_address_o <= head.addr;
            len_q         <= head.len;
            cnt_q         <= '0;
            if (head.iface >= 32'd4) begin
              state_q <= S_DISCARD;
            end else begin
              net_trigger_o <= 1'b1;
              net_length_o  <= head.len;
              state_q       <= S_WAIT;
            end
          end
        end
        S_DISCARD: begin
          dma_trigger_o <= 1'b0;
          dma_address_o <= '0;
          state_q       <= S_GAP;
        end
        S_WAIT: begin
          if (dma_ack_i && net_ack_i) state_q <= S_SEND;
        end
        S_SEND: begin
          net_data_o  <= dma_data_i;
          net_valid_o <= 1'b1;
          cnt_q       <= cnt_q + 1'b1;
          if (cnt_q == len_q - 1'b1) state_q <= S_DONE;
        end
        S_DONE: begin
          dma_trigger_o <= 1'b0;
          net_trigger_o <= 1'b0;
          net_length_o  <= '0;
          dma_address_o <= '0;
          state_q       <= S_GAP;
        end
        S_GAP:   state_q <= S_IDLE;
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
