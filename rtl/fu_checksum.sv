// fu_checksum: Internet checksum functional unit (CH1 of the validation
// processor), accumulating the 16-bit one's complement sum used by TCP.
//
// Sockets: operands OP and OD, result R and a trigger socket with two
// operations:
//   0 TRC (reset):     R = 0, accumulator = 0
//   1 TCC (calculate): the six 16-bit halves of ~OP, ~OD and ~TR are added to
//       the accumulator; the 32-bit sum is folded twice (low half + high half)
//       into the new accumulator, and R = ~accumulator (low 16 bits).
// One trigger thus consumes three 32-bit words (twelve bytes) of the data.
// Timing: R and the accumulator change on the edge after the trigger pulse.
// This arithmetic, including the complement of every input word, follows the
// original unit exactly.
module fu_checksum
  import taco_pkg::*;
#(
  parameter addr_t ID_OP  = ID_OPCH1,
  parameter addr_t ID_OD  = ID_ODCH1,
  parameter addr_t ID_R   = ID_RCH1,
  parameter addr_t ID_TRG = ID_TCH1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o
);
  data_t       op, od, tr, res_q;
  opcode_t     opc;
  logic        trig;
  logic [31:0] acc_q, sum, fold1, acc_n, nop, nod, ntr;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  in_socket  #(.ID(ID_OD)) u_od (.clk, .rst_n, .bus_i, .fu_data_o(od), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(2)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(opc), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(res_q), .drv_o, .drv_en_o);

  always_comb begin
    nop   = ~op[31:0];
    nod   = ~od[31:0];
    ntr   = ~tr[31:0];
    sum   = 32'(nop[31:16]) + 32'(nop[15:0]) + 32'(nod[31:16]) + 32'(nod[15:0])
          + 32'(ntr[31:16]) + 32'(ntr[15:0]) + acc_q;
    fold1 = 32'(sum[15:0]) + 32'(sum[31:16]);
    acc_n = 32'(fold1[15:0]) + 32'(fold1[31:16]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_q <= '0;
      acc_q <= '0;
    end else if (trig) begin
      if (opc == 3'd0) begin
        res_q <= '0;
        acc_q <= '0;
      end else if (opc == 3'd1) begin
        acc_q <= acc_n;
        res_q <= data_t'({16'h0, ~acc_n[15:0]});
      end
    end
  end
endmodule
