// fu_shifter: shifter functional unit (SH1 of the validation processor).
//
// Sockets: one operand input (shift amount, OP), one result output (R) and a
// trigger socket with three operation addresses. Moving a word into the
// trigger socket starts the operation on that word (TR):
//   opcode 0 (logical right shift): R = TR >> OP
//   opcode 1 (logical left shift):  R = TR << OP
//   opcode 2 (rotate left):         R = TR rotated left by OP mod 32
// Shift amounts of 32 or more give zero for the two shifts.
// Timing: the result register is written on the clock edge after the trigger
// pulse, i.e. three edges after the move's addresses appeared on a bus.
// The unit's name and its three operation mnemonics come from the processor's
// socket list; the exact meaning of each operation is this design's reading of
// those mnemonics.
module fu_shifter
  import taco_pkg::*;
#(
  parameter addr_t ID_OP  = ID_OPSH1,
  parameter addr_t ID_R   = ID_RSH1,
  parameter addr_t ID_TRG = ID_TSH1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o
);
  data_t   op, tr, res_q;
  opcode_t opc;
  logic    trig;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(3)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(opc), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(res_q), .drv_o, .drv_en_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else if (trig) begin
      unique case (opc)
        3'd0:    res_q <= tr >> op;
        3'd1:    res_q <= tr << op;
        3'd2:    res_q <= (tr << op[4:0]) | (tr >> (6'd32 - {1'b0, op[4:0]}));
        default: res_q <= res_q;
      endcase
    end
  end
endmodule
