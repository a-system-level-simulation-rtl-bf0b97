// fu_masker: masker functional unit (M1 of the validation processor).
//
// Sockets: operand OP (the mask), operand OD (replacement bits), result R and
// a single-operation trigger socket. On a trigger with word TR:
//   R = (TR & ~OP) | (OD & OP)
// i.e. the bits selected by the mask are replaced by those of OD and the rest
// of TR passes unchanged; with OD = 0 this clears a header field.
// Timing: R is written on the edge after the trigger pulse.
// The unit and its sockets are named by the processor's socket list; the
// masking function itself is this design's choice.
module fu_masker
  import taco_pkg::*;
#(
  parameter addr_t ID_OP  = ID_OPM1,
  parameter addr_t ID_OD  = ID_ODM1,
  parameter addr_t ID_R   = ID_RM1,
  parameter addr_t ID_TRG = ID_TM1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o
);
  data_t op, od, tr, res_q;
  logic  trig;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  in_socket  #(.ID(ID_OD)) u_od (.clk, .rst_n, .bus_i, .fu_data_o(od), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(1)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(res_q), .drv_o, .drv_en_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else if (trig) res_q <= (tr & ~op) | (od & op);
  end
endmodule
