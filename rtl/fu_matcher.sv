// fu_matcher: matcher functional unit (MS1 of the validation processor), used
// for pattern matching in protocol header fields.
//
// Sockets: operand OP (mask), operand OD (pattern), result R and a single
// trigger socket. On a trigger with word TR:
//   match = ((TR & OP) == (OD & OP)),  R = match (1 or 0)
// The match bit also drives the unit's guard line (guard "a" of the network
// controller). Timing: R and the guard change on the edge after the trigger.
// The unit and its sockets are named by the processor's socket list; the
// masked-compare function is this design's choice.
module fu_matcher
  import taco_pkg::*;
#(
  parameter addr_t ID_OP  = ID_OPMS1,
  parameter addr_t ID_OD  = ID_ODMS1,
  parameter addr_t ID_R   = ID_RMS1,
  parameter addr_t ID_TRG = ID_TMS1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o,
  output logic               guard_o
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
    else if (trig) res_q <= data_t'((tr & op) == (od & op));
  end
  assign guard_o = res_q[0];
endmodule
