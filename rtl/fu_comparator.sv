// fu_comparator: comparator functional unit (CM1 of the validation processor).
//
// Sockets: operand input OP, result output R and a trigger socket with eight
// operation addresses. The trigger word TR is compared with OP or with zero:
//   0 EQ: TR == OP     1 LZ: TR < 0 (signed)   2 GZ: TR > 0 (signed)
//   3 EQZ: TR == 0     4 LEQ: TR <= OP         5 LT: TR < OP
//   6 GEQ: TR >= OP    7 GT: TR > OP           (4..7 unsigned)
// R becomes 1 or 0, and the same bit drives the unit's guard line (guard "b"
// of the network controller), so a later move can be made conditional on it.
// Timing: R and the guard change on the edge after the trigger pulse.
// The eight operation mnemonics come from the processor's socket list; their
// exact semantics (operand order, signedness of LZ/GZ) are this design's choice.
module fu_comparator
  import taco_pkg::*;
#(
  parameter addr_t ID_OP  = ID_OPCM1,
  parameter addr_t ID_R   = ID_RCM1,
  parameter addr_t ID_TRG = ID_TCM1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o,
  output logic               guard_o
);
  data_t   op, tr, res_q;
  opcode_t opc;
  logic    trig, c;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(8)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(opc), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(res_q), .drv_o, .drv_en_o);

  always_comb begin
    unique case (opc)
      3'd0: c = (tr == op);
      3'd1: c = tr[BUSWIDTH-1];
      3'd2: c = !tr[BUSWIDTH-1] && (tr != '0);
      3'd3: c = (tr == '0);
      3'd4: c = (tr <= op);
      3'd5: c = (tr <  op);
      3'd6: c = (tr >= op);
      3'd7: c = (tr >  op);
      default: c = 1'b0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else if (trig) res_q <= data_t'(c);
  end
  assign guard_o = res_q[0];
endmodule
