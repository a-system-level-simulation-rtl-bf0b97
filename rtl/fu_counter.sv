// fu_counter: counter functional unit (C1 of the validation processor).
//
// Sockets: result output R (the counter value) and a trigger socket with three
// operation addresses:
//   0 SC (set):       counter = TR
//   1 IC (increment): counter = counter + 1
//   2 DC (decrement): counter = counter - 1   (TR is ignored by IC and DC)
// guard_o is high while the counter is zero (for loop exits).
// Timing: the counter changes on the edge after the trigger pulse.
// The three mnemonics come from the processor's socket list; the step size of
// one and the zero guard are this design's choice.
module fu_counter
  import taco_pkg::*;
#(
  parameter addr_t ID_R   = ID_RC1,
  parameter addr_t ID_TRG = ID_TC1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o,
  output logic               guard_o
);
  data_t   tr, cnt_q;
  opcode_t opc;
  logic    trig;

  trig_socket #(.BASE_ID(ID_TRG), .NIDS(3)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(opc), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(cnt_q), .drv_o, .drv_en_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt_q <= '0;
    else if (trig) begin
      unique case (opc)
        3'd0:    cnt_q <= tr;
        3'd1:    cnt_q <= cnt_q + 1'b1;
        3'd2:    cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
    end
  end
  assign guard_o = (cnt_q == '0);
endmodule
