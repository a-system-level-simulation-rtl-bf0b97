// fu_register: general purpose register functional unit (R1..R4 of the
// validation processor), used to hold temporary results.
//
// Sockets: a trigger socket (the write port) and a result output socket (the
// read port). A word moved to the trigger address is stored on the edge after
// the trigger pulse and can be read back through the result address from then
// on. Reset clears the register.
module fu_register
  import taco_pkg::*;
#(
  parameter addr_t ID_R   = ID_RR1,
  parameter addr_t ID_TRG = ID_RR1 + 8'd1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o
);
  data_t tr, reg_q;
  logic  trig;

  trig_socket #(.BASE_ID(ID_TRG), .NIDS(1)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(reg_q), .drv_o, .drv_en_o);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) reg_q <= '0;
    else if (trig) reg_q <= tr;
  end
endmodule
