// in_socket: input socket joining the buses to one operand register of a
// functional unit (FU).
//
// On every rising clock edge the socket compares its own address ID with the
// destination address of every bus. On a match it remembers which bus carried
// it, and on the following edge it copies that bus's data line into the operand
// register (fu_data) and pulses `loaded` for one cycle. The one-cycle gap is the
// "decode" then "move" order of the processor pipeline: addresses are on the
// buses one cycle before the data. If several buses name the socket in the same
// cycle, the highest-numbered bus wins (the original model's loop order).
// The operand register resets to zero; reset is asynchronous, active low.
module in_socket
  import taco_pkg::*;
#(
  parameter addr_t ID = 8'd1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_t [BUSES-1:0]     bus_i,
  output data_t                fu_data_o,
  output logic                 loaded_o
);
  logic                      sched_q;
  logic [$clog2(BUSES)-1:0]  sel_q;
  logic                      hit;
  logic [$clog2(BUSES)-1:0]  hit_bus;

  always_comb begin
    hit     = 1'b0;
    hit_bus = '0;
    for (int b = 0; b < BUSES; b++) begin
      if (bus_i[b].dst == ID) begin
        hit     = 1'b1;
        hit_bus = b[$clog2(BUSES)-1:0];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sched_q   <= 1'b0;
      sel_q     <= '0;
      fu_data_o <= '0;
      loaded_o  <= 1'b0;
    end else begin
      loaded_o <= sched_q;
      if (sched_q) fu_data_o <= bus_i[sel_q].data;
      sched_q <= hit;
      if (hit) sel_q <= hit_bus;
    end
  end

  initial assert (ID != '0) else $error("in_socket: address 0 is reserved for 'no move'");
endmodule
