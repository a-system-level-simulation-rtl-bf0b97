// trig_socket: trigger socket of a functional unit. It works like an input
// socket but owns NIDS consecutive addresses BASE_ID .. BASE_ID+NIDS-1, one per
// operation of the FU.
//
// Edge 1: the socket sees one of its addresses on a destination line and
// remembers the bus and the operation code (address - BASE_ID).
// Edge 2: it loads the trigger register (fu_data_o) from that bus's data line,
// the operation code register (opcode_o), and raises trig_o for exactly one
// cycle; the FU executes its operation at the next edge (edge 3).
// If several buses select the socket in one cycle the highest-numbered bus wins.
// Registers reset to zero (asynchronous, active-low reset).
module trig_socket
  import taco_pkg::*;
#(
  parameter addr_t BASE_ID = 8'd3,
  parameter int    NIDS    = 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_t [BUSES-1:0]     bus_i,
  output data_t                fu_data_o,
  output opcode_t              opcode_o,
  output logic                 trig_o
);
  logic                      sched_q;
  logic [$clog2(BUSES)-1:0]  sel_q;
  opcode_t                   op_q;
  logic                      hit;
  logic [$clog2(BUSES)-1:0]  hit_bus;
  opcode_t                   hit_op;

  always_comb begin
    hit     = 1'b0;
    hit_bus = '0;
    hit_op  = '0;
    for (int b = 0; b < BUSES; b++) begin
      for (int k = 0; k < NIDS; k++) begin
        if (bus_i[b].dst == addr_t'(int'(BASE_ID) + k)) begin
          hit     = 1'b1;
          hit_bus = b[$clog2(BUSES)-1:0];
          hit_op  = opcode_t'(k);
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sched_q   <= 1'b0;
      sel_q     <= '0;
      op_q      <= '0;
      fu_data_o <= '0;
      opcode_o  <= '0;
      trig_o    <= 1'b0;
    end else begin
      trig_o <= sched_q;
      if (sched_q) begin
        fu_data_o <= bus_i[sel_q].data;
        opcode_o  <= op_q;
      end
      sched_q <= hit;
      if (hit) begin
        sel_q <= hit_bus;
        op_q  <= hit_op;
      end
    end
  end

  initial begin
    assert (BASE_ID != '0) else $error("trig_socket: address 0 is reserved for 'no move'");
    assert (NIDS >= 1 && NIDS <= MAXTRIGGERIDS) else $error("trig_socket: 1..8 operations");
  end
endmodule
