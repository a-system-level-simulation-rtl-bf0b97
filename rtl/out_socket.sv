// out_socket: output socket joining one result register of a functional unit
// to the data lines of the buses.
//
// On every rising clock edge the socket compares its address ID with the
// source address of every bus. For each bus that names it, the socket drives
// the result register (fu_data_i) onto that bus's data line during the next
// cycle (drv_en_o high, drv_o holding the value); otherwise it drives zero with
// the enable low. The buses are wired-OR in this design (see interconnect), so
// a socket that is not selected contributes zeros instead of the high
// impedance used in the original model. Reset (asynchronous, active low)
// releases all buses.
module out_socket
  import taco_pkg::*;
#(
  parameter addr_t ID = 8'd2
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bus_t  [BUSES-1:0]    bus_i,
  input  data_t                fu_data_i,
  output data_t [BUSES-1:0]    drv_o,
  output logic  [BUSES-1:0]    drv_en_o
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drv_o    <= '0;
      drv_en_o <= '0;
    end else begin
      for (int b = 0; b < BUSES; b++) begin
        if (bus_i[b].src == ID) begin
          drv_o[b]    <= fu_data_i;
          drv_en_o[b] <= 1'b1;
        end else begin
          drv_o[b]    <= '0;
          drv_en_o[b] <= 1'b0;
        end
      end
    end
  end

  initial assert (ID != '0) else $error("out_socket: address 0 is reserved for 'no move'");
endmodule
