// taco_interconnect: the buses of the interconnection network.
//
// Each of the BUSES buses has a source address line, a destination address
// line (both driven by the network controller) and a data line. Any of NDRV
// drivers (output sockets and the controller's immediate path) may drive a data
// line; a driver that is not selected drives zero, so the data line is the OR
// of all drivers. A cycle in which two drivers are enabled on one bus is a
// program error: it is flagged on collision_o and reported by an assertion
// (as a warning, so that a simulation can go on and count such cycles).
// Purely combinational.
module taco_interconnect
  import taco_pkg::*;
#(
  parameter int NDRV = 2
) (
  input  addr_t [BUSES-1:0]             src_i,
  input  addr_t [BUSES-1:0]             dst_i,
  input  data_t [NDRV-1:0][BUSES-1:0]   drv_i,
  input  logic  [NDRV-1:0][BUSES-1:0]   drv_en_i,
  output bus_t  [BUSES-1:0]             bus_o,
  output logic  [BUSES-1:0]             collision_o
);
  always_comb begin
    for (int b = 0; b < BUSES; b++) begin
      data_t d;
      int    n;
      d = '0;
      n = 0;
      for (int k = 0; k < NDRV; k++) begin
        d = d | (drv_i[k][b] & {BUSWIDTH{drv_en_i[k][b]}});
        n = n + int'(drv_en_i[k][b]);
      end
      bus_o[b].src   = src_i[b];
      bus_o[b].dst   = dst_i[b];
      bus_o[b].data  = d;
      collision_o[b] = (n > 1);
    end
  end

  always_comb begin
    for (int b = 0; b < BUSES; b++)
      assert (!collision_o[b]) else $warning("taco_interconnect: two drivers on bus %0d", b);
  end
endmodule
