// bus_bfm: testbench stand-in for the network controller of the TACO processor.
//
// It drives the source and destination address fields of every bus exactly as
// the controller does: a move issued with cyc() puts its addresses on the bus
// for one clock cycle (from a falling edge to the next), and an immediate value
// given with it appears on the data line in the following cycle, the "move"
// cycle, ORed with whatever the unit under test drives. This reproduces the
// processor timing: destination sockets latch the data line one cycle after
// they see their address, source sockets drive one cycle after they see theirs.
//
//   cyc(s0, d0, v0, s1, d1, v1)  one instruction: bus 0 moves s0 -> d0 and bus 1
//                                s1 -> d1; v0/v1 are immediate data (use s = 0)
//   nop(n)                       n instructions with no move
//   put(dst, val, b)             immediate move of val to dst on bus b
//   get(src, b, v)               read a result socket: move plus one cycle,
//                                returns the value seen on the data line
module bus_bfm
  import taco_pkg::*;
(
  input  logic                clk,
  input  data_t [BUSES-1:0]   dut_drv_i,
  output bus_t  [BUSES-1:0]   bus_o
);
  addr_t [BUSES-1:0] src_q, dst_q;
  data_t [BUSES-1:0] imm_q, imm_next;

  initial begin
    src_q    = '0;
    dst_q    = '0;
    imm_q    = '0;
    imm_next = '0;
  end

  always_comb begin
    for (int b = 0; b < BUSES; b++) begin
      bus_o[b].src  = src_q[b];
      bus_o[b].dst  = dst_q[b];
      bus_o[b].data = imm_q[b] | dut_drv_i[b];
    end
  end

  task automatic cyc(input addr_t s0, input addr_t d0, input data_t v0,
                     input addr_t s1, input addr_t d1, input data_t v1);
    @(negedge clk);
    imm_q       = imm_next;
    src_q[0]    = s0;
    dst_q[0]    = d0;
    src_q[1]    = s1;
    dst_q[1]    = d1;
    imm_next[0] = v0;
    imm_next[1] = v1;
    #1;
  endtask

  task automatic nop(input int n);
    for (int i = 0; i < n; i++) cyc('0, '0, '0, '0, '0, '0);
  endtask

  task automatic put(input addr_t dst, input data_t val, input int b);
    if (b == 0) cyc('0, dst, val, '0, '0, '0);
    else        cyc('0, '0, '0, '0, dst, val);
  endtask

  task automatic get(input addr_t src, input int b, output data_t v);
    if (b == 0) cyc(src, '0, '0, '0, '0, '0);
    else        cyc('0, '0, '0, src, '0, '0);
    nop(1);
    v = bus_o[b].data;
  endtask
endmodule
