// fu_mmu: memory management unit functional unit (UMMU1, the user memory of
// the validation processor). It holds 32-bit constants that are too wide for
// the 8-bit immediates of the instruction word.
//
// Sockets: operand OP (base address), operand OD (write data), result R and a
// trigger socket with two operations; TR is the offset:
//   0 TRMM (read):  R = mem[OP + TR]
//   1 TWMM (write): mem[OP + TR] = OD
// Timing: the operation takes one extra cycle, as in the original unit: the
// address is registered on the edge after the trigger pulse and the read
// result (or the write) happens on the edge after that.
// An address at or beyond WORDS is a program error: it is flagged by an
// assertion, a read then returns zero and a write is dropped.
// Words 0..5 start with the constants of the original unit (0, 0xFFFFFFFF, 2,
// 375, 1460, 375); the rest start at zero. The memory size is this design's
// choice; the original leaves it to the instance.
module fu_mmu
  import taco_pkg::*;
#(
  parameter int    WORDS  = 16,
  parameter addr_t ID_OP  = ID_OPUMMU1,
  parameter addr_t ID_OD  = ID_ODUMMU1,
  parameter addr_t ID_R   = ID_RUMMU1,
  parameter addr_t ID_TRG = ID_TUMMU1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  bus_t  [BUSES-1:0]  bus_i,
  output data_t [BUSES-1:0]  drv_o,
  output logic  [BUSES-1:0]  drv_en_o
);
  localparam int AW = $clog2(WORDS);
  data_t   op, od, tr, res_q, wdata_q;
  opcode_t opc;
  logic    trig, pend_q, wr_q, inrange_q;
  logic [AW-1:0] addr_q;
  data_t   mem [WORDS];
  data_t   full_addr;

  in_socket  #(.ID(ID_OP)) u_op (.clk, .rst_n, .bus_i, .fu_data_o(op), .loaded_o());
  in_socket  #(.ID(ID_OD)) u_od (.clk, .rst_n, .bus_i, .fu_data_o(od), .loaded_o());
  trig_socket #(.BASE_ID(ID_TRG), .NIDS(2)) u_trg
    (.clk, .rst_n, .bus_i, .fu_data_o(tr), .opcode_o(opc), .trig_o(trig));
  out_socket #(.ID(ID_R)) u_r (.clk, .rst_n, .bus_i, .fu_data_i(res_q), .drv_o, .drv_en_o);

  assign full_addr = op + tr;

  initial begin
    for (int i = 0; i < WORDS; i++) mem[i] = '0;
    mem[0] = 32'h0000_0000;
    mem[1] = 32'hFFFF_FFFF;
    mem[2] = 32'd2;
    mem[3] = 32'd375;
    mem[4] = 32'd1460;
    mem[5] = 32'd375;
  end

  // stage 1: register the request
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_q    <= 1'b0;
      wr_q      <= 1'b0;
      inrange_q <= 1'b0;
      addr_q    <= '0;
      wdata_q   <= '0;
    end else begin
      pend_q <= trig;
      if (trig) begin
        wr_q      <= (opc == 3'd1);
        inrange_q <= (full_addr < data_t'(WORDS));
        addr_q    <= full_addr[AW-1:0];
        wdata_q   <= od;
      end
    end
  end

  // stage 2: access the memory
  always_ff @(posedge clk) begin
    if (pend_q && wr_q && inrange_q) mem[addr_q] <= wdata_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) res_q <= '0;
    else if (pend_q && !wr_q) res_q <= inrange_q ? mem[addr_q] : '0;
  end

  a_in_range: assert property (@(posedge clk) disable iff (!rst_n) pend_q |-> inrange_q)
    else $error("fu_mmu: address out of range");
endmodule
