// taco_pkg: shared constants, types and helper functions of the TACO protocol
// processor, a transport triggered architecture (TTA) in which the only
// instruction is a data move between two registers over a shared bus.
//
// The global sizes follow the original model's global definition file: 32-bit
// data buses, 8-bit socket addresses, two buses, 3-bit operation codes, nine
// guard lines, four immediate-enable bits, a 256-word program memory and a
// 9-bit program counter. The 54-bit instruction word is laid out as
//   [IMMCNT-1:0]                         immediate-enable bits, bit i for bus i
//   [IMMCNT + i*SUBINSTR +: SUBINSTR]    subinstruction of bus i
// and each 25-bit subinstruction as
//   [ADDRW-1:0] destination, [2*ADDRW-1:ADDRW] source (or immediate),
//   [SUBINSTR-1:2*ADDRW] guard expression number (all ones = unconditional).
//
// Socket addresses are those of the IPv6/TCP validation processor instance
// (address 0 is never a socket, so a zero address on a bus means "no move").
// The guard expression table (a, !a, ... !a.!b) follows the instance's guard
// list; which FU drives guard lines c, d and e is this design's own choice.
package taco_pkg;

  // ---- global sizes -------------------------------------------------------
  localparam int BUSWIDTH    = 32;
  localparam int ADDRW       = 8;
  localparam int BUSES       = 2;
  localparam int OPCODEWIDTH = 3;
  localparam int GUARDCNT    = 9;
  localparam int IMMCNT      = 4;
  localparam int PROGRAMMEM  = 256;
  localparam int PCWIDTH     = 9;
  localparam int MAXTRIGGERIDS = 8;
  localparam int SUBINSTR    = GUARDCNT + 2 * ADDRW;
  localparam int INSTRLENGTH = SUBINSTR * BUSES + IMMCNT;
  // one protocol data unit slot of the data memory, in 32-bit words (1500 B)
  localparam int PDULENGTH   = 375;

  typedef logic [BUSWIDTH-1:0]    data_t;
  typedef logic [ADDRW-1:0]       addr_t;
  typedef logic [OPCODEWIDTH-1:0] opcode_t;
  typedef logic [GUARDCNT-1:0]    guard_t;
  typedef logic [INSTRLENGTH-1:0] instr_t;
  typedef logic [PCWIDTH-1:0]     pc_t;

  // One bus of the interconnection network as every socket sees it.
  typedef struct packed {
    addr_t src;   // source socket address (driven by the network controller)
    addr_t dst;   // destination socket address
    data_t data;  // data line, OR of all enabled drivers
  } bus_t;

  // One decoded subinstruction.
  typedef struct packed {
    guard_t guard;
    addr_t  src;
    addr_t  dst;
  } subinstr_t;

  // ---- socket addresses of the validation processor ------------------------
  // network controller (program counter trigger socket, three operations)
  localparam addr_t ID_TPC     = 8'd253;  // pc = TR
  // shifter SH1
  localparam addr_t ID_OPSH1   = 8'd1;
  localparam addr_t ID_RSH1    = 8'd2;
  localparam addr_t ID_TSH1    = 8'd3;    // TLRSH1, TLLSH1, TLSH1 = 3..5
  // comparator CM1
  localparam addr_t ID_OPCM1   = 8'd6;
  localparam addr_t ID_RCM1    = 8'd7;
  localparam addr_t ID_TCM1    = 8'd8;    // TEQ..TGT = 8..15
  // counter C1
  localparam addr_t ID_RC1     = 8'd16;
  localparam addr_t ID_TC1     = 8'd17;   // TSC, TIC, TDC = 17..19
  // masker M1
  localparam addr_t ID_OPM1    = 8'd20;
  localparam addr_t ID_ODM1    = 8'd21;
  localparam addr_t ID_RM1     = 8'd22;
  localparam addr_t ID_TM1     = 8'd23;
  // matcher MS1
  localparam addr_t ID_OPMS1   = 8'd24;
  localparam addr_t ID_ODMS1   = 8'd25;
  localparam addr_t ID_RMS1    = 8'd26;
  localparam addr_t ID_TMS1    = 8'd27;
  // checksum CH1
  localparam addr_t ID_OPCH1   = 8'd28;
  localparam addr_t ID_ODCH1   = 8'd29;
  localparam addr_t ID_RCH1    = 8'd30;
  localparam addr_t ID_TCH1    = 8'd31;   // TRC, TCC = 31..32
  // RLI unit (sockets only; its function is supplied from outside)
  localparam addr_t ID_OPRLI   = 8'd33;
  localparam addr_t ID_ODRLI   = 8'd34;
  localparam addr_t ID_RRLI    = 8'd35;
  localparam addr_t ID_TRLI    = 8'd36;   // eight operations 36..43
  // IC unit (sockets only; its function is supplied from outside)
  localparam addr_t ID_OPIC    = 8'd44;
  localparam addr_t ID_ODIC    = 8'd45;
  localparam addr_t ID_RIC     = 8'd46;
  localparam addr_t ID_TIC     = 8'd47;
  // general purpose registers R1..R4: result at 48+2k, trigger at 49+2k
  localparam addr_t ID_RR1     = 8'd48;
  // user memory management unit UMMU1
  localparam addr_t ID_OPUMMU1 = 8'd56;
  localparam addr_t ID_ODUMMU1 = 8'd57;
  localparam addr_t ID_RUMMU1  = 8'd58;
  localparam addr_t ID_TUMMU1  = 8'd59;   // TRMM, TWMM = 59..60
  // data memory management unit DMMU1
  localparam addr_t ID_OPDMMU1 = 8'd61;
  localparam addr_t ID_ODDMMU1 = 8'd62;
  localparam addr_t ID_RDMMU1  = 8'd63;
  localparam addr_t ID_TDMMU1  = 8'd64;   // TRMM, TWMM = 64..65
  // input FU IN1: three result sockets and a trigger
  localparam addr_t ID_RIN1    = 8'd66;   // address, interface, length = 66..68
  localparam addr_t ID_TIN1    = 8'd69;
  // output FU OUT1
  localparam addr_t ID_OPOUT1  = 8'd70;
  localparam addr_t ID_ODOUT1  = 8'd71;
  localparam addr_t ID_TOUT1   = 8'd72;

  // ---- guard lines -----------------------------------------------------------
  localparam int G_MATCH   = 0;  // a: matcher MS1 result
  localparam int G_CMP     = 1;  // b: comparator CM1 result
  localparam int G_INEMPTY = 2;  // c: input FU holds no received PDU
  localparam int G_DMAIN   = 3;  // d: data MMU is storing an incoming PDU
  localparam int G_OUTFULL = 4;  // e: output FU queue is full
  localparam int G_INFULL  = 5;  // input FU queue is full
  localparam int G_DMAOUT  = 6;  // data MMU is sending a PDU
  localparam int G_CNTZERO = 7;  // counter C1 is zero
  localparam int G_SPARE   = 8;  // unused, tied low

  localparam guard_t GUARD_ALWAYS = '1;

  // Guard expression number -> value (numbering of the instance's guard list).
  function automatic logic eval_guard(input guard_t sel, input logic [GUARDCNT-1:0] g);
    logic a, b, c, d, e;
    a = g[G_MATCH];
    b = g[G_CMP];
    c = g[G_INEMPTY];
    d = g[G_DMAIN];
    e = g[G_OUTFULL];
    case (sel)
      9'd0:    return a;
      9'd1:    return !a;
      9'd2:    return b;
      9'd3:    return !b;
      9'd4:    return c;
      9'd5:    return !c;
      9'd6:    return d;
      9'd7:    return !d;
      9'd8:    return e;
      9'd9:    return !e;
      9'd10:   return a && b;
      9'd11:   return !a && b;
      9'd12:   return a && !b;
      9'd13:   return !a && !b;
      default: return 1'b1;
    endcase
  endfunction

  function automatic subinstr_t get_sub(input instr_t ins, input int i);
    return subinstr_t'(ins[IMMCNT + i*SUBINSTR +: SUBINSTR]);
  endfunction

  // Build an instruction word (used by testbenches and program generators).
  function automatic instr_t make_instr(input guard_t g0, input addr_t s0, input addr_t d0,
                                        input guard_t g1, input addr_t s1, input addr_t d1,
                                        input logic [IMMCNT-1:0] imm);
    instr_t w;
    w = '0;
    w[IMMCNT-1:0] = imm;
    w[IMMCNT +: SUBINSTR]            = {g0, s0, d0};
    w[IMMCNT + SUBINSTR +: SUBINSTR] = {g1, s1, d1};
    return w;
  endfunction

endpackage
