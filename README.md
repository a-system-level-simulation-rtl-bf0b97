# TACO: a move-only protocol processor for IPv6/TCP validation

TACO is a processor built for one protocol-processing job. This instance checks
IPv6/TCP packets. It has a single instruction: *move a 32-bit word from one
register to another over a bus*. Each functional unit (FU) does one protocol
task: checksum, masking, pattern matching, comparison, counting, or memory
access. Writing a value into an FU's *trigger* register starts that FU's
operation. The program is therefore a schedule of data transports, and the
processor is a transport triggered architecture (TTA).

This instance has two 32-bit buses, so each instruction word holds two moves.
It receives packets from a network port into a packet memory by DMA, then:

1. checks the IPv6 header;
2. computes the TCP checksum over the pseudo header and the segment;
3. sends a correct packet out, or frees the memory of an invalid one without
   sending it.

Packet processing starts while the packet is still arriving.

All RTL is in `rtl/` and is synthesizable SystemVerilog. There is one
self-checking testbench per unit in `tb/`, plus one end-to-end testbench.

## Moves, sockets and buses

An FU has three kinds of registers, and each register is reached through a
*socket* that has its own 8-bit address:

| socket | register | does |
|---|---|---|
| input (operand) | `OP`, `OD` | takes the bus data when the bus destination equals its address |
| trigger | `TR` | same, and also pulses the FU's trigger. An FU with *n* operations has *n* consecutive addresses; the offset from the first one is the operation code |
| output (result) | `R` | drives its register onto the bus data line when the bus source equals its address |

Each bus carries a source address, a destination address and a data word
(`bus_t` in `taco_pkg`). The addresses come from the network controller. The
data line is the OR of all drivers, and an unselected driver outputs zero
(`taco_interconnect`). A program error that makes two sockets drive one bus is
shown on `collision_o` and reported by an assertion. Address 0 is never a
socket, so a zero address means "no move".

### Timing of one move

The pipeline has four stages: fetch, decode, move and execute. The following
timing is what a programmer must schedule around. It counts the
instruction *k* that issues a move into a trigger socket as step 0:

| step | what happens |
|---|---|
| decode (cycle after fetch) | the addresses are on the bus and the sockets compare them |
| move (next cycle) | the source socket or the immediate drives the data line |
| next edge | the destination socket latches the word, and the trigger pulses |
| next edge | the FU writes `R` |

Results:

- A plain FU's result can be moved out by instruction *k+3* or later.
- The two memory units (`UMMU1`, `DMMU1`) take one more cycle, so their
  results can be read by instruction *k+4* or later.
- A guard bit set by a compare in instruction *k* can be tested by instruction
  *k+4* or later.
- Operands must be moved in no later than the trigger move. Moving them in the
  same instruction word is fine.

Nothing interlocks. The programmer or compiler must respect these distances,
which is the usual TTA contract.

## Instruction word and guards

A 54-bit word is made of four immediate bits and two 25-bit subinstructions:

```
[53:29] bus 1: guard(9) src(8) dst(8)
[28:4]  bus 0: guard(9) src(8) dst(8)
[3:0]   immediate enables; bit i set -> src field of bus i is a constant
```

- An immediate is the 8-bit source field, zero-extended. Wider constants live
  in the user memory `UMMU1`, which starts holding 0, 0xFFFFFFFF, 2, 375, 1460
  and 375. The shifter can also build them.
- The guard field holds the number of a guard expression. If the expression is
  false, the subinstruction becomes a no-move. All ones means "always".
  `taco_pkg::make_instr` assembles a word.

The expressions use five guard lines, *a* to *e*:

| # | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| expr | a | !a | b | !b | c | !c | d | !d | e | !e | a&b | !a&b | a&!b | !a&!b |

Guard lines in this instance:

| line | name | meaning |
|---|---|---|
| 0 | a | matcher result |
| 1 | b | comparator result |
| 2 | c | input queue empty |
| 3 | d | packet memory storing a packet |
| 4 | e | output queue full |
| 5–7 | | input queue full, packet memory sending, counter zero. Visible on `guards_o` but not used by any expression |
| 8 | | spare |

To change what a guard means, edit `eval_guard` in `taco_pkg` and the
`guards` assignment in `taco_top`.

## The network controller and jumps

`network_controller` holds the 256 × 54-bit program memory and the program
counter. Each cycle it fetches one word, evaluates both guards and puts the
addresses and any immediates onto the buses. Programs are written through
`pm_we_i`, `pm_addr_i` and `pm_data_i` while `run_i` is low. Execution starts at
address 0 when `run_i` rises.

The program counter is itself a trigger socket with three operations:

| address | operation |
|---|---|
| 253 | `pc = TR` |
| 254 | `pc = pc + TR` |
| 255 | `pc = pc - TR` |

A jump therefore carries a guard like any other move, and a guarded jump is a
conditional branch. When a move to the program counter is issued:

- the word fetched behind it is dropped;
- fetching pauses for three cycles while the move goes through the pipeline;
- the target is fetched on the fourth cycle.

Every taken jump costs four cycles with no moves, and `stall_cnt_o` counts 3
per jump. Relative jumps count from the word after the jump. Execution halts
(`halted_o`) when the program counter runs past the end of the memory.
`cycle_cnt_o` and `jump_cnt_o` count cycles and jumps for profiling.

## Functional units and address map

| unit | module | sockets (address) | operations |
|---|---|---|---|
| SH1 shifter | `fu_shifter` | OP 1, R 2, TR 3–5 | TR >> OP, TR << OP, rotate left |
| CM1 comparator | `fu_comparator` | OP 6, R 7, TR 8–15 | EQ, LZ, GZ, EQZ, LEQ, LT, GEQ, GT of TR against OP or 0; result 0/1 and guard *b* |
| C1 counter | `fu_counter` | R 16, TR 17–19 | set to TR, +1, −1; guard "zero" |
| M1 masker | `fu_masker` | OP 20, OD 21, R 22, TR 23 | R = TR with the OP-masked bits taken from OD |
| MS1 matcher | `fu_matcher` | OP 24, OD 25, R 26, TR 27 | R = (TR & OP) == (OD & OP); guard *a* |
| CH1 checksum | `fu_checksum` | OP 28, OD 29, R 30, TR 31–32 | reset; accumulate |
| RLI | ports of `taco_top` | OP 33, OD 34, R 35, TR 36–43 | supplied from outside |
| IC | ports of `taco_top` | OP 44, OD 45, R 46, TR 47 | supplied from outside |
| R1–R4 registers | `fu_register` | R 48/50/52/54, TR 49/51/53/55 | store |
| UMMU1 user memory | `fu_mmu` | OP 56, OD 57, R 58, TR 59–60 | R = mem[OP+TR]; mem[OP+TR] = OD |
| DMMU1 packet memory | `fu_dmmu` | OP 61, OD 62, R 63, TR 64–65 | as UMMU1, plus DMA |
| IN1 input | `fu_input` | R 66–68, TR 69 | pop a received-packet descriptor |
| OUT1 output | `fu_output` | OP 70, OD 71, TR 72 | queue a packet for sending or discard |
| program counter | `network_controller` | TR 253–255 | jumps |

Notes on the units:

- **Checksum.** The "accumulate" operation adds six 16-bit halves to a
  running 16-bit one's-complement sum: those of ~OP, ~OD and ~TR. R is then the
  complement of the sum. Because of this convention, a packet whose checksum
  is right ends with R = 0.
- **Socket instances.** Every unit builds its sockets from `in_socket`,
  `out_socket` and `trig_socket`. The socket addresses are module parameters
  that default to the table above.

## Packet path: input FU, packet memory and output FU

This is the part with the most moving pieces.

**The packet memory.** `fu_dmmu` holds 1500 words, divided into four *slots*
of 375 words. A slot holds one 1500-byte packet. A slot is in use from the
moment a packet starts arriving in it until the packet has been sent or
discarded. The memory has three ports:

- the program's read and write sockets;
- a DMA write path from the input FU;
- a DMA read path to the output FU.

**Receiving.** A packet arrives on the network port `net_in_*`, which works as
follows:

1. The network holds `trigger` high and presents `length`. It presents one
   word per cycle while `ack` is high.
2. `fu_input` accepts the packet only if the packet memory has a free slot and
   the input queue has room. Otherwise the network waits, which is
   back-pressure.
3. The input FU claims the lowest free slot and gets its base address.
4. It queues the descriptor {slot base, interface 0, length}.
5. It streams the words into the slot.

The descriptor is queued *before* the data has finished arriving, so the
program can start working on the header at once. Guard *c* (queue empty)
tells the program whether a packet is waiting. A move to IN1's trigger pops
the oldest descriptor into its three result registers.

**Sending.** The program moves the slot base to OUT1's OP, the length to OD
and an interface number to TR. The trigger queues that request. A sender in
`fu_output` then takes requests in order:

- **Interface 0 to 3:** it raises `net_out_trigger_o` with the length, waits
  for `net_out_ack_i`, and then streams one word per cycle, each marked by
  `net_out_valid_o`. It reads the words straight from the slot.
- **Interface 4 and up:** the packet is not sent, and only its slot is freed.
  This is how the program drops a bad packet.

A request with length 0 is ignored. When the queue is full, guard *e* is high.

Both queues hold 50 entries (`FIFO_DEPTH`).

## The validation program

`tb/tb_taco_top.sv` contains a 49-word program, assembled in its
`build_program` task. The program:

1. waits on guard *c*, then pops a descriptor;
2. reads header words 0 and 1 from the packet memory;
3. checks `version == 6` with the matcher (mask 0xF0000000);
4. checks `next header == 6` (TCP) with the matcher (mask 0x0000FF00);
5. builds the pseudo-header word {payload length, 6} with the masker;
6. runs the checksum loop. Each pass reads one word of the addresses and
   TCP segment, feeds it to the checksum unit, increments the counter and
   compares it with the end. A backward jump guarded on *b* closes the loop;
7. adds the pseudo-header word and tests the checksum result for zero;
8. queues the packet on interface 0 if every check passed, and otherwise on
   interface 4 (discard). It waits on guard *e* if the output queue is full.

The loop takes 13 cycles per word: 9 instructions plus the 4-cycle jump gap.
A full 1500-byte packet takes about 5500 cycles from its first word to its
forwarding. The loop is written for clarity and is not unrolled. A program
that reads two words per pass, or unrolls the loop, would cut most of the jump
cost.

## Where this design departs from the original processor

- **Whole-packet forwarding.** A valid packet is forwarded whole, not just its
  TCP payload. The instance has no adder to compute the payload's address and
  length from the header.
- **Cycle count.** The original program took roughly 2000 cycles per
  1500-byte packet. That program is not reproduced here, and the program above
  is about 2.7 times slower.
- **RLI and IC units.** These appear only as sockets. Their functions are not
  defined, so their operand, operation-code and trigger registers are brought
  out of `taco_top` as ports, and their results come in as ports.
- **Guard wiring.** Guard lines *c*, *d* and *e*, and the choice of
  expressions 11–13, are this design's own.
- **Internal details chosen here.** The following are this design's choices:
  - the DMA handshakes;
  - the packet-memory size of four slots;
  - the input queue depth;
  - the exact cycle alignment of the pipeline;
  - the program load port.
- **Simulation-only features.** The original model's text-file program
  loading and its trace outputs are simulation conveniences and are not part
  of the RTL.

## Simulating

Every file in `tb/` is a standalone testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl \
  rtl/taco_pkg.sv rtl/*.sv tb/bus_bfm.sv tb/tb_fu_checksum.sv \
  --top-module tb_fu_checksum
./obj_dir/Vtb_fu_checksum
```

`tb/bus_bfm.sv` stands in for the network controller in the unit testbenches.
It drives moves and immediates with the real pipeline timing, and it is only
needed for those. Build `tb_taco_top` the same way without it.

| testbench | what it shows |
|---|---|
| `tb_taco_top` | The full processor at default sizes. It runs the program above on valid packets, bad-checksum packets, bad-version packets and UDP packets. The packets include a burst that fills all four slots and a 1500-byte packet. It checks every forwarded word, that no bad packet leaves, that no bus collides, the 13-cycle loop and 3 stall cycles per jump. It fails if any of these never happens: jumps, stalls, immediates, packet reads during DMA, back-pressure, forwards, discards |
| `tb_network_controller` | Random programs with random guards and jumps, against an instruction-level model |
| `tb_fu_dmmu`, `tb_fu_input`, `tb_fu_output` | DMA paths, slot reuse, discards, and full queues (with small queues) |
| `tb_fu_*`, `tb_*_socket`, `tb_taco_interconnect` | Each operation of each unit, against reference arithmetic with random operands |

For each unit, a copy of the module broken in one deliberate way was run
against its testbench, and every such broken copy made its testbench fail.

Lint and synthesis are clean of latches, combinational loops and multiple
drivers. The remaining lint warnings are about unused parameters, observation
outputs that are deliberately left unconnected, and the reset net, which
feeds asynchronous-reset flops and also assertion `disable iff` clauses and
clocked memory logic that has no reset.
