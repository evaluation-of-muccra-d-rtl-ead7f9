# MuCCRA-D: a coarse-grained reconfigurable array with direct PE-to-PE links

MuCCRA-D is a multi-context, dynamically reconfigurable processor array meant
to sit inside a system-on-chip as an off-loading engine. Sixteen 24-bit
processing elements (PEs) form a 4 x 4 array; every cycle a central
controller broadcasts a *context pointer*, and each PE and memory looks up its
own configuration for that context in a local context memory. Switching the
whole array to another configuration therefore takes a single clock cycle.

The defining idea is the interconnect. Instead of an FPGA-like island-style
fabric (routing tracks, switch boxes, paths of varying length), PEs talk over
**dedicated point-to-point links, and every PE output is registered**. A value
moves at most one link per cycle, so the critical path is the same for every
application and the clock can run fast; the price is that a distant transfer
costs extra cycles (and extra contexts). This RTL implements that array:
PEs, inner-PE output switch, distributed memories, controller and the array
top, in synthesizable SystemVerilog.

## Array and links

```
            MEM0 (top-left)        MEM1 (top-right)
             |        |             |        |
  row 0    PE00 --- PE01 -------- PE02 --- PE03   <- PE03 supplies branch flags
             |        |             |        |
  row 1    PE10 --- PE11 -------- PE12 --- PE13
             |        |             |        |
  row 2    PE20 --- PE21 -------- PE22 --- PE23
             |        |             |        |
  row 3    PE30 --- PE31 -------- PE32 --- PE33
             |        |             |        |
            MEM2 (bottom-left)     MEM3 (bottom-right)
```

Each PE has three kinds of link:

| link | channels | reaches |
|---|---|---|
| nearest neighbour, per direction N/E/S/W | 3 (one each to the neighbour's ALU, SMU and RF input) | the adjacent PE |
| horizontal one-hop-distant | 1, usable by any unit of the receiver | PE two columns away (mod 4) |
| vertical one-hop-distant | 1, usable by any unit of the receiver | PE two rows away (mod 4) |

East/west neighbour links wrap around the row (PE x0 and PE x3 are
neighbours), so with the distance-two link every PE reaches every other PE of
its row in one transfer. Vertical links do not wrap: the north side of row 0
and the south side of row 3 connect to the distributed memories, each memory
serving two adjacent PEs. The wrap-around and the exact partner of each
distant link are choices of this implementation, made so that each PE has a
direct path to all PEs of its row; they are not parameters and are set in
`muccra_d.sv` (`CE`, `CW`, `CH`, `RV`).

## Words and carry bits

Every functional unit and channel carries a 26-bit word, `muccra_pkg::word_t`:
24 data bits plus 2 carry bits. Here `carry[0]` is the arithmetic
carry/borrow and `carry[1]` is the condition flag (compare result, otherwise
"result is zero"). Branches read `carry[1]`.

## Inside a PE

```
 14 input channels ──► operand muxes ──► ALU (incl. multiply) ──► ALU out reg ─┐
 (4 x 3 neighbour,                  ├──► SMU (shift & mask)   ──► SMU out reg ─┼─► inner-PE switch ──► 14 output channels
  2 distant)                        └──► RF write mux ─► RFile ─► RF  out reg  ─┘
                          context word (64 bit) from the context memory at cp
```

* **ALU** (`pe_alu`): PASS, ADD, ADDC, SUB, SUBB, MUL, MULH, AND, OR, XOR, ANDN,
  EQ, LT, LTU, MIN, MAX. Every PE multiplies (signed 24 x 24; MUL gives the low,
  MULH the high half of the product), so no data need travel to a dedicated
  multiplier.
* **SMU** (`pe_smu`): PASS, SLL, SRL, SRA, ROL, MASK, LDI (16-bit immediate,
  sign-extended) and LDHI (immediate into bits 23:8). LDI is how programs make
  constants.
* **RFile** (`pe_rfile`): 8 x 26 bits, one combinational read port shared by
  the ALU, SMU and RF output register, one write port.
* **Operand sources**: ALU operands from the 4 neighbours, the 2 distant
  PEs, the local SMU output register or the RF read port; the SMU operand from
  neighbours, distant PEs or the RF; RF write data from this cycle's ALU or
  SMU result or from a neighbour/distant channel.
* **Inner-PE switch** (`inner_pe_switch`): each output register goes to at most
  one of 14 channels (no broadcast); the three may leave simultaneously on
  different channels. Choosing the channel picks both the destination PE and
  the destination unit in it.

### Timing of a transfer

In cycle *t* a unit computes; its result and the destination code of context
*t* are stored in its output register at the clock edge. In cycle *t+1* the
switch drives the word onto the chosen channel and the receiving PE uses it
in its context *t+1*. So a PE-to-PE transfer is one cycle, and a chain of
operations across PEs advances one PE per context. The ALU's "local SMU"
operand is the SMU output register, i.e. the SMU result of the previous
context; a register-file write of a local ALU/SMU result takes the result of
the same context. The ALU output register can be held (`alu_keep`) so a flag
survives until the controller needs it. While the array is idle, PEs hold
their state and drive nothing.

### PE context word (64 bits)

| bits | field | meaning |
|---|---|---|
| 0 | alu_keep | hold the ALU output register |
| 4:1 | alu_op | `alu_op_e` |
| 7:5 / 10:8 | alu_a_sel / alu_b_sel | 0-3 N/E/S/W, 4 horiz. distant, 5 vert. distant, 6 SMU reg, 7 RF |
| 13:11 | smu_op | `smu_op_e` |
| 16:14 | smu_sel | as above, 6 = zero |
| 21:17 | smu_sa | shift/rotate amount |
| 22 / 25:23 / 28:26 | rf_we / rf_waddr / rf_wsel | write source as above, 6 = ALU result, 7 = SMU result |
| 31:29 | rf_raddr | RF read address |
| 35:32 / 39:36 / 43:40 | alu_dst / smu_dst / rf_dst | 0 none; 3·dir+unit+1 for neighbour dir (N0 E1 S2 W3), unit (ALU0 SMU1 RF2); 13 horiz. distant; 14 vert. distant |
| 59:44 | imm | SMU immediate |
| 63:60 | — | unused |

An all-zero word does nothing visible, so unused contexts are harmless.
`muccra_pkg::dst_nb(dir, unit)` builds neighbour destination codes.

## Distributed memories

Four `dist_mem` blocks of 256 x 24 bits, each with two read ports and one
write port, and its own 16-bit-wide context memory (`mem_ctx_t`). Per context:

* each of its two PEs may read at an address it sends on one of its three
  channels; the word returns on all three of that PE's input channels from the
  memory side, one cycle later;
* the two PEs may not read the same address; instead **copy** mode reads one
  address and hands the word to both (an assertion catches the illegal case);
* one write per cycle: one PE provides the address, the other the data (each
  PE has only three channels, so neither can send both in one cycle alongside
  other traffic — the configuration picks which does which).

Reads see the old word when the same address is written in that cycle. A host
port (`host_mem_*` on the top) loads and reads the memories while the array is
idle; reads on it are combinational.

## Controller and branches

`muccra_ctrl` holds the context pointer and a 64-entry table with one 16-bit
entry per context: halt, or branch-if-flag (enable, polarity, 6-bit target),
otherwise `cp+1`. The flag is `carry[1]` of the ALU output register of PE
(`BR_ROW`, 3), a PE on the right edge. Any condition computed elsewhere must
first be moved to that PE, which is why branch-heavy code costs extra contexts
on this array. A branch in context *k* tests the flag left by context *k-1*.

`start` (one cycle, with `start_cp`) begins execution the next cycle; `busy`
is high while contexts execute, one context per cycle; `done` pulses once
after the halting context has executed.

## Configuration port

Before a run, context words are written with `cfg_we`, `cfg_addr` (context
number) and `cfg_data`. `cfg_sel` is a 21-bit destination mask: bit
`row*4+col` for a PE, 16-17 top memories (left, right), 18-19 bottom
memories, 20 the controller; memories and controller take `cfg_data[15:0]`.
Setting several mask bits multicasts one word. The original chip distributes
configuration from an on-chip configuration memory through a dedicated
multicast network; that network is not part of this RTL, and the mask bus
takes its place.

## Programming example

`tb/tb_muccra_d.sv` is an alpha-blend, `out[i] = (A[i]·α + B[i]·(256-α)) >> 8`,
in 15 contexts: PE00/PE01 generate addresses into MEM0 (dual read), multiply by
α and 256-α, PE10 adds (one product through its RF channel, the other relayed
through PE11), shifts, and sends the result two rows down on the vertical
distant link; PE30/PE31 write it into MEM2; PE03 counts and sets the loop flag.
Eight contexts per pixel, `2 + 8N + 5` cycles in total. The per-pixel schedule
shows how values move one link per context:

| context | top-left memory | PE00 / PE01 | PE11 | PE10 | PE30 / PE31 | PE03 (branch PE) |
|---|---|---|---|---|---|---|
| L+0 | | send address i / 128+i north; SMU makes 1 | | | | SMU makes 1 |
| L+1 | two reads | increment address (r0 += 1) | | | | count += 1; SMU makes N |
| L+2 | words on PE00/PE01 north inputs | multiply by α / 256-α; PE00 sends south to PE10's RF, PE01 south to PE11's ALU | | | | flag = count < N |
| L+3 | | | pass product west | write product from north into RF | | hold flag |
| L+4 | | | | add the two products (west channel + RF) into RF | | hold |
| L+5 | | | | shift right 8, send on vertical distant link | | hold |
| L+6 | | | | | PE30 forwards it south (data), PE31 sends i south (address) | hold |
| L+7 | | | | | bottom-left memory writes; PE31 increments i | controller branches to L+0 while flag |

After the loop, an epilogue uses copy
mode, the wrap-around link and the horizontal distant link.
`tb/tb_bsort.sv` is a bubble sort with MIN/MAX compare-exchange, two writes
per step, nested loops, and a pass counter in PE02 whose result is forwarded
to PE03 for the outer branch (`3 + 6N(N-1)` cycles).
`tb/tb_dct.sv` is the 8 x 8 two-dimensional DCT of JPEG with integer
coefficients, 35 contexts: a row pass on the top half of the array writes its
results transposed into the bottom-left memory, and a mirrored column pass on
the bottom half writes the final block back to the top-left memory. Each
output is a two-context multiply-accumulate loop (dual read of sample and
coefficient, sample forwarded east, product sent to an accumulating PE)
followed by a five-context epilogue; 3171 cycles per block.
`tb/tb_sha1_schedule.sv` computes the SHA-1 message schedule,
`W[t] = ROL1(W[t-3] ^ W[t-8] ^ W[t-14] ^ W[t-16])` for t = 16..79. Because a
word is 24 bits, each 32-bit W is stored as two parts: a 24-bit low part and
an 8-bit high part. PE00 runs the program on the low parts and PE01 on the
high parts. The rotate is done by exchanging the parts and the bits that
cross between them (low >> 23, high >> 7). Each t takes 14 contexts (898
cycles for 64 words). The SHA-1 compression rounds are not mapped.

These programs are hand-written examples, not the original chip's mappings.
The original chip's reported energy and power at its 125 MHz clock work out
to about 250 (DCT), 1,030 (alpha-blend), 4,440 (bubble sort) and 730 (SHA-1)
cycles per run. Those runs used data sizes that are not reported, so the
cycle counts above cannot be compared with them directly.

## Sizes

| item | value |
|---|---|
| PE array | 4 x 4 (`ROWS`, `COLS`; the memory pairing assumes an even `COLS`) |
| data word | 24 bits + 2 carry bits |
| context memory per PE | 64 x 64 bits |
| register file | 8 x 26 bits |
| distributed memories | 4 x 256 x 24 bits |
| context switch | 1 cycle |
| clock of the original chip after layout | 125 MHz (all PE outputs registered) |

Synthesized (generic cells, memories kept as memories) the array has about
5,000 flip-flop bits and 95 kbit of memory.

## What follows the source and what is this implementation's choice

From the source architecture: 4 x 4 array, 24-bit data with 2 carry bits,
ALU with multiplier in every PE, SMU and 8-entry register file, registered PE
outputs, 14-channel inner-PE switch (3 channels per neighbour, one per
distant direction, no broadcast), memories on top and bottom each shared by two
PEs, 2-read/1-write with copy mode and address/data split between the two
PEs, 64 x 64-bit context memories, broadcast context pointer with one-cycle
switching, branch conditions taken from a PE at the right edge.

Chosen here, because the source does not specify them: the ALU and SMU
operation sets and encodings, the context-word layouts, the meaning of the two
carry bits, the wrap-around and modulo wiring of the links, the memories'
own context memories and synchronous-read timing, the controller's sequencing
table and start/done handshake, the host memory port, the configuration mask
bus, reset behaviour and the idle behaviour. The on-chip configuration memory
with its multicast network, and the pad ring, are not included.

## Simulating

All RTL is in `rtl/`, one module or package per file; `rtl/muccra_pkg.sv` must
be compiled first. Each block has a self-checking testbench in `tb/` that
prints `TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/muccra_pkg.sv tb/tb_muccra_d.sv --top-module tb_muccra_d -o sim
./obj_dir/sim
```

| testbench | what it checks |
|---|---|
| `tb_pe_alu`, `tb_pe_smu` | every operation against reference arithmetic |
| `tb_pe_rfile`, `tb_ctx_mem` | storage, reset, one-cycle context lookup |
| `tb_inner_pe_switch` | all 14 channels for random destination triples |
| `tb_muccra_pe` | one PE with 64 random contexts against a cycle model |
| `tb_dist_mem` | dual read, copy, both write directions, idle behaviour |
| `tb_muccra_ctrl` | branches, polarity, halt/done against a model |
| `tb_muccra_d` | full array, alpha-blend and epilogue, cycle count, use of every link type and memory mode |
| `tb_bsort` | full array, bubble sort, nested loops, condition forwarded to the branch PE |
| `tb_dct` | full array, 8 x 8 DCT, both passes checked, cycle count |
| `tb_sha1_schedule` | full array, SHA-1 message expansion on split 32-bit words, all 80 words, cycle count |

The testbenches for the whole array run at the default parameters and finish
in a few seconds.
