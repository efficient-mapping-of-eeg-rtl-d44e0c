# Blocks: a coarse-grain reconfigurable array for EEG kernels

Blocks keeps control and data apart. A grid of small functional units (FUs)
does the arithmetic. A switch box routes each FU output to any FU input. A
set of instruction decoders (IDs) issues the operations. Any decoder can
drive any set of FUs. One decoder driving one FU acts as a VLIW slot. One
decoder driving several identical FUs makes them run in lock step, which is
SIMD issue with no extra hardware. In this implementation the routing is
set once per kernel, so a program spends its instruction bits on operations,
not on moving data.

This RTL builds the array at the size chosen for three EEG kernels: the FFT,
the lifting wavelet transform and a cascaded second-order-section (SOS)
Butterworth filter. It follows the architecture described in the thesis
"Efficient Mapping of EEG Algorithms". The FU counts, widths, memory sizes
and bus timing come from that description. The instruction encoding, the
switch-box structure and the host interface are this design's own choices,
because the description does not give them.

| Unit | Count | Role |
|------|-------|------|
| ID (instruction decoder + instruction memory) | 13 | issues one instruction per cycle to every FU bound to it |
| LSU (load-store unit + 256 x 32 local memory) | 4 | local memory, stride address counter, access to the shared data memory |
| ALU | 8 | add/sub, add_se/sub_se, logic, shifts by 1 and 4, compare, pass |
| MUL | 4 | 32 x 32 multiply, with the result shifted right by 0, 8, 16 or 24 |
| ABU (accumulate-branch unit) | 1 | holds the program counter, loop counter and branches |
| IMM | 2 | constants from the instruction's immediate field |
| RF | 2 | 16-word register files |

The datapath is 32 bits wide everywhere. EEG samples are 16 bits. Two
channels are packed into one 32-bit word of the data memory.

## How a cycle works

All decoders share one program counter, which lives in the ABU. In each
cycle where the array is enabled:

1. Every ID reads the instruction at `pc` from its own instruction memory.
   The read is combinational.
2. Every FU takes the instruction of the decoder it is bound to. It takes its
   operands A and B from the switch box.
3. Every FU writes its result into its output register. An FU that gets a NOP
   keeps its old output. A value therefore stays readable until its FU is
   given another operation. Programs use this to hold constants and delay lines
   without spending a register-file access.
4. The ABU moves `pc` to `pc+1` or to a branch target.

Every operation takes one cycle. The array enable is `run && !stall`. A stall
freezes every FU, the PC and the address counters together.

## The shared data-memory bus

Each LSU has a private 256-word local memory that it reaches in one cycle.
The shared data memory is different: all four LSUs reach it over one bus,
32 bits wide by default, and each access costs 3 cycles. In the original platform that is 1 cycle
for the instruction and 2 cycles for the bus interface. This cost dominates
many kernels, so `mem_arbiter` models it exactly:

- An instruction that makes **k** global accesses (k LSUs bound to decoders
  that issue `LD_G*` or `ST_G*` in the same cycle) takes **3k cycles**. The
  array is stalled for 3k-1 cycles and commits on the last one.
- The LSUs are served one at a time in a fixed priority, lowest LSU first.
  Each access happens in the last cycle of its slot, which is the third on the
  32-bit bus. A load's data is held
  until the instruction commits.
- `stall` is high while the array waits. `conflict` is high while more than
  one LSU is asking for the bus.
- The bus width `BUS_W` can be set to 16 or 8 bits. An access then needs one
  3-cycle transaction for each 16- or 8-bit lane that its byte enables touch.
  A word over an 8-bit bus takes 12 cycles. A half-word over a 16-bit bus
  takes 3 cycles. Loads carry byte enables too, for this reason.

The data memory uses byte addresses. `LD_GH`/`ST_GH` move one 16-bit half of
a word, with address bit 1 selecting the half. This is how one channel of a
two-channel packed epoch is read: use stride 4 and start at byte 0 or 2.
Half-word loads are zero-extended. Following the description, the LSU does
not sign-extend. A kernel that needs signed samples passes them through an
ALU `ADD_SE` (sign-extend the 16-bit inputs, then add).

## Instruction word and opcodes

```
 31      27 26          16 15             0
+----------+--------------+----------------+
|  opcode  |   unused     |   immediate    |
+----------+--------------+----------------+
```

Opcode 0 is NOP for every FU type. Each FU type reads the 5-bit opcode with its
own table (`blocks_pkg`):

| FU | Operations |
|----|-----------|
| ALU | ADD, SUB, ADD_SE, SUB_SE, AND, OR, XOR, SHR1, SHR4 (arithmetic), SHL1, PASS (A), LT (signed), EQ |
| MUL | MUL (low 32 bits), SHR8, SHR16, SHR24 (signed product shifted arithmetically), MULU_SHR16 (unsigned) |
| LSU | SET_ADDR, SET_STRIDE (from the immediate); LD_L/ST_L (local, at the counter, then counter += stride); LD_LB/ST_LB (local, at operand B); LD_GW/ST_GW, LD_GH/ST_GH (shared memory at the counter, then counter += stride) |
| RF | WR (rf[imm] <= A), RD (out <= rf[imm]) |
| IMM | LDI (sign-extended immediate), LDH (immediate into bits 31:16) |
| ABU | SET (acc <= imm), ACC (acc += A), DBNZ (acc -= 1, branch to imm if the new acc is not 0), JMP, BNZ (branch if A != 0), HALT |

Stores write operand A. The stored value of an LSU store is A, and the
address is the LSU's counter, or operand B for the `_LB` forms.

## Switch box and binding

The switch box is a full crossbar with one registered select per FU input
(two per FU, A and B). Source 0 is the constant zero. Source `f+1` is the
output register of FU `f`, numbered as follows:

| FU numbers | Units |
|-----------|-------|
| 0-3 | LSU0-3 |
| 4-11 | ALU0-7 |
| 12-15 | MUL0-3 |
| 16-17 | RF0-1 |
| 18-19 | IMM0-1 |
| 20 | ABU |

A bind register per FU names the decoder (0-12) that drives it. The selects
and the bindings are written before a kernel starts and stay fixed while it
runs. This matches how Blocks is used: the interconnect is configured once
per kernel.

## Host interface (`blocks_top`)

The host core of the platform is outside this design. `blocks_top` gives its
place to plain ports:

- `cfg_we`, `cfg_space`, `cfg_addr`, `cfg_data` write configuration while the
  array is idle:
  - `CFG_IM` writes instruction memories, with `cfg_addr[15:8]` = decoder and
    `cfg_addr[7:0]` = word.
  - `CFG_SWB` writes switch-box selects, with `cfg_addr` = 2·FU + port
    (0 = A, 1 = B) and `cfg_data` = source.
  - `CFG_BIND` writes bindings, with `cfg_addr` = FU and `cfg_data` = decoder.
- `host_*` reads and writes the data memory. The read is combinational, and
  writes are accepted only while the array is idle. The array owns the memory
  while it runs.
- `start` is a one-cycle pulse that runs from PC 0. `busy` is high until an
  ABU `HALT` commits. `done` then stays high until the next start.
- `stall`, `conflict` and `branch` are per-cycle status outputs.

Default parameters:

| Parameter | Value |
|-----------|-------|
| `IM_DEPTH` | 64 instructions per decoder |
| `LM_DEPTH` | 256 words per LSU |
| `GM_WORDS` | 4096 words of data memory |
| `RF_DEPTH` | 16 words per register file |
| `GAW` | 16-bit byte address |
| `BUS_W` | 32-bit shared bus (8 or 16 also allowed) |

## Example: one Butterworth section on the array

`tb/tb_blocks_top.sv` runs a real kernel at full size. It is one SOS section
of the 10th-order Butterworth band-pass filter used for EEG, applied to a
256-sample epoch:

```
y[n] = x[n] + 2 x[n-1] + x[n-2] + ((-445 y[n-1] - 212 y[n-2]) >>> 8)
```

The feedback coefficients -1.738 and -0.828 are scaled by 256. The mapping uses
all 13 decoders and all 21 FUs:

- One decoder drives three ALUs in SIMD as delay lines.
- One decoder drives four ALUs as adders.
- Two decoders each drive a pair of multipliers.
- The register files hold constants.
- The ABU runs the loop with `DBNZ`.

The sample load and the previous output's store are issued in the same
instruction. That instruction therefore has a bus conflict and takes 6
cycles, so the loop body takes 10 cycles per sample. The outputs also go to a
local memory, which is copied back as words at the end. The whole run takes
**14·N + 8 = 3592 cycles**. The testbench checks this count exactly, along
with every output sample. It also checks that stalls, conflicts, taken
branches, SIMD issue, negative-sample sign extension, local-memory reads and
register-file reads all happened.

## How the kernels of the thesis fit

Resources each mapping needs, against this instance:

| Kernel | ID | LSU | ALU | MUL | ABU | IMM | RF | Fits |
|--------|----|-----|-----|-----|-----|-----|----|------|
| FFT, Korn-Lambiotte / Cooley-Tukey DIF (256 points) | 13 | 4 | 8 | 4 | 1 | 2 | 1 | yes |
| Lifting wavelet DB4, 2 channels | 10 | 4 | 3 | 2 | 1 | 2 | 2 | yes |
| Cascaded SOS filter, 2 channels | 11 | 4 | 7 | 4 | 1 | 2 | 1 | yes |
| Mallat wavelet (comparison mapping) | 12 | 2 | 9 | 4 | 1 | 3 | 1 | no (ALU, IMM) |
| Direct 10th-order IIR (comparison mapping) | 7 | 4 | 4 | 4 | 1 | 2 | 4 | no (RF) |

The RTL runs only the filter. The FFT and wavelet programs are not included.

## The whole filter: reconfiguring between runs

`tb/tb_sos_cascade.sv` runs all five sections of the 10th-order filter on
both channels of a packed two-channel epoch. It reuses the kernel above. Each
run filters one channel through one section. It reads one half of the packed
words with stride 4 and writes into a second buffer. Between runs the host
rewrites five instruction words and a few switch-box selects:

- **Sections 2, 4 and 5** (b = 1, ±2, 1) change only the constants.
- **Section 3** (b = 1, 0, -1) has no x[n-1] term. The spare multiplier is
  rerouted to produce -x[n-2].
- **Section 1** has three non-unit feed-forward taps. Together with the two
  feedback products that makes five multiplies, and the kernel has four. It
  runs as two passes: a feed-forward pass, with the multipliers rerouted to
  the x delay line, then a feedback-only pass.

The kernel's filter state lives in FU output registers, and those are not
cleared between runs. The kernel therefore spends a fourth prologue cycle
clearing the delay lines, so each run takes 14·N + 9 cycles. The 12 runs take
43,116 busy cycles. This is not the interleaved two-channel schedule the
original mapping uses, so its cycle count is not comparable.

## Where this RTL departs from the original or goes beyond it

- **Instruction encoding, opcode numbers and the 64-word instruction memories**
  are this design's own; the original format is not given.
- **The switch box** is a full crossbar. Its structure is not published. The
  original describes its switch boxes as reconfigurable at run time. Here the
  selects can be rewritten only while the array is idle, between runs.
- **Bus width** (`BUS_W`) can be 8, 16 or 32 bits, as in the original, with 32 as the default.
  A narrower bus changes only the timing: one 3-cycle transaction for each
  bus-wide lane an access touches. The memory itself stays 32 bits wide.
- **Arbitration** uses fixed priority. The original serializes conflicting
  accesses but does not say in which order.
- **The data memory** is a single-port array of 4096 words, shared with the
  host. In the original it sits behind an AXI bridge on the core's bus.
- **Extra operations** not named in the original are included: OR, XOR, SHL1,
  LT, EQ, PASS, the `_LB` indexed local accesses, and the ABU's BNZ/JMP/HALT.
  They complete the operation set.
- **Reset** is asynchronous and active low. All state registers, register
  files included, are cleared. Instruction, local and data memories are not
  reset.

## Files

| File | Contents |
|------|----------|
| `rtl/blocks_pkg.sv` | instruction type, opcode enums, FU counts and numbering |
| `rtl/blocks_top.sv` | the array with its memory |
| `rtl/id.sv` | instruction decoder with its instruction memory |
| `rtl/alu.sv`, `rtl/mul.sv`, `rtl/imm.sv`, `rtl/rf.sv`, `rtl/abu.sv`, `rtl/lsu.sv` | functional units |
| `rtl/swb.sv` | switch box |
| `rtl/mem_arbiter.sv` | shared-bus arbiter with the 3-cycle access |
| `rtl/data_mem.sv` | shared data memory |
| `tb/tb_<unit>.sv` | self-checking testbench for each unit |
| `tb/tb_blocks_top.sv` | end-to-end run of the filter section at full size |
| `tb/tb_sos_cascade.sv` | the five-section filter on a two-channel epoch, with reconfiguration between runs |

## Simulating

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. With
Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_blocks_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/blocks_pkg.sv tb/tb_blocks_top.sv
./obj_dir/Vtb_blocks_top
```

For a unit test, replace `tb_blocks_top` with, for example, `tb_lsu`. The
full-size run takes a few seconds.

To write a new kernel, follow the pattern of `tb_blocks_top`:

1. Fill a `prog[decoder][pc]` array.
2. Write it with `CFG_IM`.
3. Set the `CFG_SWB` selects and `CFG_BIND` bindings.
4. Load the data with `host_*`.
5. Pulse `start` and wait for `done`.
