# QuadroCore: a four-core cluster that the program reconfigures

QuadroCore is a cluster of four small 32-bit RISC cores that can change how
they cooperate from one basic block to the next. A single instruction, executed
by the cores themselves, switches the cluster between three operating modes:

* **ASYNC**: four independent instruction streams (MIMD). The cores meet only
  at explicit barriers.
* **SYNC**: four instruction streams that move in lock-step. Every core
  completes each instruction in the same cycle, so a compiler can schedule
  fine-grained, instruction-level parallelism across cores without any
  synchronisation code.
* **SIMD**: one instruction stream. The decoder of the lowest core of the
  group (the *master*) feeds every core of the group. Each core runs the
  instruction on its own register bank, so register `r_i` of the four cores
  forms a four-element vector register. The other cores' fetch and decode sit
  idle.

A switch costs one cycle. There is no separate reconfiguration controller and
no configuration memory: the mode is an operand of an ordinary instruction.
Data moves between the cores through a 32-entry shared register file
(2-cycle access). Bulk data sits in an external memory behind a round-robin
shared bus (6 cycles per access, up to 15 when all four cores compete). A
special access moves four adjacent words in one transaction (7 cycles).

All RTL is SystemVerilog-2017 in `rtl/`. Self-checking testbenches are in
`tb/`.

## Block diagram

```
                 external memory (qc_ext_mem, 4 banks)
                              |
                 adjacent-access unit (qc_adjacent)
                              |
                 round-robin bus arbiter (qc_wb_arbiter)
        +------------+--------+--------+------------+
     core 0       core 1           core 2        core 3      (qc_core)
   imem/decoder  imem/decoder    imem/decoder  imem/decoder
        \____________ reconfigurable interconnect ____________/   (qc_interconnect)
   ALU/regs/dmem  ALU/regs/dmem  ALU/regs/dmem  ALU/regs/dmem
        +------------+--------+--------+------------+
                 shared register file (qc_shared_regfile)
     barrier status (qc_barrier)   shared flags (qc_shared_flags)
```

`qc_top` wires these together. Each `qc_core` contains its instruction memory
(`qc_imem`), decoder (`qc_decoder`), register bank (`qc_regfile`), ALU
(`qc_alu`) and data memory (`qc_dmem`).

## How the modes work

This is the part of the design that needs the most care.

### Decode-to-execute interconnect

Each core has a three-stage pipeline: fetch, decode, execute. The decode
stage produces a *decoded word* (`ctrl_t` in `qc_pkg`). It carries the
operation, the register numbers and the sign-extended immediate. It does not
go straight to the core's execute stage. It goes to `qc_interconnect`, which
decides two things for every core and every cycle:

1. **Which decoded word enters execute.** A core that will be a SIMD slave
   takes the master's word. Every other core takes its own. The master is the
   lowest-numbered core in the group mask.
2. **When execute completes (`advance`).** A core in ASYNC mode advances as
   soon as it is `ready`. A core in SYNC or SIMD mode advances only when every
   core in its group mask is ready. The whole group therefore leaves each
   instruction in the same cycle. Each instruction takes as long as the slowest
   member of the group needs for it.

All architectural updates (register write, flag, memory store, mode change)
happen in the cycle the instruction leaves execute. So a core that is ready
early simply waits with its result, and the state stays consistent.

### The MODE instruction

`MODE m, mask` does two things: it acts as a barrier over `mask`, and it sets
the core's mode and group mask. Every core that joins a group executes its
own MODE. When the last one arrives, the whole group switches in the same
cycle.

The interconnect makes its routing choice from the mode the core will have
*after* the current instruction (`mode_nxt`). As a result, the instruction
that follows a MODE already uses the new routing, and no bubble is lost.

* **Entering SIMD.** The slaves' own decode stages freeze, holding the next
  instruction of their own streams. From the next cycle on, the slaves execute
  the master's stream.
* **Inside SIMD.** Branches are taken only by the master. A branch or HALT
  that empties the master's decode stage reaches the slaves as a bubble too.
* **Leaving SIMD.** The master's stream contains `MODE ASYNC, mask`. Every
  core of the group executes it together. Each slave then continues from its
  frozen decode stage, which is the instruction after the MODE SIMD it
  executed itself.

`MODE ASYNC` with mask 0 leaves a group without waiting for anyone.

### Barriers

`BAR mask` holds the core in execute until every core named in `mask` has
reached a barrier with the same mask (`qc_barrier`). All of them are then
released in the same cycle. A barrier that everyone reaches together costs
one cycle. Disjoint masks, for example `0011` and `1100`, synchronise
independently. The status of the waiting cores is a register that every core
sees, so no memory is polled.

### SIMD memory access

Two mechanisms apply to external memory accesses in SIMD mode:

* **Single-word loads and stores (`LDX`, `STX`)** add the core number to the
  address. Core `c` with base address `b` therefore accesses word `b + c`.
  Each core still wins the bus in turn, so four such loads take up to 15
  cycles.
* **Adjacent accesses (`LDA`, `STA`)** are issued once, by the master. They
  move words `b .. b+3` in one bus transaction, to or from cores `0 .. 3`.
  Only cores whose bit is set in the group mask take part. The completion is
  signalled only to those cores. Two SIMD groups, for example `{0,1}` and
  `{2,3}`, can therefore run side by side, each with its own master, and
  never take each other's data.

## Timing

The execute-stage times, in cycles, assume the bus is free unless stated:

| instruction | cycles | how |
|---|---|---|
| ALU, compare, branch, MODE/BAR (all present), FPUB, CCFG | 1 | |
| `CLDW`/`CSTW` shared register | 2 | registered read port, write at the end |
| `LD`/`ST` local data memory | 3 | `LMEM_LAT` |
| `LDX`/`STX` external, bus free | 6 | 1 request + 1 arbitration + 3 bus + 1 write-back |
| `LDX`/`STX`, all four cores at once | 6, 9, 12, 15 | round robin, back to back, 3 bus cycles each |
| `LDA`/`STA` adjacent, four words | 7 | 6 + 1 distribution cycle |

A taken branch discards the instruction in decode, so the branch costs 2
cycles in total.

The memory's two wait cycles (`EXT_WAIT`) and the one registered arbitration
cycle are this design's choice. They are chosen so that the three published
access times (6, 15 and 7) all come out at once. The testbenches measure and
check all of the times in the table.

## Instruction set

Instructions are 16 bits wide. The fields are `[15:12]` opcode, `[11:8]` rd,
`[7:4]` rs and `[3:0]` rt/immediate. There are 16 local registers, and `r0`
always reads 0.

| opc | mnemonic | effect |
|---|---|---|
| 0 | `NOP`, `HALT`, `BAR mask`, `MODE m,mask`, `FPUB`, `CCFG e` | sub-op in `[11:8]`; mode in `[5:4]`, mask in `[3:0]` |
| 1-8 | `ADD SUB AND OR XOR SHL SHR MUL rd,rs,rt` | `MUL` keeps the low 32 bits |
| 9 | `ADDI rd,rs,imm4` | signed 4-bit immediate |
| 10 | `LI rd,imm8` | signed 8-bit immediate |
| 11 | `CMP cc,rs,rt` | flag = EQ/NE/LT/GE/LTU (cc in `[10:8]`) |
| 12 | `BR c,off` | c = always / flag / not flag / shared flag of core `[9:8]`; target = pc + off |
| 13 | `CLDW rd,s` | rd = shared[s] (s in `[4:0]`) |
| 14 | `CSTW rd,s` | shared[s] = rd |
| 15 | `LD ST LDX STX LDA STA rd,(rs)` | sub-op in `[3:0]`; local, external, adjacent |

`FPUB` publishes the core's condition flag. Every core can then branch on it
with `BR` condition 3 (collective branching).

`CCFG 1` redirects `CLDW`/`CSTW` to external memory at
`COMM_BASE + s`. `COMM_BASE` is the top 32 words of external memory.
`CCFG 0` returns to the shared register file, which is the default. This
allows the two ways of exchanging register values to be compared.

## Where this design departs from, or adds to, the architecture it follows

The published architecture specifies:

* four cores;
* 32-bit data and 16-bit instructions;
* a three-stage pipeline;
* a 32-entry shared register file with one read and one write port per core;
* the access times;
* barrier masks, lock-step mode, SIMD forwarding from a master decoder, the
  SIMD address offset, the adjacent-word access and the shared condition flag;
* the round-robin shared wishbone bus.

The following are this design's own choices:

* **The base core.** The instruction set and encoding, 16 registers, the way
  stalls work (operands read in execute, results written on leaving, so
  there is no forwarding), and the memory sizes (1 K instructions, 1 K data
  words and 16 K external words) are all chosen here, not specified. Treat the
  core as a vehicle for the cluster mechanisms, not as a copy of any existing
  processor.
* **Local memory latency.** The base core's description gives load/store
  instructions two cycles, but the cluster's memory hierarchy gives local
  memory three. This design uses 3 (`LMEM_LAT`).
* **Lock-step as joint advance.** Each instruction takes the time of the
  slowest core of the group for *that* instruction, not a fixed worst case for
  every instruction.
* **MODE as a barrier.** The MODE instruction includes a barrier over its
  group, and the master is the lowest core of the mask.
* **Shared register write conflicts.** Two cores writing the same shared
  register in one cycle is left to the compiler to avoid. Here the lowest core
  wins. A read in the same cycle as a write returns the old value.
* **External memory.** It is modelled as four interleaved banks, so any four
  consecutive words can be read in one transaction. It has a host port for
  loading, which takes priority over the bus and may be used only while the
  cores are idle.
* **The bus.** It is wishbone classic (`cyc`, `stb`, `we`, `adr`, `dat`,
  `ack`) widened to four data lanes, with an `adj` tag and per-lane `sel`.
* **Power saving.** It is limited to not fetching on SIMD slaves. There is no
  clock gating.
* **Register-bank borrowing between cores.** This was mentioned as future
  work and is not built.

## Simulating

All files are plain SystemVerilog. The package `rtl/qc_pkg.sv` must be read
first, and testbenches that build programs also need `tb/qc_asm_pkg.sv`. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl \
    rtl/qc_pkg.sv tb/qc_asm_pkg.sv tb/tb_qc_top.sv --top-module tb_qc_top
./obj_dir/Vtb_qc_top
```

Every testbench ends with `TB_RESULT checks=N failures=M` and has a
watchdog.

**`tb_qc_top`** runs the full cluster at its default size. It uses:

* SIMD mode, to multiply two random 4x4 matrices. Core `c` computes column
  `c`. A elements come from single-word loads, with the SIMD offset and
  four-way bus contention. B and C rows use adjacent accesses.
* ASYNC mode, for a lone external load, a shared-register exchange, the same
  exchange redirected to external memory, and full and partial barriers.
* SYNC mode, for lock-step over unequal instructions, and a flag published
  by core 0 followed by a collective branch on it.

It checks the results in external memory. It counts every mechanism
(barrier waits, lock-step holds, SIMD forwards, bus contention, adjacent
transfers, shared-register use, external communication, shared-flag
branches, mode switches, local loads), and each count must be non-zero. It
measures the access times in the table above. The cluster finishes the
program in about 690 cycles.

**`tb_qc_workloads`** runs two benchmark kernels at full size and checks
them against a reference model:

* a 50 x 16 full convolution (65 outputs), on one core and then on four
  cores in ASYNC mode;
* a 10-element multiply-accumulate, on one core with single-word loads and
  then in SIMD with adjacent loads, with the partial sums combined through
  the shared register file.

It also runs two SIMD groups at the same time. With the default parameters
the results are:

| kernel | one core | parallel |
|---|---|---|
| convolution | about 22 800 cycles | about 7 500 cycles (ASYNC) |
| multiply-accumulate | 223 cycles | 96 cycles (SIMD) |

These counts come from hand-written programs for the instruction set above.
They are not compiler output.

The per-block testbenches (`tb_qc_<block>`) check each unit against an
independent model: random traffic where that fits, and directed scenarios
for the barrier, the arbiter's round-robin order and timing, and the
adjacent unit. `tb_qc_core` runs one core with its surroundings modelled.

`tb/qc_asm_pkg.sv` has one encoder function per instruction. Use it to write
new programs, for example:

```
prog.push_back(i_mode(MODE_SIMD, 4'b1111));
prog.push_back(i_lda(3, 1));
```

## Files

| file | contents |
|---|---|
| `rtl/qc_pkg.sv` | sizes, enums, the decoded word `ctrl_t`, bus structs |
| `rtl/qc_top.sv` | the cluster |
| `rtl/qc_core.sv` | one core: pipeline, execute timing, bus master |
| `rtl/qc_interconnect.sv` | SIMD forwarding and lock-step advance |
| `rtl/qc_barrier.sv` | barrier status and release |
| `rtl/qc_shared_regfile.sv`, `rtl/qc_shared_flags.sv` | inter-core communication |
| `rtl/qc_wb_arbiter.sv`, `rtl/qc_adjacent.sv`, `rtl/qc_ext_mem.sv` | bus, adjacent access, external memory |
| `rtl/qc_imem.sv`, `rtl/qc_decoder.sv`, `rtl/qc_regfile.sv`, `rtl/qc_alu.sv`, `rtl/qc_dmem.sv` | core building blocks |
| `tb/tb_*.sv`, `tb/qc_asm_pkg.sv` | testbenches and the program encoder |
