# QuadroCore: a four-processor cluster that reconfigures itself in one cycle

QuadroCore is a cluster of four small 32-bit RISC processors that can change
how they cooperate while a program runs. The same four cores can run four
independent instruction streams (asynchronous MIMD), run four streams in
lock-step (synchronous MIMD), or run one instruction stream on four sets of
data (SIMD). A compiler chooses the mode for each piece of code and inserts a
reconfiguration instruction at each boundary. There is no separate
configuration controller and no configuration memory: the mode information
travels in the instruction stream, and a switch takes effect in a single
clock cycle.

The SystemVerilog here implements one cluster, as described in the paper
"Run-Time Reconfiguration of Multiprocessors Based on Compile-Time Analysis". It follows the
paper's structure, modes and latencies. The processor's own instruction set
is not published there, so the encoding here is new. The section
"How far this follows the paper" lists every such choice.

## The cluster

```
            +---------+   +---------+   +---------+   +---------+
 fetch      | IF  P0  |   | IF  P1  |   | IF  P2  |   | IF  P3  |   local instruction memories
 decode     | ID  P0  |   | ID  P1  |   | ID  P2  |   | ID  P3  |
            +----+----+   +----+----+   +----+----+   +----+----+
                 |  decoded instructions   |             |
            +----v-------------v-----------v-------------v----+
            |   reconfig_interconnect (mode registers,        |
            |   SIMD forwarding, lock-step advance)           |
            +----+-------------+-----------+-------------+----+
 execute    | EX  P0  |   | EX  P1  |   | EX  P2  |   | EX  P3  |   16x32 regs, ALU, local data memory
            +-+--+--+-+   +-+--+--+-+   +-+--+--+-+   +-+--+--+-+
              |  |  |       |  |  |       |  |  |       |  |  |
              |  |  +-------+--+--+-------+--+--+-------+--+--+--> barrier_unit, cond_share
              |  +----------+--+----------+--+----------+--+-----> shared_regfile (32 x 32)
              +-------------+-------------+-------------+--------> cluster_bus --Wishbone--> ext_memory
```

Each processor (`ncore`) has a three-stage pipeline (fetch, decode,
execute). It has 16-bit instructions, a 16 x 32 register file, a 32-bit ALU,
an iterative multiplier, 32 KiB of instruction memory and 32 KiB of data
memory. The cluster adds the following, shared by all four processors:

| block | role |
|---|---|
| `reconfig_interconnect` | multiplexer layer between every decode and every execute stage, plus each processor's mode register |
| `barrier_unit` | barrier status register; releases a set of processors in the cycle the last one arrives |
| `shared_regfile` | 32 shared registers, one read/write port per processor, for fast exchange of register values |
| `cond_share` | each processor's published condition flag, for shared and collective branches |
| `cluster_bus` | Wishbone master with round-robin arbitration and the four-word block transfer |
| `ext_memory` | shared external memory, four word-interleaved banks |

## Operating modes

Each processor has a mode (`mode_e` in `qc_pkg`) and a group mask. Both are
written when its `RCFG mode, mask` instruction commits. Processors that name
each other in their masks form a group. Several groups can coexist. For
example, processors 0-2 can run in lock-step while processor 3 continues on
its own.

### Asynchronous MIMD (reset mode)

Every processor fetches, decodes and executes its own program. Its execute
stage advances when its own instruction is done. Processors coordinate with
`BAR mask`. The instruction stops in execute until every processor in the
mask has reached a barrier. If they all arrive in the same cycle, the barrier
costs one cycle. Disjoint masks synchronise independently.

### Synchronous MIMD (lock-step)

Every processor still runs its own program. The interconnect gives all
members of the group a common "advance" signal: the AND of their "done"
signals. Every member therefore commits its instruction in the same cycle.
If one member waits for external memory, the others wait too. This makes the
timing predictable, so a compiler can schedule cross-processor dependencies
without barriers. For the same reason the multiplier's early exit is switched
off in this mode: a multiply always takes 9 cycles instead of 2-9.

### SIMD

The lowest-numbered processor of the mask is the master. Only the master
fetches and decodes. The interconnect routes its decoded instruction to the
execute stage of every group member. Each member reads its operands from its
own register file and uses its own local data memory. Register `ri` across
the four processors therefore acts as one four-element vector register.
While in SIMD mode, a slave's fetch and decode stages stand still and its
instruction memory is not enabled, which is where the power saving comes
from. The rules for a slave:

* It executes every instruction the master decodes, in the same cycle.
  Advance is common to the group, as in lock-step.
* It ignores branches. Control flow belongs to the master, and a taken
  branch in the master squashes the wrong-path instruction for everyone.
* A single external load or store (`LDX`/`STX`) by processor `c` goes to
  `address + c`. The four processors therefore touch four consecutive
  words. They still arbitrate for the bus one after another.
* A fast access (`LDV`/`STV`) is issued once, by the master, for the whole
  group. The four consecutive words travel in one bus transaction and are
  distributed to (or collected from) the processors.

### Switching modes

`RCFG mode, mask` first waits at the barrier unit for every processor of the
mask, exactly like `BAR mask`. All members therefore commit it in the same
cycle, and in that cycle the mode registers change. The interconnect routes
by the mode being written, so the very next instruction already goes the new
way. Nothing is flushed and there are no extra cycles.

Entering SIMD: each member executes `RCFG SIMD, mask` in its own stream.
From then on the slaves execute the master's stream. A slave's own decode
register keeps the instruction that follows its `RCFG`.

Leaving SIMD: the master's stream contains `RCFG ASYNC, mask` (or `SYNC`).
All members execute it together. Each slave then continues from the
instruction it had kept, that is, from the instruction after its own
`RCFG SIMD`. A program for a slave therefore looks like this:

```
   ...            ; own MIMD code
   RCFG SIMD,0xF  ; join the group; the master's SIMD code runs here
   ...            ; own code again after the group leaves SIMD
```

## Communication and memory timing

The execute stage holds an instruction until it is done. The latencies below
are the number of cycles an instruction spends in execute.

| access | cycles | how |
|---|---|---|
| local register | 1 | combinational read, write at commit |
| shared register (`LDS`/`STS`) | 2 | request registered, access in second cycle; write then read by another processor: 4 cycles round trip |
| local data memory (`LDL`/`STL`) | 3 | two register stages |
| external memory, single (`LDX`/`STX`) | 6 alone, 9/12/15 with 1/2/3 others ahead | request reg, arbitration, 3-cycle Wishbone transaction, response reg |
| external memory, fast adjacent (`LDV`/`STV`) | 7 | same transaction carrying four lanes, plus one distribution cycle |
| barrier / reconfiguration | 1 if all arrive together | combinational release from the barrier unit |
| multiply | 2-9 (asynchronous), 9 (synchronous, SIMD) | 4 bits per cycle, early exit when the rest of the multiplier is zero |

The external-memory numbers come from the bus pipeline in `cluster_bus`.
Cycle 0 registers the request. Cycle 1 arbitrates round-robin. Cycles 2-4
are the Wishbone strobe; the memory has two wait states and acknowledges in
cycle 4. Cycle 5 returns the response. The next transaction may start in the
cycle after an acknowledge. Three bus cycles per access give 6 + 3k cycles
for a processor with k requests ahead of it, and 15 for the last of four.
The memory stores word `w` in bank `w mod 4`, so any four consecutive words
sit in different banks. A block transfer therefore reads or writes all four
in the same cycle. Its data comes back in bank order and is rotated into
lane order in one extra cycle (cycle 6).

The shared register file has no arbitration. Each processor has its own
port, and the program must not let two processors write one register in the
same cycle. An assertion reports it if they do. The higher-numbered
processor's write wins.

## Instruction set

All instructions are 16 bits. Fields are `[15:12]` opcode, `[11:8]` a,
`[7:4]` b and `[3:0]` c. Registers are r0-r15. r0 is an ordinary register,
but the example programs keep it at zero.

| opcode | instruction | effect |
|---|---|---|
| 0 | `NOP` | |
| 1-5 | `ADD/SUB/AND/OR/XOR rd,rs,rt` | rd = rs op rt |
| 6 | `MUL rd,rs,rt` | rd = low 32 bits of rs*rt |
| 7 | `SLL/SRL/SRA/ROR rd,#n` | `[7:6]` kind, `[4:0]` n; shifts rd in place |
| 8 | `LI rd,#imm8` | rd = sign-extended imm8 |
| 9 | `LSH rd,#imm8` | rd = rd<<8 \| imm8 (builds 32-bit constants) |
| A | `ADDI rd,#imm8` | rd += sign-extended imm8 |
| B | `LDL/STL/LDX/STX/LDV/STV r,(rs)` | c = 0..5; local, external single, external fast access; stores write r |
| C | `LDS/STS r,S[n]` | `[7]` store, `[4:0]` shared register |
| D | `BR cond,#off10` | cond 0 always, 1 if F, 2 if not F; target = pc + off |
| E0 | `BAR mask` | barrier over `[3:0]` |
| E1 | `RCFG mode,mask` | `[5:4]` mode (0 async, 1 sync, 2 SIMD), `[3:0]` mask |
| E2 | `SFLG` | publish own flag F |
| E3 | `HALT` | stop this processor |
| E8-EF | `SBR kind,mask,#off5` | branch if flag of processor k set (0) / clear (1), all flags of mask set (2), any set (3); k = mask[1:0] |
| F | `CMP cond,rs,rt` | F = rs cond rt; EQ, NE, LT, LTU, GE, GEU |

`tb/qc_asm.svh` has one function per instruction for writing test programs.

## Files

`rtl/`, one module per file:

* `quadrocore.sv` is the top. It holds the whole cluster and has host ports
  to load programs and external memory.
* `ncore.sv` is one processor. It uses `ncore_decode`, `ncore_regfile`,
  `ncore_alu`, `ncore_mul`, `local_imem` and `local_dmem`.
* `reconfig_interconnect.sv`, `barrier_unit.sv`, `shared_regfile.sv`,
  `cond_share.sv`, `cluster_bus.sv`, `rr_arbiter.sv` and `ext_memory.sv` are
  the cluster blocks.
* `qc_pkg.sv` holds the shared types: the decoded instruction `dec_t`, the
  modes, and the bus request `xreq_t`.

`tb/` has one self-checking testbench per module, `tb_<module>.sv`, six
workload testbenches, `tb_wl_<name>.sv`, and the assembler helpers
(`qc_asm.svh`). Every testbench prints `TB_RESULT checks=N failures=M`.

`quadrocore` parameters: `EXT_WORDS` (65536), `IMEM_WORDS` (16384 x 16 bit)
and `DMEM_WORDS` (8192 x 32 bit). The cluster size is fixed at four
processors by `qc_pkg::NCPU`. The external address width `qc_pkg::EXT_AW`
must match `EXT_WORDS`.

## Simulating

With Verilator 5 from the project root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/qc_pkg.sv tb/tb_quadrocore.sv \
          -y rtl --top-module tb_quadrocore -Mdir obj_top
./obj_top/Vtb_quadrocore
```

Use the same command with another `tb_<name>.sv` for a single block.

`tb_quadrocore` runs the cluster at its default sizes, about 450 cycles. It
loads four programs through the host port and takes the cluster through all
three modes:

1. Asynchronous: four simultaneous external stores, with the 6/9/12/15-cycle
   latencies checked. Then local memory, an early-exit multiply, a shared
   register passed from processor 0 to all after a barrier that one
   processor reaches late, published flags and collective branches.
2. Processors 0-2 in lock-step, with the lock-step checked every cycle and
   fixed 9-cycle multiplies. One member's external load stalls the group.
   Meanwhile processor 3 runs a loop asynchronously.
3. All four in SIMD: forwarded instructions, per-processor address offsets,
   a fast load and store of 7 cycles each, and a master branch. Then back to
   asynchronous, where the slaves resume their own streams and write out
   their registers.

The results are read back from external memory and compared. The testbench
also counts how often each mechanism occurred and fails if one never did.

## Workload programs

Six testbenches run small integer kernels: four audio and video building
blocks, the field multiplication behind elliptic-curve cryptography, and
training of a Kohonen self-organizing map. Each writes its data into
external memory through the host port. It runs the kernel on processor 0
alone, then in two or three cluster modes. After every run it checks all
results against a model in the testbench, and it requires the parallel runs
to be faster than the single one. The programs are assembled in the
testbench with the `qc_asm.svh` helpers, so changing a kernel means changing
a few function calls. The kernel sizes are those the paper evaluates, except
for the map, whose size it does not give. The details are this design's
choices: FFT scaling, the sharpening kernel, the evaluation points of the
polynomial and the data.

| testbench | kernel | single | async MIMD | sync MIMD | SIMD |
|---|---|---|---|---|---|
| `tb_wl_convolution` | 50-element array convolved with a 16-element array, 65 outputs | 30032 | 9251 (3.25x) | 13996 (2.15x) | 13996 (2.15x), offset loads |
| `tb_wl_fft` | 16-point fixed-point FFT, real and imaginary arrays, table-driven addressing | 3682 | 1364 (2.70x) | 1924 (1.91x) | 1920 (1.92x) |
| `tb_wl_poly` | degree-16 polynomial with coefficients in memory, 4 points | 1231 | 575 (2.14x) | 983 (1.25x) | - |
| `tb_wl_sharpening` | 3x3 sharpening of the 8x8 interior of a 10x10 image | 3568 | 1211 (2.95x) | 1764 (2.02x) | 1026 (3.48x), fast adjacent access |
| `tb_wl_ecc` | GF(2^233) multiplication: Karatsuba product from 27 carry-less word multiplications, then reduction | 18858 | 5837 (3.23x) | - | 6156 (3.06x), mixed with MIMD |
| `tb_wl_som` | self-organizing map, 16 neurons x 4 dimensions, 4 training steps (sizes are this design's choice) | 10617 | 3323 (3.20x) | - | 4960 (2.14x), mixed with MIMD |

Cycle counts run from the start pulse to the last halt. The sync runs put
the async programs (without their barriers) into lock-step with `RCFG`.
There every round of external accesses waits for the slowest member.

`tb_wl_convolution` also runs groups of two and three processors, using the
processor mask of `RCFG` in SIMD. For two, three and four processors its
async speed-ups are 2.00, 2.69 and 3.25, and its SIMD speed-ups are 1.44,
1.84 and 2.15.

In the async runs the work is split by hand. For example, poly evaluates
four sub-polynomials in x^4 and combines them through the shared registers after a barrier. The
SIMD runs use one program fetched by processor 0. Its single external
accesses reach address + processor number, so data are laid out so that
this offset picks each processor's element. The lock-step poly run shows
that a group in step needs no barrier between writing and reading shared
registers. No data-dependent branch is used in SIMD code, because slaves
follow the master's control flow. For the same reason the sharpening
output is not clamped to 0..255.

In `tb_wl_ecc` the testbench flattens the Karatsuba recursion into a list of
27 leaves. Each leaf multiplies two word operands, each the XOR of some of
the input words. Its 64-bit product is XORed into the result at fixed word
offsets. The word multiplication is a branch-free shift-and-XOR loop, since
there is no carry-less multiply instruction. The mixed run repeats seven
rounds: gather operands asynchronously, switch to SIMD for the 32-step loop,
switch back to accumulate. It is slightly slower than plain MIMD because of
the switches. However, processors 1-3 fetch no instructions during the loops:
the cluster reads its instruction memories 6207 times instead of 16510.
Processor 0 then reduces the product modulo x^233 + x^74 + 1, folding
each upper word down with four shifted XORs. This trinomial is the one
commonly used for a 233-bit binary field; the paper names none.

`tb_wl_som` mixes modes in the same way. The distance and update phases are
identical for every neuron and run in SIMD. The search for the winning
neuron branches on the data and runs in asynchronous MIMD: each processor
finds its local winner, posts it in a shared register and after a barrier
picks the global one. That is four mode switches per training input. The
neighbourhood update is branch-free, using a mask. Each processor learns its
own number by a SIMD load from a four-word table: the address offset gives
each processor a different word. The mixed run fetches 1857 instructions,
against 5480 in MIMD.

## How far this follows the paper

Follows the paper:

* Four processors with a three-stage pipeline, 16-bit instructions and a
  16 x 32 register file.
* 32K local instruction and data memories.
* The three modes and their meaning.
* A multiplexer layer between decode and execute, set by a reconfiguration
  instruction in one cycle.
* A SIMD master forwarding decoded instructions, with the slaves' fetch and
  decode idle.
* Barrier masks and single-cycle barrier release.
* 32 shared registers with per-processor ports and two-cycle access.
* Condition-flag sharing for collective branches.
* A Wishbone shared bus with round-robin arbitration.
* External access of 6 cycles, 15 worst case, and 7 for the fast adjacent
  access.
* Early-exit multiply disabled in lock-step.
* Processor `c` using offset `c` in SIMD.

This design's own choices:

* The whole instruction encoding (the paper keeps the processor's existing
  instruction set but does not list it).
* The layout of the reconfiguration instruction (mode plus processor mask,
  master = lowest processor).
* `RCFG` includes its own barrier. The paper places a barrier instruction
  before the reconfiguration instead.
* How a slave resumes its own stream.
* Slaves ignoring branches.
* Reading "32K" as bytes.
* Word addressing.
* The bus pipeline and the banked memory that produce the 6/7/15 figures.
* The 128-bit Wishbone data path with per-lane selects.
* External memory size (64K words).
* Reset values.
* The host load ports.

Not included:

* The network-on-chip switch boxes that join several clusters.
* The high-speed links to external memory.
* The FPGA prototyping board.
* The compiler that decides where to reconfigure.

Table I of the paper also lists "fast memory access" and "communication via
the shared register file" among the architectural variants. Here they are
instructions that any mode can use, as the text of the paper describes them,
not values of the mode register.

How far to trust it: every block has a randomised or directed self-checking
testbench. The cluster test checks the paper's cycle counts and the results
of all three modes, and six workload programs are checked against models
in several configurations each. The processor is a stand-in for the original
core. Its pipeline depth and latencies match the paper, but code compiled for the
original instruction set will not run on it.
