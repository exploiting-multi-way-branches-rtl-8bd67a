# Multi-way branches for a statically scheduled superscalar processor

A superscalar processor that issues N instructions per cycle loses N
instruction slots for every cycle that a branch costs. Non-numerical code has
a branch every three to seven instructions, so that loss adds up quickly. This
design cuts the number of branch operations with **multi-way branches**. All
conditional branches that the compiler puts into one issue bundle are
evaluated at the same time, one per execution unit. The target of the one
branch whose condition holds is loaded into the program counter. If no
condition holds, execution falls through to the next bundle. So a bundle
with k branches behaves like a (k+1)-way switch, and it costs one branch
delay instead of k.

The scheme is meant to work with a compiler transformation that introduces
*shadow variables*. Instructions that sit between two branches, and that the
second branch depends on, are renamed to write shadow registers. They can
then be hoisted above the first branch, and the two branches merge into one
multi-way branch. Compensation copies move the shadow values back. This
transformation is software: the RTL only has to run its output. The example
programs in `tb/` are written by hand in that transformed form.

The RTL is a complete small processor built around the mechanism:
`rtl/mwb_core.sv` and the blocks it instantiates, in synthesizable
SystemVerilog.

## The machine at a glance

* `NUNITS` identical execution units, 4 by default. Builds with 2 units,
  and with 1 unit as a scalar reference machine, also work and are tested.
  Each unit can execute any instruction: ALU, load, store, compare or
  branch.
* The instruction set is Sparc-flavoured, with 32-bit instructions. Each
  cycle one bundle of `NUNITS` instructions is fetched, one per unit. The
  program counter counts bundles.
* The pipeline has five stages: fetch, decode/register fetch, ALU, memory,
  write-back.
* There are no interlocks and no stalls. The compiler (static scheduling)
  owns all timing:
  * **Load delay, one cycle.** The bundle right after a load still reads the
    register's *old* value. From the second bundle on, the loaded value is
    forwarded.
  * **Branch delay, one cycle.** Branches resolve in decode, so exactly one
    bundle (the *delay slot*) is fetched behind a branch bundle before the
    target.
* ALU results are forwarded from the memory and write-back stages. The
  register file is write-through, so no stage needs more forwarding than that.

## How a multi-way branch executes

A compare (`CMP`/`CMPI`, a Sparc `subcc` with no destination register) writes
one of **four condition-code registers**, `cc0` to `cc3`. A branch (`BICC`)
names one of the sixteen Sparc conditions and the cc register it tests.
Sparc has only one set of condition codes, and several independent
compare/branch pairs could not share it. That is why this design has four.

In the decode stage, `multiway_branch_unit`:

1. feeds each slot's branch, with the condition codes it names, to that
   slot's `branch_cond_unit`, so all conditions are evaluated in parallel.
   The codes come from `cc_file`. A compare in the *previous* bundle is in
   the ALU stage at that moment, and its codes are forwarded in the same
   cycle. A branch can therefore follow its compare directly. A compare in
   the *same* bundle is not seen.
2. selects the target `pc_of_branch_bundle + disp` of the branch whose
   condition holds. If none holds, the next PC is `pc + 1`.
3. decides which slots of the delay-slot bundle may run. The bundle is being
   fetched in the same cycle, and it enters decode with the other slots
   cleared.

**Exclusive conditions.** The compiler must group only branches whose
conditions cannot hold together. A good example is `BE`, `BG` and `BL` on
the same compare: this is a three-way branch with no fall-through.

If the rule is broken anyway, the lowest slot wins. `multi_hit` flags the
event. An assertion in `mwb_core` (`a_exclusive_conditions`) also fires,
and the `perf.multi_hit` counter counts it.

### Delay-slot options

The `ds_opt` input selects one of three options at run time:

| `ds_opt` | when a branch is taken | typical use |
|---|---|---|
| 1 `DS_EXECUTE_ALL` | the whole delay-slot bundle executes | code that is useful on every path |
| 2 `DS_SAME_UNIT` | only the delay-slot instruction **in the same unit as the taken branch** executes; the others are nullified | a per-path action, e.g. `a = a-b` under the "greater" branch and `b = b-a` under the "less" branch |
| 3 `DS_NULLIFY_ALL` | the whole delay-slot bundle is nullified | nothing useful to put there |

When no branch is taken, the delay-slot bundle is ordinary sequential code
and always executes in full.

A nullified instruction changes no architectural state: it writes no
register, no cc register and no memory, and it branches and halts nowhere.

Option 2 is the interesting one. Combined with shadow variables, a GCD step
becomes a single loop of three bundles:

```
LOOP:  cmp  cc0,a,b    | sub sa,a,b   | sub sb,b,a   | nop
       be   cc0,DONE   | bg  cc0,LOOP | bl  cc0,LOOP | nop     ; 3-way branch
       nop             | add a,sa,0   | add b,sb,0   | nop     ; delay slot, option 2
DONE:  st   a,[res]    | halt
```

That is three cycles per iteration. The same algorithm without per-unit
delay slots takes five cycles (options 1 and 3, see `tb/tb_mwb_core.sv`).

With two ordinary branches ("equal?", then "greater?") and no multi-way
branch, the loop takes seven cycles per iteration. `tb/tb_workloads.sv`
measures gcd(377, 233) at 94 cycles this way and at 46 cycles with the
multi-way loop.

`tb/tb_speedup.sv` compares with a scalar machine: the same core built with
one execution unit, running an ordinary GCD loop at seven cycles per
iteration. Over its six operand pairs, the scalar machine takes 380 cycles
and the two- and four-unit builds take 192 each, a speedup of 1.97. That
figure belongs to this one small kernel. It is not a prediction for
compiled programs.

## Instruction encoding

All instructions are 32 bits. The encoding is defined in `rtl/mwb_pkg.sv`,
which also has builder functions (`enc_r`, `enc_i`, `enc_st`, `enc_cmp`,
`enc_cmpi`, `enc_br`).

| bits | field |
|---|---|
| 31:26 | opcode |
| 25:21 | `rd`, or the cc register of a compare |
| 20:16 | `rs1`, or the cc register a branch tests |
| 15:11 | `rs2` (register forms; store data) |
| 15:0 | signed 16-bit immediate: ALU immediate forms, load offset, `SETHI` value (`rd = imm << 16`), branch displacement in bundles |
| 10:0 | signed store offset |
| 25:22 | branch condition, Sparc `Bicc` numbering (`BN`=0 … `BA`=8 … `BVC`=15) |

The operations are:

* `ADD SUB AND OR XOR SLL SRL SRA`, in register and immediate forms.
* `LD rd,[rs1+imm]` and `ST rs2,[rs1+imm]`: 32-bit words, byte addresses,
  with the low two bits ignored.
* `CMP`/`CMPI` and `BICC`.
* `SETHI`, `NOP` (all zeros) and `HALT`.
* Undefined opcodes act as `NOP`.
* `r0` always reads zero.

If several instructions of one bundle write the same register or cc
register, the highest slot wins. Schedules should avoid this.

## Module map

| module | role |
|---|---|
| `mwb_pkg` | types, opcodes, Sparc conditions, delay-slot options, event counters, instruction builders |
| `mwb_core` | the processor: pipeline registers, fetch control, halt, counters, assertion |
| `imem` | bundle-wide instruction memory (`IMEM_DEPTH` = 256 bundles), combinational fetch, load port |
| `insn_decoder` | one per slot: instruction to control fields |
| `regfile` | 32 × 32-bit registers, 2 reads and 1 write per unit, write-through |
| `cc_file` | 4 condition-code registers, compare writes forwarded to branch reads in the same cycle |
| `branch_cond_unit` | one per slot: Sparc `Bicc` condition test |
| `multiway_branch_unit` | parallel evaluation, target selection, delay-slot mask |
| `bypass_unit` | two per slot: operand forwarding that respects the load delay |
| `exec_unit` | one per slot: ALU and compare condition codes |
| `dmem` | data memory (`DMEM_WORDS` = 1024) with one port per unit and a debug port |

## Interface and timing of `mwb_core`

* `clk`, `rst_n`: asynchronous active-low reset. While reset is low, the
  PC, registers, cc registers and counters are cleared.
* `prog_we`, `prog_addr`, `prog_bundle[NUNITS]`: write one bundle into
  `imem`. Slot 0 is the low word. Program loading is normally done during
  reset.
* `dbg_we`, `dbg_addr`, `dbg_wdata`, `dbg_rdata`: word access to `dmem` at
  any time. The read is combinational.
* `ds_opt`: the delay-slot option. Keep it stable while a program runs.
* `halted`: rises when the bundle holding `HALT` has written back. Other
  instructions in that bundle complete normally. The bundle fetched behind
  it is dropped. The core then idles until the next reset.
* `perf` (`perf_t`): counters that run from reset release to halt:
  * cycles, bundles, instructions;
  * branches evaluated, multi-way bundles (two or more branches), branch
    actions taken;
  * nullified delay-slot instructions;
  * operands forwarded from the memory stage and from write-back;
  * branches that used same-cycle cc forwarding;
  * multi-hit violations.

A program's first bundle is fetched in the first cycle after reset release.
A bundle finishes write-back four cycles after it was fetched.

## Verification

Every block has a self-checking testbench in `tb/`. Each one compares the
block's outputs with values the testbench computes independently.

* `tb_branch_cond_unit`: all 16 conditions × all 16 cc values. It also
  checks the signed/unsigned meanings on real subtractions.
* `tb_multiway_branch_unit`: random bundles under all three options,
  including cases that break the exclusivity rule.
* `tb_exec_unit`, `tb_insn_decoder`, `tb_regfile`, `tb_cc_file`,
  `tb_bypass_unit`, `tb_imem`, `tb_dmem`: random stimulus against shadow
  models.
* `tb_mwb_core`: end-to-end at the default size (4 units). It runs:
  * GCD under each delay-slot option;
  * binary search in a 16-entry table, using a three-way branch and
    option-2 delay slots for the `lo`/`hi` updates;
  * a pipeline program for the load delay slot and both forwarding paths.

  It checks the results, the cycles per loop iteration (3 for option 2,
  5 for options 1 and 3), and that every mechanism happens at least once:
  multi-way branches, fall-through, nullification under options 2 and 3,
  delay-slot execution under option 1, both forwarding paths, cc
  forwarding, the load delay and halt.
* `tb_mwb_core_2u`: the two-unit configuration. It runs a two-way-branch
  GCD whose delay slot holds `a-=b` in unit 0 and `b-=a` in unit 1.
* `tb_workloads`: more hand-scheduled kernels on the default core. Each
  result is compared with the testbench's own, and fixed-cost loops have
  their cycles per iteration checked. It runs:
  * Fibonacci, at 3 cycles per step;
  * the minimum of an array, at 7 cycles per element. The `min = x` update
    sits in the option-2 delay slot of the "less" branch;
  * string compare, with a two-way branch that falls through while the
    characters are equal;
  * bucket sort of small keys;
  * pattern match: after a mismatch, a two-way branch separates "pattern
    ended, found" from "try the next position", and the option-2 delay slot
    advances the position only in the second case;
  * linear list search in shadow-variable form. `ptr->next` is loaded into
    a shadow pointer before the "found?" test;
  * binary tree search in shadow-variable form. Both children are loaded
    into shadow pointers before the three-way `= / < / >` branch, and the
    per-unit delay slot commits the chosen one.

  Loads through a NULL pointer do no harm here, because the core has no
  traps.
* `tb_speedup`: a one-unit, a two-unit and a four-unit core side by side,
  running GCD from the same data. It checks each result, each machine's
  cycles per iteration (7, 3 and 3), and that the wide machines are faster.
  It also prints the speedups.
* `tb_workloads2`: three more benchmark kernels, run on the default core
  and checked against the testbench's own results:
  * all-pairs shortest paths (Floyd-Warshall) on 5 and 6 nodes. The
    option-2 delay slot of the "less" branch stores the shorter distance;
  * in-order binary tree traversal with an explicit stack. The left child
    is loaded into a shadow pointer before the NULL test, and a two-way
    branch separates "stack empty, done" from "pop";
  * bottom-up merge sort of 16 keys. Each merge step is a two-way `<= / >`
    branch on the two run heads, and its per-unit delay slot stores the
    chosen head.

To run one with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mwb_pkg.sv tb/tb_mwb_core.sv \
          --top-module tb_mwb_core -o sim
./obj_dir/sim
```

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## What is specified and what is this design's own

**Taken from the scheme:**

* several branches of a bundle evaluated concurrently in their execution
  units;
* the target of the satisfied branch loaded into the PC, with fall-through
  when none holds;
* the rule that at most one condition holds;
* the three delay-slot options;
* the five named pipeline stages, with one-cycle load and branch delay;
* static scheduling;
* a Sparc-derived instruction set;
* 2 or 4 execution units, compared with the same machine reduced to one
  unit.

**Chosen here:**

* the exact instruction encoding;
* four condition-code registers named by compares and branches;
* branch displacements counted in bundles;
* homogeneous units, each with its own data-memory port;
* forwarding paths and same-cycle cc forwarding;
* lowest-slot priority when the exclusivity rule is broken;
* full execution of the delay slot on fall-through under options 2 and 3;
* the memory sizes;
* `HALT`, the load and debug ports, and the event counters.

**Left out:** register windows, traps and precise exceptions, multiply and
divide, and sub-word loads and stores. Speculatively hoisted loads therefore
never fault. The shadow-variable scheme would otherwise need hardware to
suppress false traps, or would have to avoid hoisting loads and divisions.

## Limits

* A branch inside a delay-slot bundle that executes behaves as usual: the
  bundle at the first branch's target then becomes its delay slot. Schedules
  normally keep branches out of delay slots.
* The instruction set is a subset, with no compiler or assembler. The
  benchmark programs that the scheme was originally measured on (compiled C
  code) cannot be run as such. Instead, each of the ten benchmarks has a
  hand-scheduled kernel of its core loop, at test sizes of this design's
  choosing.
* The memories are flat arrays with combinational reads. They model
  single-cycle memory stages, not a cache hierarchy.
