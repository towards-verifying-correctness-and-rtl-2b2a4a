# Verified building blocks for an out-of-order core

An out-of-order processor is too large to prove correct or timing-safe in one
piece, so the approach behind this RTL is to specify and prove its submodules
one at a time, each behind a small interface of *methods*. This repository
holds the submodules that are defined precisely enough to be built:

| Module | What it is | Role in the core |
|---|---|---|
| `ring_buffer` | 2^N-entry circular queue with squash and in-place update | storage of the reorder buffer |
| `vl_multiplier` | 8 x 8 shift-and-add multiplier whose latency depends only on the first operand | a variable-latency functional unit that leaks nothing about its second operand |
| `dual_rat` | future and commit register-alias tables | the rename map and its rollback on a squash |
| `gcd` | 16-bit subtractive greatest-common-divisor unit | small worked example of the method style |
| `case_study_top` | all four, side by side | top for simulation and synthesis |

The core itself is a variant of the MIPS R10000 scheme: fetch, decode,
rename, issue, five functional units (ALU, MUL, DIV, two load/store), writeback
and in-order retire, around a reorder buffer and a physical register file. It
departs from the R10000 in two ways that make proofs simpler. First, instead of
storing each instruction's previous physical destination in the reorder
buffer, it keeps two alias tables and rolls back by copying one into the
other (`dual_rat`). Second, every speculative load and store is held back
until it is no longer speculative. Only the submodules listed above are
built here. The pipeline stages, the functional units other than the
multiplier, the physical register file and the register-value snapshots are
described only in outline, so they are not included. The top therefore does
not wire the blocks into a pipeline: each block brings its own ports out,
and whatever drives the top plays the part of the missing stages.

## The method interface

Every block is written as a set of methods, in the style of Bluespec:

* An **action method** (for example `enq`, `step`, `squash`) has an enable
  input `<m>_en` driven by the caller and a ready output `<m>_rdy` driven by
  the block. `<m>_rdy` is the method's guard. It is computed from the
  registers only, never from any enable. The method **fires** on a rising
  clock edge where both are high. If the guard is false, the call is
  refused and nothing changes.
* A **value method** (for example `empty`, `first`, `sub`, `result`) is a
  combinational output of the current registers. Where it can fail, such as
  `first` on an empty buffer, it also has a ready output.

All state changes happen on `posedge clk`. `rst` is synchronous and
active-high.

## Ring buffer (`ring_buffer`)

Parameters: `N` address bits, so there are `2^N` slots, and `M` bits per
entry. The defaults are `N = 5` and `M = 128`.

State: the slot array `entries`, plus three control registers. `head` points
at the oldest entry and `tail` at the next free slot. Both are N bits wide
and wrap naturally. `full` is a one-bit flag. The live entries run from
`head` up to, but not including, `tail`, going round the ring.

The subtle point is that `head == tail` happens both when the buffer is empty
and when it is full. The `full` flag tells the two apart:

* `empty = !full && head == tail`
* slot `idx` is **live** when `full`, or when `(idx - head) < (tail - head)`
  in N-bit arithmetic, that is, when its distance from the head is less than
  the number of live entries.

Methods:

| Method | Kind | Guard | Effect / value |
|---|---|---|---|
| `empty`, `full` | value | - | status |
| `first` | value | not empty (`first_rdy`) | `entries[head]` |
| `tail` | value | - | tail pointer |
| `sub(sub_idx)` | value | `sub_idx` live (`sub_rdy`) | `entries[sub_idx]` |
| `enq(enq_e)` | action | not full | `entries[tail] <= e`, `tail <= tail+1`, `full <= (tail+1 == head)` |
| `deq` | action | not empty | `head <= head+1`, `full <= 0` |
| `squash(squash_tail)` | action | `squash_tail` live | `tail <= squash_tail`, `full <= 0` |
| `upd(upd_idx, upd_e)` | action | `upd_idx` live | `entries[upd_idx] <= e` |

`squash` is what a reorder buffer needs on a branch misprediction. The
caller passes the slot of the first instruction to discard. That slot and
every younger one are dropped, and the older ones are kept. Squashing to
`head` empties the buffer. The guard only accepts a live slot, so `squash`
can shrink the buffer but never grow it.

Timing: value methods are combinational. The effect of an action method is
visible in the cycle after the edge where it fires. The caller may enable at
most **one action method per cycle**, and an assertion checks this. If
several are enabled anyway, the buffer applies only one, in the priority
order squash, upd, deq, enq. Slot contents are not reset. A slot outside the
live region is never reported as valid.

Cost: the slots are a plain register array, so one read port for `first`,
one for `sub` and one shared write port for `enq`/`upd`. Gate count grows
linearly with `M` and roughly linearly with `2^N` plus the read
multiplexers. In published synthesis results for this structure, width
mattered more than depth. At N = 7 the multiplexers dominate. The largest
configuration reported, N = 7 with M = 512, did not finish synthesis.

## Variable-latency multiplier (`vl_multiplier`)

The multiplier computes the 16-bit product of two 8-bit operands, one bit of
the first operand per `step`. Its registers are `src1`, `src2`, the
accumulator `dst`, a 3-bit `count` and a `phase`, which is Empty, Busy or
Full (see `vl_mul_pkg`).

* `enq(a, b)`, ready in Empty: `src1 <= a`, `src2 <= b`, `dst <= 0`,
  `count <= 0`, phase becomes Busy.
* `step`, ready in Busy: if `src1 == 0` the phase becomes Full. Otherwise, if
  `src1[0]` is set, `dst` gains `src2 << count`. In both cases `src1` shifts
  right by one and `count` increments.
* `deq`, ready in Full: the product is on `c`, and firing returns the unit to
  Empty.
* `empty_r`, `busy_r`, `full_r` show the phase. Their `*_en` inputs exist in
  the port map but have no effect.

**Why it is built this way.** The number of `step`s from `enq` to Full is
`bitlen(a) + 1`: one step per bit of `a` up to its highest set bit, plus the
step that sees `src1 == 0`. This count does not depend on `b`. The proved
security property follows: suppose an observer sees every method call and
every ready and status signal, but not `b` and not `c`. That observer sees
exactly the same trace whatever `b` is. Operand `a` is public and `b` is
secret. The control registers (`phase`, `count`, `src1`) depend only on `a`.
Only `src2` and `dst` depend on `b`, and these reach no output except `c`.
When you change this module, keep that separation. For example, an early exit
when `src2 == 0` would leak `b` through timing.

The caller decides when to `step`. The unit never steps by itself, so its
latency in cycles is `bitlen(a) + 1` if `step_en` is held high.

## Dual register-alias table (`dual_rat`)

There are two tables from architectural register to physical register,
each with `ARCH_REGS` entries of `clog2(PHYS_REGS)` bits:

* the **future** table holds the newest, speculative mapping. Rename reads
  source mappings from it through `RD_PORTS` combinational read ports, and
  writes each new destination mapping with `ren_en`.
* the **commit** table holds the mapping as of the last retired instruction.
  Retire writes into it with `com_en`.
* `squash` copies the commit table into the future table in one cycle. The
  copy includes a commit write made in the same cycle. A squash overrides a
  rename write made in the same cycle.

This is why the reorder buffer needs no "previous physical register" field.
Rolling back the map is one copy. The full core also restores register
values from a bounded set of snapshots, and the number of snapshots limits
how many branches can be in flight. That part is not included.

Defaults: 32 architectural registers, 64 physical registers, 2 read ports.
At reset, architectural register i maps to physical register i. Reads do not
see writes of the same cycle.

## GCD unit (`gcd`)

This is a small example of the method style. `load(a, b)` is always ready.
`step` is ready while `y != 0`: if `x > y` then `x <= x - y`, else
`y <= y - x`. `result = x` and `finished = (y == 0)`.

## Where this RTL departs from its source, and why

* **Multiplier shift direction.** One listing of the step shifts the
  partial product right by `count`. The prose says left. Only a left shift
  produces the product, so the RTL shifts left.
* **Ring-buffer validity when full.** The stated validity test is
  `(idx - head) < (tail - head)`. When the buffer is full this reads 0 < 0,
  which would refuse `sub`, `upd` and `squash` on a full buffer. The
  abstract specification treats every slot as live when full, so the RTL
  adds `full ||`.
* **GCD comparison.** The source step uses `x >= y`. With that rule a pair
  `(g, g)` becomes `(0, g)`, after which `y - x` never changes `y`, so
  `finished` never rises. The RTL uses `x > y`, so `(g, g)` becomes `(g, 0)`
  and the run ends with `result = g`. A load with `a = 0, b != 0` still never
  finishes, as in the source rule.
* **One action per cycle** on the ring buffer, the **same-cycle rules** of
  `dual_rat` and `gcd` (load beats step), the **reset values** and all
  **encodings** are choices made here. The source describes these blocks one
  method at a time.
* **Sizes not given by the source.** These are the RAT sizes and port count,
  and the default ring-buffer size. The source only sweeps N in {3, 5, 7, 9}
  and M in {32, 128, 512}, and the default of N = 5, M = 128 is taken from
  that sweep.

## Verification

Each testbench compares its block with a reference model written
independently in the testbench. It prints `TB_RESULT checks=<n>
failures=<n>`, and it has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_ring_buffer` | every value method and guard, cycle by cycle, against a queue model, with random enq/deq/squash/upd, some of them on invalid indices, at 32 x 128 and 8 x 32; fails if full, wrap-around, partial squash, squash-to-empty, upd or a refused call never occurred |
| `tb_ring_buffer_sweep` | the same at every size of the synthesis sweep (2^3 to 2^7 slots, 32 to 512 bits, plus 2^9 x 32) |
| `tb_vl_multiplier` | the product, the refused calls in each phase, the step count `bitlen(a)+1`, and that the status and ready trace is identical for `b` and `~b` over random `a` |
| `tb_gcd` | the result against Euclid's algorithm, the exact step count of the subtraction rule, a refused step when finished, a reload mid-run |
| `tb_dual_rat` | every table entry after random rename, commit and squash, including a squash in the same cycle as a commit or a rename |
| `tb_case_study_top` | all four blocks at once through the top at default parameters, 20,000 cycles, with every mechanism above counted |

`rb_checker` (in `tb/`) is the reusable ring-buffer checker that the first
two benches instantiate. The assertions in `ring_buffer` and `vl_multiplier`
check the one-action-per-cycle rules during simulation.

What this does **not** establish: these checks are simulation. The formal
refinement and constant-time arguments were made for models of these
circuits in a proof assistant, not for this SystemVerilog.

## Simulating

With Verilator 5:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    --top-module tb_case_study_top rtl/vl_mul_pkg.sv tb/tb_case_study_top.sv
./obj_dir/Vtb_case_study_top
```

Replace the top module and file with any other bench. Include
`rtl/vl_mul_pkg.sv` whenever the multiplier is part of the build. All
benches finish in well under a second. To change a size, set the parameters
of `ring_buffer` (`N`, `M`), `dual_rat` (`ARCH_REGS`, `PHYS_REGS`,
`RD_PORTS`) or the matching parameters of `case_study_top`.

Lint shows three `UNUSEDSIGNAL` warnings, for `empty_en`, `busy_en` and
`full_en` of the multiplier. These inputs exist only to match the
multiplier's method port map.
