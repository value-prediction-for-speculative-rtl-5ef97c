# Increment and hybrid increment-context value prediction for loop-trace threads

A speculative multithreaded processor runs successive iterations of an
innermost loop as parallel threads, one per thread unit. Each iteration (a
*loop trace*) usually reads registers that the previous iteration wrote, so
without help the threads wait on one another. If the unit that spawns the
threads can predict the values those registers will hold at the end of each
trace, the next thread can start from the predicted values and run as if it
were independent.

This RTL is that prediction unit. Its central idea is the **increment
predictor**: instead of learning, per instruction, the stride between two
successive results (which breaks when different paths of the loop write the
same register), it learns, per *trace and register*, how much the register
changes between the start and the end of the trace:

    predicted end value = value at trace start + increment(trace, register)

A **hybrid** adds a context-based (finite context method) predictor for
values that repeat in a pattern rather than grow, and picks between the two
with confidence counters. The default build is the hybrid with 1024 entries
per table; a parameter turns it into the increment predictor alone with 4096
entries. Both are configurations of roughly 16 KB that were evaluated for a
four-thread-unit clustered speculative multithreaded processor.

## Why per-trace increments work

Take a loop with two paths, A and B. Path A adds 4 to register Ri, path B
adds 100. The iterations run A, A, B, A:

| iteration | trace | Ri at end |
|-----------|-------|-----------|
| 1 | T_A | Ri_1 |
| 2 | T_A | Ri_2 = Ri_1 + 4 |
| 3 | T_B | Ri_3 = Ri_2 + 100 |
| 4 | T_A | Ri_4 = Ri_3 + 4 |

A stride predictor attached to the instruction on path A that writes Ri
predicts Ri_4 as Ri_2 + 4 and misses, because it never saw path B's write.
The increment predictor keeps separate increments for (T_A, Ri) and
(T_B, Ri) and predicts Ri_4 = Ri_3 + increment(T_A, Ri), which is right.

Predictions chain. When thread 4 is spawned, thread 3 is usually still
running, so Ri_3 is itself the prediction made for thread 3 (Ri_2 +
increment(T_B, Ri)). The unit therefore takes the start value as an input
and does not care whether it is real or predicted; the spawning logic feeds
each thread's predicted outputs into the next thread's request.

## The increment table (`incr_predictor`)

Each entry, selected by a (trace, register) index, holds:

| field | bits | meaning |
|-------|------|---------|
| `pinc` | 16, signed | increment used for prediction |
| `linc` | 16, signed | increment seen in the most recent run |
| `conf` | 3 | up/down saturating confidence counter |

On **update** (a trace has finished and both its start and end values are
known) the unit computes `d = end - start` and:

* replaces `pinc` by `d` only if `d` equals `linc`, i.e. the same new
  increment was seen in two consecutive runs, and only if `d` fits in 16
  signed bits;
* stores `d` (its low 16 bits) in `linc`;
* counts `conf` up if `start + pinc` had equalled `end`, down otherwise.

The two-in-a-row rule keeps a single odd iteration (an early exit, a
boundary case) from disturbing a good increment. An entry starts at zero,
so a register never seen before is predicted unchanged.

Two 16-bit increments per entry make 4 bytes, which is what 4096 entries in
a 16-KB budget allow. Increments that do not fit cannot be learnt; such a
register simply keeps being mispredicted, which costs accuracy but never
correctness, since the thread units verify every prediction.

## The context table (`fcm_predictor`)

For values that cycle (a state variable, a pointer that walks a short list)
an increment is useless. The context predictor keeps, per (trace,
register), the last three end values in a Value History Table (VHT). The
three values are shifted left by 0, 2 and 4 bits (newest unshifted), xor-ed
together and folded into a 10-bit index of a Value Prediction Table (VPT),
which holds the value that followed that history last time. On update the
VPT entry of the old history receives the new value and the history shifts
it in. Because the history is kept per trace, each path of a loop gets its
own value sequence. The VHT entry also carries this component's 3-bit
confidence counter.

## Choosing between them (`hyb_i_predictor`)

Both components are read with the same index in the same cycle. The one
whose confidence counter is higher supplies the prediction; on a tie the
increment component wins. Each counter is trained on whether its own
component would have been right, whichever one was chosen.

## Naming a trace (`trace_index`)

A trace is identified by the address of its first instruction plus the
vector of outcomes of the conditional branches it executed; two paths of
the same loop differ in the vector. This is a pseudo-identifier: paths that
differ only in the target of an indirect jump look the same. The index is

    mix = (pc >> 2) ^ (branch_vector << 6) ^ register
    idx = xor of all IDX_W-bit slices of mix

Tables are direct-mapped and untagged: two (trace, register) pairs that
collide share an entry, which again affects only accuracy.

## Interface and timing of the top, `csm_value_predictor`

| group | signals | notes |
|-------|---------|-------|
| control | `clk`, `rst_n` (async, active low), `ready` | `ready` rises after the tables are cleared: 1024 cycles (4096 with `HYBRID=0`) |
| predict | `pred_req`, `pred_pc[31:0]`, `pred_br[15:0]`, `pred_reg[5:0]`, `pred_base[63:0]` | issued at thread spawn; `pred_base` is the register's start value, real or predicted |
| answer | `pred_vld`, `pred_val[63:0]`, `pred_src` | one cycle after the request; `pred_src` is 0 for increment, 1 for context |
| train | `upd_req`, `upd_pc`, `upd_br`, `upd_reg`, `upd_base`, `upd_actual` | issued when a trace commits, with its real start and end values |
| result | `upd_vld`, `upd_incr_hit`, `upd_fcm_hit` | one cycle later: whether each component had the value right |

One prediction and one update can be issued every cycle. They use separate
read ports; the table write happens at the end of the update cycle. A
prediction and an update of the same entry in the same cycle: the
prediction sees the entry before the update. Requests before `ready` are
ignored (`*_vld` stays low).

Parameter `HYBRID` (default 1) selects the configuration:

| `HYBRID` | predictor | entries | storage as built |
|----------|-----------|---------|------------------|
| 1 | increment + context, confidence choice | 1024 per table | 4.4 KB increment table, 24.4 KB VHT, 8 KB VPT |
| 0 | increment alone | 4096 | 17.5 KB |

The sub-blocks take `ENTRIES` (a power of two) directly, so other
capacities (for example 256 entries, a 1-KB increment table) are one
parameter away.

## What is not here

The unit is one part of the processor's thread speculation logic. The rest
of the processor is outside this RTL and must be supplied by the user:
thread units (superscalar-like cores with their own rename map, instruction
queue, registers, functional units and reorder buffer), the ring that
connects them, the live-in register file through which unpredicted values
pass, the multi-value cache that handles memory dependences between
threads, instruction fetch, the loop-iteration table that picks spawn
points, and the logic that checks predictions and recovers from a wrong one
(the evaluated machine charges one extra cycle for that). Memory values and
trace inputs are not predicted; only register values at trace end are.

The baselines the increment predictor was measured against (last value,
stride and the stride-context hybrid) are not included, nor is indexing by
instruction address.

## Design choices not fixed by the predictor scheme

These are this implementation's own and are the first things to revisit:

* value width 64 bits (Alpha-style integer registers), register number 6
  bits, start address 32 bits, branch vector 16 outcomes (`vp_pkg`);
* 16-bit stored increments and the "never promote a non-fitting increment"
  rule;
* full 64-bit values in the context tables, which makes the hybrid about
  37 KB instead of the 16 KB it was sized for; 32-bit stored values would
  bring it close to that budget;
* the index hash, the fold of the context hash to 10 bits, the tie rule in
  the chooser, the placement of the context counter in the VHT;
* the one-cycle predict latency, the same-cycle read-before-write rule and
  the clear walk after reset.

## Files

| file | contents |
|------|----------|
| `rtl/vp_pkg.sv` | widths, types, counter and increment helper functions |
| `rtl/trace_index.sv` | trace-based index fold |
| `rtl/incr_predictor.sv` | increment predictor table |
| `rtl/fcm_predictor.sv` | context-based predictor (VHT + VPT) |
| `rtl/hyb_i_predictor.sv` | hybrid of the two with confidence choice |
| `rtl/csm_value_predictor.sv` | top: indexing plus predictor |
| `tb/vp_ref_pkg.sv` | reference models used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus two end-to-end |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops; a
watchdog ends a hung run with a failure. Build and run one with, for
example:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_csm_value_predictor \
        -y rtl -y tb +libext+.sv rtl/vp_pkg.sv tb/vp_ref_pkg.sv tb/tb_csm_value_predictor.sv
    ./obj_dir/Vtb_csm_value_predictor

* `tb_trace_index`: random identifiers against a per-bit parity model.
* `tb_incr_predictor`, `tb_fcm_predictor`, `tb_hyb_i_predictor`: random
  predict and update traffic from simulated register streams, every answer
  checked against a reference model one cycle after its request; they also
  require that promotions, held-back increments, too-wide increments,
  saturated counters, both chooser outcomes and ties actually occurred.
* `tb_csm_value_predictor` (default configuration) and
  `tb_csm_value_predictor_incr` (`HYBRID=0`): a loop of 3000 iterations with
  two paths run as threads on four modelled thread units. Each spawn
  predicts four registers from the previous thread's predicted values
  (chaining); each commit trains the unit; a wrong prediction makes the
  younger threads predict again from the real value. The registers cover
  the path-dependent increment case above, a plain increment, a repeating
  three-value sequence and random values. The tests count chained
  predictions, correct predictions across a path switch, choices of each
  component, re-predictions and same-cycle predict/update collisions, and
  fail if any never happened.

* `tb_table_capacity` (with its helper `tb_cap_lane`): one synthetic
  workload of 40 two-path loops and eight registers each (640 trace and
  register pairs) run through hybrids of 256, 1024 and 4096 entries per
  table, each beside an increment predictor of four times as many entries.
  Every answer is checked against the models, and the largest tables must
  be more accurate than the smallest, since the small ones alias. It prints
  the accuracy of each size.

All testbenches run in seconds at the default sizes.
