# 1-cycle timing-error correction for voltage-scaled pipelines

A pipeline that runs at a supply voltage low enough for some stages to miss
their clock edge now and then. Each stage register keeps a second, late-sampling
copy of its data (a shadow latch, as in Razor). When the two copies disagree,
the stage has a timing error. Plain Razor-style schemes replay instructions or
flush the pipeline. This design instead fixes the error **in place, at a cost of
one clock cycle**. Errors that overlap in time, at the same stage or at different
stages, share that one cycle. This matters because just below the critical
voltage errors come in bursts. A correction scheme that pays per error, or that
can handle only one error at a time, stops the voltage from going lower.

Two pipelines are provided:

* `ctec_pipeline`: a linear chain of `N_STAGES` stages (5 by default; 10 was
  also evaluated). Each stage's logic is a 16 × 16 multiplier, the function of
  the ISCAS'85 c6288 benchmark.
* `ctec_graph_pipeline`: the same method extended to stages with several input
  and output stages and to loops, using *virtual errors*.

`ctec_top` places both side by side.

## The stage register: main latch, shadow latch, restore cycle

`razor_reg` holds two words per stage:

* **main**: sampled at the clock edge. It drives the next stage.
* **shadow**: clocked so that it opens only after main has closed. It therefore
  still catches a late result.

A difference between the two (`mismatch`) is a timing error. The key property is
the **restore operation**. In one edge, main takes the shadow's correct word and
the shadow takes the stage logic's next result. No input word is dropped, so
nothing upstream has to stop.

The controller sends the register one of four commands per edge:

| command   | main        | shadow       | used for                                   |
|-----------|-------------|--------------|--------------------------------------------|
| `HOLD`    | keeps       | keeps        | clock gated                                |
| `CAPTURE` | new result* | new result   | normal operation                           |
| `RESTORE` | ← shadow    | new result   | after an error, and in error-free mode     |
| `DRAIN`   | ← shadow    | keeps        | leaving error-free mode (hands on the extra word) |

\* On a `CAPTURE` edge, the `late` input makes main keep its old value: this is
how a timing violation is modelled. If the old and new words are equal, main is
still right and no error is flagged, which is also true of the real circuit.

## How one error is corrected (linear pipeline)

The example below uses 5 stages, S0 to S4. S1 misses its edge, and the error is
seen in cycle 1.

| cycle | S1                                   | S2                 | S3        | S4        | output          | input          |
|-------|--------------------------------------|--------------------|-----------|-----------|-----------------|----------------|
| 1     | **error**: main wrong, shadow right; sends CG | computes from a wrong word | | | | taken |
| 2     | restore → **error-free mode**        | gated (holds)      |           |           |                 | taken          |
| 3     | error-free                           | back to normal     | gated     |           |                 | taken          |
| 4     | error-free                           |                    |           | gated     | **bubble** (`out_valid=0`) | taken |
| 5     | **drained** → normal                 |                    |           |           |                 | **stall** (`in_ready=0`) |

The main ideas:

* **CG wave.** A stage with an error, or a stage whose clock was just gated,
  raises CG (clock gating) toward its output stage. The receiving stage does not
  take new data at the next edge. Its output then repeats, so it raises CG in
  turn. The wave moves one stage per cycle and leaves the pipeline as one bubble
  at the output.
* **Error-free mode.** After the restore, the erring stage holds one extra word:
  main has word *i* and the shadow has word *i+1*. Each cycle it moves shadow to
  main and takes the new result into the shadow. The logic result then only has
  to meet the shadow's later sampling time, so no timing error can occur in this
  mode. Violations injected into a stage in this mode are ignored, and the
  mismatch is expected rather than flagged.
* **Stall.** One cycle after a CG wave leaves the last stage, `stall_ctrl` stops
  the input for one cycle. The first stage (counting from the input) that is in
  error-free mode, or in error, and is not receiving CG in that cycle drains its
  extra word. Every stage before it holds. Stages after it keep running.

The net cost is one output cycle per correction. The last result of a stream of
*M* words appears at *M − 1 + N_STAGES + (number of corrections)* cycles.

## Several errors, one cycle

* **Same stage.** While S1 is in error-free mode it cannot fail again, so a
  second violation there costs nothing extra. A scheme that handles one error
  at a time would pay twice.
* **Different stages.** When a CG wave reaches a stage that is in error-free
  mode, that stage hands on its extra word instead of being gated
  (`absorb`, `DRAIN`). The wave ends there. Two errors whose waves meet
  therefore leave only one wave and cost one cycle. The same holds when the wave
  reaches a stage that is itself in error: it restores, and only its own wave
  continues.

**Invariant.** The number of stages in error-free mode always equals the number
of waves still travelling plus the stalls still owed. Every stall therefore finds
a stage to drain; `stall_ctrl` asserts this. The stall may drain a stage that is
*in error* rather than one in error-free mode. This is needed when that stage sits
just before the only stage in error-free mode: its own CG ends at that stage in
the same edge.

## Graphs: fan-in, fan-out and loops (`ctec_graph_pipeline`)

In a graph, CG cannot be a single bit per stage. Suppose stage D has inputs B and
C, and only B sends CG. If C simply moves on, D loses C's word. The fix is a
**virtual error** (VE) at C: C keeps its word in main for one more cycle, as it
would after a real error. Its new result goes into the shadow, and C enters
error-free mode.

This implementation tracks, for every link *i → k*, whether *k* has already
used the word now in *i*'s main (`cons_q[i][k]`):

* **CG on a link** = `err[i] | cons_q[i][k]`: the word is wrong, or it is a
  repeat for that consumer.
* **Fire.** A stage fires (takes a new result) when none of its input links
  carries CG and it has room.
* **Virtual error.** A stage that fires while some consumer still needs its main
  word gets a VE (`ve`). That consumer did not fire because it received CG from
  another input. The stage keeps main, the shadow takes the result, and it enters
  error-free mode.
* **Loops.** A stage in error-free mode whose main word has been used by every
  consumer, and which does not fire, drains. This is where CG waves stop, also
  when a wave comes back around a loop.
* **Stall.** The output is one more consumer of the sink stage. A cycle with no
  new result is an output bubble. A counter tracks the output bubbles that have
  not yet been matched by an input cycle in which the source stage did not fire.
  Whenever the counter is non-zero, the primary input carries CG for a cycle
  (`in_ready=0`). That bubble travels into the graph and is taken up by a stage
  in error-free mode. Matching against input cycles matters for loops: a VE that
  reaches the input there already costs an input cycle, so a second stall would
  be one too many.
* **Room.** A stage in error-free mode fires only if each consumer has used its
  word or is certain to fire this cycle. This keeps the control free of
  combinational loops. In rare cases it costs an extra bubble, never data.

The default graph is A→B, A→C, B→D, C→D, D→E, E→C, E→F. It has:

* fan-out at A and E;
* fan-in at C and D;
* a loop C→D→E→C;
* stages before (A, B), inside (C, D, E) and after (F) the loop.

Stage A takes the primary input and F is the output. A stage with several inputs
multiplies the sum of its input words. Its valid bit is the OR of its inputs'
valid bits.

In simulation, a single error anywhere in this graph costs exactly one output
bubble. Errors at both inputs of D in the same cycle also cost one.

## Modules

| file | role |
|------|------|
| `rtl/ctec_pkg.sv` | `reg_op_e`, the register command |
| `rtl/mult16_stage.sv` | stage logic: `y = x[31:16] * x[15:0]` (c6288 function) |
| `rtl/razor_reg.sv` | main/shadow register with restore and drain |
| `rtl/cg_stage_ctrl.sv` | per-stage CG / error-free-mode controller (linear) |
| `rtl/stall_ctrl.sv` | stall after a wave leaves the last stage; picks the stage to drain |
| `rtl/ctec_pipeline.sv` | linear pipeline: `N_STAGES` × (logic, register, controller) + stall |
| `rtl/ctec_graph_pipeline.sv` | graph pipeline; graph set by `ADJ`, `SRC`, `SINK` |
| `rtl/ctec_top.sv` | both pipelines, ports `lin_*` and `g_*` |

### Linear pipeline interface and timing

* **Input.** `in_valid`/`in_data` are taken at every rising edge where
  `in_ready` is 1. `in_ready` is 0 only in a stall cycle. A word with
  `in_valid=0` travels as a bubble.
* **Violations.** `late[j]`: stage *j* misses its main latch at the next edge.
  This input stands for the delay that the lowered supply voltage causes. It has
  an effect only on a normal capture.
* **Output.** `out_valid`/`out_data` give the results in order. Latency is
  `N_STAGES` cycles while no correction is under way.
* **Status.** `err`, `cg`, `ef`, `gated`, `absorb`, `stall`. `gated[0]` and `absorb[0]` are always 0: the first stage has no stage before it to send it CG.
* **Reset.** Asynchronous, active low (`rst_n`). It clears all latches and modes.

The graph pipeline has the same input, output and `late` ports, plus:

* `out_fresh`: a new result, valid or not;
* per-stage `fire`, `ve`, `ef`, `err` and `absorb`.

Its latency depends on the graph.

## What is modelled, and what is not

* **Latches and their clocks.** The main and shadow latches, their pulsed clocks
  (about 105 ps and 400 ps pulses in a 45 nm library) and the hold-fix buffers
  are physical. Here they are two edge-triggered registers on one clock. The
  cycle-level behaviour, including "the shadow sees the late result", is the
  same. The timing itself is not modelled: `late` says when a violation happens.
* **Clock gating.** Gating is written as register enables. An implementation
  would map these to integrated clock-gating cells.
* **Voltage.** No voltage controller is included. The pipeline exposes its error,
  stall and mode signals for one.
* **Stage logic.** Only c6288 (a 16 × 16 multiplier) is provided as stage
  logic, written as `*`. Its gate-level array structure is not reproduced. The
  other two benchmark circuits used in the evaluation are not included: c1908
  (an error-correcting-code circuit) and c3540 (an ALU). Their netlists are
  external benchmarks.
* **Chaining.** Each stage's 32-bit product is split into the next stage's two
  16-bit operands. The original experiments did not define how stages pass data
  to each other.
* **Energy and voltage results.** The energy and voltage figures of the original
  evaluation come from circuit simulation. They cannot be reproduced from RTL.
  The RTL reproduces the throughput side: one cycle per correction, however
  many errors it covers.

**Departures and choices of this design.**

* Which stage the stall drains, and that the stall comes one cycle after the wave
  leaves the last stage. This timing gives error-free mode from the cycle after
  the error up to and including the stall cycle.
* That a wave also stops at a stage that is itself in error.
* In the graph version: per-link use flags, the stall counter and the room rule.
* The valid bit, the input handshake and the reset.

## Verification

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M` and
has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_ctec_top` | both pipelines at default size: every result against independent models, one-cycle cost of an isolated error, stall one cycle after each bubble; each mechanism (error, CG propagation, error-free mode, ignored violation, wave stop, stall, virtual error) must occur |
| `tb_ctec_pipeline` | linear pipeline: exact extra cycles for no error (0), one error (1), a repeated violation at a stage in error-free mode (1), two stages in one cycle (1), last stage (1), two separate errors (2); then 4000 random cycles with 12 % violations per stage |
| `tb_ctec_graph_pipeline` | graph pipeline against an error-free copy of the graph stepped once per result: one error at each of A–F and two at the inputs of D each cost exactly one bubble; 6000 random cycles |
| `tb_ctec_graph_shapes` (with helper `graph_shape_run`) | graph pipeline with other graphs through its parameters: a 10-stage chain, a diamond (fan-out then fan-in) and two loops sharing stages; 3000 random cycles each at 4 % violations, every result against an error-free copy; each must see real and (where stages have two inputs) virtual errors and end in normal mode |
| `tb_ctec_workload` | the evaluated setups: 5 and 10 stages, 100 random vectors, violation rates giving throughputs near 0.9 and 0.7; checks every result and that cycles = vectors + stall cycles |
| `tb_razor_reg`, `tb_cg_stage_ctrl`, `tb_stall_ctrl`, `tb_mult16_stage` | each block against a reference model kept in the testbench |

Throughputs from one run of `tb_ctec_workload`, 100 vectors each:

| stages | violations per stage per cycle | throughput | timing errors | stall cycles | error-free cycles per stage |
|--------|--------------------------------|------------|---------------|--------------|-----------------------------|
| 5      | 2 %                            | 0.935      | 10            | 7            | 5.4                         |
| 5      | 16 %                           | 0.741      | 69            | 35           | 17.8                        |
| 10     | 1 %                            | 0.952      | 8             | 5            | 3.5                         |
| 10     | 9 %                            | 0.800      | 55            | 25           | 16.6                        |

At the high rates, many more errors are corrected than stall cycles are paid.
The time a stage spends in error-free mode follows its own violation rate
here. The original evaluation reports that this time grows with the number of
stages at the voltage it chose for each pipeline. That trend comes from how
path delays change with the supply, which this cycle-level model does not
include.

**Running a testbench** with Verilator 5:

```
verilator --binary --timing --assert -y rtl -y tb --top-module tb_ctec_top \
          rtl/ctec_pkg.sv tb/tb_ctec_top.sv
./obj_dir/Vtb_ctec_top
```

Replace `tb_ctec_top` with any other testbench name. The design is plain
synthesizable SystemVerilog. The only assertion in the RTL is in `stall_ctrl`.

## Changing it

* **Linear stage count.** `ctec_pipeline #(.N_STAGES(10))`.
* **Another stage function.** Replace `mult16_stage` in the stage generate
  loops. The control does not look at the data, except for the main/shadow
  comparison.
* **Another graph.** Set `ctec_graph_pipeline`'s `N_STAGES`, `ADJ` (bit
  `i*N_STAGES+k` set for a link *i → k*), `SRC` and `SINK` together. The graph
  needs one source stage fed by the input and one sink stage driving the output.
  In `ctec_top`, `G_STAGES` must match the graph.
