# One-cycle timing-error correction for pulsed-latch Razor pipelines

Lowering the supply voltage saves power but slows every gate. Instead of
keeping a worst-case margin, a *timing-speculative* pipeline runs at a voltage
where an occasional path is too slow, detects each late arrival, and repairs
it. This RTL implements such a pipeline built from pulsed Razor latches, with a
correction scheme whose cost is one clock cycle per error, regardless of the
pipeline depth, and which also works when stages fan in, fan out or form loops.

The default configuration is a five-stage linear pipeline of 32-bit words whose
stage logic is a 16x16 multiplier (the function of the ISCAS-85 c6288 circuit).

## The Razor latch

Each bit of a stage register has two latches fed by the same data:

* the **main latch**, opened by a short pulse `clk_m` (130 ps) after the
  rising clock edge. Its output feeds the next stage;
* the **shadow latch**, opened by a longer pulse `clk_s` (430 ps). Data that
  arrives after the main pulse has closed but before the shadow pulse closes is
  still caught by the shadow.

When the two disagree (`error` = XNOR of the main output and the inverted
shadow node), the main latch holds a wrong value and the shadow the right one.
A multiplexer in the main latch's feedback loop lets the main latch take the
shadow value (`restore`) while its own pulse is gated.

`rtl/razor_latch.sv` is this cell at latch level and `rtl/pulse_gen.sv` a
behavioural model of the gated pulse generators (the width is a delay, so it is
not synthesizable). `tb/tb_razor_latch.sv` runs them with a 1.5 ns clock and
shows normal capture, a late arrival caught by the shadow only, the error flag,
restore, and the gating of each pulse.

The pipeline itself uses a cycle-level equivalent, `rtl/razor_reg.sv`: one
rising edge of `clk` stands for one main pulse plus one shadow pulse. The
enables `en_m`, `en_s` and `restore` select one of four actions per edge:

| action       | main latch             | shadow latch |
|--------------|------------------------|--------------|
| capture      | takes d                | takes d      |
| gate main    | keeps                  | takes d      |
| hold         | keeps                  | keeps        |
| restore      | takes the shadow value | keeps        |

RTL has no path delays, so a timing error is injected: `tmg_fault` makes the
next normal capture store `d ^ FAULT_MASK` in the main latch while the shadow
stores `d`. In silicon this input is tied low.

## The correction protocol: CG and MCG

Each stage has a small controller, `rtl/ec_ctrl.sv`. Two one-bit requests
travel between neighbouring stages and each acts at the next clock edge:

* **CG** (clock gating) goes *forward*, to the output stages. A stage that
  accepts it gates both pulses for one edge: it stalls, so it does not consume
  a wrong or repeated value.
* **MCG** (main clock gating) goes *backward*, to the input stages. A stage
  that accepts it gates only its main pulse for one edge: the main latch keeps
  the value the stalled consumer still needs, while the shadow latch captures
  the new data arriving from upstream. In the next cycle the stage gates both
  pulses and restores shadow to main, so it has "caught up" without losing the
  word.

Propagation rules, which make the scheme work for any graph:

* a stage that accepts CG from any input sends MCG to **all** its inputs in the
  same cycle, and forwards CG to all its outputs in the next cycle;
* a stage that accepts MCG from any output sends CG to **all** its outputs in
  the next cycle (and MCG to its inputs one cycle later, when it restores).

A stage whose Razor latches flag an error sends CG and MCG at once, gates both
pulses at the next edge and restores its main latches from the shadow. The
error flag in the cycle right after a main-only gating is ignored: there main
and shadow differ on purpose.

### Example

Five stages A to E, stage C fails on the word it captured at edge t:

| after edge | A            | B             | C            | D        | E        |
|------------|--------------|---------------|--------------|----------|----------|
| t          | captures     | captures      | error, CG+MCG| captures | captures |
| t+1        | captures     | main gated    | restores     | stalls   | captures |
| t+2        | main gated   | restores      | captures     | captures | stalls   |
| t+3        | restores     | captures      | ...          |          |          |

The MCG wave walks back to the source (which holds its word for one cycle, see
`in_ready`), the CG wave walks forward to the output, and the output sequence
shows exactly one missing cycle.

### Where the waves stop

Without stop conditions, requests in fan-in/fan-out graphs and loops would
circulate forever. Two rules end them:

* **Meet.** A stage that receives CG and MCG in the same cycle stalls for one
  edge and forwards neither.
* **Cross.** A stage that is sending a request of its own in this cycle (its
  CG, the MCG of its restore cycle, or the cycle after its own error) ignores
  every incoming request. In addition, a stage ignores CG two cycles after it
  accepted MCG: that CG is the echo of its own backward wave coming round.

The node names inside `ec_ctrl` are those of the per-stage control circuit the
scheme is built from: `cg_m` (MCG accepted), `cg_ms` (CG accepted), their
registered copies `cg_mq`/`cg_msq`, `pre_MCG` and `ppre_MCG` (one and two cycles
after an accepted MCG), `error_s`/`pre_error_s` (own error, and one cycle
later), `gated` (requests are accepted), `resb` (restore), and

    gated    = NOR(pre_MCG, CG_out, pre_error_s)
    MCG_out  = cg_ms | error_s | pre_MCG
    CG_out   = error_s | (cg_mq ^ cg_msq)
    EN_clk_m = NOR(cg_m, MCG_out)
    EN_clk_s = NOT MCG_out

`CG_out` depends only on state, so the request network has no combinational
loop even when the stage graph has one.

## Limits of the protocol

The rules above were checked by simulation for: single errors anywhere in
linear pipelines of 5, 8 and 10 stages, in the fan-in/fan-out and loop
examples, and two errors in the same cycle in the cases the stop conditions
are designed for (requests meeting in one stage, requests crossing between two).
In all of these every error costs exactly one output cycle and the output
stream equals that of an error-free pipeline.

**Errors in different stages that come closer together than about N cycles
(N = number of stages) are not always handled.** A CG forwarded by one
correction and a CG raised by a new error are the same signal on the same
wire, so a stage can ignore a real request as if it were an echo, and a word
is lost or duplicated. Random tests therefore space errors at least N+1 cycles
apart (10 cycles were needed for the 10-stage pipeline). Anyone relying on
higher error rates should add a second request type or a sequence tag; this
RTL keeps the one-bit requests.

## Topologies

`rtl/ec_pkg.sv` describes a pipeline by an adjacency matrix `adj_t`:
`ADJ[k][j] = 1` means stage j feeds stage k. Stage 0 takes `in_data`, stage
N-1 drives `out_data`. Stage k's logic is the multiplier applied to the sum of
the words of all its input stages. Helper functions:

* `linear_adj(n)` &mdash; default, 0 &rarr; 1 &rarr; ... &rarr; n-1;
* `fanin_fanout_adj4()` &mdash; A &rarr; B &rarr; C &rarr; D plus A &rarr; D;
* `loop_adj5()` &mdash; A &rarr; ... &rarr; E plus the loop D &rarr; B;
* `fig12_adj(n)` &mdash; linear n = 5, 8, 10 with one skip path 2 &rarr; 4,
  3 &rarr; 6, 3 &rarr; 8 (1-based). The exact end points of these skip paths
  are this design's reading; treat them as examples.

## Top module `ec_pipeline`

Parameters: `N` (stages, default 5, up to 16), `W` (word width, default 32),
`ADJ` (topology, default `linear_adj(N)`).

| port              | dir | meaning |
|-------------------|-----|---------|
| `clk`, `rst_n`    | in  | clock; asynchronous active-low reset (clears latches and requests) |
| `in_data[W]`      | in  | word for stage 0 |
| `in_ready`        | out | stage 0 samples `in_data` at the next edge; low is stage 0's MCG to the source, which must then hold its word |
| `out_data[W]`     | out | main latch of stage N-1 |
| `out_valid`       | out | `out_data` is a new, error-free word |
| `tmg_fault[N]`    | in  | inject a late arrival at a stage's next capture (tie low in silicon) |
| `stage_*[N]`      | out | per-stage error, CG/MCG sent and accepted, nullified request, restore and hold, for observation |

Hierarchy: `ec_pipeline` &rarr; `ec_stage` (`razor_reg` + `ec_ctrl`) and
`stage_logic`. The latch-level `razor_latch` and `pulse_gen` are not
instantiated in the pipeline; they document and test the cell that
`razor_reg` abstracts.

Timing at cycle level: requests are combinational within a cycle and act at
the next edge, so a request crosses two stages per cycle at most (a CG
accepted produces MCG in the same cycle). In silicon this needs the control
path delay to be below half of (clock period - shadow pulse width); that
constraint is not modelled here, nor are the hold-fixing delay buffers that
the 430 ps shadow pulse requires, metastability detection, or SRAM interfaces.

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

    verilator --binary --timing -Wno-fatal --top-module tb_ec_pipeline \
      rtl/ec_pkg.sv rtl/razor_reg.sv rtl/ec_ctrl.sv rtl/ec_stage.sv \
      rtl/stage_logic.sv rtl/ec_pipeline.sv \
      tb/pipe_harness.sv tb/pipe_case.sv tb/tb_ec_pipeline.sv
    obj_dir/Vtb_ec_pipeline

The latch-level testbenches use delays in picoseconds, for example:

    verilator --binary --timing -Wno-fatal --top-module tb_fig8_timing \
      rtl/pulse_gen.sv rtl/razor_latch.sv tb/fig8_circuit.sv tb/tb_fig8_timing.sv

| testbench            | what it shows |
|----------------------|---------------|
| `tb_ec_pipeline`     | default top end to end: the meet and cross double errors, isolated and dense single errors, output compared with an error-free model, one bubble and one source stall per error, and a count of every mechanism (CG, MCG, meet, nullified request, restore, hold, source stall) |
| `tb_ec_topologies`   | fan-in/fan-out (4 stages), loop (5 stages), linear 8 and 10, skip-path variants of 5, 8 and 10 stages |
| `tb_ec_ctrl`         | directed request sequences of one controller, including both stop conditions |
| `tb_ec_stage`        | one stage through error, MCG and CG sequences |
| `tb_razor_reg`       | random enables/restore against a reference |
| `tb_razor_latch`     | latch-level cell with 130/430 ps pulses and a 1.5 ns clock |
| `tb_fig8_timing`     | four latch-level Razor latches with 2.0/1.8/1.7 ns paths and a 1.5 ns clock: widening a main pulse removes errors by time borrowing, but a borrowed late departure can reach the next latch after its shadow pulse and go undetected (shadow constraint `path delay <= Tc + Ws(next) - Wm(this)`) |
| `tb_pulse_gen`       | pulse widths and gating |
| `tb_stage_logic`     | multiplier and fan-in sum against a reference |

`tb/pipe_harness.sv` is reusable: it drives the source, injects errors (fixed
cycles and stage masks, or random with a minimum spacing), checks the output
against a reference and counts the mechanisms; `tb/pipe_case.sv` pairs it with
one pipeline.

## Departures and own choices

* Cycle-level register and controller: every state element is a rising-edge
  flip-flop; the original control circuit mixes latches on both clock phases.
  `restore` is a level for the next edge rather than `CLK AND resb`.
* Reset behaviour, the source handshake (`in_ready`), `out_valid`, the fan-in
  sum and the error injection are this design's own.
* Stage logic is a behavioural 16x16 multiplier, not the gate-level c6288
  netlist; the other benchmark circuits (c499, c1908, c3540, a 32-bit
  multiplier, DES) are not included.
* Power, supply-voltage scaling and pulse-width allocation (choosing among
  130, 170, 210, 250 and 430 ps per latch) are outside the RTL; the widths are
  constants in `ec_pkg`.
* The error-spacing limit described above.

Remaining lint warnings are unused observation signals, the pulse-width constants
in `ec_pkg` (kept as a record of the available widths), and `rst_n` being both an asynchronous
reset and the `disable iff` of the assertions.
