# IMA-APUF: an improved multiplexing-aware arbiter PUF

A physical unclonable function (PUF) turns the delays of a chip's wires and
gates, which vary randomly from one chip to the next, into a response bit
for each challenge. An arbiter PUF lets two copies of an edge race down two
paths that the challenge configures, and a latch at the end records which
copy won. Machine-learning attacks break the plain arbiter PUF because its
response is a linear function of the stage delays.

The multiplexing-aware arbiter PUF (MA-APUF) races four edges through 4-to-1
multiplexers. It ranks all four arrivals and returns the earliest and the
latest path as a 4-bit code. Two weaknesses come with that code. For some
challenges it compares paths that differ in length by construction, so
routing decides the answer instead of process variation. It also lets an
attacker read the outcome of every pairwise race.

The improved MA-APUF (IMA-APUF) in this repository changes three things:

* **Inverters.** Each unit gets an inverter on each of its four paths, in
  front of the multiplexers. Rising and falling edges take turns along the
  chain, which makes the delay model less linear.
* **Symmetrical arbitration.** Two arbiters replace the ranking. One compares
  paths 0 and 3, the other compares paths 1 and 2. The design's output is
  the XOR of the two.
* **Tuning.** A programmable delay sits in front of each arbiter input. It
  cancels the fixed routing skew that an FPGA layout adds to one side.

The design has no clock and no flip-flop.

## Block diagram

```
launch ─┬─► unit 0 ─► unit 1 ─► … ─► unit N/2-1 ─┬─ p0 ─► tune ─┐
        │   (C1,C2)   (C3,C4)        (Cn-1,Cn)   ├─ p3 ─► tune ─┴─► arbiter 1 ─► r1 ─┐
        │ (4 paths)                              ├─ p1 ─► tune ─┐                     XOR ─► r
        └───────────────────────────────────────►└─ p2 ─► tune ─┴─► arbiter 2 ─► r2 ─┘
```

| module           | what it is |
|------------------|------------|
| `ima_pkg`        | shared types, the intra-unit wiring rule and the simulation delay model |
| `ima_unit`       | four inverters, the intra-stage network and four 4:1 muxes; 2 challenge bits |
| `ima_delay_line` | `N_STAGES/2` units in cascade, fed by one launch edge |
| `ima_tuning`     | programmable delay line for one path (a behavioural model, see below) |
| `ima_arbiter`    | two cross-coupled NAND gates (SR latch) |
| `ima_apuf`       | top: delay line, four tuning delays, two arbiters, XOR |

## The unit and why its pairs stay symmetrical

A unit holds the inverters `inv0..inv3` and the multiplexers `mux0..mux3`.
All four multiplexers share the unit's two challenge bits `s`. Input pin `p`
of `mux j` is wired to `inv (j XOR p)`:

| s (C2u+1 C2u+2) | mux0 takes | mux1 takes | mux2 takes | mux3 takes | effect on paths a b c d |
|-----------------|------------|------------|------------|------------|-------------------------|
| 00              | inv0       | inv1       | inv2       | inv3       | straight                |
| 01              | inv1       | inv0       | inv3       | inv2       | swap a↔b, c↔d           |
| 10              | inv2       | inv3       | inv0       | inv1       | swap a↔c, b↔d           |
| 11              | inv3       | inv2       | inv1       | inv0       | reverse                 |

Each output is therefore `path_o[j] = ~path_i[j ^ s]`. XOR with any `s` maps
the index pair {0,3} onto {0,3} or {1,2}, and the pair {1,2} onto the other.
The two edges that meet at arbiter 1 (paths 0 and 3) have always been partners
in every unit. So have the two edges at arbiter 2. Neither of them ever
crosses an extra or a shorter segment that the other one skips. The
difference in arrival times comes only from the delay of each element.

The order of the paths does depend on the challenge. A fixed delay-difference
vector, as in the plain arbiter PUF, does not describe this PUF. This is the
source of its resistance to modelling.

The challenge is `challenge_i[N_STAGES-1:0]`, with bit `k-1` holding challenge
bit `C_k`. Unit `u` (counting from 0) uses `{challenge_i[2u], challenge_i[2u+1]}`,
and its first bit is the MSB of `s`. With that order the permutations match
the table above. Paths 0..3 correspond to a..d.

Every path passes one inverter per unit. With an even number of units, a
rising launch edge reaches the arbiters as a rising edge, and a low launch
leaves them at rest. `N_STAGES` must be a multiple of 4; the default of 64
stages (32 units) meets this, and an elaboration assertion checks it.

## Arbiters and one evaluation

Each arbiter is a pair of cross-coupled NAND gates. Input `a` goes to the
upper gate and input `b` to the lower one. At rest both inputs are low and
both gate outputs are high. The first input to rise pulls its own gate low,
and that low output holds the other gate high:

* `r1 = 0`: the path from `mux0` won; `r1 = 1`: the path from `mux3` won.
* `r2 = 0`: the path from `mux1` won; `r2 = 1`: the path from `mux2` won.
* `r = r1 ^ r2`.

One evaluation goes like this:

1. With `launch_i` low, apply `challenge_i` and `tune_i`. They must not
   change while `launch_i` is high; an assertion in `ima_apuf` checks this.
2. Raise `launch_i`.
3. Wait for the edge to cross the chain. With the simulation delays this
   takes at most 32 × ~0.55 ns ≈ 18 ns. Then read `r1_o`, `r2_o` and `r_o`.
4. Lower `launch_i`. Once all four paths are low again, both latches are
   released (`r1 = r2 = 1`, `r = 0`) for the next challenge.

The outputs are asynchronous latch outputs. A system using the PUF has to
sample them into its own clock domain after step 3. Two edges that arrive
at the same instant leave a real latch metastable. The zero-delay NAND model
then has no stable state, and the simulator reports a combinational loop
that does not settle. The testbenches never apply such a tie. Tools also
flag the NAND pair as a combinational loop; that loop is the latch itself.

## Tuning delays

On an FPGA, the last stage and the two arbiters cannot be placed with
perfectly equal wires. For many challenges that fixed skew decides the
race. The fix adds a small delay to the faster line of each pair. Then the
response bias is measured over many challenges, and the delay is adjusted
until the bias is acceptable. Only two races need balancing here, not the
six of the MA-APUF.

`ima_tuning` is one such delay on one path. It has `TUNE_BITS` stages, and
stage `k` either bypasses or adds `STEP_PS << k` ps. The added delay is
`tune_i × STEP_PS`. Logically the block is a wire. On an FPGA it would be
a chain of LUTs whose extra inputs select a longer or shorter internal route.
It is therefore written as a behavioural model, and it has an effect only in
simulation. The top has one tuning delay on every path (`tune_i[j]` for
`mux j`), so either side of a pair can be lengthened. The calibration loop
runs on a host outside this design.

To try the calibration in simulation, use the `ROUTE_PS` parameter. It puts
a fixed wire delay in front of each tuning stage and stands for an uneven
layout. `tb_ima_calibration` builds the PUF with 100 ps extra on the mux0
and mux1 paths, so `r1` and `r2` lean towards 1. For each tuning code on
the faster lines it measures the share of ones over a fixed challenge set,
then keeps the code that comes closest to 50%. The bias falls steadily as
the code grows. The code chosen need not equal the skew divided by the
step (12 here), because 32 challenges give only a coarse estimate of the
bias.

## Simulation delay model

A PUF's behaviour lives in its delays, and RTL has none. Each element
carries a delay annotation, which synthesis ignores, so the design can be
exercised in simulation:

* an inverter is 120 ps,
* a network wire into a mux pin is 60 ps,
* a mux is 250 ps,

and each gets a pseudo-random 0..39 ps on top.
`ima_pkg::elem_delay_ps(DEVICE_SEED, unit, element)` draws that offset from
an integer hash. One value of the `DEVICE_SEED` parameter stands for one
manufactured chip. All these numbers are placeholders that mimic process
variation. They are not measured values.

Two consequences matter for anyone who builds the design:

* **Keep the paths apart.** All four paths carry the same logic value. A
  synthesis tool may legally merge them into one chain, and then the PUF
  stops working. The path nets carry `(* keep *)`, but that alone is not
  enough. In the implementation flow, mark the unit cells as do-not-touch
  and place the units and arbiters by hand for symmetrical routing. Yosys
  honours the attribute on the nets and still shares the logic cells.
* **Reliability is not modelled.** Responses in simulation are free of noise
  and do not change with temperature. Reliability and steadiness below 100%,
  which real devices show, cannot be seen here.

## Parameters (`ima_apuf`)

| parameter      | default | meaning |
|----------------|---------|---------|
| `N_STAGES`     | 64      | challenge bits; `N_STAGES/2` units; multiple of 4 |
| `TUNE_BITS`    | 4       | width of each tuning code |
| `TUNE_STEP_PS` | 8       | delay of one tuning step (simulation only) |
| `DEVICE_SEED`  | 1       | selects the simulated chip (simulation only) |
| `ROUTE_PS[4]`  | all 0   | fixed extra wire delay per path before tuning (simulation only) |

Ports: `launch_i`, `challenge_i[N_STAGES-1:0]`, `tune_i[3:0][TUNE_BITS-1:0]`,
`r1_o`, `r2_o`, `r_o`.

## What follows the original design and what does not

These follow the original design:

* units of four inverters and four 4:1 multiplexers, `n/2` units for `n`
  stages, and 64 stages;
* the exact intra-stage wiring;
* the arbiter pairs mux0/mux3 and mux1/mux2;
* cross-coupled NAND arbiters and the XOR of their outputs;
* a tuning block in front of the arbiters;
* no flip-flops in the PUF.

These are this implementation's own choices:

* the challenge bit order inside a unit;
* which NAND output carries each response bit (both use the upper gate,
  whose outer input is `mux0` or `mux1`);
* the insides, width, step and placement of the tuning delay;
* the release-by-lowering-launch protocol;
* all delay values.

The published evaluation used 16 copies on four Virtex-5 boards. It reported
an inter-chip uniqueness of 43.6% by one set of metrics and 0.81 by
another. Under logistic-regression and evolution-strategy attacks with up to
50,000 challenge-response pairs, prediction stayed near 56%. None of those
figures can be reproduced in simulation. `tb_ima_uniqueness` computes the
same kind of inter-chip statistics for the simulated chips, as a check that
different seeds give different, balanced responses.

Not included: the host link that delivered challenges and collected
responses in the published setup (Ethernet, driven from a workstation), and
the baseline PUFs (APUF, XOR-APUF, MA-APUF) that served only for comparison.
The bias-measurement and calibration procedure belongs to the host. It
appears here only as a testbench (`tb_ima_calibration`), not as hardware.

## Testbenches and how to run them

All testbenches check their own results. Each prints
`TB_RESULT checks=N failures=M` at the end, and each stops itself through a
watchdog if it hangs.

| testbench           | covers |
|---------------------|--------|
| `tb_ima_unit`       | wiring of all 4 challenge codes × 16 input patterns, pairing invariant, exact per-path delay |
| `tb_ima_delay_line` | 44 challenges at 64 stages: every output's arrival time against a reference walk of the paths, to the picosecond; release |
| `tb_ima_arbiter`    | 200 races with random order and gap: decision after the first edge, held after the second, release |
| `tb_ima_tuning`     | every tuning code, rising and falling: value unchanged, delay = code × step |
| `tb_ima_apuf`       | whole PUF at its defaults: ~200 challenges against the reference model, the all-`11` challenge, tuning codes that reverse each arbiter's decision, release after every evaluation; counts that every case occurred |
| `tb_ima_calibration` | calibration against 100 ps of layout skew: 16 tuning codes × 32 challenges, all checked against the reference; bias falls with the code; chosen code improves the bias |
| `tb_ima_uniqueness` | four simulated chips, 64 challenges: per-chip correctness, uniqueness, uniformity, bit-aliasing, repeatability |

`tb/ima_ref_pkg.sv` is the reference model. It walks the four paths using
the wiring table written out in full, adds up the element delays, and
predicts both arbiters.

To build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
  rtl/ima_pkg.sv tb/ima_ref_pkg.sv tb/tb_ima_apuf.sv --top-module tb_ima_apuf
./obj_dir/Vtb_ima_apuf
```

`tb_ima_unit`, `tb_ima_arbiter` and `tb_ima_tuning` do not need
`tb/ima_ref_pkg.sv`. Each unit of each chip gets its own delay values, so
Verilator elaborates it as a separate module. A single chip builds in well
under a minute. `tb_ima_uniqueness`, with four chips, takes a few minutes
to build and about a minute to run. Every file sets `timeunit 1ps`. Delays must be enabled
(`--timing`); without them every path arrives at once and the arbiters
cannot decide.
