# MUX-based arbiter PUFs: basic, feed-forward, MUX/DeMUX and feed-forward MUX/DeMUX

A physical unclonable function (PUF) gives every chip a fingerprint that is never stored
anywhere. The fingerprint comes from the random delay differences that manufacturing leaves
in nominally identical gates. The structures here are all *MUX-based delay PUFs*. One rising
edge is launched into two paths built from identical multiplexer stages. A challenge word
decides at every stage whether the two edges go straight or swap paths. An arbiter at the end
reports which edge arrived first. The same challenge gives the same bit on one chip and,
ideally, an unrelated bit on another chip.

This repository holds synthesizable SystemVerilog for five members of this family:

| module           | structure                                                                 |
|------------------|---------------------------------------------------------------------------|
| `ffmd_puf`       | **feed-forward MUX/DeMUX (FFMD)**: skippable stages plus a feed-forward loop |
| `mux_puf`        | basic (original) MUX PUF: N switch stages and an arbiter                 |
| `ff_mux_puf`     | standard feed-forward: a middle arbiter drives the selects of later stages  |
| `mffo_mux_puf`   | modified feed-forward, overlap variant: two loops whose spans overlap       |
| `mux_demux_puf`  | reconfigurable MUX/DeMUX: any stage can be bypassed by configuration        |

`mux_puf_top` places one of each side by side, with 30 stages each and separate ports. FFMD is
the newest structure of the set. It combines the other two ideas, stage skipping and
feed-forward, so it is the most involved of the five.

## The race

Each stage (`mux_switch_stage`) has two 2:1 multiplexers that share one challenge bit:

```
 sel = 0 (straight)          sel = 1 (crossed)
 in_top ──[D_t]── out_top     in_bot ──[D_t]── out_top
 in_bot ──[D_b]── out_bot     in_top ──[D_b]── out_bot
```

The top multiplexer always adds its delay `D_t` to whatever leaves on the top path. The bottom
multiplexer adds `D_b` to whatever leaves on the bottom path. The challenge only decides which
edge collects which delay. After N stages the arbiter sees

    delta = t_top - t_bot,     response = 1 if delta >= 0 (bottom edge first), else 0.

A crossing stage also swaps the two edges that are already racing. It therefore negates the
difference accumulated so far before adding its own `D_t - D_b`. A shorter form is sometimes
written, the sum over stages of `(-1)^C_i · (D_t_i - D_b_i)`, which leaves this negation out.
The RTL and the reference model in the test benches both follow the actual routing, so their
response depends on the parity of the challenge bits after each stage, not on each bit alone.

On real silicon `D_t` and `D_b` differ a little, at random, from stage to stage and from chip
to chip. Summed over 30 stages, these differences turn into a time difference that the
challenge steers. That time difference is the fingerprint.

`puf_arbiter` is the usual edge-triggered arbiter. The bottom path drives the D input of a
flip-flop and the top path is its clock. So the flip-flop stores 1 exactly when the bottom edge
was already there when the top edge arrived. An exact tie would leave a real arbiter
metastable, and its outcome in simulation is undefined.

## How process variation appears in simulation

RTL has no manufacturing variation, and a zero-delay simulation of the structures above would
always end in a tie. Each multiplexer therefore carries a **simulation-only** continuous-assignment
delay. Synthesis ignores it:

* `puf_pkg::mux_delay_ps(seed, stage, element)` returns a delay in picoseconds. It hashes the
  three arguments and sums four uniform bytes of the hash. The result is an approximately
  Gaussian value with mean `MUX_DELAY_MEAN_PS` = 1000 and standard deviation
  `MUX_DELAY_SIGMA_PS` = 50. The delays are independent and identically distributed per
  multiplexer, which is the standard additive delay model of arbiter PUFs.
* Every PUF module has a `SEED` parameter. One seed is one "chip": the same seed always gives
  the same delays, and a different seed gives a differently varied chip. The top gives its five
  instances seeds 1 to 5.
* Elements per stage: 0 is the top multiplexer, 1 the bottom multiplexer, and 2 and 3 the merge
  multiplexers of a skippable stage.
* Time resolution is 1 ps. With the default delays an exact tie happens in a fraction of a
  percent of the evaluations. The test benches detect ties and do not compare them.

The model has deliberate limits. Delays are fixed for a chip, so temperature drift and noise
are absent, and every chip is perfectly reliable in simulation. A multiplexer's delay does not
depend on which of its inputs is selected. Intra-chip effects such as spatial correlation are
not modelled. The structure of the logic is real. The numbers the race produces come only from
this model.

## Feed-forward loops

In `ff_mux_puf` a third arbiter taps the two paths after stage `FF_TAP`. It makes its own
decision when the top edge passes that point, and that bit replaces the challenge bit of the
`FF_LEN` stages starting at `FF_DST`. The response now depends on an internal race result,
which makes the map from challenge to response non-linear. A linear delay model can no longer
fit it directly. The price is reliability: a wrong internal decision flips the routing of a
whole block of stages.

The loop only works if the feed-forward bit has settled before either edge reaches the
destination block. With roughly equal stage delays this needs `FF_DST > FF_TAP + 1`, and every
feed-forward module asserts this at the start of simulation. The test benches also check it
against the actual arrival times (the `late` flag of the reference model).

`mffo_mux_puf` has two loops, and loop 1 taps the race *before* loop 0 delivers its bit (the
"overlap" arrangement). Default placement for 30 stages:

| module          | loop | tap after stage (0-based) | drives stages |
|-----------------|------|---------------------------|---------------|
| `ff_mux_puf`    | 0    | 14                        | 20..24        |
| `ffmd_puf`      | 0    | 14                        | 20..24        |
| `mffo_mux_puf`  | 0    | 9                         | 16..19        |
| `mffo_mux_puf`  | 1    | 13                        | 22..25        |

For other `N`, `mux_puf_top` scales these positions in proportion, for example tap `N/2-1`,
block from `2N/3`, length `N/6`. The `challenge` bits of stages driven by a loop are ignored.
The port keeps one bit per stage so that all five PUFs have the same interface.

## Skipping stages: MUX/DeMUX and FFMD

`demux_skip_stage` wraps a switch stage:

```
           skip=0                         skip=1
 in ─┬─DeMUX─► switch stage ─┐        in ─┬─DeMUX─► (switch idle, inputs held 0)
     └──────── bypass (0) ───┴─MUX─► out    └──────── bypass ────────┴─MUX─► out
```

A skipped stage neither swaps the paths nor adds the switch delays. The edges only pass the
merge multiplexers. The `skip` vector is configuration data, separate from the challenge.
Changing it changes which delays take part in the race, which reconfigures the whole challenge
map without new hardware. Every stage of `mux_demux_puf` and `ffmd_puf` has a skip bit.

`ffmd_puf` is a `mux_demux_puf` chain with the feed-forward loop of `ff_mux_puf`. The skippable
stages make the chain reconfigurable, and the loop makes the response non-linear in the
challenge. If a stage in the feed-forward block is skipped, that stage ignores the feed-forward
bit.

## Interface and evaluation protocol

Every PUF module has these ports:

| port                      | dir | width | meaning                                                   |
|---------------------------|-----|-------|-----------------------------------------------------------|
| `launch_top`, `launch_bot`| in  | 1     | launch inputs of the two paths (tie together normally)    |
| `challenge`               | in  | N     | one select bit per stage                                  |
| `skip`                    | in  | N     | `mux_demux_puf`, `ffmd_puf` only: 1 bypasses the stage     |
| `ff_resp`                 | out | 1 / 2 | feed-forward modules only: internal decisions, for observation |
| `response`                | out | 1     | the PUF bit                                               |

The modules have no clock and no reset. To evaluate one:

1. With both launch inputs low, set `challenge` (and `skip`).
2. Raise both launch inputs together.
3. Wait until the edges have crossed the chain. With the default model that is about 1 ns per
   switch stage and 2 ns per skippable stage, so about 30 ns and 60 ns at N = 30. Then read
   `response`. It changes exactly when the top edge reaches the arbiter, and it holds its value
   until the next rising edge.
4. Lower both launch inputs and wait as long again, so the low level flushes the chain.

The launch inputs are separate so that other stimuli can be applied. For example, the two paths
can be started at different times or driven by two clocks of different frequency. A launch
skew simply adds to `delta`. With two clocks, the arbiter samples, at every rising edge on its
top input, the clock that the challenge routed to its bottom input. The end-to-end test bench
checks both cases.

`mux_puf_top` repeats these ports once per structure, prefixed `ffmd_`, `basic_`, `sff_`,
`mffo_` and `md_`. Its single parameter `N` (default 30) sets all five chain lengths.

## Building it in silicon

Synthesis drops every `#` delay. What remains is a plain multiplexer chain plus
data-clocked flip-flops. That logic is correct, but a synthesis tool will not keep the two paths
symmetric, and a PUF is only as good as that symmetry. A real implementation has to preserve
the multiplexers (no restructuring), place and route the two paths as matched pairs, and give
the arbiter flip-flops a balanced D/clock arrival. The feed-forward arbiters are flip-flops
clocked by a data path, so timing analysis must be told about these clocks.

## What is this design's own choice

The structures themselves, the straight/cross convention (select 0 is straight), the response
sign convention (1 when the top path is slower) and the stage counts of 30, 20, 50 and 100
follow the established MUX-PUF designs. These points were chosen here:

* The arbiter is the flip-flop arbiter, not a latch-based mutual-exclusion circuit.
* The feed-forward loops, their number (one, or two for the overlap variant) and the placement
  in the table above. In the modified overlap variant, each loop's bit *replaces* the challenge
  bits of its block, the same as in the standard structure. The overlap of the loop spans is
  what sets the two apart here.
* Every stage of the skippable PUFs has a DeMUX, and the unselected DeMUX output is held at 0.
* The delay model: its mean, sigma, hash and 1 ps grid.
* There is no reset, no valid flag and no on-chip evaluation controller. The launch inputs are
  driven from outside.

## Verification

Every module has a self-checking test bench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<n>` and has a time-out watchdog.

* `tb_mux_switch_stage`, `tb_demux_skip_stage`: routing in every mode, and the exact delay of
  each edge. Each output must still be low one picosecond before its delay and high one
  picosecond after.
* `tb_puf_arbiter`: both arrival orders with margins from 1 ps to 400 ps, and that the decision
  holds.
* `tb_mux_puf`, `tb_ff_mux_puf`, `tb_mffo_mux_puf`, `tb_mux_demux_puf`, `tb_ffmd_puf`: 300
  random challenges (and skip vectors) each. Every response and feed-forward decision is
  compared with `tb/puf_ref.svh`. That reference model walks the two edges through the chain
  using the same per-multiplexer delays but its own routing, skipping, feed-forward and
  arbitration code. Each test also checks the response latency and that the response is not
  constant.
* `tb_mux_puf_top`: the whole top at its default size. 200 rounds launch all five PUFs at once,
  and some rounds launch the bottom edge up to 300 ps late. The test counts every mechanism
  and fails if any never happened: crossed, straight and skipped stages, every feed-forward
  loop deciding 0 and 1, a skipped stage inside the FFMD feed-forward block, skewed launches,
  and both response values of every PUF. A last phase drives the basic PUF's two launch
  inputs with free-running clocks of 9 ns and 6 ns period. After every arbiter decision the
  test checks the response against the launch clock that reached the bottom input.

### Characterisation runs

`tb_workload_basic_mux`, `tb_workload_feed_forward`, `tb_workload_mux_demux` and
`tb_workload_ffmd` repeat the usual characterisation set-up. Each builds five chips with
different seeds. The challenge comes from a few select lines, with stage `i` taking line
`i mod L`, and all `2^L` combinations are applied. Skippable PUFs use a fixed skip pattern
(every fifth stage). Each bench checks every response against the reference model. It then
prints the inter-chip Hamming distance, uniqueness `1 - |2·P_inter - 1|`, the share of ones
`P(R=1)` and randomness `1 - |2·P(R=1) - 1|`. One run gave:

| structure           | stages | lines | inter-chip HD | uniqueness | P(R=1) | randomness |
|---------------------|--------|-------|---------------|------------|--------|------------|
| basic               | 20     | 4     | 47.5 %        | 95.0 %     | 57.5 % | 85.0 %     |
| basic               | 30     | 4     | 50.0 %        | 100 %      | 62.5 % | 75.0 %     |
| basic               | 50     | 4     | 51.3 %        | 97.5 %     | 53.8 % | 92.5 %     |
| standard FF         | 30     | 3     | 32.5 %        | 65.0 %     | 52.5 % | 95.0 %     |
| modified FF overlap | 30     | 3     | 60.0 %        | 80.0 %     | 47.5 % | 95.0 %     |
| MUX/DeMUX           | 30     | 3     | 52.5 %        | 95.0 %     | 42.5 % | 85.0 %     |
| FFMD                | 30     | 3     | 32.5 %        | 65.0 %     | 27.5 % | 55.0 %     |
| FFMD                | 100    | 6     | 40.6 %        | 81.3 %     | 51.9 % | 96.2 %     |

These figures come from an idealised delay model and from 8 to 64 challenges on five chips.
They show that the structures behave like PUFs, but they are not predictions for silicon.
Transistor-level or measured results will differ, most of all in reliability, which this
model cannot show.

## Simulating

Any test bench runs with plain Verilator 5 (timing support is needed for the delays):

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv -Irtl -Itb \
          rtl/puf_pkg.sv tb/tb_mux_puf_top.sv --top-module tb_mux_puf_top -o sim
./obj_dir/sim
```

Replace the test bench name to run another one. The 100-stage FFMD characterisation is the
slowest, at about a minute. Verilator's event scheduling with thousands of delayed assignments
dominates its run time.

To change the design:

* **Chain length**: set `N` on a PUF module or on `mux_puf_top`.
* **Chip**: set `SEED` on a PUF module.
* **Spread**: change `MUX_DELAY_MEAN_PS` or `MUX_DELAY_SIGMA_PS` in `puf_pkg`.
* **Feed-forward loops**: set `FF_TAP`, `FF_DST` and `FF_LEN` (or the `FF0_*`/`FF1_*`
  parameters). Keep at least one stage between a tap and its block.

## Files

* `rtl/puf_pkg.sv`: delay model and element numbering.
* `rtl/mux_switch_stage.sv`, `rtl/demux_skip_stage.sv`, `rtl/puf_arbiter.sv`: building blocks.
* `rtl/mux_puf.sv`, `rtl/ff_mux_puf.sv`, `rtl/mffo_mux_puf.sv`, `rtl/mux_demux_puf.sv`,
  `rtl/ffmd_puf.sv`: the five PUFs.
* `rtl/mux_puf_top.sv`: all five side by side.
* `tb/puf_ref.svh`: arrival-time reference model.
* `tb/puf_workload_bench.sv`: the chip-population experiment used by the `tb_workload_*`
  benches.
* `tb/tb_*.sv`: test benches.
