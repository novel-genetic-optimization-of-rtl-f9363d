# Nine-byte-tunable fuzzy PD speed controller for a DC motor

A fuzzy logic controller regulates the speed of a DC motor. Its inputs are the
speed error and the change of error, and it produces an increment of the
motor drive. It has two inputs and one output. Each has three linguistic
terms: a left trapezoid, a centre triangle and a right trapezoid. Eleven
corner points describe each variable, but only two of them are free. The
whole controller is therefore set by a **chromosome of nine bytes**. An
offline genetic algorithm searches for the chromosome that gives the least
overshoot, undershoot and steady-state error. This RTL is the controller that
executes a chromosome. It is written so that a tuner can load a new
chromosome at any time, with no other change.

Everything is 8-bit: the two inputs, the output and the membership degrees.
The controller runs in three stages:

1. **Fuzzification by slopes.** The membership degree comes straight from the
   flank slopes of each set, with no lookup tables.
2. **Max-min inference** over nine rules.
3. **Heights defuzzification.** The output is a weighted mean of three
   output heights.

Around the controller sits an incremental PD loop. It forms the error and the
change of error, and it accumulates the controller's output into the drive
signal.

## The loop

```
 r ──(+)── e ──┬──────────────► x1 ┐
      −│       └─ e − e(t−1) ──► x2 ┤ flc_core ─► Y ─► ×K ─► (+) ─► u ─► motor ─► speed
       │                            │                       ▲  │
       │                            └ chromosome_decoder ◄ chrom  └─ z⁻¹ ┘
       └───────────────────────────────────────────────────────────── speed (y_meas)
```

`fuzzy_speed_ctrl` (the top) runs one control period per `sample` pulse:

| quantity | format | mapping |
|---|---|---|
| `r`, `y_meas`, `u` | signed 16 bit, 8 fraction bits (rpm, drive units) | — |
| e = r − y_meas | 18-bit signed internally | x1 = 128 + round(e · GAIN_E / 2¹⁶), limited to 0..255 |
| e′ = e − e(t−1) | 18-bit signed | x2 = 128 + round(e′ · GAIN_DE / 2¹⁶), limited to 0..255 |
| Y (fuzzy output) | 8 bit, 128 = hold | Δu = floor((Y − 128) · K_Q / 2⁷), u limited to 16 bits |

The defaults map an error of ±40 rpm and a change of error of ±10 rpm onto
the full 8-bit universes: GAIN_E = 819 ≈ 128/40·256 and GAIN_DE = 3277 ≈
128/10·256. They read Y as an increment in [−1, 1) with gain K = 1 (K_Q =
256). One code of x1 is 0.3125 rpm. Rounding puts zero error in the middle
of code 128, so any error within ±0.16 rpm looks like zero to the controller.
This sets how closely the loop can hold the reference.

`in_sat` reports that x1 or x2 was limited, and `u_sat` that u was limited.
`e(t−1)` and `u` are cleared by reset.

## Membership functions from the chromosome

This is the heart of the design. For every variable (error, change of error,
output) the three sets are laid over the 0..255 universe like this:

```
 255 ●━━━━━━━━━━━━●            ●            ●━━━━━━━━━━━━━●
     NB / BD        ╲         ╱ ╲         ╱   PB / BI
                     ╲  Z / H    ╲      ╱
                      ╲  ╱         ╲  ╱
                      ╱╲            ╱╲
   0 ━━━━━━━━━━━━━━━━●━━━━━━━━━━━━●━━━━━━━━━━━━●━━━━━━━━━━━━━━
     0               a2           128          a1             255
```

| set | shape | corner points |
|---|---|---|
| NB (input) / BD (output) | trapezoid | (0, 0, a2, 128) |
| Z / H | triangle | (a2, 128, a1) |
| PB / BI | trapezoid | (128, a1, 255, 255) |

All eleven points follow from three genes, `a2`, `b1` and `a1`:

- `b1` is the fixed centre, 128.
- `a2` may move in 1..127. It is where NB leaves full membership and where Z
  starts.
- `a1` may move in 129..254. It is where PB reaches full membership and where
  Z ends.

As a result:

- Neighbouring sets always cross.
- Every input value belongs to at least one set.
- The shoulder sets stay at full membership out to the ends of the universe.

The chromosome (`chromosome_t`, 72 bits) holds (a2, b1, a1) for input 1,
input 2 and the output, in that order. `chromosome_decoder` expands it:

- A gene outside its range is clamped to the range. A b1 other than 128 is
  ignored. Both cases raise `gene_fixed`.
- Each output height is the centre of the region where that set has full
  membership:
  - BD = ⌊a2/2⌋
  - H = 128
  - BI = ⌊(a1 + 255)/2⌋

  The tuner's output genes therefore move the heights that defuzzification
  uses.

## Fuzzification by slopes (`mf_unit`, `fuzzifier`)

`mf_unit` evaluates one trapezoid (a0 ≤ a1 ≤ a2 ≤ a3). It evaluates a
triangle as a trapezoid with a1 = a2. Each flank has the slope
`s = ⌊255·256 / width⌋`, with 8 fraction bits. On a flank the degree is
`min(255, (distance from the foot · s) >> 8)`. The degree is 255 between a1
and a2, and 0 outside a0..a3. A flank of zero width is a vertical edge,
which is how NB is at 255 at x = 0 and PB at x = 255.

Truncating the slope keeps every degree within 2 counts below the exact
value, never above it. The unit is combinational; the slopes are recomputed
from the points, so new points take effect at once.

`fuzzifier` runs three `mf_unit`s, one each for NB, Z and PB. For each term
it gives the degree (`grado`) and a linguistic code (`v_ling`). The code is
the term when the degree is non-zero, and `T_NONE` otherwise.

## Inference and defuzzification (`rule_inference`, `defuzzifier`)

The nine rules pair each term of the error with each term of the change of
error. Rule 3·i + j fires when both of its terms are active. Its strength is
the smaller of the two degrees. Its consequent comes from the `RULES` table
parameter, whose default is:

| e \ e′ | NB | Z | PB |
|---|---|---|---|
| **NB** | BD | BD | H |
| **Z**  | BD | H  | BI |
| **PB** | H  | BI | BI |

This table is a standard incremental-PD rule base. The tuning leaves the rules
alone, so any table can be given as a parameter.

`defuzzifier` first takes, for each output term, the strongest rule with that
consequent (the *max* of max-min). It then computes

    Y = (BD·μ_BD + H·μ_H + BI·μ_BI) / (μ_BD + μ_H + μ_BI)

and truncates the result. The numerator fits in 18 bits and the denominator in
10 bits. A restoring divider finds the 8-bit quotient one bit per clock.
Because every height is at most 255, the quotient always fits. If no rule
fires, Y is the H height. With sets from the decoder this cannot happen, and
`no_rule` reports it.

## Timing

| block | handshake | latency |
|---|---|---|
| `defuzzifier` | `start` sampled while `busy` is low | `y_valid` 8 clocks after start |
| `flc_core` | `in_valid` / `in_ready`, one sample in flight | `y_valid` 10 clocks after the accepted sample: fuzzifier register, rule register, 8 divide clocks |
| `fuzzy_speed_ctrl` | `sample` while `ready` | `u_valid` 12 clocks after the sample |

So the controller needs 12 clocks per control period. The sampling period of a
motor loop is in the millisecond range, so nothing here needs throughput.
Reset is synchronous and active high everywhere. The mf, fuzzifier,
inference and decoder blocks are combinational; the pipeline registers in
`flc_core` cut the long path through the multipliers and the divider.

## Files

| file | contents |
|---|---|
| `rtl/fuzzy_pkg.sv` | widths, `term_e`, `in_mf_t` (11 points), `out_heights_t`, `gene_t`, `chromosome_t`, default rule table |
| `rtl/mf_unit.sv` | one trapezoid/triangle membership degree |
| `rtl/fuzzifier.sv` | three terms of one input |
| `rtl/rule_inference.sv` | nine min rules |
| `rtl/defuzzifier.sv` | max aggregation, heights mean, sequential divider |
| `rtl/flc_core.sv` | complete fuzzy controller, pipelined |
| `rtl/chromosome_decoder.sv` | nine genes → 22 points + 3 heights |
| `rtl/fuzzy_speed_ctrl.sv` | top: incremental PD loop around the controller |
| `tb/flc_ref_pkg.sv` | integer reference model of every stage |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ga_fitness_sweep` |

## Verification

Every testbench compares the design against `tb/flc_ref_pkg.sv`. That package
recomputes each stage with plain integer arithmetic. Each testbench ends with
a `TB_RESULT checks=N failures=M` line.

- `tb_mf_unit` sweeps all 256 inputs for 205 trapezoids and triangles. These
  include steepest, shallowest and vertical flanks. Every degree must match
  the reference exactly and lie within 2 counts of the ideal value.
- `tb_fuzzifier`, `tb_rule_inference` and `tb_chromosome_decoder` check the
  combinational blocks with random data:
  - `tb_rule_inference` uses a rule table other than the default.
  - `tb_chromosome_decoder` uses genes both inside and outside their ranges.
- `tb_defuzzifier` checks 3000 random rule sets and the no-rule case. It also
  checks the 8-clock latency.
- `tb_flc_core` checks 2000 random input pairs with random parameter sets, and
  a sweep of the input plane. It also checks the 10-clock latency, that
  `in_ready` stays low while a sample is in flight, and a case where no rule
  fires.
- `tb_fuzzy_speed_ctrl` is the end-to-end test with every parameter at its
  default. It drives a first-order motor model,
  `w[k+1] = w[k] + 0.05·(u[k] − w[k])`. This model belongs to the testbench;
  it is not a model of any particular motor. The test runs four phases:
  - 1000 periods of a 15 rpm reference step, checking every u against the
    reference.
  - Open-loop drive into saturation of u.
  - A large negative error.
  - Out-of-range genes.

  Input saturation, output saturation, positive and negative increments and
  gene clamping must each occur at least once. With the chromosome
  (64,128,192 | 64,128,192 | 16,128,240) the speed settles at 14.94 rpm. That
  is within one input code of 15 rpm, with 1.16 rpm of overshoot.
- `tb_ga_fitness_sweep` computes what a tuner computes for each candidate. It
  closes the loop for 1000 periods for six chromosomes. It reports:
  - overshoot, max(w) − r;
  - undershoot, |min(w) − r| after the first time r is reached;
  - summed error over periods 201..1000.

  The results differ from one chromosome to the next. For example, overshoot
  ranges from 0.16 to 3.15 rpm.

To run one testbench with Verilator, from the top folder:

    verilator --binary --timing -Wno-fatal -Irtl -Itb rtl/fuzzy_pkg.sv tb/flc_ref_pkg.sv \
        tb/tb_fuzzy_speed_ctrl.sv --top-module tb_fuzzy_speed_ctrl -o sim
    ./obj_dir/sim

`-Irtl` lets Verilator find each module by its file name; `-Wno-fatal` keeps
the width warnings of the testbench arithmetic from stopping the build. Every testbench
finishes in well under a second.

## What is this design's own

The following come from the design description:

- the three-stage controller;
- 8-bit universes and degrees;
- three terms per variable: trapezoid, triangle, trapezoid;
- the eleven points per input;
- the nine-gene chromosome and its gene ranges;
- slope-based fuzzification;
- max-min inference;
- heights defuzzification with BD/H/BI heights;
- the incremental PD loop with e = r − y and e′ = e − e(t−1).

The following are choices made here and should be reviewed before use:

- **Rule table.** The rules are not specified; the table above is assumed.
- **Output heights.** They are derived from the output genes as plateau
  centres. A different reading, such as heights at the extremes 0 and 255,
  would change the output scale.
- **Aggregation.** Max aggregation per output term is applied before the
  heights mean. A plain sum over the nine rules would weight duplicate
  consequents twice.
- **Input scaling.** GAIN_E and GAIN_DE assume error ranges of ±40 rpm and
  ±10 rpm.
- **Output gain and formats.** K = 1 and the Q8.8 number formats are
  assumptions.
- **Arithmetic and timing.** The fixed-point slopes, the truncation, the
  pipeline registers, the sequential divider, the handshakes and the latencies
  are all choices made here.
- **Genes.** Out-of-range genes are clamped, and the b1 gene is forced to 128.

## Not included

- **The genetic algorithm.** It runs offline in software and drives this
  hardware only through the `chrom` port. This includes stochastic universal
  selection, crossover, mutation, reinsertion and the three-objective fitness.
  `tb_ga_fitness_sweep` shows the evaluation step.
- **The motor.** It is the controlled machine. The testbenches use only a
  simple stand-in model.
- **Specific tuned controllers.** The chromosomes found by particular tuning
  runs are not reproduced, because their gene values are not known.
