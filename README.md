# Fuzzy logic temperature controller for a shell-and-tube heat exchanger

This is a small, fully pipelined fuzzy logic controller. It holds the
outlet temperature of a shell-and-tube heat exchanger at a set point. Each
clock it can take one sample: the set point, the measured outlet temperature
and the change of error. Four clocks later it returns a 4-bit control word
for the actuator, which is a 4-20 mA current loop outside the FPGA. The
controller follows the classic fuzzy chain:

1. **Fuzzification**: the error and the change of error are each mapped to a
   linguistic term.
2. **Rule base**: a table combines the two terms into an output term.
3. **Defuzzification**: the output term becomes a crisp number.

The process it was sized for is modelled as first order plus dead time:
`G(s) = 0.495 / (376 s + 1) · e^(-62.73 s)`. That is a gain of 0.495 degC per
percent of actuator range, a 376 s time constant and a 63 s dead time.

## Structure

```
reference ─┐
data_b ────┴─ error = sat(reference - data_b) + 8 ─► fuzzy_diff  (fuzzification) ─┐ fuzzy_in
data_a ──────────────────────────────────────────► fuzzy_delta (fuzzification) ─┤
                                                   fuzzy_input_valid = both valid │
                                                          f_control (fuzzy_rulebase) ─► fuzzy_out
                                                          crisp     (defuzzification)
                                                          flop_outputs ─► control[3:0]
                                                          flop_valid_out (synchronizer) ─► valid_out
```

| module | file | role |
|---|---|---|
| `controller` | `rtl/controller.sv` | top: error formation, the stage chain, output flops |
| `fuzzification` | `rtl/fuzzification.sv` | crisp value → term label (instanced as `fuzzy_diff` and `fuzzy_delta`) |
| `fuzzy_rulebase` | `rtl/fuzzy_rulebase.sv` | 7×7 rule table |
| `defuzzification` | `rtl/defuzzification.sv` | term label → crisp value |
| `flop_outputs` | `rtl/flop_outputs.sv` | output register, loads on a valid result |
| `synchronizer` | `rtl/synchronizer.sv` | one-flop stage for `valid_out` |
| `fuzzy_pkg` | `rtl/fuzzy_pkg.sv` | sizes, term names, default membership word |

The instance names, the port names and the widths follow the published RTL
view of the controller. There are 89 port bits in all: 78 inputs and 11
outputs. That is the controller's published pin count.

## Number formats

All crisp quantities are 4-bit unsigned codes.

* **Error.** `reference - data_b` is saturated to the signed range -8..+7 and
  offset by 8, so code 8 means "on set point". The published error range is
  ±30 degC. Taking 3.75 degC per code maps that range onto -30..+26.25 degC.
  The scale is a system choice: the RTL sees only codes.
* **Change of error** (`data_a`). The caller supplies it already coded in the
  same 0..15 universe, with 8 as no change. The closed-loop testbench forms it
  as `8 + (e[k] - e[k-1])`.
* **Control.** 0..15 spans the actuator range. Code 0 is 4 mA and code 15 is
  20 mA, scaled outside the FPGA.

## Membership words (the part to understand before changing anything)

Each universe has its own 21-bit membership word: `diff_membership`
(error), `int_membership` (change of error) and `perm_membership` (output).
A word holds seven 3-bit fields, one per term. Term *k* sits in bits
`[3k+2:3k]`, in the order NB, NM, NS, ZE, PS, PM, PB. **Each field is the
width of its term in codes.** The terms tile the universe from code 0
upwards, in that order.

The default word, `fuzzy_pkg::MEMB_DEFAULT`, uses widths 2,2,2,4,2,2,2:

```
code : 0 1 | 2 3 | 4 5 | 6 7 8 9 | 10 11 | 12 13 | 14 15
term :  NB |  NM |  NS |    ZE   |   PS  |   PM  |   PB
```

* **Fuzzification** returns the first term whose running end (the sum of
  widths up to that term) lies above the input. Inputs past the last end
  get PB. Terms of width 0 are skipped.
* **Defuzzification** returns the midpoint of the chosen term's interval:
  `start + floor(width/2)`, saturated to 15. A zero-width term returns its
  start.

The partitions are crisp: each input belongs to exactly one term, with
degree 1. So exactly one rule fires per sample, and the centroid of that one
symmetric output set is its midpoint. That is how a Mamdani controller
reduces when the interfaces between its stages carry one 3-bit term label,
as they do here. Overlapping membership functions with graded degrees and
max-min inference are **not** built.

## Rule base

The published rule set is not available, so the table is the standard
diagonal PD-type table:

```
out = clamp(e_term + de_term - ZE, NB, PB)
```

Written out, with rows for the error term and columns for the change of
error:

```
        NB NM NS ZE PS PM PB
  NB    NB NB NB NB NM NS ZE
  NM    NB NB NB NM NS ZE PS
  NS    NB NB NM NS ZE PS PM
  ZE    NB NM NS ZE PS PM PB
  PS    NM NS ZE PS PM PB PB
  PM    NS ZE PS PM PB PB PB
  PB    ZE PS PM PB PB PB PB
```

To change the rules, replace the `always_comb` in `rtl/fuzzy_rulebase.sv`,
for example with a `case` on `{diff_label, delta_label}`.

This is an absolute-output (PD-type) controller, not an incremental one.
With zero error, it outputs the midpoint of ZE (code 8 by default). The loop
therefore settles wherever the plant's steady state for that command
lands. With the default words, the error can stay anywhere inside the ZE band
(error codes 6..9, that is -2..+1). To move the operating point or narrow the
band, change `perm_membership` or `diff_membership`.

## Timing and handshake

* One register per stage: fuzzification, rule base, defuzzification, then the
  output register. `valid_in` → `valid_out` takes **4 clocks**, and a new
  sample can be accepted every clock.
* `fuzzy_in` (the error term) is valid 1 clock after the sample. `fuzzy_out`
  (the rule-base term) is valid after 2 clocks. Both are meant for
  observation.
* `control` loads only when a result is valid, and holds between samples.
* Reset is synchronous and active high. It clears every valid flag and
  register.
* The membership words are read in the stage that uses them. Hold them
  steady while samples are in flight.

## Where this differs from the source design

* The published controller ties `valid_in` to ground, and its synthesis keeps
  only 18 registers. Here `valid_in` is a real input, and the full pipeline
  (21 flip-flops) is kept.
* These are this design's choices, not given by the source:
  * the width coding of the membership word;
  * the seven-term split;
  * the rule table;
  * the midpoint defuzzification;
  * forming the error inside the top;
  * the per-stage latency;
  * the signals carried on `fuzzy_in` and `fuzzy_out`.
* Not built:
  * the 4-20 mA output stage, which is analog and outside the FPGA;
  * the FPGA's PLLs and memory blocks, which the controller does not use;
  * the heat exchanger itself, which is modelled only in the testbench.

## Simulation

Every testbench is self-checking and ends with a `TB_RESULT checks=… failures=…`
line. Run one with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/fuzzy_pkg.sv tb/controller_tb.sv --top-module controller_tb
./obj_dir/Vcontroller_tb
```

| testbench | what it covers |
|---|---|
| `tb/fuzzification_tb.sv` | every input against the default word and 300 random words |
| `tb/fuzzy_rulebase_tb.sv` | all 49 term pairs against the written-out table |
| `tb/defuzzification_tb.sv` | every label against the default word and 500 random words |
| `tb/flop_outputs_tb.sv`, `tb/synchronizer_tb.sv` | the two flop stages |
| `tb/controller_tb.sv` | end to end at default sizes, against an independent model; see below |
| `tb/closed_loop_tb.sv` | the controller driving the heat-exchanger model; see below |

`tb/controller_tb.sv` also checks the following:

* the 4-clock latency;
* one result per clock on back-to-back samples;
* that `control` holds between results;
* reset with samples in flight;
* that error saturation and rule clamping (both ways) and all seven output
  terms were reached.

`tb/closed_loop_tb.sv` uses `tb/sthe_plant_model.sv`, the FOPDT model above,
discretised exactly at a 10 s sample. The dead time becomes 6 samples.
Actuator codes map to 0..100 %, and temperature to 3.75 degC per code. The
bench runs three set-point conditions for 400 samples each: warm-up to code
9, a step down to 5, and a step up to 8. For each one it checks:

* the latency;
* that the outlet temperature settles within one code over the last 100
  samples;
* that it ends within two codes of the set point.

With the default words, the loop settles at the controller's own operating
point, about 26-28 degC (codes 7-8).
