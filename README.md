# Four-input hierarchical fuzzy system

A fuzzy controller with *n* inputs and *m* linguistic terms per input needs
m^n rules if every input takes part in every rule. For four inputs with five
terms that is 625 rules, each needing a four-way minimum, and the number
grows by a factor of five for every extra input. This design computes the
same four-input function with **three two-input fuzzy logic units (FLUs) of
25 rules each, 75 rules in all**, arranged in two layers:

```
  x1 ─┐                    U1 = {A1..A5}
      ├─ FLU1 (fuzzify + 25 rules) ──┐
  x2 ─┘                              ├─ FLU3 (25 rules) ── defuzzify ── y_sign, y_mag
  x3 ─┐                              │
      ├─ FLU2 (fuzzify + 25 rules) ──┘
  x4 ─┘                    U2 = {B1..B5}
```

The layer-1 outputs U1 and U2 are not defuzzified. They stay five-grade fuzzy
vectors, one grade per "mapping variable" A1..A5 or B1..B5. Each mapping
variable is treated as a linguistic term in its own right, so FLU3 can apply
an ordinary rule table to them. This is the *limpid* hierarchical scheme
(L-HFS). Its point is that the two-layer system needs no new rule design: it
reproduces the single-layer 625-rule system exactly. The section
[Why three small rule bases equal one large one](#why-three-small-rule-bases-equal-one-large-one)
explains why.

The datapath is 8 bits wide throughout. A result is produced every 17 clock
cycles.

## Number formats

| Quantity | Encoding |
|---|---|
| crisp input `x1..x4` | unsigned 8-bit, real value = 2·x/255 − 1 (00 = −1, FF = +1) |
| membership grade | unsigned 8-bit, FF ≈ 1.0 |
| fuzzy vector (`hfs_pkg::fset_t`) | `fn[4:0]` flags + `msf[4:0]` grades, index 0..4 = NB, NS, ZE, PS, PB |
| crisp output | `y_sign` + 20-bit magnitude `y_mag`, on the scale 255 = 1.0 (so the real result is ±y_mag/255) |

`fn[i]` is set exactly when `msf[i]` is non-zero. The rule bases use the flags
to enable rules, and they pass their own output flags on, so the output of a
rule base has the same format as the output of a fuzzifier. That lets FLU3
be a bare rule base.

## Membership functions (`fuzzifier`)

Five breakpoints split the input range into a left shoulder, four overlap
segments and a right shoulder:

| input range | active terms | grades |
|---|---|---|
| 00 – 29 | NB | NB = FF |
| 2A – 54 | NB ↘, NS ↗ | NB = 6·(55−x), NS = 6·(x−2A) |
| 55 – 7E | NS ↘, ZE ↗ | NS = 5·(7F−x), ZE = 5·(x−55) |
| 7F – A9 | ZE ↘, PS ↗ | ZE = 6·(AA−x), PS = 6·(x−7F) |
| AA – D9 | PS ↘, PB ↗ | PS = 5·(DA−x), PB = 5·(x−AA) |
| DA – FF | PB | PB = FF |

All grades saturate at FF. The breakpoints give the familiar five-term
partition: NS, ZE and PS peak at 55, 7F and AA. The per-segment slopes 6, 5,
6, 5 reproduce the grades of the original implementation. For example, x = 40
gives NB = 7E and NS = 84, and x = 70 gives NS = 4B and ZE = 87. As a
result, the partition is not exactly normalised. In the slope-5 segments the
grades stay below FF: NS at x = 55 is D2, and PB at x = D9 is EB. Both
`BP` and `SLOPE` are parameters (defaults in `hfs_pkg`) if a cleaner
partition is wanted.

## The rule table

All three FLUs use one table, `hfs_pkg::LHFS_RULES`, indexed [first
input][second input]:

|        | NB | NS | ZE | PS | PB |
|---|---|---|---|---|---|
| **NB** | NB | NB | NB | NS | ZE |
| **NS** | NB | NS | NS | ZE | PS |
| **ZE** | NB | NS | ZE | PS | PB |
| **PS** | NS | ZE | PS | PS | PB |
| **PB** | ZE | PS | PB | PB | PB |

In FLU1 the consequent "NB..PB" is read as A1..A5. In FLU2 it is read as
B1..B5. In FLU3 it is the output term. The table is symmetric, so input order
never matters.

`rule_base` evaluates all 25 rules at once. The strength of a rule is the
minimum of its two antecedent grades. Each output term takes the maximum
strength of the rules that conclude it. The result is registered.

## Why three small rule bases equal one large one

The single-layer system would have one rule per input combination
(i1, i2, i3, i4), 625 in all, with consequent `T[T[i1][i2]][T[i3][i4]]`. Here
T is the table above. Its output grade for term k is

    max over {i1..i4 : T[T[i1][i2]][T[i3][i4]] = k} of min(g1[i1], g2[i2], g3[i3], g4[i4])

Group the 625 combinations by a = T[i1][i2] and b = T[i3][i4]. Since min and
max distribute over each other, the expression becomes

    max over {a,b : T[a][b] = k} of min( max over {T[i1][i2]=a} min(g1,g2),
                                         max over {T[i3][i4]=b} min(g3,g4) )

The inner maxima are exactly the grades of A_a (FLU1) and B_b (FLU2), and
the outer expression is FLU3. The hierarchical result is therefore identical
to the 625-rule result for every input, not just close to it. `tb_hfs_top`
checks this on every vector it applies, using a flat 625-rule model as its
reference. The identity rests on min-max inference. With product inference
or sum aggregation it would not hold exactly.

## Defuzzification (`defuzzifier`)

The output terms are singletons at −170, −85, 0, +85, +170 (−2/3, −1/3, 0,
+1/3, +2/3). The crisp result is the weighted average Σ wₖ·μₖ / Σ μₖ,
computed in sign-magnitude form:

1. **accumulate** (one term per cycle): `sum_mu` = Σ μₖ (12 bits),
   `sum_neg` = Σ |wₖ|·μₖ over the negative weights, and `sum_pos` = Σ wₖ·μₖ
   over the positive weights (20 bits each);
2. **difference**: `diff` = |sum_pos − sum_neg| and sign = (sum_neg > sum_pos);
3. **divide**: a restoring divider produces diff / sum_mu, one bit per cycle.
   Since |w| ≤ 170 the quotient fits in 8 bits, so 8 steps suffice. The
   quotient is truncated toward zero and zero-extended to the 20-bit
   output. The top 12 bits of `y_mag` are therefore always zero.

Worked example, x = (40, B0, A0, 70):

| stage | values |
|---|---|
| fuzzify | x1: NB 7E, NS 84 · x2: PS D2, PB 1E · x3: ZE 3C, PS C6 · x4: NS 4B, ZE 87 |
| FLU1 → U1 | A2 7E, A3 84, A4 1E |
| FLU2 → U2 | B2 3C, B3 4B, B4 87 |
| FLU3 | NS 4B, ZE 7E, PS 84 |
| sums | sum_mu 14D, sum_neg 18E7 (= 85·4B), sum_pos 2BD4 (= 85·84), diff 12ED |
| result | 12ED / 14D = 14.55 → y_mag = 0E, y_sign = 0 (≈ +0.055) |

The inner weights ±85 and every intermediate value in this table agree with
the original implementation. The outer weights ±170 are this design's choice
(evenly spaced): NB and PB do not fire in the example, so it does not fix
them. Change `OUT_WEIGHT` in `hfs_pkg` to move them. The divider adapts its
length to the largest weight, but the frame schedule below assumes 8 divide
steps.

## Frame timing (`hfs_sequencer`)

The system runs freely in frames of 17 cycles, one input set per frame.
`hfs_sequencer` counts steps 0..16, and each stage works in a fixed step:

| step | edge at the end of the step does |
|---|---|
| 0 | the four fuzzifiers sample `x1..x4` and register their grades |
| 1 | FLU1 and FLU2 rule bases register U1, U2 |
| 2 | FLU3 registers the output grades |
| 3 | defuzzifier captures them and accumulates term 0 |
| 4 – 7 | accumulate terms 1 – 4 |
| 8 | difference and sign |
| 9 – 16 | 8 divider steps; the last one loads `y_sign`, `y_mag` |

`y_valid` is high for the cycle after the step-16 edge. That cycle is step 0
of the next frame, whose inputs are sampled at its end. A host that changes
the inputs in response to `y_valid` therefore gets them into the next frame.
The inputs only need to be stable at the step-0 edge. The 17-cycle operation
matches the original implementation (17 cycles at 8.5 ns there). The
assignment of work to steps is this design's own. An assertion in `hfs_top`
checks that the defuzzifier is idle whenever a frame starts.

There is no pipelining across frames. The layer registers are idle for most
of the frame, and the throughput is one result per 17 cycles.

## Top-level interface (`hfs_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst` | in | 1 | synchronous, active-high reset; the first frame starts on release |
| `x1..x4` | in | 8 each | crisp inputs |
| `y_sign` | out | 1 | 1 = negative result |
| `y_mag` | out | 20 | result magnitude, 255 = 1.0 |
| `y_valid` | out | 1 | one-cycle pulse when a new result is loaded |

Without `y_valid` these are the 55 pins of the original FPGA implementation.
`y_valid` is an addition.

## Files

| file | contents |
|---|---|
| `rtl/hfs_pkg.sv` | types (`term_e`, `fset_t`), rule table, breakpoints, slopes, weights, widths, frame schedule |
| `rtl/fuzzifier.sv` | one input → registered five-term fuzzy vector |
| `rtl/rule_base.sv` | 25-rule min-max rule base (FLU3, and inside FLU1/FLU2) |
| `rtl/flu_2in.sv` | layer-1 FLU: two fuzzifiers + rule base |
| `rtl/defuzzifier.sv` | weighted average with serial accumulation and restoring divider |
| `rtl/hfs_sequencer.sv` | 17-step frame counter and stage enables |
| `rtl/hfs_top.sv` | the complete system |
| `tb/hfs_ref_pkg.sv` | independent behavioural model, including the flat 625-rule system |
| `tb/tb_*.sv` | one self-checking testbench per module |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and stops on a
watchdog if something hangs. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/hfs_pkg.sv tb/hfs_ref_pkg.sv tb/tb_hfs_top.sv --top-module tb_hfs_top
./obj_dir/Vtb_hfs_top
```

Replace `tb_hfs_top` with any other testbench name. What they cover:

- `tb_fuzzifier`: all 256 input codes against a per-term reference, the
  known grades, latency, hold and reset.
- `tb_rule_base`: each of the 25 rules alone, 3000 random vectors, flag
  gating, and the layer-2 example.
- `tb_flu_2in`: all 65536 input pairs of one layer-1 unit.
- `tb_defuzzifier`: random and corner grade vectors against the exact
  weighted average, the example's intermediate sums, and the 14-edge latency.
- `tb_hfs_sequencer`: step order, one enable per stage per frame, and
  mid-frame reset.
- `tb_hfs_top`: the worked example and about 4,200 further vectors against
  the flat 625-rule model, at default parameters. It checks the 17-cycle
  frame and that the outputs hold between results. It also counts the
  mechanisms: every input region, grade clipping, every term of each FLU,
  and negative, positive and zero results. A mechanism that never occurs
  counts as a failure. It runs in well under a minute.

## Trust and departures

What is taken from the original design: the two-layer structure, the
five-term input partition and its breakpoints, the rule table, min-max
behaviour, the weighted-average defuzzifier with separate negative and
positive sums, a sign-magnitude 20-bit output, and 17 cycles per result. The
design reproduces every published intermediate value of the worked example
above.

This design's own choices:
- the slopes 6/5/6/5 (inferred from published grades rather than stated);
- the outer output weights ±170;
- the fn rule gating and flags on rule-base outputs;
- the per-step schedule, serial accumulation and restoring divider;
- the synchronous active-high reset, and the `y_valid` output.

The single-layer 625-rule system, which the hierarchical design is
usually compared against, is not included as RTL. It exists only as the
behavioural reference in `tb/hfs_ref_pkg.sv`.

No FPGA mapping or timing closure has been done. The original reached an
8.5 ns clock on Altera devices. Here the critical path is the fuzzifier's
multiply-compare or the 25-way min/max tree of a rule base, and either can
be pipelined if needed.
