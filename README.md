# ROBA: a rounding-based approximate multiplier

A hardware multiplier normally spends most of its area and energy adding up
partial products. The rounding-based approximate multiplier (ROBA) drops that
array completely. It first rounds each operand to its nearest power of two.
Multiplying by a power of two is a shift, so the product reduces to three
shifts, one addition and one subtraction.

The price is a small error. For 8-bit operands the result is never more than
11.1 % away from the exact product, and the mean relative error over all
non-zero unsigned operand pairs is 2.86 %. That level of error suits
error-tolerant DSP work such as image smoothing and sharpening.

This repository holds SystemVerilog for:

* the ROBA multiplier, as a combinational block and as a four-stage pipeline;
* a multiply-accumulate (MAC) unit built around the pipeline;
* three exact multipliers shown alongside it: a 16 × 16 column-bypassing
  array multiplier, a 4 × 4 row-bypassing array multiplier and a 16 × 16
  Wallace tree multiplier.

## The arithmetic

Let `ar` and `br` be the operands `a` and `b` rounded to powers of two. The
identity

    a*b = ar*b + br*a - ar*br + (a - ar)*(b - br)

is exact. ROBA drops the last term, since it is the product of two small
rounding errors:

    p = ar*b + br*a - ar*br

Each of the three remaining products has a power-of-two factor:

| term    | hardware                              |
|---------|---------------------------------------|
| `ar*b`  | `|b|` shifted left by `log2(ar)`      |
| `br*a`  | `|a|` shifted left by `log2(br)`      |
| `ar*br` | `ar` shifted left by `log2(br)`       |

**Rounding rule.** Let `p` be the position of the leading one of the
magnitude. If the bit just below it is also 1, the value is at least
1.5·2^p and rounds up to 2^(p+1). Otherwise it rounds down to 2^p. A value
exactly halfway between two powers rounds up, for example 3 → 4, 6 → 8 and
96 → 128. Zero rounds to zero, and all shifts by a zero operand give zero.

**Why there is no overflow or negative result.** Write the result as the
exact product minus the error term `(a-ar)(b-br)`. Rounding moves a value by
at most a third of itself, so the error term is at most one ninth of `a*b`.
Two consequences follow:

* the result is never negative;
* for N-bit operands the result always fits in 2N bits.

For unsigned operands of 192 or more, the rounded value is 2^N (256 for
N = 8). Internal sums are therefore 2N+1 bits wide. Assertions in `roba` and
`roba_pipe` check these bounds in simulation.

**Signed operands.** The multiplier works on magnitudes. A sign detector
takes `|a|` and `|b|` and the XOR of the two signs. At the end, a sign-set
stage negates the result when that XOR is 1. With the `SIGNED` parameter the
same RTL builds either the signed or the unsigned variant. Signed mode covers
−128·−128 = 16384.

Some worked examples (signed, N = 8):

| a    | b   | ar  | br | ar·b + br·a − ar·br | exact |
|------|-----|-----|----|---------------------|-------|
| 86   | −27 | 64  | 32 | −2432               | −2322 |
| 126  | 26  | 128 | 32 | 3264                | 3276  |
| −105 | −81 | 128 | 64 | 8896                | 8505  |
| 37   | −5  | 32  | 4  | −180                | −185  |
| −61  | 15  | 64  | 16 | −912                | −915  |
| −67  | −86 | 64  | 64 | 5696                | 5762  |

## Block structure

```
 a,b ─► sign detector ─► |a|,|b| ─► rounding ─► ar, br, log2(ar), log2(br)
                 │                                   │
                 │              ┌── shifter: |b|<<log2(ar) ──┐
                 │              ├── shifter: |a|<<log2(br) ──┼─► Kogge-Stone adder
                 │              └── shifter:  ar<<log2(br) ──┼──────────► subtractor
                 └──────────── sign ───────────────────────────────────► sign set ─► p
```

| module               | role                                                                              |
|----------------------|-----------------------------------------------------------------------------------|
| `roba_sign_detector` | magnitudes and product sign                                                       |
| `roba_rounding`      | nearest power of two: one-hot value plus exponent                                 |
| `roba_shifter`       | logarithmic barrel shifter, with a `kill` input that forces 0                     |
| `kogge_stone_adder`  | parallel-prefix adder, ⌈log2 W⌉ levels                                            |
| `roba_subtractor`    | `a + ~b + 1` on the Kogge-Stone adder; `no_borrow` flags `a ≥ b`                  |
| `roba_sign_set`      | conditional two's-complement negation of the 2N-bit magnitude                     |
| `roba`               | combinational multiplier, ports `x`, `y`, `p` (8 × 8 → 16 by default)             |
| `roba_pipe`          | the same datapath in four registered stages                                       |
| `roba_mac`           | `roba_pipe` plus an accumulator                                                   |

## Pipeline and MAC timing

`roba_pipe` uses one stage per group of blocks:

| stage | work                               | registered                              |
|-------|------------------------------------|-----------------------------------------|
| step1 | sign detector                      | `|A|`, `|B|`, sign, valid               |
| step2 | rounding                           | `ar`, `br`, exponents, magnitudes       |
| step3 | three shifters                     | `ar*b`, `br*a`, `ar*br`                 |
| step4 | adder, subtractor, sign set        | `Y`, `op_en`                            |

`start` qualifies `A` and `B` on a rising edge. Four edges later, `Y` holds
the product and `op_en` is high for one cycle. A new pair can be given every
cycle. Between results, `Y` keeps its last value. `rst` is synchronous and
active high. It empties every stage, so any results still in flight are
dropped, and `Y` then reads 0.

`roba_mac` adds each product from the pipeline into a signed 32-bit
accumulator `acc`, which wraps on overflow. By default its operands are
signed. With `SIGNED = 0` they are unsigned, as for 8-bit pixels, and
products are zero-extended before they are added.

* `acc` changes on the edge after the one that raised `op_en`, so five edges
  after `start`.
* `acc_valid` is high in the cycle the new sum first appears.
* A pair given with `clear` high starts a new sum: its product replaces the
  accumulator instead of being added. The `clear` flag travels in a small
  shift register alongside the pipeline, so it acts on that pair's product
  only.

## The exact array multipliers

Bypassing multipliers save switching power, not logic. When an operand bit is
zero, the adders that would only add zeros are held idle. Both designs below
are exact.

**Column bypassing (`column_bypass_mult`, default 16 × 16).**

* The array is carry-save. Cell (j, i) adds `a_i & b_j`, the sum from cell
  (j−1, i+1) and the carry from cell (j−1, i). Every cell in column i
  therefore depends on the same bit `a_i`.
* If `a_i = 0`, the partial product is 0. By induction down the column, so
  is every carry-in. The cell's adder inputs are gated off, a multiplexer
  passes the sum-in straight through, and the carry-out is 0.
* The lower product bits come from the right edge of the array. The upper
  half comes from a ripple-carry adder over the last row.

**Row bypassing (`row_bypass_mult`, default 4 × 4).**

* Row j is an N-bit ripple-carry adder. It adds `a & b_j` to the upper bits
  of the previous row's result and passes one product bit down.
* If `b_j = 0`, the row's adder inputs are blocked. A row of multiplexers
  passes the previous result on, with a zero carry.
* Published row-bypassing designs use tri-state gates to block the inputs.
  Here they are modelled as AND gating, which has the same effect on
  switching.

**Wallace tree (`wallace_mult`, default 16 × 16).**

* The N² partial products are sorted into 2N columns.
* Each reduction layer compresses every column. Triples go to full adders,
  a leftover pair goes to a half adder, and a single leftover bit passes
  through. The carries move up one column.
* Reduction stops when no column holds more than two bits; for N = 16 that
  takes six layers. A Kogge-Stone adder adds the final two rows.
* The column heights of every layer are computed at elaboration by constant
  functions, so the tree is plain wiring.

The sizes follow the simulations these multipliers were presented with:
16-bit operands with a 32-bit product, and 4-bit operands with an 8-bit
product. All three take any `N ≥ 2`.

## Top level

`robat` places the designs side by side, each with its own ports. None of
them share signals.

| group              | ports                                               | instance                    |
|--------------------|-----------------------------------------------------|-----------------------------|
| signed ROBA MAC    | `clk rst start clear A B Y op_en acc acc_valid`     | `roba_mac` (→ `roba_pipe`)  |
| unsigned ROBA      | `ux uy up`                                          | `roba #(.SIGNED(0))`        |
| column bypassing   | `ca cb cc`                                          | `column_bypass_mult`        |
| row bypassing      | `ra rb rp`                                          | `row_bypass_mult`           |
| Wallace tree       | `wa wb wc`                                          | `wallace_mult`              |

Parameters: `N_ROBA = 8`, `ACC_W = 32`, `N_COL = 16`, `N_ROW = 4`,
`N_WAL = 16`.

## How far it follows the source design, and where it departs

These parts come from the source design:

* the block sequence: sign detector, rounding, three shifters, Kogge-Stone
  adder, subtractor, sign set;
* the formula `ar*b + br*a − ar*br`, with rounding to powers of two;
* the 8-bit operands and 16-bit product;
* the port names `clk rst start A B Y op_en` and the four pipeline stages
  `step1`..`step4`;
* the operand sizes of the array and Wallace multipliers;
* the column- and row-bypassing principle;
* the Wallace scheme of half and full adders reducing to two rows, followed
  by a fast adder.

This RTL matches the reported figures:

* It reproduces every product in the table above. These are the values shown
  in the design's simulation waveforms.
* Its 2.86 % mean relative error matches the 2.9 % error rate reported for
  the design.

The source also gives worked examples that keep one operand unrounded (for
example 86 × 27 with `br = 27`). These examples come out exact, which
contradicts power-of-two rounding and the waveforms. This RTL follows the
power-of-two rule, which gives 2432 for 86 × 27.

These parts are choices made in this RTL:

* the exact rounding circuit and the round-up rule for halfway values;
* the logarithmic shifter;
* building the subtractor from the Kogge-Stone adder;
* which blocks go in which pipeline stage;
* the synchronous reset and the one-cycle `op_en` pulse;
* all of the MAC: its 32-bit width, the `clear` protocol and the
  wrap-around;
* the carry-save and ripple-carry organisation of the two array multipliers,
  and AND gating in place of tri-state gates;
* the Kogge-Stone final adder of the Wallace multiplier;
* the `SIGNED` parameter.

Not included:

* the aging-aware control. In the source it wraps the bypassing multipliers
  with an aging indicator, adaptive hold logic and gating, but how it works
  is not specified well enough to build;
* the image-smoothing filter, which is an application of the multiplier, not
  a hardware block.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench                 | what it covers                                                                                          |
|---------------------------|---------------------------------------------------------------------------------------------------------|
| `tb_roba`                 | all 65 536 operand pairs, signed and unsigned, against an integer model; the worked examples; mean error |
| `tb_roba_pipe`            | random back-to-back and bubbled traffic, exact four-cycle latency, `Y` hold, reset with results in flight |
| `tb_roba_mac`             | 300 random dot products of 1–25 terms, each started with `clear`                                        |
| `tb_column_bypass_mult`, `tb_row_bypass_mult`, `tb_wallace_mult` | every pair at 4 × 4, 20 000 random and corner pairs at 16 × 16 |
| sub-block testbenches     | sign detector, rounding (all 256 values), shifter, Kogge-Stone adder, subtractor, sign set              |
| `tb_roba_smoothing`       | 5 × 5 image smoothing on the unsigned MAC (see below)                                                   |
| `tb_robat`                | the whole top at default parameters for about 4 000 cycles                                              |

`tb_robat` also counts how often each mechanism occurs, and fails if any
never does. The mechanisms are:

* rounding up and rounding down;
* zero operands and power-of-two operands;
* unsigned rounding up to 2^N;
* negative products;
* back-to-back issue, bubbles and a reset flush;
* bypassed columns and bypassed rows;
* MAC clears and accumulations.

**Image smoothing.** `tb_roba_smoothing` smooths a generated 32 × 32
8-bit image. It uses the 5 × 5 mask with 1s on the border, 4s inside and a
centre of 12, divided by 60. Each of the 784 output pixels takes 25
back-to-back MAC operations, so 19 600 operations run in 19 600 cycles.
Against exact smoothing, the result has a PSNR of 41.7 dB. The design is
reported at above 40 dB for this filter. The coefficients 1 and 4 are powers
of two, and a product with a power of two is exact under ROBA. So all of the
error comes from the centre tap. There 12 rounds to 16, and the product is
off by 4·(a − ar).

To run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        --top-module tb_robat tb/tb_robat.sv -o sim
    ./obj_dir/sim

Swap in another testbench name to run other tests. Each testbench finishes
in well under a second.

## Changing it

* **Operand width:** `N` on `roba`, `roba_pipe` or `roba_mac`, or `N_ROBA`
  on the top. All internal widths follow from it: exponents of
  ⌈log2(N+1)⌉ bits and sums of 2N+1 bits.
* **Signed or unsigned:** `SIGNED` on `roba`, `roba_pipe` and `roba_mac`.
  In the top, the MAC is signed and the combinational `roba` is unsigned.
* **Pipeline latency:** if you move stage boundaries in `roba_pipe`, also
  update `LAT` in `roba_mac` and in the testbenches.
