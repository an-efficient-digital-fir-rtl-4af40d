# Faithfully rounded truncated-MCMA FIR filter

A linear-phase FIR filter whose multiply-accumulate is done as **one** partial-product matrix,
with the least significant part of that matrix never built. The output is not exact but
*faithfully rounded*: it always lies within one unit in the last place (ulp) of the exact
result, which is what a 12-bit output needs anyway. Dropping the low partial-product bits
is what saves area. The filter is written in plain SystemVerilog. All constant-dependent structure (recoding,
matrix shape, which bits are dropped, the bias constant) is worked out at elaboration time
from the coefficient parameters.

The default configuration is a 12-bit-in / 12-bit-out low-pass filter of order 28 ("filter A").
Two stand-alone 8 x 8 multiplier circuits come with it: a faithfully rounded truncated
multiplier that uses the same error budget, and a Vedic ("vertical and crosswise") multiplier.

## Datapath

```
 x_in ─► delay_line ──► sym_preadder ──► mcmat ───────────────────────────────► out reg ─► y
 12 b    29 taps x[n-i]  15 sums          ┌──────────────────────────────────┐   12 b
                         x[n-i]+x[n-28+i] │ recode constants (CSD / Booth-4)  │
                         (13 b)           │ one row per non-zero digit        │
                                          │ delete low PPBs (≤ 1 ulp in all)  │
                                          │ + bias row (signs, 1/2+1/2 ulp)   │
                                          │ csa_tree → 2 rows → adder         │
                                          │ drop columns < ulp, saturate      │
                                          └──────────────────────────────────┘
```

* **Direct form.** The delay line stores input samples (12 bits each), not partial sums, so
  it needs fewer flip-flops than the transposed form. All products meet in a single
  multiple-constant multiply/accumulate block (MCMA).
* **Linear phase.** With `a_i = a_{M-i}`, the two samples that share a coefficient are added
  first (`sym_preadder`). Filter A therefore multiplies 15 folded 13-bit operands, not 29
  samples. Antisymmetric filters (`a_i = -a_{M-i}`) subtract instead (`ANTISYM = 1`), and odd
  orders are supported too.

## The truncated MCMA (`mcmat`): how the matrix is built

This is the heart of the design. `y = Σ COEF[i]·x[i] / 2^FRAC`. Here `COEF` are integers in units of
2^-FRAC, and the output LSB (1 ulp) sits at column `FRAC` of the integer sum.

1. **Recoding.** Each constant is written in signed digits `d·2^p`, `d ∈ {−1, 0, +1}`. Two
   recodings are computed: canonical signed digit (CSD) and radix-4 modified Booth (digits
   {0, ±1, ±2}; ±2·4^k is the same as ±1·2^(2k+1)). The one with fewer non-zero digits is
   used. CSD is minimal, so it wins or ties in practice, and CSD is used on a tie.
2. **Rows.** Every non-zero digit yields one row: the operand shifted by `p`, or its negation.
   Filter A's 15 constants give 30 rows of 13 bits, which is 390 partial-product bits (PPBs).
3. **No sign extension.** A row `+x·2^p` is stored with its sign bit inverted. A row
   `−x·2^p` is stored with all *other* bits inverted (two's-complement negation). In both
   cases every stored bit has a positive weight. Because `not(s) = 1 − s`, the constants left over
   (`−2^(XW−1+p)` per row, `+2^p` per negative row) are known at elaboration and summed into
   one extra **bias row**.
4. **Deletion.** Every stored bit is 0 or 1, so leaving out a set of bits makes the result
   smaller by between 0 and the sum of their weights. Bits are left out column by column
   from the LSB (within the first partly deleted column, lowest row index first) while that
   maximum stays ≤ 1 ulp = 2^FRAC. The deletion error `E'_D` is then in [−1 ulp, 0]. For
   filter A, columns 0–5 and 16 of the 23 bits of column 6 go: 72 of 390 PPBs, for a worst
   case of 1022/2048 ulp.
5. **Rounding.** The bias row also gets `+2^FRAC`: half an ulp centres the deletion error
   (`E_D ∈ [−½, +½]` ulp), and the other half turns the final drop of the columns below
   `FRAC` into rounding (`E_R ∈ (−½, +½]` ulp). The total error is therefore in **(−1, +1] ulp**.
   The upper end is inclusive: when every deleted bit happens to be 0 and the exact sum lies
   on the output grid, the result is one ulp high. (For the stand-alone multiplier below this
   means 0 x 0 gives 1.) Lowering the bias by one unit and the deletion budget by one unit
   would make the bound strict at a negligible cost; the inclusive bound is kept here.
6. **Compression.** The kept PPBs plus the bias row go through `csa_tree` (rows grouped in
   threes, full adders, until two rows remain) and then one carry-propagate adder. Constant-zero
   positions (deleted or absent bits) are left for synthesis to remove.
7. **Saturation.** Σ|a_i| of filter A is 1.625, so full-scale inputs can overflow 12 bits.
   The integer part is clipped to the output range and `sat` is raised.

The error bound is relative to the exact result computed with the *quantized*
coefficients. The testbenches check it against that exact value for every output. The
observed range for filter A is about −0.70…+0.73 ulp.

## Interface and timing (`fir_mcmat_filter`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset (clears taps and output) |
| `in_valid`, `x_in` | in | 1, XW | a new sample; the delay line shifts only when `in_valid` is high |
| `out_valid`, `y` | out | 1, OUTW | faithfully rounded output, valid for one cycle |
| `sat_out` | out | 1 | `y` was clipped |

Throughput is one sample per clock. A sample accepted at clock edge *k* gives its output at
edge *k+2*: one edge into the delay line, one into the output register. The MCMA between them
is combinational, so it sets the clock period. Gaps in `in_valid` hold the filter state and
produce matching gaps in `out_valid`.

Parameters: `ORDER` (M), `NCOEF` (must be M/2+1), `COEF[NCOEF]` (a_0…a_{M/2}, integers in
units of 2^-FRAC), `FRAC`, `ANTISYM`, `XW`, `OUTW`. To use another filter, override `ORDER`,
`NCOEF`, `COEF` and `FRAC` together (see `tb/fir_workloads_tb.sv`).

## Coefficients

The filter specifications are the three of the published comparison. Normalised to the sample
rate fs, they are:

| filter | type | order | fraction bits | pass / stop edge | ripple / attenuation | coefficient set here |
|---|---|---|---|---|---|---|
| A (default) | low-pass | 28 | 11 | 0.15 / 0.25 fs | 0.09 dB / 46 dB | 46.2 dB, 0.088 dB, 10-bit magnitude |
| B | low-pass | 64 | 15 | 0.02 / 0.07 fs | 0.2 dB / 60 dB | 66 dB, 0.18 dB, 12-bit magnitude |
| C | high-pass | 121 | 19 | 0.40 / 0.37 fs | 0.1 dB / 80 dB | 84 dB, 0.09 dB, 17-bit magnitude |

The coefficient values are not the published ones, which are not available. They are
equiripple designs to the same specifications, quantized to the listed number of fractional
bits. Filter A's set then went through non-uniform quantization: each coefficient's LSBs were
dropped one at a time while the specification still held (a final pass that nudges
coefficients by one LSB found nothing more to drop), which left several
coefficients with only a few significant bits and two at zero. Its largest coefficient needs 10 bits
besides the sign, and B's and C's need 12 and 17, the effective word lengths given for the
published filters. Filter C has odd order, so as a high-pass it must be antisymmetric. Filter A lives in `rtl/fir_pkg.sv`;
B and C are parameter sets in `tb/fir_workloads_tb.sv`.

## Stand-alone multipliers

* **`trunc_mult`**: an N x N → N fixed-width multiplier (upper half of the product,
  ulp = 2^N), unsigned or two's complement (`SIGNED`), with the same budget as the MCMA.
  It deletes low PPBs worth at most 1 ulp and adds 1 ulp of bias. The result is then
  truncated after carry-save compression. Signed operands use the Baugh-Wooley form: bits
  `a[i]b[j]` with exactly one of i, j = N−1 are inverted, and `2^N − 2^(2N−1)` goes into the
  bias row. For 8 x 8, columns 0–4 and 3 bits of column 5 are deleted (18 of 64 PPBs). The
  result is registered, one edge after the operands. An exhaustive check shows every result within (−1, +1] ulp.
* **`vedic_mult`**: an unsigned N x N → 2N multiplier in Urdhva Tiryakbhyam form. Column k
  adds all crosswise products `a[i]b[k−i]` plus the carry word from column k−1. Its LSB is
  product bit k and the rest carries on. It is combinational.

`fir_design_top` places the filter and the three multiplier instances (unsigned truncated,
signed truncated, Vedic) side by side, each with its own ports. The multipliers do not feed
the filter, since the filter multiplies only by constants.

## Where this RTL makes its own choices

* The coefficient values (see above) and the reading of the band edges as fractions of fs.
  Read as fractions of the Nyquist rate, the specification of filter A is not reachable at
  order 28.
* Filter A is built with order 28, i.e. 29 taps. One table of the comparison calls it a
  "28-tap" filter.
* The output register, the valid handshake, reset to zero and output saturation.
* The order of deletion inside a partly deleted column. Rounding is done by dropping the
  columns of the final sum, not by keeping a PPB row aside for it. The bound is the same.
* The carry-save tree is row-wise. The final adder is left to synthesis (`+`).
* The stand-alone truncated multiplier is built with the improved deletion + rounding budget.
  The earlier three-step scheme (deletion, truncation, rounding) it was compared with is not
  built. The published multiplier waveforms show the product rounded down (176 x 57 → 39,
  exact 39.19) and, once, more than one ulp low (212 x 53 → 42, exact 43.89). This block
  rounds within one ulp instead and gives 40 and 44 for those operands.
* Where the Vedic multiplier is used is not specified, so it stands alone.
* The design-time quantization search (filter order, uniform then non-uniform
  quantization, fine-tuning) is software, not hardware. Only its output, the coefficient
  parameters, is part of this RTL.

## Verification

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<n>` and ends with a watchdog:

| testbench | what it checks |
|---|---|
| `csa_tree_tb` | sum + carry = Σ rows for 1, 2, 3, 7, 16 rows, random and all-ones data |
| `delay_line_tb` | every tap against a queue model, random enable gaps, reset |
| `sym_preadder_tb` | symmetric order 28 and antisymmetric order 5, including full-scale values |
| `mcmat_tb` | faithful bound / correct saturation for filter A's constants and a second set, 20 000 vectors |
| `trunc_mult_tb` | all 65 536 operand pairs, unsigned and signed, bound and latency |
| `vedic_mult_tb` | all operand pairs for N = 8 and N = 4 |
| `fir_mcmat_filter_tb` | filter A and a 3-tap (¼, ½, ¼) filter: impulse, random data with gaps, saturation, stop-band tone (≥ 40 dB down), pass-band tone, two-edge latency |
| `fir_workloads_tb` | filters B and C (orders 64 and 121): faithful bound on every output, pass-band and stop-band tones |
| `fir_design_top_tb` | the top at its default parameters: ~3 500 filter outputs, ~3 400 multiplier results, Vedic products; also counts input gaps, saturations, non-nearest results and negative operands, each of which must occur |

Run one with Verilator 5, from the repository root:

```
verilator --binary --timing -Wno-fatal --top-module fir_design_top_tb \
    -y rtl -y tb +libext+.sv -Irtl rtl/fir_pkg.sv tb/fir_design_top_tb.sv
./obj_dir/Vfir_design_top_tb
```

Each testbench takes well under a second of simulation.

## Files

* `rtl/fir_pkg.sv`: filter A constants, recoding functions, the partial-product row type
* `rtl/fir_design_top.sv`: top level
* `rtl/fir_mcmat_filter.sv`: the filter (delay line, pre-adders, MCMA, output register)
* `rtl/delay_line.sv`, `rtl/sym_preadder.sv`, `rtl/mcmat.sv`, `rtl/csa_tree.sv`
* `rtl/trunc_mult.sv`, `rtl/vedic_mult.sv`
* `tb/*_tb.sv`: testbenches as listed above
