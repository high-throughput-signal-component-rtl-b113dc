# AMO signal component separator: a piecewise-linear fixed-point datapath

An outphasing transmitter does not amplify a varying-amplitude signal directly.
It splits every baseband sample `A·e^{jθ}` into two phase-modulated
carriers. Each is driven by a switching power amplifier at a constant amplitude,
and the two are summed in a power combiner. In the *asymmetric multi-level*
(AMO) variant, each amplifier also switches between four supply levels
V1 ≤ V2 ≤ V3 ≤ V4. The digital front end, the *signal component separator*
(SCS), must therefore produce per sample:

* two supply codes `a1`, `a2` (which of V1..V4 each amplifier uses);
* two phases φ1, φ2 such that `a1·e^{jφ1} + a2·e^{jφ2}` rebuilds the sample.

The phases come from law-of-cosines geometry: square roots, reciprocals, arctangent,
arccosine and, for the phase modulator that follows, `1/(1+tan φ)`.
At multi-GSample/s rates and 12-bit phase accuracy, a direct look-up table
per function would need 2^15..2^19 entries. CORDIC would cost too much power.

This design evaluates every nonlinear function with one small **fixed-point
piecewise-linear (PWL) unit**. It has 128 table entries, one subtractor and one
short multiplier, in two pipeline stages. It chains seven such units into a
20-stage pipeline that accepts one sample per clock. Two copies run side by
side, fed with the even and odd outputs of an interpolating pulse-shaping
filter, so the sample rate is twice the clock rate.

## Signal flow

```
 ext_sym_i/q ─┐
              ├─mux─► compensator ─► shaping_filter ──even I/Q──► amo_scs (even) ─► even_* outputs
 prbs_gen ────┘  ▲    1K x 24 LUT    polyphase FIR  ──odd  I/Q──► amo_scs (odd)  ─► odd_*  outputs
                 │                    OSR 2 or 4
            sel_prbs          sym_en (symbol request) ◄──┘

 amo_scs:  I,Q ─► get_theta (8) ─► θ ─► 8-stage delay ─────────────┐
                      │ |I|,|Q| after 1 clock                      ▼
                      └────────► get_alpha (15) ─► α1, α2 ─► get_phi (4) ─► fφ1, fφ2, quad1, quad2
                                     └─ a1, a2 ─► 4-stage delay ─────────► a1, a2
```

A single write bus, `cfg` (struct `cfg_wr_t`: `we`, 4-bit `tgt`, 12-bit `idx`,
48-bit `data`), loads every table:
* PWL tables;
* amplitude thresholds;
* arccos-argument constants;
* compensator LUT;
* filter coefficients.

Both separator copies receive the same writes.

## The PWL function unit (`pwl_approx`)

This is the core idea. The other blocks are mostly preprocessing that brings
each function's input into a range where a PWL fit works well, and
postprocessing that undoes it.

The input code `x` of `IN_W` bits is split into a 7-bit interval number `x1`
(the MSBs) and an offset `x2` (the remaining `IN_W-7` bits). Each interval
`i` stores three numbers, and the output is

```
y = sat( b_i + ((k_i · (x2·16 − s_i)) >>> (KF + 4)) )
```

* `b_i`: the function value at the start of the interval (integer output LSBs,
  16 bits);
* `k_i`: the slope, a signed 16-bit value with `KF` fractional bits;
* `s_i`: a small signed offset, in units of 1/16 of an `x2` step. It absorbs
  what is lost when `b_i` is rounded to an integer, so that the short product
  `k·(x2 − s)` restores the fraction of `b`.

The arithmetic operates on operands of about half the output width:
* the table is addressed by 7 bits;
* the subtractor is `IN_W-7+4` bits wide;
* the multiplier is 16 × (`IN_W-7+6`) bits.

This keeps the unit short enough to pipeline in two stages:

| clock | work |
|-------|------|
| 1 | table read, `d = x2·16 − s` |
| 2 | `k·d`, arithmetic shift, add `b`, saturate to `[0, 2^OUT_W−1]` |

Latency is 2 clocks, and a new input is accepted every clock.

### Filling the table

The table contents are computed off-line. The testbench package
`tb/amo_ref_pkg.sv` does it in SystemVerilog (`fit_entry`). For each interval:

1. Fit a least-squares line `y ≈ kr·x2 + br` through the exact function values at all `x2`.
2. `b = floor(br + ½)`, so the floor in the datapath then acts as rounding.
3. `s = (b − br − ½)·16·2^KF / k`, rounded. This is the offset that cancels the rounding of `b`.
4. `k = round(kr·2^KF)`.

If `k` rounds to 0 or `s` would not fit in 16 bits, `b` is rounded directly and `s = 0`.

Per-function geometry (constants in `amo_pkg`):

| function | unit input | IN_W | OUT_W | KF | used in |
|----------|-----------|------|-------|----|---------|
| 1/x on [1,2) | leading-one-normalised \|I\| (leading 1 dropped) | 11 | 16 | 10 | get_theta |
| arctan on [0,1) | quotient \|Q\|/\|I\| | 15 | 15 | 14 | get_theta |
| √x on [¼,1) | scaled A² | 16 | 16 | 13 | get_alpha |
| 1/√x on [¼,1) | scaled A² | 16 | 16 | 13 | get_alpha |
| arccos on [0,1) | \|argument\| | 12 | 15 | 9 | get_alpha (×2) |
| 1/(1+tan φ) on [0,π/2) | first-quadrant phase | 13 | 10 | 14 | get_phi (×2) |

The measured worst-case errors of the fitted units are between 0.5 and 2.2
output LSB.

## Angle of the sample (`get_theta`, 8 clocks)

`θ = atan2(Q, I)` on a 15-bit circle (2π = 2^15). It is computed in five stages:

* **Prepare (1 clock).**
  * Take absolute values (−4096 saturates to 4095).
  * Swap so that the smaller value is the numerator.
  * Record three flags: sign of I, sign of Q, swapped.
  * Left-shift the larger value until its MSB is 1.

  `|I|` and `|Q|` leave here, after one clock, towards `get_alpha`.
* **Reciprocal (2 clocks).** A PWL unit computes 1/x of the normalised divisor.
* **Quotient (2 clocks).** The numerator is multiplied by 1/x and shifted back,
  giving a 15-bit quotient in [0,1].
* **Arctangent (2 clocks).** A PWL unit computes arctan of the quotient.
* **Unfold (1 clock).** The swap is undone (π/2 − θ′), then the signs (π − θ,
  2π − θ). Zero numerator gives 0 and equal magnitudes give π/4 exactly.

The flags and shift counts travel through delay lines alongside the data.

## Supply selection and outphasing angles (`amp_select`, `get_alpha`, 15 clocks)

With supplies `a_i` (path 1) and `a_j` (path 2), the two vectors form a
triangle with the sample. The angles between each vector and the sample are:

```
α1 = arccos( (a_i² + A² − a_j²) / (2·A·a_i) )      φ1 = θ − α1
α2 = arccos( (a_j² + A² − a_i²) / (2·A·a_j) )      φ2 = θ + α2
```

Dividing by `A` directly would need a long division on A²-sized numbers.
Instead, each argument is rewritten as

```
arg = c1·A + c2·(1/A),   c1 = 1/(2a_i),   c2 = (a_i² − a_j²)/(2a_i)
```

`c1` and `c2` depend only on the supply pair, so they are programmed constants.
Only `A` and `1/A` are computed per sample.

**Supply pair.** `A² = |I|² + |Q|²` (top 19 of the 25 bits) is compared with
seven thresholds, normally set as follows:

```
th1..th7 = (2V1)², (V1+V2)², (2V2)², (V2+V3)², (2V3)², (V3+V4)², (2V4)²
```

The number of thresholds th1..th6 that A² exceeds gives the region r (0..6).
The region selects the pair (V1,V1) (V1,V2) (V2,V2) (V2,V3) (V3,V3) (V3,V4)
(V4,V4); that is, `a1 = r/2`, `a2 = (r+1)/2`. This picks the smallest supplies
that can still form the sample. Moving to a neighbouring region changes only
one of the two supplies. Samples above th7 keep the top pair, and their
arccos argument is clamped. The seventh threshold is stored but not used for
selection.

Pipeline:

| clocks | stage |
|--------|-------|
| 1–2 | squares, sum → A² |
| 3–4 | scale A² by 4^k into [¼,1) (shift by 2k); region compare; constants looked up |
| 5–6 | PWL √ and 1/√ |
| 7–8 | undo the scaling: `A = √·2^-k` (12 bits, value/2^11, rounded); `1/A = (1/√)·2^k` (16 bits, value/2^10, saturating at 64) |
| 9–11 | four products `c1·A`, `c2/A` per path, sums rounded to 2^-12, sign/magnitude split, clamp to magnitude < 1 |
| 12–15 | two arccos PWL units, reflection `π − arccos|x|` for negative arguments, output register |

The supply codes are delayed to leave together with the angles.

Rounding (rather than truncating) A, 1/A and the arguments matters. Truncation
biased α by about 12 LSB.

## Output phases (`get_phi`, 4 clocks)

φ1 = θ − α1 and φ2 = θ + α2 are formed on the 15-bit circle:
* the two MSBs are the quadrant (`quad1`, `quad2`);
* the 13 LSBs, the angle within the quadrant, feed two PWL units computing
  `f(φ) = 1/(1+tan φ)`.

`f` is 10 bits, value/2^10, with f(0) saturating to 1023. Its derivative stays
bounded on the first quadrant. This is the form a downstream digital-to-RF
phase converter takes.

The phase is recovered as `quad·π/2 + arctan(1/f − 1)`.

## Symbol path (`prbs_gen`, `compensator`, `shaping_filter`)

* **Source.** 3-bit I and Q symbols (64-QAM) come from the `ext_sym_*` ports
  or, with `sel_prbs`, from an on-chip PRBS.
  * The PRBS is x^15 + x^14 + 1 with seed 1.
  * It advances six bits per symbol: I = bits 5:3, Q = bits 2:0.
  * It advances only when a symbol is requested.
* **Compensator.** A 1024 × 24 table maps the current symbol plus the two MSBs
  of the previous I and Q symbols to 12-bit I and Q levels. The address is
  `{sym_i, sym_q, prev_i[2:1], prev_q[2:1]}`. This gives a short-memory
  symbol-space predistortion. The result is registered, with `pd_valid` one
  clock after the request.
* **Shaping filter.**
  * A polyphase interpolator with 8 symbol spans and 32 programmable 12-bit
    coefficients (value/2^10).
  * Phase `p` of the output is `Σ_t h[OSR·t + p]·s[t]`, shifted right by 9 and
    saturated to ±4095 (13-bit samples, value/2^12).
  * Each clock produces an even sample and an odd sample:
    * **OSR 2:** a symbol is taken every clock, and phases (0,1) are output
      every clock.
    * **OSR 4:** a symbol is taken every second clock (`sym_en` toggles), and
      the outputs alternate between phases (0,1) and (2,3).

  Outputs are registered.

## Timing summary

| path | clocks |
|------|--------|
| PWL unit | 2 |
| get_theta (θ) / get_theta (\|I\|,\|Q\|) | 8 / 1 |
| get_alpha | 15 |
| get_phi | 4 |
| amo_scs, I/Q in → all outputs | 20 (8 + 8-stage θ delay + 4 = 1 + 15 + 4-stage supply delay) |
| symbol request → filter output containing that symbol | 2 (`sym_en` → `pd_valid` → history) |

Everything accepts one sample (per copy) per clock, with no stalls. Reset is
synchronous and active low. It clears pipelines and state but not the
programmable tables.

## Programming map (`cfg_tgt_e`)

| tgt | name | idx | data |
|-----|------|-----|------|
| 0–5 | RECIP, ATAN, SQRT, RSQRT, ACOS, FTAN | interval 0..127 | `{b[15:0], k[15:0], s[15:0]}` (ACOS loads both arccos units, FTAN both f(φ) units) |
| 6 | THRESH | 0..6 = th1..th7 | 19-bit A² (value/2^18) |
| 7 | CONST | 4·region + {0: c1 path 1, 1: c2 path 1, 2: c1 path 2, 3: c2 path 2} | c1 13-bit unsigned value/2^10; c2 13-bit signed value/2^11 |
| 8 | COMP | symbol address 0..1023 | `{I[11:0], Q[11:0]}` |
| 9 | COEF | 0..31 | 12-bit signed coefficient |

The supply levels are not fixed by the hardware. They enter only through
the thresholds and the c1/c2 constants. The test configuration uses V =
0.12, 0.22, 0.32, 0.42 of I/Q full scale. With raised-cosine (β = 0.5)
coefficients scaled by 0.55, the filtered 64-QAM stream (A² up to 0.68)
then passes through all seven regions.

## Files

`rtl/`:

| file | contents |
|------|----------|
| `amo_pkg.sv` | widths, `cfg_wr_t`, `pwl_entry_t`, per-function PWL geometry, supply-pair helpers |
| `pwl_approx.sv` | PWL function unit |
| `delay_line.sv` | register chain (latency matching) |
| `get_theta.sv` | angle stage |
| `amp_select.sv` | region compare and constant select |
| `get_alpha.sv` | outphasing angle stage |
| `get_phi.sv` | output phase stage |
| `amo_scs.sv` | one complete separator |
| `prbs_gen.sv` | symbol source |
| `compensator.sv` | symbol-space predistortion |
| `shaping_filter.sv` | interleaved pulse shaper |
| `amo_baseband_top.sv` | top level: source → compensator → filter → two separators |

`tb/`:
* `amo_ref_pkg.sv` holds the floating-point reference functions, the table
  fit, a bit-exact PWL model and the full configuration sequence.
* There is one self-checking testbench per module, named `tb_<module>.sv`.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_pwl_acos16` | the PWL unit as a stand-alone 16-bit arccos with 2^8 intervals: all 65536 inputs bit-exact, and within 2^-15 of arccos(x)/2π for x ≤ 0.963 (measured worst case 1.05 LSB of 2^-16) |
| `tb_pwl_approx` | six units (all functions) over their whole input range, bit-exact against the integer model and within 2–2.5 LSB of the exact function; 2-clock latency |
| `tb_amp_select` | region choice against thresholds (random and near each threshold), constants, 1-clock latency |
| `tb_get_theta` | θ within 3 LSB of atan2 over random and special inputs (axes, diagonals, −4096); 8-clock latency, \|I\|,\|Q\| at 1 clock |
| `tb_get_alpha` | supply codes exact; α within 24 LSB where the arccos argument is inside ±0.95; every region seen; 15-clock latency |
| `tb_get_phi` | quadrants and f(φ) against the exact function; 4-clock latency |
| `tb_amo_scs` | whole separator against floating-point math, 20-clock latency, all regions and quadrants |
| `tb_prbs_gen` | bit-serial model of the sequence, hold when not enabled, period 2^15−1 |
| `tb_compensator` | table map with random request gaps |
| `tb_shaping_filter` | impulse responses at OSR 2 and 4, random data against a model with mode switches, `sym_en` pattern |
| `tb_amo_baseband_top` | the top at its default parameters: full table load, then external/PRBS symbols at OSR 2 and OSR 4. A cycle model of source, compensator and filter predicts the separator inputs, and both separator outputs are checked 20 clocks later. It counts use of each source, each OSR mode, all seven supply regions, all four quadrants and supply changes, and fails if any never occurs. It also rebuilds each sample from the two outphased vectors and requires the rms error to stay below 1 %. |

In the end-to-end run, the worst phase error was 25 LSB of 2π/2^15 (0.27°).
Summing the two outphased vectors `a1·e^{jφ1} + a2·e^{jφ2}` back into a
sample reproduces the filter output with an rms error of 0.12 % of the rms
sample magnitude.
Typical errors are a few LSB. The worst cases sit where the arccos argument
approaches ±0.95: there arccos is steep, and the quantised `c1·A + c2/A` is
amplified, most for the smallest supply level.

To simulate a testbench with Verilator (5.x), run from the project root:

```
verilator --binary --timing -Wno-fatal --top-module tb_amo_baseband_top -y rtl -y tb +libext+.sv \
          -Irtl -Itb rtl/amo_pkg.sv tb/amo_ref_pkg.sv tb/tb_amo_baseband_top.sv
./obj_dir/Vtb_amo_baseband_top
```

Substitute any other testbench name. `-Wno-fatal` keeps the width-extension
warnings of the testbench arithmetic from stopping the build. The design itself is plain synthesizable
SystemVerilog.

## How this design relates to the published architecture

The following follow the published design:
* the separator structure (getTheta / getAlpha / getPhi);
* the stage counts (8, 15, 4 and the 8- and 4-stage matching delays, 20 in total);
* the 128-entry PWL tables;
* the two-stage PWL pipeline;
* the reformulated arccos argument with programmable c1/c2;
* the seven-threshold supply rule;
* the 1K × 24 compensator;
* the two-samples-per-clock interleaving;
* the bit widths of I/Q (13), |I|/|Q| (12), A² (19), A (12), c1/c2 (13), angles (15) and f(φ) (10).

Departures and own choices:

* **PWL output.** The PWL output adds the low term to `b` (with saturation)
  rather than concatenating bit fields. Pure concatenation fails when the
  function crosses a multiple of the `b` step inside an interval. Table
  entries are a uniform 48 bits (three 16-bit fields) instead of the
  function-specific 25–30 bits, so one entry format serves all functions.
* **Argument terms.** Two separate argument sums, and so four multipliers,
  are used, because α1 and α2 need different constants when `a1 ≠ a2`.
* **Width of 1/A.** 1/A is carried with 16 bits (value/2^10) instead of 12,
  to keep `c2/A` accurate.
* **Angle stage timing.** The angle stage's last step (unfold) takes one
  clock, so that θ leaves at clock 8 as the overall latency requires.
* **Sign convention.** The phases use φ1 = θ − α1, φ2 = θ + α2, the
  convention of the hardware description. The equation summary of the
  original work writes the opposite signs.
* **Clocking.** The filter produces two samples on one clock edge, instead of
  one sample on each clock edge.
* **Unspecified details.** The following are this design's own choices:
  * filter length, coefficient format and output scaling;
  * the PRBS polynomial, seed and mapping;
  * the choice of previous-symbol bits in the compensator address;
  * the threshold register width;
  * behaviour above th7;
  * reflection for negative arccos arguments. With the test supply levels,
    this case never arises.
* **Not included.** The phase modulator, the amplifiers and supply switches,
  the combiner, and any off-chip symbol source are outside this RTL. Their
  signals are the top-level ports.
* **Accuracy.** A 12-bit phase accuracy target (worst-case error under
  2π/2^12) is not met in the worst case by this implementation with the test
  supply levels. The worst case is about three 12-bit steps, near
  arccos-argument magnitudes of 0.95. A denser arccos table near 1, or
  thresholds that move such samples to the next supply pair, would reduce it.
