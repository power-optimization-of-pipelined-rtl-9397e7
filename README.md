# Second-order digital gain calibration for a pipelined ADC, with reduced internal precision

The first stage of a pipelined ADC resolves a coarse digit D and passes an amplified
residue y = 2x − D to the rest of the pipeline. If the residue amplifier's gain is
wrong, the error shows up directly in the converter's output, and with a low-gain
opamp in a low-voltage process that error depends on the output level:

    y = (1 − δg)(2x − D),      δg = δg0 + δg2·y²

This RTL is the digital unit that removes this error. It corrects the digitised
residue Y with an estimate of δg (zero- and second-order term), and it keeps
estimating δg0 and δg2 in the background from a known pseudo-random dither PN that is
added at the first-stage sub-ADC input.

A second-order estimator needs squarers, a cuber and a product of averages. Run at
full precision these dominate the unit's power. The design therefore uses only the
top bits of two signals:

* the residue Y where it forms Y² for the gain estimate (parameter `YSQ_BITS`), and
* the estimator input Y_PN (parameter `YPN_BITS`).

Both default to 7 bits instead of the full 13. Y itself still enters the correction
product at full precision, so the output word keeps its resolution. The reduced
copies only set how finely δg is known. Truncation adds noise to the estimator's
inputs, and the averaging in the estimator filters most of it out.

Configuration: a 14-bit converter (M = 14) with a first stage of 1-bit effective
resolution (m = 1, a 1.5-bit stage with digit D ∈ {−1, 0, +1}). Y, Y_cal and Y_PN are
13 bits wide and OUT_cal is 14 bits.

## Signal flow

```
 pn_generator ──pn_dither──► (analogue first stage: sub-ADC input gets PN/8)
      │
  ADC_LAT-clock delay: the PN that goes with the Y, D arriving now
      ▼
  y, d ──► correction_block ──Y_cal──► ypn_compute ──► out_cal (calibrated word)
                 ▲                          │
                 │                        Y_PN
                 │                          ▼
           coef_delay ◄──── dg0, dg2 ── estimation_block
```

Each clock carries one sample through every block:

1. **Correction** (`correction_block`): δĝ = δĝ0 + δĝ2·Yt², then Y_cal = Y·(1 + δĝ).
   Yt is Y cut to `YSQ_BITS`.
2. **Output and Y_PN** (`ypn_compute`):
   * OUT_cal = (D + Y_cal)/2
   * D̄ = D/2 − PN/4
   * Y_PN = OUT_cal − D̄
3. **Estimation** (`estimation_block`), with Y_PN cut to `YPN_BITS`:
   * δĝ0 ← δĝ0 + 2^−K0 · PN · Y_PN
   * δĝ2 ← δĝ2 + 2^−K2 · (E[PN·Y_PN³] − 3·E[PN·Y_PN]·E[Y_PN²])
4. **Delay** (`coef_delay`): the new estimates go back to the correction block one
   clock later, rounded down to 16 fraction bits.

The defaults are K0 = 23, K2 = 17 and K_E = 19, so μ0 = 2^−23, μ2 = 2^−17 and the
averaging filters use μ_e = 2^−19. Each average E[·] is a first-order low-pass filter
(`lpf_accum`):

    E(n+1) = E(n) + 2^−KE·(x − E(n))

Multiplying by PN (±1) is a conditional negation, and every μ is a shift. The only
real multipliers are therefore these four:

* Yt² in the correction block
* δĝ2·Yt² in the correction block
* Y·δĝ in the correction block
* Y_PN², Y_PN³ and E[PN·Y_PN]·E[Y_PN²] in the estimator

## Number formats

This part needs the most care when changing the design. All values are two's
complement fixed point.

| signal | bits | LSB | range / notes |
|---|---|---|---|
| Y, Y_cal | 13 | 2^−12 | [−1, 1); Y_cal saturates at the ends |
| D | 2 | 1 | −1, 0, +1 |
| PN | 1 | – | 1 means +1, 0 means −1 |
| OUT_cal | 14 | 2^−13 | (D + Y_cal)/2 always fits, no saturation needed |
| Y_PN | 13 | 2^−12 | equals Y_cal/2 ± 1/4, so within ±3/4; exact at 2^−13, handed on with its lowest bit dropped |
| δĝ0 (estimator) | 2 + F + K0 | 2^−(F+K0) | F = YPN_BITS − 1; exact accumulator, saturating |
| δĝ2 (estimator) | 2 + 3F + K2 | 2^−(3F+K2) | exact accumulator, saturating |
| δĝ0, δĝ2 (correction) | 18 | 2^−16 | `COEF_FRAC` = 16 |

"Exact accumulator" means the LSB of δĝ0 equals μ0 × the LSB of PN·Y_PN, so the update
is a plain add with no bits lost. The same holds for δĝ2 and the LSB of PN·Y_PN³.

Each filter holds its average scaled by 2^KE. Its output is cut back to the width and
scale of its input before the multiplier, and the extra KE bits never leave the
filter.

Every truncation in the design rounds towards minus infinity (it drops LSBs).

How the estimator's widths follow `YPN_BITS`:

| | YPN_BITS = 7 (default) | YPN_BITS = 13 (full) |
|---|---|---|
| PN·Y_PN, Y_PN², PN·Y_PN³ | 8, 14, 22 bits | 14, 26, 40 bits |
| filter registers | 28, 34, 42 bits | 34, 46, 60 bits |
| E[PN·Y_PN]·E[Y_PN²] multiplier | 8 × 14 | 14 × 26 |
| δĝ0 / δĝ2 accumulators | 31 / 37 bits | 37 / 55 bits |

In the correction block, `YSQ_BITS` = 7 shrinks the squarer from 13×13 to 7×7. It also
shrinks the δĝ2·Yt² multiplier from 18×26 to 18×14.

## Timing

* `pn_dither` changes every clock.
* The converter is assumed to return the Y and D of a sample `ADC_LAT` clocks (default
  7) after the dither for that sample was applied. The unit delays its own copy of PN
  by the same amount.
* `out_cal` and `y_pn` appear 2 clocks after their `y` and `d`.
* δĝ0 reflects a Y_PN one clock after it reaches the estimator. δĝ2 reflects it one
  clock later still, through the filters.
* The correction block sees an estimate one clock after the estimator produced it.
* Reset (`rst_n`, asynchronous, active low) clears all state to zero and loads the
  PN seed.

With the design's step sizes the estimates move on a scale of millions of samples
(1/μ0 ≈ 8.4·10⁶). The filters settle over about 2^19 samples.

## What is this design's own choice

These points are not fixed by the method and were chosen here:

* **Registers:** one register stage after the correction and one after the Y_PN
  computation.
* **`ADC_LAT` = 7:** the converter's pipeline latency. Set it to match the actual
  converter.
* **Dither source:** a 31-bit LFSR (x³¹ + x²⁸ + 1) that produces PN.
* **Coefficient precision:** 16 fraction bits and 2 integer bits for δĝ in the
  correction multiplier.
* **Arithmetic details:**
  * exact, saturating accumulators;
  * filter outputs cut to the width of their inputs;
  * Y_cal saturates;
  * all truncation rounds towards minus infinity.
* **How Y is reduced:** Y is shortened by dropping LSBs for Y², the same way Y_PN is
  shortened.
* **Where D̄ is computed:** inside `ypn_compute`, from D and PN.

## Limitations: convergence

The update relations are implemented exactly as stated above. Under this design's
own behavioural model of the first stage, they do not settle at the stage's real gain
error. The testbenches use this model:

* a 0.9 sine input;
* thresholds at ±1/4 and dither ±1/8;
* δg = 0.02 + 0.01·y²;
* an ideal 13-bit back end.

Y_PN reduces to Y_cal/2 + PN/4, so the mean of PN·Y_PN stays near 0.2 even when Y_cal
is exactly right. In a run of 6.7·10⁷ samples at the default parameters, δĝ0 ramped steadily by
about 0.1 every 4·10⁶ samples. Over the same run δĝ2 reached its negative limit and
then came back off it.

The relations come from a published background calibration method. A converter that
uses this unit has to supply a Y_PN whose correlation with PN vanishes at the
calibrated point. Everything in this RTL is verified bit-exactly against an
independent model. The loop is **not** shown here to calibrate a converter, and the
SNDR at each reduced precision is not measured.

Not in the RTL:

* the analogue first stage (sub-ADC, sub-DAC, switched-capacitor MDAC and its opamp);
* the later pipeline stages and the flash ADC;
* the converter's digit-alignment logic for stages 2…N.

Their only link to this unit is through the ports `y`, `d` and `pn_dither`.

## Modules

| file | what it is |
|---|---|
| `rtl/cal_pkg.sv` | shared constants (M, m, default precisions and step sizes), the digit type, a saturation helper |
| `rtl/cal_top.sv` | the calibration unit |
| `rtl/correction_block.sv` | Y_cal = Y(1 + δĝ0 + δĝ2·Yt²) |
| `rtl/ypn_compute.sv` | OUT_cal and Y_PN |
| `rtl/estimation_block.sv` | δĝ0 / δĝ2 estimator |
| `rtl/lpf_accum.sv` | one-accumulator low-pass filter for E[·] |
| `rtl/coef_delay.sv` | feedback delay and rescaling of the estimates |
| `rtl/pn_generator.sv` | dither LFSR |

Main parameters of `cal_top`:

| parameter | default | meaning |
|---|---|---|
| `YSQ_BITS` | 7 | bits of Y used to form Y² (13 = full precision) |
| `YPN_BITS` | 7 | bits of Y_PN used by the estimator (13 = full) |
| `K0`, `K2`, `KE` | 23, 17, 19 | step sizes μ = 2^−K |
| `COEF_FRAC` | 16 | fraction bits of δĝ in the correction multiplier |
| `ADC_LAT` | 7 | converter latency, in clocks, from dither to Y/D |
| `PN_SEED` | 31'h5A5A_1234 | LFSR seed, must not be zero |

The widths of `dg0_hat` and `dg2_hat` follow from `YPN_BITS`, `K0` and `K2` (see the
formats table).

## Testbenches and simulation

Every testbench checks its block against integer or real arithmetic written
separately from the RTL, and ends with a `TB_RESULT checks=… failures=…` line.
`tb/cal_ref_pkg.sv` holds a clock-accurate reference model of the whole unit and the
behavioural first-stage model.

| testbench | what it shows |
|---|---|
| `correction_block_tb` | Y_cal at 7- and 13-bit Y², end-of-range inputs, saturation |
| `ypn_compute_tb` | OUT_cal and Y_PN for all D/PN combinations against real arithmetic |
| `lpf_accum_tb` | step response and clock-by-clock output at μ_e = 2^−4 and 2^−19 |
| `estimation_block_tb` | δĝ0/δĝ2 at 7 and 13 bits and with large steps, including saturation of both accumulators |
| `coef_delay_tb` | one- and three-clock delay with truncation |
| `pn_generator_tb` | seed, LFSR recurrence, balance, run lengths |
| `cal_top_tb` | end to end with large step sizes, 20 000 samples. It counts each dither polarity, each digit, active correction, δĝ0 rising and falling, δĝ2 moving and Y_cal saturating, and fails if any never happened. |
| `cal_top_full_tb` | end to end with every parameter at its default, 2^20 samples (about 1 s of simulation) |
| `cal_precision_sweep_tb` | ten precision pairs, 5…13 bits of Y and/or Y_PN. Each is checked bit-exactly and its output difference to the 13/13 configuration is printed. |

To run one, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/cal_pkg.sv tb/cal_ref_pkg.sv tb/cal_top_full_tb.sv --top-module cal_top_full_tb -o sim
./obj_dir/sim
```

Replace `cal_top_full_tb` with the name of any other testbench.
