# Digital background calibration for a 1.5-bit/stage pipelined ADC

A 12-bit, 80 MS/s pipelined ADC built from fourteen 1.5-bit stages and a 2-bit
flash loses most of its linearity to three analog errors. These are capacitor
mismatch, the finite gain of cheap amplifiers (38 dB here) and the compression of
those amplifiers near full scale. This RTL is the digital back end that removes
all three. The analog stages stay simple. Each stage gets one extra switch
setting, and everything else is arithmetic.

The corrections are measured while the converter runs. Now and then the input
sample is dropped. The stage being calibrated digitizes a known-but-inaccurate
level in its place, and the missing output sample is rebuilt from its neighbours
by an FIR filter. Without calibration the behavioural test model is about 52 LSB
off. After one calibration sweep it is within 1 LSB.

## The stage model and its inverse

A 1.5-bit stage compares its input with ±Vref/4, giving a decision
D ∈ {−1, 0, +1}. It subtracts D·Vref/2 and amplifies the rest by about two. The
back end undoes this with the stage's *inverse function*, in units of Vref/2:

    D_in = D + β1·D_out + β3·D_out³

Here D_out is the digitized residue, which is what the stages behind it produce.
β1 absorbs capacitor mismatch and finite gain; its ideal value is 0.5. β3
absorbs the amplifier's third-order compression; its ideal value is 0. Only the
first `NCUBIC` = 2 stages carry a β3 term. Further down the residues are small
and a linear model is enough.

`recon_chain` applies the inverse functions from the flash backwards. The flash
code becomes the D_out of stage 14, that stage's D_in is the D_out of stage 13,
and so on. The result of stage 1 is the converter output. Each stage is one
registered cell, `stage_inverse`, with two multipliers and a cube.

## Measuring β1 and β3: the two-mode stage

Each stage's sub-DAC multiplexer has a second setting, selected by `mode_x2`. In
that setting it ignores its comparators (D is forced to 0) and the stage is a
plain multiply-by-two amplifier. Apply the same level V to the stage twice:

1. In the normal 1.5-bit setting. The decision D_i and the back end's reading
   D_out1 are stored.
2. In the ×2 setting. The reading D_out2 is stored.

Both readings describe the same input, so D_i = β1·(D_out2 − D_out1) +
β3·(D_out2³ − D_out1³). V itself does not need to be accurate. It only has to
lie above the comparator threshold, so that D_i = +1. Two levels are used:

* V1, a little above Vref/4, mainly fixes β1.
* V2, a little below Vref/2, drives the amplifier near full scale and so fixes β3.

Each pair of readings gives one LMS step (`lms_update`):

    e   = D_i − β1·Δ1 − β3·Δ3          Δ1 = D_out2 − D_out1,  Δ3 = D_out2³ − D_out1³
    β1 += μ1·e·Δ1
    β3 += μ3·e·Δ3                     (cubic stages only)

The step sizes are powers of two: μ1 = 2⁻⁷ and μ3 = 2⁻⁸.

Stages are calibrated from stage 14 down to stage 1. When stage i is measured,
the stages behind it are already corrected, so its D_out readings are accurate.
Each stage gets `SLOTS_PER_STAGE` = 4096 measurement slots, so a whole sweep is
14 × 4096 slots.

* Cubic stages cycle through (V1, 1.5-bit), (V1, ×2), (V2, 1.5-bit) and (V2, ×2).
* Linear stages alternate (V1, 1.5-bit) and (V1, ×2).

`cal_meas_mem` holds the 1.5-bit reading of each level until its ×2 partner
arrives. It then emits the pair.

## Slots, skipping and timing (the subtle part)

`skip_cal_ctrl` creates the slots. For a slot at input sample n0:

* `skip_in` tells stage 1 not to sample the input.
* The stage under calibration, stage i, takes the calibration level in place of
  its predecessor's residue. It does so exactly when sample n0 would have
  reached it: `cal_insert[i-1]`, `mode_x2[i-1]` and `vcal_sel` are asserted
  (i−1)/2 clock periods after the skip.

Two stages share each clock period because neighbouring stages work on
opposite clock phases. Stage i decides sample n in cycle n + (i−1)/2, and the
flash decides it in cycle n + 7.

Each slot carries a tag, `slot_tag_t` = {skip, cal, stage, x2, vsel}. The tag
travels with its sample through the capture register and `recon_chain`. At every
cell the chain exposes d, D_out and the tag. The top selects the cell whose tag
names that cell's stage as the one under calibration, and sends its (d, D_out)
to the measurement memory. Measurements therefore cannot be attributed to the
wrong sample, even though each stage's decision arrives at a different time.

There are two modes:

* **Background** (`foreground` = 0). One slot every `SKIP_INTERVAL` = 64
  samples. After stage 1 the sweep restarts at stage 14 (`sweep_start`), so the
  coefficients follow drift. `cal_done` rises after the first sweep.
* **Foreground** (`foreground` = 1). Every sample is a slot; the converter
  output is meaningless while this runs. The controller stops after stage 1 with
  `cal_done` = 1. A sweep takes 14 × 4096 + 14 × 32 = 57 792 cycles.

Between stages the controller waits `DRAIN` = 32 cycles, so the last
measurements of one stage leave the pipeline before the next stage starts.
`cal_en` = 0 aborts the sweep and clears `cal_done`. `coef_init` reloads the
ideal coefficients.

## Filling the skipped samples

`skip_fill_interp` is a 2·N_SIDE+1 shift register (N_SIDE = 20) with a symmetric
FIR. When the centre sample is marked as skipped, the output is the weighted sum
of the 20 samples on each side. Otherwise the centre sample passes through
unchanged. The latency is N_SIDE + 2 cycles in both cases. The neighbours must
not themselves be skipped, so `SKIP_INTERVAL` must be greater than 2·N_SIDE; an
assertion in the top enforces this.

The weights are computed at elaboration by constant functions, so there is no
table:

* `BAND_PCT` = 80 (default): least-squares weights. They minimise the error in
  predicting a missing sample for all inputs up to 0.8 of Nyquist. A small linear
  system is solved by Gaussian elimination, and the sine is a Taylor series,
  because simulators cannot constant-evaluate `$sin`. The weights are symmetric,
  alternate in sign and die away from the centre. At 80 MS/s the fill error stays
  below 1 LSB up to 30 MHz.
* `BAND_PCT` = 0: classic polynomial (Lagrange) interpolation,
  w_k = (−1)^(k+1)·C(2N, N+k)/C(2N, N). It is exact for slow signals, but only
  good up to about 20 MHz at 80 MS/s.

An input close to Nyquist (38 MHz at 80 MS/s) cannot be filled with 20 taps per
side by either weight set. In background mode at such frequencies, every 64th
output sample is wrong. The other samples stay correct.

## Number formats

| quantity | type | format |
|---|---|---|
| data (D, D_in, D_out, e) | `data_t` | signed 26 bits, 20 fraction bits, in units of Vref/2 |
| β1, β3 | `coef_t` | signed 32 bits, 30 fraction bits |
| FIR weights | internal | 24 fraction bits |
| `adc_code` | 12 bits | offset binary, round(y·1024) + 2048, clipped to 0..4095 (0 = −Vref) |

Products are cut back to the data format by arithmetic right shifts, which truncate
towards minus infinity. Only the interpolator and the output code round.

## Top level: `pipeline_adc_cal_top`

Inputs from the analog part (sampled on the rising clock edge; see timing above):

* `comp_b1[i]`, `comp_b0[i]`: the comparator pair of stage i+1. b1·b0 = 11
  means +1, 00 means −1, and anything else means 0.
* `flash_code[1:0]`: the 2-bit flash, code c standing for (2c − 3)/2 in units of
  Vref/2.

Outputs to the analog part:

* `dac_sel[i]`: one-hot sub-DAC selection, 100 = +Vref/2, 010 = 0, 001 = −Vref/2.
* `mode_x2`, `cal_insert`: per-stage vectors.
* `vcal_sel` (0 = V1, 1 = V2) and `skip_in`.

Control and status signals:

* `cal_en`, `foreground`, `coef_init`: control inputs.
* `cal_busy`, `cal_done`, `cal_stage`: calibration status.
* `lms_valid`, `lms_err`: one pulse and the error e for each LMS step.
* `beta1[]`, `beta3[]`: the current coefficients.
* `adc_code`, `adc_filled`: the converter output, and a flag that it was
  interpolated.

`adc_code` follows the input sample by 45 cycles at the default sizes:
1 + 7 + 14 + 20 + 3.

The top contains the blocks above, plus `subadc_decoder` (per stage),
`coef_bank` (the coefficient registers with a read port for the LMS unit) and
`delay_line` (a helper).

## Parameters

| parameter | default | meaning |
|---|---|---|
| `NSTAGES` | 14 | 1.5-bit stages before the 2-bit flash (even) |
| `NCUBIC` | 2 | leading stages with a β3 term |
| `SLOTS_PER_STAGE` | 4096 | calibration slots per stage per sweep |
| `SKIP_INTERVAL` | 64 | samples per slot in background mode (> 2·N_SIDE) |
| `DRAIN` | 32 | idle cycles between stages |
| `MU1_SHIFT`, `MU3_SHIFT` | 7, 8 | μ1 = 2⁻⁷, μ3 = 2⁻⁸ |
| `N_SIDE` | 20 | interpolator taps on each side |
| `BAND_PCT` | 80 | interpolator band in % of Nyquist; 0 = Lagrange weights |

## Where this design goes beyond the method, or departs from it

* **Taken from the method:** the stage inverse function, and β3 in the first two
  stages only. Also the two-mode stage and its two calibration levels, the LMS
  equations, and the stage-14-to-stage-1 order. Finally, 4096 slots per stage,
  20 interpolator taps per side, 12 bits and 14 stages.
* **Choices of this design:**
  * The step sizes. Smaller steps (2⁻¹⁰ and beyond) did not converge within
    2048 updates.
  * The slot rate in background mode, and the drain time.
  * The number formats, the pipeline timing and the output coding.
  * The tag mechanism.
  * The least-squares interpolator weights. The method names only a polynomial
    FIR without giving weights.
* **The interpolator is a linear FIR.** The method calls its predictor a
  nonlinear polynomial interpolator taken from earlier work, but also says that
  only a digital FIR filter is needed. No weights are given. The FIR here is
  linear in the samples, with weights of this design's own choosing.
* **The error term** uses the stored decision D_i where the method writes the
  constant 1. For both calibration levels D_i = +1, so the two are the same.
* **The last stages (roughly 11–14)** cannot be measured precisely. Only a
  couple of coarse stages sit behind them, so their β1 stays close to 0.5. Their
  weight in the output is below one LSB.
* **The analog part is not included.** Stages, amplifiers, comparators,
  bootstrapped switches, the flash and the calibration references are analog.
  For simulation, `tb/pipeline_analog_model.sv` is a behavioural model with
  gain error, capacitor mismatch, offsets, cubic compression on stages 1–2 and
  noise. Its errors are chosen for testing and are not extracted from a circuit.
* **Not checked:** timing closure at 80 MHz and SFDR. DNL and INL are
  measured only against the behavioural model.

## Verification

Each block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_subadc_decoder` | all comparator/mode combinations |
| `tb_stage_inverse` | random inputs against a real-number model, both variants |
| `tb_recon_chain` | random stage decisions and coefficients against a model, 21-cycle latency, tag alignment |
| `tb_coef_bank` | reset, init, writes, read port |
| `tb_cal_meas_mem` | pairing, stage changes, clear |
| `tb_lms_update` | update against a real-number model; convergence to known β1/β3 |
| `tb_skip_cal_ctrl` | slot order, insert timing per stage, both modes, abort (reduced sizes) |
| `tb_skip_fill_interp` | sines at three frequencies, DC and a cubic, both weight sets, latency |
| `tb_pipeline_adc_cal_top` | full size, no parameter overrides (see below) |
| `tb_workload_input_freq` | full size, background mode, inputs at 1, 5, 10, 20, 30 and 38 MHz |
| `tb_workload_dnl_inl` | full size, code-histogram DNL/INL of a slow ramp before and after calibration |

`tb_pipeline_adc_cal_top` drives the behavioural converter with a sine. Its
steps:

1. Confirm the uncalibrated error (about 52 LSB).
2. Run a foreground sweep (28 672 LMS updates) and check the coefficients
   against the model's true values. It then checks that the output error is at
   most 2 LSB.
3. Reload the ideal coefficients and calibrate again in background mode.
4. Check ordinary and interpolated output samples, again to 2 LSB.

It counts every mechanism and fails if one never happens. The counts cover
skipped samples, ×2 slots and V2 slots. They also cover filled samples and
stage changes in both sweeps. The LMS step count per sweep must be exact
(14 × 4096 / 2), and so must the coefficient reload and the background slot
rate. It also checks every sub-DAC selection against the model. It runs in
about 5 s.

`tb_workload_input_freq` prints, for each input frequency, three figures. They
are the largest error of ordinary samples, the largest error of filled samples,
and the SNDR against the ideal input. It also prints the fundamental against
the largest of harmonics 2 to 5, sampled coherently. With the model, ordinary
samples are within 0.7 LSB at every frequency. Filled samples are within 0.9 LSB
up to 30 MHz, where SNDR is 73.4 dB. At 1 MHz, calibration raises SNDR from
33.9 dB to 73.4 dB. It also pushes the harmonics from 41 dB to more than 110 dB
below the fundamental. At 38 MHz the filled samples are wrong, as described
above.

`tb_workload_dnl_inl` sweeps a ramp over the full scale with 16 samples per
code and builds a code histogram. Before calibration the model shows a peak INL
of 65 LSB and 573 missing codes. After a foreground sweep, peak |DNL| is
0.25 LSB and peak |INL| is 0.18 LSB, with no missing codes.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/adc_cal_pkg.sv tb/tb_pipeline_adc_cal_top.sv \
        --top-module tb_pipeline_adc_cal_top
    ./obj_dir/Vtb_pipeline_adc_cal_top

Replace the testbench name to run any other. Block testbenches set their
parameters through the `#(...)` list of the device under test, at the top of
each file. Any testbench can be shrunk or enlarged there.
