# Split pipelined ADC with digital background gain calibration

A 1.5-bit-per-stage pipelined ADC loses linearity when its stage amplifiers
have finite DC gain. Each stage subtracts `b*Vref` (b = -1, 0, +1) from twice
its input and amplifies the remainder, but with an amplifier of gain `A` the
whole residue is scaled by `1+gamma = 1/(1 + (1+Cs/Cf)/A)`. The reference the
stage really subtracts is then `(1+gamma)*Vref`. The digital side normally
adds back the ideal `Vref` and so leaves a jump at every comparator threshold.

The cure used here is to add back the *measured* analog reference instead. The
converter is built as a **split ADC**: two identical channels, A and B,
convert the same input, and the output is their average. To measure a stage's
reference, channel A's comparator thresholds in that stage are raised by
Vref/8. The channels then decide different digits in two narrow input bands,
just above -Vref/4 and just above +Vref/4. In those bands `b_A - b_B = -1` and
the two residues differ by exactly the analog reference. Averaging that
difference, as digitised by each channel's later stages, gives
`D[(1+gamma)*Vref]`. This value replaces `Vref` in the stage's digital
reconstruction. No test signal is injected, and the converter keeps
converting while this happens.

At the default size (12 bits, 10 stages plus a 2-bit flash, 50 dB amplifiers
in the first four stages, later stages ideal), a 16,384-point FFT of a
near-full-scale sine gives these results:

| | before calibration | after calibration |
|---|---|---|
| SNDR | 53.7 dB | 71.3 dB |
| SFDR | 54.5 dB | 84.1 dB |

One calibration pass takes about 7,700 clocks.

## Structure

```
split_adc_top                      (behavioural analog + synthesizable digital)
 ├─ adc_channel_model  u_chan_a    channel A: 10 x stage_1p5b_model + flash_2b_model
 ├─ adc_channel_model  u_chan_b    channel B: same, thresholds never shifted
 └─ split_cal_digital  u_digital   all logic
     ├─ digital_correction u_corr_a / u_corr_b
     │    ├─ code_align            bit alignment of the stage digits
     │    └─ recon_cell x 10       D_k = (D_k+1 + b_k*W_k) / 2
     ├─ ref_estimator              average of D[Vres_A]-D[Vres_B] where b_A-b_B = -1
     ├─ cal_sequencer              stage order 4,3,2,1; shift control; reference registers
     └─ split_combiner             (D_A+D_B)/2, D_B-D_A, 12-bit code
stage_1p5b_model = sub_adc_1p5b_model (two-mode comparators) + mdac_model (finite-gain MDAC)
```

Shared constants and types are in `pipe_adc_pkg`.

The analog modules (`*_model`) are behavioural and use `real` signals. They
model what the calibration needs: comparator thresholds, residue gain error
from finite amplifier gain, optional capacitor mismatch, and one clock per
stage. `split_cal_digital` and everything under it is synthesizable. It is
the part that would be built as logic next to two analog pipelines.

## Digital numbers

Every digital quantity that stands for a voltage is a signed 20-bit
fixed-point value with **Vref = 2^16** (`pipe_adc_pkg::FRAC`, `dval_t`). The
range ±Vref of a stage input maps to ±65536. Sixteen fractional bits leave
four bits below the 12-bit LSB. A measured reference such as 63895 (about
0.975 Vref) can therefore be applied without visible rounding.

- The 2-bit flash code `c` stands for `(2c-3)*Vref/4`, the middle of its
  quarter of the range.
- The output `code` is `floor(d_avg / 2^5)`, saturated to 12-bit two's
  complement. Vref corresponds to 2048.
- All rounding is by truncation (arithmetic shift right), except the
  estimator's division, which rounds.

## Reconstruction (eq. D = (D[Vres] + b·W)/2)

`digital_correction` works from the back of the pipeline to the front. The
flash value is the digital residue of stage 10. Each `recon_cell` then turns
the digital residue of stage k into the digital value of its input:
`D_k = (D_{k+1} + b_k * W_k) / 2`. `b*W` is a three-way select, not a
multiplier. Stages 5 to 10 use `W = Vref`. Stages 1 to 4 use the reference
registers `w[0..3]`.

With correct references the output is linear in the input but slightly too
small: a 1 V input reads about 0.975 V at 50 dB. This gain error is not
corrected, because a pure gain error does not affect linearity.

Besides `dout`, the block registers the aligned digits `b_cal[k]` and the
digital residues `d_res[k] = D_{k+1}` of the four calibrated stages. These
are what the estimator compares.

**Why the order matters.** A stage's digital residue is only correct once
every later stage already uses its measured reference. The sequencer
therefore calibrates stage 4 first and stage 1 last. A new reference takes
effect at once, because the reconstruction is combinational on the aligned
digits. The next stage's measurement then already sees it.

## Calibration sequence

`cal_sequencer` is started by a one-clock pulse on `cal_start`. For each
stage k = 4, 3, 2, 1 it does the following:

1. It raises `shift_a[k-1]`, which puts channel A's stage-k sub-ADC into its
   shifted mode. Channel B is never shifted.
2. For `SETTLE` = 12 clocks it holds the estimator cleared. This is at least
   the stage-to-output latency, so every sample the estimator then sees was
   converted with the shifted thresholds.
3. It enables `ref_estimator`. The estimator adds `d_res_A - d_res_B` for
   each sample where `b_A - b_B = -1`. After 2^8 = 256 such samples it raises
   `done` with the rounded mean.
4. It writes the mean into `w[k-1]` and moves to the next stage.

After stage 1, channel A returns to normal thresholds, `cal_busy` falls and
`cal_done` rises. A new `cal_start` runs another pass; this is how the
calibration would track drift in the background.

While a stage is shifted, the 1.5-bit redundancy keeps the output correct as
long as the references are correct. The testbench shows this: a second pass
run with accurate references keeps the SNDR at 70.5 dB.

During the first pass the output gets temporarily *worse* (47 dB in the
test). Once stage k's reference has been measured, stage k-1 still uses the
ideal Vref against a backend that now includes stage k's gain, so its
mismatch grows until its own turn.

## Timing

One sample per clock.

| path | latency |
|---|---|
| analog stage k | samples on the rising edge; its digit and residue are valid after that edge, and stage k+1 samples them on the next edge |
| `code_align` | delays stage i's digit by 10-i+1 clocks so that all digits of a sample meet the flash code |
| `digital_correction` | registered output: a sample taken by stage 1 at edge t leaves after edge t+11 |
| `split_combiner` | one more register |
| **input to `code`/`d_avg`** | **12 clocks** (`N_BITS`) |

The testbench checks the 12-clock latency with a step input.

## Interfaces

`split_adc_top` has these ports:

- `clk`, `rst_n` (asynchronous, active low)
- `vin` (`real`, volts, full scale ±1 V)
- `cal_start`
- `code[11:0]`
- `d_avg`, `d_diff` (`dval_t`)
- `w[4]`, the references
- `cal_busy`, `cal_done`
- `cal_stage`, the stage being measured (0 = stage 1)
- `cal_hits`, the samples averaged so far

`split_cal_digital` has the same outputs and takes the raw digits of both
channels instead of `vin`:

- `codes_a[i]`, `codes_b[i]`: digit of stage i+1, 2-bit two's complement
- `flash_a`, `flash_b`
- `shift_a[3:0]`, an output wired to channel A's stages

Parameters with their defaults:

- `N_BITS` = 12
- `N_CAL` = 4
- `LOG2_AVG` = 8
- `A_DB` = 50.0, `OFFSET_A` = `OFFSET_B` = 0.0 (top only, the analog models)
- `FRAC` and `DW` are fixed in the package.

## What follows the source design and what is this design's own

These follow the published technique:

- 1.5-bit stages with thresholds at ±Vref/4
- N-2 stages plus a 2-bit flash
- two channels whose average is the output
- channel-A threshold shift of Vref/8, upward, so that `b_A - b_B = -1` in
  the two bands
- the reference estimate as the average of the residue difference
- reconstruction with the measured reference
- four calibrated stages, in the order 4 to 1
- 50 dB amplifiers with an ideal 8-bit backend (stages 5–10 and the flash)

These are choices made here, where the technique leaves the point open:

- the fixed-point format
- flash thresholds at -Vref/2, 0 and +Vref/2, and the flash reconstruction
  levels
- the averaging length of 256
- a start pulse instead of a fixed schedule
- the settle time
- one clock per stage instead of two phases
- truncating arithmetic
- the output code format
- one set of reference registers shared by both channels (the two channels
  are assumed to carry the same stage errors)
- the comparator offset model

### Known departures and limits

- **Calibration signal.** The source draws the channel difference `D_B - D_A`
  of the final outputs as the signal fed to the error-correction block. Here
  the estimator uses the per-stage digital residues, which is the quantity
  the reference measurement is defined on. `d_diff` is still brought out as a
  monitor.
- **Channel matching.** The measurement needs the stages *ahead of* the
  calibrated one to decide alike in both channels. Only then does the
  calibrated stage see the same input in A and B.
  - A comparator offset common to both channels is harmless. With +50 mV in
    every stage of both channels (`tb_split_adc_offset`), the references and
    the SNDR (71.4 dB) match the offset-free case.
  - Opposite offsets of +50 mV and -50 mV make the earlier stages decide
    differently. The input difference then leaks into the average: the
    references come out about 1.3 % low and the worst output error grows to
    about 25 LSB.
  - No channel equalisation or hit qualification against this is built.
- **Analog effects not modelled.** Thermal noise, amplifier nonlinearity and
  switch phases are not modelled. Comparator offset is available as
  `OFFSET_A`/`OFFSET_B` on the top; the redundancy tolerates up to Vref/16
  beside the Vref/8 shift. Capacitor
  mismatch is available in `mdac_model` (`ALPHA`) but set to zero, as in the
  source's evaluation.
- **Gain errors beyond stage 4.** Stages 5–10 are ideal in the model. Real
  stages there would add uncorrected error.
- **Frequency independence.** The analog models are static: there is no
  settling, jitter or noise. A coherent tone on any odd bin then produces the
  same set of sample values, so SNDR and SFDR come out identical at every
  input frequency. The measured SFDR after calibration is 84 dB. The source
  reports 100 dB, from a simulation whose backend and error model are not
  reproduced exactly here.

## Simulating

Every testbench in `tb/` is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. For example, the full design at its default
size:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_split_adc_top \
  -y rtl -y tb +libext+.sv rtl/pipe_adc_pkg.sv tb/tb_split_adc_top.sv
./obj_dir/Vtb_split_adc_top
```

It runs in under a second. It does the following:

- checks the latency
- measures the SNDR before calibration (4096 samples)
- runs a calibration pass and compares each reference with
  `2^16 * prod((1+gamma_j), j = k..4)` computed from the amplifier gain
- measures the SNDR after calibration (16,384 samples of a sine at 0.436
  fs, amplitude 0.995 Vref)
- runs a second pass and checks that the output stays accurate during it
- counts the calibration mechanisms: shift of each stage, hits in both bands,
  reference writes, stage order

`tb_split_adc_freq_sweep` measures SNDR and SFDR with a 16,384-point FFT
(radix-2, written in the testbench). It uses nine input frequencies from near
DC to near fs/2, in steps of fs/16, once before and once after calibration.

`tb_split_cal_digital` repeats the calibration with 40 dB amplifiers and
checks that every output sample is within 1.5 LSB of a straight line. The
other testbenches check each module on its own against values computed in
the testbench.

`tb_split_adc_offset` runs the full sequence with a common comparator offset.

To try other conditions, change `A_DB`, `OFFSET_A` or `OFFSET_B` on
`split_adc_top`, or `ALPHA` and `VREF` on the models. A deeper average (`LOG2_AVG`) trades calibration time
for accuracy.
