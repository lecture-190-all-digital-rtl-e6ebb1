# All-digital fractional-N frequency synthesizer for Bluetooth

This synthesizer produces the Bluetooth carriers, 2402 to 2480 MHz in 1 MHz
steps. It has no charge pump, no analog loop filter and no external R or C.
It measures the frequency error as a number and integrates it in an
accumulator. A digital FIR filter smooths the result, and an 8-bit DAC plus a
switched-current oscillator turn it back into a frequency. A third-order MASH
sigma-delta modulator dithers the divide ratio so that the channel step
(1 MHz) can be much smaller than the reference rate (16 MHz). The dither
noise is pushed to high frequencies, where the loop removes it.

The RTL covers the whole loop. The digital blocks are synthesizable
SystemVerilog. The two analog parts, the DAC's current cells and the
oscillator, are behavioural models with real-valued signals, so the full loop
can be simulated with Verilator at 2.4 GHz in real time units.

## Frequency plan

```
f_out = P * f_ref * (N + K/F)      P = 4 (prescaler), f_ref = 16 MHz, F = 64
      = (64 * N + K) MHz
```

- One step of K is exactly 1 MHz, the channel spacing.
- Channel k (2402 + k MHz) uses `N = (2402 + k) / 64` and `K = (2402 + k) mod 64`.
- The whole band needs only N = 37 and N = 38. For example, 2402 MHz is
  N = 37, K = 34, and 2480 MHz is N = 38, K = 48.
- The 16 MHz reference comes from a 32 MHz crystal divided by 2.

These numbers are choices made for this RTL. The reference architecture fixes
only the band, the channel raster, F = 64 (it simulates fractions of 32/64
and 0/64), the 8-bit DAC and the ≤ 220 µs settling time. The reference
frequency, prescaler ratio, crystal and oscillator constants were picked to
fit those.

## The loop, one reference period at a time

Every digital block runs on the crystal clock `clk_ref`. `ref_divider` makes
a one-cycle `tick` every second clock, and each block updates once per tick:

```
 num ──► mash3 ──y──►(+)◄── n_int
                      │ ndiv = N + y        (-3 ≤ y ≤ +4)
 f_fb ──► frac_freq_det ──err──► amp_detector ──gain_hi──┐
                      │                                  ▼
                      └────────────err────────────► var_gain (×2^10 or ×2^6)
                                                         │ delta
                                                   loop_accum (14 bit)
                                              msb[13:8] │ lsb[7:0]
                         ┌──────────────────────────────┤
                         │                         fir_lp (1 3 3 1)/8
                         │                              │ dac_code
                         │                         dac8 (behavioural)
                         ▼                              │ v_dac
                     sc_vco (behavioural) ◄─────────────┘
                         │ f_out
                     prescaler ÷4 ──► f_fb
```

Latency, counted in ticks from an error to its effect on the oscillator:

- `err` is registered on the tick that closes a measuring period.
- `gain_hi` and the accumulator use that `err` on the next tick.
- The MSB part of the control word reaches the oscillator at once.
- The LSB part reaches it one tick later, through the FIR output register.
- In total there are 2 to 3 ticks of loop delay. This limits the usable loop
  gain (see below).

## How the frequency detector closes a phase lock

`frac_freq_det` counts feedback-clock cycles:

- A Gray-coded counter runs on the prescaler output `f_fb` (about 600 MHz).
- The crystal domain brings it across with a two-flop synchronizer.
- On every tick the detector subtracts the previous sample. This gives
  `count`, the number of feedback cycles in the last reference period.
- It outputs `err = ndiv - count`.

The mean of `err` is zero exactly when `f_fb = f_ref * (N + K/F)`. This is the
"N / ω_ref" frequency comparison of the loop's linear model.

The sum of `err` over time is the phase difference, in feedback cycles,
between the wanted and the real output. `loop_accum` integrates `err`, so the
control word tracks that phase error. The loop is therefore a phase lock, not
just a frequency lock:

- a constant frequency error would make the control word run away, so none
  can remain;
- the carrier's average frequency is exact, not just within a tolerance;
- over a 100 µs window the measured edge count matches the target to the
  edge.

## The MASH modulator

`mash3` chains three 6-bit accumulators (`sd_accum`, first-order sigma-delta
stages):

- Stage 2 adds the new sum of stage 1, and stage 3 adds the new sum of stage 2.
- The carries are recombined as `y = c1 + (1 - z^-1)(c2 + (1 - z^-1) c3)`.
- This gives, exactly, `64 * y = x - (1 - z^-1)^3 * e3`, where e3 is the new
  state of stage 3.
- The mean of `y` is K/64. The quantisation error has third-order high-pass
  shaping.
- The output range is -3..+4, so `ndiv` moves between N-3 and N+4.

The testbench checks this identity sample by sample. A separate test takes a
DFT of the error and checks the shaping. For 17/64, the error power in
0.002..0.02 of the update rate is about 75 dB below the power near half the
rate. For 32/64 the error is a single tone at half the rate, which the loop
filters out.

## Gain scheduling: amplitude detector and variable gain

Fast locking needs a large loop gain. Low noise in lock needs a small one.
`amp_detector` chooses between them:

- It keeps the sum of the last 16 errors. This sum equals 16 times the mean
  frequency error, in feedback cycles per period.
- It raises `gain_hi` when the magnitude of the sum reaches 8. That means the
  oscillator is at least about 32 MHz off.
- `var_gain` then shifts the error left by 10 instead of 6.

With the default constants, one control-word step moves the oscillator by
15.625 kHz, which is 1/4096 of a feedback cycle per period. So the loop gain
`K = Ka / 4096` is 1/4 in fast-lock mode and 1/64 in lock. The loop delay of
2 to 3 ticks limits a loop of this type to K below roughly 0.45, so 1/4
leaves margin.

This is the most delicate part of the design. In lock, the window sum is the
phase change over the window. The MASH dither alone moves it by up to about
±5 cycles.

- A window of 8 errors with a threshold of 4 is too tight. At 2429 MHz the
  dither then sometimes switches the fast gain on in lock, and the resulting
  30 to 40 MHz kicks keep the loop from settling.
- The 16/8 setting keeps the same 32 MHz frequency threshold with twice the
  margin against the dither. The hopping test checks that `gain_hi` never
  switches on during the locked part of any of the 79 channel slots.

## Coarse and fine control of the oscillator

The 14-bit control word in `loop_accum` saturates at 0 and at full scale
rather than wrapping. It is split in two:

- **MSB part (6 bits).** It switches the oscillator's coarse current sources
  directly, 4 MHz per step. This covers 2300 to 2556 MHz.
- **LSB part (8 bits).** It passes through `fir_lp` to `dac8`. The DAC's
  full scale, 256 mV × 15.625 MHz/V, is exactly one coarse step, so the two
  parts join without a gap.

`fir_lp` is a linear-phase FIR filter in folded transposed form: each
symmetric coefficient pair shares one multiplier. Its default is the 4-tap
binomial filter 1 3 3 1 / 8. It has unity DC gain, so it cannot overflow,
and a group delay of only 1.5 ticks, because its delay sits inside the loop.

`dac8` is segmented into two 4-bit halves. Each half has a row and column
thermometer decoder driving a 4 × 4 matrix with 15 unit cells. MSB cells
carry 16 times the LSB cell current. The decoders (`dac_decoder`) are
synthesizable, and their outputs turn on exactly `code` cells and only ever
add cells as the code rises, so the DAC is monotonic. The current sum and the
load resistor are behavioural.

**Known side effect.** The MSB part bypasses the filter and the LSB part does
not. When the control word crosses a multiple of 256, the two parts briefly
disagree, and the oscillator jumps by up to one coarse step (4 MHz) for a
tick or two. In lock the instantaneous frequency therefore shows spikes of
about ±4 MHz near those points (for example at 2432 MHz, K = 0). The average
stays exact. The reference block diagram draws the two paths this way; delaying
the MSB part by the filter's group delay would remove the spikes, but that is
not done here.

## Behavioural models

- **`sc_vco`**: `f = F0 + KC * coarse + KV * vctrl`, with F0 = 2.300 GHz,
  KC = 4 MHz and KV = 15.625 MHz/V. Each half period is computed from the
  frequency in force at the previous edge. The ideal edge time is kept in a
  real variable, so rounding to the 1 fs time precision never accumulates.
  The model has no phase noise.
- **`dac8`**: `I_out = code * I_LSB` with I_LSB = 10 µA and
  `V_out = I_out * 100 Ω`, so 1 mV per LSB. It responds without delay.

Neither model synthesizes. This also makes `adfs_top` simulation-only as a
whole. All other modules are synthesizable on their own.

## Measured behaviour

Results with default parameters, from the full-loop tests and the MASH
spectrum test:

| Test | Result |
|---|---|
| Hops 2400 → 2480 → 2400 → 2402 → 2432 → 2441 MHz | Settled to within 1 MHz in 2 to 14 µs (spec ≤ 220 µs). Average frequency from 220 µs to 320 µs after each hop equals the target to the edge (0.00 ppm). |
| All 79 channels, 625 µs dwell each, permuted order | Worst settling 20 µs. Worst average error over 400 µs is 1.0 ppm (tolerance ±20 ppm). Fast-lock gain never on in lock. |
| 4 MHz steps in lock (2440 ↔ 2444 MHz) | 0.39 of the step remains 64 ticks later; the linear model with K = 1/64 predicts 0.37 to 0.40. |
| MASH 17/64 error spectrum | About 75 dB less error power at low frequency than near half the update rate. |

The specification states the tolerance as "±20 ppm (96 kHz)". At 2.4 GHz,
20 ppm is 48 kHz, so the two figures disagree. The tests use ±20 ppm.

Phase noise (specified as ≤ -89 dBc/Hz at 500 kHz and ≤ -121 dBc/Hz at
2 MHz) cannot be judged here, because the models carry no noise.

## What is the reference architecture's and what is this RTL's own

**Taken from the reference architecture:**
- the block structure and connections of the loop;
- the MASH 1-1-1 structure and its recombination;
- F = 64;
- the MSB/LSB split, with the LSB part going through an FIR filter to an
  8-bit DAC;
- the linear-phase transposed FIR structure;
- the segmented DAC: two 4-bit thermometer-decoded matrices, 16:1 current
  ratio, I_out and V_out equations;
- a prescaler of two cascaded flip-flops.

**Chosen here, where the reference is silent:**
- reference and crystal frequencies, and the reference divider ratio;
- the counting method of the frequency detector, its Gray-code clock
  crossing, and all word widths;
- how the amplitude detector measures the error, its threshold, and the two
  gain values;
- FIR length and coefficients (the reference leaves them unspecified);
- accumulator saturation and its mid-range reset value;
- all oscillator and DAC constants;
- the DAC's cell switching equation;
- asynchronous active-low resets everywhere;
- using a clock enable instead of a divided reference clock.

**Not modelled:**
- the transistor-level current-mode-logic gates and flip-flops of the
  prescaler, whose logic function is ordinary flip-flops;
- noise of any kind.

## Files

`rtl/` (one module or package per file):

| File | Block |
|---|---|
| `adfs_pkg.sv` | shared widths and types |
| `adfs_top.sv` | the complete loop |
| `ref_divider.sv` | reference divider, makes `tick` |
| `sd_accum.sv` | first-order sigma-delta stage (accumulator with overflow) |
| `mash3.sv` | 3rd-order MASH 1-1-1 |
| `frac_freq_det.sv` | fractional frequency detector |
| `amp_detector.sv` | amplitude detector (gain select) |
| `var_gain.sv` | variable gain Ka |
| `loop_accum.sv` | loop accumulator, MSB/LSB split |
| `fir_lp.sv` | linear-phase FIR filter |
| `dac_decoder.sv` | thermometer matrix decoder of one DAC segment |
| `dac8.sv` | 8-bit DAC (behavioural) |
| `sc_vco.sv` | switched-current oscillator (behavioural) |
| `prescaler.sv` | ÷4 prescaler |

`tb/` holds one self-checking testbench per block (`tb_<module>.sv`), plus:

- `tb_adfs_fhss.sv`: the 79-channel hopping run;
- `tb_adfs_step.sv`: the small-step response in lock, against the linear
  model;
- `tb_mash3_spectrum.sv`: the MASH spectrum test.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

Top-level parameters (`adfs_top`):

| Parameter | Default | Meaning |
|---|---|---|
| `REF_DIV` | 2 | crystal clocks per reference tick |
| `PRE_STAGES` | 2 | prescaler ratio 2^PRE_STAGES |
| `SH_HI` | 10 | fast-lock gain, Ka = 2^SH_HI |
| `SH_LO` | 6 | locked gain, Ka = 2^SH_LO |

Changing `REF_DIV` or `PRE_STAGES` changes the frequency plan. Keep
P · f_ref = 64 MHz, or recompute N and K.

## Simulating with Verilator

From the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/adfs_pkg.sv tb/tb_adfs_top.sv --top-module tb_adfs_top
./obj_dir/Vtb_adfs_top
```

Replace `tb_adfs_top` with any other testbench name.

- `tb_adfs_top` simulates 2 ms of 2.4 GHz operation in a few seconds.
- `tb_adfs_fhss` simulates 50 ms in about a minute.
- Every module declares `timeunit 1ps; timeprecision 1fs;`. The oscillator
  model needs femtosecond precision.
- Delays need `--timing`.
- Asynchronous resets need a falling edge. The testbenches start with reset
  high and pull it low at 1 ps, so the flops are cleared whatever their
  power-up values.
