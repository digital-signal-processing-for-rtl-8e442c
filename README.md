# APFEL pulse feature extraction: FIR smoothing and TMAX in RTL

The electromagnetic calorimeter of PANDA reads its crystals through avalanche
photodiodes and the APFEL preamplifier ASIC. A sampling ADC board digitises every
channel continuously at 80 MS/s and 14 bit, and there is no hardware trigger. The
FPGA therefore has to find every pulse in the sample stream on its own and reduce
it to two numbers: an energy (the pulse height) and a time. This RTL does that for
32 channels in parallel. It has three stages:

1. **Smoothing.** A 25-tap low-pass FIR removes high-frequency noise. It is built
   with *distributed arithmetic*, so it needs no hardware multipliers. A plain FIR
   needs about one DSP slice per tap and channel, 800 in all, which is more than a
   mid-size FPGA has.
2. **TMAX** (time measurement and amplitude extraction). A lagged derivative of the
   smoothed trace is summed over the pulse's leading edge to give the amplitude. Its
   zero crossing at the pulse maximum gives the time, interpolated between samples.
3. **Readout.** Each hit becomes a record `{channel, time, amplitude}` in a small
   per-channel buffer. A round-robin arbiter merges all channels into one
   valid/ready stream. In the full system that stream feeds a UDP packet builder and
   a Gigabit Ethernet link. Those and the ADCs are outside this RTL and appear as
   ports.

```
adc_data[c] ─► fir_da ─► tmax ─► tmax_interp ─► package_builder ─┐   (x32, apfel_channel)
                                                                  ├─► hit_arbiter ─► hit stream
timestamp counter ────────────────────────────────────────────────┘
```

## Distributed-arithmetic FIR (`fir_da`, `da_lut`)

The filter computes `y[n] = Σ_k h_k · x[n-k]` for k = 0..24. The samples are
unsigned 14-bit values, so each one can be written as a sum of bit planes,
`x = Σ_b x[b]·2^b`. Swapping the two sums gives

```
y = Σ_b 2^b · ( Σ_k h_k · x_k[b] )
```

For a fixed bit plane `b`, the inner sum depends only on the bits `x_k[b]`, one from
each tap, so it can be looked up instead of multiplied. The 25 taps are split into
5 groups of 5. Each group has a 32-entry table (`da_lut`) that holds the sum of the
group's coefficients for every pattern of 5 address bits. In one clock, with one
table copy per bit plane (14 × 5 tables):

| stage | register | work |
|---|---|---|
| 1 | delay line `x[0..24]` | shift in the new sample |
| 2 | `lut_q[b][g]` | read table `g` with bit `b` of its 5 samples |
| 3 | `pre_q[b]` | pre-adder: sum the 5 group tables of bit plane `b` |
| 4 | `out_sample` | shift-adder: `Σ_b pre_q[b]·2^b`, round off 17 bits, saturate to 16 bits signed |

A result leaves every clock. The output in the cycle whose sample counter reads `c`
belongs to the sample presented at `c-4` (`apfel_pkg::FIR_LAT`). The tables are
constants that the `da_lut` function computes from the coefficient parameter when
the design is elaborated. Nothing is loaded at run time. To change the filter,
override `COEF` (and `N_TAPS`) on `fir_da`. The table contents follow
automatically.

**Coefficients.** `apfel_pkg::FIR_COEF` is an equiripple low-pass for 80 MHz
sampling. Its pass band is 0–8 MHz and its stop band 16–40 MHz. It is normalised to
unity DC gain and rounded to 18-bit Q1.17, with `h_k = round(2^17 · h_k_real)` and
`Σ h_k = 2^17`. Its stop-band attenuation is about 48 dB. The published filter's
coefficient values are not available, so these are a stand-in with the same band
edges, tap count and precision. Expect the smoothing to look the same, but not the
same numbers bit for bit.

## TMAX: amplitude from the leading edge (`tmax`)

APFEL pulses fall from a baseline of about 15 300 counts. `tmax` first negates the
trace (`NEG_PULSE = 1`) so that the leading edge rises. Then, per sample:

```
D[i] = T[i+R] - T[i]                       lagged derivative, R = 8
S    = Σ over the current run of D > 0     restarts at 0 when D <= 0
```

Each term of the sum is `D - Θ(-D)·D`, the positive part of `D`. This has three
effects:

- **Baseline.** Only differences are summed, so the baseline cancels.
- **Trailing edge.** It has `D <= 0` and contributes nothing.
- **No overshoot.** `S` can only grow during the leading edge.

A run of positive `D` telescopes to about `R × (pulse height)` once the leading edge
is longer than `R` samples. That is why the TMAX amplitude is several times the raw
pulse height.

The pulse maximum is where `D` changes from positive (sample `i0`) to zero or
negative (sample `i1 = i0+1`). At that moment `S` is the amplitude. If it reaches
`threshold`, `tmax` emits a hit with `S`, `i0`, `D[i0]` and `D[i1]`. `tmax_out` is
`S` as a continuous stream, which is handy on a waveform viewer.

Timing: the hit is visible two cycles after the cycle that presented the sample
making `D[i1]`. A new run can start on the very next sample, so after a hit the
logic is ready again at once. In practice the dead time is the pulse's own leading
edge.

`R` and the polarity are parameters. `threshold` is a run-time input. The
derivative lag used by the original design is not known. 8 samples is a choice that
suits a leading edge of 10–20 samples.

## TMAX: time by interpolation (`tmax_interp`)

The zero crossing lies between `i0` and `i1`. Linear interpolation gives

```
T0 = i0 + D[i0] / (D[i0] - D[i1])        fraction in (0, 1]
```

The division is done with a lookup table, not a divider. The denominator is shifted
so that its leading one sits at bit 6. The numerator gets the same shift. Their
7-bit values address a table of 2^13 entries that holds `round(64 · num / den)`.
The table, too, is computed at elaboration. `T0` comes out one cycle later as a
fixed-point sample index with 6 fractional bits (1/64 sample, about 0.2 ns at
80 MS/s). It is exact for denominators below 64, and within 2/64 sample otherwise.

Time base: `T0` uses the index of the newest ADC sample in the filter, and `i0` is
the earlier of the two samples of `D[i0]`. So `T0` is later than the true pulse
maximum by the filter's group delay (12 samples). It is earlier by roughly `R/2`.
Both are constant offsets and are not removed in hardware.

## Records, buffering and arbitration (`package_builder`, `hit_arbiter`)

A record is `apfel_pkg::hit_t`, 68 bits:

| field | bits | meaning |
|---|---|---|
| `channel` | 6 | channel number (room for 64) |
| `t0` | 38 | 32-bit sample index + 6 fractional bits |
| `amplitude` | 24 | TMAX sum `S` |

Each channel buffers its records in a 16-entry FIFO. The front end cannot be
stalled, so a hit that meets a full FIFO is dropped and sets that channel's sticky
`overflow` bit. The bit stays set until reset. The arbiter serves requesting
channels round-robin, starting one past the channel served last. It passes the
chosen record through without a register and moves on only after a transfer, so
the output holds still while the sink stalls. It delivers at most one record per
clock.

Capacity: at the highest pulse rate of interest, 400 kHz per channel, one channel
produces a record every 200 samples. 32 channels then need 0.16 records per clock,
well below the arbiter's one per clock. Overflow happens only if the downstream
readout stalls for a long time.

## Top level (`apfel_top`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | sample clock (80 MHz) |
| `rst_n` | in | 1 | synchronous, active low |
| `adc_data[N_CH]` | in | 14 each | one unsigned sample per channel per clock |
| `threshold` | in | 24 | minimum TMAX amplitude of a hit |
| `timestamp` | out | 32 | samples since reset; index of the sample now on `adc_data` |
| `hit_valid` / `hit_ready` / `hit` | out / in / out | 1 / 1 / 68 | merged record stream |
| `overflow` | out | `N_CH` | per-channel dropped-record flags |

Parameters: `N_CH = 32`, `R = 8`, `FIFO_DEPTH = 16`. The fixed sizes (ADC width,
taps, coefficient precision, widths of the record fields) are in `apfel_pkg`. A
pulse's record appears about 9 cycles after the sample at its maximum passes the
filter: 4 in the FIR, 1 for the derivative, 2 for the sign change, 1 for the
interpolation and 1 in the FIFO.

**Start-up.** After reset the filter's delay line holds zeros, but the ADC sits at
a baseline of about 15 300 counts. The filter first sees a large step, and its
ringing would look like pulses. Each channel therefore holds TMAX in reset for
`FIR_LAT + N_TAPS` = 29 samples, until the filter holds only real samples. TMAX
then needs `R` more samples to fill its derivative history. Pulses in the first 37
samples after reset are not seen.

Everything runs in the sample-clock domain and nothing stalls upstream of the
FIFOs. The full board has 64 channels on two FPGAs, so use two instances or set
`N_CH = 64`.

## What follows the original design and what does not

These follow the original design:

- the 32-channel triggerless chain ADC → FIR → TMAX → package builder → arbiter;
- 25 taps, 14-bit samples, 18-bit coefficients, 80 MS/s;
- a 0–8 MHz pass band;
- distributed arithmetic with 5-input tables, a pre-adder and a shift-adder;
- the TMAX derivative, the positive-part sum and the interpolation formula, with a
  table instead of a divider.

These are choices made here:

- the coefficient values and the 16 MHz stop-band edge;
- 5-input tables (a 6-input grouping would also fit the scheme);
- the bit-parallel DA structure and its pipeline cut;
- the derivative lag `R = 8` and the polarity switch;
- the run-wise restart of the TMAX sum;
- the threshold test used for hit detection;
- the interpolation table's addressing and precision;
- the record format, FIFO depth, drop-on-full policy and round-robin arbitration;
- the start-up hold-off;
- the shared timestamp counter and all widths not listed above.

Pile-up detection and correction is not implemented. The original work names it as
a goal but does not describe a method.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares against models
written from the equations, not from the RTL structure (`tb/apfel_ref_pkg.sv`: a
direct-form multiply-add FIR, the TMAX equations, real-valued interpolation).

| testbench | what it checks |
|---|---|
| `tb_fir_da` | every output cycle against the direct-form FIR, for an impulse, a full-scale step, a pulse on a baseline and random data, including the 4-cycle latency |
| `tb_fir_tap_scan` | the same filter built for 5, 11 and 25 taps (11 does not divide into 5-input tables), each bit-exact against its direct-form reference |
| `tb_tmax` | amplitude, `i0`, `D[i0]`, `D[i1]` and exact hit cycle against the model; suppression of pulses below threshold; the `tmax_out` stream |
| `tb_tmax_interp` | table quotient: exact for small denominators, within 2/64 otherwise, over 3000 random operand sets |
| `tb_package_builder` | order, contents, drop-on-full and the overflow flag against a model queue |
| `tb_hit_arbiter` | round-robin grant order, record contents, handshake, hold during stall, 32 sources |
| `tb_apfel_channel` | one channel from ADC trace to record, against the full reference chain |
| `tb_rate_scan` | all 32 channels at 100 kHz and 400 kHz pulse rate per channel, three pulse heights, overlapping pulses at the higher rate: every record against the reference, no overflow, every pulse recorded |
| `tb_apfel_top` | all 32 channels at default parameters: every record against the reference (amplitude exact, time within 3/64 sample), then a stalled sink with a dense pulse train on one channel to force overflow; it also checks that hits, threshold suppression, arbiter contention, sink stalls, sub-sample fractions, overflow and the start-up hold-off all occurred |

Every testbench prints `TB_RESULT checks=N failures=M` and has a cycle watchdog.
With plain Verilator, for example:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/apfel_pkg.sv tb/apfel_ref_pkg.sv rtl/da_lut.sv rtl/fir_da.sv rtl/tmax.sv \
  rtl/tmax_interp.sv rtl/package_builder.sv rtl/apfel_channel.sv rtl/hit_arbiter.sv \
  rtl/apfel_top.sv tb/tb_apfel_top.sv --top-module tb_apfel_top
./obj_dir/Vtb_apfel_top
```

The full-size top testbench takes under a minute to build and well under a second
to run. For the other testbenches, list `rtl/apfel_pkg.sv`, the reference package
if the testbench imports it, the modules it needs and the testbench, and name the
testbench with `--top-module`.

How far to trust it: the arithmetic matches the reference bit for bit (the FIR and
the amplitude) or to the stated tolerance (the time). What is not verified is how
close the results are to the original firmware. Its coefficients, derivative lag
and record format are not known, so absolute amplitudes and time offsets will
differ by constant factors and offsets. The design has not been through FPGA
timing closure. The one-clock shift-adder over 14 bit planes and the 2^13-entry
interpolation table are the likely critical paths at 80 MHz.
