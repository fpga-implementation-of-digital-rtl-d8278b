# WCDMA digital up/down converter at an fs/4 intermediate frequency

This is a single-carrier WCDMA IF converter pair for an FPGA. It runs from one
92.16 MHz clock. The IF carrier is placed at exactly a quarter of that rate,
23.04 MHz. That one choice makes the receive side almost free. At fs/4 the
carrier samples `cos(pi*n/2)` and `sin(pi*n/2)` are only 0, +1 and -1. So the
down converter needs no mixer and no filter: it picks the right IF samples and
flips their sign. The transmit side is a conventional complex up converter:
interpolate by 4, low-pass filter, and mix with a numerically controlled
oscillator (NCO).

The RTL follows the structure of the design published as "FPGA Implementation
of Digital Up/Down Converter for WCDMA System". That structure covers the block
chain, the rates, the gains, the filter specification, the oscillator
constant and the latencies of the multipliers and decimators. The publication
gives no word widths, no filter coefficients and no reset or handshake
behaviour. Those are this design's own choices and are marked as such below
and in each file header.

```
           +------------------- wcdma_updown_top ---------------------+
 adc_data  |   ddc                         duc                        |  dac_data
 --------->|  x(n) --+-----------> [v4] -> [x-1] --> I --+--> ...     |---------->
  92.16    |         |                                   |            |  92.16 Msps
  Msps     |         +-> [z^-1] -> [v4] -> [x-1] --> Q --+--> ...     |
           |                       bb_i, bb_q, bb_valid (23.04 Msps)  |
           +----------------------------------------------------------+
```

## Receive: the mixer-less down converter (`ddc`)

A complex baseband signal I(n), Q(n) on an fs/4 carrier is
`x(n) = I(n)cos(pi*n/2) - Q(n)sin(pi*n/2)`. Over one carrier period this gives:

| n mod 4 | x(n)  |
|---------|-------|
| 0       | +I(n) |
| 1       | -Q(n) |
| 2       | -I(n) |
| 3       | +Q(n) |

The IF stream already holds the baseband samples, one component at a time and
with a known sign. The down converter:

1. registers the ADC sample;
2. splits it into two branches and delays the quadrature branch by one sample
   (`sample_delay`);
3. decimates both branches by 4 with the same counter phase (`downsampler`);
4. multiplies both by -1 (`cmult`, GAIN = -1).

Suppose the in-phase decimator keeps the samples with n = 4k+2. It then gets
-I(4k+2), and the quadrature branch, one sample behind, gets -Q(4k+1). The
inverters turn these into I(4k+2) and Q(4k+1). So the output is a 23.04 Msps
baseband pair, with Q one IF sample older than I.

Which of the four phases the decimators keep is set by `DS_PHASE`. It must
match the carrier phase of the incoming signal, which the converter cannot
know. With the wrong phase the output is a sign-flipped or I/Q-swapped copy.
In the lab setup this alignment is fixed by the ADC and cabling. Here it is a
parameter. The testbenches generate their IF so that `DS_PHASE = 0` lands on
n = 4k+2.

The inverter saturates. An input of -8192 has no 14-bit negation, so it
becomes +8191.

There is no anti-alias filtering on the receive side. Any energy in the IF
band other than the wanted signal folds into the baseband. The design counts
on the signal reaching the ADC being band-limited around 23.04 MHz.

## Transmit: the complex up converter (`duc`)

```
 I --> upsampler(x4) --> cast --> fir_lowpass --> cmult x4 --> pipe_mult --\
                                                  dds cos --> cmult x2 --/   addsub a-b --> round/sat --> dac
                                                  dds sin --> cmult x2 --\
 Q --> upsampler(x4) --> cast --> fir_lowpass --> cmult x4 --> pipe_mult --/
```

The output is `dac = I'(n)cos(w0 n) - Q'(n)sin(w0 n)`, where I' and Q' are the
interpolated baseband streams.

- **Interpolation** (`upsampler`) inserts three zeros after every baseband
  sample. The sample arrives with an `in_valid` strobe every fourth clock,
  and an assertion checks that spacing.
- **Filter** (`fir_lowpass`) removes the three spectral images that the zero
  stuffing creates. The specification is: passband to 5 MHz with 0.1 dB
  ripple, stopband from 20 MHz with 140 dB attenuation, at 92.16 Msps.
  Zero stuffing divides the signal level by 4, and the following x4 gain
  restores it.
- **Oscillator** (`dds`) is a 30-bit phase accumulator feeding a 1024-entry
  sine table. The cosine is read from the same table a quarter turn ahead.
  The increment is written through a `data`/`we` pair. The top holds `we`
  high with the constant 268435456 = 2^28. That is 2^28/2^30 of the clock,
  so the carrier is 23.04 MHz.
  The x2 gain on each oscillator output comes from the reference design.
- **Mixers** (`pipe_mult`) are full-precision signed multipliers with three
  clocks of latency.
- **Combiner** (`addsub`) computes a - b, with the cosine product on a and the
  sine product on b.

## Filter design

No coefficients come with the specification, so the filter is designed here
and computed in SystemVerilog at elaboration (`updown_pkg::fir_coefs()`):

- 65 taps, symmetric, linear phase;
- windowed sinc with cutoff 12.5 MHz, midway between the band edges;
- Kaiser window with beta = 0.1102 x (140 - 8.7) = 14.47;
- scaled to unity DC gain and rounded to 32-bit integers with 30 fraction bits.

After rounding, the coefficients give about 2e-5 dB passband ripple and
140.9 dB stopband attenuation. `tb_fir_lowpass` measures both figures from
the coefficients the RTL actually uses. 18-bit coefficients would reach only
about 82 dB, and 28-bit coefficients about 138 dB, which is why the
coefficients are 32 bits wide. In practice the 14-bit DAC limits the output
to roughly 80 dB anyway. The 140 dB is met by the filter, not by the chain.

The filter is a plain direct form with one constant multiplier per tap. It
does not share multipliers between symmetric taps, and it does not skip the
zero-valued inputs (a polyphase interpolator would). Both are possible
optimisations, and both would change only the resource count, not the output.

## Fixed-point formats

| point in the chain               | width | note                                   |
|----------------------------------|-------|----------------------------------------|
| ADC sample, baseband I/Q         | 14    | two's complement                       |
| cast before the filter           | 16    | two zero fraction bits appended        |
| filter output                    | 16    | accumulator rounded by 2^30, saturated |
| after x4                         | 18    | exact                                  |
| oscillator output                | 16    | amplitude 32767                        |
| after x2                         | 17    | exact                                  |
| mixer product                    | 35    | exact                                  |
| combiner                         | 36    | exact                                  |
| DAC word                         | 14    | combiner rounded by 2^18, saturated    |

The DAC scaling maps a full-scale input on one branch to a full-scale DAC
swing. Filter overshoot on full-scale steps therefore saturates the DAC word,
and the end-to-end test deliberately drives it there.

## Timing

Every register is clocked at 92.16 MHz. Every module has a synchronous,
active-high reset that clears all state.

| block         | latency (clocks) | origin                         |
|---------------|------------------|--------------------------------|
| `upsampler`   | 1                | this design                    |
| `fir_lowpass` | 3                | this design                    |
| `cmult`       | 1                | this design                    |
| `pipe_mult`   | 3                | reference design               |
| `addsub`      | 1                | this design                    |
| `downsampler` | 1                | reference design               |
| `sample_delay`| 1                | reference design (the z^-1)    |
| `dds`         | 1 from phase to sample | this design              |

The timing through the converters is as follows:

- `adc_data` to `bb_i`/`bb_q`: 2 clocks.
- `bb_*` to `dac_data`: 10 clocks. The peak of an impulse response appears
  41 clocks after the input, because the filter's centre tap adds 32.
- Exact equations are in the headers of `ddc.sv` and `duc.sv`.

## How this differs from the reference design

- **Sample rate.** The reference text gives the interpolated rate once as
  98.16 Msps and elsewhere as a 92.16 MHz clock. Since 23.04 x 4 = 92.16,
  92.16 MHz is used throughout.
- **Kept sample phase.** The reference labels the receive outputs I(4n) and
  Q(4n-1), but its derivation keeps the samples at 4n-2 and 4n-3. It explains
  the inverters as undoing a half-period delay of the ADC. Here the
  derivation is followed, with the phase a parameter (see above).
- **Widths, coefficients and tables.** Word widths, the coefficients, the
  accumulator and table sizes, the reset and the latencies marked "this
  design" above are not given by the reference. The 14-bit converter width
  matches the development board the reference targeted.
- **Oscillator range.** The reference's oscillator is a vendor core
  advertised up to 450 MHz. This one is a plain accumulator and table, so it
  covers 0 to fs/2.
- **Resources.** The reference build reports 60 DSP48 blocks on a Virtex-4
  XC4VSX35. This RTL's direct-form filters use 130 constant multipliers, so
  the resource count is not comparable. No vendor synthesis was run.
- **Converters.** The ADC and DAC are board parts, not logic. Their samples
  are the ports `adc_data` and `dac_data`.

## Verification

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference arithmetic lives in
`tb/tb_ref_pkg.sv`:

- an independent recomputation of the filter recipe and sine table;
- a clock-by-clock model of the up converter, `duc_model`.

| testbench              | what it establishes |
|------------------------|---------------------|
| `tb_upsampler`         | zero stuffing, one sample in four |
| `tb_fir_lowpass`       | coefficients within 1 LSB of the recipe, symmetric, unity DC gain; ripple <= 0.1 dB, attenuation >= 140 dB; bit-exact output and latency |
| `tb_dds`               | sine table; the fs/4 sequences 0, 32767, 0, -32767 and 32767, 0, -32767, 0; random reprogramming |
| `tb_cmult`             | x(-1) with saturation, x4, x2 |
| `tb_pipe_mult`         | exact products, 3-clock latency |
| `tb_addsub`            | exact difference |
| `tb_downsampler`       | decimation phase, strobe rate, latency |
| `tb_sample_delay`      | one-sample delay |
| `tb_ddc`               | I(t) and Q(t-1) recovered exactly from a random IF; inverter saturation |
| `tb_duc`               | bit-exact output against `duc_model` (random data, impulse, reprogrammed oscillator); impulse-response timing |
| `tb_wcdma_updown_top`  | full loop at default parameters, described below |
| `tb_wcdma_loop`        | WCDMA-like chip stream through the loop; baseband bandwidth and IF out-of-band power |

`tb_wcdma_updown_top` runs the full loop at the default parameters:

- It feeds a tone-based baseband on the 23.04 MHz IF.
- It checks every baseband sample and every DAC sample exactly.
- It checks that the regenerated IF has the input's power (within 2 dB; the
  measured difference is 0.01 dB).
- It counts decimation, inverter saturation, mixing and DAC saturation, and
  fails if any of them never happens.

`tb_wcdma_loop` runs a WCDMA-like signal through the same loop:

- The signal is 800 random QPSK chips at 3.84 Mcps, that is 24 clocks per
  chip, shaped with a root-raised-cosine pulse of roll-off 0.22.
- It checks all samples bit for bit, as the end-to-end test does.
- It measures the spectra with windowed DFTs. At least 99 % of the baseband
  power must lie within +-2.5 MHz; the measured figure is 99.995 %.
- The IF power beyond 5 MHz from the carrier must be at least 45 dB below
  the in-band power; the measured figure is 57.9 dB.

What is not verified: operation at 92.16 MHz on real silicon, and a
standards-conformant WCDMA waveform with scrambling, channelisation and
power control.

## Simulating

The package must be read first. For example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal \
  rtl/updown_pkg.sv rtl/*.sv tb/tb_ref_pkg.sv tb/tb_wcdma_updown_top.sv \
  --top-module tb_wcdma_updown_top -o sim
./obj_dir/sim
```

This runs in well under a second. Unit testbenches build the same way, with
their module's file (and its submodules) in place of `rtl/*.sv`. The two
packages are listed explicitly because the file glob would otherwise read
them after the modules that import them.

## Files

- `rtl/updown_pkg.sv`: widths, the oscillator constant, and the coefficient
  and sine table generators.
- `rtl/wcdma_updown_top.sv`: the down converter feeding the up converter.
- `rtl/ddc.sv`, `rtl/sample_delay.sv`, `rtl/downsampler.sv`: receive side.
- `rtl/duc.sv`, `rtl/upsampler.sv`, `rtl/fir_lowpass.sv`, `rtl/dds.sv`,
  `rtl/pipe_mult.sv`, `rtl/addsub.sv`: transmit side.
- `rtl/cmult.sv`: constant gains, used on both sides.
- `tb/`: one testbench per module, the end-to-end loop test and the
  reference package.

To change the carrier, change `NCO_INC` on the top. Only fs/4 keeps the
receive side correct, because the down converter depends on it. To change
the filter, edit `FIR_TAPS`, `FIR_FC_HZ` or `FIR_BETA` in the package. Then
rerun `tb_fir_lowpass`, which measures the new response against the
5 MHz / 20 MHz / 0.1 dB / 140 dB specification.
