# Digital bang-bang clock and data recovery loop

A multi-Gb/s serial receiver has to sample each bit in the middle of its eye,
using a clock it reconstructs from the data itself. The classic solution is an
analog PLL: a bang-bang phase detector drives a charge pump, an RC loop filter
and a VCO. This design replaces everything after the phase detector by
synchronous logic. The phase detector outputs are reduced to one small number per
word, and a proportional-integral filter built from two integrators turns that
number into a digital phase code. A digital-to-phase converter (DPC), the one
mixed-signal part left in the loop, turns the code into the slicer clock phases.
Because the filter is digital, its gains are exact powers of two. It does not
drift with process, voltage or temperature. A frequency offset between the local
reference and the incoming data is absorbed by a frequency register, not by a
VCO control voltage.

The RTL is the digital part of the loop, sized like a 5 Gb/s test receiver. It
has 8 bits per word, a 9-bit DPC code (1/512 UI per step), a 15-bit phase
integrator and a 15-bit frequency integrator.

## Signal path

```
 data slicers  --M-->+--------------+  data  W   +-----------+ phe 2W  +----------------+
 (M per clock)       | deserializer |----------->| bbpd_bank |-------->| vote_decimator |
 edge slicers  --M-->|              |  phase W   | W bang-   |         | 2 voters of W/2|
                     +--------------+----------->| bang PDs  |         | summed: -2..+2 |
                        | word strobe            +-----------+         +----------------+
                        v                                                     | dec (3 bits)
                    word clock                                                v
                                                                   +----------------------+
   DPC  <---- dpc_code (9 bits) -------------------------------- | loop_filter          |
 (2M clock phases, f_baud/M, shifted by code/512 UI)             | 8x -> phase integ.   |
                                                                 | 1/2/4x -> freq integ.|
                                                                 +----------------------+
```

`dcdr_top` contains everything in boxes drawn with `+`. The slicers, the DPC
and the analog input network (ESD protection, termination, AC coupling,
equalization) are analog. They are outside the RTL: the slicer outputs enter on
`data_slice`/`phase_slice`, and the DPC code leaves on `dpc_code`.

The whole design runs on one clock, the slicer clock at f_baud/M. Work happens
once per word: the deserializer's `word_valid` strobe passes down the pipeline
as an enable. A divided `word_clk` at f_baud/W is also produced for logic
downstream.

## Bang-bang phase detection

Next to every data sample the receiver takes an edge sample, half a UI earlier.
`bbpd` looks at the triple (previous data bit, edge sample, next data bit),
written with symbols +1/-1:

| d[n-1] | p[n] | d[n] | decision |
|--------|------|------|----------|
| -1 | -1 | +1 | early, -1 |
| +1 | +1 | -1 | early, -1 |
| -1 | +1 | +1 | late, +1 |
| +1 | -1 | -1 | late, +1 |
| equal to d[n] | any | equal to d[n-1] | none, 0 |

An edge sample that still shows the old bit was taken before the crossing
(early). One that already shows the new bit was taken after it (late). The
output is 2-bit two's complement. Data bit 1 stands for +1.

`bbpd_bank` has W of these detectors. In a word, bit 0 is the earliest.
`phase[i]` is the edge sample between `data[i-1]` and `data[i]`. For bit 0 the
bank keeps the last data bit of the previous word in a register.

## Decimation by voting

Adding all W = 8 decisions at once would take a wide adder and a long path.
Every cycle of delay in this loop costs phase margin. Instead,
`vote_decimator` splits the word into two halves of four. A `voter` reduces each
half to the sign of its sum: +1, -1, or 0 on a tie. The two votes are added, so
each word yields one value `dec` in -2..+2 (3 bits). Voting loses gain compared
with a plain sum. With random data and a small phase error, each detector
output is 0 half the time and otherwise late with probability p. Working the
sign-of-sum rule through that distribution gives 0.547 times the slope of a
4-input sum. The decimator's small-signal gain is therefore about 8 * 0.54 =
4.3 times that of a single detector, not 8. `tb_voting_gain` measures this
ratio on the RTL. The loop gains below come before this factor.

## Loop filter: integrators, dither bits and gains

This is the part that needs the most care. `loop_filter` applies, once per word:

```
freq  <- saturate_15bit_signed( freq + dec * G ),  G = 0, 1, 2 or 4 (frug_sel)
phase <- ( phase + 8 * dec + (freq >>> 6) ) mod 2^15
code  <- phase >> 6                                 (one clock later)
```

All gains are fractions made by dropping low-order bits. Only the top N-D bits
of an N-bit integrator go to the next stage, so the D low "dither" bits divide
by 2^D while keeping full resolution inside the register.

* **Proportional gain (phug).** The error enters the phase integrator shifted
  left by 3 (8x). Only the top 9 of the 15 phase bits reach the DPC, a division
  by 2^6. So phug = 8 * 2^-6 = 2^-3 DPC codes per unit of `dec`.
* **Integral gain (frug).** The error, times 1, 2 or 4, enters the 15-bit
  frequency register. Only its top 9 bits (8 plus sign) are added to the phase
  register (2^-6), which drops another 2^-6 on the way to the DPC. So frug is
  2^-12, 2^-11 or 2^-10. `FRUG_OFF` freezes the frequency register.
* **Frequency range.** The largest positive top-9 value, 255, moves the DPC by
  255/64 = 3.98 codes per word of 8 UI. That is 3.98 / (8 * 512) ≈ 972 ppm of
  frequency offset. One step of the top bits is 972/256 ≈ 3.8 ppm. In steady
  state against an offset of x ppm, the frequency register settles at
  freq/64 ≈ -x * 8 * 512 * 64 * 1e-6, for data arriving x ppm slower than
  the local clock.
* **Wrap and saturation.** The phase register is unsigned and wraps. A
  frequency offset therefore becomes an endless phase ramp, and the DPC must
  treat code 511 -> 0 as a single step. The frequency register is signed and
  saturates, so a large positive value never turns into a large negative one.
  `freq_sat` reports an update that hit the limit.

The phase adder takes the frequency value from before the current update.

### Gain measurement hook

`freq_load` writes `freq_load_val` into the frequency register. It takes
priority over integration. Set `frug_sel = FRUG_OFF` and load a value F. The
loop then settles where the mean of 8 * `dec` cancels F/64 in the phase
integrator. The mean sampling offset it settles at, plotted against F, is the
combined transfer curve of phase detector and decimator. The closed-loop test
exercises this. Loading top values of 4, 8 and 12 gives mean decimator outputs
of -0.48, -0.98 and -1.47.

## Timing and latency

Counted in slicer clocks, from the clock edge that completes a word in the
deserializer's shift register:

| stage | clocks |
|-------|--------|
| word register in `deserializer` (`word_valid`) | 1 |
| detector register in `bbpd_bank` (`phe_valid` inside the top) | 1 |
| decimator register (`dec_valid`) | 1 |
| phase / frequency integrators | 1 |
| DPC code register (`code_valid`) | 1 |

That is 5 clocks, 2.5 words, plus the two clocks it takes to collect a word. The
delay around the whole loop is meant to be about 18 words. The rest comes from
the DPC control path and the analog side. If the total delay approaches a
quarter of the period of the loop's unity-gain frequency, the loop loses most of
its phase margin. Extra pipeline stages here must be paid for with a lower
bandwidth.

## Interface of `dcdr_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | slicer clock f_baud/M; asynchronous active-low reset |
| `data_slice`, `phase_slice` | in | M | slicer outputs of this clock, bit 0 earliest |
| `frug_sel` | in | 2 | `FRUG_OFF`, `FRUG_X1`, `FRUG_X2`, `FRUG_X4` |
| `freq_load`, `freq_load_val` | in | 1, 15 | load the frequency register |
| `data_word`, `word_valid`, `word_clk` | out | W, 1, 1 | recovered data (bit 0 earliest) |
| `dpc_code`, `code_valid` | out | 9, 1 | phase code to the DPC |
| `phe`, `dec`, `dec_valid` | out | 2W, 3, 1 | detector decisions, decimator output |
| `phase_reg`, `freq_reg`, `freq_sat` | out | 15, 15, 1 | integrator state |

Parameters, with their defaults: `M` = 4 slicers of each kind, `W` = 8,
`PHASE_W` = 15, `FREQ_W` = 15, `DPC_W` = 9, `FREQ_TOP` = 9, `PHUG_SH` = 3.
`W` must be even and a multiple of `M`, with `W/M` >= 2. Types and constants
are in `dcdr_pkg`.

## What is a design choice here

These parts follow the reference architecture: the decision table, two voters
of W/2 samples summed, the integrator widths, the 8x and 1x/2x/4x gains, the
top-9-bit selections, the register in front of the DPC, the signed saturating
frequency register and the unsigned wrapping phase register. Not fixed by it,
and chosen here:

* the number of slicers per clock, M = 4, and hence the slicer clock rate;
* the vote rule (sign of the sum, 0 on a tie), which gives the expected
  54 % gain of voting over four samples;
* the bit order in words and slices, and the output encodings;
* one register after each stage, with valid strobes, on a single clock;
* the deserializer as a free-running shift register, with no word alignment;
* the off setting of the integral gain and the load port of the frequency
  register (the gain measurement needs both; how they are driven is open);
* zero reset values and the asynchronous active-low reset.

Not in the RTL: the DPC, the slicers (including their programmable offsets)
and the analog front end. A receiver built from this RTL needs a DPC with
unlimited range, 2M clock phases at f_baud/M, and 1/512 UI per code step. A
late decision raises the code, so for negative feedback a higher code must move
the sampling instants earlier.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=N` and has a watchdog.

* `tb_bbpd` checks all 8 input cases against the decision table.
* `tb_voter` checks all 81 input combinations.
* `tb_bbpd_bank` checks random words, including decisions across word
  boundaries.
* `tb_vote_decimator` checks random and biased words, and requires every
  output -2..+2 to occur.
* `tb_loop_filter` runs 20 000 random updates against an integer model, plus
  directed checks of the 8x step and of saturation at both ends.
* `tb_deserializer` checks word assembly, the word period and the word clock.
* `tb_voting_gain` measures the voting decimator's gain against a plain sum
  of the same random samples (expected 0.546 at p = 0.5 ± 0.05).
* `tb_dcdr_top` is a closed loop at the default sizes. A PRBS31 (x^31 + x^28
  + 1) source with 0.0375 UI rms edge jitter feeds sample-level models of the
  slicers and of an unlimited-range DPC. The total loop delay is 18 words. The
  test acquires lock from reset at +500 ppm (4x), steps to +900 ppm, and
  acquires at -300 ppm (1x) and +100 ppm (2x). Each time the sampling phase
  error must stay under 0.2 UI; it stays near 0.015 UI. The frequency register
  must land within 6 LSB of the expected value. The test then runs the gain
  measurement above, and drives +1500 ppm against a nearly full frequency
  register to check that it stays saturated. It counts early, late and
  no-transition decisions, decimator values of ±2, phase wraps, each gain
  setting, loads and saturation, and fails if any of them never happened.
  About 1.4 million bits simulate in under a second. In the gain
  measurement, a mean decimator output of 1 corresponds to a sampling offset
  of about 0.024 UI (4.8 ps at 5 Gb/s).
* `tb_cdr_system` runs the loop in real time at 5 Gb/s (200 ps UI) with
  behavioural models that are only for simulation:
  * `tx_model` is the transmitter. It sends PRBS31 with half-sine transitions,
    Gaussian voltage noise equal to 7.5 ps rms jitter at the crossings, and
    optional frequency offset and sinusoidal jitter.
  * `slicer_model` is a clocked comparator with an offset input.
  * `dpc_model` produces 8 phases at f_baud/4. A code change of d moves the
    next edge by d/512 UI, and the code wraps without limit.

  Phase 0 of the DPC retimes the slicer outputs and clocks `dcdr_top`. The
  test acquires +300 ppm from reset, then adds a 0.3 offset on the edge
  slicers, 0.3 UI of sinusoidal jitter at 1 MHz, and 2 UI at 120 kHz. The
  recovered data must obey the PRBS31 recursion with no error and stay
  balanced. The frequency register must match the offset.
* `tb_jitter_tolerance` uses the same models. For each integral gain, it
  raises sinusoidal jitter at 120 kHz, 250 kHz, 500 kHz, 1 MHz and 2 MHz
  until the recovered data shows an error. It runs in about a minute. The
  results:

  | gain | 120 kHz | 250 kHz | 500 kHz | 1 MHz | 2 MHz |
  |------|---------|---------|---------|-------|-------|
  | 1x (2^-12) | 1.4 | 0.5 | 0.5 | 0.5 | 0.7 |
  | 2x (2^-11) | 2.0 | 0.5 | 0.5 | 0.5 | 0.5 |
  | 4x (2^-10) | 4.0 | 1.0 | 0.3 | 0.5 | 0.5 |

  Values are UI peak-to-peak. Higher integral gain tracks low-frequency
  jitter better. Above a few hundred kHz the phase path limits tolerance
  more than anything else. It can move the phase at most 2 * 8 / 64 = 0.25
  DPC codes per word, about 61 ppm, so large fast jitter outruns it.

Run a test with plain Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing -Wno-fatal --top-module tb_dcdr_top \
    -y rtl -y tb +libext+.sv rtl/dcdr_pkg.sv tb/tb_dcdr_top.sv
./obj_dir/Vtb_dcdr_top
```

Swap the testbench name to run another one. `verilator --lint-only -Wall -y rtl
+libext+.sv rtl/dcdr_pkg.sv rtl/dcdr_top.sv` lints the design.

## Known limits

* Jitter tolerance at a bit error rate of 1e-10 has not been checked. That
  needs about 1e10 bits and a real channel model. The tolerance runs above use
  12 000 to 83 000 bits per point and idealized analog models, so they are
  optimistic and only show trends. The models also add less loop delay (about
  4 words) than a real DPC and slicer path would (18 words in total).
* Slicer offset and the dead zone it causes are modelled only in the
  behavioural slicer. The design has no offset calibration.
* Pull-in range depends on the gain setting. With 1x gain the loop does not
  acquire a step of about 1200 ppm. With 4x it acquires 500 ppm from reset and
  follows a further step to 900 ppm. Above about 972 ppm it cannot lock at all.
* Timing at 5 Gb/s (a 1.25 GHz slicer clock with M = 4) has not been analysed.
  A larger M or W lowers the clock rate but adds loop delay.
