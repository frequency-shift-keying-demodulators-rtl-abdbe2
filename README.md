# Low-power BFSK demodulators after 1-bit subsampling

This is a binary FSK receiver back end for small, low-power FPGAs. The radio
delivers a 10.7 MHz IF. Its two tones, 10.69 MHz and 10.71 MHz, carry
1 kbit/s. The receiver does not mix the IF down. A comparator slices the IF
to one bit, and the FPGA samples that bit at only 75 kHz. Sampling that far
below the signal frequency aliases the tones to 35 kHz and 15 kHz. From then on
the work is all-digital and slow: a 20 MHz clock is enough to tell the two
tones apart.

Four ways of telling them apart are implemented, each small enough to run
from a battery for hundreds of hours:

| index | module              | idea                                                        |
|-------|---------------------|-------------------------------------------------------------|
| 0     | `counter_demod`     | measure the period of the input, summed over four periods   |
| 1     | `oneshot_demod`     | fire a fixed-length pulse on every edge and average it      |
| 2     | `pfd_demod`         | phase-frequency detector against a 25 kHz reference         |
| 3     | `pfd_preproc_demod` | the same PFD, fed a regenerated, de-jittered input          |

The top level `fsk_demod_top` runs all four side by side on the same sampled
input, so that they can be compared bit for bit. Each has its own bit
synchroniser.

```
 comp_in ──► onebit_sampler ──► baseband ─┬─► counter_demod     ─► bit_sync ─► data_bits[0]
 sample_clk (75 kHz)   (2-FF sync)        ├─► oneshot_demod     ─► bit_sync ─► data_bits[1]
                                          ├─► pfd_demod         ─► bit_sync ─► data_bits[2]
                                          └─► pfd_preproc_demod ─► bit_sync ─► data_bits[3]
```

## Frequency plan and subsampling

The alias of an input `f_in` sampled at `fs` is `f_a = |f_in - W·fs|`, with
`W` the nearest integer to `f_in/fs`:

* 10.69 MHz / 75 kHz = 142.53, so f_a = 0.467 · 75 kHz = 35 kHz
* 10.71 MHz / 75 kHz = 142.80, so f_a = 0.2 · 75 kHz = 15 kHz

The spectrum is mirrored. **The higher IF tone becomes the lower baseband
tone.** All demodulators output 1 for the 35 kHz baseband tone. So if the
transmitter sends 1 as 10.71 MHz, `data_bits` are the inverted data. Invert
them downstream, or move `fs` so that the mirroring goes away.

The sampling instants must be exact. A 50 ns error is half a cycle at
10.7 MHz. For that reason the sampler is clocked by its own `sample_clk` and
is not fed by a divider from the 20 MHz clock: 20 MHz / 75 kHz = 266.67 is not
an integer. A two-flip-flop synchroniser carries the sample into the system
domain.

**1-bit distortion.** A 35 kHz alias at 75 kHz has 2.14 samples per cycle. The
reconstructed square wave is therefore made of 2-sample and 3-sample cycles:
533 and 800 system clocks instead of a steady 571. These cycles repeat in a
pattern whose average is correct. The 15 kHz alias has exactly 5 samples per
cycle (1333 clocks) and no jitter. Every demodulator therefore averages over
several periods. The preprocessor of demodulator 3 is there to remove this
jitter before the PFD.

All frequencies, divider lengths and thresholds are in `rtl/fsk_pkg.sv`:

| constant        | value  | meaning                                            |
|-----------------|--------|----------------------------------------------------|
| `CLK_HZ`        | 20 MHz | system clock                                       |
| `BIT_CYCLES`    | 20000  | clocks per bit (1 kbit/s)                          |
| `REF_DIV`       | 400    | half period of the 25 kHz PFD reference            |
| `CNT_TICK_DIV`  | 20     | counter demodulator counts at 1 MHz                |
| `CNT_THRESHOLD` | 186    | between 4·T_H = 114 and 4·T_L = 266 ticks          |
| `OS_PULSE_LEN`  | 571    | one-shot pulse = one 35 kHz period                 |
| `OS_AVG_LEN`    | 1333   | one-shot averaging window = one 15 kHz period      |
| `OS_THRESHOLD`  | 952    | midway between 571 and 1333                        |
| `PFD_AVG_LEN`   | 1000   | PFD moving-average taps, one every 3rd clock       |

## The four demodulators

### Counter (`counter_demod`)

The period of the input is measured in ticks of a 1 MHz count enable. Each
rising input edge pushes the finished count into a four-entry history and
restarts the count. `N_count`, the sum of the last four counts, is about
`4·f_tick/f_in`: 114 at 35 kHz and 266 at 15 kHz. A count is about one tick
short, because the tick in which the edge falls is not counted. Below the
threshold of 186 the decision is 1. The sum spreads the two values apart and
averages the 1-bit jitter. It also delays transitions by up to four 15 kHz
periods, about 270 µs. This is by far the smallest design, about 70
flip-flops. It gets worse as the data rate approaches f_L.

### One-Shot (`oneshot_demod` = `edge_detect` + `pulse_gen` + `moving_avg`)

Each rising edge (re)starts a 571-clock pulse. At 35 kHz the next edge comes
before the pulse ends, so the output stays high. At 15 kHz the output is high
for 571 of every 1333 clocks. A 1333-tap running count of ones turns this into
a level of about 1333 or 571, and 952 separates the two. The window is one bit
wide per clock, so this block is dominated by its 1333-bit shift register.

### PFD (`pfd_demod` = `clk_div` + `pfd` + 2 × `moving_avg`)

The classic two-flip-flop-and-AND phase-frequency detector is used open loop.
An input edge sets UP and a reference edge sets DOWN. When both are high, both
are cleared. The reference is a fixed 25 kHz, halfway between the tones. If
the input is faster, the input edge almost always comes first and UP pulses
dominate. If it is slower, DOWN pulses dominate. The pulse widths vary in a
pattern set by the two periods. The longest pulse is T_L − T_clk, and the
pulses grow by T_L − T_H from one to the next. So each output is averaged over
1000 samples taken every third clock (150 µs). The DOWN average is subtracted
from the UP average, and the sign of the difference is the bit.

The detector here is synchronous. Both inputs are edge-detected in the 20 MHz
domain, and the two flip-flops are set and cleared on clock edges. The classic
circuit clocks each flip-flop with its own input and resets them
asynchronously. That gives the same pulse pattern, but without quantisation
to the system clock, and it needs two extra clock domains. The synchronous
form clears one clock after both outputs are high, which reproduces the
T_L − T_clk maximum.

### PFD with preprocessor (`pfd_preproc_demod`)

The preprocessor has three stages, and the PFD demodulator above follows
them:

1. **`period_detect`** counts system clocks between rising edges. Counting at
   20 MHz gives the NCO fine resolution.
2. **`binomial_filter`** averages the last four periods with weights 1-3-3-1
   and divides by 8. It uses only adders: three levels of pairwise sums.
3. **`nco`** regenerates a square wave with that period. It toggles every
   `period/2` clocks.

On the subsampled 35 kHz tone this narrows the period spread from 533–800
clocks to 533–633. The regenerated wave then gives the PFD a much steadier
input. The preprocessor adds roughly two input periods of delay.

## Bit synchronisation (`bit_sync`)

The raw decisions change at bit boundaries, plus each demodulator's delay.
A 20000-clock bit timer restarts on every transition of the decision, and
the decision is sampled half a bit later. In runs of equal bits the timer runs
free at the bit rate. `data_valid` pulses once per bit, 9999 clocks after the
clock that first sees a transition. A glitch caused by noise realigns the
timer. The next real transition corrects it.

## Interfaces and timing

`fsk_demod_top` ports:

| port         | dir | width | meaning                                                   |
|--------------|-----|-------|-----------------------------------------------------------|
| `clk`        | in  | 1     | 20 MHz                                                    |
| `rst_n`      | in  | 1     | asynchronous, active low; everything resets to 0         |
| `sample_clk` | in  | 1     | 75 kHz sampling clock, must be accurate                   |
| `comp_in`    | in  | 1     | comparator output (any timing)                            |
| `baseband`   | out | 1     | subsampled baseband in the 20 MHz domain                  |
| `raw_bits`   | out | 4     | threshold decisions, index as in the table above          |
| `data_bits`  | out | 4     | mid-bit samples of `raw_bits`                             |
| `data_valid` | out | 4     | one-clock strobe with each `data_bits` update             |

The delays from the IF to the raw decision are roughly 200 µs for the Counter,
80 µs for the One-Shot, 120 µs for the PFD and 170 µs for the PFD with
preprocessor. All are well under half a bit, so the mid-bit sample falls
inside the bit. Every module is written for one clock, `clk`, except the
sample flip-flop in `onebit_sampler`, which runs on `sample_clk`.

## How far to trust it, and where it departs from the design study

The four demodulators, their frequency plan and their thresholds come from a
published comparison study. These parts are this implementation's own:

* **One clock domain.** Dividers produce enables and data signals, not clocks.
  The PFD is synchronous, as described above.
* **Separate sample clock and synchroniser** for the 1-bit sampler.
* **Output polarity.** Every demodulator outputs 1 for the higher *baseband*
  frequency. Taken literally, the Counter's description outputs 1 above the
  threshold, which is the low tone. It was made to agree with the others.
* **Counter accumulation** is a plain sum of four periods. The reference
  values 114/266 and the threshold 186 refer to that sum. A 1-3-3-1 weighting
  of the four counts, as in the preprocessor, would also work.
* **Moving-average decimation.** The PFD averages shift every third clock,
  and the One-Shot average shifts every clock. The study gives N = 1000 for
  the PFD, and a 1333-sample window with a threshold of 952 for the One-Shot.
  Because of the One-Shot's per-clock window, that design synthesises to
  about 1360 flip-flops, where the study reports 269. Decimating its window
  would bring it down.
* **Widths, saturation and reset values** are chosen here. Period counters
  saturate, the NCO stops for periods below 2, and the binomial history starts
  at zero.
* Not part of the RTL: the RF front end, the anti-aliasing filter and the IF
  comparator. They are analog. The testbenches model the comparator as the
  sign of a sine at each sampling instant.

Verification status: every module has a self-checking testbench that either
compares against an independent reference model or checks against the
expected numbers above (for example N_count 110–114 / 262–267, the one-shot
level 1333 / 571, the 800-clock reference period, and exact mid-bit sampling).
The end-to-end test sends a 24-bit frame over the modelled IF. All four
demodulators recover all 24 bits, and every mechanism is exercised: both
threshold crossings, merged one-shot pulses, UP and DOWN pulses, 1-bit
distortion and its smoothing, bit-sync realignment and free-running.
`tb_fsk_error_frames` adds tone-swapping error bursts (1 to 5 per frame, each
up to one bit long). The four demodulators then make almost the same number
of bit errors. No FPGA timing or power was measured.

## Simulating

Every testbench is self-contained and prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/fsk_pkg.sv tb/tb_fsk_demod_top.sv --top-module tb_fsk_demod_top -o sim
./obj_dir/sim
```

Replace the testbench name to run another one: `tb_counter_demod`,
`tb_oneshot_demod`, `tb_pfd_demod`, `tb_pfd_preproc_demod`,
`tb_onebit_sampler`, `tb_bit_sync`, `tb_fsk_error_frames`, or one of the
sub-blocks. The end-to-end test uses the top at its default size and takes
about a second. The 16-frame error workload takes about ten seconds.

To retarget the receiver, edit `fsk_pkg.sv`. For other tones, change
`F_H_HZ`/`F_L_HZ`: the one-shot pulse, window and threshold follow
automatically. Then set `CNT_THRESHOLD` to the midpoint of
`4·f_tick/f_H` and `4·f_tick/f_L`, and set `REF_DIV` to put the reference
between the tones. The data rate must stay roughly ten times below f_L, so
that each bit holds several tone periods.
