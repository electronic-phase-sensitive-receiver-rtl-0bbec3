# Electronic phase sensitive track relay

Track circuits tell a railway interlocking whether a section of track is free.
A 75 Hz (or 275 Hz) supply feeds the rails at one end of the section. At the
other end, a phase sensitive relay compares the rail voltage with a reference
taken straight from the supply, which is shifted by 90 degrees. The classic
relay is a Ferraris motor: two coils at right angles drive an aluminium disc
with torque

    M = k * I_rail * I_ref * sin(phi)

An axle that shorts the rails collapses the rail voltage and turns its phase,
so the torque drops and the relay falls. This RTL replaces the electro-mechanical
relay with digital signal processing that computes the same torque. Each sample
period it does this:

1. Sample the rail and reference signals with two serial 16-bit A/D converters.
2. Take one windowed DFT bin of each signal at the track frequency.
3. Turn both complex values into amplitude and phase with a CORDIC.
4. Compute `sin(phi_rail - phi_ref)` with the same CORDIC.
5. Multiply the torque together, compare it with two thresholds (hysteresis),
   and delay the decision by a programmable pull time and drop time.

Two identical channels do all of this side by side. A comparator checks that
they agree, for safety.

## Signal path of one channel

```
 sad1 ─┐                ┌─ RAM1 (rail) ─┐                      ┌────────────┐
       ├─ adc_control ──┤               ├─ dft1 ── re,im ──────┤  cordic    ├─ A, phi (x2), sin
 sad2 ─┘   sclk, scs    └─ RAM2 (ref) ──┘    ▲                 └────────────┘        │
                                    coef_rom (Kaiser · cos/sin)              torque_comp
  clock_gen: sample_tick, bit_tick                                               │
  psr_sequencer: steps everything once per sample              threshold_hyst → delayed_output → relay_out
```

| module | role |
|---|---|
| `psr_pkg` | widths, `cordic_mode_t`, `seq_state_t`, `chan_result_t` |
| `clock_gen` | sample-rate strobe and serial-clock strobe from the master clock |
| `adc_control` | reads both serial converters together (shared `sclk`/`scs`, data on `sad1`/`sad2`) |
| `sample_ram` | RAM1/RAM2: circular buffers of the last N samples |
| `coef_rom` | Kaiser-windowed (beta = 2) cos and sin of the DFT bin |
| `dft1` | one-point DFT, one multiply-accumulate pair per clock |
| `cordic` | iterative CORDIC, vectoring and rotation modes |
| `torque_comp` | `A_rail * A_ref * sin(phi)`, two pipelined multiplications |
| `threshold_hyst` | two thresholds with hysteresis |
| `delayed_output` | "True" and "False" saturating counters for pull and drop times |
| `psr_sequencer` | state machine that orders the steps |
| `psr_channel` | one complete channel |
| `channel_comp` | reciprocal comparison of the two channels |
| `psr_top` | two channels, the comparator and the final output |

## The sliding one-point DFT

The receiver only needs the signal at one known frequency, so it computes a
single DFT bin instead of a full FFT:

    X = sum_{i=0}^{N-1} x_i * w_i * (cos(2*pi*k*i/N) - j*sin(2*pi*k*i/N))

Both buffers are N = 1024 samples deep and the sample rate is 5120 samples/s.
That gives 5 Hz per bin, so 75 Hz is bin k = 15 and 275 Hz is bin 55. The
parameter `SIGNAL_HZ` picks the frequency, and the bin is computed as
`SIGNAL_HZ*N/FS_HZ`.

The window `w_i` is a symmetric Kaiser window with beta = 2:

    w_i = I0(2*sqrt(1 - (2i/(N-1) - 1)^2)) / I0(2)

It is folded into the ROM coefficients, so the ROM stores
`round(32767 * w_i * cos(...))` and `round(32767 * w_i * sin(...))`. These are
computed by constant functions when the design is elaborated, so no data file
is needed. I0 is evaluated as its power series.

After every new sample, the DFT runs over the whole buffer again. RAM1 is read
from the oldest sample to the newest (`raddr = wptr + idx`), and then RAM2.
Each of the two DFTs takes N + 2 clocks, with a separate multiplier for the
real part and for the imaginary part. The accumulators keep full precision:
16 + 16 + log2(N) = 42 bits. Because the window slides, the absolute phase of
each bin turns by `2*pi*k/N` per sample. The phase difference between rail and
reference does not, and it is the only phase that is used.

Until the buffers have been filled once, the channel only stores samples. Its
first result comes at sample N. The RAMs are never reset.

## CORDIC: amplitude, phase and sin(phi)

One `cordic` instance runs three passes per sample. Each micro-rotation takes
one clock and, for `j = 0 .. 15`, computes:

    x' = x - sigma * (y >>> j)
    y' = y + sigma * (x >>> j)
    z' = z - sigma * atan(2^-j)

- **Vectoring** (`sigma = -sign(y)`): starts from `(re, im, 0)`. It ends with
  `x = K*|X|` and `z = angle(X)`. This pass runs once for the rail vector and
  once for the reference vector.
- **Rotation** (`sigma = sign(z)`): starts from `x = 1`, `y = 0`,
  `z = phi_rail - phi_ref`. It ends with `y = K*sin(phi)`.

Details that are easy to get wrong:

- **Angles are binary angles.** A 16-bit angle holds 2^16 units per turn, in
  two's complement, so the range is [-pi, pi). Subtracting two phases then wraps
  correctly with no extra logic.
- **Quadrant pre-rotation.** A plain CORDIC only converges within about
  ±99.7°. The load cycle therefore first turns the operand by 180° (negate x
  and y, add half a turn to z) in two cases:
  - vectoring, when `x < 0`;
  - rotation, when the top two bits of z differ, that is `|z| >= 90°`.

  A reversed rail phase, with the reference at about ±180°, only works because
  of this step.
- **z guard bits.** The arctangent table is rounded. With only 16 angle bits,
  the rounding errors of 16 entries add up to about 8 units. `z` therefore
  carries 4 extra fraction bits internally (`ZG`), and `zout` is truncated back
  to 16 bits.
- **Gain K ≈ 1.64676 is not removed.** Amplitudes come out as `K*|X|`, and the
  rotation gives `K*sin(phi)`. The torque therefore carries a factor K^3, which
  the thresholds absorb. This keeps `x = 1` as the rotation start value.
- **Headroom.** x and y are 24 bits wide. The DFT result enters as its top
  22 bits, sign-extended by 2 guard bits, because the vector grows by up to
  `K*sqrt(2) < 2.33`.

A pass takes 17 clocks from `start` to `done`.

## Numbers and scaling

The scaling between stages is fixed by `psr_channel`:

| quantity | source bits | value for a sine of amplitude A (LSB), N = 1024 |
|---|---|---|
| CORDIC input | DFT accumulator bits 41..20 | `A * 32767 * sum(w)/2 / 2^20`, with `sum(w) = 814.2` |
| amplitude `A_rail`, `A_ref` (16 bit) | CORDIC x bits 22..7 | `K * A * 32767 * 814.2/2 / 2^27` ≈ 0.164 * A |
| `sin_phi` (16 bit) | CORDIC y bits 21..6 (rotation from x = 2^20) | `K * sin(phi) * 2^14` |
| torque `M` (48 bit, signed) | exact product | `A_rail * A_ref * K * sin(phi) * 2^14` |

Example: rail and reference are both 20000-LSB sines, 90° apart. Then
`A_rail = A_ref ≈ 3273` and `M ≈ 2.89e11`. The testbenches compute these
numbers from the formulas above, set the thresholds to 50 % and 30 % of the
free-track torque, and check the RTL against them. The amplitudes match to
within 1 %, and the phase difference to within 0.5°.

For other values of N, the accumulator grows by log2(N) bits and the same bit
positions are used, so amplitude values scale with `sum(w) / 2^log2(N)`.

## Decision: hysteresis and the pull/drop counters

`threshold_hyst` updates once per computed sample:

- `torque > thr_high` gives 1 (free).
- `torque < thr_low` gives 0 (occupied).
- Anything in between holds the previous value.

`delayed_output` models the relay's reaction time with two saturating counters:

- The **True** counter counts up on a 1 and down on a 0, and stays within
  `0..pull_cnt`.
- The **False** counter counts the other way, and stays within `0..drop_cnt`.
- The output becomes 1 when the True counter reaches `pull_cnt`, and 0 when the
  False counter reaches `drop_cnt`.

From a steady state, the relay therefore picks up after exactly `pull_cnt`
consecutive "free" decisions and drops after exactly `drop_cnt` consecutive
"occupied" ones. Short dropouts do not reach the output. Times are counted in
sample periods: 195 µs each at 5120 samples/s. After reset, everything is 0,
which means occupied.

## Two channels and the comparison

`psr_top` holds two `psr_channel` instances. Each has its own converter ports,
and they share the clock, reset and settings. Once per cycle, `channel_comp`
compares each channel's `chan_result_t`.

- These must be equal in every cycle:
  - the threshold decision
  - the delayed output
  - the True and False pull/drop counters
  - the sequencer state
  - the result strobes
- Compared when both channels deliver a result, within programmable tolerances:
  - both amplitudes (`tol_amp`)
  - both phases, modulo one turn (`tol_phase`)
  - the torque (`tol_torque`)

  The tolerances exist because two channels with separate converters never see
  bit-identical samples. Set them to zero for an exact comparison.

`mismatch` flags the current cycle. `fault` is sticky until reset.
`track_free = relay_out_a & relay_out_b & ~fault`, so any disagreement gives
the safe indication.

## Timing

| item | clocks (defaults) |
|---|---|
| master clock | 20.48 MHz |
| sample period | 4000 (5120 samples/s) |
| serial clock | clk/8 = 2.56 MHz (`SCLK_DIV = 4`) |
| acquisition, `scs` low to samples ready | about 170 |
| computation: write, 2 DFTs, 3 CORDIC passes, torque, decision | 2115 |

`psr_channel` checks at elaboration that the computation fits in one sample
period. A sample that arrives while a computation is still running sets
`overrun`. An immediate assertion also reports this in simulation.

### Converter interface

`adc_control` uses the following protocol, which suits common 16-bit serial
SAR converters:

1. `scs` falls; the converters sample their inputs.
2. The controller waits `CONV_TICKS` bit ticks for the conversion.
3. It sends 16 `sclk` pulses (idle low), and the data come MSB first. A
   converter changes its bit after a falling edge, and the controller takes the
   bit when it raises `sclk`.
4. `scs` rises.

`sad1`/`sad2` pass through a two-flop synchroniser, because in the original
set-up they arrive through optocouplers. For that reason `SCLK_DIV` must be at
least 3. Samples are two's complement.

## What follows the original design and what is chosen here

The following come from the original design:

- the block structure (clock generator, ADC control, RAM1/RAM2, cos/sin ROM,
  one-point DFT, fixed-point CORDIC, state machines, torque computation, delayed
  pull/drop output, channel comparison)
- 16-bit serial SAR converters
- 75/275 Hz operation and the 5 Hz bin spacing
- the Kaiser window with beta = 2
- CORDIC vectoring for amplitude and phase, and rotation from x = 1, y = 0 for
  sin
- two multiplications for the torque
- two thresholds forming a hysteresis
- the True/False counter scheme
- two identical channels whose amplitudes, phases, torque, outputs and states
  are compared

These are this implementation's own choices:

- N = 1024 and 5120 samples/s. Only the 5 Hz spacing is given. These values also
  match a processing load of about 21 million multiply-accumulates per second.
- the 20.48 MHz clock
- all word widths and the scaling between stages
- binary angles, quadrant pre-rotation and z guard bits
- the serial protocol details
- computing the result once per sample, and the time base of the pull/drop
  counters
- 1 meaning "free"
- the comparison tolerances and the sticky fault, and the rule for
  `track_free`
- the overrun flag

The board's user interface on the comparison block (DIP switches, push buttons,
7-segment display, LEDs) and the link between two separate channel boards have
no described function, so they are not built. Thresholds, pull/drop counts and
tolerances are plain input ports instead. The analogue front end (protection,
input amplifiers, voltage reference, optocouplers) and the converters
themselves are outside the RTL. `tb/adc_model.sv` is a behavioural stand-in for
a converter.

A reference build of the original occupied about 2000 LUTs, 600 flip-flops and
6 kB of memory. This RTL uses 4 kB of sample RAM and 4 kB of coefficient ROM
per channel with 16-bit coefficients. 8-bit coefficients would halve the ROM.

## Simulating

Every testbench in `tb/` is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/psr_pkg.sv tb/tb_psr_top.sv --top-module tb_psr_top -o sim
./obj_dir/sim
```

| testbench | what it shows |
|---|---|
| `tb_clock_gen`, `tb_adc_control`, `tb_sample_ram`, `tb_coef_rom`, `tb_dft1`, `tb_cordic`, `tb_torque_comp`, `tb_threshold_hyst`, `tb_delayed_output`, `tb_psr_sequencer`, `tb_channel_comp` | each block against values computed independently in the testbench (exact sums, real-valued trigonometry and Bessel function, reference models), including latencies |
| `tb_psr_channel` | one channel (N = 64) through free, shunted, free, weak (inside the hysteresis band) and reversed-phase track; checks amplitudes, phase difference, torque and decisions; checks that the pull and drop delays are exact; checks constant computation time; includes a 275 Hz run (N = 256, bin 55) |
| `tb_psr_top` | both channels end to end (N = 64): all the situations above, then a 10 % gain error in channel B's rail converter, which the comparison must catch; checks that every mechanism occurred (buffer fill, pull, drop, hysteresis hold, both pre-rotations, mismatch) |
| `tb_psr_top_full` | `psr_top` at its default parameters (N = 1024, 20.48 MHz): fill, pick up on a free track, drop when shunted; about 2100 samples, a few seconds in Verilator |

`tb/psr_stimulus.sv` generates the sampled track signals and drives two
converter models. `tb/psr_tb_pkg.sv` holds the expected-value formulas.

## Changing it

- **Track frequency:** set `SIGNAL_HZ` (75 or 275). The bin must be an integer
  below N/2.
- **Buffer length or sample rate:** set `N` (a power of two) and `FS_HZ`.
  `CLK_HZ/FS_HZ` must exceed about `2N + 70`.
- **Precision:** the widths are in `psr_pkg`. If you change `CORDIC_W`, `AMP_W`
  or `SIN_W`, revisit the bit selections in `psr_channel`.
- **Thresholds:** they are in torque units (see the scaling table). Rescale
  them whenever N, the widths or the converter front end change.
