# Three-channel artificial TMAP generator with one-bit sigma-delta outputs

Testing a multi-electrode nerve cuff and the tripole amplifier behind it
normally means recording from a live nerve. This generator replaces the nerve.
It produces three copies of a transmembrane action potential (TMAP). Each copy
is shifted in time against the previous one, as if the spike were travelling
past three electrodes at a chosen conduction velocity. Each copy also gets its
own, uncorrelated white noise at an adjustable level.

The design's central idea is that no multi-bit DAC is needed. Every analog
output is a single FPGA pin carrying a one-bit sigma-delta stream, followed by
an op-amp RC low-pass filter. Two small digital additions improve what comes
out of that filter:

- a **scrambler** re-orders the bits so that pulses are short and spread out,
  which makes the ripple smaller and higher in frequency;
- a **linearizer** ramps the modulator input from one sample to the next, so
  the filtered output moves in straight lines instead of RC charging steps.

The synthesizable part (`tmap_generator_top`) runs from one 100 MHz clock. It
has a plain register bus, the place where the USB link to the PC connects on
the prototype board. `tmap_system` adds behavioural models of the analog
output stages, so the whole chain, from register writes to electrode
voltages, can be simulated.

## Signal path

```
 PC link ──► pc_interface ──settings──────────────────────────────┐
                  │ table writes                                  │
                  ▼                                               ▼
 sample_counter ─► tmap_table ─cur,nxt─► linearizer ─► amp_scale ─► sd_modulator
 (99.0 kHz,        (64 x 12 bit)          (ramp k→k+1)  (x·(amp+1)/256) (1st order, 13-bit Σ)
  6-bit address)                                                       │
                                                                       ▼
                                                                   scrambler (1024-bit frames)
                                                                       │
                       ┌───────────────┬───────────────┐               │
                       ▼               ▼               ▼               │
      delay_line ──► delay_line ──► delay_line  ◄──────────────────────┘
      (delay1)        (delay2)        (delay3)
         │               │               │
      tmap_out[0]     tmap_out[1]     tmap_out[2]   ──► pin ─► active LPF ─┐
                                                                           (+) ─► v_chN
 noise_gen x3 (LFSR 23/18, 25/22, 31/28) ─► noise_out[2:0] ─► ±3.3 V ─► LPF ┘
```

A single modulator feeds the three delay stages, which are chained. Channel
*k* is the output of stage *k*. Channel 2 therefore lags channel 1 by
`delay2 + 1` clocks, and channel 3 lags channel 2 by `delay3 + 1` clocks.

## Template and sample clock

The spike shape is the TMAP model

    Vm(t) = A · t^n · e^(−B·t)   for t ≥ 0,   0 otherwise

with the typical values A = 40.8 V/s, B = 1.5·10⁴ 1/s and n = 1. The peak is
1 mV at t = n/B ≈ 67 µs, and the spike has died out after about 0.6 ms.

`tmap_table` holds 64 samples taken 10 µs apart (t = k·10 µs, so sample 0 is
zero). Each sample is normalised so that the peak is 4095. The amplitude A
therefore drops out: the absolute level is set by the analog gain and by the
amplitude register. The power-up contents are computed during elaboration
from the formula (`tmap_pkg::tmap_sample`), so no data file is needed. The
parameters `TMAP_B`, `TMAP_N` and `TS` select other shapes. At run time the PC
can overwrite any entry through register addresses 0x40–0x7F, for example
with the formula at other A, B and n.

`sample_counter` divides the 100 MHz clock by `SAMPLE_DIV` = 1010, which gives
a 99.0 kHz sample rate. It steps the 6-bit address through the table and
wraps, so the spike repeats every 646.4 µs.

## One bit from twelve: the sigma-delta modulator

`sd_modulator` is a first-order error-feedback loop. A 13-bit register Σ
accumulates the 12-bit input plus its own value, minus a one-bit DAC term of
0 or Max = 4096. The output bit is 1 whenever Σ ≥ 4096. Over any stretch of
clocks, the number of ones equals Σx/4096 to within one or two, so the
low-pass-filtered pin voltage is 3.3 V · x/4096.

The modulator runs at the full 100 MHz, so each sample period spans 1010
output bits. The same module, with N = 8, sets the noise amplitude in
`noise_gen`.

## Scrambling: bit-reversed frames

The bitstream is cut into frames of 2¹⁰ = 1024 clocks, a length that matches
the design's 10-bit resolution. `scrambler` has two frame buffers:

- while one buffer is written in arrival order, the other is read out;
- the read order is bit-reversed: output slot *i* carries stored bit
  `bitrev(i)`.

A three-bit example shows the effect. Slots 0…7 read stored bits
0, 4, 2, 6, 1, 5, 3, 7. A frame that arrives as `11111000` (one long pulse,
duty 5/8) therefore leaves as `11101010`. The ones count is the same, but the
energy moves to higher frequencies, where the RC filter removes it.

Each frame keeps its ones count exactly, so filtered levels are unchanged. The
price is up to two frames of latency (at most 20.5 µs). The output is held at 0
until the first frame has been stored.

## Linearization: ramps instead of steps

If the modulator input is held at each sample for a full period, the filter
output charges towards each new level along an exponential, and the spike
shows a scalloped outline. `linearizer` removes that. It latches two values
at every sample tick:

- sample k;
- the slope `(sample k+1 − sample k) · floor(2²⁰ / 1010)`.

It then adds the slope on every clock. The modulator input ramps from sample k
almost to sample k+1 within the period, and the voltage across the filter's
input resistor changes at a constant rate. The result is straight segments
between the sample points. Rounding the reciprocal down means the ramp never
overshoots; it stops short of the next sample by about 0.1 % of the step.

`CTRL[0]` switches the linearizer off, which gives the stepped reference for
comparison. The switch, like new table contents, takes effect at the next
sample tick.

## Channel delays and conduction velocity

`delay_line` is a 2¹⁶-bit circular buffer. A running write pointer stores the
incoming bit, and the output reads the bit stored `delay` clocks earlier. The
output is registered, so `dout(t) = din(t − 1 − delay)`. Until `delay` bits
have been written after reset, a fill counter keeps the output at 0.

Delays are whole 10 ns clocks. They are not tied to the 10.1 µs sample period,
so closely spaced velocities can be told apart. The range per stage is
0–655 µs.

Converting a conduction velocity into a delay needs the electrode pitch:
`delay = pitch / v / 10 ns − 1`. The PC does this conversion. At a 5 mm pitch
(an example, not a fixed property of the design), 100 m/s needs 4999 and
120 m/s needs 4166. The slowest velocity one stage can reach is
pitch / 655 µs, which is 7.6 m/s at 5 mm. Lower velocities would need a larger
`DELAY_AW`.

The reset delays are 0, 5000 and 5000 clocks: channels 2 and 3 follow 50.01 µs
apart.

## Noise channels

Each `noise_gen` is a Fibonacci LFSR with one XOR gate, so it has two taps.
The three channels use different maximal-length trinomials, which keeps them
uncorrelated:

| channel | taps  |
|---------|-------|
| 1       | 23/18 |
| 2       | 25/22 |
| 3       | 31/28 |

The LFSR shifts once every `NOISE_DIV + 1` clocks. The reset value, 99, gives
1 MHz. Its bit selects `128 + level/2` or `128 − level/2`, and the 8-bit
sigma-delta turns that into the output stream. Off chip, a level shifter maps
1 to +3.3 V and 0 to −3.3 V, so:

- `level` = 0 is a 50 % stream, i.e. 0 V after filtering;
- `level` = 255 is nearly the raw LFSR bit;
- the noise amplitude scales linearly in between.

## Register map

The bus carries 16-bit data at 7-bit addresses. Writes take effect on the
clock edge. Reads are combinational.

| addr      | name        | bits | reset | meaning                                   |
|-----------|-------------|------|-------|-------------------------------------------|
| 0x00      | CTRL        | 0    | 1     | linearization enable                      |
| 0x01      | AMP         | 7:0  | 255   | amplitude, gain (AMP+1)/256               |
| 0x02      | NOISE_LEVEL | 7:0  | 0     | noise amplitude                           |
| 0x03      | NOISE_DIV   | 7:0  | 99    | LFSR shifts every NOISE_DIV+1 clocks      |
| 0x04–0x06 | DELAY1..3   | 15:0 | 0, 5000, 5000 | stage delays in clocks            |
| 0x40–0x7F | TABLE[k]    | 11:0 | Eq. above | waveform table entry k (write only; reads 0) |

## Analog output stage (behavioural models)

`active_lpf` models the inverting op-amp filter: 100 kΩ input, 10 kΩ feedback
and 47 nF across it. That gives a gain of −0.1 and a −3 dB point at 338 Hz
(τ = 470 µs). `level_shifter` maps a bit to a voltage:

- 0 / 3.3 V for a TMAP pin;
- ±3.3 V for a noise output.

`tmap_system` gives every stream its own shifter and filter, then adds the
TMAP and noise voltages of each channel into `v_ch1..3`. This models an ideal
summing node, which is an assumption. The filter inverts, so a spike is a
negative excursion. With the reset settings the mean level is −93 mV, and each
spike is a roughly 28 mV swing on top of it; the filter is slow compared with
the spike.

These models use `real` and delays. They are for simulation only.

## Latency from table to pin

For channel 1, measured in clocks:

| stage           | clocks     |
|-----------------|------------|
| linearizer      | 1          |
| amp_scale       | 1          |
| modulator       | 1          |
| scrambler       | 2–2048, 1025 on average |
| delay stage 1   | 1 + delay1 |

Every 1024-clock output frame of channel 1 holds exactly the ones of one
modulator frame.

## Departures and own choices

The following are this design's own decisions where the published description
gave no detail:

- the bus and register map;
- every width not stated there (amplitude 8 bit, delay 16 bit, divider 8 bit);
- the reset values;
- the 1010 divider: 99.0 kHz rather than an exact 100 kS/s;
- the ramp arithmetic of the linearizer;
- the way the noise level acts;
- the LFSR lengths, taps and seeds;
- the ideal summing of TMAP and noise.

Further differences:

- The comparator threshold of the modulator is taken as Max − 1, which gives
  a standard first-order modulator.
- The scrambler works on frames of the modulator output. Its bit-reversed
  order is taken from the reference timing diagram.
- The waveform memory is described as a ROM. Here it is a RAM with ROM
  contents at power-up, so new patterns can be loaded over the PC link.
- The delays are built as circular bit buffers. Their depth, 64 Kbit per
  stage, is a choice: the electrode pitch, and with it the delay that 1 m/s
  would need, is not known. The published FPGA used far fewer flip-flops and
  no block RAM; this RTL makes no attempt to match that resource count.
- The description gives the filter's −3 dB point both as 338 Hz and as about
  100 kHz (with a 15 kΩ output impedance). The component values give 338 Hz,
  and that is what is modelled.

The following are not included:

- the USB link: the register bus is brought out instead;
- the cuff and the tripole amplifier with its variable-gain stages: these are
  the equipment under test;
- the conventional, unscrambled modulator used in comparisons.

## Simulating

All sources are SystemVerilog-2017. Each module is in its own file in
`rtl/`, and the shared package is `rtl/tmap_pkg.sv`. The analog models and the
testbenches use `timeunit`, so give verilator a default timescale for the
other files. For example, the end-to-end system test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl +libext+.sv \
  --top-module tb_tmap_system rtl/tmap_pkg.sv tb/tb_tmap_system.sv -o sim
./obj_dir/sim
```

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself,
guarded by a watchdog. The end-to-end and workload tests run at the default parameters
and take well under a second.

| testbench               | what it establishes |
|-------------------------|---------------------|
| `tb_tmap_system`        | Filtered channel voltages are exact delayed copies of each other. Mean output equals −0.1·3.3 V times the template's mean duty (within 2 %; measured −93.12 mV against −93.17 mV). The spike is visible. Noise rms is below 2 mV at level 0 and rises at level 255. |
| `tb_tmap_generator_top` | Four phases: reset settings; linearizer off; half amplitude with new delays and full noise; a triangle loaded over the bus. Every scrambler frame's ones count matches the ideal reference within 4. Channels are bit-exact delayed copies. Noise channels are balanced and uncorrelated. |
| `tb_workloads`          | A 64-sample sine loaded into the table, with and without linearization: every frame matches the ideal within 4. A sweep over 10, 20, 50, 100 and 120 m/s at a 5 mm example pitch: channel lags are exactly pitch / v. |
| `tb_sd_modulator`       | Running ones count stays within 2 of the ideal for constant levels. |
| `tb_scrambler`          | `11111000 → 11101010` for 3-bit frames; bit-reversed order for 10-bit frames. |
| `tb_linearizer`         | Ramp within 2 LSB of the ideal line, monotonic; hold when disabled. |
| `tb_delay_line`         | Exact delay for 0, 1, 5000, random and 65535 clocks, changed on the fly. |
| `tb_noise_gen`          | LFSR against a model, period 127 for a 7-bit instance, divider rate, and level-controlled ones count. |
| `tb_tmap_table`, `tb_sample_counter`, `tb_amp_scale`, `tb_pc_interface`, `tb_active_lpf` | Contents, timing, scaling, register map and filter step response. |

To change the design:

- sample rate: `SAMPLE_DIV` (the linearizer derives its reciprocal from it);
- resolution: `N` (table width) and `FRAME_BITS` (scrambler frame);
- delay range: `DELAY_AW`;
- spike shape: `TMAP_B`, `TMAP_N` and `TS` on `tmap_table`, or write the table
  at run time.
