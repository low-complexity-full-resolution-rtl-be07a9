# Mirror-switching digital predistortion for polar power amplifiers

A highly efficient power amplifier (PA) driven in polar form (an amplitude
and a phase signal) is nonlinear in two ways. Its output amplitude is a
curved function of its drive amplitude (AM-AM distortion), and its output
phase shifts with the drive amplitude (AM-PM distortion). A predistorter
sits in front of the PA and bends the drive the opposite way, so that PA and
predistorter together are linear.

This design rests on one observation. The AM-AM predistortion curve we need
is the PA's own AM-AM curve mirrored about the line y = x, which is its
inverse function. No inverse has to be computed. The PA curve is stored in a
1D table with the address and data roles swapped: the address is the measured
PA output amplitude and the data is the drive amplitude that produced it. Read
normally, that table returns the drive needed for a wanted output. The AM-PM
curve needs no inversion. It is stored as a phase offset per drive amplitude
and subtracted from the signal phase.

The hardware is one CORDIC (Cartesian-to-polar converter), two 4096-entry
tables and a small training sequencer. Training runs once from a ramp and
takes about 82 µs at 100 MHz. After that, each sample costs one CORDIC
conversion and two table reads. Nothing is interpolated or iterated while
the signal is running.

## Data flow

```
 operation:  tx I/Q ──► CORDIC ──► M ──► AM-AM[M] = x ──► AM-PM[x] = dφ ──► PA drive (x, Φ - dφ)
                          └──────────── Φ ───────────────────────────────┘
 training:   ramp (x_k, φ0) ───────────────────────────────────────────────► PA drive
             rx I/Q ──► CORDIC ──► gain_align ──► time_align ──► (x_k, y_k, φ_k)
                                                     AM-AM[y_k] <= x_k          (mirror)
                                                     AM-PM[x_k] <= φ_k - φ0
             then lut_interp fills the AM-AM addresses that no y_k hit
```

The CORDIC and both tables serve both phases. `train_ctrl` sets the
position of the "mirror switch" (`mirror_switch`), which routes the table
address and data ports to the training writer, the interpolator or the
operation path.

## The mirror in detail

During training, ramp sample k drives the PA with amplitude `x_k`. Its echo
comes back through the receiver with amplitude `y_k`, scaled by the gain
alignment so that full drive lands near address 4095. The AM-AM table is
written as `AM[y_k] = x_k`. In operation the wanted output amplitude `M`
(the input magnitude) addresses the table, and `x = AM[M]` is the drive that
makes the PA produce `M`. So the combined gain is the gain-alignment
reference, and PA output × gain ≈ M.

Two effects of the PA's shape matter here:

* **Steep region** (PA gain above 1 code per code, typically at low drive):
  consecutive ramp samples land on addresses more than one apart. The
  skipped addresses are the "missing points" that the interpolator fills.
* **Flat region** (compression): several ramp samples land on the same
  address. The ramp descends, so the last write wins and the entry keeps the
  smallest drive that reaches that output.

The AM-PM table is written at the drive amplitude, `PM[x_k] = φ_k - φ0`. In
operation it is read at the predistorted drive `x`, which is the amplitude
the PA actually sees. So the two tables are read one after the other. With a
4096-sample ramp every PM address is written exactly once, so the PM table
needs no interpolation. The stored offset also contains any constant phase
rotation of the loop-back path, and that rotation is pre-compensated as well.

## Training sequence and timing

`train_ctrl` steps through IDLE → CLEAR → WRITE → INTERP → DONE (or FAIL).

1. **CLEAR** (1 clock): clears the AM-AM "written" flags and starts
   `ramp_gen` and `time_align`.
2. **WRITE**: the ramp runs from amplitude 4095 down to 0, one code per
   clock, 4096 clocks in all, at phase `ramp_phase`. The CORDIC converts the
   looped-back `rx_i/rx_q`. `time_align` counts clocks until the first
   received amplitude at or above `det_thr`. The ramp starts with a jump from
   idle (0) to full scale, so this edge is the echo of ramp sample 0, and the
   count is the loop delay D: external loop, CORDIC (20 clocks) and gain
   alignment (1 clock). From that sample on, a counter rebuilds the ramp
   amplitude for each echo, so no delay line is needed. Each pair is written
   through the mirror switch. With no edge within `MAX_DELAY` (255) clocks,
   training goes to FAIL and the ramp stops.
3. **INTERP**: `lut_interp` makes one pass over the AM-AM table (see below).
   It reports FAIL if nothing was written.
4. **DONE**: `trained` is set. If `dpd_en` is high, the operation path uses
   the tables.

Training time is D + 4096 (write) + 4096 + 3 (interpolation) + about 6
clocks of sequencing. In the end-to-end test D = 28 and training takes 8229
clocks, which is 82.3 µs at 100 MHz. `train_cycles` reports this count.

## Interpolation without slowing the pass

Linear interpolation of a gap needs both endpoints, but a forward scan finds
the right endpoint only at the end of the gap. `lut_interp` therefore splits
the work in two:

* The **scanner** reads one entry per clock through the table's read port.
  When a written entry (a1, v1) follows the previous written entry (a0, v0)
  with a gap, it computes `q, r = |v1 - v0| divmod (a1 - a0)`. This is the
  design's only divider, used once per gap. It then queues a gap descriptor
  in an 8-deep FIFO.
* The **filler** takes descriptors and writes the gap addresses one per
  clock through the write port:
  `AM[a0+k] = v0 ± floor((k·|v1-v0| + floor((a1-a0)/2)) / (a1-a0))`,
  the nearest-integer point on the line. A Bresenham accumulator produces
  these values from q and r with additions only.

The filler only writes addresses the scanner has already passed, so the two
never collide. The pass takes DEPTH + 3 clocks as long as the filler keeps
up: one clock per descriptor plus one per missing entry, which holds while
about one entry in two or fewer is missing. If the FIFO fills up, the scanner
waits. The result stays exact, only slower. Addresses below the first
written entry copy its value, and addresses above the last written entry
copy the last value.

## CORDIC

`cordic_vec` is a vectoring CORDIC with 18 pipelined micro-rotation stages.
The I/Q inputs (13-bit signed) get 6 tail-zero bits appended, so the 18
iterations are not limited by the input word length. Around the stages:

* a 180° pre-rotation for inputs with I < 0;
* 2 guard bits;
* an 18-bit multiplication by 1/K (K ≈ 1.64676, the CORDIC gain);
* rounding.

Magnitude comes out as 12 bits, saturating at 4095. Phase comes out as 12
bits, 4096 codes per turn. Latency is 20 clocks
(`dpd_pkg::cordic_latency`), at one sample per clock. Tested accuracy is
±1 code in magnitude and in phase.

## Using the top level (`mirror_dpd_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; asynchronous active-low reset |
| `train_start` | in | pulse: start a training (accepted in IDLE, DONE, FAIL) |
| `dpd_en` | in | 1: use the tables once trained; 0: bypass |
| `gain[15:0]` | in | loop-back gain, unsigned Q2.14: received amplitude × gain → table address |
| `det_thr[11:0]` | in | amplitude threshold for the ramp's leading edge (e.g. 2048) |
| `ramp_phase[11:0]` | in | phase of the training ramp |
| `tx_valid`, `tx_i`, `tx_q` | in | transmit baseband, 13-bit signed, \|tx\| ≤ 4095 |
| `rx_valid`, `rx_i`, `rx_q` | in | receiver loop-back samples during training |
| `pa_valid`, `pa_amp[11:0]`, `pa_phase[11:0]` | out | polar PA drive |
| `train_state`, `trained`, `train_failed` | out | sequencer state (`dpd_pkg::train_state_e`) |
| `delay_locked`, `loop_delay[7:0]` | out | measured loop delay in clocks |
| `train_cycles[15:0]`, `interp_gaps`, `interp_fills` | out | training statistics |

Operation latency from `tx_*` to `pa_*` is 23 clocks (CORDIC 20 + table
path 3), at one sample per clock. Rules for the user:

* Set `gain` so that the PA output at full drive, after the receiver, maps
  to just below 4095. A higher gain clips the top of the table. A lower gain
  leaves the top addresses to be filled with the last value.
* `det_thr` must be above anything the loop returns at idle and below the
  echo of the full-scale ramp start.
* Keep the PA loop idle for at least one loop delay before `train_start`.
  An echo of an earlier ramp still in flight would be taken as the edge.
* Only the AM-AM curve is assumed monotonic. The interpolation handles
  falling segments, but a folded curve has no unique inverse.

Parameters (defaults): `N_ENTRIES` 4096 (sets the amplitude width to
log2 N_ENTRIES = 12), `PH_W` 12, `IQ_W` 13, `CORDIC_STAGES` 18, `CORDIC_EXT`
6, `MAX_DELAY` 255. The shared constants and types are in `rtl/dpd_pkg.sv`.

## Files

`rtl/`: `dpd_pkg` (types, constants), `cordic_vec`, `dpd_lut` (table, with
optional written flags), `ramp_gen`, `gain_align`, `time_align`,
`lut_interp`, `train_ctrl`, `mirror_switch`, `mirror_dpd_top`.

`tb/`: one self-checking testbench per module, named `tb_<module>`, plus a
behavioural PA with receiver loop (`pa_loop_model`, `pa_model_pkg`). The PA
model has a Rapp AM-AM curve, with small-signal gain 1.6 and saturation
3600, and a quadratic AM-PM curve up to 0.35 rad.

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.
`tb_mirror_dpd_top` runs the whole design at its default sizes. It checks
four things:

* training with the loop open must fail by timeout;
* a real training must give the expected loop delay, a training time of
  D + 8192 (+ ≤ 12) clocks and interpolated gaps;
* in operation, 3000 random samples must be linear after the PA model
  (measured: amplitude error ≤ 2.6 codes, phase error ≤ 0.0025 rad) with
  the 23-clock latency;
* in bypass, the PA distortion must be visible (about 1200 codes).

`tb_ofdm_workload` sends a 20 MHz 64-QAM OFDM signal through the trained
design at 100 MS/s. The signal has 52 subcarriers at 312.5 kHz spacing, 320
samples per symbol and 12 symbols, and the loop-back path rotates the phase
by 0.7 rad. The testbench computes EVM and ACLR from a DFT of the PA output.
With the model PA:

| | EVM | ACLR |
|---|---|---|
| without predistortion | 7.4 % | 30.7 dB |
| with predistortion | 0.04 % | 67.3 dB |

The checks require EVM below 2 %, ACLR above 40 dB, and improvements of at
least 5x in EVM and 10 dB in ACLR. The residual is set by the 12-bit
amplitude and phase words. A real PA with memory effects or noise would
leave more.

To simulate, for example the top:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_mirror_dpd_top \
  -y rtl -y tb -Irtl rtl/dpd_pkg.sv tb/pa_model_pkg.sv tb/tb_mirror_dpd_top.sv
./obj_dir/Vtb_mirror_dpd_top
```

Each testbench finishes in a few seconds; the OFDM test spends most of its time in the real-number DFTs.

## What is given and what is chosen

These points come from the published scheme:

* the mirror principle and the swapped address and data terminals of the
  AM-AM table;
* the AM-PM subtraction;
* one CORDIC shared by training and operation;
* two 1D tables of 4096 entries;
* the 18-stage pipelined CORDIC with tail-zero extension;
* training from a polar ramp, with digital time and gain alignment;
* training in two steps, table write and then a one-off linear
  interpolation, in loop delay + twice the ramp length.

The following are this design's choices, because the scheme leaves them
open:

* all word widths except the 12-bit amplitude;
* the number of tail-zero bits;
* the descending ramp and the edge-threshold time alignment;
* gain alignment as a programmable multiplier;
* the written flags that mark missing points;
* the scanner/filler interpolator;
* reading the AM-PM table at the predistorted amplitude, in series after
  the AM-AM table;
* the bypass mode, the timeout and the reset behaviour.

Not covered:

* The PA and the receiver are analogue parts. They exist only as the
  testbench model.
* Power figures (about 5.2 mW in 65 nm) and FPGA timing at 100 MHz are not
  reproduced.
* The published EVM and ACLR figures (104.8 % to 2 %, 21.4 dB to 49.3 dB)
  were obtained with a much more nonlinear PA model whose curves are not
  reproduced here. The OFDM test above uses the milder model PA, so its
  numbers are not comparable one to one.
