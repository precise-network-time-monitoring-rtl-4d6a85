# PNTM: picosecond packet timestamping on a free-running receive clock

A 1 Gb/s Ethernet receiver runs on the clock it recovers from the line
(clk_B). The timestamping logic runs on a local reference (clk_A, 62.5 MHz,
16 ns) that is kept on time by a synchronization core. The two clocks have
the same nominal frequency, but they are not locked to each other: clk_B
drifts by a few ppm against clk_A. Counting clk_A cycles at the start of a
frame gives a 16 ns grain. This design gives a timestamp with a grain of
about 1 ps and measured errors below 0.5 ps in simulation.

The method is a Digital Dual Mixer Time Difference (DDMTD) phase detector
used *without* syntonization:

- A helper clock clk_PLL runs at N/(N+1) of the nominal frequency
  (N = 16384). It samples clk_A and clk_B as data.
- Each sampled stream is a slow square wave, the beat between the sampled
  clock and clk_PLL.
- The period of each slow wave, counted in clk_PLL cycles (N_A, N_B), tells
  how far each clock's period is from clk_PLL's period.
- Suppose a frame starts k clk_PLL cycles before the next slow edge of a
  channel. Across those k cycles the clock has slid k·(T_PLL − T_X) against
  clk_PLL. That amount is the phase of the clock at the frame instant,
  measured from its phase at the slow edge. At the slow edge itself, the
  sampled clock and clk_PLL are aligned.
- Doing this for both channels gives the clk_A to clk_B phase at the frame
  instant, with the drift of each clock interpolated linearly.
- Adding that phase to the clk_A cycle count gives the fine timestamp.

The classic syntonized DDMTD phase (the number of clk_PLL cycles between the
clk_A and clk_B slow edges, times T_A/(N+1)) is also produced. It is exact
only when clk_B is syntonized with clk_A.

## Clocks and data flow

```
 clk_b domain          clk_pll domain                        clk_a domain
 ------------          --------------                        ------------
 rx stream ->          ddmtd: sample clk_a, clk_b            time_counter
 sof_detector --sof--> deglitch -> tag counters -> averager  (sec, cycles)
       |               drift_rate_calc (d_a, d_b)                 |
       |               tag_capture: freeze counters at SoF,       |
       |               wait for next slow edges, k_a, k_b   ----> timestamp_calc
       +-----------------------------------sof (toggle sync) -->  freeze sec/cycles
                                                                  pair by seq, compute ts
```

| Module | Domain | Job |
|---|---|---|
| `sof_detector` | clk_b | Finds the /S/ code-group (K27.7) in the decoded 16-bit stream and reports its byte lane. |
| `ddmtd_deglitcher` | clk_pll | Sampling flop, 2-flop synchronizer, and edge confirmation after THRESH samples. Emits one pulse per slow rising edge. |
| `ddmtd_tag_counter` | clk_pll | Counts clk_PLL cycles since the last slow edge. Gives the period (tag), a valid strobe and an epoch (edges mod 4). |
| `ddmtd_averager` | clk_pll | Sums AVG_M = 100 periods (mean mode) or passes single periods. |
| `ddmtd` | clk_pll | Two channels of the above, plus the syntonized phase (`n_cycles`, `phase_fs`). |
| `drift_rate_calc` | clk_pll | Turns the period sums into d_A = T_PLL − T_A and d_B = T_PLL − T_B, in fs with 24 fraction bits. Uses one shared sequential divider. |
| `tag_capture` | clk_pll | Queues the counters at every start of frame. Resolves k_A and k_B once both slow edges after the frame have passed. |
| `time_counter` | clk_a | Seconds and clk_A cycles, loadable, with a pulse per second. |
| `timestamp_calc` | clk_a | Freezes sec/cycles at the frame. Pairs each capture with its DDMTD result by sequence number. Computes the timestamp in a 3-stage pipeline. |
| `pntm_top` | all | Wires the above. Adds reset synchronizers, toggle synchronizers (`event_sync`) and a Gray-code FIFO (`async_fifo`). |

The helper PLL, the transceiver and the synchronization core are outside
the design:

- clk_pll is a top-level input.
- The recovered clock, the decoded stream and the bitslide value are
  top-level inputs.
- `time_set`, `time_set_sec` and `time_set_cycles` load the time counters.

## Drift rates from the slow-clock periods

With clk_PLL = N/(N+1)·f_A, the clk_A beat has a period of N_A = N clk_PLL
cycles. The clk_B beat has N_B = T_B/(T_PLL − T_B) cycles. The RTL uses the
*measured* N_A, not the constant N, so any error in the helper PLL cancels:

```
d_A = T_PLL − T_A = T_A / N_A
d_B = T_PLL − T_B = T_PLL / (N_B + 1) = T_A·(N_A+1) / (N_A·(N_B+1))
```

T_A is taken as the nominal 16 ns. In mean mode, N_A and N_B are
sum/count over 100 periods. The sum and the count are carried separately,
so the mean is never rounded. The divider is a 96/64-bit restoring divider
that runs once per sum. `d_valid` rises after the first pair of results and
stays high.

After a change of the clk_B frequency, a mean window that straddles the
change gives a mixed rate. Clean rates need two full windows, which is
about 52 ms at N = 16384.

## Timestamp formula

For a frame with capture tags Tag_SoF (counter value at the frame) and Tag
(period value at the next slow edge), the RTL computes:

```
k_X      = Tag_X − Tag_X,SoF − TAG_LAT                   (clk_PLL cycles from frame to alignment)
delta    = (k_A·d_A − k_B·d_B) mod T_A                   (0 ≤ delta < 16 ns)
ts       = sec + (cycles − COARSE_LAT)·T_A + lane·8 ns − delta − D_RX
D_RX     = bitslide·800 ps + fixed_delay_fs
```

**What delta means.** delta is the time from the clk_B edge that sampled
/S/ to the next clk_A edge.

**COARSE_LAT.** This constant (3) is the number of clk_A cycles between
that clk_A edge and the clk_A edge that froze the counters. It covers the
two-flop synchronizer and one register.

**TAG_LAT.** TAG_LAT = THRESH + 3 is the deglitcher's fixed delay from the
real slow edge to its pulse. It is removed so that k counts to the true
alignment point.

**The sign of the phase term.** The usual way of writing this method adds
the clk_A phase term and subtracts the clk_B one, then subtracts D_RX.
Taken literally, that adds the sub-cycle phase to the cycle count. Here the
reduced phase is *subtracted* from the time of the next clk_A edge. Only
this sign reproduces the clk_B edge time against generated clocks in
simulation. The other sign gives errors of up to 16 ns.

**Whole-cycle drifts.** These drop out through the modulo.

**The lane term.** The /S/ code-group can sit in the second byte of a
16-bit word. That byte arrived 8 ns after the first, so 8 ns is added.

**D_RX.** The receive delay has two parts. The transceiver's bitslide
count is a semi-static value in 800 ps steps (one bit time). The fixed
SFP and PCB delay is a calibrated constant given in femtoseconds. A
drift-dependent part of the delay is not modelled.

The result is `ts_sec` plus `ts_fs` (femtoseconds, normalised to
[0, 1 s)), with `ts_seq` (frame number) and `ts_delta_fs` (the sub-cycle
phase).

## Pairing the two halves of a measurement

A frame is captured twice, in two domains:

- In clk_a: the coarse time.
- In clk_pll: the DDMTD counters.

The clk_pll half is complete only after up to one slow period, which is
262 µs at N = 16384. Meanwhile hundreds of frames can arrive.

**Sequence numbers.** Both sides number frames with 12-bit sequence
numbers in the same order. A DDMTD result crosses to clk_a through a
16-entry Gray-code FIFO. `timestamp_calc` joins the heads of its coarse
FIFO and the result FIFO when their numbers match. Before calibration, a
frame is not measured: `drops` counts it in clk_pll. Its coarse entry is
then discarded when a newer result arrives, and `unmatched` counts it.

**Epoch history.** `tag_capture` keeps the last four period values of
each channel, indexed by epoch. The head of the queue is resolved when the
epoch written last differs from the epoch at the frame. Several frames
between the same pair of slow edges share those edges. A frame that lands
in the same clk_PLL cycle as a slow edge uses the next edge.

**Queue depth.** Both queues are 512 deep (DEPTH). A minimum-size
1 Gb/s frame slot is 672 ns, so at most about 390 frames start within one
slow period.

## Timing

| Path | Latency |
|---|---|
| Slow edge to deglitcher pulse | THRESH + 3 clk_PLL cycles (2003) |
| Frame to timestamp | until both slow edges after the frame have passed and been confirmed (≤ N + THRESH + a few clk_PLL cycles), then FIFO crossing (~4 clk_a cycles) and 3 pipeline cycles |
| Throughput | one timestamp per clk_a cycle once paired |

## Limits and departures

- **clk_B must be faster than clk_PLL.** At N = 16384, clk_PLL is 61 ppm
  below nominal, so clk_B may be at most about 60 ppm slow. A ±100 ppm
  link cannot be measured on its slow side. Raising the helper clock
  offset (smaller N) widens the range and coarsens the step.
- **Near-edge slip.** When the clk_B edge that sampled /S/ lies within
  about one DDMTD step (≈1 ps) of a clk_A edge, the coarse capture and
  delta can disagree by one whole 16 ns cycle. The testbenches accept this
  only at such edges.
- **bitslide is static.** It is applied when a timestamp is computed, not
  when the frame arrives. Change it only while no frames are pending.
- **Mean windows after a frequency step.** The first mean window that
  spans the step is wrong, so wait two windows (see above). Single-period
  mode (`use_mean = 0`) reacts within one slow period, but it is noisier
  on real clocks.
- **Epoch history has four entries.** A frame must be resolved within
  three slow periods, which is always true while the queue does not
  overflow.
- **Queue overflow.** A frame that finds the clk_pll queue full is not
  measured, and `drops` counts it. It still takes a sequence number, so
  its coarse entry is discarded on the clk_a side. A frame that finds the
  coarse queue full loses its coarse entry, and its result is discarded.
  `unmatched` counts both cases.
- **Reset needs edges.** `rst_n` is asserted asynchronously and released
  synchronously in each domain, so every clock must run during reset.
- **Deglitcher.** The glitch filter is this design's own. It accepts a
  level change once the input still differs THRESH (2000) samples later.
  This suits the bursts of metastable samples around a beat-note edge.
  THRESH must stay below half the shortest slow period.
- **Widths.** Widths are chosen for a 1 s range in femtoseconds
  (`FS_W = 52`), 20-bit periods and 48-bit drift rates with 24 fraction
  bits. They are collected in `rtl/pntm_pkg.sv`.

## Simulating

Every testbench is self-checking and prints
`TB_RESULT checks=<n> failures=<n>`. With Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl \
    rtl/pntm_pkg.sv tb/tb_pntm_top.sv --top-module tb_pntm_top
./obj_dir/Vtb_pntm_top
```

The other modules are found in `rtl/` by name.

| Testbench | What it checks | Checks |
|---|---|---|
| `tb_ddmtd_deglitcher` | edge latency, glitch rejection, no pulse before first falling edge | 79 |
| `tb_ddmtd_tag_counter` | periods, tag validity, epochs | 359 |
| `tb_ddmtd_averager` | 100-period sums, single mode, mode switch | 317 |
| `tb_ddmtd` | N_A, N_B and syntonized phase against generated clocks (N = 64) | 92 |
| `tb_drift_rate_calc` | d_A, d_B against a reference computation | 16 |
| `tb_sof_detector` | /S/ in either lane, /T/ then /S/ in one word, link loss | 44 |
| `tb_time_counter` | rollover, load, pps | 312 |
| `tb_tag_capture` | k_A, k_B for random frames, shared edges, drops | 301 |
| `tb_timestamp_calc` | formula, pairing, normalisation, unmatched | 186 |
| `tb_pntm_top` | end to end at N = 256: both lanes, both modes, drops before calibration, second rollover, frames sharing an edge, phase wrap; each mechanism counted | 411 |
| `tb_pntm_full` | end to end at the default sizes (N = 16384, 100-period mean); clk_B at +509, +34 and −415 Hz from 125 MHz (within ±4.1 ppm); bitslide 12 and 10 | 248 |
| `tb_pntm_determinism` | default sizes; eight link reconnections with transceiver delays of 10000, 9600, 8000 and 800 ps (reset, new recovered-clock phase, bitslide from the delay), clk_B syntonized with ±2 ps edge jitter, mean and single-period modes | 417 |
| `tb_pntm_multibox` | default sizes; two synchronized timestampers (170 ps apart) with different reception delays stamp the same frames from a sender offset by +509, +190, −120 and −415 Hz at 125 MHz; relative comparison T_B − T_A | 325 |

The end-to-end benches generate clk_a, clk_b and clk_pll on a femtosecond
grid. They compute the true time of the clk_B edge at which each /S/ was
sampled, and compare it with the timestamp.

- `tb_pntm_top`: largest error 35 to 58 ps. This follows from the coarse
  step T_A/(N+1) at N = 256.
- `tb_pntm_full`: largest error 0.42 ps. It runs in about 20 s.
- `tb_pntm_determinism`: after removing the bitslide, the latency from the
  line to the timestamp matches the transceiver delay within 1.6 ps in
  every reconnection. A delay that is not a whole 800 ps step leaves its
  remainder as a constant offset. The per-run spread is 0.5 to 1 ps in
  both modes. With white edge jitter, the slow-edge position disturbs k
  as much as it disturbs the period, so averaging gains little here. Its
  benefit shows against slower phase noise on the clocks. The bench runs
  in about 35 s.
- `tb_pntm_multibox`: T_B − T_A stays within 1.1 ps of the −170 ps
  synchronization offset at every frequency offset. The reception delays
  of the two paths and the drift of the sender leave no trace. A longer
  sweep over +509, +348, +190, +34, −120, −273 and −415 Hz gave the same
  result, with all values within 1.1 ps of −170 ps. The bench runs in
  about 2 minutes.
