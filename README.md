# P/D-band composite radar signal processor

A radar that must measure both the range and the speed of very fast targets
faces a trade-off. A low-frequency pulsed waveform can have a slow-time sampling
rate high enough to measure even several km/s without folding, but it measures
speed coarsely. A high-frequency FMCW waveform measures speed finely, but its
Doppler folds many times over at those speeds. This processor runs both at once:

* **P band**: a pulsed BPSK waveform phase-coded with an M-sequence. It gives
  unambiguous but coarse velocity.
* **D band**: a linear FM continuous wave (LFMCW). It gives fine range and fine,
  but ambiguous, velocity.

Every coherent processing interval (CPI) each band produces its own list of
detected targets. A fusion stage pairs the two lists by range. It then uses each
P-band velocity to work out how many times the matching D-band velocity has
folded, and unfolds it. What comes out is the D band's precision without its
ambiguity.

This SystemVerilog builds the whole digital chain, from the converters' digital
down-converter (DDC) output to the fused target list:

* waveform timing
* the converter interface
* both echo processors (pulse compression or range FFT, then moving target
  detection (MTD) and CFAR, i.e. constant false alarm rate detection)
* result framing with interrupts to a host processor
* target agglomeration
* P/D fusion

In the original system, agglomeration and fusion run as software on a DSP next
to the FPGA. Here they are logic, so one simulation covers the whole chain.

```
             +---------+ cpi/pri/chips/sweeps (to the LO frequency source)
   enable -->| wavegen |--------------------------------------------------->
             +---------+         |                        |
 ADC A (250 MSPS)  +--------------+  symbols  +------------------------+  dets  +----------+ GPIO8
 ---------------->| ad_interface |----------->| bpsk_proc             |------->| frame_tx |------> frame RAM
 ADC B (200 MSPS)  |   (4:1 I&D)  |  beat     | pulse_compress-mtd-cfar|        +----------+
 ---------------->|              |---+        +------------------------+            |
                   +--------------+   |        +------------------------+  dets  +----------+ GPIO9
                                      +------->| lfmcw_proc             |------->| frame_tx |------> frame RAM
                                               | fft(range)-mtd-cfar    |        +----------+
                                               +------------------------+
               P dets -> target_condense -> det_to_tgt --+
                                                          +--> pd_fusion --> fused {range, velocity}
               D dets -> target_condense -> det_to_tgt --+
```

Everything runs on one clock, the 250 MHz converter clock. The top module is
`radar_sp_top`.

## Timing: one CPI, two waveforms (`wavegen`)

Both bands are transmitted and received simultaneously within one CPI. With the
defaults:

| quantity | value | origin |
|---|---|---|
| clock | 250 MHz | equals the P-band converter rate |
| P-band chip rate | 62.5 MHz (4 clocks per chip) | from the original design |
| code | 31-chip M-sequence, x^5 + x^3 + 1 | code family from the original design; length chosen here |
| PRI | 3840 clocks = 15.36 us | chosen here |
| pulses per CPI | 64 | chosen here |
| sweep | 960 clocks = 3.84 us | chosen here |
| sweeps per CPI | 256 | from the original design |
| CPI | 245,760 clocks = 983 us | follows from the above |

An assertion requires the P-band and D-band CPIs to have equal length.

`wavegen` outputs the following, all registered:

* `pri_start`.
* `tx_gate`: high for the 124-clock coded pulse at the start of each PRI. It also
  serves as the transmit/receive switch control.
* The current chip `sym` with its strobe `sym_stb`.
* `sweep_start`.
* `cpi_start`.
* `cpi_ref`: high during the first PRI of a CPI. It is the CPI reference brought
  to a test point.
* Pulse and sweep indices.
* The running PRI and CPI counters that are written into the result frames.

The M-sequence is computed by a constant function at elaboration (`radar_pkg`).
So are the FFT twiddles. No coefficient files are needed.

## Converter interface (`ad_interface`)

Each converter delivers complex DDC samples, 16-bit I and Q.

* **Channel A** (P-band, 250 MSPS) is reduced to the 62.5 MHz chip rate by
  integrate-and-dump: the average of 4 samples. The dump phase is realigned on
  every `pri_start`, so the four samples of chip 0 are exactly the first four of
  the PRI.
* **Channel B** (D-band beat signal, 200 MSPS) is registered and passed on with
  its valid strobe. At the 250 MHz clock it is valid on 4 of every 5 clocks.

The serial converter link (JESD204B lanes and their alignment) is not part of
this RTL. The block starts at the parallel sample streams that link would deliver.

## P-band path (`bpsk_proc`)

**Pulse compression (`pulse_compress`).** After each PRI start, chip-rate samples
run through a 31-deep delay line. Once it is full, each new sample gives the
correlation of the window with the code: a ±1 adder tree with no multipliers.
Output *g* is range gate *g*, one gate per chip period:

    ΔR = c / (2 · 62.5 MHz) = 2.4 m

There are 128 gates, covering 307 m. The sum is shifted right by 5 to stay at
16 bits.

Gates are counted from the start of the transmitted pulse (`SKIP = 0`). This is
so that targets closer than the pulse length (31 chips = 74 m) can also be
compressed, as they are in the echo-simulator tests this processor is meant for.
Their correlation is then aperiodic and has visible sidelobes. A real deployment
that listens only after the pulse would set `SKIP = 31`.

**MTD (`mtd`).** A ping-pong corner-turn memory holds 2 × 64 pulses × 128 gates.
When the last gate of the last pulse is written, the banks swap. The finished
bank is then read column by column, one range gate at a time, into a 64-point
FFT. The spectrum of each gate leaves as Doppler bins 0..63. If a CPI closes
while the previous map is still being read, that CPI is skipped and `overrun`
pulses.

**CFAR (`cfar`).** See below.

**Velocity scale.** The P-band Doppler axis is taken to span 8000 m/s, i.e.
±4000 m/s. That gives 125 m/s per bin, coarse but unambiguous across the whole
target range. The span depends on the P-band carrier, which is not fixed by the
logic. It is a parameter of the top (`P_VSPAN_CMS`) and is used only when bins
are converted to m/s.

## D-band path (`lfmcw_proc`)

After each `sweep_start`, the first 128 valid beat samples go into a 128-point
FFT (`fft`). Its output, range bins 0..127, is written into an `mtd` with 256
sweeps. After 256 sweeps, each range bin gets a 256-point Doppler FFT, and the
range–Doppler map goes to a CFAR.

Per sweep, the range FFT takes 160 clocks to capture its input, 449 clocks to
compute and 128 clocks to output: 737 clocks in all, within the 960-clock sweep.
Reading out the Doppler map takes 128 × (256 + 1024 + 256 + 2) = 196,864 clocks,
within one CPI.

**Reading a D-band cell.** In an FMCW radar the beat frequency holds range plus
Doppler. A cell at range bin *k* and signed Doppler bin *s* (−128..127) is
therefore

    v_D = s · v_max / 256
    R_D = k · ΔR_D − (s / 256) · ΔR_D

with ΔR_D = 0.5 m and v_max = 956.95 m/s. Both constants are derived from the
original design's published fusion results: its D-band readings and fused
outputs differ by whole multiples of 956.9 m/s and of 0.5 m. The value 0.5 m
corresponds to a sweep bandwidth of about 300 MHz. With 128 bins, the D band
reaches 64 m.

## Shared engines

**`fft`.** An N-point (power of two) in-place radix-2 decimation-in-time FFT
that computes one butterfly per clock.

* Inputs are written to bit-reversed addresses. Outputs are read in natural order
  with their index.
* Each stage scales by 1/2 with saturation, so the output is the DFT divided by
  N. Twiddles are Q1.15.
* Latency from the last input to the first output is N/2 · log2 N + 1 clocks:
  449 for N = 128 and 1025 for N = 256.
* `in_ready` drops while a frame is computed and output.

**`cfar`.** Cell-averaging CFAR along the Doppler axis of each range gate.

* Each cell's |I|+|Q| is compared with the mean of 8 reference cells on each
  side, with 2 guard cells on each side skipped.
* The window wraps around the Doppler axis.
* A cell is detected if it exceeds 8 × that mean (`ALPHA_Q4 = 128`, in 1/16
  steps) and also exceeds an absolute floor (`MIN_MAG = 128`). The floor keeps
  weak leakage from becoming a detection.
* A line of L cells takes L + 18 clocks. The window sum is updated incrementally,
  two cells in and two out per clock.
* Each detection leaves as `det_t {gate, dop, mag}`. `map_done` marks the end of
  a CPI's list.

## Result frames and interrupts (`frame_tx`)

Each band has its own interface RAM. This is where the host processor reads the
detections, over Serial RapidIO in the original system and through
`rd_band`/`rd_addr`/`rd_data` here, with one clock of read latency.

| word | content |
|---|---|
| 0 | Frame_ID (`0x5A5A0008` P band, `0x5A5A0009` D band) |
| 1 | {PRI_CNT[31:16], CPI_CNT[15:0]} |
| 2 | Waveform_Type[6:0] (1 = BPSK, 2 = LFMCW) |
| 3 | T: number of detections in this CPI |
| 4 | L = 2T, the number of data words |
| 5 + 2t | {gate[31:16], Doppler bin[15:0]} of detection t |
| 6 + 2t | magnitude of detection t |
| 5 + L | check word: 32-bit sum of words 0 .. 4+L |

The detection count matters because a CPI can have fewer detections than the
previous one. Without it, the reader would take stale entries as new.

When a CPI's list is complete, the header and check word are latched and the done
flag (`bpsk_done`/`lfmcw_done`) goes high. Its rising edge sends a one-clock
interrupt: `gpio8` for the P band and `gpio9` for the D band. The flag clears on
the reader's `ack_p`/`ack_d`, or when the next CPI's first detection is written.
Detections beyond `MAX_TGT` (64) are counted in `p_frame_drop`/`d_frame_drop`.

## Agglomeration (`target_condense`)

A real target spreads over neighbouring range gates and Doppler bins, so CFAR
reports it several times. Agglomeration merges those reports into one point per
target:

* Each detection is compared in parallel with up to 64 open clusters, each kept
  as a bounding box.
* It joins the first cluster whose box, widened by one gate and one bin, contains
  it. Otherwise it opens a new cluster.
* A cluster's point is its strongest cell.
* At the end of the CPI, every cluster's point is emitted.

`det_to_tgt` then converts each point to centimetres and cm/s. It applies the
D-band range–Doppler correction above. The P band has no such coupling.

## P/D fusion (`pd_fusion`)

This is the step that gives the design its purpose.

Both condensed lists are loaded. The fusion starts once both bands' lists for a
CPI are in, and works through the D-band list, counting it down. For each D-band
target *d*, every P-band target *p* is tried in turn:

1. **Ambiguity number.** N_D = round((v_p − v_d) / v_max). The P-band velocity is
   coarse, but its error is far smaller than half of v_max (478 m/s), so the
   rounding picks the right fold.
2. **Unfold the velocity.** v = v_d + N_D · v_max.
3. **Correct the range.** Adding N_D folds of Doppler shifts the range derived
   from the beat frequency by N_D · ΔR_D, so R = R_d − N_D · 0.5 m.
4. **Pair.** *p* is a candidate if |R_p − R| < 2.4 m. The window equals one
   P-band range gate.

Of all candidates, the one with the largest P-band magnitude wins, the first on
a tie, and its {R, v} is emitted on `fused_valid`/`fused`. A D-band target with
no candidate produces nothing.

One P-band target is compared per clock, so a run takes about n_D · (n_P + 1)
clocks. `fusion_busy` is high while a run is in progress, as a processing-busy
indicator for the host. `n_fused` counts the pairs.

Two details differ from the plain description of the method, and both came out
of simulation:

* **Pairing on the corrected range.** The described rule pairs on the D-band
  range as measured. That range is off by N_D · 0.5 m, which is 1.5 m at
  3000 m/s. Add up to 1.2 m of P-band gate quantisation, and a true pair at 1 m,
  3000 m/s fell outside the 2.4 m window in some CPIs. Here each candidate is
  tested against R, the D-band range corrected with that candidate's own N_D.
  The parameter `PAIR_CORR = 0` restores the literal rule. Both give the same
  pairs on the worked example below.
* **Strongest candidate.** With the P-band receiver open during the pulse, the
  compressed pulse of one target has range sidelobes. A sidelobe can be detected
  and can land in another target's pairing window with the wrong velocity.
  Taking the strongest candidate, rather than the first, avoids this.

The published description states the ambiguity number as ceil(v_p / v_max).
Its own worked example does not fit that formula:

| target | P-band v_p | D-band v_d | needed N_D | ceil(v_p / v_max) |
|---|---|---|---|---|
| 1 | 489.28 m/s | 501.89 m/s | 0 | 1 |
| 2 | 1465.84 m/s | 543.02 m/s | 1 | 2 |
| 3 | 2442.5 m/s | 587.87 m/s | 2 | 3 |

This design therefore rounds the velocity difference. That reproduces the
example's fused results (30.07 m / 501.89 m/s, 39.6 m / 1500.0 m/s,
50.1 m / 2501.7 m/s) to within 0.1 m and 0.1 m/s. This is checked in
`tb_pd_fusion`.

## Top level (`radar_sp_top`)

Ports:

* **Converters.** `adc_a_*` and `adc_b_*`.
* **Timing.** The `wavegen` outputs.
* **Host side.** `gpio8`, `gpio9`, `bpsk_done`, `lfmcw_done`, `ack_p`, `ack_d`,
  and the frame RAM read port.
* **Fused targets.** `fused_valid`, `fused`, `fusion_done`, `fusion_busy`,
  `n_fused`.
* **Status.** Per-band detection counts, drop counters, list sizes loaded into
  fusion, and `err_flags`: sticky overruns of {D cfar, D mtd, D range FFT,
  P cfar, P mtd}.

Latency: CPI *k* is fused during CPI *k+1*. In the full-size simulation, fusion
finishes 196,961 clocks (788 µs) after its CPI ends. That is within one 983 µs
CPI, so the chain keeps up in real time.

At the defaults, the design holds about 2.6 Mbit of memory, almost all of it in
the two corner turns:

* D band: 2 × 256 × 128 × 32 bit
* P band: 2 × 64 × 128 × 32 bit

## How far it follows the original design

These parts follow the original design:

* The FPGA block structure: waveform control, AD interface, BPSK and LFMCW
  processors, data transmission.
* Correlation at 62.5 MHz from 250 MSPS.
* The 128-point range FFT and the 256-point Doppler FFT over 256 sweeps.
* CFAR after the MTD.
* The frame fields and check word, and the done flags with GPIO8/GPIO9 on their
  rising edge.
* Agglomeration over neighbouring gates and bins.
* The 2.4 m pairing rule.
* The fusion steps.

These are choices made here:

* The code length, PRI, pulse count, sweep length, P-band velocity span and gate
  count.
* The CFAR variant and its constants.
* The clustering rule.
* The frame ID values and the record layout.
* Rounding instead of a ceiling for N_D.
* Running agglomeration and fusion in logic instead of on a DSP.

Known limits:

* The D band reaches only 64 m (128 bins of 0.5 m). Targets at 75 m are found by
  the P band, but they have no D-band partner to fuse with.
* Incoherent accumulation of the direct (leakage) wave, which the original
  processor shows as a diagnostic next to its MTD output, is not built.
* The converter serial link, the RapidIO core, the DSP, the converters and all
  RF parts are outside this RTL.

## Simulating

Each block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. With Verilator 5:

    verilator --binary --timing -Wno-fatal -y rtl -y tb rtl/radar_pkg.sv tb/tb_radar_sp_top.sv --top tb_radar_sp_top
    obj_dir/Vtb_radar_sp_top

| testbench | what it checks |
|---|---|
| `tb_fft` | 64-point FFT against a direct DFT for tones and random data; the latency; back-to-back frames |
| `tb_wavegen` | PRI/sweep/CPI periods, chip timing, that the code is a maximal-length sequence, the counters |
| `tb_ad_interface` | integrate-and-dump sums against a model, realignment, channel B pass-through |
| `tb_pulse_compress` | correlator output against a software correlation of random echoes |
| `tb_mtd` | corner turn and Doppler FFT against a model (8 gates × 16 pulses); an overrun |
| `tb_cfar` | detection list compared exactly with a model of the threshold, including wrap-around cells; overrun |
| `tb_frame_tx` | frame layout, check word, done flag and interrupt, acknowledge, overflow |
| `tb_target_condense` | clusters of random extent merged to their peaks; the drop counter |
| `tb_pd_fusion` | the worked example above, plus 40 random pairs of lists against a model |
| `tb_bpsk_proc` | P-band chain: a coded echo found at the right gate and Doppler bin |
| `tb_lfmcw_proc` | D-band chain: a beat tone found at the right range and Doppler bin |
| `tb_radar_sp_top` | see below |
| `tb_table4_targets` | full-size accuracy test over a grid of single targets, described below |

`tb_radar_sp_top` runs the whole processor at its default size for three CPIs.
Two targets are used: 40 m at 1500 m/s, which folds in the D band, and 25 m at
150 m/s, which does not. The testbench:

* Synthesises both echoes with noise.
* Reads and checks every frame on each GPIO interrupt, then acknowledges it.
* Requires both targets to come out of fusion within 1 m and 5 m/s in every
  complete CPI. The results are 40.21 m / 1498.98 m/s and 24.93 m / 149.52 m/s.
* Counts interrupts, acknowledgements, ping-pong swaps, agglomeration merges, and
  ambiguous and unambiguous fusions. Each must occur at least once.
* Checks that fusion finishes within a CPI and that nothing overruns or is
  dropped.

It takes a few seconds.

`tb_table4_targets` resets and runs the full-size processor once per target,
at 1, 25 and 55 m and at 150 and 3000 m/s. Every complete CPI must fuse the
target to within 1 m and 3 m/s. At 3000 m/s the D-band Doppler folds three times.
A 75 m target is beyond the D band's 64 m reach, so it cannot be fused and is
not in the grid.
