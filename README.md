# Digital receiver for antiproton beam intensity and momentum spread

This is the digital part of a beam-current measuring system for a decelerating antiproton
ring. A wide-band beam transformer picks up the beam current. The signal is amplified,
filtered and digitised by a 12-bit ADC, and a digital receiver board turns the sample
stream into beam parameters. Which parameters depends on the state of the beam:

* **Debunched (coasting) beam, "LD" processing.** The beam current shows only Schottky
  noise bands around each harmonic n·f_REV of the revolution frequency.
  * A down converter zooms onto one band.
  * Many FFTs of the zoomed signal are averaged into a power spectral density (PSD).
  * The area under the band is proportional to the particle number N.
  * The width of the band at the 2-sigma level gives the momentum spread Δp/p.
* **Bunched beam, "LB" processing.** The ADC clock is locked to a multiple Ki of f_REV,
  so the RF harmonics sit at fixed positions.
  * Two down converters measure the amplitudes J1 and J2 at f_RF and 2·f_RF.
  * A two-point fit of a parabolic bunch shape gives the intensity I0·h and the bunch
    length τ.

The RTL in `rtl/` holds the following:
* the receiver board: four digitiser inputs, eight down converters with FIFOs, and a measurement
  controller;
* the FFT, PSD, peak-analysis and bunched-fit datapaths;
* a dual-port global memory through which a host computer controls the board;
* a calculator for the ADC clock harmonic and the converter tuning words;
* a behavioural model of the analogue ×4 clock-multiplier PLL that makes the ADC clock.

## Signal path

```
adc_data[0..3] ─► {adc,4'b0} ─┬► sel ► ddc 0 ─► sample_fifo 0 ─┐
 (4 × 12 bits)                 ├► sel ► ddc 1 ─► sample_fifo 1 ─┤
                               │   ...                          ├─► llc_controller ─┬► fft_engine ─► psd_accumulator ─► psd_peak_analyzer
                               └► sel ► ddc 7 ─► sample_fifo 7 ─┘        │          └► bunched_amplitude
                                                                        ▼
                              host_* ◄──────────────────────────► global_memory
drx_param_calc (f_REV → Ki, K factors), side by side on its own pc_* ports
```

Everything runs on the ADC sample clock (`clk`, up to 40 MHz), one ADC word per clock.
`rst` is synchronous and active high.

The board has four digitiser inputs (`adc_data[0..3]`, parameter `NUM_INPUTS`). Each
ADC word drives the 12 most significant bits of a 16-bit receiver input, and the four
LSBs are zero. Every converter picks its input with bits 25:24 of its set-up word. An
out-of-range choice selects input 0. A single input is enough for the normal case,
where both pick-ups are summed into one signal.

### Down converter (`ddc`, `cordic_rotator`)

* **Tuning.** The tuning word is the "K factor" K = f_LO/f_S, stored as a 32-bit
  fraction of a turn: `phase_inc = round(f_LO/f_S · 2^32)`.
* **Mixing.** A 32-bit phase accumulator drives a 16-stage pipelined CORDIC. The CORDIC
  rotates each real sample by −phase, which moves f_LO to DC.
* **Gain.** The CORDIC gain of about 1.647 is left in the data. Internal width is 20 bits.
* **Decimation.** An integrate-and-dump filter sums `decim` products, shifts the sum
  right by `shift` bits and saturates it to 16-bit I and Q (`iq_t`).
* **Run control.** `run = 0` holds the channel in reset. The controller uses this to
  "release" a converter and to stop it.

The boxcar filter is the simplest decimator that does the job. A production design
would use a CIC + FIR chain with a flatter passband.

### FIFOs (`sample_fifo`)

* Each FIFO holds 512 complex words.
* `half_full` (count ≥ 256) is the request to the controller.
* The controller answers by moving one burst of half the FIFO to its local memory.
* A push into a full FIFO is dropped and sets a sticky `overflow` flag. The flag is
  reported in the status word and on the `fifo_overflow` port.

## Debunched processing: sliding FFT, PSD and peak analysis

### Chunking

The controller keeps a local ring memory of 2·512 samples for the converter being
processed.
* Which converters are processed is set by the converter mask (word 26). A zero mask
  means converter `DDC_A` alone.
* Converters in the mask are processed one after another, lowest first. Each one repeats
  steps 2–7 below and publishes its own results and PSD.
* Chunk k starts at sample k·(N − OVERLAP). This is a sliding FFT whose overlap window
  is a host parameter.
* A chunk goes to the FFT as soon as all its samples are in the ring.
* NAVG chunks are processed in all.
* The converter is stopped as soon as the last sample it must deliver has left its FIFO.

### FFT (`fft_engine`)

* **Length.** N = 2^log2n for any log2n from 2 to 9, chosen per measurement. The
  default maximum is 512 points, and 256 is the other common size.
* **Structure.** In-place radix-2 decimation-in-time with one butterfly per clock.
  * Input is written in bit-reversed order.
  * Output leaves in natural order.
  * Every butterfly halves its results, so the output is exactly DFT/N. The dynamic
    range cost is accepted in exchange for never overflowing.
* **Twiddles.** Q15 twiddles come from an integer CORDIC at elaboration time, so no
  table file is needed.
* **Timing.** A chunk takes N (load) + (N/2)·log2n (compute) + N (unload) clocks. For
  N = 256 that is 1536 clocks.

### PSD (`psd_accumulator`)

* **Accumulation.** |X[k]|² = I² + Q² is added into a 40-bit accumulator per bin.
* **Bin order.** Bins are stored in centred order (`index XOR N/2`). The local-oscillator
  frequency therefore sits at bin N/2, and frequency increases with the index.
* **Read value.** A read returns `sum − NOISE · fft_count`, floored at 0. NOISE is the
  host's noise power per bin per FFT.
* **Scale.** The result is the averaged PSD times the number of averages. Dividing by
  NAVG and calibrating are left to the host.

### Peak analysis (`psd_peak_analyzer`)

The analyser makes two passes over the region of interest [ROI_LO, ROI_HI], given in
centred bins.

| Output | Definition |
|---|---|
| area | Σ PSD[k], 64 bits. Proportional to N·f_REV² |
| peak_bin, peak_val | Position and value of the highest bin |
| width | Number of bins from the first to the last bin whose value reaches exp(−2)·peak (≈ peak·277/2048) |
| centroid | 256·Σk·PSD[k]/Σ PSD[k], in 1/256 bin, using a 72-clock divider |

The centroid is the measured position of the band. The host turns it into the measured
revolution frequency with f_REV = (f_LO + (centroid/256 − N/2)·f_S/(decim·N)) / n.

The width threshold is read from "width at 2-sigma height": a Gaussian falls to exp(−2)
of its peak at ±2σ. Converting bins to hertz takes f_S/(decim·N), which the host knows.
A run over R bins takes about 2R + 80 clocks.

## Bunched processing: two-harmonic fit (`bunched_amplitude`)

With f_S = Ki·f_REV, the converter tuned to f_RF = h·f_REV has K = h/Ki. The wanted
harmonic is then at DC of that channel, and the same holds for 2·f_RF.

1. The block sums NSAMP complex samples of each channel (coherent average).
2. J1 and J2 are the magnitudes of the two sums, found with an integer square root.
3. The bunch model is J_k = I0·h·(2 − Δ·k²), a parabolic line density truncated after
   the k² term. It is solved exactly through k = 1 and 2:

```
I0·h     = (4·J1 − J2) / 6
Δ        = 2·(J1 − J2) / (4·J1 − J2)        Q16, 0 if J2 ≥ J1
τ·f_RF   = sqrt(5·Δ / (4π))                 Q16, computed as isqrt(Δ_Q16 · 26076)
```

The host turns I0·h into a particle number with N = h·I0/(e·f_REV) and its calibration.
It gets τ by dividing by f_RF. The arithmetic takes about 260 clocks once both channels
are complete.

## Set-up calculator (`drx_param_calc`) and clock PLL (`adc_clock_pll`)

**Bunched beam.**
* Ki = floor(40 MHz / f_REV), the largest multiple of f_REV not above 40 MHz.
* f_S = Ki·f_REV.
* K_A = frac(h/Ki)·2^32 and K_B = frac(2h/Ki)·2^32.

K stays constant as long as Ki does, so the converters track f_REV through the clock
without being retuned.

**Debunched beam.**
* f_S is fixed at 40 MHz and Ki is reported as 0.
* K_A = K_B = frac(n·f_REV/40 MHz)·2^32, which puts the window on harmonic n.

The calculator uses one to three 64-clock divisions. It is a separate port group
(`pc_*`) on the top. The host writes its results into the set-up words and into the
clock synthesiser.

`adc_clock_pll` is a behavioural, non-synthesizable model of the analogue PLL:
* it multiplies a reference of up to 10 MHz by 4;
* its output range is 20–40 MHz;
* it locks about 100 µs after the reference becomes stable.

It is not instantiated in the top, because the board receives its clock from it.

## Controller and host interface (`llc_controller`, `global_memory`)

### States and commands

The host writes a command to word 0 and pulses `host_irq`.

| Command | Code | Allowed in | Effect |
|---|---|---|---|
| INIT | 1 | IDLE, READY | IDLE/READY → INITIALISING (stop converters, clear PSD) → READY |
| MEASURE | 2 | READY | READY → PROCESSING → READY, one measurement |
| PING | 3 | any state | version 0x00010002 written to word 2 |

Other commands, and commands in the wrong state, increment an error count.

### Steps of a measurement

1. Copy the control parameters and the set-up words of the used converters into
   registers.
2. Load `phase_inc`, `decim` and `shift` into those converters and release them.
3. Move half-FIFO bursts to the local ring memory. The last burst holds just the
   remainder still needed.
4. Hold each converter in reset, and flush its FIFO, once it has delivered enough
   samples.
5. Per chunk: LD sends it to the FFT and PSD, and LB sends the samples to the averager.
6. Final processing: peak analysis (LD) or the fit (LB).
7. Write the results to the common result block (64–74) and to the converter's own block
   (128 + 16·c). For LD, also write the N-bin PSD to the converter's PSD region. For LD
   with a converter mask, go back to step 2 for the next converter.
8. Update the status word with the done bit and the measurement count, then pulse
   `meas_done`.

Bursts are served in fixed channel order. In the main sequence, the controller owns the
memory port; a command that arrives meanwhile is handled between memory accesses.

### Global memory map (32-bit words, 8192 deep; defined in `drx_pkg`)

| Address | Content |
|---|---|
| 0 | command code |
| 1 | status: `{count[31:16], errors[15:8], 0000, overflow[3], done[2], state[1:0]}` |
| 2 | version (ping reply) |
| 16 | processing type: 1 = LD, 2 = LB |
| 17 | NAVG, number of FFTs averaged |
| 18 | log2 N |
| 19 | overlap, in samples |
| 20, 21 | ROI low and high, centred bins |
| 22 | noise power per bin per FFT |
| 23, 24 | converter A (LD, or LB f_RF) and converter B (LB 2·f_RF) |
| 25 | LB samples per channel |
| 26 | LD converter mask, bit c = converter c; 0 = `DDC_A` only |
| 32 + 2c | converter c: phase increment (K factor) |
| 33 + 2c | converter c: `{input[25:24], shift[20:16], decim[15:0]}` |
| 64, 65 | area, low and high words |
| 66 | width, in bins |
| 67 | centroid, in 1/256 bin |
| 68 | peak bin |
| 69 | peak value, bits 39:8 |
| 70 | J1 |
| 71 | J2 |
| 72 | I0·h |
| 73 | Δ, Q16 |
| 74 | τ·f_RF, Q16 |
| 128 + 16·c + i | converter c's copy of result word 64 + i |
| 512 + 512·c + k | PSD of converter c, bin k, value ≫ 8 (stride 2^MAX_LOG2N) |

The host port reads with one clock of latency. If host and controller write the same
word in the same clock, the host write wins.

## Throughput at the default sizes

* **LD.** One FFT of 256 points needs 1536 clocks. Acquiring a new chunk at decimation R
  takes (N − overlap)·R clocks. The FFT therefore keeps pace for R ≥ 6 without overlap
  and R ≥ 8 with 64 samples of overlap.
  * 60 averages of N = 256 at R = 64 take about 25 ms of acquisition, well within a
    1.4 s measurement cycle.
  * With a converter mask the time multiplies by the number of converters. All eight
    take about 0.2 s at those settings.
* **LB.** A measurement of 1000 samples per channel at R = 16 takes about 0.4 ms, well
  inside a 20 ms control tick.
* **Set-up calculation.** About 5 µs.

## Where this design departs from the system it is modelled on

* **Dedicated logic instead of vendor parts and software.** In the original system a
  commercial receiver board does this work, with down-converter chips and a signal
  processor whose program is interrupt-driven. Here the same functions are dedicated
  logic:
  * the converter filters are replaced by a CORDIC mixer and a boxcar decimator;
  * the interrupt service routines are replaced by one sequencer that polls the FIFO
    flags.
* **Set-up calculation in hardware.** In the original system the host computes Ki and
  the K factors in software. Here they are offered as a hardware block on separate
  ports. The choice of decimation rate and observation harmonic comes from host look-up
  tables and is not built.
* **Choices made here.** The following were not specified and are choices of this
  design:
  * FIFO depth (512);
  * global memory size (8192 words) and layout, command codes and status word;
  * the FFT architecture and its per-stage scaling, with no window;
  * the noise-correction form (one constant per bin);
  * the coherent-sum estimator for J_k.
* **Width and centre.** The width is reported as a bin count at the exp(−2) level. The
  band centre, from which the host derives the measured f_REV, is a power-weighted
  centroid, because the original way of measuring it is not described.
* **Converters one after another.** In the original system several converters run
  together under interrupt control. Here an LD measurement over several converters
  processes them one at a time, so it takes that many times longer. An LB measurement
  uses one pair of converters.
* **Left to host software.** Results are kept as sums, not means. Calibration, the
  particle-number formulas, Δp/p from the width, and the history buffering are host
  software.
* **Analogue and bought-in parts.** None of these is part of the RTL:
  * pick-ups, summing unit, amplifier and filters;
  * the ADC board, the DDS and the atomic clock;
  * timing and I/O modules;
  * the host computers.

  The ADC data, the host bus and the interrupt lines are the top-level ports where they
  connect.

## Verification

Each block has a self-checking testbench in `tb/`. Each one:
* compares against values computed independently in the testbench, for example a
  floating-point DFT, a reference FIFO model, or direct evaluation of the formulas;
* ends with a `TB_RESULT checks=… failures=…` line;
* has a watchdog.

| Testbench | What it covers |
|---|---|
| `tb_ddc` | a tone on the local oscillator and a tone in a filter null against a floating-point mixer model, output rate, phase restart on release |
| `tb_sample_fifo` | random push/pop against a queue model, half-full, overflow and flush |
| `tb_fft_engine` | random and single-tone chunks of 16, 256 and 512 points against a floating-point DFT/N (error ≤ 6 LSB); latency (N/2)·log2N + 1 clocks and N-clock unload checked |
| `tb_psd_accumulator` | centring, accumulation and noise correction |
| `tb_psd_peak_analyzer` | synthetic Gaussian peaks: area, width, peak and centroid |
| `tb_bunched_amplitude` | synthetic parabolic-bunch harmonics: J1, J2, I0·h, Δ and τ·f_RF |
| `tb_drx_param_calc` | Ki and K factors over a sweep of f_REV, calculation time |
| `tb_global_memory` | both ports and the collision rule |
| `tb_adc_clock_pll` | 10 MHz → 40 MHz after about 100 µs, relock at 6 MHz → 24 MHz, no lock for a 4 MHz reference (16 MHz is out of range) |
| `tb_llc_controller` | the controller with the real datapath blocks at reduced sizes: state sequence, ping, errors, sliding-FFT chunk contents, bursts, results and PSD in memory, LB fit, a two-converter mask measurement |

`tb_drx_board` runs the top at its default parameters (8 converters, 4 inputs, 512-deep
FIFOs, 512-point maximum FFT, 8192-word global memory). It drives the digitiser inputs
with a synthetic Schottky band plus noise
and then with a bunched-beam signal, and covers:
* ping;
* a rejected command;
* INIT;
* an LD measurement of 60 averaged 256-point FFTs with 64 samples of overlap and noise
  correction;
* an LB measurement;
* the switch between the two.

A last LD measurement uses the largest spectrum: 8 FFTs of 512 points of a single line.
It runs on converters 6 and 7 in one measurement through the converter mask. Both
converters' result blocks and PSD regions are checked against the boxcar response.

For the LB measurement, the bunched signal arrives on input 2 and input 0 carries only
noise, so the fit is correct only if the converters select their input properly.

It counts how often each of the following happened and fails if any never did: FIFO
bursts, converter stops, overlap, noise subtraction, mode switch, input selection, the
512-point spectrum, several converters per measurement and the others.
The testbench takes about 15 s on a desktop.

## Simulating

All files are SystemVerilog 2017. `rtl/drx_pkg.sv` must come first, and `-y rtl` lets
verilator find the modules by file name. For example, for the
full board:

```
verilator --binary --timing -Wno-fatal -y rtl --top-module tb_drx_board \
    rtl/drx_pkg.sv tb/tb_drx_board.sv
./obj_dir/Vtb_drx_board
```

Use the same command with another testbench name for the block tests. A passing run
prints `TB_RESULT checks=N failures=0`.

The sizes are parameters of `drx_board` and its submodules: `NUM_DDC`, `NUM_INPUTS`
(1 to 4), `FIFO_DEPTH`, `MAX_LOG2N` and `GM_DEPTH`. `FIFO_DEPTH` must be a power of two.
`GM_DEPTH` must keep room for the PSD regions, 512 + NUM_DDC·2^MAX_LOG2N words; an
elaboration-time assertion checks this.
