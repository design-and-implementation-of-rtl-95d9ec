# Real-time spectral-subtraction noise canceller

This is a hardware noise canceller for a mono audio stream. It removes steady background noise
by spectral subtraction. The circuit learns the average noise magnitude in each frequency bin.
It then subtracts that average from the magnitude of every new frame, keeps the phase, and
rebuilds the time signal. Everything is fixed-function logic; there is no processor. The design
runs on two clocks:

* the codec clock (`clk_a`, 12 kHz), one 16-bit sample per edge;
* the processing clock (`clk`, 10 MHz), which handles one 64-point frame every 32 samples
  (a hop).

A frame takes 396 processing clocks. At 10 MHz that is under half of one codec sample period.

```
 codec ──► Buffer 32(2) ─► Buffer 32(1)            (half-overlapped 64-sample frames)
               │               │
               └──────┬────────┘
                      ▼
               Hanning window ─► FFT ─► Buffer 64 ─► CORDIC rect→polar ─► noise canceller
                                  ▲                     ▲                        │
                                  │   (same FFT core,   │ (same CORDIC core,     │
                                  │    inverse mode)    │  rotation mode)        │
                       IFFT ◄─────┴──── CORDIC polar→rect ◄───────────────────────┘
                        │
                        ▼
          Buffer 32(3) ─┐
          Buffer 32(4) ─► Buffer 32(5) ─► (+) ─► codec      (overlap-add)
```

The FFT core is used twice per frame: once forward and once as the IFFT. The CORDIC core is
also used twice: once for rectangular→polar and once for polar→rectangular. Each core passes
a tag down its pipeline along with the data: `inverse` for the FFT, `mode` for the CORDIC. The
multiplexers after each core steer results by that tag. The only central control is a small
sequencer. It starts the input read, and later starts the Buffer 64 read. After that the data
moves through on its own.

## The noise cancellation circuit (`noise_cancel`)

This block is the core of the design and the least obvious part. It works on one bin `k` at a
time. Its input is a magnitude |X| and a phase θ from the CORDIC.

**Two modes.**

* *Noise sampling* runs for the first M = 16 frames after reset, and again after a pulse on
  `learn`.
  * For every bin it accumulates the sum of |X| and keeps the largest |X|.
  * At the last sampling frame, the mean memory gets `sum >> 4`, the mean μ.
  * The output stays at zero during sampling.
* *Noise cancellation* is the normal mode.

**Three phases of 64 clocks per frame.** Together with the CORDIC passes, they follow the
system's frame schedule:

1. *Input (the 64 rect→polar clocks).* For each bin, `ss_filter` forms
   H = 1 − μ/|X| and the half-wave rectified gain H_R = (H + |H|)/2 (negative gains become 0).
   It then multiplies S = H_R·|X|. The tuple (|X|, S, θ) goes to the **next** memory.
2. *Process (64 clocks).* The **present** frame (the one input a frame earlier) is cleaned up
   against its neighbours:
   * if S_present ≥ max|N_R| = (noise max − noise mean), it is kept;
   * otherwise it is replaced by min(S_next, S_present, S_previous). Short noise peaks vary from
     frame to frame, so they are removed. Weak but steady speech stays.
   * The result goes to a temporary memory.
   * The history shifts: previous ← present, present ← next.
   * At the same time the block sums the per-bin ratio |S|/|X|, clipped to 1. The mean of that
     ratio over the 64 bins is T. A frame with 20·log10(T) < −12 dB is treated as non-speech,
     and all of its bins are set to zero.
3. *Output (the 64 polar→rect clocks).* The temporary memory is read out, or zeros for a
   non-speech frame.

Because step 2 looks at the *next* frame, the output is one frame late. At the end of step 2 the
block pulses `frame_done`, with `frame_speech` (T ≥ −12 dB) and `resid_bins` (how many bins
took the minimum).

The speech test averages the gain over *all* 64 bins. A very narrow-band input, such as one or
two pure tones, therefore counts as non-speech and is muted. Voice-like signals with many
harmonics pass. The end-to-end test uses a 12-harmonic signal for this reason.

## Frame schedule and the clock-domain hand-over

`nc_ctrl` runs one frame per hop. Times are processing clocks after `hop_start`:

| phase | clocks | what runs |
|---|---|---|
| input read | 64 | Buffer 1 (older half), then Buffer 2 (newest half) → window → FFT |
| FFT output | 64 | forward bins, bit-reversed, into Buffer 64 at their natural index |
| rect→polar | 64 | Buffer 64 → CORDIC → noise canceller phase 1 |
| process | 64 | noise canceller phase 2 |
| polar→rect + IFFT input | 64 | noise canceller phase 3 → CORDIC → FFT (inverse) |
| IFFT output | 64 | samples → overlap-add buffers |

Without pipeline registers this schedule is 6 × 64 = 384 clocks. The registers add 12: the
buffer reads, the window, the FFT output register, and 4 + 4 for the CORDIC. Measured, a frame
takes 396 clocks.

The two clock domains share the buffers without double buffering:

* Buffer 2 is written by the codec clock and read by the processing clock.
* Buffers 3 and 5 are written by the processing clock and read by the codec clock.

A toggle flag, synchronised with two flops, announces each new hop. The scheme is safe only if
a frame finishes before the next codec edge. `clk` must therefore be at least about 480 times
the sample rate: 396 clocks plus the synchroniser and margin. At 12 kHz that is 5.8 MHz. The
design meets this at 10 MHz (833 clocks per sample) and at 7 MHz (583). `overrun` flags a hop
that arrives while a frame is still busy; that hop is dropped.

End-to-end, `smp_out` lags `smp_in` by **97 samples**: three hops plus one sample. One hop
collects the frame, one comes from the one-frame look-ahead of the noise canceller, and one from
the overlap-add. The overlap-add uses a periodic Hann window, w[n] + w[n+32] = 1, so the two
halves add back to the input exactly. With zero learnt noise the whole chain is transparent to
within ±3 LSB.

## FFT/IFFT core (`fft64`, `fft_sdf_stage`, `twiddle_gen`)

The core is a radix-2, decimation-in-frequency, single-path delay-feedback pipeline. It takes
one sample per clock, in natural order. It has six butterfly stages with delay lines of 32, 16,
8, 4, 2 and 1 words.

* **Butterflies.** During the first half of each block, a stage pushes its input into the delay
  line and emits the differences of the previous block. During the second half it emits the
  sums, and pushes the differences back into the line.
* **Twiddles.** After each stage except the last, the differences are multiplied by
  W₆₄^(n·2^s), from one shared twiddle table (Q2.30).
* **Flush.** After the 64th input the core runs for 63 more clocks on zeros, to empty itself.
* **Output order.** Bin k of a frame leaves 64 + k clocks after the frame's first sample, in
  bit-reversed order. `out_idx` gives the natural bin number.
* **Inverse.** If `inverse` is set with the first sample of a frame, the twiddles are conjugated
  and the result is shifted right by 6 (divided by 64). This makes the same hardware an IFFT.
* **Arithmetic.** There is no scaling in the forward direction. A full-scale input grows to
  below 2^28, which fits the 32-bit words.

## CORDIC core (`cordic`)

The CORDIC has 29 shift-add iterations (shifts 0…28), unrolled. Four register banks cut them
into five stages of 6, 6, 6, 6 and 5 iterations. A result therefore leaves 4 clocks after its
operand, and a new operand can enter every clock.

| mode | start vector | outputs |
|---|---|---|
| `CORDIC_VEC` (rect→polar) | (x, y, 0) | output1 = 0.60725·x_final = magnitude; output2 = angle |
| `CORDIC_ROT` (polar→rect) | (0.60725, 0, phase) | cos and sin, each multiplied by the magnitude that travelled with the operand |

Angles are binary: 2^32 is one turn, so they wrap naturally. A quarter-turn pre-rotation lets
both modes cover all four quadrants. Internally the core has 2 integer guard bits and 6
fraction guard bits.

## Number formats

| quantity | format |
|---|---|
| codec samples | 16-bit signed integer |
| windowed samples, spectrum, magnitudes | 32-bit signed, 6 fraction bits relative to a sample |
| window coefficients | Q1.15 (17 bits) |
| twiddles, CORDIC gain | Q2.30 |
| phase | 32-bit binary angle |
| filter gain H_R, ratio \|S\|/\|X\| | Q1.16 |
| −12 dB threshold | 64 × 10^(−12/20) × 2^16 = 64 × 16462 |

## Top-level interface (`nc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | processing clock (10 MHz), asynchronous active-low reset |
| `clk_a`, `rst_a_n` | in | 1 | codec sample clock (12 kHz), its reset |
| `smp_in` | in | 16 | noisy sample, taken at each `clk_a` edge |
| `smp_out` | out | 16 | cleaned sample, 97 samples later |
| `learn` | in | 1 | relearn the noise over the next 16 frames |
| `sampling` | out | 1 | noise-sampling mode |
| `busy`, `overrun` | out | 1 | frame in progress; hop dropped |
| `frame_done`, `frame_speech`, `resid_bins` | out | 1, 1, 7 | per-frame decision and statistics |
| `frame_cycles` | out | 16 | clocks taken by the last frame |

Both resets are asynchronous and must be asserted together at power-up. The codec-domain
flops must be reset before the processing domain leaves reset, or a stale hop toggle is taken for
a hop and a frame of power-up contents is learnt as noise. In the first frame after reset the
older half of the frame reads as zeros, because Buffer 1 has not been filled yet.

The codec itself is outside the design. `smp_in`, `smp_out` and `clk_a` are where a codec
interface connects: an I²S or left-justified serialiser and its configuration port.

## What follows the original design and what is this implementation's own

These parts follow the original system description:

* the signal chain and its order;
* the sharing of one FFT and one CORDIC core;
* the 64-point serial FFT with IFFT by conjugated twiddles and division by 64;
* the 32-bit CORDIC with 29 iterations in a 5-stage, 4-register pipeline, with its 0.607 gain
  constant and output multipliers;
* the two noise modes, with mean and max memories;
* the next/present/previous memories;
* equations for the rectified filter, the residual-noise minimum and the −12 dB rule;
* the 2 × 64-clock processing;
* the 32-bit data width and the two clocks.

These are this implementation's choices, where the description is silent:

* the 16-bit sample width and all Q formats;
* delay lengths that halve per stage;
* the quarter-turn CORDIC pre-rotation and its guard bits;
* M = 16 noise frames;
* max|N_R| taken as (max − mean) of the noise frames;
* T measured as the mean per-bin |S|/|X| ratio;
* output muted during noise sampling;
* single-clock combinational dividers in the filter and the ratio;
* the toggle-flag clock crossing, and buffer hand-over without double buffering;
* tag-steered multiplexers;
* the overrun flag;
* rounding and saturation at the output.

## Limitations

* The codec serial interface is not included.
* The dividers are combinational, one per clock (48 bits by 32). They are the longest paths in
  the design. For a faster `clk` they would need pipelining, and the noise canceller's phase
  timing would have to absorb that latency.
* The design does no frame-energy voice-activity detection beyond the −12 dB rule. Noise
  learning is triggered only by reset or `learn`.

## Simulating

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=F`. With plain Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/nc_pkg.sv tb/tb_nc_top.sv --top tb_nc_top
./obj_dir/Vtb_nc_top
```

Substitute any other testbench name:

| testbench | checks |
|---|---|
| `tb_fft64` | forward and inverse transforms against a floating-point DFT, bin order, 64 + k latency, stalls |
| `tb_cordic` | both modes, all quadrants and the axes, against floating point; 4-clock latency |
| `tb_ss_filter` | gain and product, exactly, including rectification |
| `tb_noise_cancel` | every output bin and per-frame flag against a reference model; 64/64-clock timing; relearn |
| `tb_hann_window`, `tb_twiddle_gen`, `tb_sample_buffer` | tables and memory behaviour |
| `tb_input_framer`, `tb_overlap_add` | framing across the two clocks, overlap-add with saturation |
| `tb_nc_ctrl` | sequencing, frame length, overrun |
| `tb_nc_top` | the whole design at its real clock rates (see below) |
| `tb_nc_snr` | noise reduction on a speech-like signal at 6.4 dB input SNR (see below) |

`tb_nc_top` runs the full design at its default parameters, with a 10 MHz and a 12 kHz clock,
for about 70 hops. It takes about two seconds. It checks five things:

* with zero learnt noise the output equals the input delayed by 97 samples, within ±3 LSB;
* after the noise is relearnt, noise alone gives an output of exactly zero;
* a noisy 12-harmonic signal passes with a correlation above 0.97 to the clean signal, at the
  right level;
* every frame takes 396 clocks;
* each mechanism happens: sampling, speech frames, muted frames, residual reduction,
  rectification and relearn.

`tb_nc_snr` feeds the design a speech-like signal at an input SNR of 6.4 dB. The signal is
bursts of 12 harmonics whose pitch and level change from burst to burst, with pauses between
them, buried in white noise. Typical results:

| measure | value |
|---|---|
| SNR, clean power over error power, input → output | 7.4 dB → 9.2 dB |
| noise in the middle of the pauses | removed completely (output exactly 0) |
| correlation with the clean signal in the bursts | 0.94–0.95 |

The error-based SNR improves only modestly. The noise phase stays in every bin that is kept,
and weak harmonics below the noise estimate are removed together with the noise. The largest
gain is in the pauses, which the −12 dB rule silences.
