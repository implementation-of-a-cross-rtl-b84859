# Multi-rate cross-spectrum FFT analyzer

A cross-correlation phase-noise analyzer measures one device with two
independent reference oscillators and two phase detectors. Each detector
output carries the device's phase noise, which is common to both, plus the
noise of its own reference and electronics, which is not. The cross-spectrum
X(k)·conj(Y(k)) of the two channels, averaged over many frames, keeps the
common part. The uncorrelated parts average towards zero, roughly as
1/sqrt(number of frames). So the measured noise floor can lie well below that
of either channel alone.

This RTL is the digital core of such an analyzer. Two ADC sample streams
arrive at 125 MS/s. A chain of decimate-by-10 filters makes copies of both
channels at 125 MHz, 12.5 MHz, ... , 1.25 kHz. Each of the six rates has its
own stage, which computes and averages 1024-point cross-spectra. The stages
therefore cover six frequency decades at once, with the same number of bins
per decade: fine resolution near the carrier, and short frames (so many
averages per second) far from it. A seventh decimation step produces 125 Hz
samples. These go to a FIFO, and a processor handles them in software.

```
 adc_a ─┐  ┌──────┐      ┌──────┐ 12.5M ┌──────┐1.25M      ┌──────┐ 125 Hz ┌──────┐
 adc_b ─┼─►│ mux  ├─125M─►│ dec10├──────►│ dec10├── ... ───►│ dec10├───────►│ FIFO ├─► fifo_a/b
 test ──┘  └──────┘  │   └──────┘   │   └──────┘           └──────┘        └──────┘
 signal              ▼              ▼                     ▼
                 stage 0        stage 1      ...      stage 5      (stage n at 125 MHz/10^n)
                     └──────── host read port: rd_stage, rd_bin -> rd_re, rd_im ────────┘
```

Everything runs on one 125 MHz clock. A slower rate is a `valid` strobe that
is high once every 10^n clocks. There are no clock-domain crossings. `rst`
is synchronous and active high.

## Files

| File | Contents |
|---|---|
| `rtl/xspec_pkg.sv` | shared constants: FIR taps, CIC sizes, Blackman-Harris terms, and the functions that build the window and twiddle tables |
| `rtl/xspec_analyzer.sv` | top level: mux, decimator chain, six stages, FIFO, host read mux |
| `rtl/test_signal_gen.sv` | built-in two-channel test signal (common noise plus independent noise) |
| `rtl/input_mux.sv` | ADC or test signal select |
| `rtl/decimator10.sv` | decimate by 10: `cic_decimator` (R=5) then `fir_decimator` (R=2) |
| `rtl/xspec_stage.sv` | one stage: overlap buffer (optional), window, FFT, split, multiplier, accumulator |
| `rtl/overlap_buffer.sv` | turns a slow stream into 1024-sample bursts that overlap by 50 % |
| `rtl/bh_window.sv` | 4-term Blackman-Harris window on both channels |
| `rtl/fft_r2sdf.sv`, `rtl/fft_sdf_stage.sv` | streaming radix-2 single-path delay-feedback FFT |
| `rtl/split_two_real.sv` | separates the spectra of the two real channels out of one complex FFT |
| `rtl/xcorr_mult.sv` | X(k)·conj(Y(k)) |
| `rtl/cross_accumulator.sv` | averaging memory for bins 0..N/2 with host read port |
| `rtl/sample_fifo.sv` | first-word-fall-through FIFO for the 125 Hz samples |
| `tb/tb_<module>.sv` | one self-checking testbench per module, plus `tb_xspec_full.sv` (top at default size) |

## Decimation by 10: CIC then a short FIR

A decimate-by-10 stage needs a low-pass filter that passes the band the next
stage will analyse and suppresses everything that would alias into it. One
FIR decimating by 10 would need about 119 taps. Even with polyphase sharing,
that costs several multipliers per channel at 125 MHz. Instead the filter is
split into two parts:

* **CIC, order 5, R = 5** (`cic_decimator`). There are five integrators at the
  input rate and five combs at the output rate, with no multipliers. The gain
  is 5^5 = 3125, so 12 guard bits are added. Integrator overflow is harmless
  in two's complement, as usual for a CIC. The integrators are pipelined.
  The last one adds its input combinationally so that the output stays
  aligned to the input strobe. The combs are evaluated in one clock on every
  fifth valid input. The CIC response droops across the passband and has
  weak stop-band nulls, and the FIR fixes both.
* **31-tap symmetric FIR, R = 2** (`fir_decimator`). It has 16 distinct
  coefficients (Q1.17, in `xspec_pkg`). Their sum is 171799/2^17, about 1.31,
  which cancels part of the CIC scaling. A new output is due only every 10
  input clocks, so the FIR is time-multiplexed. One load cycle pre-adds the
  mirrored tap pairs. Then 8 multiply-accumulate cycles, with 2 multipliers
  per channel, cover the 16 products. The design has 2 multipliers per
  channel for the whole decimate-by-10 step, against 6 for a single FIR.

The target is at least 60 dB alias suppression and 0.1 dB passband
flatness over 75 % of the output band: the passband ends at 0.375·fs_out and
everything from 0.625·fs_out up, which would fold into it, is suppressed.
The coefficients were designed by least squares for the combined response.
The result is about 0.01 dB ripple and about 72 dB alias rejection. The CIC is treated as fixed, so the
FIR also flattens its droop. To swap in other taps, replace `FIR_COEF` and
keep it symmetric with 31 taps. The output shift (`SHIFT` in `decimator10`)
is derived from `COEF_FRAC` and `CIC_GROW`.

Output scaling: each decimator keeps two more fractional bits than it
receives (`STAGE_GROW = 2`), so stage n sees `16 + 2n`-bit samples. The DC
gain is 4 × 171799/2^17 / (3125/4096) ≈ 4 × 1.00. The output is rounded to
nearest, not floored, so the bias does not add up along the chain, and then
saturated. A decimator's output appears at most 12 clocks after the 10th
input strobe of its group.

## One stage: from samples to averaged cross-spectrum

```
in ─► [overlap buffer] ─► window ─► FFT (z = a + j·b) ─► split ─► X·conj(Y) ─► accumulator
       stages 3..5 only    BH-4     1024-pt R2SDF       2X, 2Y                   bins 0..512
```

### Overlap (stages 3 to 5)

In the slow stages a frame takes a long time to collect. At 1.25 kHz one
frame of 1024 samples is 0.8 s. So these stages use frames that overlap by
50 %, which gives twice as many frames for the same measurement time. The
4-term Blackman-Harris window correlates only 3.8 % between frames that
overlap by half. The overlapped frames are therefore almost independent, and
the extra averages really do lower the variance.

`overlap_buffer` holds the last 2N sample pairs in a circular buffer. It
issues the first burst after N samples and one more every N/2 samples after
that. Each burst is N samples, oldest first, sent on consecutive clocks. A
burst takes N clocks. The stage's own input is at most one sample per 10
clocks, so a burst always ends long before the samples it reads could be
overwritten. The block requires an input rate of at most one sample per 2
clocks, which the chain meets from stage 1 on. Stages 0 to 2 take the stream
directly and their frames do not overlap. The boundary is the top-level
parameter `OVERLAP_FROM = 3`.

### Window

`bh_window` multiplies both channels by
w(n) = 0.35875 − 0.48829·cos(2πn/N) + 0.14128·cos(4πn/N) − 0.01168·cos(6πn/N),
quantised to Q0.17 as round(w·(2^17 − 1)). The table is computed while the
design elaborates. A counter modulo N, which advances on each valid sample,
addresses it. The counter is what aligns the window with a frame. A reset, or
an overlap buffer that always sends whole frames, keeps the two in step. The
output is floor(x·w / 2^17), one clock after the input.

### Streaming FFT (R2SDF)

`fft_r2sdf` is a radix-2, decimation-in-frequency, single-path delay-feedback
pipeline. It has LOG2N butterfly stages (`fft_sdf_stage`). Stage s has a
delay line of D = N/2^(s+1) words. During the first D samples of each block
of 2D, the stage stores the inputs and outputs the differences held from the
previous block, multiplied by the twiddle. During the next D samples it
outputs head + input and stores head − input. The pipeline takes one sample
per valid strobe, and the strobe may have gaps. Every register advances only
on `in_valid`, so the same RTL serves 125 MS/s and 1.25 kS/s.

What is worth knowing when using it:

* **Order.** The output comes in bit-reversed order. Each output word carries
  its bin index `out_idx`, so later blocks never need a reorder buffer. The
  split and accumulator blocks work by index.
* **Latency.** Counted in valid samples, the first output appears
  N + LOG2N − 2 samples after the first input. The LOG2N − 2 comes from the
  register inside each butterfly stage. Frame m therefore streams out while
  frame m + 1 streams in, and its last LOG2N − 2 bins leave only when frame
  m + 1 has begun. In the overlapped stages, which feed the FFT in bursts,
  this means a frame's spectrum is complete only once the next burst has
  started, N/2 input samples later. A 4-frame average in stage 3 takes
  1024 + 5·512 input samples (3.58·10^6 clocks), against 1024 + 3·512 if
  the pipeline were flushed.
* **Scaling.** Nothing is scaled down. The word grows by one bit per stage,
  plus one guard bit, so the output is W + LOG2N + 1 bits. Twiddles are Q1.16
  in 18 bits, rounded, and every twiddle product is rounded back to the data
  width. The FFT output equals the exact DFT to within a few LSBs.

### Two real spectra from one complex FFT

Both channels are real. The window outputs go into the FFT as one complex
signal z = a + j·b. Because a and b are real, their spectra are conjugate
symmetric, and they can be separated again:

```
2·X(k) =      Z(k) + conj(Z(N−k))
2·Y(k) = −j·( Z(k) − conj(Z(N−k)) )        (indices modulo N)
```

`split_two_real` needs Z(k) and Z(N−k) together. The FFT delivers them in
bit-reversed order, so the block first writes a whole frame into one bank of
a ping-pong memory (written at the bin index). It then reads bins k and
(N−k) mod N for k = 0..N/2 from that bank, while the next frame fills the
other bank. The outputs are 2X and 2Y. The factor 2 is kept because dividing
would throw away a bit. `out_last` marks k = N/2. Only bins 0..N/2 are
produced, since the rest mirror them. The read of a frame starts 2 clocks
after its last write and lasts N/2 + 1 clocks. This fits within any frame
period, including back-to-back frames in stage 0.

### Conjugate multiply and averaging

`xcorr_mult` forms Re = xr·yr + xi·yi and Im = xi·yr − xr·yi, which is
X·conj(Y), with one register stage. Each result is 2·(W+LOG2N+2)+1 bits
wide.

`cross_accumulator` holds N/2 + 1 complex sums. A pulse on `start` arms it.
The first frame that begins after arming (at k = 0) overwrites the memory,
so there is no clear pass. Each later frame is added. After `n_avg` frames
(0 counts as 1) it stops, drops `busy` and raises `done`. `count` shows
progress. The read-modify-write takes 2 clocks and the multiplier output
arrives at most one bin per clock, so a read never meets an unfinished write.
An assertion (`a_no_rmw_hazard`) checks this. `GROW = 14` extra bits make
2^14 = 16384 frames of full-scale products safe from overflow. The host read
port is separate and returns a bin one clock after it is addressed. It can be
read while averaging runs, but a bin then holds a partial sum.

**Units of a sum.** With X and Y the DFTs of the windowed signal, where the
window is Q0.17 and the samples are in the stage's own scale, one read gives
4·Σ_frames X(k)·conj(Y(k)). Divide by 4·count to get the mean. To get a
density, divide by fs·Σw² in the usual way. This window (92 dB side lobes)
has an equivalent noise bandwidth of about 2 bins, which that normalisation
accounts for. Stage n's samples carry 2n
extra fractional bits relative to the ADC LSB.

## Test signal generator

`test_signal_gen` gives a self-test without the analog front end. Channel A
is c + n_a and channel B is c + n_b, where c, n_a and n_b are independent
white noises. Each comes from its own 32-bit maximal-length Galois LFSR
(x^32 + x^22 + x^2 + x + 1) with its own seed. Each LFSR advances 32 steps
per clock, so consecutive output words share no bits. With one step per
clock, consecutive words would be shifted copies of each other, the noise
would be strongly high-pass, and the slow stages would see almost nothing.
Each term is taken from the top W − 2 bits, so the sum cannot overflow. The
cross-spectrum of A and B converges to the flat spectrum of c. The two
independent parts average out, which is the very effect the analyzer relies
on. `test_sel = 1` selects this signal in `input_mux`.

## Low-rate FIFO

The output of the sixth decimator (125 Hz) goes into `sample_fifo`. This is a
first-word-fall-through FIFO: `fifo_a`/`fifo_b` always show the oldest entry,
and `fifo_rd` pops it. It is 1024 entries deep, which holds 8.2 s of data. A
write into a full FIFO is dropped and sets the sticky `fifo_overflow` flag,
which reset clears. `fifo_level` gives the fill level.

## Host interface (top level)

| Port | Meaning |
|---|---|
| `acc_start[n]`, `acc_n_avg` | restart averaging of stage n over `acc_n_avg` frames |
| `acc_busy[n]`, `acc_done[n]`, `acc_count[n]` | progress of stage n |
| `rd_stage`, `rd_bin` → `rd_re`, `rd_im` | sum of bin `rd_bin` (0..512) of stage `rd_stage`, one clock later, sign-extended to the widest stage's width (91 bits at the defaults) |
| `fifo_rd`, `fifo_a`, `fifo_b`, `fifo_empty`, `fifo_full`, `fifo_level`, `fifo_overflow` | the 125 Hz samples |
| `test_sel` | 1 = internal test signal |

A processor on the other side would start the stages, poll `acc_done`, read
the sums and drain the FIFO. That processor, the ADCs and the analog phase
detectors are not part of this RTL.

## Parameters

| Parameter | Default | Notes |
|---|---|---|
| `ADC_W` | 16 | ADC word width (own choice) |
| `LOG2N` | 10 | 1024-point frames |
| `NSTAGES` | 6 | number of FFT stages / decimators before the FIFO |
| `OVERLAP_FROM` | 3 | first stage with 50 % overlap |
| `STAGE_GROW` | 2 | extra bits per decimator (fixed at 2 by `decimator10`) |
| `FIFO_DEPTH` | 1024 | own choice |
| `GROW` | 14 | accumulator guard bits (at least 10,000 frames) |
| `CNT_W` | 15 | width of the frame counter |

## Where this design departs from the original system, or fills in gaps

* **FFT.** The original uses a vendor FFT core. Here the FFT is a plain R2SDF
  pipeline with bit-reversed output. Its interface and arithmetic are this
  design's own.
* **Stage count and rates.** There are six hardware stages at 125 MHz/10^n
  and a 125 Hz stream to software, following the block diagram's stages 0 to
  5 and the stated decade ranges (stage 0: 5–50 MHz, stage 1: 0.5–5 MHz).
* **Accumulator depth.** The memory is sized for "more than 10,000"
  correlations (2^14). One example measurement uses 10^6 correlations in
  stage 0. That count needs about 61 successive read-outs summed in software,
  or `GROW = 20`.
* **Widths, handshakes, reset, host ports, FIFO depth, test signal.** None
  of these is specified by the original system. All are this design's own.
* **Filter taps.** The CIC/FIR split (5 × 2, 31 taps, 2 multipliers) follows
  the original's choice. The tap values are newly designed.
* **Not covered:** the ADC, the analog front end, the software FFT of the
  125 Hz samples, and the processor.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>` and stops itself,
with a watchdog. With Verilator 5:

```
verilator --binary --timing -Irtl -y rtl rtl/xspec_pkg.sv tb/tb_fft_r2sdf.sv --top tb_fft_r2sdf
./obj_dir/Vtb_fft_r2sdf
```

| Testbench | What it checks |
|---|---|
| `tb_fft_r2sdf` | against a direct DFT (random, impulse, tone frames; gaps in `valid`), output order and latency |
| `tb_decimator10` | against a reference CIC+FIR convolution, DC gain, output rate |
| `tb_bh_window`, `tb_overlap_buffer`, `tb_split_two_real`, `tb_xcorr_mult`, `tb_cross_accumulator`, `tb_sample_fifo`, `tb_input_mux`, `tb_test_signal_gen` | each block against an independent model |
| `tb_xspec_stage` | a stage with and without overlap against a floating-point window/DFT/cross-spectrum model |
| `tb_xspec_analyzer` | the top at reduced size (N = 16, 3 stages): test-signal mode, a tone, DC, FIFO overflow and drain. It counts each mechanism (mode switch, per-stage completion, overlapped frames, FIFO writes/overflow/reads) and fails if any never happens |
| `tb_xspec_full` | the top with all defaults and the test signal: stages 0 and 1 average 4 frames each, stage 3 averages 4 overlapped frames; frame counts, completion time (stage 3 faster than without overlap), and a clearly positive real cross-spectrum (the common noise) |

The full-size test takes about 20 s to build and 12 s to run (3.6·10^6
clocks). Stage 0 takes 5636 clocks for 4 frames, stage 1 takes 45136, and
stage 3 takes 3584551.
One frame of stage 5 alone takes about 10^8 clocks (one sample every 10^5 clocks).
The reduced-size top test covers the slow stages and the FIFO instead.
