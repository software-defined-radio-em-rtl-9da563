# DAB mode I baseband demodulator

This is synthesizable SystemVerilog for the digital part of a DAB (Digital
Audio Broadcasting, Eureka-147) receiver in transmission mode I. The input is
a complex baseband signal sampled at 2.048 MHz. The demodulator takes its
symbol timing from a frame-start flag that comes with the samples. Three
synchronization blocks run alongside it:

- a Null-symbol frame detector;
- a cyclic-prefix frequency offset estimator;
- a digital frequency corrector placed ahead of the demodulator.

The output is the stream of
demodulated bits: 3072 bits per OFDM symbol, in the order the transmitter's
QPSK mapper consumed them. The on-chip error counter compares that stream with
a stored copy of the transmitted bits. The hardware can therefore be left
running on its own and checked by reading two counters.

The structure follows a System Generator design for a Virtex-4 board, built as
a master's thesis on software-defined radio in FPGAs. It uses the same chain
of subsystems, the same FIFO and RAM organisation and the same control ideas.
The RTL, its numeric choices and the test environment are new.

## Signal chain

```
 dfe_source ──► freq_correction ──┬──► coarse_time_sync    Null-symbol frame detector
 I/Q memory     phase accumulator │     (envelope, IIR, bottom detector, threshold)
 replayed       and cos/sin table ├──► fine_freq_sync      cyclic-prefix offset estimator
 cyclically                       │     (correlation, CORDIC, IIR average)
                                  ▼
 ofdm_demod ──────────────────────────► diff_demod ─► freq_deinterleaver ─► qpsk_demapper ─► bit_error_counter
 ofdm_input_sync      fft_r2_burst       carrier        single-port RAMs       sign bits,        reference memory,
 (Null + prefix       2048-point         selection,     read through a         imaginary bits    bit and error
 removal, symbol      radix-2,           conj. product  permutation ROM        via a FIFO        counters
 FIFOs)               burst I/O          vs previous
                                         symbol
```

| Mode I figure | Value | Where used |
|---|---|---|
| FFT size N | 2048 | `fft_r2_burst`, `ofdm_input_sync` FIFO depth |
| Active carriers K | 1536 (bins 256..1023 and 1025..1792) | `diff_demod`, `freq_deinterleaver`, `qpsk_demapper` |
| Cyclic prefix | 504 samples | `ofdm_input_sync` |
| Symbol | 2552 samples | `ofdm_input_sync` |
| Null symbol | 2656 samples | `ofdm_input_sync` |
| Symbols per frame | 76 (incl. the phase reference symbol) | `dab_pkg` |

All constants live in `rtl/dab_pkg.sv`. Samples are 16-bit two's-complement I
and Q values, packed into the struct `cplx16_t`.

The clock runs at `CLK_PER_SAMPLE` = 8 times the sample rate (16.384 MHz).
This is the integer multiple of 2.048 MHz nearest to 16 MHz, the lowest
clock the target board provides. One OFDM symbol therefore lasts
2552 × 8 = 20416 clocks. Each stage finishes its work on a symbol well
inside that time, so no stage ever stalls the one before it.

Every module has an asynchronous, active-low reset `rst_n`. Control state
is reset. Memory contents are not.

## Framing and the burst FFT (`ofdm_input_sync`, `fft_r2_burst`)

The source marks the first sample of a frame (`in_sof`). From there,
`ofdm_input_sync` counts through the frame:

- It drops the 2656 Null-symbol samples.
- For each symbol it drops the 504 prefix samples.
- It pushes the 2048 useful samples into two FIFOs, one for I and one for Q.

The first symbol after the Null is the phase reference symbol (PRS). The I
FIFO carries one extra bit per sample that marks it as PRS. The FFT is fed
only when a FIFO holds a whole symbol and the FFT is in its load phase. The
symbol then goes out as a burst of 2048 consecutive samples.

The FFT is a burst-I/O radix-2 engine. Loading, computing and unloading never
overlap:

1. **Load (2048 clocks).** Sample *n* is written at address bitrev(*n*). The
   decimation-in-time stages can then work in place.
2. **Compute (11 × 1028 clocks, `busy`).** There are 11 stages of 1024
   butterflies, one butterfly issued per clock. Butterfly *j* of stage *s*
   reads the pair of addresses `a`, `a + 2^s`. It uses the twiddle
   W^t with t = (j mod 2^s)·N/2^(s+1).
3. **Unload (2048 clocks).** Bins leave in natural order with `out_valid`
   and `out_index`. Each bin carries the PRS tag of its symbol.

The memory organisation is the key to one butterfly per clock. The 2048 words
are split over two RAMs:

- The bank is the XOR of all address bits.
- The row is the address shifted right by one.

The two operands of a butterfly differ in exactly one address bit, so they
always sit in different banks. Their results go back to the same two places.
Each RAM therefore needs only one read port and one write port. The butterfly
pipeline is 4 deep:

1. Read.
2. Twiddle multiply.
3. Add and subtract, then halve with saturation.
4. Write.

Each stage waits for that pipeline to drain before the next stage starts
(4 clocks per stage). This avoids read-after-write hazards between stages.

Numbers:

- **Twiddles.** Held in a ROM of 1024 entries, computed at elaboration from
  `$cos`/`$sin`. Each is rounded to 16 bits with 1.0 = 2^14.
- **Scaling.** Every stage halves its results, so the output is DFT/2048.
  Inputs must stay below 2^15 in magnitude.

From the first loaded sample to the first output bin takes
2048 + 11 308 = 13 356 clocks. The reference design's vendor core needed
13 627.

## Differential demodulation (`diff_demod`)

DAB carries data as the phase difference between the same carrier in two
consecutive symbols (π/4-DQPSK). Demodulation multiplies each carrier by the
complex conjugate of its value in the previous symbol:

```
Y = (a + jb)(c − jd) = (ac + bd) + j(bc − ad)
```

Four multipliers compute ac, bd, bc and ad. The sums are kept at full width
(33 bits).

A bin counter writes only the active bins into FIFO A, which is 4 deep. Bins
below 256, bin 1024 and bins above 1792 are dropped. FIFO B, 2048 deep, holds
the previous symbol's 1536 carriers. A two-state machine controls the FIFOs:

- **S_REF.** The PRS passes through FIFO A into FIFO B. After 1536 carriers
  the machine moves to S_DIFF.
- **S_DIFF.** Each carrier taken from FIFO A is multiplied with the carrier
  taken from FIFO B. It is also written back into FIFO B as the reference for
  the next symbol. Reading starts only when FIFO A holds three carriers, and
  then continues every clock.

The three-carrier head start absorbs the missing bin 1024. Without it the
output would have a one-clock gap in the middle of each symbol. With it, the
1536 products come out as one unbroken burst. The first product is registered
261 clocks after bin 0 leaves the FFT.

Bin 0 of a PRS restarts the machine in S_REF and empties both FIFOs. The
demodulation therefore re-anchors itself once per frame, and a lost symbol
cannot corrupt more than one frame.

## Frequency deinterleaving (`freq_deinterleaver`)

The transmitter scatters the 1536 QPSK symbols over the carriers with a fixed
permutation. The deinterleaver undoes it:

1. It writes one symbol's carriers, in carrier order, into a single-port RAM
   for I and one for Q.
2. It reads them back in the order held in a ROM. Output *n* is then QPSK
   symbol *n*.

Loading the inverse table would turn the same block into an interleaver.

The ROM is computed at elaboration from the mode I rule of the DAB standard:

```
Π(0) = 0,  Π(i) = (13·Π(i−1) + 511) mod 2048
```

The generator walks i = 0..2047 and keeps the values *d* with
256 ≤ *d* ≤ 1792 and *d* ≠ 1024. Entry *n* of the ROM is *d*'s position
among the active carriers:

- *d* − 256 below the centre bin;
- *d* − 257 above it.

The sequence starts 255, 754, 1096, … and ends with 964.

Timing per symbol:

- 1536 write clocks, then 1536 read clocks.
- The first output comes 1538 clocks after the first input.
- The last output comes 3073 clocks after the first input, so a symbol
  occupies the block for 3074 clocks.
- Carriers that arrive during the read phase are dropped and set the sticky
  `overrun` flag. This never happens at 8 clocks per sample.

## QPSK demapping (`qpsk_demapper`)

QPSK symbol *n* carries:

- bit *n* in the sign of its real part;
- bit *K + n* in the sign of its imaginary part.

A negative value means 1. Zero counts as positive.

The real-part bits go out combinationally, in the same clock as their symbol.
The imaginary-part signs wait in a 1-bit FIFO, 1536 deep, and follow on the
next 1536 clocks.

Output flags:

- `out_first` marks bit 0 of every symbol.
- `out_frame_first` marks bit 0 of the first data symbol of a frame.

## Source and error counter (`dfe_source`, `bit_error_counter`)

`dfe_source` stands in for the ADC and digital front-end:

- Two 2^15-entry memories hold I and Q samples.
- They are filled through a load port while `run` is low.
- With `run` high they replay `len` samples cyclically, one every
  `CLK_DIV` clocks. Address 0 is flagged as the start of a frame.

The memories are large enough for a Null symbol, the PRS and 10 data symbols
(30 728 samples).

`bit_error_counter` holds up to 2^15 reference bits and steps through them
with each output bit. It counts bits and mismatches. At every
`in_frame_first` it realigns its pointer to 0, so the comparison recovers
after a lost symbol. `clr` zeroes both counters.

## Frame detection from the Null symbol (`coarse_time_sync`)

Every frame starts with the Null symbol, 2656 samples with no transmitted
power. The detector works on one sample at a time:

1. **Envelope.** |I| + |Q| stands in for the magnitude.
2. **Low-pass filter.** y[n] = A·y[n−1] + B·(z[n] + z[n−1]), with
   B = 103/65 536 and A = 1 − 2B. This is a bilinear first-order design with
   a 1024 Hz cut-off at 2.048 MHz, and its DC gain is one. The state keeps 16
   fraction bits.
3. **Bottom detector.** Over windows of one frame (196 608 samples) it keeps
   the minimum and the mean of the envelope. The mean is a sum times a
   constant reciprocal. At the end of each window the threshold becomes
   min + (mean − min)/8.
4. **Comparator.** The envelope must stay below the threshold for at least
   1328 samples (half a Null symbol). The first sample at or above it then
   pulses `det`, the frame start estimate.

On the test signals the pulse comes 30 to 50 samples into the phase
reference symbol's prefix. That is well inside the 504-sample prefix. The
threshold of one window is used during the next. No detection is made
before the first window has ended.

## Frequency offset estimation (`fine_freq_sync`)

The cyclic prefix repeats the end of the symbol 2048 samples later. A
frequency offset of δ carrier spacings turns the repeat by e^{j2πδ}.

The block correlates prefix samples 125..380 (the 256 in the middle) with
their copies. It keeps only those 256 samples in a small RAM, not a full
2048-sample delay line. An 18-step CORDIC then takes the angle of the sum in
units of 2^−16 turns, which equals δ in 2^−16 carrier spacings. There is one
estimate per symbol, including the PRS, and a first-order IIR average with a
weight of 1/8.

Symbol positions are counted from the frame-start flag. Offsets of half a
carrier spacing or more alias.

## Frequency correction (`freq_correction`)

Each sample is multiplied by e^{−j2πnΔ/N}, where Δ is the offset in carrier
spacings:

- A 32-bit phase accumulator advances by Δ·2^5 per sample, with Δ in units
  of 2^−16.
- Its top 10 bits address a cosine/sine table built at elaboration, with
  1.0 = 2^14.
- The product is rounded and saturated to 16 bits.

The latency is 2 clocks. A zero offset passes samples through unchanged, so
the demodulator output stays bit-exact when no correction is asked for.
Offsets are limited to ±0.5 carrier spacing.

## Top level (`dab_rx_top`)

`dab_rx_top` brings out:

- the load ports of both memories;
- `run`, `src_len` and `ref_len`;
- `freq_corr`, the frequency correction (signed, 2^−16 carrier spacings);
- the frame detector's envelope, threshold and `frame_det` pulse;
- the frequency estimator's `freq_delta` and `freq_delta_avg` with their
  strobe `freq_est_valid`;
- the bit stream, with `bit_first` and `bit_frame_first`;
- the two counters;
- five sticky status flags: `fft_busy`, `sync_overflow`, `carrier_overflow`,
  `deint_overrun` and `demap_collision`.

To use it:

1. Hold `run` low.
2. Load a frame's worth of samples and the bits expected from them.
3. Set the lengths.
4. Pulse `err_clr`.
5. Raise `run`.

The offset estimate is taken after the corrector, so it shows the offset
that is left. A host closes the loop by adding `freq_delta_avg` to
`freq_corr`. The loop is not closed in hardware.

Latency from the first useful sample of a symbol to its first output bit:

| Stage | This RTL (clocks) | Reference design (clocks) |
|---|---|---|
| OFDM demodulation (load + FFT) | 13 356 | 13 627 |
| Differential demodulation | 261 | 261 |
| Frequency deinterleaving | 1 538 | 1 538 |
| QPSK demapping | 0 | 0 |
| Total | 15 155 | 15 426 |

No timing closure has been done for a particular device. The reference
design ran at up to about 28.8 MHz on a Virtex-4. This RTL needs 16.384 MHz
at 8 clocks per sample. The frequency corrector adds 2 clocks ahead of the
table's first row. The busiest stage, the FFT, uses 15 404 of the 20 416 clocks in each
symbol period.

## Departures and choices

- **Sign of the imaginary part.** The differential product uses
  bc − ad, the true conjugate product.
- **Demapper bit order.** The imaginary-part bit of symbol *n* is bit K + *n*
  of the symbol's bit stream.
- **FFT.** The vendor FFT core is replaced by the engine described above. It
  is 271 clocks faster per symbol, with its own scaling and rounding.
- **Merged FIFOs.** The reference design used separate I and Q FIFOs in
  `diff_demod`. Here each pair shares one FIFO with a combined word; the
  control is the same.
- **PRS flag.** The PRS is flagged in the data path rather than by a separate
  counter. The demodulator is framed by the source's frame-start flag. The
  Null-symbol detector's pulse is an output and does not frame the chain:
  the fine timing step that would refine it needs the phase reference
  symbol's stored values.
- **Writable memories.** The sample and reference memories are RAMs with load
  ports rather than pre-initialised ROMs.
- **Frame length.** A full 76-symbol frame (196 608 samples) does not fit
  the default source memory. Set `SRC_AW = 18` for that.
- **Synchronization constants.** The filter coefficient, the threshold
  divisor I = 8, the 1328-sample guard, the CORDIC and the averaging weight
  are this design's choices.
- **Not included.** The following are not part of this design:
  - the analog front-end, the ADC clocking and the down-converter's filters
    and decimation;
  - PRS-based fine time synchronization and integer-carrier frequency
    synchronization, which need the reference symbol's values from the DAB
    standard;
  - sampling-rate estimation, which builds on the fine timing.

## Testbenches and simulation

Each block has a self-checking testbench in `tb/`. Each ends by printing
`TB_RESULT checks=<n> failures=<m>` and has a watchdog.

| Testbench | Reference model and main checks |
|---|---|
| `tb_fft_r2_burst` | Direct DFT in `real` arithmetic. Tone, random and QPSK inputs; every bin within ±6 LSB; busy time 11 × 1028 clocks. |
| `tb_ofdm_input_sync` | Small frame (TU = 16). Exact useful samples passed; PRS flag; waiting on a busy FFT; restart on a new frame; overflow. |
| `tb_ofdm_demod` | 64-point version against a DFT model. Natural bin order; PRS flag; busy time; no overflow. |
| `tb_diff_demod` | Conjugate products of random symbols. Two frames; burst continuity; latency; PRS restart. |
| `tb_freq_deinterleaver` | Permutation regenerated independently. Order; 1538 and 3073-clock latencies; overrun flag. |
| `tb_qpsk_demapper` | Bit order and timing, with exact zeros in the input; collision flag. |
| `tb_bit_error_counter` | Injected errors; realignment from several pointer positions; clear. |
| `tb_dfe_source` | Replay order, rate and frame flag. |
| `tb_coarse_time_sync` | Real-arithmetic filter and window model over 4 frames with a noisy Null symbol. Envelope and threshold within ±2; one detection per frame, matching the model within ±2 samples. |
| `tb_fine_freq_sync` | Symbols with offsets of 0.2, −0.35, 0.45 and 0 spacings. Each estimate within ±0.004; average checked against a model of the filter; latency. |
| `tb_freq_correction` | Real-arithmetic rotation model. Exact pass-through at zero offset; ±2 LSB otherwise; saturation of a large offset; latency and frame flag. |
| `tb_dab_rx_top` | End to end at default parameters (see below). |

`tb_dab_rx_top` uses a transmitter model, `tb/dab_signal_gen.svh`. The model:

1. Draws random bits.
2. QPSK-maps them and interleaves them.
3. Applies differential modulation, starting from a PRS with random
   phases that are multiples of π/2.
4. Runs an inverse DFT, adds cyclic prefixes and prepends a Null symbol.

Phases are integer multiples of π/4, so the expected bits are known exactly.

The testbench then runs these phases in turn:

- **Two clean frames.** All 61 440 bits must match the transmitted ones, and
  the on-chip counter must agree.
- **One more frame with 7 reference bits flipped.** The counter must report
  exactly 7 errors.
- **Seven more frames.** The Null-symbol detector must fire at least twice.
  Each pulse must fall 0 to 150 samples after the Null symbol, at most once
  per frame. Its threshold must lie between zero and the mean envelope.
  Every frequency estimate must be within 0.004 spacings of zero.
- **One frame with `freq_corr` at +0.1 spacing.** Each of the 11 estimates
  must read −0.1 within 0.004.
- **Closed frequency loop.** The stored frame is turned by an offset of
  4 · 2048 / 30 728 ≈ 0.267 carrier spacings. That is four whole turns per
  frame, so the cyclic replay has no phase jump. One frame runs uncorrected.
  Its estimates must be within 0.004 of the offset, and their mean within
  0.001. The mean is then set as `freq_corr`. Two more frames must come out
  with no bit error, on the monitor and on the on-chip counter. Left
  uncorrected, the same frames give about 40 000 bit errors.

It also counts that every mechanism occurred:

- 33 FFTs and 3 PRS restarts in the first three frames;
- at least 29 complete 3072-bit symbols;
- the 7 error events;
- the frame detections and the frequency estimates.

It takes a few seconds with plain Verilator:

```
verilator --binary --timing -Irtl -Itb -y rtl \
    rtl/dab_pkg.sv tb/tb_dab_rx_top.sv --top-module tb_dab_rx_top
./obj_dir/Vtb_dab_rx_top
```

Any other testbench is run the same way: replace the file and top-module
names.

## Limits of trust

- The FFT is checked against a floating-point DFT within a few LSB, not
  bit-exactly against the vendor core.
- The end-to-end test uses an ideal channel: no noise, no multipath, no
  sampling-rate error. Only the closed-loop phase adds a carrier offset, a
  pure one. It shows that the chain is functionally right. It does not measure the bit
  error rate at low SNR.
- Nothing has been placed, routed or run on hardware.
