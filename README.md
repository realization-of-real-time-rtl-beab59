# Real-time PAM-4 transceiver DSP with LDPC coding for 56 Gb/s C-band links

A 56 Gb/s intensity-modulated, directly detected PAM-4 link in the C band
suffers from chromatic dispersion. After a few kilometres of standard fibre, each
symbol smears over its neighbours, and direct detection turns that into
non-linear inter-symbol interference that a simple slicer cannot undo. This RTL
is a complete transmit and receive DSP that tolerates roughly ±425 ps/nm of
residual dispersion. It combines four pieces:

- a decision-feedback equalizer (DFE) adapted by LMS;
- a maximum-likelihood sequence equalizer (MLSE) that estimates the channel
  from its own decisions and gives a soft value for every bit;
- a quasi-cyclic LDPC code (2448,2256), decoded with min-sum from those soft
  values;
- a Mueller-Müller timing loop.

Everything runs fully in parallel. One clock of 218.75 MHz carries 128 PAM-4
symbols (28 GBd, 56 Gb/s line rate). The receiver takes 256 ADC samples per
clock, two per symbol. After the LDPC and framing overhead the payload is
50 Gb/s, carried by three encoder/decoder pairs side by side.

```
 tx_info / PRBS ─► 3×LDPC encoder ─► 12×1224 interleaver ─► gearbox 288→248 ─►
   training/marker insertion ─► Gray PAM-4 map ─► termination insertion ─► tx_sym (128 sym)

 rx_smp (256×6b) ─► frame sync ─► data align (284) ─► timing compensation (280×7b) ─► DFE ─┬─► MLSE-SOVA ─►
        ▲                                                                                  │   ▲ channel stats
        └─────────── loop filter ◄── Mueller-Müller timing error ◄─────────────────────────┘
   ─► termination removal + gearbox (288) ─► de-interleaver ─► 3×LDPC min-sum decoder ─► rx_bits (3×96)
```

## The line format

Everything hinges on a fixed **beat** of 128 symbols.

- **Blocks.** A beat holds four blocks of 32 symbols. The last symbol of
  every block (positions 31, 63, 95 and 127) is a *termination symbol* of
  known value. The value is 0, the lowest level. The other 124 symbols carry
  248 bits.
- **Why terminate.** Termination cuts the symbol stream into independent
  32-symbol pieces. In the receiver, the DFE feedback chain and the MLSE
  trellis of each piece can then start from a known symbol. All four pieces
  are processed in the same clock, with no dependence from one to the next.
  This is what makes a 128-symbol-wide DFE and MLSE feasible.
- **Gray mapping.** Bit pairs map to symbols as 00→0, 01→1, 11→2, 10→3. The
  first bit of a pair is the MSB.
- **Frame.** After `tx_start` the transmitter sends one frame header, then
  payload forever:
  - *Marker beat.* The first 31 symbols are 16 × '3' followed by 15 × '0';
    the termination symbol supplies the 16th '0'. The rest of the beat is
    training data.
  - *Training.* `TRAIN_BEATS` (256) beats of known symbols: a PRBS-15
    (x^15+x^14+1, seed all ones), 248 bits per beat, which the receiver
    regenerates.
  - *Payload.* Interleaved codeword bits, with no further markers.

## Transmitter (`tx_dsp`)

- **Encoders.** Three `ldpc_encoder`s each turn 2256 information bits into a
  2448-bit codeword in one clock (see *The LDPC code* below).
- **Interleaver.** `tx_interleaver` collects two beats of the three encoders,
  that is six codewords or 14688 bits. It writes them as the rows of a
  12 × 1224 matrix, two rows per codeword, and reads the matrix out by
  columns, 24 columns (288 bits) per clock. A block therefore takes exactly 51
  output beats. Two matrices alternate: one fills while the other drains.
  Reading by columns spreads a burst of line errors over all six codewords.
- **Rate matching.** A `gearbox` adapts the 288-bit interleaver beats to the
  248 data bits of a line beat.
- **Framing.** `training_insert` produces the marker, training and payload
  beats. `pam4_mapper` applies the Gray map. `term_insert` expands 124 symbols
  to 128 by adding the termination symbols.
- **Underrun.** If a payload beat is due and no payload is ready,
  `tx_underrun` rises.

## Receiver front end

- **`frame_sync`.** Correlates the incoming samples with the marker shape:
  +1 over 32 samples, then −1 over 32 samples. It uses prefix sums, so all 256
  candidate offsets of a beat are scored in one clock. It locks on the largest
  score above `THRESH` once the following beat offers no larger one, and
  reports the sample offset.
- **`data_align`.** Realigns the stream to that offset. From the beat after
  the marker beat on, it emits 284 samples per clock: the 256 samples of the
  beat plus 14 before and 14 after. That margin is what a 25-tap T/2 FFE and a
  5-sample interpolation window need at the beat edges.
- **`timing_comp`.** Shifts all samples by a fractional delay `mu`. `mu` is a
  signed 6-bit value in 1/16 sample, so the range is ±2 samples. Each output
  is a linear interpolation between the two samples around the delayed
  position. The result is doubled to 7 bits. The output is 280 samples.
- **Timing loop.** `mm_ted` computes the Mueller-Müller error
  Σ(y_k·a_{k−1} − y_{k−1}·a_k). It uses the compensated samples at symbol
  centres and the DFE decisions (amplitudes −3, −1, 1, 3). The sum is scaled
  by 1/8 and saturated to 14 bits. `loop_filter` is a proportional-integral
  filter followed by a phase accumulator:
  - `integ += e`;
  - `phase += (e >>> KP_SHIFT) + (integ >>> KI_SHIFT)`;
  - `mu = phase >>> 8`, clamped to ±31.

  The loop runs once per clock. Its total delay (compensation, DFE, detector,
  filter) is several clocks, so the gains are kept low (`KP_SHIFT` 4,
  `KI_SHIFT` 14). If the sync lands a sample off, the loop pulls `mu` over to
  compensate. In the end-to-end test it settles near +11/16 sample.

## The DFE and its adaptation (`dfe`)

**Equalizer.** Symbol k of the beat uses window samples 2k … 2k+24, centred
on 2k+12:

- FFE output: f_k = (Σ_t c_t·x[2k+t]) >> 10.
- One feedback tap: y_k = f_k − b·L(a_{k−1}).
- Slicer: levels L = −48, −16, 16, 48 on the 7-bit scale, thresholds −32, 0
  and 32.

Within a 32-symbol block, the slicer decisions form a serial chain of 32
steps. The chain starts from the termination symbol before the block, which
is known. The four chains of a beat are independent and run side by side.
`ffe_out` (f_k, saturated to 7 bits) feeds the MLSE and the channel
statistics. `dec` feeds the timing detector.

**LMS.** Coefficients are updated once per clock from 16 of the beat's
symbols (every 8th):

- c_t += μ·Σ e_k·x[2k+t]
- b −= μ·Σ e_k·L(a_{k−1})

The error is e_k = L(ref_k) − y_k. The reference is the regenerated training
symbol while `train` is high, and the DFE's own decision afterwards.
Coefficients are kept with 20 fractional bits, where a level unit of 16 means
1.0, and are applied with 10. The centre tap starts at 1.0 and all others at
0.

**Step size.** μ starts at 2^−12 (about 0.00024). It is halved after
`MU_T1`, `MU_T2` and `MU_T3` updates (256, 1024 and 4096), which gives four
step sizes in all. The update counter stops at `MU_T3`, so the schedule
cannot restart during long runs. `mu_stage` reports the current step.

The training period (256 beats, about 1.2 µs) is long enough for both the
taps and the timing loop to settle before payload arrives. Payload beats are
not equalized differently. They only go on to the MLSE, which ignores
training beats.

## MLSE with soft output (`mlse_stats`, `mlse_sova`)

The DFE removes most of the dispersion, but what is left after square-law
detection depends on the neighbouring symbols non-linearly. The MLSE
therefore does not assume a linear channel. It *measures* the mean FFE output
for every pattern of three symbols and searches for the sequence that fits
those means best.

- **`mlse_stats`.**
  - Keeps a sum and a count for each of the 64 patterns (a_{k−2}, a_{k−1},
    a_k), accumulated over 1024 symbols (8 beats) from the MLSE's own
    decisions.
  - At the end of each window it divides sum by count and publishes the 64
    means. `stats_update` pulses at that moment.
  - A pattern that did not occur keeps its previous mean.
  - Before the first window the means are the ideal levels of a_k.
- **`mlse_sova`.**
  - The trellis has 16 states (a_{k−1}, a_k) and 64 branches per step. The
    branch metric is (y_k − mean)²/16.
  - Each 32-symbol block starts in the states whose newest symbol is the
    preceding termination symbol and must end in a state whose newest symbol
    is its own termination symbol.
  - A forward and a backward min-sum recursion over the block give, for every
    symbol and each of its two Gray bits, M0 and M1: the best total metric of
    a path with that bit 0 and with that bit 1.
  - The soft value is (M1 − M0) >> 3, saturated to 5 bits (±15). Positive
    means bit 0.
  - This is the max-log soft value a soft-output Viterbi with full path
    updates would give. The hard decisions are the symbols on the best path.

  The recursions are written as loops that the tools unroll: 4 blocks × 32
  steps × 64 branches, all in one clock. This is the largest piece of
  combinational logic in the design.

## From soft values to codewords

- **`llr_buffer`.** Drops the soft values of the termination symbols, 256 →
  248 per beat. A gearbox then repacks them into 288-value beats, so one
  de-interleaver block is exactly 51 beats. The buffer also absorbs the gaps
  this rate change leaves.
- **`deinterleaver`.** Undoes the 12 × 1224 column read. For every output
  beat it writes 288 values and reads 96 per decoder. Decoder d receives
  codewords d and d+3 of each block, one after the other, so each decoder sees
  one codeword every 25.5 clocks at most. Storage is ping-pong, as in the
  transmitter.

## The LDPC code and decoder

**The code.** The (2448,2256) code is quasi-cyclic with 48 × 48 circulants. The
base matrix has 4 block rows and 51 block columns, so the overhead is 8.51 %.

- Information block columns: c = 0 … 46. In block row r, column c holds the
  identity shifted by s(r,c) = (r·c) mod 47.
- Parity block columns: 47 … 50. They form a dual-diagonal: identity blocks
  on the diagonal and on the sub-diagonal.

With this structure, the encoder (`ldpc_encoder`) works as follows. For each
block row it forms the syndrome of the information part,
S_r[k] = ⊕_c info_c[(k + s(r,c)) mod 48]. It then accumulates p_0 = S_0 and
p_r = S_r ⊕ p_{r−1}. All shifts are fixed wiring, so encoding is one XOR
network and one register. Codeword bit c·48+j is bit j of block column c:
information in bits 0 … 2255, parity after it.

**The decoder (`ldpc_dec_core`).**

- It is fully parallel: 192 check nodes, 2448 variable nodes and every edge
  are wired, and one flooding iteration takes one clock.
- Variable node: total T_v = L_v + Σ incoming check messages. The message
  back to a check is T_v minus that check's own message, saturated to 6 bits.
  Totals are 9 bits wide.
- Check node: plain min-sum. Each output takes the product of the other
  inputs' signs and the smaller of the two smallest magnitudes, excluding
  its own input.
- After `ITER` iterations (16) the hard decisions of the 2256 information
  bits are taken.

**Staging (`ldpc_decoder`).**

- A loader gearbox assembles codewords from 96 values per clock.
- The core decodes one codeword while the next one is being assembled. With
  `ITER` ≤ 23 it always finishes in time. `overflow` reports the opposite
  case.
- An unloader gearbox returns the information bits 96 per clock.
- From the last value of a codeword to its first output bits takes `ITER` + 4
  clocks.

## Measuring BER

With `prbs_mode` high, the payload comes from `prbs_source`: three PRBS-15
sequences, one per encoder lane, starting from seeds 1, 2 and 3. External
payload is then refused.

`ber_checker` runs the same three sequences at the three decoder outputs. It
adds up compared bits and bit errors in 56-bit totals (`ber_bits`,
`ber_errs`); 56 bits hold more than a day at 50 Gb/s. `ber_clear` restarts
the totals. The references start at reset, so the transmitter and receiver
must both be reset before a measurement.

## Top level (`pam4_dsp_top`)

The transmitter and receiver sit side by side on one clock, as they would on
one transceiver chip. The DAC, modulator, fibre, photodiode and ADC are
outside. Their signals are the ports:

- `tx_sym`: 128 two-bit symbol indices per clock, for the DAC.
- `rx_smp`: 256 signed 6-bit samples per clock, from the ADC.
- `rx_bits`, `rx_valid[d]`: 96 decoded bits per clock from decoder d.
- Status outputs:
  - `rx_lock`;
  - `rx_mu`: the timing delay;
  - `rx_mu_stage`: the LMS step;
  - `rx_stats_update`;
  - `rx_data_beat`: a payload beat reached the MLSE;
  - `rx_overflow`;
  - `tx_underrun`;
  - `tx_training`.

Samples are expected continuously once the frame has started.

| Parameter | Default | Meaning |
|---|---|---|
| `TRAIN_BEATS` | 256 | training beats after the marker beat |
| `ITER` | 16 | LDPC min-sum iterations |
| `MU_T1/T2/T3` | 256 / 1024 / 4096 | LMS updates before each halving of μ |

Fixed design constants (beat size, code geometry, level scale, interleaver
size) live in `pam4_pkg`.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
with a model written independently in the testbench and prints
`TB_RESULT checks=… failures=…`. Some notable ones:

- `tb_ldpc_encoder`: every parity check of the code holds for random words.
- `tb_ldpc_decoder`: codewords with flipped soft values come back error-free.
- `tb_dfe`: equalizes a dispersive channel model. The raw slicer makes
  thousands of errors; the adapted DFE makes none.
- `tb_mlse_sova`: on a channel with two symbols of memory, where a plain
  slicer fails, every decision must be right. The sign of every non-zero soft
  value must match the bit that was sent.

`tb_pam4_dsp_top` runs the whole design at its default parameters. A
behavioural link sits between `tx_sym` and `rx_smp`:

- triangular pulses of half-width 1.25 symbols, which give interference on
  both sides;
- two samples per symbol, a timing offset of 0.15 symbol and a delay of 77
  samples;
- impulse noise on every 2003rd sample, large enough to cause symbol errors.

The test checks every decoded bit of six codewords per decoder against what
was sent, and checks that the pattern matcher counted all of them without an
error. It also counts each mechanism and fails if any never occurs:

- frame lock;
- training then payload (the switch of the LMS reference);
- a change of the step size;
- channel-statistics updates;
- a non-zero timing correction;
- raw symbol errors that the LDPC decoders then correct;
- complete interleaver blocks;
- bits counted by the pattern matcher.

In a typical run, 33 raw symbol errors all disappear after decoding. The test
takes about half a minute with verilator. `tb_rx_dsp` runs the same link
directly on `tx_dsp` and `rx_dsp`, with external payload.

To simulate one testbench with plain verilator:

```
verilator --binary --timing --assert -j 8 --top-module tb_pam4_dsp_top \
    rtl/pam4_pkg.sv rtl/*.sv tb/tb_pam4_dsp_top.sv -o sim
./obj_dir/sim
```

Since the package file is listed first, verilator warns that it appears
twice; the warning is harmless. The smaller testbenches run in seconds.

## Where this design departs from the original and what it assumes

- **Code matrix.** The parity-check matrix of the original code is not
  published. This code has the same size, circulant size and rate, but its
  own shifts and a dual-diagonal parity part. Its error-correcting strength
  has not been compared with the original's.
- **Soft output.** The original uses a reduced-complexity SOVA that is not
  described. Here the soft value is the exact max-log value over the
  terminated block.
- **Interleaver beat width.** Termination removal delivers 288 soft values
  per beat to the de-interleaver instead of 256, so that a block is a whole
  number of beats (51).
- **Latency.** Block latencies differ from the original pipeline, which
  spent 391 clocks in total. This design registers most blocks once. Its
  MLSE takes 1 clock, where the original took 157. LDPC decoding takes
  `ITER` + 4 clocks after a codeword is complete. The long combinational
  paths that result would need pipelining to reach 218.75 MHz in silicon.
  The timing loop's delay is shorter here as well.
- **Own choices where the original gives no detail.** Those not already
  covered above:
  - the timing interpolator: linear, in 1/16 sample;
  - the training sequence and its length;
  - the step-size values after the first and their switch points;
  - the loop-filter gains;
  - the LLR scaling;
  - the number of LDPC iterations and the message widths.
- **Test setup.**
  - The transmitter and receiver share a clock.
  - In the original experiment the receiver processed captured sample
    blocks, not a live stream. Here the receiver runs continuously.
  - The read-out of the BER counters through a debug core is not included;
    the counters are ports.
- **Not included.** The analog and optical parts (DAC, modulator, amplifiers,
  fibre, dispersion-compensating fibre, photodiode, ADC) and the capture and
  UART path of the test setup.
