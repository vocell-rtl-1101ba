# Vocell digital back end: a hierarchical speech-triggered wake-up chain

An always-on voice interface wastes most of its energy when it runs its
largest classifier on silence. This RTL builds the digital half of a wake-up
SoC that avoids this by running its stages one after the other, each
waking the next only when needed:

1. **Sound detection (SD).** A few adders measure the signal energy of every
   half window. Only when sound is present does the rest of the chip wake up.
2. **Keyword spotting (KWS).** A feature extractor computes MFCCs with first
   and second time derivatives every 16 ms. A small LSTM network classifies
   each frame into one of up to 16 classes, and class 0 means "no keyword".
3. **Speaker verification (SV).** Once a keyword is heard, a GMM-UBM scorer
   checks over about half a second of speech whether the speaker is the
   enrolled one.

A configurable master FSM decides which of these stages run (KWS only, SV
only, KWS then SV, or KWS and SV together). The architecture follows the
Vocell chip, a 65 nm wake-up SoC running at 250 kHz on 16 kHz audio. The
register map, number formats, memory layouts and several internal details
are this implementation's own. They are marked as such below and in the
opening comment of every file.

```
 ADC (10b, 8x) -> decimator -> 16 kHz samples -+-> sound_detector --start--> control_unit
                                               |                               | en_fex/en_kws/en_sv
                                               +-> fex: audio_buffers -> dft_engine -> |X| -> mel_filter
                                                        -> log_lut -> dct_unit -> delta_unit
                                                              | 39-D KWS vector        | 60-D SV vector
                                                              v                        v
                                                         lstm_accel               gmm_accel
                                                      (keyword, class)       (accept / reject)
```

## Sound detector and the audio path

`decimator` turns the 8x oversampled ADC words into 16 kHz samples by
averaging each group of eight. The boxcar filter is this implementation's
choice, because no decimation filter is specified.

`sound_detector` sums |x| over each half window into one of three rotating
registers. At the end of a half window it adds the newest register to the
previous one, which gives the energy of a full window that overlaps the
previous window by half. It then compares that energy with the threshold
E_th. A hangover counter keeps `sound` high for L_h frames after the last
loud frame, so short pauses inside a word do not shut the chain down. The
half-window length follows the DFT size, so one "frame" is one hop of the
feature extractor.

## Feature extractor (`fex`)

This is the most involved part. Its FSM runs the following steps once per
hop, and only while the master FSM has it enabled.

**Window buffering.** `audio_buffers` has three buffers of up to 512
samples. One fills while the other two, the previous two half windows,
form the current window.

**Real DFT through a half-size complex DFT.** A window of N = 2M real samples
is packed as M complex values: even samples go to the real part and odd
samples to the imaginary part. `dft_engine` transforms them, and the
real spectrum is then recovered as

    X_k = 1/2 [ (Z_k + Z*_{M-k}) - j (Z_k - Z*_{M-k}) W_N^k ],  k = 0..M-1

which roughly halves the work.

`dft_engine` is an in-place radix-2 decimation-in-frequency transform:
- It uses one `dft_butterfly` and two dual-port compute memories. Each stage
  reads one memory and writes the other, like a ping-pong pair.
- The butterfly halves its outputs at every stage, so the result is the
  DFT divided by M and cannot overflow 10 bits.
- The outputs come out in bit-reversed order, and the FSM undoes that when
  it reads them.
- It takes logm·(M/2+1) cycles: 2313 for M = 512, and 1032 for the default
  M = 256.
- Twiddles (`twiddle_rom`) are 12-bit with 10 fractional bits. They are
  computed at elaboration from cos/sin.

**Magnitude.** |X_k| ≈ max(|re|,|im|) + min(|re|,|im|)/2. This costs no
multiplier and is an own choice. No analysis window is applied, and bin M
(Nyquist) is dropped.

**Mel filter bank with two weights per bin.** In a triangular filter bank
each DFT bin feeds at most two neighbouring filters. So `mel_filter` stores
one 29-bit row per bin instead of a full bins×filters matrix:

| bits  | field | meaning |
|-------|-------|---------|
| 28:24 | `hi`  | highest filter index the bin contributes to |
| 23:12 | `w0`  | weight for the even-numbered filter of the pair |
| 11:0  | `w1`  | weight for the odd-numbered filter of the pair |

The pair of filters is {hi, hi-1}. A `hi` of 0 means only filter 0. Weights
are unsigned with 11 fractional bits, so 2048 is 1.0. There are up to 32
filters, and the bank should be a power of two in size.

**Logarithm.** Each mel energy is shifted right by `mel_shift`, saturated
to 10 bits and used as the address of `log_lut`. That table holds
round(64·log2 a), so the result has 6 fractional bits.

**DCT.** `dct_unit` computes up to 32 DCT-II coefficients with one
multiply-accumulate unit and a 128-entry cosine table. It takes N·n_mfcc
cycles, and coefficient 0 is scaled by 1/√2. The outputs are shifted by
`dct_shift` and saturated to 8 bits.

*Departure:* the original chip runs the DCT on the DFT engine. It reorders
the inputs (even ones first, odd ones reversed), runs a complex DFT and
rotates each bin by e^{-jπk/2N}. That engine keeps 10-bit words and halves
them at every stage. The log energies reach 640, and a 32-point transform
has five stages, so computing the DCT through it would lose about two bits
of every MFCC. The separate unit is exact, and it costs 1024 cycles of the
hop at 32 MFCCs.

**Derivatives and the two feature vectors.** `delta_unit` keeps nine frames
of MFCCs. Δ is the 9-tap filter [-1 -1 -1 -1 0 1 1 1 1] and ΔΔ applies
[-1 0 1] to Δ. Both saturate to 8 bits. The outputs describe the frame five
hops before the newest one. The unit builds two vectors:
- **KWS:** MFCC 0..12 with their Δ and ΔΔ, 39 values.
- **SV:** MFCC 0..7 plus the pairwise means of MFCC 8..31, which gives 20
  values. With Δ and ΔΔ that makes 60.

A window that arrives while the extractor is still busy is skipped and
counted in `windows_dropped`. At the default size one frame takes about
2600 of the 4000 cycles in a hop, so no window is skipped in real time.

## Keyword spotting LSTM (`lstm_accel`)

The accelerator runs one or two LSTM layers of up to 64 cells each. The
second layer takes the first layer's h_t as its input. One or two fully
connected layers follow, and the first of two has n_hid tanh outputs:
- Gates f, i, o and g each have their own processing element. Each PE has
  two multipliers and a 32-bit accumulator.
- All four PEs read one 64-bit word from the 32 kB model memory (4096
  words) per cycle. That word holds two weights for each of the four gates.
- For one neuron, the dot product runs over an operand vector that ends in
  a constant 1. That 1 multiplies the bias, which is stored as one more
  weight. The vectors are:
  - layer 1: [x (n_dim), h1_{t-1}, 1];
  - layer 2: [h1_t, h2_{t-1}, 1];
  - first FC layer: [h_t, 1];
  - second FC layer: [hidden (n_hid), 1].
- `pwl_act` is an 8-segment piecewise-linear sigmoid/tanh with corners at
  -4..4.
- Separate multipliers then form c_t = f·c + i·g and h_t = o·tanh(c_t).
- The FC layers reuse the four PEs for four outputs at a time. The class
  with the highest score wins, and `keyword` is 1 unless class 0 wins.

Weights are either 8-bit, or 4-bit codes that a 16-entry table (`nlq=1`)
decodes to 8 bits. All values are Q2.5, which covers -4..+3.97.

Memory layout (own choice):
- The blocks come in this order: layer-1 neurons, layer-2 neurons, first FC
  layer, second FC layer.
- For an operand vector of `len` elements, each neuron takes
  P = ceil(len/2) words.
- In 8-bit mode, byte 2·gate+e of word t is the weight of gate
  (f,i,o,g = 0..3) for element 2t+e.
- In 4-bit mode a neuron takes ceil(P/2) words, each holding two such
  half-words. Half t[0] is used, and each half has nibble 2·gate+e.
- An FC layer takes one such block per group of four outputs, and byte
  2·output+e holds the weight.

A frame takes about n_neur·(P+7) cycles per LSTM layer, plus
ceil(outputs/4)·(P+2) per FC layer. For 39 inputs, 64 cells and 16
classes with one layer of each, that is 3917 cycles, just inside the
4000-cycle hop. A second 64-cell layer roughly doubles this. It then fits
only at a faster clock or with fewer cells.

## Speaker verification GMM (`gmm_accel`)

The score is the log-likelihood ratio log2 P(x|speaker) − log2 P(x|UBM).
P is a sum over Gaussians. The work is kept in the log domain by storing,
for each Gaussian m and dimension d:
- μ as 8-bit signed, like the features;
- σ' = 1/(√(2 ln 2)·σ) as unsigned Q2.6;
- a log2 weight w' that includes the normalising constant, with 6
  fractional bits.

The log-probability of one Gaussian is then

    lp = w' − Σ_d ((f_d − μ_d)·σ'_d)²

The parts of the scorer:
- **Eight vectors at once.** Each μ/σ' pair is read once and shared by
  eight `gauss_accel` units, one per feature vector of a batch. This cuts
  model-memory reads by eight.
- **Early abort.** A unit drops its Gaussian as soon as one normalised
  distance |f−μ|·σ' exceeds Dist_th. The default Dist_th is 4.25, stored
  as 272.
- **Skipping.** When all eight units have dropped, the controller moves to
  the next Gaussian without reading the rest of its dimensions. Such
  Gaussians are counted in `gauss_skips`.
- **Floating-point sum.** `gauss_accum` adds 2^floor(lp) to a float with a
  16-bit mantissa, one per vector. At the end of a model it returns log2 of
  the sum, again with 6 fractional bits.

The memories are:
- model memory: 32768 × 16 bit {μ, σ'}. Gaussians are stored one after
  another (Gaussian-major), the speaker model first and the UBM after it.
- weight memory: 512 × 16 bit.
- feature buffer: 32 frames of the 60-D SV vector.

A decision covers `n_batch` batches of 8 frames (default 4, i.e. 0.5 s).
It accepts when Σ LLR > th·frames. At the default size, with nothing
skipped, one batch costs 2·256·60 = 30720 cycles against 32000 cycles of
audio.

## Master control (`control_unit`)

| state  | runs            | leaves on |
|--------|-----------------|-----------|
| IDLE   | SD only         | sound → KWS if act_kws; else sound → SV if act_sv |
| KWS    | FEx + LSTM      | keyword → KWS+SV if act_kws_sv, else → SV if act_sv; sound gone → IDLE |
| SV     | FEx + GMM       | ready → KWS if act_kws, else → IDLE |
| KWS+SV | FEx + LSTM + GMM| ready → KWS |

The following are this implementation's additions:
- returning from KWS to IDLE when sound ends;
- returning from SV to IDLE when KWS is off;
- giving act_kws_sv priority over act_sv.

Entering KWS from IDLE clears the LSTM state. Entering SV clears the GMM's
frame buffer and its running sum.

## Configuration interface (`vocell_top`)

The original chip is configured through SPI. This RTL instead has a plain
write bus: `cfg_we`, `cfg_sel`, `cfg_addr` and `cfg_wdata[63:0]`.

| cfg_sel | target | addr | data |
|---------|--------|------|------|
| 0 | registers | index below | value |
| 1 | LSTM model memory | word 0..4095 | 64-bit word |
| 2 | NLQ table | code 0..15 | signed 8-bit weight |
| 3 | mel weight memory | bin 0..511 | 29-bit row |
| 4 | GMM model memory | 0..32767 | {μ[15:8], σ'[7:0]} |
| 5 | GMM weight memory | Gaussian 0..511 | signed w' |

| reg | field | reset |
|-----|-------|-------|
| 0 | {act_kws_sv, act_sv, act_kws} | 3'b011 |
| 1 | E_th | 20000 |
| 2 | L_h (frames) | 8 |
| 3 | log2 M (complex DFT points; window = 2M) | 8 |
| 4 | mel filters | 32 |
| 5 | mel shift | 8 |
| 6 | MFCCs computed | 32 |
| 7 | DCT shift | 4 |
| 8 / 9 / 10 | LSTM inputs / neurons / classes | 39 / 64 / 16 |
| 11 | NLQ on | 0 |
| 12 / 13 / 14 / 15 | Gaussians per model / dimensions / models / batches | 256 / 60 / 2 / 4 |
| 16 | Dist_th (6 fractional bits) | 272 |
| 17 | SV threshold th (6 fractional bits, signed) | 0 |
| 18 / 19 / 20 | second LSTM layer / hidden FC layer / hidden FC outputs | 0 / 0 / 32 |

Outputs:
- `state`, `sound_detected` and `feat_valid`;
- `kws_done` with `keyword` and `kws_class`;
- `sv_ready` with `sv_accept`;
- two counters, `windows_dropped` and `gauss_skips`.

The analog front end (amplifier, filter and SAR ADC) is not part of this
RTL. Its 10-bit samples enter on `adc_data` and `adc_valid`.

## Timing budget

The design uses one clock. At 250 kHz with 16 kHz audio there are 4000
clocks per 16 ms hop. The testbenches use 16 clocks per sample, which is
4096 per hop. The FEx and the LSTM form a pipeline, since the LSTM works
on the previous vector while the FEx computes the next one. Each must
finish within one hop; the GMM must finish one batch within eight hops.

| block (default size) | cycles | budget |
|---|---|---|
| feature extractor, 512-sample window | 2613 | 4000 per hop |
| LSTM 39→64→16 | 3917 | 4000 per hop |
| GMM batch, 2×256 Gaussians × 60 dims | ≤ 30720 (23178 in the test, with skipping) | 32000 per 8 hops |

## Departures and limits

- The DCT has its own MAC unit instead of reusing the DFT engine.
- The hidden FC layer uses tanh, and the LSTM's element-wise products have
  their own multipliers instead of reusing the PE array.
- The DFT takes logm·(M/2+1) cycles: 2313 for a 512-point complex DFT,
  against 2048 reported for the original engine.
- There is an explicit load pass from the audio buffers into the compute
  memory.
- These are unspecified in the original and chosen here: the decimation
  filter, the magnitude approximation, the absence of a window function,
  all fixed-point formats, both memory layouts, the register map and the
  SV decision rule (threshold on the mean LLR over n_batch batches).
- Memories are plain arrays and are not mapped to SRAM macros. There is no
  clock gating.

## Simulation

Every block has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing -Wno-fatal --timescale 1ns/1ps -y rtl -y tb \
  rtl/vocell_pkg.sv tb/tb_dft_engine.sv --top-module tb_dft_engine
./obj_dir/Vtb_dft_engine
```

What the testbenches cover:
- **Unit testbenches** compare against reference models computed
  independently in the testbench. Examples are a bit-exact DFT model, the
  real DCT, the LSTM and GMM fixed-point models, and the floating-point
  accumulator. They also check the cycle counts where a rate matters.
- **`tb_vocell_top`** runs the whole chain at a reduced size that it sets
  through the registers:
  - a 32-sample window, 8 mel bands, a 4-neuron LSTM and 4 Gaussians per
    model;
  - tones that do or do not trigger a keyword, in the modes KWS→SV,
    KWS+SV, SV-only, overload, and a two-LSTM-layer, two-FC-layer
    network.
  - It counts every mechanism (detections, hangover frames, every FSM
    transition, keyword and non-keyword frames, accepts, rejects, skipped
    Gaussians, dropped windows) and fails if one never happened.
- **`tb_vocell_full`** keeps every register at its reset value, which is
  the full size: 512-sample windows, 32 mel bands, 64 LSTM neurons and
  256 Gaussians per model. It runs about 2.4 s of audio through
  IDLE → KWS → SV → KWS → IDLE. It checks the real-time budget above, the
  keyword decisions and the SV decisions.

The models in the system testbenches are built by hand so that the
expected outcome is known. For example, one LSTM neuron follows the sign
of MFCC 1, and the UBM is the speaker model with a log weight 4 lower.
They are not trained networks, so they show that the datapath works, not
what accuracy it reaches.
