# Pipelined rate-1/3 convolutional coding chain with block interleaving and 64-QAM

This RTL is a complete forward-error-correction link for a noisy radio channel.
The transmitter protects each information bit with a rate-1/3, constraint-length-7
convolutional code. It spreads the code bits with a small block interleaver and
maps them onto a 64-QAM constellation. The receiver slices the received
constellation points back to bits, undoes the interleaving and recovers the
information with a hard-decision Viterbi decoder. The decoder is pipelined: each
clock starts a new phase of decoding, so a new frame can enter while earlier
frames are still being traced back.

The system follows a published FPGA design of the same chain (the
"non-systematic convolutional code + block interleaver + 64-QAM" system, with
generators taken from the LTE convolutional code family). The published
description gives the code, the trellis example, the interleaver shape, the
constellation labels, the port names and the idea of pipelining. It does not
give the internal organisation of the decoder, the framing or the number
formats. Those are this design's own choices and are marked as such below and in
each file's header.

```
 input_data ─► conv_encoder ─► block_interleaver ─► qam64_mapper ─► tx_data_out {I,Q}
                 3 bits/clk        6 bits/word          32-bit                │
                                                                       (channel, outside)
 output_data ◄─ viterbi_decoder ◄─ block_deinterleaver ◄─ qam64_demapper ◄─ rx_data_in {I,Q}
```

## The code

The encoder keeps the last six input bits in a shift register, so there are 64
trellis states. Each new bit `x(n)` produces three code bits:

```
y1 = x(n) ^ x(n-1) ^ x(n-2) ^ x(n-3) ^ x(n-6)      g1 = 1111001
y2 = x(n) ^ x(n-2) ^ x(n-3) ^ x(n-5) ^ x(n-6)      g2 = 1011011
y3 = x(n) ^ x(n-1) ^ x(n-2) ^ x(n-4) ^ x(n-6)      g3 = 1110101
```

The state is numbered with `x(n-1)` in bit 5 and `x(n-6)` in bit 0, so bit `x`
moves state `s` to `{x, s[5:1]}`. Starting from state 000000, the input 1 0 1 0
gives the code words 111 101 000 011 and the states 100000, 010000, 101000,
010100. This sequence is the reference example used throughout the testbenches.
The code word is carried as `{y1, y2, y3}` with y1 in bit 2. All of this is in
`conv_pkg`, which also provides `encode_bit()`, used by both the encoder and the
decoder's branch labels.

## Frames

The unit of work is a **frame of `FRAME_LEN` = 4 information bits**:

- 4 bits become 12 code bits;
- 12 code bits form one 4 × 3 interleaver block;
- one block becomes two 6-bit 64-QAM symbols.

The encoder returns to state 000000 after every frame. The decoder therefore
always starts from a known state and needs no tail bits. The price is that the
last bit of a frame is protected only by its own three code bits. Any two
different frames still differ in at least three code bits, because all three
generators tap `x(n)`. So a single bit error per frame is always corrected;
more errors are corrected when the pattern allows it.

Frames can follow each other back to back at one information bit per clock.
Every block has `valid_in`/`valid_out` strobes and gaps are allowed anywhere.
`reset` is **active low** and synchronous in every block (0 clears, 1 runs),
matching the published encoder's behaviour.

## Transmit chain

**`conv_encoder`** takes one bit per clock and registers the code word, so there
is one clock of latency. It also shows the state the code word came from
(`current_state`) and the state it moved to (`next_state`).

**`block_interleaver`** writes the code words as the rows of a 4 × 3 array. It
reads the array column by column (all y1 bits, then all y2 bits, then all y3
bits), six bits per clock, so each output word is one symbol. The example rows
111 101 000 011 give the stream 1100 1001 1101, sent as the words 110010 and
011101. Two block buffers alternate, so the next frame is written while the
previous one is read. A block is read in two clocks and written in four, so a
buffer is always free; an assertion guards this. The whole 12-bit block is
also output for one clock on `block_out`.

**`qam64_mapper`** uses natural-binary labels, as published, not Gray:

- bits [5:3] count the in-phase column from −7 to +7;
- bits [2:0] count the quadrature row from +7 down to −7.

So `I = 2·b[5:3] − 7` and `Q = 7 − 2·b[2:0]`. `data_out` is `{I, Q}`. Each half
is a signed 16-bit number with 8 fraction bits (level 1 = 256), so the low 8
bits of each half are always zero at the transmitter. The fraction bits let the
receiver take noisy values. The example symbols 110010 and 011101 map to
(+5, +3) and (−1, −3).

## Receive chain

**`qam64_demapper`** is a hard slicer. Each axis is rounded to the nearest odd
level. The thresholds are at 0, ±2, ±4 and ±6, and values beyond ±8 saturate to
the outer level. A value exactly on a threshold goes to the upper level. The
level indices give the bits back with the mapper's labelling.

**`block_deinterleaver`** is the mirror of the interleaver. It collects the two
words of a block and returns the four code words in their original order, one
per clock. It also uses two alternating buffers.

### The pipelined Viterbi decoder

This is the part of the design that takes the most understanding. The decoder
takes one received code word per clock. It must find the frame whose code words
are nearest in Hamming distance to the received ones. It must also accept the
next frame on the very next clock. A decoder that starts the next frame only
after finishing the last one would stall the link for the length of its
traceback. Instead, the work is split into stages, and each stage holds a
different frame:

| stage | clocks | what it does |
|---|---|---|
| ACS[0..3] | one per received word | **add-compare-select** for all 64 states. New state `ns` has two predecessors `{ns[4:0], b}`. For each, the path metric plus the Hamming distance to the branch label `encode_bit({ns[4:0],b}, ns[5])` is computed, the smaller is kept, and one decision bit records `b`. |
| BEST1 | 1 | the minimum final metric in each group of 8 states; a copy of all 4 × 64 decision bits of the frame is taken here |
| BEST2 | 1 | the minimum of the 8 group winners gives the end state of the survivor path |
| TB[0..3] | 1 each | traceback, newest step first: the decoded bit is bit 5 of the state, and the predecessor is `{state[4:0], decision}` |
| OUT | — | the frame is presented on `decoded_frame` (first bit in MSB) with `frame_valid`, then sent bit by bit on `output_data` |

Some points that are easy to miss:

- **Each trellis step has its own ACS bank.** ACS[k] handles word k of every
  frame and keeps its metrics until word k of the next frame, so ACS[k+1] can
  read them a clock later. Gaps in the input do not disturb this. This trades
  area for a datapath with no multiplexing of metrics. At the defaults it is
  about 4 × 64 add-compare-select units and about 1,600 flip-flops. The
  published design also reports that pipelining multiplies the register and
  LUT count.
- **Decisions travel with the frame.** ACS[0] is overwritten by the next frame
  one clock after the last word of the current frame. So BEST1 copies all the
  decisions, and they move down the traceback pipeline with their frame.
- **Start state and metrics.** Every state other than 000000 starts with
  metric 13 (`3·FRAME_LEN+1`), more than any real path can collect. Metrics are
  5 bits wide at the defaults (`METRIC_W = clog2(6·FRAME_LEN+2)`); nothing
  wraps, so no normalisation is needed.
- **Ties.** In ACS, predecessor `b = 0` wins a tie. In the best-state search,
  the lowest state number wins. Any of the tied frames is equally likely, so the
  decoder is a true maximum-likelihood hard-decision decoder for a frame. For
  example, the received word 110001010111 is at distance 4 from 0001, 1010 and
  1101 alike.
- **Latency and rate.** If the last word of a frame is sampled at clock edge c,
  `decoded_frame` is valid after edge c+6 and the first serial bit after edge
  c+7 (generally c+FRAME_LEN+2 and c+FRAME_LEN+3). One frame can be accepted
  every FRAME_LEN clocks, which is the arrival rate of the code words.

## End-to-end timing

In `conv_coding_top` with a zero-delay channel:

- a frame is on `output_decoded_data` **20 clocks** after its first information
  bit is sampled (16 after its last);
- the first serial bit follows one clock later;
- throughput is one information bit per clock.

The breakdown is: encoder 1, waiting for the block to fill 3, interleaver 1 + 1,
mapper 1, demapper 1, de-interleaver 1 + 3, decoder 1 + 6.

The published design reports 14 clock cycles for its pipelined version (24 for
the non-pipelined one) without saying where the count starts and ends. This
design does not reproduce that figure.

## Parameters

| module | parameter | default | meaning |
|---|---|---|---|
| conv_encoder, viterbi_decoder, conv_coding_top | `FRAME_LEN` | 4 | information bits per frame |
| viterbi_decoder | `METRIC_W` | 5 | path-metric width (derived) |
| block_interleaver / block_deinterleaver | `ROWS`, `COLS`, `OUT_W`/`IN_W` | 4, 3, 6 | array shape and word width |
| qam64_mapper / qam64_demapper | `IQ_W`, `FRAC` | 16, 8 | bits per I or Q, fraction bits |

In the top, the interleaver has one row per information bit (`ROWS =
FRAME_LEN`). `3·FRAME_LEN` must be a multiple of 6, so `FRAME_LEN` must be even.
The generators are package constants.

## Departures from the published design and open points

- The published description speaks of 63 trellis states. The trellis here has
  the 64 states a 6-bit register has.
- The framing is this design's own. The published material shows only single
  4-bit frames from reset. Frames here restart from the zero state, have no
  tail, and run back to back.
- The published material does not settle the number format of the mapper's
  `data_out`. The 16-bit, 8-fraction-bit format is a choice.
  Real part in the upper half follows "concatenated real and imaginary".
- The contents of each pipeline stage of the decoder are this design's own. The
  published design describes only the pipeline idea.
- The decoder has added ports beyond the published `decoder_input`, `clk`,
  `reset` and `output_data`: `valid_in`, `valid_out`, `decoded_frame` and
  `frame_valid`. The encoder has `valid_in` and `valid_out`. The interleaver
  has `block_out`.
- The channel (AWGN or Rayleigh) is not hardware and is not included. The top
  brings out `tx_data_out` and takes `rx_data_in`. The end-to-end testbench
  models additive noise only; fading is not modelled, and no BER curve is
  measured.
- The non-pipelined baseline decoder that the published work compares against is
  not included.
- Nothing here has been synthesised for an FPGA or timed. The published Virtex-6
  resource and frequency figures are not comparable to this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and a watchdog ends it if it hangs. The
expected values are computed independently of the RTL:

- `conv_encoder_tb`: the 1 0 1 0 trellis example (code words and states), then
  200 random frames with gaps against the three XOR equations. Also checks the
  one-clock latency and a reset in mid-frame.
- `block_interleaver_tb`, `block_deinterleaver_tb`: the published example in
  both directions, then 300 random blocks against a 2-D array model, back to
  back and with gaps. Also checks the output timing.
- `qam64_mapper_tb`: all 64 labels against the constellation, written as level
  tables.
- `qam64_demapper_tb`: all 64 points with random noise below one level, plus
  saturation and threshold ties.
- `viterbi_decoder_tb`: exhaustive maximum-likelihood search over all 16 frames.
  Covers 1,000 frames with 0 to 4 bit errors and the 4-error published received
  word. Checks exact decoding where it is guaranteed, the ML property
  everywhere, the FRAME_LEN+2 latency and the serial output.
- `conv_coding_top_tb` runs the whole system at its default parameters:
  - the published example end to end;
  - 300 frames over an ideal channel;
  - 1,500 frames over a noisy channel (about 5 % of symbols in error).

  For every frame it re-derives the received bits with its own nearest-point
  search and ML decoding, and it checks the 20-clock latency. It requires each
  of these to happen at least once: frames overlapping in the pipeline,
  interleaver ping-pong, corrected channel errors, a symbol error spread over
  several code words, and input gaps.

To run one with Verilator (from the directory holding `rtl/` and `tb/`):

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    rtl/conv_pkg.sv tb/conv_coding_top_tb.sv --top-module conv_coding_top_tb -o sim
./obj_dir/sim
```

Replace `conv_coding_top_tb` with any other testbench name. All of them finish
in seconds.
