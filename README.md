# Streaming CNN modulation classifier for an RFSoC receiver

This RTL classifies the modulation of a live radio signal (QPSK, BPSK,
QAM16, QAM64, 8PSK, PAM4, GFSK, CPFSK) straight after the ADC of an RFSoC
receiver. The stream is never paused. Every received sample goes through a
small convolutional network (the well-known 2 x 128 I/Q modulation-recognition
CNN: two convolutions and two dense layers, about 260k weights). Each frame of
128 complex samples gives eight class scores. The schedule is fixed, so the
latency is deterministic and the classifier can sit in a receive pipeline like
any other DSP block.

The main idea is to run the network on a clock 32 times faster than the
decimated sample rate, and to turn each convolution into a matrix-vector
product (the GEMM transform). A sliding-window controller reads a layer's
input buffer in "unrolled window" order and feeds parallel MAC units. That
order is the hardest part of the design and gets most of the space below.

## Signal path

```
ADC baseband, 128 Msps, 1 complex sample / clock
  |
decim_chain      two low-pass decimators (x8, x4) per I and Q  -> 4 Msps
  |
iq_interleave    I0 Q0 I1 Q1 ...  (one sample every 16 clocks)
  |
amc_cnn ------------------------------------------------------------+
  pingpong_burst_buffer  2 x 256 samples, frame out as a 256-clock burst
  conv1_layer   256-sample buffer, SWC, 64 MACs, ReLU   -> 252 x 64
  conv2_layer   64 channel buffers, SWC, 16x16 MACs, ReLU -> 124 x 16
  fc1_layer     vector buffer, 128 MACs, ReLU            -> 128
  fc2_layer     8 MACs, 8-beat AXI4-Stream of scores     -> DMA
+-------------------------------------------------------------------+
frame_capture    on an AXI4-Lite command, 128 decimated samples -> DMA
tx_playback_buffer   frame from DMA, replayed cyclically -> DAC path
```

`amc_top` wires all of this together on one clock (128 MHz in the reference
system). The RF data converter, the up-conversion on the transmit side, the
DMA engines and the processor are not part of the RTL. Their signals are
ports of `amc_top`.

## Rate budget: why the clock is 32x the sample rate

A convolution reads each input sample several times. For conv1, the input
is 2 rows of 128, the filter is 1 x 3, and there are 2 x 126 = 252 window
positions. That is 252 x 3 = 756 reads for 256 input samples, so the layer
needs ceil(756/256) = 3 clocks per input sample. Conv2 also needs 3. The
interleaver doubles the rate again. The minimum is therefore 3 + 3 + 2 = 8.
The design uses 32: the decimated complex rate is 4 Msps, the clock is
128 MHz, and one interleaved sample arrives every 16 clocks. A frame thus
takes 4096 clocks to arrive. Every layer finishes a frame in less time than
that: conv1 in 756 clocks, conv2 in 2976, fc1 in 1984 (hidden under conv2),
and fc2 in 128. The spare clocks let the dense layers share MACs.

| layer | parallel MACs | clocks per output | unrolled over |
|-------|---------------|-------------------|---------------|
| conv1 | 64            | 3                 | filters       |
| conv2 | 256 (16 x 16) | 24                | filters       |
| fc1   | 128           | 1984              | outputs       |
| fc2   | 8             | 128               | outputs       |

## The GEMM sliding-window controllers

Indices below are the ones the RTL uses. They also fix how trained weights
must be laid out (see "Weights").

**conv1.** The frame is held as `x[2*w + h]`, with `h` = 0 for I and 1 for Q
and `w` = 0..127. The controller visits window positions `p = 2*w + h`
(`w` = 0..125, with the I and Q rows of a column next to each other). For
each position it reads the three taps `x[2*(w+k) + h]`, k = 0..2, one per
clock. Each sample goes to all 64 MAC units, and unit `n` multiplies it by
`W1[n][k]`. After the third tap, the 64 sums become one 64-wide output
vector. One vector comes out every 3 clocks, 252 per frame.

**conv2.** Its input is the 64-channel, 2 x 126 map from conv1. The 64
channels of each position are stored side by side in one wide RAM word (an
array of 64 channel buffers with a common address), so a whole conv1 vector
is written in one clock. The filter is 64 x 2 x 3. The GEMM-transformed
input is 124 x 384. Each 384-element row is sent as 24 vectors of 16
samples, 2976 vectors per frame. For output column `w'` the controller
loops over:

- tap `t = 2*k + j` (k = 0..2 columns, j = 0..1 rows). It reads position
  `2*(w'+k) + j = 2*w' + t`.
- channel group `g` = 0..3, which selects channels 16g..16g+15 of that
  word.

Window element `e = 64*t + c` (c = channel) is thus processed in clock
`e / 16`, lane `e % 16`. There are 16 MAC groups, one per filter. Each
clock, every group multiplies the 16 samples by its 16 weights, adds them,
and accumulates. After 24 clocks each group holds one output, and the 16
outputs of a column leave together.

**fc1.** Conv2's 124 vectors go into a 124-word vector buffer. A reader
takes the 1984 samples out one at a time, in the order `r = 16*w' + f`
(column-major over the 16 x 124 map). Each sample goes to all 128 MACs.
The reader starts with the first vector and stalls when it catches up with
the writer, so fc1 runs in the shadow of conv2. It finishes about 16 clocks
after conv2's last vector.

**fc2.** fc1's 128 outputs are latched and fed one per clock to 8 MACs. No
transform and no buffer RAM are needed.

## Number format

- Activations are signed 16-bit at every layer boundary.
- Weights are signed `WBITS` bits: 16 by default, 8 and 4 also supported.
- Each layer keeps a 48-bit accumulator. Its output is
  `sat16(acc >>> SHIFT)`, followed by ReLU everywhere except the final
  scores. `SHIFT` defaults to `WBITS-1`, which treats weights as fractions
  in Q1.(WBITS-1).
- There are no biases.
- Softmax is left to the host. The hardware outputs the eight raw scores.
  The largest score is the predicted class.

If your trained model uses a different binary point, change each layer's
`SHIFT` parameter.

## Weights

Weights live in on-chip RAM. They are written after reset through one port
on `amc_cnn` / `amc_top`: `w_we`, `w_layer` (0 conv1, 1 conv2, 2 fc1,
3 fc2), `w_addr` and `w_data`, one weight per clock. The address maps are:

| layer | w_addr | PyTorch weight it corresponds to |
|-------|--------|----------------------------------|
| conv1 | `n*3 + k` | `conv1.weight[n, 0, 0, k]` |
| conv2 | `f*384 + 64*(2*k + j) + c` | `conv2.weight[f, c, j, k]` |
| fc1   | `n*1984 + 16*w + f` | `fc1.weight[n, f*124 + w]` (PyTorch flattens channel-major) |
| fc2   | `m*128 + j` | `fc2.weight[m, j]` |

A full load takes 261,312 clocks, about 2 ms at 128 MHz.

## Timing

| event | clocks |
|-------|--------|
| decimated pair out after its 32nd ADC input | 2 |
| interleaved I, then Q | 1, 2 after the pair |
| burst starts after a frame's last sample | 3 |
| conv1 first vector after the burst's last sample | 5, then one every 3 |
| conv2 first vector after conv1's last | about 26, then one every 24 |
| scores after fc1's result | 130 |
| frame's last interleaved sample to its scores | 4,142 (32.4 us) |

One classification comes out per 4096 clocks, 31.25k per second at
128 MHz. Every block has a sticky `overrun` flag that is set if data
arrives faster than this schedule allows. At the intended rates it stays
low, and the testbenches check that it does.

## Data-set generation and monitoring helpers

- **`tx_playback_buffer`** receives a frame of up to 4096 complex samples
  over AXI4-Stream. Each word is `{Q, I}`, and `tlast` marks the end and
  sets the length. After a `start` pulse it replays the frame cyclically,
  one sample per clock with `sample_en` high, until a `stop` pulse. It
  pulses `wrapped` each time the replay restarts from the first sample.
- **`frame_capture`** has an AXI4-Lite register file with two registers:
  - `0x0` CTRL: writing bit 0 arms a capture.
  - `0x4` STATUS: bit 0 is busy, bits 31:16 count captured frames.

  After arming, it stores the next 128 decimated samples. It then sends
  them as `{Q, I}` words on AXI4-Stream, with `tlast` on the last one.

## What follows the reference architecture and what is this design's own

These follow the reference architecture:

- the network dimensions
- the 32x clock ratio and the 256-sample ping-pong burst buffer
- the GEMM sliding-window structure
- the MAC counts and clocks per output of every layer
- 16-bit activations with 16/8/4-bit weights, and no biases
- the decimate-by-32 chain with identical I and Q filters
- cyclic transmit playback, and the 128-sample capture on a processor
  command

These are this design's own choices:

- the decimation split (8 x 4) and its taps: Hamming-windowed sinc, 16 and
  48 taps, cut-off 4 MHz and 1.5 MHz
- the I-before-Q interleave order
- the window element orders above
- starting each convolution only once its whole frame is buffered, while
  fc1 overlaps with conv2
- the binary point (`SHIFT`)
- the weight load port
- the stream and register formats
- the asynchronous active-low reset

The filter taps are in `amc_pkg`, together with the formula that produces
them.

The measured latency, 32.4 us, is a little above the 29.6 us reported
for the original implementation. The reason is that conv1 and conv2 here
wait for complete frames before starting.

The original system put three models (16-, 8- and 4-bit weights) side by
side for comparison. `amc_top` holds one. Instantiate `amc_cnn` with other
`WBITS` values to compare them.

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M`. Each one compares
its block with an independent reference: the `amc_ref_pkg` model computes
every layer from its mathematical definition. Each testbench also checks
cycle counts where the architecture fixes them. A typical run:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -y rtl -y tb \
  rtl/amc_pkg.sv tb/amc_ref_pkg.sv tb/tb_amc_top.sv --top-module tb_amc_top
./obj_dir/Vtb_amc_top
```

- `tb_amc_top` runs the whole system at its default sizes. It loads all
  weights, drives two frames of ADC samples at one per clock, and checks
  both classifications against the decimator and network models. It also
  checks a frame capture over AXI4-Lite and a transmit replay with
  wrap-around and stop, and counts every mechanism: bursts, conv vectors,
  fc1 stalls, stream backpressure, capture, replay wrap.
- `tb_amc_cnn` runs three frames through the 16-, 8- and 4-bit models
  side by side, and checks that the latency is the same for every frame.
- Each block has its own `tb_<module>`.

Compiling the full-size designs takes a few minutes, because of the large
fc1 weight RAM. The simulations themselves take seconds.

## Files

- `rtl/amc_pkg.sv`: sizes, types, requantisation, filter taps, stand-in
  weight pattern
- `rtl/decim_fir.sv`, `rtl/decim_chain.sv`: decimation
- `rtl/iq_interleave.sv`, `rtl/pingpong_burst_buffer.sv`: CNN input
- `rtl/conv1_layer.sv`, `rtl/conv2_layer.sv`, `rtl/fc1_layer.sv`,
  `rtl/fc2_layer.sv`: the network
- `rtl/amc_cnn.sv`: the model
- `rtl/tx_playback_buffer.sv`, `rtl/frame_capture.sv`: data-set and
  monitoring helpers
- `rtl/amc_top.sv`: the system
- `tb/amc_ref_pkg.sv`: reference model
- `tb/tb_*.sv`: testbenches
