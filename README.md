# Isometric residual-binarized CNN accelerator (CIFAR-10 network)

This is a streaming FPGA-style accelerator for a binarized convolutional network.
Its weights are single bits. Its activations are *residual-binarized*: each
activation carries M bits, one per level.
In the residual scheme that this design improves on, every level has its own
trained fractional scale factor. Each processing element then needs several
fixed-point multipliers (DSP blocks), and the DSPs run out long before the
logic does.

This design makes the level factors **isometric**. One trained factor γ is shared
by all levels: level i uses γ / 2^(i-1). During weight conversion every scale
is folded into the batch-norm parameters, so γ becomes the integer
2^(M-1). After that:

* multiplying by a level factor is a left shift, which is just wiring;
* each processing element needs **one** multiplier (by the batch-norm scale α)
  and **one** accumulator, whatever M is;
* all M levels of an activation are processed in the same cycle (initiation
  interval 1 instead of M). The cost is M popcounts per element instead of one;
* the encoder that makes the next layer's M bits needs only M+2 bits of the
  thresholded value.

Between layers the stream is cut to the next layer's SIMD width as early as
possible ("adaptive bit width"). The sliding-window line buffers, max-pooling
buffers and FIFOs are then only as wide as the lanes that consume them.

The top level, `rebnet_cnv`, is the CIFAR-10 / SVHN network. It uses the
per-layer parallelism chosen for a small Zynq-7020-class device, with M = 2.

## Number formats: from popcount to the next layer's code

This is the part that needs the most care when you change anything.

**Activation codes.** An M-bit code `c` (bit M-1 is level 1) stands for the
value `e = Σ 2^j (2 b_j − 1) = 2c − (2^M − 1)`. For M = 2 that gives codes 0..3
for the values −3, −1, +1, +3. The code grows with the value. This is why max
pooling can compare codes as unsigned numbers.

**First layer.** The first layer takes raw 8-bit RGB values x and works on
`2x − 255`. Read as 8 bit planes with factors 2^j, the pixel is *exactly*
`Σ 2^j (2 b_j − 1) = 2x − 255`. So the first layer uses the same datapath with
`M_IN = 8`: an 8-plane XNOR/popcount, and no special arithmetic. A binary
(MNIST-style) input would be `M_IN = 1`.

**Processing element** (`pe`). Each cycle, for every bit plane j of the SIMD
activations:

    XnorPopcount_j = 2 · popcount(~(plane_j ^ weights)) − SIMD
    sum            = Σ_j XnorPopcount_j << j          (adder tree)
    acc           += sum                               (16-bit signed)

After the last synapse fold of a neuron:

    y = acc · α − (τα << 4)

Here α is 24-bit signed with 12 fractional bits, and τα is 24-bit signed with 8
fractional bits. The shift by 4 lines τα up with the 12 fractional bits of the
product. y is 40 bits wide with 12 fractional bits.

**Encoder** (`rb_encoder`). The encoder keeps the sign, the M least significant
integer bits and a constant 0.5 fraction. If a higher integer bit disagrees with
the sign, the M bits saturate: all ones when y is positive, all zeros when it is
negative. The levels are then resolved one after the other:

* level 1 gives `b = (r ≥ 0)`;
* the residual r then moves by ∓2^(M−i) for the next level.

Arithmetically this is

    code = clamp( floor(floor(y / 4096) / 2) + 2^(M−1), 0, 2^M − 1 )

which is the formula the testbenches check against.

**What the weight converter must provide.** The accelerator only sees bits,
α and τα. Offline, the software that prepares the parameters must:

* flip weights and batch-norm means where the batch-norm γ is negative, so
  that α > 0;
* scale γ, β by the layer's own factor 2^(M−1)/γ_e, and μ, σ by the previous
  layer's factor (1 for binary input, 255 for raw RGB input);
* compute τ and α from the scaled values, and store τα and α in the formats
  above.

The last layer has no batch norm. It streams out raw accumulator sums.

## The CIFAR-10 dataflow

The network below was recovered from the per-layer Fold counts. All nine Folds
match exactly, using unpadded 3×3 convolutions:

| layer | operation          | input map | MW (synapses) | MH (neurons) | PE | SIMD | Fold / image |
|------:|--------------------|-----------|------:|-----:|---:|-----:|------:|
| 1 | conv 3×3           | 32×32×3   | 27   | 64  | 16 | 3  | 32400 |
| 2 | conv 3×3, then maxpool 2×2 | 30×30×64 | 576 | 64 | 32 | 32 | 28224 |
| 3 | conv 3×3           | 14×14×64  | 576  | 128 | 16 | 32 | 20736 |
| 4 | conv 3×3, then maxpool 2×2 | 12×12×128 | 1152 | 128 | 16 | 32 | 28800 |
| 5 | conv 3×3           | 5×5×128   | 1152 | 256 | 4  | 32 | 20736 |
| 6 | conv 3×3           | 3×3×256   | 2304 | 256 | 1  | 32 | 18432 |
| 7 | dense              | 256       | 256  | 512 | 1  | 4  | 32768 |
| 8 | dense              | 512       | 512  | 512 | 1  | 8  | 32768 |
| 9 | dense (no threshold) | 512     | 512  | 16 (10 used) | 1 | 1 | 8192 |

Each layer (`layer_stage`) is:

    [SWU] → MVTU → width converter → FIFO → [maxpool] → next layer

The layers all run at once. Once the pipeline is full, one image completes every
max(Fold) = **32768 cycles**, which is about 3050 images/s at 100 MHz. In
simulation the first image's scores appear about 145k cycles after its first
pixel.

The FIFO in front of each dense layer holds a whole input vector of that
layer (64, 64 and 512 beats). Without this, the layer before a dense layer
stalls while the dense layer is busy, and the image interval grows by about
half. Between convolutional layers the FIFOs are 32 beats (`FIFO_DEPTH`).

### MVTU folding

An MVTU has PE processing elements with SIMD lanes each. A vector of MW
elements takes:

* SF = MW/SIMD synapse folds;
* NF = MH/PE neuron folds;
* SF·NF cycles in all, at one cycle per step.

During neuron fold 0 the SF input beats are taken from the stream and saved in
an input buffer. The other neuron folds replay the buffer. Neuron n is computed
by PE `n mod PE` in fold `n / PE`. Its weights are at word `(n/PE)·SF + sf` of
that PE's weight memory, and its threshold entry is at address `n/PE`. Every
neuron fold emits one beat of PE results. The pipeline has three stages (issue
and memory read, accumulate, multiply and encode), and all of it stalls while
an output beat waits.

MW and MH must be multiples of SIMD and PE. Pad a layer with neutral "bubble"
neurons and synapses in the parameters if they are not.

### Stream layout

* A beat carries lanes of EW bits. Lane s is `data[s*EW +: EW]`, and EW is M
  (8 for RGB pixels).
* A pixel of C channels is C/SIMD consecutive beats. Channel c is in beat
  c/SIMD, lane c mod SIMD.
* The sliding window unit (`swu`) stores K+1 lines in **one** memory of
  SIMD·EW bits. K lines are read while the next line is written. For every
  output pixel it emits K·K·C/SIMD beats in (ky, kx, channel part) order, which
  is also the synapse order of the convolution weights, `k = (ky·K + kx)·C + c`.
  Between images it does not wait for the next image to start. Stride is 1 and
  there is no padding.
* `maxpool` keeps the running maxima of one output row. Its stream is already
  at the next layer's SIMD width.
* `width_conv` packs or splits beats between PE·M and SIMD·M bits, with the
  first beat in the low bits. When the widths are equal it is plain wires.

## Using the top level

Ports of `rebnet_cnv` (parameters `M = 2`, `FIFO_DEPTH = 32`):

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock and asynchronous active-low reset |
| `img_valid/ready/data[23:0]` | in | one pixel per beat, row-major, `{B,G,R}` raw 0..255 |
| `res_valid/ready/data[15:0]` | out | 16 signed scores per image, classes 0..9 then padding |
| `cfg_we, cfg_layer[3:0], cfg_kind, cfg_pe[15:0], cfg_addr[31:0], cfg_data[63:0]` | in | parameter writes |

All streams are valid/ready: a beat moves on a clock edge where both are high.

To load the parameters, do one write per cycle before sending images, to layer
`cfg_layer` = 1..9:

* `cfg_kind = CFG_WEIGHT` writes `cfg_data[SIMD-1:0]` into PE `cfg_pe` at word
  `cfg_addr = nf·SF + sf`. Bit s is the weight of synapse `sf·SIMD + s`, and
  1 means +1.
* `cfg_kind = CFG_THRESH` writes `{α, τα}` = `cfg_data[47:0]` for neuron fold
  `cfg_addr` of PE `cfg_pe`.

The whole network is 1,545,920 weight bits. Loading it takes about 112k writes.

## Simulating

Every testbench checks itself and prints `TB_RESULT checks=N failures=F`. Build
and run one with plain verilator from the folder that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Irtl -Itb rtl/rebnet_pkg.sv tb/tb_rebnet_cnv.sv \
              --top-module tb_rebnet_cnv -o sim && ./obj_dir/sim

| testbench | what it checks |
|-----------|----------------|
| `tb_rebnet_cnv` | Full-size network, default parameters, 4 random images with a hash-generated random network. All 64 scores are compared with a behavioural model. The image interval must equal the largest Fold (it measures exactly 32768). Fails if result back-pressure, inter-layer stalls, a full line buffer, input-buffer replay, width conversion, pooling or encoder saturation (both ends) never happened. About 40 s. |
| `tb_rebnet_cnv_m3` | The same test with `M = 3` passed to the top (codes 0..7). About 65 s. |
| `tb_mvtu` | Small MVTU (and its raw-sum variant) against a matrix model. Initiation interval 1, random stalls. |
| `tb_pe` | Sums, codes and the two-cycle latency, with the enable dropped at random. |
| `tb_rb_encoder` | M = 2 and 3 against the closed formula, including saturation. |
| `tb_swu`, `tb_maxpool`, `tb_width_conv`, `tb_stream_fifo`, `tb_popcount` | Each stream block against a reference, with random gaps and stalls. |

## How far to trust it, and where it departs

* Everything above is checked bit-exactly against models written from the
  arithmetic in this file. Nothing has been checked against trained
  CIFAR-10 weights: the parameters are random. No timing or area results exist
  for this RTL.
* The network shape was inferred from the per-layer Fold counts. This includes
  the unpadded convolutions and the 10 outputs padded to 16.
* The first layer's `2x − 255` is computed as an 8-plane isometric input. This
  is an implementation choice that gives exactly the same sums.
* Max pooling compares codes as unsigned numbers. This is correct only when the
  converter has made every batch-norm scale positive, as described above.
* The host side is not included. In a system, an AXI4-Lite slave would load the
  parameters and start the accelerator, and an AXI4 master would fetch images
  and write results. Here the top exposes the streams and a plain write port
  instead.
* FIFO depths, the pipeline registers, reset behaviour, stream bit order and
  the valid/ready handshake are this design's own choices.
* The top defaults to M = 2. `M = 3` is one parameter on the top, with the same
  parallelism, and `tb_rebnet_cnv_m3` runs the full network with it. The
  weight memories stay the same; the streams get wider.
* The SWU supports stride 1 only.
* The MNIST network (all dense) and the ImageNet network are not built as tops.
  The MNIST one could be put together from `layer_stage` instances with
  `CONV = 0` and a first layer of `M_IN = 1`.

## Files

`rtl/rebnet_pkg.sv` holds the shared formats (`thr_t`, `cfg_kind_e`).

The blocks are:

* `popcount`
* `rb_encoder`
* `pe`
* `mvtu`
* `swu`
* `maxpool`
* `width_conv`
* `stream_fifo`
* `layer_stage` (one layer's chain)
* `rebnet_cnv` (the top)

Each has a testbench `tb/tb_<name>.sv`, except `layer_stage`, which is covered
by the top-level tests.
