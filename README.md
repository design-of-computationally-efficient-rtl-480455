# A small-footprint CNN forward-pass library

This is RTL for the inference ("forward pass") half of a convolutional
neural network, meant for devices with little logic. Training happens
elsewhere. The hardware only applies learned weights. Every layer is
reduced to a few repeating operations: multiply, add, compare and divide.
Each operation is then built from a small set of elements: registers, an
accumulator, multiplexers and a few gates. One copy of a unit is reused
over time rather than copied per element. That keeps area small and costs
cycles.

The library has the layers a classifier needs:

- a 2D convolution
- ReLU
- a rescaling step that keeps numbers in a short fixed width
- max pooling
- a fully connected layer, built from the convolution
- softmax

`cnn_forward` chains one of each into a complete, if tiny, network.

```
img 6x6 ─► conv2d 3x3 ─► ReLU ─► scale_approx ─► maxpool 2x2 ─► fc_layer ─► softmax ─► probs
 (4-bit)   (16-bit sums)         (back to 4-bit,   (2x2 map)    (4 scores)  (exp LUT +
                                  shared shift)                              divider)
```

## Numbers and tensor packing

Read this section first. Most surprises come from here.

- **Element width.** Tensors travel as flat bit vectors of signed
  `DATA_W`-bit elements. The default is 4 bits, so a 4x4 tensor is one
  64-bit word. Scalar arithmetic blocks (`accumulator`, multipliers,
  `relu`, `comparator`) default to 16-bit operands. Every width is a
  parameter.
- **Packing.** Element (r,c) of an M x M tensor sits at bit offset
  `(M*M-1-(r*M+c))*DATA_W`, so element (0,0) is the most significant. The
  word `0x0123456789abcdef` is the 4x4 matrix
  `[[0,1,2,3],[4,5,6,7],[8,9,a,b],[c,d,e,f]]`. Filters and output maps use
  the same packing.
- **Exception: `maxpool`.** Its output puts window (0,0) in the *lowest*
  element. Results enter a shift register at the top and move down, so the
  first window computed ends at the bottom. For the matrix above the
  pooled word is `0xfd75`. `cnn_forward` reverses the order before the
  fully connected layer, so its `pool_map` output uses the normal packing.
- **Class-indexed vectors** (`scores`, `probs`, fc weights) put class 0 in
  the lowest bits.
- **Softmax formats.**
  - Scores enter the exponential table as signed 12-bit numbers with 8
    fraction bits.
  - Exponentials are unsigned with 16 fraction bits, in 64-bit words.
  - Probabilities are unsigned 16-bit values, where 2^15 means 1.0.
  - `cnn_forward` saturates each 16-bit score to 12 bits before the table.

## Convolution: one node, scheduled

`conv2d` is the central block. It pairs two parts:

- **`input_segmenter`** stores the whole input tensor. It offers K x K
  windows one at a time, in raster order, with a valid/ready handshake.
  The windows are `STRIDE` apart.
- **`conv_node`** computes one window's dot product. It has a single
  multiplier and a single accumulator and walks the K*K element pairs in
  turn.

With the default of one node, a 4x4 output map costs 16 passes through
the same node. The `NODES` parameter (the sub-module count) adds nodes.
Each free node takes the next window, lowest-numbered node first. This
trades area for speed: `NODES = OUT_N*OUT_N` computes every window at
once. A node that has finished keeps its result until the result has been
streamed.

Every result is written to an internal output memory (`out_flat`). It is
also streamed out, one result per cycle, with a one-cycle `out_valid`
pulse and its position on `out_row`/`out_col`. With one node the stream
is in raster order. With several, results come out in the order they
finish. `done` rises the cycle after the last result is streamed and
stays high until the next `start`.

**Zero skipping.** If a pixel or a weight is zero, the node skips that
multiply. It spends one cycle and pulses `skip`. After ReLU and rescaling,
many activations are zero, so this saves real time.

Cycles per window:

    1 (finish) + (#zero pairs) + (#non-zero pairs) * (1 + multiplier latency)

The multiplier latency is 1 for the built-in multiplier and `DATA_W+2`
for the shift-and-add one. Between windows a node spends two more
cycles: one in which its result is streamed and one in which it takes
the next window.

**Fully connected = convolution.** `fc_layer` instantiates one `conv2d`
per class. Each uses a filter as large as its input (`K = N`) and a stride
of 0, which `input_segmenter` treats as "one window at (0,0)". Each class
therefore yields exactly one dot product. The classes run in parallel.

## Two multipliers

Each convolution node takes a `MULT` parameter of type
`cnn_pkg::mult_kind_e`:

| `MULT` | module | latency | cost |
|---|---|---|---|
| `MULT_DEFAULT` | `mult_default` | product registered, `done` one cycle after `start` | one hardware multiplier (a DSP block on an FPGA) |
| `MULT_SHIFT_ADD` | `mult_shift_add` | `W+1` clock edges from `start` to `done` | shift register plus adder, no DSP |

`mult_shift_add` multiplies the operand magnitudes one multiplier bit per
cycle, then applies the sign. Both share the same `start`/`done`
interface, so swapping one for the other changes only timing.

## Keeping numbers short: `scale_approx`

A 3x3 convolution of 4-bit data needs about 10 bits. The following layers
work at 4 bits. `scale_approx` finds the smallest right shift `s` that
makes **every** element of the map fit into `OUT_W` signed bits. It then
shifts all elements by `s`, truncating.

- `scale` reports `s`, so the map's true magnitude is `value * 2^s`.
- `overflow` is high when `s > 0`.
- `null_mask` flags elements that were non-zero but became zero. These are
  the small values dropped to nothing, and downstream nodes skip them.

One shift covers the whole map (block floating point). Pooling and the
fully connected layer then compare and add numbers on a common scale.
`cnn_forward` exposes `scale`, but the probabilities do not use it: the
fc scores are computed in the scaled units.

## Max pooling

`maxpool` stores its input, then visits one element per cycle. A counter
steps through the P x P elements of a window, and a second counter steps
through the windows. A register holds the running maximum and is replaced
when `comparator` finds a larger element. `comparator` is a subtractor
one bit wider than its operands, plus gates. Elements compare as signed
numbers. With N = 4 and P = 2, `done` rises 16 clock edges after `en`.

## Softmax: lookup table and divider

- `softmax_lookup` is a 4096-entry table of `round(exp(x)*2^16)`. Every
  entry is computed from that formula when the design is built. The table
  returns `exp(I)` one cycle after `en`, and adds it to a running `sum` at
  the same time.
- `softmax` feeds the class scores through the table one by one and keeps
  each exponential. It then divides each one, shifted left by 15, by the
  sum. The divider is `divider`, a 64-bit radix-2 restoring divider that
  takes 65 cycles per division.

No maximum is subtracted before the lookup. The table saturates at
`exp(8)`, which is enough for the score range of the default network.

## Timing of one inference (defaults)

| stage | cycles |
|---|---|
| convolution | 16 windows, each at most 21 cycles |
| pooling | 16 |
| fully connected | up to about 10 |
| softmax | 4 x 2 lookup cycles plus 4 x 66 division cycles |

In total an inference takes roughly 450 to 650 cycles (about 620 with
random, mostly non-zero data), depending on how
many zeros the data has. The softmax division dominates.

## How far this follows the source design

The block set follows the published module library:

- convolution node
- input segmenting
- direct 2D convolution with internal memory and stream output
- direct max pool
- ReLU as a sign-bit multiplexer
- softmax as lookup plus divider
- default and shift-add multipliers
- accumulator, counters and comparators built from adders
- result rescaling with null approximation and zero skipping
- fully connected layer as a convolution with stride zero

Its example values are reproduced and checked:

- `0x0123456789abcdef` pools to `0xfd75`.
- The softmax lookup ports are `I[11:0]`, `ret[63:0]`, `sum[63:0]` and
  `fin`.

This design's own choices:

- all handshakes, latencies and reset behaviour (synchronous, active high)
- fixed-point formats
- the restoring divider algorithm
- per-map (not per-element) scaling
- no padding in the convolution
- fc classes run in parallel
- the particular 6x6 -> 4x4 -> 2x2 -> 4-class chain in `cnn_forward`
- a default of one convolution node (`NODES`/`CONV_NODES`)

The source describes a library, not one network. Its FPGA resource
figures are not targets of this RTL.

Not built:

- the variant that cuts the whole input into windows up front and feeds
  a node per window in one step (`NODES` covers the parallelism, but
  windows are still handed out one per cycle)
- 1/1000 weight resolution at the default 4-bit data width, which is taken
  from the source's examples; raise `DATA_W` (and `ACC_W`) for that.
  `tb_conv2d_wide` runs 16-bit data with 40-bit sums and stride 2
- FFT and separable-convolution speed-ups, which are only mentioned
- any I/O interface to a host

## Files

- `rtl/cnn_pkg.sv` defines `mult_kind_e`.
- Each other file in `rtl/` is one module, named after the file.
- `cnn_forward` is the top.
- `tb/tb_<module>.sv` holds one self-checking testbench per module.
  - `tb_cnn_forward` runs both multiplier versions side by side against a
    reference model (`tb/cnn_ref_pkg.sv`). It also checks that every
    mechanism occurs: zero skips, rescaling, no rescaling, null
    approximation and ReLU clamping.
  - `tb_cnn_forward_full` runs the top at its default parameters.
  - `tb_conv2d_wide` runs the convolution with 16-bit data, stride 2 and
    two nodes.
- Every testbench prints `TB_RESULT checks=N failures=M` and ends.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
  rtl/cnn_pkg.sv tb/cnn_ref_pkg.sv tb/tb_cnn_forward.sv \
  --top-module tb_cnn_forward -o sim
./obj_dir/sim
```

`-y` lets Verilator find each module in the file of the same name.
`-Wno-fatal` keeps lint warnings from stopping the build; these are
mostly unused status outputs.

Swap in another testbench name for any block. Only `tb_cnn_forward` and
`tb_cnn_forward_full` need `tb/cnn_ref_pkg.sv`. The design has no X
states. Every register that is read is reset, except data registers that
are always written before they are read.

Building `softmax_lookup` evaluates the exponential 4096 times. Expect
elaboration in synthesis tools to take about a minute.
