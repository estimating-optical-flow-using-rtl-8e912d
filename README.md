# A streaming convolution accelerator for FlowNet-S optical flow

Optical flow is the per-pixel motion between two frames. FlowNet-S estimates
it with a plain convolutional network:
- The two RGB frames are stacked into one 6-channel image.
- Ten convolutions, six of them with stride 2, shrink that image into features.
- A chain of transposed convolutions, small "predict" convolutions and
  concatenations grows the flow field back up.

This RTL runs such a network one layer at a time on a single, reconfigurable
datapath. The datapath is built around one idea: **every layer becomes the
same stream of dot products.**

For each output pixel, a reader walks the k×k window across all input
channels. Each cycle it emits one short vector of input values and, beside
it, the matching weight vectors for a group of output channels. A bank of
parallel lanes multiplies and accumulates these vectors, one lane per output
channel. When the window is finished, each lane adds its bias, applies leaky
ReLU, rescales to 16 bits and saturates. A writer then puts the results back
where the next layer will look for them.

The datapath handles three layer types:
- **Convolution** with any kernel size, stride and padding.
- **Transposed convolution** (the network's up-sampling). The reader feeds
  the lanes a zero-inserted, padded view of the input, so the lanes only ever
  see an ordinary convolution.
- **Concatenation** along the channel axis. A copy engine does this, and the
  memory layout makes a plain block copy correct.

The design follows the PipeCNN accelerator architecture, as extended for
optical flow with transposed convolution and concatenation. It follows that
architecture's kernel partitioning, data layout and fixed-point scheme. The
cycle-level behaviour, the handshakes and the memory sizes are this design's
own; they are listed under [Departures and limits](#departures-and-limits).

## Dataflow of one layer

```
             +-----------+  data_ch   (VEC_SIZE x 16 b)           +-----------+  conv_ch      +-----------+
  feature -->|           |----------------------------------------|           |-------------->|           |--> feature
  memory     | mem_read  |  weight_ch (LANE_NUM x VEC_SIZE x 16 b) | core_conv | (LANE_NUM x   | mem_write |    memory
  weight  -->|           |----------------------------------------|           |   16 b)       |           |
  bias    -->|           |  bias_ch   (LANE_NUM x 16 b)           | LANE_NUM  |               |           |
             +-----------+----------------------------------------| lanes     |               +-----------+
                                                                   +-----------+
  concat_engine: feature memory --> feature memory   (runs alone, for a concatenation layer)
```

`pipecnn_top` holds:
- the three memories (`vec_ram`);
- the four channels (`channel_fifo`, 8 words deep);
- the three convolution engines;
- the concatenation engine;
- a three-state controller (idle, convolution, concatenation).

The three convolution engines run concurrently and are coupled only by the
channels. Any of them can stall the others, and no data is lost:
- **Reader.** Issues a word only when every channel it feeds has room for
  that word and for the word already in flight.
- **Core.** Consumes a word only when all three of its input channels have
  one (the bias only at the window's end) and `conv_ch` has room.
- **Writer.** Drains `conv_ch` at its own pace.

### Loop order

The reader (`mem_read`) walks, outermost first:

```
for m  in output groups        (LANE_NUM output channels each)
 for oy, ox in output pixels
  for n  in input vectors      (VEC_SIZE input channels each)
   for ky, kx in kernel
     send input vector (n, y, x) and weight word (m, n, ky, kx)
```

Each window is `in_vecs * k * k` words long. The core (`core_conv`) counts
words; when it reaches that count, the window is complete. No coordinates
travel with the data. The writer (`mem_write`) walks the same (m, oy, ox)
order, so it knows where each result belongs.

## Where the data lives

This is the part that must be right for anything to work. The host must
follow it when it prepares weights and inputs.

**Feature maps are stored as vector planes.** A feature word holds VEC_SIZE
(4) adjacent channels of one pixel. A map of C channels and H×W pixels takes
`ceil(C/4)` planes of H·W words each:

```
word (n * H + y) * W + x  holds channels 4n .. 4n+3 of pixel (x, y)
```

This layout has two useful consequences:
- **Concatenation is a block copy.** Appending buffer B after buffer A in
  memory is the same as appending B's channels after A's. This holds as long
  as every source is a whole number of planes, so a map with a channel count
  that is not a multiple of 4 is padded with zero channels.
- **Outputs come in whole planes.** A layer with G output groups produces
  G·LANE_NUM channels, i.e. `ceil(G*LANE_NUM/VEC_SIZE)` planes. Channels that
  have zero weights and zero bias come out as 0. For example, the 2-channel
  flow predictions come out as 8 channels, 6 of them zero.

**Weights are stored in reader order.** A weight word holds LANE_NUM ×
VEC_SIZE values:

```
word weight_base + ((m * in_vecs + n) * k + ky) * k + kx
   lane l, element e = weight from input channel 4n+e to output channel 8m+l at (ky, kx)
```

Because the words are in reader order, the reader's weight address only
counts up. It returns to the start of the group at every new pixel. Unused
lanes and elements hold zero.

**Biases:** word `bias_base + m` holds the LANE_NUM biases of group m.

**Transposed-convolution weights must be stored flipped.** If the framework's
kernel is `Wt[in][out][ky][kx]`, store it as

```
stored[m][n][ky][kx][l][e] = Wt[4n+e][8m+l][k-1-ky][k-1-kx]
```

This means swapping the in and out roles and rotating each k×k kernel by
180°. The next section explains why.

## Transposed convolution without a separate engine

A transposed convolution with stride s, kernel k and padding p gives the same
result as an ordinary unit-stride convolution, computed with the flipped
kernel, over a virtual input. That virtual input is the real input with two
changes:
- s−1 zero rows and columns are inserted between neighbouring pixels;
- k−1−p zero rows and columns are added around the border.

The output size is `s*(in-1) + k - 2p`. For FlowNet-S (k = 4, s = 2, p = 1)
this doubles the map.

`mem_read` never builds the virtual input. For an output row oy and kernel
row ky, it computes the virtual row

```
v = oy - (k-1-p) + ky
```

and does the same for columns. The position is a real pixel only when all of
the following hold:
- v ≥ 0;
- v is a multiple of the stride (a mask test, because the stride is a power of two);
- v / s is inside the map.

In every other case, the reader sends a zero vector in place of a memory
read. Ordinary convolution padding is handled the same way: position
`oy*s - p + ky` outside the map gives a zero. Padding therefore never takes
memory.

The price is arithmetic. For stride 2, three quarters of the window positions
are inserted zeros, and the lanes still spend a cycle on each. In FlowNet-S,
the four deconvolutions take about half of all cycles.

## Per-output arithmetic (`fixed_adjust`)

Data and weights are 16-bit two's complement. Products are summed in a
32-bit accumulator, at `frac_w + frac_din` fractional bits. For each lane,
once per window:

1. **Bias.** Add the bias shifted left by `bias_shift` (= frac_w + frac_din),
   so the bias enters at the accumulator's scale.
2. **Leaky ReLU** (when the layer's `relu` bit is set). If the biased sum is
   negative, divide it by 10, truncating toward zero. FlowNet-S uses slope 0.1.
   The bias is added before this step on purpose, so the ReLU sees the true
   pre-activation value.
3. **Rescale.** Shift right arithmetically by `out_shift - 1`, add 1, then
   shift right by one more bit. Here out_shift = frac_w + frac_din −
   frac_dout. The result is the value rounded half-up to frac_dout fractional
   bits. If out_shift = 0, the value passes through unchanged.
4. **Saturate** to [−32767, +32767]. The limits are symmetric, so −32768 is
   never produced.

The host chooses the fractional formats per layer. The hardware only sees
the two shift amounts.

## Layer descriptor and host protocol

The host drives the accelerator through `layer_cfg_t` (in `pipecnn_pkg`):

| field | meaning |
|---|---|
| `op` | `OP_CONV`, `OP_DECONV` or `OP_CONCAT` |
| `in_w`, `in_h`, `out_w`, `out_h` | map sizes in pixels. The host computes the output size: `(in-k+2p)/s+1` for a convolution, `s(in-1)+k-2p` for a transposed one |
| `in_vecs` | input planes (`ceil(channels/4)`) |
| `out_groups` | output groups (`ceil(channels/8)`) |
| `k`, `stride_log2`, `pad` | kernel side (up to 15), log2 of the stride (0..3), padding (up to 15) |
| `relu` | apply leaky ReLU |
| `bias_shift`, `out_shift` | fixed-point shifts, see above |
| `data_base`, `weight_base`, `bias_base`, `out_base` | word addresses in the three memories |
| `cat_num`, `cat_base[3]`, `cat_len[3]` | concatenation: 1 to 3 sources, base and length in words |

Protocol:
1. **Load memories.** While `busy` is low, write the input image into the
   feature memory (`h_wr_*`, one word per cycle). Load the weights and biases
   (`hw_wr_*`, `hb_wr_*`). The weight and bias memories may also be loaded
   during a concatenation layer, but not during a convolution layer (an
   assertion in the top checks this).
2. **Start a layer.** Present a descriptor on `cfg` with a one-cycle `start`.
   The controller latches the descriptor, so `cfg` may change afterwards.
3. **Wait for completion.** `done` pulses for one cycle once the last result
   of the layer is in memory. `busy` is high from the cycle after `start`
   until `done`.
4. **Repeat** step 2 for the next layer. Read results back with `h_rd_*`
   (data one cycle after `h_rd_en`) while `busy` is low.

FlowNet-S maps onto this with one descriptor per layer:
- The input is 6 channels, padded to 8, in 2 planes.
- The network variant used here is slimmer than the published FlowNet-S. Its
  contracting part has 24, 48, 96 (conv3, conv3_1), 192 (conv4 to conv5_1)
  and 384 (conv6, conv6_1) channels. Its deconvolutions produce 192, 96, 48
  and 24 channels.
- conv1 to conv6_1 are convolution layers with leaky ReLU.
- At each refinement level:
  1. a 3×3 `predict_conv` with 2 outputs, without ReLU;
  2. a 4×4 stride-2 `deconv`;
  3. a 4×4 stride-2 `upsample_flow` of the prediction;
  4. a concatenation of the skip features, the deconvolution output and the
     up-sampled flow, which feeds the next `predict_conv`.

Every layer output needs its own address range in the feature memory. The
skip connections (conv2, conv3_1, conv4_1, conv5_1) must not be overwritten
before their concatenation.

## Timing

| operation | cycles |
|---|---|
| convolution or transposed convolution | `out_groups * out_h * out_w * max(in_vecs*k*k, LANE_NUM/VEC_SIZE)` plus about 5 cycles of pipeline fill |
| concatenation of N words | N + 2 |

For a convolution, the core takes one input vector per cycle, which is
LANE_NUM·VEC_SIZE = 32 multiply-accumulates per cycle. It has no bubbles
between windows. The `LANE_NUM/VEC_SIZE` term matters only for 1×1 windows
over a single plane: each result needs two memory writes.

The whole of FlowNet-S at 384×384 takes:
- 99,522,893 cycles in simulation, concatenations included. This matches
  the formulas above to within the pipeline fill;
- 663 ms at 150 MHz, or 332 ms at 300 MHz.

The four 4×4 deconvolutions take 48.5 M of those cycles. At the default
memory sizes, the network fits with room to spare:

| memory | needed | built |
|---|---|---|
| weights | 173,116 words | 262,144 words |
| biases | 279 words | 512 words |
| features (every layer output in its own buffer) | 1.28 M words | 2.10 M words |

Inputs of 256×256 and 448×448 also fit. Their feature needs are 0.57 M and
1.75 M words; the weights do not depend on the image size. Both were
simulated with `flownets_tb`: 44.2 M cycles and 135.5 M cycles.

## Parameters

`pipecnn_top` parameters; the defaults are the intended configuration.

| parameter | default | meaning |
|---|---|---|
| `LANE_NUM` | 8 | parallel lanes = output channels per group. 4 and 2 are also tested (LANE_NUM < VEC_SIZE is written with element strobes) |
| `VEC_SIZE` | 4 | channels per feature word = MACs per lane per cycle |
| `DAW` | 21 | feature memory: 2^21 words of VEC_SIZE × 16 bits |
| `WAW` | 18 | weight memory: 2^18 words of LANE_NUM × VEC_SIZE × 16 bits |
| `BAW` | 9 | bias memory: 2^9 words of LANE_NUM × 16 bits |
| `CH_DEPTH` | 8 | depth of every channel FIFO |
| `RELU_DIV` | 10 | leaky ReLU divisor |

With fewer lanes, FlowNet-S needs more weight and bias words. Raise `WAW` to
19 and `BAW` to 10 for LANE_NUM = 4. Raise them to 20 and 11 for LANE_NUM = 2.

## Modules

| file | role |
|---|---|
| `rtl/pipecnn_pkg.sv` | widths, saturation limits, `op_e`, `layer_cfg_t` |
| `rtl/pipecnn_top.sv` | controller, memories, channels, engines |
| `rtl/mem_read.sv` | window walker. Makes padding and transposed-convolution zeros, feeds the three input channels |
| `rtl/core_conv.sv` | LANE_NUM accumulating lanes, window counter, output register |
| `rtl/vec_mac.sv` | one lane's VEC_SIZE-wide signed dot product (combinational) |
| `rtl/fixed_adjust.sv` | bias, leaky ReLU, rounding, saturation (combinational) |
| `rtl/mem_write.sv` | result scatter into vector planes |
| `rtl/concat_engine.sv` | block copy of up to three buffers |
| `rtl/channel_fifo.sv` | show-ahead FIFO used for all channels |
| `rtl/vec_ram.sv` | dual-port RAM: strobed writes, registered reads |

Every file opens with a description of its interface and timing.

## Verification

Each module has a self-checking testbench in `tb/`:
- Each one compares against a reference model written separately from the
  RTL.
- Each one ends with a `TB_RESULT checks=… failures=…` line.
- Each one has a watchdog.

`tb/pipecnn_ref_pkg.sv` holds the reference arithmetic: exact integer
rounding and clamping, written as formulas rather than shifts.

| testbench | what it covers |
|---|---|
| `channel_fifo_tb` | random push/pop against a queue model, full and empty flags, count |
| `vec_mac_tb` | random and extreme vectors against an integer dot product |
| `fixed_adjust_tb` | random and edge values: rounding, ReLU division, both saturation limits, out_shift = 0 |
| `core_conv_tb` | whole windows with random stalls on every channel. Checks a throughput of one word per cycle |
| `mem_read_tb` | convolution and transposed-convolution windows against an explicitly built padded or zero-inserted image. Counts padding, inserted zeros and full-channel stalls |
| `mem_write_tb` | output placement at LANE_NUM 8 and 2 (strobed partial words) |
| `concat_engine_tb` | 1 to 3 sources, lengths, N + 2 cycle count |
| `vec_ram_tb` | strobes, read latency, read-during-write |
| `pipecnn_top_tb` | the whole accelerator at its default parameters (below) |
| `flownets_tb` | all 23 layers and 4 concatenations of FlowNet-S at 384×384, default parameters (below) |
| `pipecnn_lanes_tb` | the miniature network of `pipecnn_top_tb` on accelerators built with LANE_NUM = 4 and 2 (through the helper `lane_runner`) |

`pipecnn_top_tb` runs a miniature FlowNet-S on a 12×12 image pair. The
sequence is conv1 (7×7 s2), conv2 (5×5 s2), conv3_1, predict, deconv,
upsample_flow, concat, a second predict over the concatenation, and a 1×1
convolution.

After each layer, it reads the whole output buffer back through the host port
and compares it with a reference. The reference computes direct convolution
sums, and transposed convolution as a scatter through the unflipped kernel.
It also checks each layer's cycle count against the timing formula.

It counts how often each mechanism happened; a mechanism that never happened
is a failure:
- convolution padding;
- inserted zeros;
- negative ReLU inputs;
- saturation;
- stalls;
- multi-group layers;
- concatenation.

`flownets_tb` runs the complete network at its real size:
- layer shapes and channel counts as listed above;
- random weights, biases and images;
- per-layer shifts chosen to keep activations in range.

It checks every output word and every layer's cycle count, about 987,500
checks in all. It takes about two minutes. Setting its `S` to another
multiple of 64 runs a different image size; 64 takes seconds.

Simulate any testbench with Verilator 5:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
    rtl/pipecnn_pkg.sv tb/pipecnn_ref_pkg.sv tb/pipecnn_top_tb.sv \
    --top-module pipecnn_top_tb -Mdir obj_top
obj_top/Vpipecnn_top_tb +verilator+rand+reset+2
```

For another testbench, replace `pipecnn_top_tb` with its name. The design
resets everything it reads, so the testbenches also pass when every
unreset flop starts at a random value (`+verilator+rand+reset+2`).

Not verified:
- FlowNet-S at LANE_NUM 4 and 2 at full size; those configurations ran only the miniature network;
- timing closure or resource use on any FPGA;
- comparison with trained FlowNet-S weights.

## Departures and limits

- **Global memory is on-chip.** On the original platform, feature maps and
  weights live in external DDR3 that the host fills over PCIe through an
  OpenCL runtime. Here the three memories are plain arrays with one cycle of
  read latency, and the host ports stand where that runtime would connect.

  At the default depths, the feature memory alone is 128 Mbit, which is more
  than an FPGA's block RAM. A real build would keep the engine interfaces
  and put a DDR controller and caching behind the reader and writer. The
  handshakes already tolerate stalls at every channel.
- **No host, PCIe or image pre-processing.** Normalising and stacking the
  frames, reordering weights, and writing the flow file are host work.
- **No pooling.** The original framework has an optional max-pooling stage
  after the writer. FlowNet-S does not use it, so it is left out.
- **Saturation is symmetric (±32767).** This follows the description of the
  scheme. A literal reading of the original adjustment code would give
  −32768 at the bottom.
- **One rounding bit.** A second "+1" on the biased sum, which appears in one
  reading of the original code, is not applied.
- **The deconv3 output count is 48, not 96.** The layer table lists 96, but
  the following predict layer takes 146 input channels: 96 from conv3_1, 2
  from the up-sampled flow, and the deconvolution's output. That only adds
  up with 48. The cycle budget and `flownets_tb` use 48.
- **The transposed convolution stays zero-insertion based.** This is the
  original method. The known 4× faster scatter formulation is not
  implemented.
- **Output channels are interleaved across lanes.** Lane l of group m
  computes channel 8m + l, which follows the original weight ordering. One
  description of the original splits the channels into contiguous ranges per
  lane instead. The two give the same results; only the weight order
  differs.
- **Concatenation is a layer of its own.** It runs while the convolution
  engines are idle. It copies one word per cycle.
- **Choices with no counterpart in the original:**
  - the cycle-level schedule;
  - the FIFO depth;
  - the descriptor encoding;
  - the memory depths;
  - stride limited to 1, 2, 4 or 8;
  - padding up to 15.
- **The default clock is not fixed.** The time estimates above assume 150 or
  300 MHz. The original implementation reports 248 ms per frame pair with 8
  lanes, which is faster than this design's 663 ms at 150 MHz. Its clock is
  not known, so the two are not directly comparable.
