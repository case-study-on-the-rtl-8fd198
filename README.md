# Winograd F(2x2,3x3) CNN inference engine for MNIST

This is synthesizable SystemVerilog for a small CNN accelerator that classifies 28x28 handwritten digits.
Both convolutional layers use the Winograd minimal-filtering algorithm F(2x2,3x3). For each input channel,
a 4x4 input tile goes through an add-only transform. It is then multiplied element by element with a filter
that was transformed off-line, and transformed back into a 2x2 block of outputs. That takes 16
multiplications where a direct 3x3 convolution needs 36. The 2x2 output block is exactly one 2x2 max-pooling
window, so each Winograd tile yields one pooled pixel, and no buffer sits between convolution and pooling.

The architecture follows the Winograd circuit of the case study *"Case Study on the Use of Winograd-Based
Convolution for CNN Inference in FPGA"*. That study describes the block structure, the number format and
the network. It leaves out the cycle-level control, the memory layouts and the handshakes. This RTL chooses
its own for those, and the section "Design choices and departures" lists them.

## The network

| stage | operation | output |
|---|---|---|
| input | 28x28 grey-scale image, Q16 | 28x28x1 |
| layer 1 | 3x3 conv, 32 filters, bias, 2x2 max pool, ReLU | 13x13x32 |
| layer 2 | 3x3 conv, 64 filters, bias, 2x2 max pool, ReLU | 5x5x64 |
| FC | 1600 inputs -> 10 scores (no soft-max) | 10 |

The design computes only "valid" convolutions: 28 -> 26 -> pool 13, then 13 -> 11 -> pool 5 (rounded down,
so the last row and column of the 11x11 map are dropped). The soft-max is not part of the hardware. The
scores are the logits, and the class is their arg-max.

## Number format

Every value that is stored or passed between layers is 32-bit two's complement fixed point with 16
fractional bits (Q16). Inside a layer, values are wider (`cnn_pkg::ACC_W` = 56 bits, still with 16
fractional bits):

- The Winograd input transform adds 2 bits.
- Each product is truncated back to 16 fractional bits with an arithmetic shift (rounding toward minus
  infinity).
- Sums over channels and inputs are kept at 56 bits.

A value is saturated to the Q16 range only when it leaves a layer (`cnn_pkg::sat_q16`).

## The Winograd tile (`winograd_kernel`)

For a 4x4 window `d` and a 3x3 filter `g`, the kernel computes

```
Y = A^T [ U .* (B^T d B) ] A,      U = G g G^T

B^T = | 1  0 -1  0 |     G = | 1    0    0   |     A^T = | 1  1  1  0 |
      | 0  1  1  0 |         | 1/2  1/2  1/2 |           | 0  1 -1 -1 |
      | 0 -1  1  0 |         | 1/2 -1/2  1/2 |
      | 0  1  0 -1 |         | 0    0    1   |
```

`Y[i][j]` is the 3x3 correlation (what CNN frameworks call convolution) at offset `(i,j)` from the window's
top-left corner. `B^T` and `A^T` contain only 0 and ±1, so both transforms are adders and subtractors. The
only multipliers are the 16 element-wise products.

**The filter transform is not in hardware.** The weight memories hold `U = G g G^T` directly: 16 words per
filter and input channel instead of 9. The memory is larger, but the datapath needs no filter transform. If
you prepare weights yourself, compute `U` in full precision and round it once to Q16. Scaling `G` by 2 gives
the integer form `U = (2G) g (2G)^T / 4`, so `U` is exact whenever the Q16 filter words are multiples of 4.

**Accuracy.** The only difference from a direct convolution is the truncation of the 16 products. `A^T` and
`A` combine nine of them with coefficient ±1, so each tile output of one channel is at most 9 LSB
(9·2^-16) from the exact value. A layer with C input channels can be off by up to 9·C LSB. Layer 2, with 32
channels, can be off by up to 288 LSB, about 4.4e-3. With random data the observed error is far smaller.
The end-to-end test measures a largest score error of 0.009 against a full-precision model. Most of that
comes from the 1600 truncated products of the FC layer.

## Convolution core (`winograd_conv_core`)

One core computes one layer. It is made of:

- **One window buffer per input channel** (`window_buffer`, 4x4). A row-major pixel stream enters the
  bottom-right register. Values move left along each row. The left-most register of a row feeds a
  `line_buffer` of `IMG_W-4` words, and that buffer feeds the right-most register of the row above. After
  pixel (y, x) has been shifted in, the window holds rows y-3..y and columns x-3..x.
- **One set of 16 weight registers per input channel.**
- **One kernel**, shared by all channels through a multiplexer.
- **Four `channel_acc` registers** holding the 2x2 tile of the current filter, summed over the input
  channels.
- **Max pooling, ReLU and saturation** (`max_pool_relu`).

**Input stream.** Pixels arrive in row-major order, with the `C_IN` channel values of a pixel one after the
other. Each value shifts only its own channel's window. Windows at stride 2 line up with the pooling grid.
So when the last channel of a pixel at an odd row and an odd column (both at least 3) arrives, a complete
tile is present, and the core starts computing.

**Tile schedule.** While computing, the core holds its input, because any shift would move the windows.
Then, for each filter f:

1. It reads `1 + 16*C_IN` consecutive words from its weight memory, one per cycle. The first word is the
   bias, which loads all four `channel_acc` registers. The rest are the 16 Winograd-domain weights of each
   channel, which go into that channel's weight registers.
2. In the cycle after the 16th weight of channel c arrives, the kernel runs on channel c and adds its 2x2
   result into `channel_acc`. Meanwhile, channel c+1's weights are still arriving.
3. It pools the four values, applies ReLU, saturates the result and puts it in the output register.

A tile therefore takes `N_FILT * (16*C_IN + 4)` cycles, provided the next stage accepts each output at once:
640 cycles in layer 1 and 33,024 cycles in layer 2. The output stream has the same format as the input
stream (pixel-major, channels consecutive), so cores chain directly. It is also the channels-last
flattening order that the FC layer expects.

**Weight memory layout** (one Q16 word per address, one cycle read latency):

| address | content |
|---|---|
| `f*(1+16*C_IN)` | bias of filter f |
| `f*(1+16*C_IN) + 1 + 16*c + 4*i + j` | `U[i][j]` of filter f, input channel c |

## Streams and back-pressure

Between stages, a word is offered with `valid`. The receiving stage answers with `hold`, meaning it cannot
accept now. A word moves in a cycle with `valid && !hold`. A held word keeps its value, and an assertion in
the core checks this rule. The chain is:

```
input memory -> input_reader -> layer 1 core -> layer 2 core -> fc_layer -> output memory
```

All stages run at the same time on different parts of the image:

- **Layer 2 sets the pace.** Each of its 25 tiles takes 33,024 cycles, and while it computes, it holds
  layer 1.
- **The FC layer never holds layer 2.** It accepts one input every two cycles, and a core needs at least 20
  cycles per output. This matches the observation for the reference Winograd circuit that the sequential FC
  layer costs it nothing.
- **Only one register sits between layers.** While layer 2 computes, layer 1 stops after one finished
  output, and it must compute the next two pixels when layer 2 is free again. A small FIFO between the cores
  would remove most of the ~100k cycles that this adds.

## Fully connected layer (`fc_layer`)

The FC layer is sequential. For input i, it reads row i of the FC weight memory. That row is `N_OUT`
weights wide, one per neuron. All ten accumulators update in one cycle, using ten multipliers. After the
last input, the layer does the following:

1. It reads row `N_IN`, which holds the biases.
2. It adds the biases.
3. It writes the ten saturated scores to output memory addresses 0..9.
4. It pulses `done`.

A FC row is stored with neuron j in bits `[32j+31:32j]`. Input i is flattened in the order (row, column,
channel), i.e. `i = (y*5 + x)*64 + c`.

## Top level and how to use it (`winograd_cnn_top`)

The top instantiates the five memories, the input reader, both cores and the FC layer. Its parameters are
`IMG` (28), `N1` (32), `N2` (64) and `N_OUT` (10). Everything else is derived from them.

To run one image:

1. Write the image (row-major, Q16) through `in_we/in_addr/in_wdata`.
2. Write the layer-1 weights (544 words) through `w1_*`, the layer-2 weights (32,832 words) through `w2_*`
   and the FC weights (1601 rows of 320 bits) through `fcw_*`.
3. Pulse `start`.
4. `done` pulses when the scores are in the output memory. Read them through `out_raddr`/`out_rdata`, one
   cycle read latency.
5. Wait for `busy` to go low before the next `start`. Layer 1 may still be finishing image rows that
   layer 2 never uses.

Weights stay loaded, so consecutive images need only step 1 and steps 3 to 5.

**Performance.** One image takes 925,678 cycles from `start` to `done`, with 825,600 of them being layer 2
compute. The reference Winograd circuit reports 2,334,853 cycles, but its schedule is not published, so the
two figures cannot be compared cycle for cycle. Total memory is 1.61 Mbit, which fits the on-chip memory of
the Cyclone V 5CSEMA5 targeted by the reference.

## Design choices and departures

These follow the reference design:

- the block structure: one weight memory per layer, input and output memories, per-channel window buffers
  and weight registers, a single kernel, four `channel_acc` registers and max pooling;
- the F(2x2,3x3) algorithm with pre-transformed weights;
- 32-bit Q16 arithmetic;
- the network sizes;
- a sequential FC layer with a `hold` signal;
- no soft-max.

These are this design's own choices:

- the valid/hold stream protocol and the stream order;
- the memory layouts;
- the load ports: on the FPGA the memories were initialised from files when the device was programmed;
- synchronous single-cycle memories;
- the tile schedule and its cycle counts;
- a bias per filter and ReLU after each convolution, as in the trained Keras network;
- truncating products, saturating on layer outputs, and 56-bit internal sums;
- ten parallel FC multipliers, inferred from the DSP usage reported for the reference;
- an asynchronous active-low reset.

These are not included:

- the direct ("spatial") convolution core, which served only as the baseline for comparison;
- a fully combinational FC layer, which was only estimated and is far too large for any FPGA;
- multiple cores per layer, which is mentioned only as future work;
- the off-line flow that trains the network and generates memory contents.

## Files

| file | content |
|---|---|
| `rtl/cnn_pkg.sv` | Q16 types, widths, multiply and saturate helpers |
| `rtl/cnn_ram.sv` | simple dual-port RAM (all five memories) |
| `rtl/line_buffer.sv` | circular-buffer delay line |
| `rtl/window_buffer.sv` | 4x4 sliding window with three line buffers |
| `rtl/winograd_kernel.sv` | F(2x2,3x3) tile |
| `rtl/max_pool_relu.sv` | 2x2 max, ReLU, saturation |
| `rtl/winograd_conv_core.sv` | one convolution + pooling layer |
| `rtl/fc_layer.sv` | sequential FC layer |
| `rtl/input_reader.sv` | streams the input memory into layer 1 |
| `rtl/winograd_cnn_top.sv` | the whole engine |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/winograd_cnn_top_full_tb.sv` | whole network at its default size, one image |
| `tb/winograd_cnn_top_batch_tb.sv` | whole network at its default size, 30 images with one set of weights |

## Simulation

Each testbench checks its results against values it computes itself and ends with a line
`TB_RESULT checks=N failures=M`. Example with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    --top-module winograd_cnn_top_full_tb rtl/cnn_pkg.sv tb/winograd_cnn_top_full_tb.sv
./obj_dir/Vwinograd_cnn_top_full_tb
```

What the testbenches cover:

- **`window_buffer_tb`** checks every window register, both for the 4x4 window and for a 3x3 window built
  from the same module with two line buffers.
- **`winograd_kernel_tb`** compares the tile with a direct 3x3 convolution. The comparison is exact on
  values chosen so that no product is rounded, and within 9 LSB on random values.
- **`winograd_conv_core_tb`** runs a 3-channel, 4-filter, 11x9 layer with random input gaps and random
  output holds. It checks every pooled output against a direct convolution and checks the cycle count of a
  tile.
- **`winograd_cnn_top_tb`** (16x16 image, 3 and 4 filters, two images), **`winograd_cnn_top_full_tb`**
  (the real network sizes) and **`winograd_cnn_top_batch_tb`** (real sizes, 30 images in a row) check each
  layer's output stream and the scores. They also check the total cycle count and count the back-pressure
  events. All three use random images and weights, since no trained weights or MNIST images come with the
  RTL.

The full-size simulation of one image takes a few seconds, and the 30-image batch takes about a minute. Over
the batch, the largest score error against full precision was 0.0093.
