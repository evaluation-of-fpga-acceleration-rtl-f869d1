# CNN_small: a streaming float32 CNN as a chain of value buses

This is synthesizable SystemVerilog for a small convolutional network that
tells a handwritten "1" from a "2" in a 28×28 MNIST image. It produces two
class probabilities. The network has the usual ten layers:

    conv 3x3 (1->3) - batch norm - ReLU - max pool 2x2
    conv 5x5 (3->5) - batch norm - ReLU - max pool 3x3
    linear 45->2 - softmax

There is no processor and no shared memory. Each layer is its own hardware
unit. The units are chained by one simple bus type, so values stream through
the network: a layer starts work as soon as the first value reaches it, and
all layers can be busy at once. The arithmetic is IEEE-754 single precision
throughout, so the results can be compared directly with a float32 software
model of the same network.

The structure follows a published design that built CNN layers as networks
of small clocked processes in SME (Synchronous Message Exchange, a
C#-based hardware description method). There, every process reads its input
buses, computes, and writes its output buses once per clock. This RTL keeps
that structure and its names, and it is written directly in SystemVerilog.

## The value bus

Every connection in the design is a `value_bus_t` (`rtl/cnn_pkg.sv`):

| field  | width | meaning                                              |
|--------|-------|------------------------------------------------------|
| `en`   | 1     | `val` is valid in this cycle                          |
| `last` | 1     | this is the final value of a group                    |
| `val`  | 32    | a float32 number                                      |

The bus has **no ready signal and no backpressure**. A value is a broadcast
that every receiver must take in the cycle it appears. This is why the layers
are designed around their worst-case input rate. It is also why the design
takes one image at a time: a new image may be sent only once the previous
result has come out.

What `last` closes depends on the bus:
- a window, for kernel-internal buses;
- a channel, for channel-parallel layer outputs;
- the whole tensor, for channel-sequential outputs.

## Channel-parallel and channel-sequential layers

Each layer type exists in versions, named by two digits: the first for the
input side and the second for the output side. **0** means the channels
travel in parallel, one bus per channel. **1** means they travel one after
another on a single bus.

A parallel version is fast but duplicates hardware per channel. A sequential
version reuses one datapath. The network uses fast parallel versions for the
first half, where there are few channels and large images. For the second
half it uses sequential versions, where the conv2 datapath would otherwise be
replicated for every input channel, output channel and window position:

| instance | module          | version | in → out                 |
|----------|-----------------|---------|--------------------------|
| conv1    | `conv_layer_00` | 00      | 1×28×28 → 3×26×26        |
| bn1      | `batchnorm_00`  | 00      | 3 lanes                  |
| relu1    | `relu_00`       | 00      | 3 lanes                  |
| pool1    | `maxpool_00`    | 00      | 3×26×26 → 3×13×13        |
| conv2    | `conv_layer_01` | 01      | 3×13×13 → 5×9×9          |
| bn2      | `batchnorm_11`  | 11      | one bus, 5 channels      |
| relu2    | `relu_11`       | 11      | one bus                  |
| pool2    | `maxpool_11`    | 11      | 5×9×9 → 5×3×3            |
| linear   | `linear_10`     | 10      | 45 values → 2 lanes      |
| softmax  | `softmax_00`    | 00      | 2 lanes                  |

conv2 is the boundary. It takes three parallel channels in and gives five
sequential channels out. After conv2, everything runs on one bus until the
linear layer fans out to its two outputs.

## Convolution, the hard part

Both convolution versions first **store a whole input channel** in a
dual-port block RAM (`bram_dp`). Only then do they walk the windows. Stride
is 1 and there is no padding.

### Version 00 (conv1): all filters at once, two values per cycle

- **Window reader.** `input_ctrl_par_filter` reads each K×K window in
  row-major order. It uses both RAM ports, so a window takes ⌈K²/2⌉ cycles:
  port A reads slot 2p and port B reads slot 2p+1. When K² is odd, the last B
  slot re-reads slot 2p. The kernel gives that slot weight +0.0, so it adds
  nothing.
- **Filter.** The window pairs of input channel c go to the kernel for c in
  every `filter`, so all output channels are computed together.
- **Kernel.** Inside a filter, each `conv_kernel_type00` works as follows:
  - `kernel_ctrl` holds the K² weights in registers and sends value/weight
    pairs down two branches.
  - On each branch, `weight_value` multiplies and `plus_ctrl` accumulates
    until `last`.
  - `plus_two` adds the two branch sums.
- **Output.** The per-channel sums of a filter arrive together.
  `value_array_ctrl` puts them out one per cycle. `plus_ctrl` adds them, and
  `bias_add` adds the bias. `bias_add` also counts outputs so it can mark the
  last pixel of the channel.

### Version 01 (conv2): one filter at a time, one value per cycle

- **Reader.** `input_ctrl_seq_filter` keeps the image and the weights in one
  RAM:
  - the image at addresses 0 … H·W−1;
  - after it, the K² weights of every filter for that input channel.
- **Order.** Port A reads the pixel and port B the matching weight, so one
  product is made per cycle. The walk goes over filter 0 (every output
  position, every window slot), then filter 1, and so on.
- **Kernel.** Each input channel has a `conv_kernel_type01`: a
  `weight_value` followed by a `plus_ctrl`.
- **Output.** `value_array_ctrl` and `plus_ctrl` add the three channel sums.
  `align` works out which filter the current sum belongs to by counting, and
  puts that filter's bias next to the sum. `plus_two` adds the two. The
  output is channel 0 row by row, then channel 1, and so on.

### Pooling

Pooling reuses the same store-then-walk reader, with a running-maximum unit
(`max_ctrl`) in place of the kernel. `maxpool_00` has one reader per lane.
`maxpool_11` stores the whole 5×9×9 tensor in one RAM and walks it channel
by channel.

## The other layers

- **Batch norm.** The layer computes `y = (x − mean)·inv_std·gamma + beta`
  in four float32 register stages.
  - `inv_std` = 1/√(var + ε) is computed off-line and loaded as a constant.
  - The sequential version counts values to know the current channel. The
    channel number travels down the pipeline with each value.
- **ReLU.** A value with its sign bit set becomes +0.0. This takes one
  register stage.
- **Linear.** Inputs arrive one per cycle, in flattened (channel, row,
  column) order. Each output has its own multiplier and accumulator. Both
  results leave together after the bias is added.
- **Softmax.** This layer takes the following steps, one per cycle:
  1. exp of every lane;
  2. the sum, on one adder (C−1 cycles);
  3. a reciprocal;
  4. a multiply of every lane by it.

  The maximum is not subtracted first, so a logit above about 88 overflows.

## Float32 arithmetic

`cnn_pkg` has combinational functions: `fp_add`, `fp_sub`, `fp_mul`,
`fp_div`, `fp_gt`, `fp_max` and `fp_exp`. Every process registers their
results, so each arithmetic step is exactly one pipeline stage.

- **Rounding.** Results are rounded to nearest, ties to even.
- **Subnormals.** Subnormal inputs and results are flushed to zero.
- **NaN.** NaN is not carried: a NaN operand gives infinity.
- **Exponential.** `fp_exp` computes 2^(x·log₂e) in 40-bit fixed point,
  with a 14-term series for the fractional part.
- **Checking.** `tb/tb_cnn_pkg.sv` checks add, multiply, divide and exp
  against a double-precision model on 100,000 random operands.

Single-cycle float operators make long combinational paths. No clock target
was set, and nothing here has been timed on an FPGA. Pipelining the
operators would change every latency below.

## Loading weights

Weights are not built in. Before the first image, every weight, bias and
batch-norm constant is written through the top-level configuration port,
one float32 word per cycle:

| `cfg_layer` | layer  | `cfg_addr`                                                       |
|-------------|--------|------------------------------------------------------------------|
| 0           | conv1  | W[f][c][ky][kx] at ((f·Cin + c)·K + ky)·K + kx; bias f after all weights |
| 1           | bn1    | 4c + {0 mean, 1 inv_std, 2 gamma, 3 beta}                       |
| 2           | conv2  | as conv1                                                         |
| 3           | bn2    | as bn1                                                           |
| 4           | linear | W[f][i] at f·45 + i; bias f at 90 + f                           |

The weight order is PyTorch's own tensor order, so a trained model can be
dumped straight into these addresses. conv2 weights must be written while
the layer is idle, because they share its RAM with the image.

## Timing

Send the image row by row, one pixel per cycle with no gaps, and set `last`
on pixel 784. The two probabilities come out in the same cycle on
`out_bus[0]` and `out_bus[1]`.

Latencies below run from a layer's first input to its last output, counting
both. The "original" column is the original SME implementation's figure:

| layer    | this RTL             | original     |
|----------|----------------------|--------------|
| conv1    | 4172                 | 4174         |
| bn1      | H·W + 4              | same         |
| relu     | + 1                  | same         |
| maxPool1 | 1016                 | 1016         |
| conv2    | 10303                | 10302        |
| bn2      | H·W·C + 4            | H·W·C + 8    |
| maxPool2 | 632                  | 632          |
| linear   | 48                   | 50           |
| softmax  | 1 + (C−1) + 1 + 1    | same         |
| network  | **14890** per image  | 14908        |

Because the layers overlap, the network total is far less than the sum of
the layer latencies. For the first image, each layer receives its first
value at these cycles, where the first pixel is cycle 1:

| layer      | this RTL | original |
|------------|----------|----------|
| batchNorm1 | 797      | 800      |
| relu1      | 801      | 804      |
| maxPool1   | 802      | 805      |
| conv2      | 4181     | 4186     |
| batchNorm2 | 4551     | 4558     |
| relu2      | 4555     | 4566     |
| maxPool2   | 4556     | 4567     |
| linear     | 14663    | 14676    |
| softmax    | 14886    | 14902    |

The window rates match the original, and so does the dominant term of every
layer. The small constant differences come from register stages whose exact
count the original does not describe.

## Where this departs from the original

- **Extra versions not built.** Only the versions used in the network are
  built. The original also has parallel versions of conv2, bn2, relu2,
  pool2 and linear, which it rejects for size. Those are not here.
- **No host side.** The host-side driver, DDR memory and ARM host of the
  original FPGA board are not part of this RTL. The image enters and the
  result leaves as value buses.
- **Weights loaded at run time.** Trained weights were not available, so
  all of them are loaded through the configuration port.
- **Choices of this design.** The following were not specified, and each is
  this design's own choice:
  - the RAM read latency (1 cycle, read-first);
  - the window slot order and the padding of odd windows;
  - the address maps;
  - the off-line `inv_std`;
  - reciprocal-times-product division in softmax, which can differ from a
    true division by one unit in the last place;
  - flushing subnormals to zero.
- **Latency constants.** bn2 and linear are a few cycles shorter than in the
  original, as shown in the timing table.

## Verifying and simulating

Every module has a self-checking testbench in `tb/`. Each one compares the
module's outputs with a float32/double model computed in the testbench,
checks the cycle count where a latency is known, and ends with a
`TB_RESULT checks=… failures=…` line.

`tb_cnn_small` runs the full network at its real size:
1. It loads random weights and classifies three random images.
2. It checks the logits and probabilities against a double-precision model
   of the whole network.
3. It checks the latency.
4. It counts that the key behaviours happen: layers overlapping in time,
   ReLU clamping in both halves, conv2 switching filters, and padded odd
   window slots.
5. It prints the error statistics of the probabilities: mean, variance,
   largest error and relative RMS error. A typical run shows errors of about
   1e-8. It fails if the relative error exceeds 1e-5.

Build and run with Verilator 5 from the top directory:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl \
        rtl/cnn_pkg.sv tb/tb_pkg.sv tb/tb_cnn_small.sv --top-module tb_cnn_small
    ./obj_dir/Vtb_cnn_small

This takes about a minute. Any other testbench builds the same way with its
own file and top name. `tb/tb_pkg.sv` holds the testbench helpers:
float32 ↔ real conversion, a reference add and multiply, and random float
generation.

To change the network, edit `cnn_small`. Its parameters are the image size
and the channel counts. The kernel and pooling sizes are local constants
there, and the layer sizes are derived from them. Every layer takes its
sizes as parameters.
