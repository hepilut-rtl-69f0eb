# HePiLUT-style layer-pipelined CNN accelerator

This accelerator classifies 32 × 32 RGB images (CIFAR-10 format, 10 classes)
using FPGA fabric logic only. It needs no block RAM and no external memory
for feature maps, and nothing in it asks for DSP blocks. Every layer of the
network has its own hardware, and the layers form a cascade. A layer starts
as soon as it holds a few lines of its input. Each output pixel goes straight
on to the next layer in the following clocks, so no feature map is ever
stored whole. The only storage is a few lines per layer.

One pixel enters per clock. An image takes 1024 clocks to stream in, and its
class comes out 1046 clocks after its first input word. Images can follow
each other back to back, one result every 1024 clocks. At 137 MHz that is
7.6 µs latency and about 133 800 images/s. The design point this follows is
7716 ns and 129 600 images/s at 137 MHz, so both figures meet it.

## Network

The default network is a small VGG-style stack of seven layers. All
convolutions are valid (unpadded) with stride 1:

| layer    | operation                        | output     |
|----------|----------------------------------|------------|
| input    | RGB image                        | 32 × 32 × 3 |
| conv1    | 3×3, 8 filters, ReLU             | 30 × 30 × 8 |
| conv2    | 3×3, 8 filters, ReLU             | 28 × 28 × 8 |
| pool1    | 2×2 max, stride 2                | 14 × 14 × 8 |
| conv3    | 3×3, 16 filters, ReLU            | 12 × 12 × 16 |
| conv4    | 3×3, 16 filters, ReLU            | 10 × 10 × 16 |
| pool2    | 2×2 max, stride 2                | 5 × 5 × 16 |
| fc       | fully connected, arg max         | 10 scores, class |

The filter counts, the layer list, the pooling size and the requantisation
shifts are parameters of `hepilut_top` (`C1`..`C4`, `K`, `SHIFT1`..`SHIFT4`,
`N_CLASSES`). They are not the widths of a published VGG-7. To run a real
VGG-7, set them to that network's sizes and replace the weights (see
*Numbers and weights*).

## Data flow between layers

Every layer has the same streaming interface, named after the signals of
the layer diagram this design follows:

* `in_valid` (DATA_IN_VALID): the sender has a pixel position on `in_data`,
  which carries all channels of that position at once.
* `in_enable` (DATA_IN_ENABLE): the layer is allowed to run. The host sets it
  on the first layer (`enable` on the top). Each layer passes it on one clock
  later as `out_enable`, so the enable ripples down the cascade.
* `in_ready` (READY): the layer can take a pixel this clock.
* LOAD_EN = `in_valid` AND `in_enable` AND the downstream READY. A pixel is
  loaded exactly when LOAD_EN is high.

**Stall rule.** A layer whose downstream READY is low freezes as a whole. It
loads nothing and none of its pipeline registers move. Its own READY is that
downstream READY AND its enable, so a stall reaches the input in the same
clock through a purely combinational chain. A stall can come from only two
places:

* the result register of the fully connected layer, holding a class the host
  has not yet taken (`res_ready` low);
* `enable` dropped by the host.

Pixels travel in raster order: row by row, each row left to right. Each layer
counts rows and columns itself in its controller (`stream_ctrl`) and wraps at
the end of a frame. Frames therefore need no separator and can follow each
other without a gap.

## The line store: starting before the image is in

This is the central mechanism. Read `line_buffer.sv` first.

A convolution layer with a K × K kernel keeps **K + 1 lines** of its input
(W pixels × C channels each) in a small register memory. The lines are
written into the K + 1 slots in rotation, so each new line overwrites the
oldest one, which is no longer needed. For the first layer that is
32 × 4 × 3 = 384 bytes, against 3072 bytes for a whole image.

The calculation does not wait for the image. Once K − 1 lines are stored,
every pixel of line K completes a window. Its K × K × C window is made of:

* the K − 1 stored lines above it, at the same column, chosen from the
  rotating slots by one multiplexer per window row;
* the arriving pixel itself, at the bottom.

The slot for window row `ky` is `(wslot + 2 + ky) mod (K + 1)`, where `wslot`
is the slot being written. A register array of K × K × C bytes shifts left by
one column on every load and takes this new column on the right. So after the
pixel at row r, column c is loaded (r, c ≥ K − 1, at the stride), the array
holds the whole window whose bottom-right corner is that pixel. `win_valid`
says so one clock later.

Only K − 1 of the K + 1 slots are read for any window. The store keeps the
K + 1 size of the source design. A K-line store would also work with this
read scheme.

The source design is not consistent on when computing starts:

* Its line-loading description starts the first window while line K + 1
  loads, one line later than here.
* Its latency figure (7716 ns at 137 MHz, 1057 clocks for a 1024-pixel image)
  leaves no room for one extra line of delay in every convolution layer.

This design follows the latency figure and computes each window in the clock
after its last pixel arrives.

Because output rows are produced while the input rows arrive, all layers work
at once. While conv1 loads line 20 of image n, conv4 computes rows of the same
image, and the fully connected layer may still be summing image n − 1. The
end-to-end test counts each of these overlaps.

## Convolution layer pipeline

`conv_layer` keeps the bank structure of the source design's layer diagram,
with one register stage per bank:

1. **window**: controller and line store with its multiplexer bank, as above;
2. **multiplier bank**: C_OUT × K × K × C_IN products, one per tap and filter,
   so a complete output pixel (all filters) is computed every clock;
3. **adder bank**: for each filter, the sum of its products plus the bias;
4. **ReLU comparator and requantisation**: negative sums become 0; positive
   sums are shifted right by `SHIFT` and saturated to 255.

An output appears 4 clocks after the load of the pixel that completes its
window. Layers after a pooling layer receive a pixel only every 4th clock or
so, and their banks sit idle in between. The design trades this idle time for
the simplicity of one fixed structure per layer.

## Max pooling

`maxpool_layer` keeps one line of partial maxima (W/P entries) and a running
maximum along the current group of P pixels:

* at the last pixel of a group, the horizontal maximum is written into the
  line entry on the first line of a group of lines, or merged into it on the
  following lines;
* on the last line, that merged value is the output.

Columns or lines that do not fill a whole group are dropped. The output is
registered, 1 clock after the pixel that completes the group.

## Fully connected layer and the result

`fc_layer` receives the 5 × 5 × 16 pooled map as 25 pixel positions and keeps
all 10 class sums in parallel. For position `p`, a multiplexer selects the
weights `w[class][p][*]`, 10 × 16 multipliers form the products, and the
adders add them to the running sums. The sums start from the biases at
position 0.

Three clocks after the last position, the scores are final and a comparator
chain picks the largest. On a tie the lower class index wins. `res_class` and
`res_scores` are then held, with `res_valid` high, until `res_ready`. While
they are held and `res_ready` is low, the layer drops READY and the whole
cascade stalls. No result is ever overwritten.

## Input: AXI-Stream formatter

`stream_formatter` sits between the DMA engine and the first layer:

* Words are 32 bits, carrying the image as interleaved R, G, B bytes in raster
  order, with the first byte in bits 7:0.
* A 7-byte queue turns each three words into four pixels. It takes a word
  whenever at most 3 bytes would remain after this clock's pixel leaves.
* At full rate it therefore delivers one pixel per clock, and its AXI side
  sees `tready` low one clock in four.
* `tlast` must come with the word that ends a frame (768 words for 32 × 32).
  Anything else sets the sticky `frame_err` flag.

## Numbers and weights

* Activations are unsigned 8-bit: pixels 0–255, and post-ReLU values 0–255.
* Weights are signed 8-bit two's complement.
* Biases and sums are signed 32-bit.

Trained parameters are not part of this design. The built-in weight and
bias values are a fixed integer hash of the layer number and flat index
(`weight_val` and `bias_val` in `hepilut_pkg.sv`). The flat index of a
convolution weight is `((filter·K + ky)·K + kx)·C_IN + channel`. For the
fully connected layer it is `(class·25 + position)·16 + channel`.

With the hash weights, the class an image gets means nothing. Only the
agreement with the reference model in the testbench matters.

## Parameter banks and run-time loading

Each weighted layer reads its weights and biases from its own register bank
(`param_bank`). Reset loads the built-in values, so the accelerator works
with no set-up. After reset the host can overwrite any entry through the
`cfg_*` port of the top:

* `cfg_layer` picks the layer: 1–4 for the convolutions, 5 for the fully
  connected layer.
* `cfg_addr` below the layer's weight count N_W is a weight index, and the
  weight is taken from `cfg_data[7:0]`.
* `cfg_addr` from N_W to N_W + N_B − 1 selects bias `cfg_addr − N_W`, taking
  all 32 bits of `cfg_data`.
* Other addresses are ignored.
* At the default sizes N_W is 216, 576, 1152, 2304 and 4000 for layers 1
  to 5, and N_B is 8, 8, 16, 16 and 10.
* A write takes effect at the next clock edge.

The layers read the banks directly, with no extra register stage. Write
only while no image is in flight, or that image mixes old and new
parameters.

To deploy a trained network, write its quantised values through this port,
or change the two hash functions so that reset loads them. The shifts
`SHIFT1`..`SHIFT4` then need to match that network's scaling.

## Where this departs from, or fills in, the source design

Taken from the source design:

* the layer-per-layer cascade with no feature-map storage;
* the K + 1 line store;
* computing starts before the whole image is in; here one line earlier than
  the source's line-loading description (see *The line store*);
* the VALID/READY/ENABLE signals, LOAD_EN as VALID AND ENABLE;
* the bank order multiplexer → multiplier → adder (+bias) → ReLU comparator;
* 8-bit fixed-point data, 32 × 32 RGB input, 3 × 3 kernels;
* the AXI-Stream receiving block, and the 7716 ns / 137 MHz target;
* a register bank feeding each layer's weight and bias inputs, which the
  host can rewrite at run time.

Chosen here, because the source leaves them open:

* the network's layer widths, pooling size, valid padding;
* the requantisation rule and the weights themselves;
* the parameter write port and its address map;
* the whole-layer stall rule, and ENABLE as a forwarded run enable;
* the register window and slot arithmetic of the line store;
* the position-serial fully connected layer and its arg max;
* the 32-bit byte-interleaved stream format and the `tlast` check.

Not built:

* the software that generates the design from a trained model;
* the processor system, DDR and DMA. Their signals are the top's AXI-Stream
  and `enable` ports.

The host can change weights and biases at run time, through the parameter
banks. Layer sizes, kernel sizes and shifts are fixed at elaboration.

Resource use is not matched to the source design's small LUT count. Every
filter tap has its own multiplier: 4 248 in the convolution layers and 160 in
the fully connected layer. Time-sharing the banks of the layers that follow a
pooling layer is the obvious next step, but it is not done here.

## Files

| file | content |
|------|---------|
| `rtl/hepilut_pkg.sv` | widths, types, product and ReLU/requantise functions, weight hash |
| `rtl/stream_ctrl.sv` | per-layer controller: LOAD_EN, READY, position, window valid |
| `rtl/line_buffer.sv` | K + 1 line store and window multiplexer bank |
| `rtl/conv_layer.sv` | convolution layer |
| `rtl/maxpool_layer.sv` | max pooling layer |
| `rtl/fc_layer.sv` | fully connected layer and arg max |
| `rtl/stream_formatter.sv` | AXI-Stream to RGB pixel formatter |
| `rtl/param_bank.sv` | one layer's weight and bias registers, host write port |
| `rtl/hepilut_top.sv` | the whole accelerator |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_conv_line_loading.sv` | a 100 × 100 image through one 5 × 5 convolution layer |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends with
`$finish`. Each has a watchdog. Each compares the module with values it
computes itself. Example with plain Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_hepilut_top \
  rtl/hepilut_pkg.sv rtl/stream_ctrl.sv rtl/line_buffer.sv rtl/conv_layer.sv \
  rtl/maxpool_layer.sv rtl/fc_layer.sv rtl/stream_formatter.sv \
  rtl/param_bank.sv rtl/hepilut_top.sv tb/tb_hepilut_top.sv
./obj_dir/Vtb_hepilut_top
```

Building the top takes one to two minutes, and the run takes under a second.
The unit testbenches need `hepilut_pkg.sv`, the module, and whatever it
instantiates (`stream_ctrl`, `line_buffer`).

`tb_hepilut_top` runs the accelerator at its default size with no parameter
overrides. It streams six images and compares every class and every score
with an integer model of the whole network. Before the sixth image it
rewrites every conv1 weight and bias and one fully connected bias through
the `cfg_*` port, and the model uses the new values for that image. It then
checks:

* the latency is at most 1057 clocks (7716 ns at 137 MHz);
* results are exactly 1024 clocks apart at full rate;
* each of these events happened at least once:
  * formatter back-pressure;
  * a stall caused by an untaken result;
  * an enable pause;
  * first-layer output while its image is still loading;
  * line slot reuse;
  * two images in the pipeline at once;
  * a run-time parameter reload.

The unit testbenches use small sizes, random stalls and random data:

* `tb_stream_ctrl`: stride 2;
* `tb_line_buffer`: 4 frames, every window checked;
* `tb_conv_layer`: 4-clock latency and random weights;
* `tb_maxpool_layer`: odd height;
* `tb_fc_layer`: 3-clock latency and result hold;
* `tb_stream_formatter`: full-rate pixel rate and a malformed frame;
* `tb_param_bank`: reset values, random writes and out-of-range addresses.

`tb_conv_line_loading` runs one convolution layer at the size of a worked
example: a 100 × 100 image, a 5 × 5 kernel and stride 1. It checks all
96 × 96 outputs of two filters. It also checks that the first output
appears while the fifth image line is still loading, and that outputs then
keep pace with the input.
