# A small, fast LeNet accelerator in SystemVerilog

This is RTL for a LeNet-style convolutional neural network that classifies
32x32 grayscale handwritten digits (MNIST) into ten classes. It has one
circuit per layer. All coefficients and intermediate data stay in on-chip
memory, so nothing waits on external memory. It follows the layer structure,
word widths and multiplier budget of the FPGA accelerator published by Irmak,
Alachiotis and Ziener ("An Energy-Efficient FPGA-based Convolutional Neural
Network Implementation"). That accelerator was built with HLS. This RTL is a
new, independent implementation. Where the publication gives no detail,
this design makes its own choices, and they are listed below.

Main figures:

| | published accelerator | this RTL |
|---|---|---|
| multipliers (conv1 / conv2 / hidden / output) | 25 / 75 / 12 / 8 | 25 / 75 / 12 / 8 |
| weight / activation / bias width | 8 / 16 / 32 bits | 8 / 16 / 32 bits |
| cycles per image (conv1+pool, conv2+pool, hidden, output) | 3144, 3599, 1878, 160 = 8781 | 3078, 2358, 1203, 63 = 6702 |
| images/s at 125 MHz | 14K | 18.6K |

## The network

```
image 32x32 ──conv 5x5, 3 maps, ReLU──► 28x28x3 ──max 2x2──► 14x14x3
            ──conv 5x5, 12 maps, ReLU─► 10x10x12 ──max 2x2──► 5x5x12 = 300
            ──fully connected 300→48, ReLU──► 48
            ──fully connected 48→10──► 10 scores ──argmax──► class
```

Convolutions are "valid": there is no padding, so a 5x5 kernel shrinks each
side by 4. That is the only reading under which the second pooled output has
5x5x12 = 300 values, the input size of the hidden layer.

## Number format

Weights are 8-bit, activations 16-bit and biases 32-bit, all signed two's
complement. The publication gives these widths but not where the binary
point sits. This design fixes it as follows (`cnn_pkg::WFRAC = 7`):

* A weight has 7 fraction bits, so its range is [-1, 1).
* An activation keeps whatever scale the input image has.
* A bias is stored at the scale of an activation x weight product.

Each layer adds the bias to its 32-bit sum of products. It then shifts the
result right arithmetically by 7 bits, which rounds toward minus infinity,
and saturates it to 16 bits. This is `cnn_pkg::requant`. Every layer except
the last then applies ReLU. The output layer does not requantise: its ten
scores are the raw 32-bit sums. If you train a model for this hardware,
quantise it this way, or change `WFRAC` and `requant`.

Sums are 32 bits wide. With 16-bit activations and 8-bit weights, no sum of
products can overflow 32 bits: the largest is the hidden layer's, 300
products, below 1.3·10⁹. Only a bias close to ±2³¹ could make a sum wrap.

## How a convolution layer streams

The hardest part to follow is how the convolution layers turn a stream of
memory reads into pooled maps with no stalls.

**Window generator (`window_gen`).** Pixels arrive in raster order, one per
cycle. A shift register of (K-1)·W+K words always holds the last four rows
plus five pixels, so each of the 25 window elements is a fixed tap. Once
row ≥ 4 and column ≥ 4, every new pixel completes a window. `win_valid` then
goes high for one cycle. The row and column counters wrap at the end of a
frame. A second frame can therefore follow the first with no gap: the
windows that straddle the frame boundary are simply never marked valid.

**Engine (`conv_engine`).** 25 multipliers (DSP slices on an FPGA) take the
window and the kernel. Their products are registered, and an adder tree sums
them in the next cycle. The result comes two cycles after the window, and a
new window can enter every cycle. A tag travels with each window through the
pipeline. It tells the logic downstream which kernel and bias this sum
belongs to, so the kernel can change from one cycle to the next.

**Pooling (`maxpool2x2`).** On even rows, the maximum of each horizontal
pair goes into a row buffer of OW/2 words. On odd rows, the pair maximum is
compared with the buffered value and the 2x2 maximum comes out. Like the
window, it wraps at the end of a map.

**Layer 1 (`conv1_layer`).** There is one engine. The image is read three
times back to back (3072 reads), once for each kernel; the tag is the map
number. Pooled values are written in order, so the output address is just a
counter. The layer takes 3072 + 6 cycles.

**Layer 2 (`conv2_layer`).** There are three engines that share one window.
Engine *e* computes output maps 4e … 4e+3, one per round, over four rounds.
In each round the three 14x14 input maps pass one after another (3·196
reads), and every engine applies its own kernel for (its map, that input
map). Each engine has a 100-entry partial-sum buffer, one entry per 10x10
output position:

* During input map 0, an entry is loaded with sum + bias.
* During input map 1, the new sum is added to it.
* During input map 2, the final sum goes through requantisation and ReLU
  into the engine's max pool.

The twelve pooled 5x5 maps are written to twelve separate 25-word banks. The
layer takes 4·3·196 + 6 = 2358 cycles.

## Fully connected layers

**Hidden layer (`fc_hidden`).** There is one multiplier path per 5x5 map
bank. At step *j*, all twelve banks are read at address *j*, and twelve
products against twelve weight memories are formed in the same cycle. Each
path has its own weight memory so that all twelve weights arrive together.
A node takes 25 steps. The bias is added at the first step and the result is
requantised with ReLU after the last. Nodes follow each other without a gap,
so the layer takes 48·25 + 3 cycles. The 300 inputs are flattened map-major
(index = map·25 + row·5 + col). The publication does not state the order, so
a model trained with a different flattening must have its weights permuted.

**Output layer (`fc_output`).** There are eight multipliers. Step *j* (0…5)
of node *n* multiplies inputs j·8 … j·8+7, so a node takes six cycles. The
ten scores are then compared, and the class is the index of the largest
score. On a tie, the lowest index wins.

## Top level and control (`lenet_top`)

A four-state sequencer (conv1 → conv2 → hidden → output) starts each layer on
the previous layer's `done`. A single image therefore passes through the
layers one after another. A new image cannot enter while one is in progress.
This matches the publication's cycle budget, where the total per image is
the sum of the per-layer counts. Each layer has a start / busy / done
handshake. Assertions check that at most one layer is busy at any time, and
that no layer receives `start` while it is busy.

Ports:

* `img_we / img_waddr / img_wdata`: write the image, one 16-bit pixel per
  cycle, at address row·32 + col.
* `cfg_we / cfg_sel / cfg_addr / cfg_data`: write coefficients. `cfg_sel`
  (`cnn_pkg::cfg_sel_e`) picks the memory. A weight takes the low 8 bits of
  `cfg_data`; a bias takes all 32.

  | memory | address |
  |---|---|
  | conv1 weight | map·25 + r·5 + c |
  | conv2 weight | (out·3 + in)·25 + r·5 + c |
  | hidden weight | {input map (4 bits), node·25 + position (11 bits)} |
  | output weight | node·48 + input |
  | any bias | node or map number |

* `start`: a pulse that runs one image. `busy` stays high until `done`
  pulses. `score[0:9]` and `class_id` are then valid, and `cycles` gives the
  start-to-done count (6702).

Write the image and the coefficients only while `busy` is low. In the
original board setup, images came in over a serial link and the class was
shown on LEDs. Those test-setup parts are not included. Drive the load ports
from your own host interface, and drive LEDs from `class_id`.

Reset is asynchronous and active low. It clears control state only. The
memories are not reset, so load all coefficients before the first `start`.

## Where this departs from the original

* **Schedules are this design's own.** The per-layer cycle counts are lower
  than the published ones (6702 against 8781 cycles per image) because each
  layer streams without pauses. The publication gives the multiplier counts
  but not the loop schedules.
* **Coefficients are in RAM, not ROM.** The trained weights are not
  published, so the coefficient memories are RAMs with a load port rather
  than ROMs with initial contents.
* **Fixed-point details are assumed.** The binary point, the rounding
  (floor), the saturation, the map-major flattening and the argmax
  tie-break are this design's choices. The original matched its Python model
  bit for bit; this RTL matches only the reference model in
  `tb/lenet_ref_pkg.sv`.
* **No overlap between images.** The layers of different images do not run
  at the same time.

## Files

| file | content |
|---|---|
| `rtl/cnn_pkg.sv` | widths, network sizes, `requant`, load-select enum |
| `rtl/window_gen.sv` | 5x5 line-buffer window generator |
| `rtl/conv_engine.sv` | 25-multiplier convolution engine |
| `rtl/maxpool2x2.sv` | streaming 2x2 max pool |
| `rtl/act_ram.sv` | simple dual-port activation buffer |
| `rtl/conv1_layer.sv`, `rtl/conv2_layer.sv` | convolution + pooling layers |
| `rtl/fc_hidden.sv`, `rtl/fc_output.sv` | fully connected layers, argmax |
| `rtl/lenet_top.sv` | buffers, layers, sequencer |
| `tb/lenet_ref_pkg.sv` | bit-exact array-level reference model |
| `tb/*_tb.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
For example, the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/cnn_pkg.sv tb/lenet_ref_pkg.sv rtl/lenet_top.sv tb/lenet_top_tb.sv \
  --top-module lenet_top_tb
./obj_dir/Vlenet_top_tb
```

`lenet_top_tb` runs at full size:

* It loads random coefficients into every layer.
* It classifies three images back to back: small pixel values, large values
  that drive requantisation into saturation, and a sparse stroke pattern.
* It compares all scores and the class with the reference model.
* It checks the cycle count against the published 8781 cycles.
* It counts the layer runs and the ReLU and saturation events.

The layer testbenches do the same for one layer each. They also check that
layer's exact latency and compare it with the published per-layer count.
Because the coefficients are random, the class itself carries no meaning in
these tests; what they check is that the RTL agrees bit for bit with the
reference.
