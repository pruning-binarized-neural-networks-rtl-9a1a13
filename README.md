# Handwritten-digit classification as logic: binarized and 8-bit single-layer networks

This design classifies 28x28 MNIST handwritten digits with a single-layer
neural network that has been turned into logic. Most FPGA neural-network
accelerators fetch weights from memory and do arithmetic on them. Here the
network is small enough to be the circuit itself:

* **The binarized network** (`bnn_classifier`) keeps only yes/no "predictor
  pixels" for each digit. Its masks are constants folded into the logic. The
  whole path from image to decision is combinational, so the decision is
  ready at the next clock edge and a new image can be taken on every clock.
* **The same binarized network in sequential form**
  (`bnn_serial_classifier`) steps through the masks one pixel per clock. It
  has ten small counters instead of ten adder trees.
* **The 8-bit quantized network** (`quant_classifier`) keeps a signed 8-bit
  weight for every pixel and digit. It walks through the image one pixel per
  clock and gives its decision 785 clocks after the start.

All three take the same binarized input image (`mnist_top`).

The approach comes from the paper *Pruning Binarized Neural Networks Enables
Low-Latency, Low-Power FPGA-Based Handwritten Digit Classification*. The
paper's Artix-7 implementation reported these results:

| network | test accuracy | latency | logic |
|---|---|---|---|
| binarized, 128 + 128 predictors per digit | 87.5 % | 8.47 ns (combinational) | 333 LUTs, 4 registers |
| 8-bit quantized | 91.2 % | 785 cycles at 7 ns = 5495 ns | 2276 LUTs, 288 registers |

These are the paper's numbers. They have not been reproduced with this RTL.

**This RTL contains no trained weights.** The default masks and weights are
deterministic placeholders. They have the right shape and count, but they do
not recognise digits. To classify real digits, pass trained values through
the parameters (see "Supplying trained masks and weights").

## Data path

```
gray_i[28][28] x 8 bit
      |
  binarizer          pixel >= 128 -> 1, flattened row by row: bit = row*28 + col
      |  784 bits
      +--------------------------+---------------------------+
      |                          |                           |
  bnn_classifier           bnn_serial_classifier       quant_classifier
   10 x digit_node          10 counters,                10 accumulators,
   (masks as logic)         1 pixel / clock             1 pixel / clock
   argmax (unsigned)        argmax (unsigned)           argmax (signed)
   4-bit decision reg.      start / busy / done         start / busy / done
      |                          |                           |
  bnn_digit_q              bsq_digit_o                 qnn_digit_o
```

### Input transform (`binarizer`)

MNIST pixels are 8-bit grayscale values. Each pixel becomes digit ink (`1`)
if it is at least 128, and background (`0`) otherwise. With a threshold of
128 this bit is simply the pixel's MSB, so the block costs no logic. The
28x28 binary image is then flattened into a 784-bit vector, row by row.
Every mask and weight table uses the same pixel order, bit `row*28 + col`.

The `THRESH` parameter changes the threshold. A pixel of exactly 128 counting
as ink, and the row-major order, are choices made here.

## The binarized network: dual matchup

This is the least obvious part of the design. Each digit `d` owns two 784-bit
masks:

* `POS_MASKS[d]` marks **positive predictors**: pixels with the largest
  positive weights for `d` in a trained single-layer network. When such a
  pixel is lit, that supports `d`.
* `NEG_MASKS[d]` marks **negative predictors**: pixels with the most negative
  weights for `d`. When such a pixel is dark, that supports `d`.

The total of digit `d` is the number of its matches:

```
total[d] = popcount(img & POS_MASKS[d]) + popcount(~img & NEG_MASKS[d])
```

The decision is the digit with the largest total. This replaces the
multiply-accumulate of a neural network with AND and a count of ones. Because
the masks are parameters, synthesis folds each AND with a constant away. Only
the selected pixels (or their inverses) reach each digit's adder tree: with
128 + 128 predictors per digit, that is 256 one-bit inputs. No weight memory
exists. The weights have been merged into the model's logic.

The best configuration found for this network uses 128 positive and 128
negative predictors per digit ("dual matchup", 2560 yes/no decisions in
total). Other configurations are only a matter of different masks:

* positive predictors only: `NEG_MASKS = '0`;
* negative predictors only: `POS_MASKS = '0`;
* any number N of predictors per digit up to 784.

Totals are 11 bits wide. That is enough even if the two masks of a digit
overlap, in which case such a pixel is counted in both sums.

**Timing.** Image → digit nodes → argmax is one combinational path. The only
state is the 4-bit register `digit_q`, which captures the decision at every
rising edge. Apply an image, and the decision is in `digit_q` after the next
edge. The combinational `totals_o` and `decision_o` are also brought out for
observation. Reset is asynchronous and active low, and clears `digit_q` to 0.

### Argmax

`argmax` replaces the softmax of the trained network. Only the position of the
maximum is needed for a decision. It is a chain of compare-and-select stages.
When totals tie, the **lowest digit index wins**. Ties do happen with the
binarized network: for a blank image, every digit sees all of its negative
predictors absent, so all totals are equal. The same module does the
comparison in the quantized network with `SIGNED = 1`.

### Sequential form (`bnn_serial_classifier`)

This form computes the same totals from the same mask parameters. It steps a
pixel index from 0 to 783, one per clock. At each index, every digit's
counter adds 1 if the pixel is lit and that index is set in the positive
mask, and 1 if the pixel is dark and that index is set in the negative mask.
The clock after the last pixel registers the argmax. Its handshake and its
785-cycle timing are those of the quantized network below.

This is the network before its masks were merged into logic: ten 11-bit
counters and a pixel multiplexer replace the ten adder trees, and each image
takes 785 clocks instead of one. In `mnist_top`, both forms share
`POS_MASKS` and `NEG_MASKS`, so their decisions must always agree.

## The 8-bit quantized network

`quant_classifier` holds `WEIGHTS[d][p]`, a signed 8-bit weight for each of the
10 x 784 digit/pixel pairs (62,720 bits). The input pixel is binary, so
"pixel x weight" is an AND: a lit pixel passes its weight, a dark one passes
zero. Each clock handles one pixel index and adds that pixel's weight into
all ten 18-bit signed accumulators in parallel. The largest possible
magnitude is 784 x 128 = 100,352, so the accumulators cannot overflow.

* A `start_i` seen at a rising edge while idle clears the accumulators.
* The following 784 edges accumulate pixels 0 to 783.
* The 785th edge registers the argmax into `digit_o` and pulses `done_o` for
  one cycle.
* `start_i` is ignored while `busy_o` is high.
* `img_i` must stay stable while `busy_o` is high, because no copy of the
  image is kept.
* `sums_o` shows the accumulators. It is valid together with `done_o`, and
  stays valid until the next start.

The weights are a constant parameter. Synthesis therefore builds ten
784-entry read-only tables indexed by the pixel counter. The original
implementation's register count (288) rules out keeping the weights in
flip-flops.

## Supplying trained masks and weights

The masks come from a trained single-layer network (784 inputs, 10 outputs,
softmax, trained on the binarized images). For each digit:

* the `N_POS` pixels with the largest positive weights become `POS_MASKS[d]`;
* the `N_NEG` pixels with the most negative weights become `NEG_MASKS[d]`.

For the quantized network, the same weights are quantized to signed 8 bits.

All of these are parameters of `mnist_top`, passed down to the blocks. For
example:

```systemverilog
mnist_top #(.POS_MASKS(my_pkg::POS), .NEG_MASKS(my_pkg::NEG), .WEIGHTS(my_pkg::W)) u_top (...);
```

The types are `bnn_pkg::mask_set_t` (`[10][784]` bits, digit-major) and
`bnn_pkg::weight_set_t` (`[10][784][8]`, signed).

The placeholders in `bnn_pkg` are computed as follows:

* For the masks, the k-th predictor of digit d is pixel
  `(MASK_STRIDE[d]*k + MASK_OFFSET[d]) mod 784`. Each stride is coprime to
  784, so these pixels are all distinct. k = 0..127 are the positive
  predictors and k = 128..255 the negative ones.
* For the weights, `w[d][p] = ((37*d + 101*p + 13*d*p) mod 256) - 128`.

## Ports of `mnist_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `gray_i` | in | 28x28x8 | image, `gray_i[row][col]` |
| `bnn_totals_o` | out | 10x11 | binarized network: per-digit match counts (combinational) |
| `bnn_decision_o` | out | 4 | binarized network: decision (combinational) |
| `bnn_digit_q` | out | 4 | binarized network: decision, registered |
| `bsq_start_i` | in | 1 | sequential binarized network: start |
| `bsq_busy_o` | out | 1 | sequential binarized network: counting |
| `bsq_done_o` | out | 1 | sequential binarized network: result pulse |
| `bsq_totals_o` | out | 10x11 | sequential binarized network: match counts |
| `bsq_digit_o` | out | 4 | sequential binarized network: decision |
| `qnn_start_i` | in | 1 | quantized network: start |
| `qnn_busy_o` | out | 1 | quantized network: accumulating |
| `qnn_done_o` | out | 1 | quantized network: result pulse |
| `qnn_sums_o` | out | 10x18 | quantized network: signed sums |
| `qnn_digit_o` | out | 4 | quantized network: decision |

Parameters: `THRESH` (128), `POS_MASKS`, `NEG_MASKS`, `WEIGHTS`.

## Choices made here, and departures

* **Both networks are included**, side by side, sharing the binarizer. The
  binarized network is the main design. The quantized network is the
  higher-accuracy single-layer design it was derived from.
* **The binarized network's main form is combinational.** The version that
  was evaluated (8.47 ns, 4 registers) has its weights merged into the
  logic. `bnn_classifier` is that version, and its 4-bit decision register
  is read as those 4 registers. The sequential form, with one pixel per
  clock and the masks as 784-bit words, is also built
  (`bnn_serial_classifier`). No latency was given for it, so its 785-cycle
  schedule is a choice made here.
* **Not specified at the source, chosen here:**
  * the pixel order (row-major);
  * threshold ties (128 counts as ink);
  * argmax ties (the lowest index wins);
  * how positive and negative matches combine (they are added);
  * reset style (asynchronous, active low);
  * the start/busy/done handshake of the sequential classifiers, and the
    rule that the image is held while they are busy;
  * accumulator and total widths.
* **Not built:**
  * the training and mask selection, which is offline software;
  * a separate module for the earlier "predictor-pixel" classifier (count
    the lit pixels in each digit's region, then take the maximum). It is
    `bnn_classifier` with `NEG_MASKS = '0` and disjoint per-digit region
    masks, a configuration that `tb_bnn_strategies` exercises.
  * any board-level I/O that would deliver images to the FPGA.
* **Placeholder masks and weights** (see above). Accuracy figures need
  trained values.

## Verification

Each block has a self-checking testbench in `tb/`. Each compares the block
against a reference model written independently in the testbench, and ends
by printing `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_binarizer` | boundary values 0/127/128/129/255, a walking pixel for the flattening order, random images |
| `tb_digit_node` | its own overlapping masks; empty, full and random images against a pixel-by-pixel count |
| `tb_argmax` | random totals with frequent ties (lowest index must win), corner cases, unsigned |
| `tb_bnn_classifier` | default masks; one image per clock; totals, decision, one-edge register latency, every digit decided, ties |
| `tb_bnn_strategies` | thirteen instances: positive-only, negative-only and dual predictor strategies at N = 2, 32, 256, 512 per digit, and a predictor-pixel map (each pixel a positive predictor of at most one digit); totals and decisions against a reference, largest possible total reached by each |
| `tb_bnn_serial_classifier` | its own overlapping masks; 785-clock timing, busy, totals and decision, start while busy ignored, a tie |
| `tb_quant_classifier` | its own weights; done exactly 785 clocks after start, busy throughout, signed sums and decision, start while busy ignored, ties |
| `tb_mnist_top` | whole design at default parameters from grayscale images: all three classifiers on every image (the two binarized forms must agree), threshold pixels at 127/128, every digit decided, ties in both networks, start while busy |

Run one with Verilator, for example:

```
verilator --binary --timing --assert -Irtl rtl/bnn_pkg.sv -y rtl tb/tb_mnist_top.sv --top-module tb_mnist_top -o sim
./obj_dir/sim
```

Each testbench has a watchdog that reports a failure if the run hangs. The
full-size top-level test simulates in a few seconds; building it takes
about 20 s.

## Files

* `rtl/bnn_pkg.sv`: sizes, types, placeholder mask and weight generators
* `rtl/binarizer.sv`: threshold and flatten
* `rtl/digit_node.sv`: one digit of the binarized network
* `rtl/argmax.sv`: maximum-value evaluator
* `rtl/bnn_classifier.sv`: binarized network, combinational
* `rtl/bnn_serial_classifier.sv`: binarized network, one pixel per clock
* `rtl/quant_classifier.sv`: 8-bit quantized network
* `rtl/mnist_top.sv`: top level
* `tb/tb_*.sv`: testbenches
