# LeNet-1 accelerator in SystemVerilog

This is a small accelerator that classifies handwritten digits with the LeNet-1
convolutional network. Its main idea is to use a single convolution datapath for
both convolution layers. The datapath is a chain of five multiply-accumulate
Processing Elements (PEs), as wide as one kernel row, followed by an
accumulation block and a pooling block. The network is small enough that all
weights and intermediate maps stay on chip. One inference of a 28x28 image
takes 44,149 clocks, which is 0.44 ms at 100 MHz.

The block structure follows a published design for a low-power LeNet-1
accelerator on a Xilinx Artix-7 FPGA (XC7A200T, 100 MHz). That design names
the blocks this RTL has: feature map buffer, intermediate data buffer,
weight buffer, PE array, accumulation block, pooling/activation block and
fully connected layer. It describes their function, and in part their
insides. It does not give the dataflow, the number format, the widths, the
sizes or the control. These, and everything in the "Departures" section, are
this implementation's own choices.

## The network

| stage | operation | output |
|---|---|---|
| input | 28x28 grey image | 1 @ 28x28 |
| conv1 | 5x5 convolution, 4 filters, bias, ReLU | 4 @ 24x24 |
| pool1 | 2x2 max, stride 2 | 4 @ 12x12 |
| conv2 | 5x5 convolution over all 4 maps, 12 filters, bias, ReLU | 12 @ 8x8 |
| pool2 | 2x2 max, stride 2 | 12 @ 4x4 = 192 features |
| fc | 192 -> 10, bias | 10 scores (logits) |
| softmax | exp / sum | 10 probabilities, plus the arg-max class |

## Datapath

```
 load port ──► IFMB ──► IDB ──► PE0 ─► PE1 ─► PE2 ─► PE3 ─► PE4 ──► AB ──► PAB ──┬─► FC ─► softmax ─► logits, class, probs
      │          ▲               ▲  (one 5-weight kernel row)          │        │
      └──► WB ───┼───────────────┘                              bias ◄─┘        │
                 └───────────────── layer-1 pooled maps ◄──────────────────────┘
```

| module | block |
|---|---|
| `lenet_top` | wiring, load-port decode, busy/done |
| `lenet_ctrl` | sequencer |
| `ifmb` | Input Feature Map Buffer: 2048 x 16-bit memory with one clock of read latency |
| `idb` | Intermediate Data Buffer: two row stores between the IFMB and the PEs |
| `weight_buffer` | Weight Buffer: 260 kernel rows of 5 weights, plus 16 biases |
| `pe`, `pe_array` | Processing Element, and the chain of five |
| `accum_block` | Accumulation Block (AB): adder and partial-sum FIFO |
| `pool_act_block` | Pooling and Activation Block (PAB): ReLU, comparator, residual FIFO |
| `fc_layer` | fully connected layer, ten MACs in parallel |
| `softmax_unit` | probabilities |
| `sync_fifo` | FIFO used by AB and PAB |
| `lenet_pkg` | widths, `tag_t`, `ld_sel_e`, `requant()` |

## How a convolution runs: row passes

This is the part that needs the most explanation.

A 5x5 convolution output row is a sum of row correlations. For output channel
`m` and output row `r`:

```
out[m][r][x] = bias[m] + sum over input channel c, kernel row i of
               sum_{j=0..4} w[m][c][i][j] * in[c][r+i][x+j]
```

The inner sum over `j` is one **row pass**. The controller walks the loops in
this order:

```
for m (output channel) → for r (output row) → for c (input channel) → for i (kernel row):
    one row pass with kernel row w[m][c][i][*] over input row r+i of map c
```

That is 480 passes for conv1 and 1,920 for conv2. Each pass has three steps:

1. **Weight read.** The weight buffer returns the whole kernel row in one
   clock. It is stored in five banks, one per tap.
2. **Go.** Once the IDB holds input row `r+i` of map `c`, it is told to
   stream (`go`).
3. **Stream.** The IDB plays the row into PE0, one word per clock. The
   kernel row goes to the PE array (`w_en`) together with the first word.
   The controller tags each word. The tag is `valid` from column 4 on, once
   the 5-wide window is full. It also marks the `first` pass of the output
   row, the `last` pass, and the parity of `r`.

The next pass starts as soon as the stream ends. The array is not drained:
see "Passes overlap in the array" below. Only after the last pass of a layer
does the controller wait 9 clocks, so that all results have left the
array and the pooling block.

**Fetch runs ahead.** The IDB has two row stores. A second walker over the
same loops asks for the rows of the coming passes whenever a store is free.
Each fetch takes `W` IFMB reads and a few clocks to finish. The walker
does not start on layer 2 before the last layer-1 result is in the IFMB,
because layer 2 reads those results.

With one IFMB read port, the row fetches set the pace. The fetch of a row
can begin only when a store frees up, at the end of a stream, so a pass
takes `W + 3` clocks, with `W` the input row length (28 or 12). Each layer
also pays `W + 2` clocks for its first fetch, and 9 clocks of drain after
its last pass. The total is 1 + 1 + 30 + 480·31 + 9 + 1 + 14 + 1920·15 + 9 + 2 = 43,747 clocks
up to the FC result. The softmax adds 402 more.

### Why a chain of PEs computes a correlation

Each PE does `Po <= Pi + W * I` with a stationary weight. The input word
passes **two** registers in each PE: the input register in front of the
multiplier, then `Io`. The partial sum passes **one**: `Po`. Because of this
skew, a partial sum moving down the chain meets an input word that is one
column older at each PE. The output of PE4 is then

```
Po4(t) = sum_{k=0..4} W_k · x(t − 5 − k)
```

so PE0 holds the tap for the newest word and PE4 the tap for the oldest.
`pe_array` loads kernel-row tap `j` into PE `4 − j`. Its output is then the
correlation `sum_j kw[j]·x[c−4+j]`, ready N+1 = 6 clocks after the word that
completes the window. The `tag_t` side band goes through a 6-stage shift
register, so each tag stays next to its sum. The array never stalls. Between
passes it carries garbage with `valid = 0`, and the blocks downstream ignore
it.

### Passes overlap in the array

A word meets a PE's weight only while it sits in that PE's input register.
The first word of a pass reaches PE `k` `2k` clocks after it enters PE0.
So `pe_array` does not load all five weights at once. It keeps the new
kernel row in a holding register and passes `w_en` down a delay line: PE
`k` takes its new weight `2k` clocks after `w_en`, just as the first new
word arrives. Words of the previous pass that are still further down the
chain keep meeting the old weights. Passes can therefore follow each
other with a gap of one clock. The only condition is that two weight
loads are at least 2N−1 = 9 clocks apart, which any row of 12 or more
words ensures. Sums at a pass boundary mix two passes, but they belong to
columns 0–3, whose tags are not valid.

### Accumulating passes: the AB

The AB keeps the running sums of one output row in a FIFO that is one row
deep (24 words). For each valid partial sum it does one of three things:

- **First pass:** it adds the channel bias. The bias is scaled to Q16.16.
- **Middle passes:** it adds the head of the FIFO and pops it.
- **Last pass:** it sends the total on to the PAB.

A total that is not from the last pass is pushed back at the tail. After
each pass the FIFO again holds the row in column order. When no valid data
arrives, nothing moves: the block is frozen. Conv1 uses 5 passes per output
row and conv2 uses 20 (4 channels × 5 kernel rows).

### Pooling: the PAB

For each finished sum, the PAB:

1. shifts it back to Q8.8, with saturation;
2. applies ReLU;
3. keeps the larger of each column pair in a holding register;
4. on an even row, pushes the pair maxima into the residual FIFO (12 deep);
5. on an odd row, compares each pair maximum with the FIFO head and sends
   out the larger.

The result is one word per 2x2 window, in row order. ReLU is applied before
the max. The two commute, so this gives the same result as pooling first.

### Where pooled words go

The controller counts pooled words.

- **Layer 1.** Words are written to the IFMB at `1024 + count`. The
  production order is channel → row → column, which is exactly the layout
  conv2 reads. No reordering is needed.
- **Layer 2.** Words go straight to the FC layer as features 0..191, in the
  same order.

## Fully connected layer and softmax

`fc_layer` has ten multipliers. Each feature is multiplied by its ten weights
in one clock, so the layer keeps pace with any feature rate. After feature
191 it does three things:

1. adds the biases;
2. converts the ten sums to Q8.8 logits;
3. takes the arg-max as the class. On a tie, the lower index wins.

`done` rises on the third clock edge after the last feature.

`softmax_unit` then computes the probabilities in six steps:

1. It subtracts the largest logit, so every exponent is ≤ 0.
2. It evaluates `exp(d)` as `2^(d·log2 e)`, multiplying by 369 = round(256·log2 e).
3. It takes `2^frac` from a 17-point table `round(32768·2^(k/16))`, with
   linear interpolation between points.
4. It shifts the result right by the integer part.
5. It sums the ten terms.
6. It divides each term by the sum with a 38-step restoring divider.

The probabilities are Q0.16, with 65535 standing for 1.0, and are within
about 0.005 of the exact softmax. The unit takes 2 + 10 + 39·10 = 402 clocks.

## Number format

| quantity | format |
|---|---|
| features, weights, biases, logits | signed 16-bit Q8.8 |
| products and partial sums | signed 32-bit Q16.16 (`ACC_W`) |
| probabilities | unsigned 16-bit Q0.16 |

Q16.16 sums return to Q8.8 through `lenet_pkg::requant`: an arithmetic shift
right by 8, then saturation to ±32767/−32768. The 32-bit accumulator can hold
conv2's 100-term sums, provided the weights and activations stay in the
ranges a trained LeNet-1 uses. It does not check for overflow.

## Using it

Ports of `lenet_top`:

- `clk`, `rst`: clock and reset. Reset is synchronous and active high.
- Load port: `ld_valid`, `ld_sel`, `ld_addr`, `ld_data`. Use it only while
  `busy` is low.
- `start`: a one-clock pulse runs one inference on the image in the IFMB.
- `busy`: high for the whole inference.
- `done`: pulses once when the results are valid. The results then stay until
  the next `start`.
- `layer`: 0 while conv1 runs, 1 from conv2 on.
- Results: `logits[10]` (Q8.8), `class_id`, `probs[10]` (Q0.16).

Load-port addresses (`ld_data` is always one Q8.8 word):

| `ld_sel` | `ld_addr` |
|---|---|
| `LD_IFM` | `row*28 + col` |
| `LD_CONVW` | `{kernel_row_index[8:0], tap[2:0]}`. Conv1: `kernel_row_index = m*5 + i` (m < 4). Conv2: `20 + (m*4 + c)*5 + i` (m < 12, c < 4). Tap `j` is the kernel column. |
| `LD_CONVB` | conv1 channel `m` at `m`, conv2 channel `m` at `4 + m` |
| `LD_FCW` | `{feature[7:0], class[3:0]}`, with `feature = m*16 + row*4 + col` of the 12x4x4 pooled maps |
| `LD_FCB` | `class` |

The FC feature order is channel-major. Weights trained in a framework that
flattens in row, column, channel order must be permuted to match.

Weights only need loading once. After that, each new image needs 784
`LD_IFM` writes and a `start`.

## Departures from the published design

- **Activation.** The published text gives the pooling/activation block a
  "softmax" activation. A softmax is not an element-wise activation for a
  hidden layer, so the PAB uses ReLU. The softmax is applied where the text
  also places it, after the fully connected layer.
- **No off-chip feature maps.** The published design moves output feature
  maps to off-chip DRAM. LeNet-1 fits on chip, so this design has no DRAM
  interface. The host loads the image and weights through the load port and
  reads the results from ports.
- **Biases.** Biases are not mentioned in the published design. They are
  included here because a trained LeNet-1 has them.
- **Schedule.** The published design speaks of a pipelined architecture
  without details. Here, row fetches overlap streaming, and consecutive row
  passes overlap in the PE array. The weight read and the IDB handshake
  between passes are not hidden. That costs about 3 of the 31 (conv1) or 15
  (conv2) clocks of a pass.
- **Not built: compression, tiling, dynamic weight loading.** The published
  text only names these techniques and gives no method.
- **Not built: FPGA results.** Power (1.775 W), resource counts and the
  accuracy comparison with a Keras model come from an FPGA implementation.
  They are not reproduced or checked here.

## Verification

Each module has a self-checking testbench in `tb/`. Each compares the module
against values computed independently in the testbench. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_pe` | `Po = Pi + W·I(t−1)`, the `Io` delay and the weight enable, every clock with random values |
| `tb_pe_array` | row correlations for random rows and kernels, back-to-back passes with gaps of 1 clock and more, output count, exact 6-clock latency |
| `tb_accum_block` | sums over 1–20 passes of rows up to 24 long, with idle gaps; bias; row parity |
| `tb_pool_act_block` | saturation, ReLU and 2x2 max against a model, including an all-negative block |
| `tb_fc_layer` | logits (including saturation), arg-max and the `done` timing |
| `tb_softmax_unit` | bit-exact against an integer model of the method, within 0.006 of real softmax, clock count |
| `tb_ifmb`, `tb_weight_buffer` | storage and read latency |
| `tb_idb` | overlapped fetch and stream with random handshakes, both stores full, order, timing |
| `tb_lenet_ctrl` | every fetch address and every pass's weight row, bias index and tags, with the real IDB; weight load with the first word; no early layer-2 fetch; write-back addresses, FC routing, `done` |
| `tb_lenet_top` | two full inferences at the default size; reference model below |

`tb_lenet_top` runs at the default size. It loads random weights and two
synthetic images. A LeNet-1 reference model in integer arithmetic, using the
same rounding rules, gives the expected results. The testbench checks:

- all 576 layer-1 pooled values in the IFMB;
- the ten logits;
- the class;
- the probabilities (against a real-valued softmax);
- the exact clock count.

It also counts each datapath mechanism and fails if one never happened. The
mechanisms are weight loads, a fetch overlapping a stream, a pass entering
the array beside the previous one, bias insertion,
the frozen AB, FIFO reuse, ReLU clipping, both comparator outcomes,
write-back, the layer switch and FC feeding.

To run a testbench with Verilator 5, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/lenet_pkg.sv tb/tb_lenet_top.sv \
          --top-module tb_lenet_top -o sim && ./obj_dir/sim
```

Replace the testbench name for the others. The full-size top-level test
simulates about 93,000 clocks (two inferences plus loading) and finishes
in under a second.

## Changing it

- **Network size.** `IN_W`, `C1`, `C2` and `NCLASS` on `lenet_top` set the
  network size. The kernel size `K` (5) and the word widths live in
  `lenet_pkg`. Some limits are not parameterised:
  - the controller's loop counters are 5 bits wide (up to 31 channels or
    rows);
  - the load-port address fields are fixed at 12 bits;
  - `ld_addr` fields must cover the weight and feature counts;
  - output rows must be even for the pooling.
- **Speed.** The row fetch now sets the pace: one IFMB read per word
  through a single read port. Reading two words per clock from a wider
  IFMB would roughly halve the fetch time. The stream would then set the
  pace, at `W + 2` clocks per pass, and reading the next kernel row during
  the stream would be the next step.
