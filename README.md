# FC network: an instantly trained nearest-neighbour classifier in SystemVerilog

Kak's Fast Classification (FC) network is a neural network whose training
needs only two passes over the training set and has no iterative step:

1. every training exemplar becomes one hidden neuron, and its input vector
   becomes that neuron's weight vector. Its target value becomes the
   neuron's output weight;
2. each neuron gets a *radius of generalization*: half the distance from
   its exemplar to the nearest other exemplar. So no two neurons' regions
   overlap.

To classify a test vector `x`, the network measures the distance from `x` to
every stored exemplar. If `x` lies inside one exemplar's radius, that neuron
"fires" and the network outputs the exemplar's target (the 1NN rule). If not,
the network blends the targets of the `k = 4` nearest exemplars with fixed
fuzzy weights (the kNN rule).

This RTL is a fully pipelined hardware version of that network. Training
takes place when the design elaborates. The exemplars, radii and targets
become constants that synthesis folds into the subtractors and comparators.
There are no weight memories and no training logic on chip. To retrain,
elaborate again with new parameters. The circuit accepts one test vector
per clock and never stalls.

## Data path

```
 x (N x B bits)
   │
   ├─► hidden neuron 0 ─┐   distance to exemplar 0, radius test   ─► h[0]
   ├─► hidden neuron 1 ─┤                                         ─► h[1]
   │        ...         │                                            ...
   └─► hidden neuron M-1┘                                         ─► h[M-1]
                                 │
                    fuzzy rule base: bitonic selection of the
                    4 buses with the smallest distance, sorted
                                 │  mu[0..3], nearest first
                                 ▼
                    output neuron: 1NN if mu[0] fired, else
                    24/32·v0 + 4/32·v1 + 2/32·v2 + 2/32·v3
                                 │
                                 ▼  y (2B bits, signed, B fraction bits)
```

| module | role |
|---|---|
| `fc_network` | top: runs training at elaboration, wires the three stages |
| `fc_pkg` | training functions (distance, radii) and the default training set |
| `fc_hidden_layer` | `M` hidden neurons side by side |
| `fc_hidden_neuron` | `fc_distance` followed by `fc_activation` |
| `fc_distance` | city-block distance to a constant vector, pipelined |
| `fc_activation` | constant radius comparator; builds the h bus |
| `fc_fuzzy_rule_base` | `fc_bitonic_converter` followed by `fc_bitonic_merge_select` |
| `fc_bitonic_converter` | unsorted → one bitonic sequence |
| `fc_bitonic_merge_select` | bitonic → the K smallest, sorted |
| `fc_bitonic_stage` | one registered column of compare-and-swap units |
| `fc_cas` | compare-and-swap, ascending (+BM[2]) or descending (-BM[2]) |
| `fc_output_neuron` | fuzzy weighting by shifts, adder tree, 1NN/kNN choice |

### The h bus

Each neuron's result travels as a `2B+1` bit bus. The whole bus moves through
the sorter:

| bits | content |
|---|---|
| `[2B]` | fired: the distance is below this neuron's radius |
| `[2B-1:B]` | the neuron's output weight `v` (a constant) |
| `[B-1:0]` | the distance `d` |

Carrying `v` with the distance means the output neuron never needs to know
*which* neuron a neighbour was. Nothing has to track neuron indices through
the sorter. An index would need `log2 M` bits. The weight needs `B` bits
whatever `M` is.

### Distance

The metric is the city-block distance, `d = Σ |x_j − w_j|`. It needs no
multipliers, unlike the Euclidean distance. Each neuron has `N` subtractors
with a constant operand, then `N` absolute-value units, then an adder tree of
`ceil(log2 N)` levels. There is a register bank after each of these. The
distance is kept in `B` bits. Each tree adder saturates at `2^B − 1`, so an
exemplar that is far away still ranks as far. The default training set keeps
its values below `(2^B − 1)/N` so that training distances never saturate. A
test input may still saturate.

A neuron fires when `d < r` (strictly less). The radius is
`r = floor(d_min / 2)`. Training computes it with the same saturating
arithmetic the hardware uses.

## k-nearest selection with a bitonic network

The hardest part of the design is how the fuzzy rule base picks the four
nearest buses out of `M` without a full sort. It uses a bitonic network in
which every comparator column is followed by a register bank.

*Converter (`fc_bitonic_converter`).* It treats the `M` unsorted buses as
`M/2` bitonic pairs. It then runs merge phases `p = 1 … log2 M − 1`. Phase
`p` merges blocks of `2^(p−1)` lanes into blocks of `2^p`. It uses comparator
columns of stride `2^(p−1), …, 2, 1`. A block whose bit `p` of the lane index
is 0 sorts ascending (+BM). A block with that bit set sorts descending (−BM).
After the last phase, lanes `0 … M/2−1` rise and lanes `M/2 … M−1` fall,
which makes one bitonic sequence of length `M`.

*Merge-select (`fc_bitonic_merge_select`).* An ascending merge of a bitonic
sequence takes `log2 M` columns, with strides `M/2, M/4, …, 1`. After the
column of stride `s`, the smallest `2s` values sit in lanes `0 … 2s−1`,
still bitonic. Only the lower half is needed from then on, until the block
size falls below `K`. So the column of stride `s` keeps only the
comparators whose lower lane is below `max(2s, K)`. The rest are left out,
and only lanes `0 … K−1` leave the network. For `M = 8, K = 4` this removes
6 of the 12 comparators of the last phase.

The 1NN rule needs no special path. A neuron that fired is strictly inside
half the gap to its nearest neighbour. So its distance is the smallest of
all, and it comes out as `mu[0]` with its fired bit set. The output neuron
checks that bit at its last stage. This keeps the rate constant and the
control logic empty.

The order of buses with equal distances is not specified. Ties are a
genuine ambiguity of the kNN rule.

## Output neuron and number format

The four fuzzy grades depend only on rank: 24/32, 4/32, 2/32 and 2/32. They
sum to 1 and fall with rank. Each grade is a sum of right shifts
(`24/32 = >>1 + >>2`, `4/32 = >>3`, `2/32 = >>4`), so no multiplier is used.

* The output weights are signed `B`-bit integers.
* The output `y` is a signed `2B`-bit fixed-point number with `B` fraction
  bits. At `B = 8` it is 16 bits: a sign bit, 7 integer bits and 8 fraction
  bits.
* The shifts lose no bits when `B ≥ 4`. Because the grades sum to 1, the sum
  cannot overflow.
* `fired = 1` means `y` is the nearest exemplar's target exactly, the 1NN
  output.

The pipeline has six register banks: input, shifts, three adder-tree levels
(over five shifted terms) and the 1NN/kNN selection.

## Timing

There is one result per clock, with no stalls and no back-pressure.
`out_valid` follows `in_valid` by a fixed latency:

| stage | cycles | defaults (N=4, M=8) |
|---|---|---|
| hidden neuron | `3 + ceil(log2 N)` | 5 |
| fuzzy rule base | `log2 M · (log2 M + 1) / 2` | 6 |
| output neuron | 6 | 6 |
| **total** | | **17** |

Only the valid bits are reset (`rst_n`, asynchronous, active low). Data
registers are not reset. Their contents are meaningless while `out_valid` is
low.

## Parameters and training

`fc_network` parameters:

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | elements per input vector |
| `M` | 8 | hidden neurons = training exemplars; a power of two, ≥ 4 |
| `B` | 8 | bits per element, per distance and per output weight |
| `TRAIN_X` | generated | `[M][N][B]` exemplars; `TRAIN_X[i][j]` is element `j` of exemplar `i` |
| `TRAIN_V` | generated | `[M][B]` signed targets (output weights) |

`K = 4` is fixed (`fc_pkg::K_NN`), because the grades of the output neuron are
written for four neighbours. The radii are not a parameter. `fc_network`
derives them from `TRAIN_X` with `fc_pkg::prescribe_radii`. A training set
can have up to `fc_pkg::MAX_TRAIN_BITS` (8192) bits in `TRAIN_X`.

The default training set is only a placeholder for simulation:

* element `j` of exemplar `i` is taken from a 32-bit linear congruential
  sequence (`s ← s·1103515245 + 12345`, seed 1, bits [23:16], in order
  `i`, `j`), reduced modulo `floor((2^B − 1)/N) + 1`;
* target `i` is `16·i − 64`.

For a real problem, pass your own `TRAIN_X` and `TRAIN_V`. Scale the inputs
so that `N · max|x_j − w_j|` stays below `2^B` if saturation is unwanted.

## Where this design departs from, or fills in, the original description

The published FPGA design was produced by a netlist generator. This RTL
follows its architecture, bus layout, pipeline depths and fuzzy grades. The
following points are choices made here:

* Constant folding is left to the synthesis tool. The subtractors are
  written as "input minus parameter", not as hand-built half-adder chains.
* The distance is `B` bits wide and saturates. The original says `B` bits,
  without saying what happens on overflow.
* The fire condition is `d < r`. The algorithm is also stated elsewhere as
  `d ≤ r`. The strict form is the one given for the hardware.
* `floor` rounding of `d_min/2`; inputs unsigned; targets signed.
* The output neuron's register banks are `2B` bits wide, not `B`, so that no
  fraction bit is dropped. Its six stages are split as listed above.
* There is a valid bit, with reset on it only. The original describes no
  handshake.
* Default sizes come from the examples the original uses (a 4-input distance
  circuit, an 8-input sorter, 8-bit weights). The training set is this
  design's own.
* Not covered: the host board and its interface, and the software generator
  that produced netlists. The top exposes plain streaming ports.

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). Each
one compares with a reference model written independently inside the
testbench, checks the latency on every output, and ends with a
`TB_RESULT checks=… failures=…` line.

* `tb_fc_network` runs the top at its defaults on 3000 cycles of mixed
  inputs. Its reference model computes the distances, radii, nearest four
  and output on its own. The test requires that the 1NN rule, the kNN rule,
  distance saturation and a long back-to-back run each happen.
* `tb_fc_network_large` does the same at `N = 6`, `M = 32`, `B = 10`, with a
  latency of 27 cycles.
* Inputs whose nearest neighbours tie in a way that changes the result are
  counted and not compared.
* The sorter testbenches also cover `M = 16` and `K = 2`, and inputs with
  many equal distances.

## Simulating

With Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/fc_pkg.sv tb/tb_fc_network.sv \
          --top-module tb_fc_network -o sim
./obj_dir/sim
```

Any other testbench works the same way: replace the name. The package file
must come first. Each module finds its submodules through `-Irtl`, and the
simulator runs with two-state logic. The RTL is plain synthesizable
SystemVerilog-2017, with one module or package per file.
