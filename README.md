# COIN: a classifier built from logic alone

COIN (combinational intelligent network) is an image classifier for small FPGAs and ASICs.
It needs no weight memory and no multipliers. A sample is turned into a few hundred short
binary addresses. Each address is compared against a handful of stored bit patterns
(*minterms*), and each pattern carries a vote of +1 or -1 for every class. The class with the
most votes, after a fixed per-class offset, is the prediction. The minterms come from a
weightless neural network (LogicWiSARD). The votes are trained by backpropagation on an
equivalent binary neural network. After training, the whole model is constants baked into
logic.

This repository holds synthesizable SystemVerilog for the inference datapath. It is set up for
the MNIST configuration: 784 8-bit pixels, 10 classes, 8 thermometer bits per pixel and 16-bit
addresses, which gives 392 RAM nodes.

## Datapath

```
in_pixel[784] --> coin_encoder -------------> addr[392] --> coin_ram x392 --> vote[392][10]
                  (rrt_encoder x784, mapping)                 (minterm match,
                                                               +/-1 weights)
vote --> coin_class_sum x10 --> score[10] --> coin_argmax --> class
         (sum of votes, minus offset)          |
                                               v
                          output register (out_class, out_score, out_valid)
```

| module | role |
|---|---|
| `coin_pkg` | default sizes, input-bit mapping, width helpers |
| `coin_model_pkg` | the trained model as constant functions (a stand-in model, see below) |
| `rrt_encoder` | thermometer code of one pixel |
| `coin_encoder` | encodes all pixels and maps the bits onto the RAM-node addresses |
| `coin_ram` | one RAM node: minterm matching and per-class vote |
| `coin_class_sum` | score of one class |
| `coin_argmax` | index of the highest score |
| `coin_top` | the classifier, with the output register |

### Reverse ripple thermometer (RRT) encoding

Pixel values are mostly small: MNIST images are largely background. The RRT code therefore
uses power-of-two thresholds rather than evenly spaced ones. Code bit `t` is set when
`value >= 2^(IN_W - THERM + t)`. For 8-bit pixels and 8 code bits the thresholds are
1, 2, 4, …, 128. A pixel `a > 0` sets `floor(log2 a) + 1` bits, and 0 sets none.

The circuit is the "reverse ripple" that gives the code its name. `value >= 2^s` is true when
any bit at position `s` or above is set. So the code is an OR chain that runs from the most
significant pixel bit downwards: `code[7] = v[7]`, `code[t] = code[t+1] | v[t]`.

Two details here are this design's reading, not a published fact:

- **Bit count.** The published description also states the count as `floor(log2 a)`, one less. That
  count would leave the eighth bit of an 8-bit pixel always clear. This design uses the eight
  thresholds inside the range instead.
- **Bit order.** Bit 0 is the lowest threshold.

### Mapping

Address bit `i` of RAM node `r` takes encoded bit
`s = (MAP_MUL * (r*16 + i) + MAP_ADD) mod 6272`. Encoded bit `s` is thermometer bit `s mod 8`
of pixel `s / 8`. The defaults are `MAP_MUL = 2027` and `MAP_ADD = 101`.

`MAP_MUL` must be coprime with the number of encoded bits, and elaboration checks this. The
mapping is then a permutation: every encoded bit drives exactly one address bit. It is wiring
only. The published model maps the encoded bits onto the node addresses, but the mapping it uses
is not specified. This affine permutation is this design's own choice. A trained model only works with the
mapping it was trained with, so change `map_src` in `coin_pkg` to match yours.

### RAM nodes: matching and voting

Minterm `n` matches address `x` when all bits agree:
`q(m, x) = AND(XNOR(m, x))`, which is a 16-bit equality compare. For class `k`, a node's vote
is the sum of the `±1` weights of its matching minterms.

- **Distinct minterms.** When a node's minterms are all different, at most one matches. The
  vote is then -1, 0 or +1.
- **Duplicates.** Duplicate minterms are summed.
- **Minterm count.** Every node has `MINTERMS` (10) slots. Each slot has an enable bit, so a
  trained node with fewer minterms leaves its spare slots switched off. The enable bits are an
  addition of this design.
- **Vote width.** A vote is `VW = clog2(MINTERMS+1) + 1` bits wide (5 bits by default).

### Scores, offset and argmax

The score of class `k` is the sum of all 392 votes for `k`, minus an integer offset
`BIAS_k` (`coin_class_sum`). The trained network applies a batch normalisation to each
minterm's contribution. Summed over all minterms, that adds up to one constant per class. You
compute it offline and round it to an integer.

- **Score width.** `SW = clog2(RAMS*MINTERMS + 1) + 2` bits, which is 14 signed bits by
  default.
- **Argmax and ties.** `coin_argmax` scans the scores in order and keeps the running maximum.
  On a tie the lowest class index wins.

The published model has no rule for ties, and the tie rule is this design's choice.

## Timing and interface of `coin_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid` | in | 1 | `in_pixel` holds a sample |
| `in_pixel` | in | 784 × 8 | the sample |
| `out_valid` | out | 1 | result of the sample presented one cycle earlier |
| `out_class` | out | 4 | predicted class |
| `out_score` | out | 10 × 14, signed | class scores |

Everything from `in_pixel` to the argmax is a single combinational stage, followed by one
register. The classifier accepts a sample every cycle and returns its result on the next
cycle. When `in_valid` is low, `out_valid` goes low and the class and scores keep their last
values. Reset clears all three outputs.

The published implementation runs at 200 MHz on a Zynq-7045 FPGA (XC7Z045). Its pipelining is
not described. The single register here is this design's choice. For a faster clock, add
pipeline registers after the encoder, after the RAM nodes, or inside the adder chains. None
of these stages holds any state.

## The model: `coin_model_pkg`

A COIN model is fixed by its trained values:

- the minterms of every node;
- one `±1` weight per minterm and class;
- one offset per class.

These values come from offline training. They are not part of this RTL. `coin_model_pkg`
provides them through four constant functions:

- `minterm_bit(r, n, i, …)`
- `weight_pos(r, n, k, …)`, where 1 means +1
- `minterm_en(r, n, …)`
- `class_bias(k)`

Each `coin_ram` instance evaluates these functions for its own node index when it elaborates.
You can also set its `MT`, `WPOS` and `EN` parameters directly.

The package as shipped holds a synthetic **stand-in model**:

- **Prototype images.** A hash defines one "prototype" image per class, with about 40 % zero
  pixels.
- **Minterms.** Minterm `n` of node `r` is the address that the prototype of class `n mod 10`
  produces in node `r`.
- **Weights.** A minterm's weight is +1 for its own class and -1 for the others. In nodes with
  `r mod 29 == 3` the +1 goes to the next class instead.
- **Switched-off minterms.** A few minterms are disabled.
- **Offsets.** The offsets are small integers from -2 to 2.

The stand-in model recognises its own prototypes, which gives the testbenches known answers.
It says nothing about accuracy on real data.

To deploy a trained network, replace the four function bodies with the trained values. The
mapping must be the one the model was trained with. If a node needs more entries, raise
`MINTERMS`. The datapath needs no other change. The constant functions return vectors of up to
`MAX_NODE_BITS` (8192) bits. That allows up to 512 minterms of 16 bits per node; raise the
limit for larger nodes.

## What the published results need

The published small and large MNIST models both use 16-bit addresses and 8 thermometer bits.
That input side is exactly what is built here: 392 nodes.

The number of minterms per node for those models is not known. The small model uses about
6.8 k LUTs and the large one about 70 k LUTs. That gap points to far more minterms per node in
the large model. Set `MINTERMS` to the largest node of your trained model.

The design has no memory. Its only arithmetic is the per-class vote sums; the RAM nodes are
pure logic. At the default size it has 145 flip-flops, all in the output register. The
published small model reports 184 flip-flops, and how its registers are arranged is not
known.

## Simulation

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it checks |
|---|---|
| `tb_rrt_encoder` | all 256 values, 8-bit and 4-bit codes |
| `tb_coin_encoder` | 784-pixel random, all-zero and all-255 samples, plus a small configuration, against the mapping formula |
| `tb_coin_ram` | a small node with a duplicate and a disabled minterm (exhaustive), and a full-size node with its minterms, their one-bit neighbours and random addresses |
| `tb_coin_class_sum` | 392 random votes with two offsets, and the extremes |
| `tb_coin_argmax` | random and tie-heavy scores |
| `tb_coin_top` | full default size, end to end, against a reference model in the testbench |

`tb_coin_top` uses no parameter overrides. It streams 120 samples, mostly back-to-back with
some idle cycles. The samples are prototypes, noisy prototypes, blends of two prototypes,
random images, and blank and saturated images. It checks the class, all scores and the
one-cycle latency. It also counts how often each of these happened and fails if one never did:

- a minterm hit
- a node with no hit
- a +1 vote and a -1 vote
- an address equal to a switched-off minterm
- a tie
- an offset that decides the winner
- encoder saturation
- an output held through an idle cycle
- reset

Run a testbench with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb rtl/coin_pkg.sv rtl/coin_model_pkg.sv \
          tb/tb_coin_top.sv --top-module tb_coin_top -Mdir obj_top -o sim
./obj_top/sim
```

For another testbench, change the last file name and the top-module name. Building the
full-size top takes about two minutes, and the simulation itself takes under a second.

## Departures and open points

- **Trained values.** The minterms, weights and offsets are a synthetic stand-in, as
  described above.
- **Design choices.** The mapping, the bit order of the thermometer code, the tie rule, the
  output register and the reset are this design's choices.
- **RRT bit count.** The encoder sets `floor(log2 a) + 1` bits for 8-bit pixels, not
  `floor(log2 a)`. The reason is given in the RRT section above.
- **Slot enables.** All nodes have the same number of slots, and per-slot enables stand in for
  the variable number of minterms per node.
- **Not included.** The training flow and the conversion from LogicWiSARD to the binary
  network are software and are not included. The same holds for the designs COIN was compared
  with.
