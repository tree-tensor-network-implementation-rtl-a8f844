# Tree tensor network classifier on an FPGA

A tree tensor network (TTN) classifies a sample of N features with nothing but
tensor contractions. Each feature is first mapped to a small vector, a
"local state". A binary tree of three-index tensors then merges these
vectors pairwise, layer by layer, until a single vector is left at the root.
That vector holds the class amplitudes. A node with two children x and y, each
of dimension χ_in (the bond dimension below it), computes

    z_i = Σ_j Σ_k  x_j · y_k · V_ijk ,        i = 0 .. χ_out-1

and hands the χ_out-dimensional vector z to its parent. All nodes of a layer
are independent. The whole inference is therefore a fixed, fully parallel
dataflow with a latency known in advance: tens of nanoseconds for the trees
used here.

This repository holds synthesizable SystemVerilog for such an inference
engine. It follows a published FPGA implementation of TTN inference that was
used for Iris, Titanic and LHCb b-tagging data. The default configuration is
the LHCb classifier: 16 features, bond dimensions [2, 4, 8, 8, 1], and
full-parallel nodes. With a 250 MHz clock it gives a tree latency of 26 cycles
(104 ns) and uses 2016 multipliers.

## Data flow

```
feat[0..N-1] ─► feature_map ×N ─► layer 1: N/2 nodes ─► layer 2: N/4 nodes ─► … ─► root ─► classifier
  (8-bit codes)    (LUT, 1 cycle)     χ0 → χ1              χ1 → χ2                    χL = O   |z|², class
                                         ▲                    ▲
                                  weight_regs (layer 1)  weight_regs (layer 2)   …
```

* `feature_map` turns each 8-bit feature code into a χ0-dimensional unit
  vector by table look-up.
* Layer l (l = 1 .. L, L = log2 N) has N/2^l nodes. Node n of layer l takes
  outputs 2n and 2n+1 of layer l-1. All nodes of a layer run in lockstep.
  Layers form a pipeline.
* `weight_regs` holds each layer's trained weights in registers, all
  readable at once.
* `classifier` squares the root amplitudes into probabilities and decides
  the class.

## Node contraction: two architectures

The node is where the design trades resources against latency. The
`ARCH` parameter of `ttn_top` selects one of two forms for every layer.

### Full parallel (`fp_node`)

Every multiplication has its own multiplier, and the contraction is a
three-part pipeline:

| part  | multipliers         | what it computes                              | cycles           |
|-------|---------------------|-----------------------------------------------|------------------|
| Mult1 | χ_in²               | every pair x_j·y_k (pair m = j·χ_in + k)      | 1                |
| Mult2 | χ_in²·χ_out         | every pair times its weight, pair_m · V_i,m   | 1                |
| Sum   | (adders)            | one pipelined adder tree per output i         | ⌈log2 χ_in²⌉     |

Latency: `2 + ⌈log2(χ_in²)⌉` cycles. Multipliers per node: `χ_in²·(χ_out+1)`.
A new input may enter on every cycle. For χ_in = χ_out = 2 the node uses
4 + 8 multipliers and two 4-input adder trees, and its latency is 4 cycles.

### Partial parallel (`pp_node`)

This form uses only `χ_in² + 1` multipliers per node. It reuses them over
time:

* **Mult1**: a single multiplier forms the pairs one per cycle, in the
  order m = 0, 1, …, χ_in²-1. Pair 0 is taken from the live inputs in the
  cycle the input is accepted. x and y are held in registers for the
  remaining pairs.
* **Mult2**: there is one multiplier per pair index m. When pair m arrives,
  multiplier m keeps it. On χ_out consecutive cycles it then produces
  pair_m·V_0,m, pair_m·V_1,m, … Each product is tagged with its output
  index.
* **Sum**: each output i has an accumulator. Pairs arrive one cycle apart,
  so on any cycle at most one Mult2 unit holds a term for a given i. The
  accumulator adds that term. The term from unit 0 restarts the sum.

The schedule for χ_in = χ_out = 2, with the input accepted in cycle 0, is
below. Each entry shows a register's contents in that cycle. `a` is a term
for output 0 and `b` a term for output 1.

| cycle | Mult1 | unit 0 | unit 1 | unit 2 | unit 3 | acc 0        | acc 1        |
|-------|-------|--------|--------|--------|--------|--------------|--------------|
| 1     | p0    |        |        |        |        |              |              |
| 2     | p1    | a      |        |        |        |              |              |
| 3     | p2    | b      | a      |        |        | 1 term       |              |
| 4     | p3    |        | b      | a      |        | 2 terms      | 1 term       |
| 5     |       |        |        | b      | a      | 3 terms      | 2 terms      |
| 6     |       |        |        |        | b      | **done**     | 3 terms      |
| 7     |       |        |        |        |        |              | **done**, out_valid |

Latency: `χ_in² + χ_out + 1` cycles (7 here). The accumulators themselves
are the node output. They hold the result until the next input's first term
arrives. The node is busy from acceptance until `out_valid`. It can accept
its next input in the `out_valid` cycle. An assertion checks that no Mult2
unit is reloaded while it is still serving a pair.

### Engine latency and size

Layer latencies add. Each of the feature-map and classifier stages adds one
more register:

```
z_valid  = accept cycle + 1 + Σ_l lat(l)            out_valid = z_valid + 1
FP: lat(l) = 2 + ⌈log2(χ_{l-1}²)⌉     multipliers = Σ_l χ_{l-1}²·(χ_l+1)·N/2^l
PP: lat(l) = χ_{l-1}² + χ_l + 1       multipliers = Σ_l (χ_{l-1}²+1)·N/2^l
```

| configuration            | N  | ARCH    | multipliers | weights | tree latency | at 250 MHz |
|--------------------------|----|---------|-------------|---------|--------------|------------|
| Iris [2,4,1]             | 4  | partial | 27          | 48      | 27           | 108 ns     |
| Titanic [2,4,8,1]        | 8  | full    | 496         | 384     | 18           | 72 ns      |
| LHCb [2,4,8,8,1] default | 16 | full    | 2016        | 1728    | 26           | 104 ns     |
| LHCb [2,4,8,8,1]         | 16 | partial | 303         | 1728    | 173          | 692 ns     |
| LHCb [2,4,8,16,1]        | 16 | full    | 3424        | 2944    | 28           | 112 ns     |

The latencies of the first three rows are the ones reported for the
original implementation. The default's 2016 multipliers are 36.5 % of the
5520 DSP slices of a Kintex UltraScale XCKU115, also as reported there.

In the full-parallel form the engine takes a sample on every cycle, so
`in_ready` stays high. In the partial-parallel form, `ttn_top` accepts a
sample at most every II cycles, where II is the largest layer latency (73
for the LHCb tree). Every node is then free when its next input arrives,
with no handshake between layers. `in_ready` is low between acceptances.

## Number format

Every word is 16-bit signed fixed point with 1 sign, 1 integer and 14
fraction bits (Q1.14, range [-2, 2), step 2^-14 ≈ 6.1·10^-5). This is the
precision the original design was validated with. Its measured accuracy
stops improving beyond about 6 fraction bits. Arithmetic rules, all defined in
`ttn_pkg`:

* A product is formed at 32 bits, shifted right by 14 (truncation toward
  minus infinity), then saturated to 16 bits. This applies to both Mult1
  and Mult2.
* Sums (adder trees and accumulators) are exact. Each is saturated once,
  where the node hands its result on. The full- and partial-parallel forms
  therefore give bit-identical results.

The rounding and saturation rules are choices of this implementation.
`DATA_W` and `FRAC` are package constants. Change `FRAC` to trade precision
against range, as in a fraction-bit study; the reference model in
`tb/tb_ref_pkg.sv` assumes 14 fraction bits.

## Feature map and classifier

`feature_map` reads an 8-bit code a as x = a/255 ∈ [0, 1]. It returns
φ_s(x) = √C(D-1, s) · cos^(D-1-s)(πx/2) · sin^s(πx/2). For D = 2 this is
[cos(πx/2), sin(πx/2)]. The 256-entry table is computed at elaboration with
real arithmetic and rounded to Q1.14. The original design says only that
the map is a fixed function held in look-up tables. This particular map, the
code width and the input range are choices of this implementation. Change
`build_table` to use another map.

`classifier` outputs the probability |z_i|² of each class, with 2 integer
and 14 fraction bits. For O > 1 outputs the class is the argmax, and the
lowest index wins a tie. For a single output (O = 1, as in all configurations
above) the class is 1 when z_0 ≥ `THRESH`, default 0.5. The original
design only says that the final probability is retrieved and the sample
classified. The rule here is a choice of this implementation.

## Weights

The weights live in registers, one `weight_regs` block per layer. They are
written once, one word per cycle, through `w_we`/`w_addr`/`w_data`, and must
not change while samples are in flight. The address of weight V_ijk of node
n in layer l is

```
WOFF(l) + n·χ_{l-1}²·χ_l + (i·χ_{l-1} + j)·χ_{l-1} + k
```

where WOFF(l) is the total number of weights in layers 1 .. l-1. Reset
clears all weights.

## Top-level interface (`ttn_top`)

| port                | dir | width      | meaning                                  |
|---------------------|-----|------------|------------------------------------------|
| clk, rst_n          | in  | 1          | clock, synchronous active-low reset      |
| w_we, w_addr, w_data| in  | 1, WAW, 16 | weight write port                        |
| in_valid, in_ready  | in/out | 1       | sample handshake (accept = both high)    |
| feat                | in  | N × 8      | feature codes of one sample              |
| z_valid, z          | out | 1, O × 16  | root amplitudes                          |
| out_valid, prob, class_id | out | 1, O × 17, CLS_W | class probabilities and decision |

Parameters are `L` (layers; N = 2^L), `CHI[L+1]` (bond dimensions, CHI[0] =
feature-map dimension, CHI[L] = number of outputs), `ARCH`
(`ARCH_FULL`/`ARCH_PARTIAL`), `FEAT_W` and `THRESH`. The remaining parameters
are derived. Every CHI[l] with l < L must be at least 2.

## Files

| file | content |
|------|---------|
| `rtl/ttn_pkg.sv` | word type, arithmetic functions, node latency formula, `arch_e` |
| `rtl/dsp_mul.sv` | registered Q1.14 multiplier |
| `rtl/adder_tree.sv` | pipelined exact adder tree |
| `rtl/fp_node.sv`, `rtl/pp_node.sv` | the two node architectures |
| `rtl/feature_map.sv`, `rtl/weight_regs.sv`, `rtl/classifier.sv` | input, weight and output stages |
| `rtl/ttn_top.sv` | the engine |
| `tb/tb_ref_pkg.sv` | integer/real reference model used by the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module |

## Simulation

Each testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and stops itself with a watchdog. For example, from the repository root:

```
verilator --binary --timing --assert --top-module tb_ttn_full -y rtl -y tb +libext+.sv \
          rtl/ttn_pkg.sv tb/tb_ref_pkg.sv tb/tb_ttn_full.sv
obj_dir/Vtb_ttn_full
```

* `tb_dsp_mul`, `tb_adder_tree`, `tb_feature_map`, `tb_weight_regs` and
  `tb_classifier` test the building blocks against the reference model. This
  includes saturation, odd adder-tree sizes, every table entry for D = 2
  and D = 3, and ties.
* `tb_fp_node` and `tb_pp_node` stream random inputs into nodes of several
  sizes. They check every output and the latency formulas above; for the
  partial-parallel node they also check the exact number of stall cycles.
* `tb_ttn_full` runs the default engine unchanged. It loads 1728 random
  weights, streams 60 samples (mostly back to back), and checks every root
  vector, probability, class and the 26-cycle tree latency. It takes about a
  minute.
* `tb_ttn_top` runs the five configurations of the table side by side and
  checks the same things. It uses 100 samples for Iris and Titanic and 500
  for the [2,4,8,16,1] tree, matching the sample counts of the original
  validation runs. It also requires that back-to-back acceptance,
  input stalls, saturation and both class decisions each occur. It takes
  one to a few minutes, most of it compiling.

The weights are random, not trained: the tests show that the hardware
computes the contraction exactly as specified. They say nothing about
classification accuracy.

## Departures and open points

* The published figures for the LHCb classifier name two trees: [2,4,8,8,1]
  in the resource table and [2,4,8,16,1] for the validation run. The default
  here is the first. The second is one `CHI` override away and is tested.
* The reported latencies match the tree latency alone. Whether the original
  counted feature mapping and classification is not known. Here each adds one
  cycle.
* For the partial-parallel node, the published timing diagram shows the
  result one cycle after the last accumulation. The published latency formula
  does not, and this design follows the formula.
* The feature map, the classification rule, rounding and saturation, the
  weight write port and the partial-parallel acceptance rule are this
  implementation's own (see above).
* The adder trees are plain pairwise trees of generic adders. A vendor flow
  would map the multipliers to DSP slices. No vendor primitives are
  instantiated.
