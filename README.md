# A multiplierless FIR filter built as a shift-add graph, in word-level and bit-serial form

A constant-coefficient FIR filter needs no multipliers. Each coefficient is a
short sum of signed powers of two, so every product becomes a few shifted
copies of a sample, and the whole inner product becomes one tree of adders.
The adder count falls further when adders are shared: if two coefficients
have the same bit pattern in the same places, `x[n] + x[n-2]` is formed once
and then shifted and reused.

This RTL builds one such filter in the style of *Complexity-Aware
Quantization and Lightweight VLSI Implementation of FIR Filters*, in two
forms that give bit-identical results:

* `fir_word`: a word-level filter. It has one adder per graph node, takes one
  sample per clock and has a latency of one cycle.
* `fir_bitserial`: a bit-serial filter. It has one full adder and a few
  flip-flops per graph node, and takes one sample every 25 clocks. It is much
  smaller, for uses where the sample rate is low.

`fir_top` puts the two side by side on one input stream.

## The filter

It is a 4-tap direct-form filter with 8-bit two's complement fractional
coefficients:

| tap | coefficient | value |
|-----|-------------|-------|
| h0 (x[n])   | 0.0111011 |  59/128 |
| h1 (x[n-1]) | 0.0101110 |  46/128 |
| h2 (x[n-2]) | 1.0110011 | -77/128 |
| h3 (x[n-3]) | 0.0100110 |  38/128 |

Samples and outputs are 16-bit two's complement fractions in [-1, 1).
Written out as shifts, the filter needs 16 additions. Sharing cuts that to 12:

* h0 and h2 have the bits 2^-2, 2^-3, 2^-6 and 2^-7 in common. So
  `s = x[n] + x[n-2]` is computed once. This is the common subexpression
  across coefficients.
* Inside that shared pattern (0.0110011), the pair `11` appears twice, four
  places apart. So `t = s + s>>1` is computed once and used as `t>>2 + t>>6`.
  This is the common subexpression within a coefficient.
* What remains are 11 single terms:
  `-x2, t>>2, x1>>2, x3>>2, x0>>4, x1>>4, t>>6, x1>>5, x3>>5, x1>>6, x3>>6`.

The two shared adders form the *subexpression generator*. The 11 terms are
summed by a *symmetric binary tree* of depth ceil(log2 11) = 4, which has 10
adders. Terms with similar shifts sit on neighbouring leaves, so that each
adder's operands have similar magnitudes. The graph is described in
`rtl/fir_pkg.sv` and used by both forms. The pairing of leaves is a choice of
this design that follows that rule.

## Where the shifts go: peak estimation

This is the central idea of the word-level datapath. Every edge of the graph
gets a pair `[M N]`: M bounds the magnitude of the value stored on the edge,
and N is its radix point, so the real value is `stored * 2^-N`. A sample has
`[1 0]`. A term `x>>k` starts at `[1 k]`. Going up the tree:

1. Halving M and incrementing N give the same value, and the reverse is also
   true.
2. Before two edges are added, they are brought to the same N.
3. If the sum could exceed M = 1, the result is normalised (halve M,
   decrement N) so that it cannot overflow.

The right shift placed on each adder input is then the difference between
the N of that input and the N of the adder's output. This moves every shift
as close to the root as overflow allows. It keeps intermediate words short
and guarantees that no adder inside the tree can overflow: every stored value
lies in [-1, 1). One example: the node `t>>2 - x2` has inputs `[0.75 0]` and
`[1 0]`. Their sum is bounded by 1.75, so it is stored as `[0.875 -1]`, with
both inputs shifted right by one.

The table of shifts in `fir_pkg` (`KA`, `KB`, `SUB`) and the PEV of every
node, listed in the package's header comment, come from applying these rules
by hand. The root ends at `[0.63 -2]`: it holds y/4. The output stage
(`out_saturate`) shifts it left by 2. Values outside [-1, 1) saturate to the
largest or smallest 16-bit fraction, and the flags `sat_pos` / `sat_neg`
report which.

### Full precision

`sa_adder` keeps all the bits that its input shifts push below the LSB: a
node's output has `max(FA+KA, FB+KB)` fraction bits. The 16-bit samples have
15 fraction bits, and the root has 24. No bit is lost before the output
stage, and the root's integer value is exactly
`59*x0 + 46*x1 - 77*x2 + 38*x3`. The only rounding in the whole filter is at
the output: the 16-bit result is truncated toward minus infinity. Truncation
is this design's choice; the method only fixes the saturation. Setting
`W_OUT = 23` on `fir_word` gives the exact result instead.

## The bit-serial form

The bit-serial filter is the same graph, slowed down by the word length
W = 25 (sign + 15 fraction bits + 9 bits of shifts along the deepest path).
Every word travels LSB first over W cycles:

```
 x_in --> ps_conv --> tap_delay_line (W flip-flops per tap) --> bs_adder_tree --> sp_sat --> y
                                             ^                         ^             ^
                     bs_frame_ctrl: bit-position counter cnt = 0 .. W-1, shared by all
```

* **P/S** (`ps_conv`): loads the 16-bit sample into the top of a 25-bit
  word, with zeros below, when `cnt = 0`. It then shifts the word out, LSB
  first.
* **Delay line**: each z^-1 is W one-bit flip-flops. In the frame of sample
  n, tap k carries sample n-k, bit for bit in the same cycles as tap 0.
* **Bit-serial adder** (`bs_adder`): one full adder and a carry flip-flop.
  See below.
* **S/P with saturation** (`sp_sat`): gathers the 25 root bits, then applies
  the same scale-back and saturation as the word-level form.

Because W covers the full precision, the serial result is bit-identical to
the word-level one. `tb_fir_top` checks that on every sample.

### Timing of a bit-serial adder

This is the subtle part. A stream has an *offset* D: bit i of its word
arrives when `cnt = (i + D) mod W`. For `y = a>>KA ± b>>KB`:

* Bit i of `a>>KA` is bit i+KA of `a`, which arrives KA cycles later. The
  shifted operand therefore has offset DA+KA, and a shift of k costs k cycles
  of latency.
* Its top KA bits would come from the *next* word. Instead, a hold register
  repeats the sign bit of the current word, captured when bit W-1 went by.
  This is the sign extension.
* Whichever operand is ready first is delayed in a short shift register until
  both have offset E = max(DA+KA, DB+KB).
* When the aligned bit index is 0, the carry-in is forced to 0 for an add or
  1 for a subtract. For a subtract, `b` is also inverted.
* If the sum bit is registered, the output offset is E+1. If it is not, the
  output is the combinational sum bit with offset E, and the next adder uses
  it in the same cycle.

All control comes from comparing the shared counter with constants. Those
constants are worked out at elaboration time by `fir_pkg::node_offset`, which
accumulates the latencies along the graph. The samples leave the P/S at
offset 1.

### Adder depth

`ADDER_DEPTH` (default 5) bounds how many full adders can be chained
without a register between them. It trades clock period against flip-flops
and latency. `fir_pkg::node_reg` walks the graph from the taps and registers
a node's sum bit where the chain of unregistered adders ending in it reaches
the bound. The longest chain is x2 -> s -> t -> (t>>2 - x2) -> B3 -> root,
which has five adders.

| ADDER_DEPTH | registered nodes | root offset | latency from `sample_take` |
|-------------|------------------|-------------|----------------------------|
| 5 (default) | root only | 11 | 36 cycles |
| 2 | t, B1, B2, B3, root | 13 | 38 cycles |
| 1 | every adder | 15 | 40 cycles |

Depth 5 is the depth used for the evaluated bit-serial filters. Depth 1 gives
the shortest clock period, one full adder plus its carry and sign-extension
multiplexers.

### Zero reset response

After reset, a node whose inputs are zero must output zero. A subtractor with
a cleared carry would instead compute `0 + ~0 = -1` on the first, partial
word. So the data flip-flops hold non-inverted bits and reset to 0, the
inversion sits after them, and a subtractor's carry flip-flop resets to 1.

### Difference from the published flow

The published flow makes the serial graph by slowing the word-level graph
down, retiming it with an integer linear program so that every adder has the
delays it needs, and then retiming again for a chosen adder depth. Here each
adder instead aligns its own operands with local flip-flops whose lengths are
computed from the offsets, and it registers its output. The function and the
per-sample timing are what retiming gives. The adder-depth bound above
places the pipeline registers where retiming for a given adder depth would
need them. The flip-flop count is not minimised, as a global retiming would
do.

## Interfaces and timing

| module | sample in | result out |
|--------|-----------|------------|
| `fir_word` | `x_in` when `in_valid` (any cycle) | `y`, `y_valid` one cycle later |
| `fir_bitserial` | `x_in` in the cycle `sample_take` is high (every 25 cycles) | `y`, `y_valid` 36 cycles after `sample_take` (depth 5) |
| `fir_top` | `x_in` when `sample_take` is high, to both filters | `y_word` after 1 cycle, `y_ser` after 36 |

The bit-serial filter has no handshake. It takes a sample in every frame, so
the source must hold a new sample at each `sample_take`. All resets are
asynchronous and active low (`rst_n`), and the filters start from an
all-zero history.

## Files

| file | contents |
|------|----------|
| `rtl/fir_pkg.sv` | sizes, coefficients, the graph's shift table, width and offset functions |
| `rtl/sa_adder.sv`, `rtl/sa_adder_tree.sv` | word-level node and the 12-node graph |
| `rtl/out_saturate.sv` | scale-back, saturation, truncation |
| `rtl/tap_delay_line.sv` | delay line, word-level or serial |
| `rtl/fir_word.sv` | word-level filter |
| `rtl/bs_frame_ctrl.sv`, `rtl/bs_adder.sv`, `rtl/bs_adder_tree.sv` | bit-serial counter, node and graph |
| `rtl/ps_conv.sv`, `rtl/sp_sat.sv` | P/S and S/P with saturation |
| `rtl/fir_bitserial.sv`, `rtl/fir_top.sv` | bit-serial filter and top level |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench checks the design against an integer model worked out from
the coefficients, not from the graph. It counts the checks and ends by
printing `TB_RESULT checks=N failures=M`. For example, the end-to-end test at
full size:

```
verilator --binary --timing --assert -Irtl rtl/fir_pkg.sv rtl/*.sv \
    tb/tb_fir_top.sv --top-module tb_fir_top -o sim
./obj_dir/sim
```

`tb_fir_top` sends 1500 samples: random full-scale values, small values,
zeros and runs of extreme values. It checks both outputs, both latencies, the
25-cycle sample period, the saturation flags and the zero output before the
first sample. It also counts positive and negative saturation events, and
each kind must occur. A unit test is run the same way, with its module's
files instead of `rtl/*.sv`.

## Changing the design

* **Sample width**: `fir_pkg::W_IN`, or the `W` / `W_X` parameters. Every node
  width and the frame length follow. `tb_fir_bitserial` also runs with 8-bit
  samples (17-cycle frames) at adder depth 1.
* **Adder depth** of the bit-serial tree: `ADDER_DEPTH` on `fir_bitserial`.
* **Output width**: `W_OUT`.
* **Another coefficient set** needs a new graph: new nodes and sources in
  `sa_adder_tree` and `bs_adder_tree`, and new `KA` / `KB` / `SUB` /
  `SRC_A` / `SRC_B` entries in `fir_pkg`, with the shifts worked out by the
  peak-estimation rules above. The width, offset and register-placement
  functions in the package read those tables and need no change. The node modules, the converters, the
  delay line and the saturation stage are generic. The frame length must be
  at least 1 + the root's fraction bits, or the bit-serial form drops low
  bits that the word-level form keeps.
* **Negative terms**: a node can subtract only its `b` input. If two
  negative terms would meet in one adder, use `(-x) + (-y) = -(x + y)`:
  build the adder and carry the negative sign up to a later subtractor,
  moving negative weights toward the root. This graph has only one negative
  term (`-x2`), so it never needs this.

## Limits

* The coefficients are fixed. The filters evaluated with this method (12 to
  62 taps, 10- to 16-bit coefficients) would each need their own graph. Only
  the 4-tap example is built.
* Choosing the coefficients (complexity-aware quantization, subexpression
  search) is a design-time software step and is not part of the RTL.
* Truncation at the output, the sample interfaces, the MSB-aligned placement
  of the sample in the serial word, the leaf pairing and the local-delay
  alignment in place of retiming are this design's choices.
