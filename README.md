# Interleaved local sorting for SCL polar decoding

A successive cancellation list (SCL) decoder for polar codes keeps L candidate paths.
At every information bit each path splits in two, so 2L child metrics have to be
reduced to the L best (smallest) ones before the next bit can start. For list sizes of
16 and above, that selection sets the decoder's critical path. Exact sorting
networks get deeper as L grows, roughly with (log2 2L)^2 stages.

This RTL uses *interleaved local sorting* (ILS) instead. The 2L metrics are split into
G groups of 2k = 2L/G, and each group is cut to its k smallest on its own. The survivors
are only approximately the L smallest. The depth, though, is that of one 2k-input
network and does not depend on L. With 2k = 8 the network is 6 compare stages deep
whether L is 16, 32 or 64. To make sure the small metrics are spread over the groups
before this cut, the metrics first go through a fixed interleaver, which is only wiring.

The default configuration is L = 16, G = 4 (2k = 8), with 8-bit unsigned path metrics.

## The metric-update loop

```
             llr_abs[L]
                 |
   +-------------v--------------+
   | pm_extension               |  m[2l] = n[l],  m[2l+1] = sat(n[l] + a[l])
   +-------------+--------------+
                 | 2L words {metric, candidate index}
   +-------------v--------------+   ils_sorter_array
   | ils_interleaver  (wires)   |
   +--+--------+--------+----+--+
      | 2k     | 2k     |    | 2k
   +--v---+ +--v---+        +v-----+
   |ils_  | |ils_  |  ...   |ils_  |   G sorters, each keeps its k smallest
   |sorter| |sorter|        |sorter|
   +--+---+ +--+---+        +--+---+
      | k      | k             | k
   +--v--------v---------------v--+
   | pm_memory  (L words, regs)   |---> pm_metric[L], pm_cand[L]
   +--------------+---------------+
                  | n[L] (parent metrics of the next bit)
                  +--> back to pm_extension
```

`ils_top` closes this loop. Extension, interleaving and sorting form a single
combinational path, so the loop handles one information bit per clock. The survivors
are written to the memory on the clock edge where `step` is high.

Every metric travels with a tag: the index `c` of the child candidate it belongs to.
Candidate `c` comes from parent path `c >> 1` and decides the bit `c & 1`. The stored
`pm_cand` values are what a decoder needs to copy path memories and record bit
decisions. Only the metric bits take part in comparisons.

## The interleaver

This is the least obvious part of the design. Number the 2L candidates
`m[0..2L-1]` and write `m[i,e]` for element `e` of group `i`, where
`m[i,e] = m[i*2k + e]`.

1. **Rotate.** Group `i` is rotated by `i % 2k`, so that its `j`-th element becomes
   `m[i, (i+j) % 2k]`.
2. **Spread.** Element `j` of rotated group `i` goes to group
   `2k*floor(i/2k) + (j % G)`. When `2k >= G` the first term is zero and this is simply
   `j % G`.

Inside a destination group, the word from rotated group `i`, element `j` sits at
position `(i % P) + P*floor(j/G)`, where `P = min(G, 2k)`. The position has no effect on
which metrics survive, because the group is sorted next. It only fixes the wiring order.

Example for L = 8, G = 4, 2k = 4. The entry `a,b` stands for `m[a,b]`:

| sorter input group | slot 0 | slot 1 | slot 2 | slot 3 |
|---|---|---|---|---|
| 0 | 0,0 | 1,1 | 2,2 | 3,3 |
| 1 | 0,1 | 1,2 | 2,3 | 3,0 |
| 2 | 0,2 | 1,3 | 2,0 | 3,1 |
| 3 | 0,3 | 1,0 | 2,1 | 3,2 |

Every group receives one metric from each source group, each from a different position.
In an SCL decoder, the even candidates are the parent metrics themselves and the odd
ones are parent plus |LLR|. The rotation makes each group hold a mix of both kinds from
different parents. Without it, one group could collect all the small metrics and throw
some of them away. The interleaver holds no logic: `ils_interleaver` is nothing but
`assign` statements whose indices are computed at elaboration by `ils_pkg::il_src` and
`ils_pkg::il_dst`.

## The 2k-to-k sorter

The inputs of a group have no known order, so the sorter is a full Batcher odd-even merge
sorting network. From it, every comparator that cannot affect the k smallest outputs is
removed. For 2k = 8 the network has 6 stages (wires are numbered 0 to 7, "a-b" is one
compare-and-swap):

| stage | comparators |
|---|---|
| 1 | 0-1, 2-3, 4-5, 6-7 |
| 2 | 0-2, 1-3, 4-6, 5-7 |
| 3 | 1-2, 5-6 |
| 4 | 0-4, 1-5, 2-6, 3-7 |
| 5 | 2-4, 3-5 |
| 6 | 1-2, 3-4 (5-6 removed: both of its outputs belong to the four largest) |

That leaves 18 comparators. Outputs 0 to 3 hold the four smallest metrics in ascending
order. Each compare-and-swap (`ils_cas`) swaps its two words only when the upper metric
is strictly larger, so equal metrics keep their order.

`ils_sorter` does not list these comparators by hand. It generates them for any
power-of-two 2k from Knuth's enumeration of the odd-even merge network: for each
`(p, d)` stage, wires `a = i+j` and `b = i+j+d` are compared when
`floor(a/2p) == floor(b/2p)`. It then prunes by backward liveness. The outputs
`0..k-1` start out live. Going back stage by stage, a comparator is kept if either of
its outputs is live, and a kept comparator makes both of its inputs live.

The resulting sizes:

| L | G | 2k | comparators (G x per-sorter) | compare stages |
|---|---|---|---|---|
| 16 | 4 | 8 | 72 | 6 |
| 32 | 8 | 8 | 144 | 6 |
| 64 | 16 | 8 | 288 | 6 |
| 8 | 2 | 8 | 36 | 6 |
| 8 | 4 | 4 | 20 | 3 |
| 8 | 8 | 2 | 8 | 1 |

The full 8-input network has 19 comparators; pruning removes one. The elaboration of
`ils_sorter` stops with an error if a 2k = 8 instance ever comes out with a count other
than 18.

## Interface and timing of `ils_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `init` | in | 1 | start a codeword; takes priority over `step` |
| `step` | in | 1 | process one information bit on this clock edge |
| `llr_abs` | in | L x LLR_W | \|LLR\| of the current bit for each path |
| `pm_metric` | out | L x PM_W | stored path metrics |
| `pm_cand` | out | L x log2(2L) | candidate index of each stored path |
| `sat` | out | L | combinational: `n[l] + a[l]` of this cycle saturated |
| `done` | out | 1 | high for one cycle after a step |

* Drive `llr_abs` and `step`. After the rising edge, `pm_metric` and `pm_cand` hold the
  new survivors and `done` is 1. A new bit can follow on every clock.
* `init`, and also reset, load metric 0 into slot 0 and the largest metric (255) into every
  other slot. The decoder therefore starts from a single path, and the empty slots rank
  last until real paths replace them.
* Survivor slots are grouped: the outputs of sorter `g` fill slots `g*k .. g*k+k-1`, in
  ascending order within the group. Across groups the slots are not ordered.

Parameters: `L` (16), `G` (4), `PM_W` (8), `LLR_W` (7). L and G must be powers of two
with 2 <= 2L/G. The `L`, `G` and `PM_W` defaults are the configuration this method is
evaluated in. The LLR width is this design's choice: it is the magnitude of a 7-bit
internal LLR.

## What is specified, and what this RTL decides itself

These parts follow the ILS method as published: the extension equations, the grouping,
the rotate-and-spread interleaver, the G independent odd-even merge 2k-to-k sorters with
the last-stage pruning, the path metric memory feeding back to the extension, the 8-bit
unsigned metrics and the compare-and-swap rule.

These are choices of this RTL:

* **Saturation.** `n + a` saturates at 255. No overflow rule is specified for the
  8-bit metrics, and a real decoder would likely also normalise its metrics from time
  to time. That is not included.
* **Candidate tags.** Each metric carries its candidate index. The published
  architecture only mentions metrics.
* **Single-cycle, unpipelined loop.** The `init`/`step`/`done` handshake, the
  asynchronous reset and the start-of-codeword contents of the memory.
* **Slot order.** The word order inside an interleaved group, and the slot order of the
  survivors.
* **Memory as registers.** The path metric memory is an L-word register file written
  all at once, not an addressed RAM.

Not included: the rest of an SCL decoder (LLR computation, frozen-bit handling,
partial sums, path copying, CRC check), and the exact sorters that ILS is usually
compared with.

Note that, because the selection is approximate, the L survivors are often **not** the
L smallest of the 2L metrics. On random inputs this happens in a large share of steps.
In decoding simulations of 5G polar codes the method is reported to cost almost no
frame-error rate once a group holds at least 8 metrics; this RTL has not been run in a
full decoder. The RTL is an exact model of ILS, not of exact selection.

## Files

`rtl/` (synthesizable):

* `ils_pkg.sv`: defaults, the interleaver map, and the sorting-network schedule and
  pruning functions (all elaboration-time).
* `ils_cas.sv`: compare-and-swap on `{metric, tag}` words.
* `pm_extension.sv`: 2L child metrics from L parents, with saturation.
* `ils_interleaver.sv`: rotate-and-spread wiring.
* `ils_sorter.sv`: pruned odd-even merge 2k-to-k sorter.
* `ils_sorter_array.sv`: interleaver plus G sorters.
* `pm_memory.sv`: L-word path metric register file.
* `ils_top.sv`: the metric-update loop, with assertions on the `done` handshake and on
  the order of the stored survivors (enable with `--assert`).

`tb/` (self-checking; each prints `TB_RESULT checks=N failures=M`):

* `ils_ref_pkg.sv`: reference model. It works out each candidate's group by inverting
  the interleaver, then uses an insertion sort.
* `tb_ils_cas.sv`, `tb_pm_extension.sv`, `tb_pm_memory.sv`: unit tests.
* `tb_ils_interleaver.sv`: checks the L = 8, G = 2/4/8 permutations slot by slot
  against hand-written tables, and checks the default size for permutation and
  group-membership properties.
* `tb_ils_sorter.sv`: 8-to-4 and 16-to-8 sorters against a software sort; also checks
  the comparator and stage counts.
* `tb_ils_sorter_array.sv`: the default ILS against the reference model; 72 comparators.
* `tb_ils_top.sv`: end to end at the default size. It runs 60 codewords of random
  length. After every step it checks the metrics, the tags, `sat` and the `done`
  latency. It requires at least one of each of the following: restart, init together
  with step, idle cycle, saturation, and a step where ILS differs from exact selection.
* `tb_ils_workloads.sv` (using `ils_top_check.sv`): the loop at L = 16/32/64 with
  2k = 8, and at L = 8 with G = 2/4/8. It checks every step and the comparator and
  stage counts of each configuration.

## Simulating

List the packages first, and add `-Irtl -Itb` so that verilator finds the modules:

```
verilator --binary --timing -Irtl -Itb rtl/ils_pkg.sv tb/ils_ref_pkg.sv \
    tb/tb_ils_top.sv --top-module tb_ils_top
./obj_dir/Vtb_ils_top
```

Swap in any other `tb_*.sv` and its module name to run the other tests. The workloads
test also needs `tb/ils_top_check.sv`, which `-Itb` finds by itself. Every test
finishes in well under a second. Lint: `verilator --lint-only -Wall -Irtl rtl/ils_pkg.sv
rtl/ils_top.sv`. It reports only unused package constants.
