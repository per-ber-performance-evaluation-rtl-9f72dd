# K-min Viterbi decoder (KVD) for the 802.11 k = 7 convolutional code

A standard Viterbi decoder for the IEEE 802.11a/n/ac/ah convolutional code
(constraint length 7, generators 133/171 octal) tracks all 64 encoder states
in every trellis layer: 128 branch metrics, 64 add-compare-select operations
and 64 survivor bits per decoded bit. That is too much for a low-cost,
low-power receiver such as an 802.11ah IoT sensor.

The K-min Viterbi decoder keeps only the **K best states** of each layer.
From the K surviving "parent" states it expands 2K "child" states, drops
duplicates, keeps the K children with the smallest accumulated metric, and
stores for each of them nothing but its 6-bit state value and one bit saying
which of its two possible predecessors it came from. Because the successor
of state `p` under input bit `I` is simply `(2p mod 64) + I`, trace-back
needs no stored trellis: the predecessor of `s` is `s/2` or `s/2 + 32`,
and the decoded bit is the parity of `s`. The work per layer scales with
K instead of 64; with K between 3 and 5 the decoder is reported to reach the
packet error rate of the full decoder at about 1/13 to 1/21 of its
arithmetic.

This repository holds synthesizable SystemVerilog for the decoder (default
K = 5, trace-back length L = 60, 3-bit soft decisions), the matching
convolutional encoder, and self-checking testbenches.

## Design at a glance

```
                 kvd_codec_top
  +-------------------------------------------------------------+
  |  bcc_encoder            (encoder and decoder are not        |
  |  bits -> (A,B) pairs     connected: the PHY and channel     |
  |                          lie between them)                  |
  |                                                             |
  |  kvd_decoder                                                |
  |   soft (A',B') --> kvd_child_gen --> kvd_sort_knode --+     |
  |                     (2K x kvd_branch_metric)     |     |     |
  |                          ^  parent registers <---+     |     |
  |                          +-----------------------------+     |
  |                                   | K x {node, s} per layer  |
  |                                   v                          |
  |                          kvd_survivor_mem (L rows)           |
  |                                   |                          |
  |                          kvd_traceback --> bit buffer --> bits
  +-------------------------------------------------------------+
```

| File | Role |
|---|---|
| `rtl/kvd_pkg.sv` | state type, survivor entry struct, next-state and encoder-output functions |
| `rtl/bcc_encoder.sv` | rate-1/2 k = 7 encoder with valid/ready and a clear input |
| `rtl/kvd_branch_metric.sv` | branch (path) metric: squared distance (soft) or Hamming (hard) |
| `rtl/kvd_child_gen.sv` | K parents to 2K child candidates with metric and survival bit |
| `rtl/kvd_sort_knode.sv` | duplicate removal and selection of the K best children |
| `rtl/kvd_survivor_mem.sv` | L rows of K `{valid, node, surv}` entries |
| `rtl/kvd_traceback.sv` | one-layer-per-cycle trace-back and bit decoding |
| `rtl/kvd_decoder.sv` | controller: forward pass, trace-back, in-order output |
| `rtl/kvd_codec_top.sv` | encoder and decoder side by side (top level) |

## The code and the state numbering

The encoder holds the last six input bits in registers R5..R0, R0 being the
newest. Its state is the number `{R5..R0}`. For input bit `I` leaving state
`p` it emits

```
A = I ^ p[1] ^ p[2] ^ p[4] ^ p[5]      (g0 = 133 octal: input, delays 2,3,5,6)
B = I ^ p[0] ^ p[1] ^ p[2] ^ p[5]      (g1 = 171 octal: input, delays 1,2,3,6)
```

and moves to `next = {p[4:0], I}`. Every state therefore has two
predecessors, `next >> 1` (the one with R5 = 0, called survival path s = 1)
and `(next >> 1) + 32` (R5 = 1, s = 2). In the RTL `s` is one bit `surv`,
0 for s = 1 and 1 for s = 2; it is exactly the bit that re-enters as R5
when stepping backwards, so trace-back is `prev = {surv, node[5:1]}`.

## Forward calculation: one layer per input pair

Each accepted pair of soft values (A', B') is one trellis layer and takes one
clock cycle. All of the following is combinational between the parent
registers and the survivor memory write port.

**Child generation (`kvd_child_gen`).** Parent slot `i` with state `p` and
metric `m` produces candidates `2i` (I = 0) and `2i+1` (I = 1). Each gets
its own branch metric unit, which compares the expected pair
`bcc_out(p, I)` with the received pair. The candidate metric is written as
in the algorithm description, `min(m1, m2)` with the unused one of
`m1`/`m2` set to MAX (all ones), which reduces to `m + pm`.

**Branch metric (`kvd_branch_metric`).** Soft values are unsigned D-bit
numbers, 0 meaning a sure `0` and 2^D-1 a sure `1`. An expected bit is
mapped to 0 or 2^D-1 and the metric is the sum of the squared differences
(0..98 for D = 3). With `SOFT = 0` only the MSB of each soft value is used
and the metric is the Hamming distance (0..2). An erasure flag removes its
coded bit from the metric, so a depunctured rate-3/4 stream can be decoded.

**Selecting the next parents (`kvd_sort_knode`).** This is the heart of
the decoder and the part whose details matter for reproducing results.

* Two candidates can carry the same state: parents `x` and `x + 32` have the
  same two children. Of such a pair the one with the larger metric is
  dropped. The survivor keeps its own `surv` bit, which is how the
  add-compare-select of a full Viterbi decoder re-appears here.
* Of the remaining candidates the K with the smallest metrics are kept, in
  ascending order: output slot 0 is the best state of the layer.
* Ties are broken by candidate index (lower parent slot, then I = 0 first),
  both when dropping duplicates and when ranking. This makes the decoder
  fully deterministic, and the reference model in the testbenches follows
  the same rule.

The circuit is a one-cycle rank sort: an N x N matrix (N = 2K) of
"candidate i beats candidate j" comparisons; a candidate is kept unless a
valid candidate with the same state beats it; its rank is the number of
kept candidates that beat it; it is steered to output slot `rank` if that is
below K. For K = 5 that is 90 metric comparisons and 45 state comparisons.
The cost grows with K squared, which is harmless for the recommended K = 3..5
but large for K = 32 or 64.

In the first layers of a block there are fewer than K states (1, 2, 4, ...
from a single start state); the unused parent and output slots carry a
valid bit of 0.

The K selected `{valid, node, surv}` entries are written to the survivor
memory row of this layer, and the selected nodes and metrics become the
parent registers for the next layer.

## Trace-back

After the last layer `n` of a block, the best state of that layer (slot 0
of the sort) is the starting node. `kvd_traceback` then spends one cycle per
layer, from `n` down to 1:

1. decoded bit of layer `l` = `node[0]` (the input bit that was shifted in);
2. look `node` up among the K entries of row `l` (an associative compare of
   the K stored states) to get its `surv` bit;
3. `node <= {surv, node[5:1]}`.

The state found in step 2 is always present: each stored state was chosen
from children of the parents stored in the row before. An assertion checks
this. The bits land in an L-bit buffer at their layer index, so they can be
sent out in transmission order although they are found last-first.

## Blocks, packets and timing

The decoder works on blocks of at most L layers. A block ends after L
pairs, or earlier at the pair marked `in_last` (end of packet), so a packet
of any length is decoded as full blocks plus one shorter block. A packet
starts from state 0, the encoder's reset state. Every later block of the
same packet starts from the single state at which the previous trace-back
began, with metric 0; metrics restart from 0 in every block, and the metric
width `MW` is sized for L worst-case branch metrics (13 bits for L = 60,
D = 3), so no normalisation is needed.

The three phases do not overlap. For a block of n layers without stalls:

| phase | cycles |
|---|---|
| forward calculation, `in_ready` high | n |
| trace-back start | 1 |
| trace-back | n |
| output, one bit per cycle while `out_ready` is high | n |

The first decoded bit of a block is offered n + 2 cycles after the clock
edge that accepted the block's last pair; a block of n bits occupies
3n + 2 cycles. `in_ready` is low from the end of a block until its last bit
has been taken.

## Interfaces

`kvd_codec_top` (parameters `K = 5`, `L = 60`, `D = 3`, `SOFT = 1`):

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `enc_clear` | in | 1 | zero the encoder registers (start of packet) |
| `enc_in_valid` / `enc_in_ready` / `enc_in_bit` | in/out/in | 1 | information bits |
| `enc_out_valid` / `enc_out_ready` / `enc_out_a` / `enc_out_b` | out/in/out/out | 1 | coded pairs (combinational from the input) |
| `dec_in_valid` / `dec_in_ready` | in/out | 1 | decoder input handshake |
| `dec_in_a`, `dec_in_b` | in | D | soft values of A and B |
| `dec_in_era_a`, `dec_in_era_b` | in | 1 | erased (punctured) positions |
| `dec_in_last` | in | 1 | last pair of a packet |
| `dec_out_valid` / `dec_out_ready` / `dec_out_bit` / `dec_out_last` | out/in/out/out | 1 | decoded bits, `last` on a packet's final bit |
| `dec_events` | out | 6 | strobes `{miss, block done, short block, s = 2 step, duplicate removed, layer with < K parents}` |

All streams transfer when valid and ready are both high at a rising edge.

## Where this design follows the algorithm and where it chooses

Taken from the algorithm description: the code and its state numbering,
the branch metrics (Hamming for hard, squared Euclidean for soft
decisions), the child rule `(2p mod 64) + I`, the min(m1, m2) accumulation
with MAX, keeping the K best distinct children, storing K `{state, s}`
pairs per layer, the trace-back rule `s/2 + 32(s-1)`, decoding by parity,
starting from state 0, splitting packets into blocks of L, and the default
sizes K = 5, L = 60, D = 3.

Choices of this design where the description is silent or loose:

* **Order of duplicate removal and selection.** Duplicates are removed
  before the K best are chosen, so K distinct states survive whenever
  K distinct children exist. Removing duplicates after picking the top K
  would sometimes keep fewer than K.
* **Tie-breaking** by candidate index, as described above.
* **Soft value format**: unsigned, 0 = sure zero; the hard decision is the MSB.
* **Block chaining**: later blocks restart from one state with metric 0;
  the last block of a packet may be short.
* **Erasure inputs** for punctured code rates; the puncturing pattern
  itself (for example A0 B0 A1 B2 for rate 3/4 in 802.11) is applied
  outside the decoder.
* **Schedule**: one layer per cycle in both directions, no overlap of the
  phases, decoded bits delivered in order. A faster decoder would overlap
  the forward pass of one block with the trace-back of the previous one
  using two survivor memory banks.
* **Handshakes, reset** (asynchronous, control state only; memories are not
  reset) and the event outputs.

Not included, because they are part of the surrounding 802.11ah PHY rather
than the decoder and are not specified in enough detail: scrambler and
descrambler, puncturer, interleaver, constellation mapper and soft demapper,
pilots, preamble, subcarrier mapping, IFFT/FFT, guard interval, channel
estimation. The full 64-state decoder used as the comparison baseline is not
built separately; `K = 64` behaves like it within a block.

## Cost per layer and the evaluated configurations

Per trellis layer the forward pass uses 2K branch metric units (two
subtractions, two squarings and one addition each), 2K metric adders, the
2K-input sorter and one K x 8-bit survivor row. With the defaults that is
10 branch metric units, a 10-input sorter and 60 rows of 40 bits (2400
survivor bits); the whole top level has about 200 flip-flop bits besides
the survivor memory (coarse word-level synthesis, no technology mapping).
A full 64-state decoder would need 128 branch metrics, 64 compare-select
units and 64 survivor bits per layer.

The configurations the algorithm was evaluated with, and how this RTL
covers them:

| configuration | at the defaults? |
|---|---|
| K = 5, L = 60, 3-bit soft decisions | yes, it is the default |
| packets of 20, 100 and 500 bytes | yes: 3, 14 and 67 blocks of up to 60 bits; length is not limited |
| code rate 1/2 and 3/4 | yes, 3/4 through erasure flags after external depuncturing |
| K = 1, 3, 10, 32, 64 | by setting `K` (the sorter grows as K squared) |
| L = 20, 100, 800 | by setting `L` (survivor memory K x L x 8 bits, 32000 bits at L = 800) |
| BPSK to 256-QAM, AWGN and fading channels | not a decoder question: all arrive as 3-bit soft values |

## How far it has been checked

Every module has a self-checking testbench; the expected values come from a
separate reference model in `tb/kvd_ref_pkg.sv` (written in a software
style: octal generator masks, integer metrics, a greedy best-first
selection and list-based trace-back):

| testbench | what it shows |
|---|---|
| `tb_bcc_encoder` | random bits with stalls and clears against the reference encoder; `0 -> 0/00`, `0 -> 1/11` |
| `tb_kvd_branch_metric` | all 1024 input combinations, soft and hard |
| `tb_kvd_child_gen` | the `5 -> 10, 11`, `33 -> 2, 3` child rule; random parent lists |
| `tb_kvd_sort_knode` | 5000 random candidate sets with duplicates and ties |
| `tb_kvd_survivor_mem` | random writes and reads against a shadow copy |
| `tb_kvd_traceback` | worked example with K = 3, L = 8: path 33, 16, 40, 20, 10, 5, 2, 1 decodes `I(8..1) = 1,0,0,0,0,1,0,1` with one s = 2 step, in 8 cycles; random paths |
| `tb_kvd_decoder` | K = 3, L = 12: 150 packets, random noise, puncturing, stalls; bit-exact against the reference; block latency n + 2 |
| `tb_kvd_codec_top` | default parameters: 20-, 100- and 500-byte packets plus random ones, through encoder, noisy channel and decoder; bit-exact against the reference; noise-free packets error free; every mechanism (growing layers, duplicate removal, s = 2, short blocks, block chaining, clear, erasures, stalls, back-pressure) is counted and must occur |
| `tb_kvd_configs` | K = 1, 3, 5, 10, 32, 64 at L = 60, K = 5 at L = 20, 100, 800, and hard decisions, all bit-exact against the reference; prints bit and packet error counts |

"Bit-exact against the reference" means the RTL implements the algorithm
as specified here; it does not by itself reproduce published error-rate
curves, which depend on the full OFDM chain and fading channel. The channel
model in the testbenches is simple uniform integer noise on the soft values.
With it, the error counts fall as K or L grows, as expected. No timing or
area figures from a synthesis flow are claimed.

## Simulating

Any testbench builds with plain Verilator 5 from the repository root, for
example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/kvd_pkg.sv tb/kvd_ref_pkg.sv tb/tb_kvd_codec_top.sv \
    --top-module tb_kvd_codec_top -Mdir obj_top -o sim
obj_top/sim
```

(add `tb/kvd_cfg_harness.sv` for `tb_kvd_configs`; `-Wno-fatal` keeps the
testbenches' integer/bit width warnings from stopping the build). Each prints
`TB_RESULT checks=N failures=M` and stops; a watchdog ends a hung run with a
failure. The end-to-end testbench runs in well under a second of simulation
time once built.

## Changing it

* `K`, `L`, `D` and `SOFT` are parameters of `kvd_codec_top` and
  `kvd_decoder`; the metric width follows from L and D.
* The sorter's cost grows with K squared and the survivor memory with
  K x L x 8 bits (2400 bits at the defaults).
* To change the tie rule, change the `beats` matrix in `kvd_sort_knode` and
  `ref_select` in the reference model together.
