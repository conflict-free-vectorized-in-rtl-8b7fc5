# Vectorized in-place belief-propagation polar decoder

A belief-propagation (BP) decoder for polar codes passes log-likelihood
ratios (LLRs) back and forth across the n = log2 N stages of the code's
factor graph. Each stage pairs elements at a different distance: 1, then 2,
then 4, and so on. If a memory word holds a vector of neighbouring LLRs, a
naive implementation has to fetch several words per computation and throw
half of each away.

This RTL implements a radix-2 BP decoder in which **every memory access is
one whole, aligned vector**, with no discarded elements. Three ideas make
this work:

* **Transpose between stages.** A stage processes two vectors that it read
  together. Before writing them back, it transposes the 2x2 block they
  form. After that, each stored word holds exactly the pair that one
  computational unit (CU) of the next stage needs.
* **In-place shared memory.** A stage produces only right-bound (R) or only
  left-bound (L) messages. Each result overwrites a word that was just read
  and is not needed any more. So one memory of (log2 N + 1) · N/2 words holds
  both message directions, half the size of separate R and L memories.
* **Regular addresses.** The read order of a stage is a counter whose low
  bits are rotated right by one bit. The decoder's input (channel LLRs) and
  its output (decoded bits) are both plain consecutive addresses.

The default instance decodes a length N = 1024 code with 8-bit LLRs. It
reads two vectors and writes one vector per clock cycle.

## The computational unit

The decoder works on the graph of `x = u · F^(⊗n)`, with `F = [1 0; 1 1]`
and both `u` (left side) and `x` (right side) in natural order. Stage `s`
(0 … n−1) joins column `s` to column `s+1`. It pairs position `p` with
`p + 2^s`, for every `p` whose bit `s` is 0. In each pair the upper element is
an XOR node and the lower one an equality node. With the scaled min-sum
function `f(a,b) = 0.9 · sign(a) · sign(b) · min(|a|,|b|)`, the CU (`bp_cu`)
computes:

| output | right-bound pass (`OP_RIGHT`) | left-bound pass (`OP_LEFT`, `OP_FINAL`) |
|---|---|---|
| upper | `R_c = f(R_a, L_d + R_b)` | `L_a = f(L_c, L_d + R_b)` |
| lower | `R_d = f(R_a, L_c) + R_b` | `L_b = f(R_a, L_c) + L_d` |

Here `a`, `b` are the left terminals (upper, lower) and `c`, `d` the right
ones. Every CU reads one R vector `(R_a, R_b)` and one L vector `(L_c, L_d)`.
It produces one output vector.

Arithmetic is Q-bit two's complement (Q = 8). Sums saturate to
±(2^(Q−1)−1). The factor 0.9 is 29/32, applied to the magnitude and rounded
down. Frozen bits get the prior +127, which stands for +∞; information bits
get 0.

The code convention matters when connecting a transmitter. If a transmitter
encodes with the bit-reversed generator `G_N = B_N F^(⊗n)`, its codeword is
the bit-reversed permutation of this decoder's `x`. The channel LLRs must
then be reordered with that same bit reversal before loading.

## Memory organisation: slots

`shared_msg_mem` holds n+1 **slots** of V = N/2 words. Each word is two LLRs.
Slot `k` belongs to graph column `k`:

| slot | contents |
|---|---|
| 0 | frozen-bit priors R₀ (never overwritten) |
| 1 … n−1 | R or L messages of that column, overwritten in place |
| n | channel LLRs (never overwritten) |

One iteration has 2n−1 stages:

1. **Right-bound stages** s = 0 … n−2. Read R from slot s and L (from the
   previous iteration) from slot s+1. Write the new R into slot s+1, in place
   of the old L. Nothing reads that old L again.
2. **Left-bound stages** s = n−1 … 1. Read R from slot s and the new L from
   slot s+1. Write the new L into slot s, in place of R, which this iteration
   no longer needs.
3. **Final stage** (the left-bound stage 0). Read slot 0 and slot 1. Compute
   the leftmost L, decide `û = (L + R₀ < 0)`, and write the bits to the output
   memory (`decision_out_mem`). Slot 0 is left untouched, so the priors
   survive for the next iteration.

The decoded bits are refreshed in every iteration. At N = 1024 the message
memory is 11 × 512 = 5632 words of 16 bits. The output memory is 512 words
of 2 bits.

## Vector layout and the transpose

This is the part that needs the most care.

Define the **stage-s layout** as follows. Word `A` of a slot holds the pair
`(p, p + 2^s)`, where `p` is `A` with a 0 inserted at bit position `s`. In
this layout each word is exactly one CU of stage s.

* Stage-0 layout: word A holds elements (2A, 2A+1). These are in-order
  rows, the format of the priors and of the decoded output.
* Stage-(n−1) layout: word A holds (A, A + N/2). These are in-order
  columns, the format of the channel LLRs.

Take the two words whose addresses differ only in bit s, `A1` (bit s = 0)
and `A2 = A1 + 2^s`, in stage-s layout:

```
A1: (P,         P + 2^s)                 transpose    A1: (P,       P + 2^(s+1))
A2: (P+2^(s+1), P + 2^(s+1) + 2^s)       -------->    A2: (P + 2^s, P + 2^s + 2^(s+1))
```

The right-hand side is exactly the stage-(s+1) layout of the same two
addresses. Transposing word pairs that differ in bit s therefore converts
between the stage-s and stage-(s+1) layouts, in both directions, without
moving data to other addresses.

The schedule uses this as follows:

* A right-bound stage s groups its words by bit s. It turns its result into
  stage-(s+1) layout, which is what stage s+1 reads.
* A left-bound stage s groups its words by **bit s−1**. Its L result, written
  into slot s, is read next by stage s−1 and by the next iteration's
  right-bound stage s−1, both in stage-(s−1) layout.
* The final stage needs no transpose.

The CU itself does not care which two words are grouped: every word is one
independent CU. Only the transpose depends on the grouping.

`vec_transpose` is written for a general r×r block (RADIX parameter). It has
an input buffer and an output buffer, so one vector enters and one leaves per
cycle. Row `j` of a transposed group is written back to the address of input
vector `j`.

## Address sequence

`addr_gen` maps a running index `v` (0 … V−1) to a word offset. It rotates
bits `s … 0` of `v` right by one bit and leaves the higher bits unchanged.
Its output is `{s, offset}`, which is the same as `s·V + offset`.

For N = 16 this gives:

* stage 0: 0, 1, 2, 3, …
* stage 1: 0, 2, 1, 3, 4, 6, 5, 7
* stage 2: 0, 4, 1, 5, 2, 6, 3, 7

The indices 2t and 2t+1 always land on the two offsets that differ only in
bit s, which is the transpose group.

The controller (`bp_ctrl`) forms the addresses from this sequence:

* Right-bound stage s uses the sequence of stage s. The R word is at
  `{s, off}`, the L word one slot higher, and the result goes to the L
  address.
* Left-bound stage s uses the sequence of stage s−1, moved up by one slot.
  R is at slot s, L at slot s+1, and the result goes to the R address.

`addr_gen` also takes a digit width `LOG_R`. With it, the rotation moves
whole log2(r)-bit digits, which is the grouping a radix-r layout needs. The
decoder only instantiates it with LOG_R = 1.

## Schedule and timing

The controller issues one CU operation per cycle. The datapath is:

1. memory read (1 cycle);
2. CU (combinational), then into the transpose unit;
3. transposed rows written back 1–2 cycles later.

Between stages the controller waits until the pipeline is empty, so that a
stage never reads a word that is still in flight. With V = N/2:

| phase | cycles |
|---|---|
| clear slots 1 … n−1 | (n−1)·V |
| transposed stage (right or left) | V + 4 |
| final stage | V + 2 |
| one iteration | (2n−2)·(V+4) + V + 2 |
| done state | 1 |

N = 1024 takes 4608 cycles to set up and 9802 cycles per iteration.

Each iteration performs 3·(N/2)·(2n−1) vector memory operations: two reads
and one write per CU. At N = 1024 that is 29184 operations, against 58368
for the same schedule with one LLR per access. The testbenches check both
the cycle formula and the operation count.

## Interface (`bp_decoder_top`)

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `load_we`, `load_channel`, `load_idx`, `load_data` | in | host write of one word while `!busy`: `load_channel=0` writes prior word `idx` (elements 2·idx, 2·idx+1), `load_channel=1` writes channel word `idx` (LLRs of x[idx], x[idx+N/2]); element 0 in bits [Q−1:0] |
| `start`, `iter_max` | in | start a decode of `iter_max` iterations (0 counts as 1) |
| `busy`, `done`, `iter_cnt`, `cur_stage` | out | status; `done` pulses for one cycle at the end |
| `out_idx` → `out_bits` | in/out | decoded bits u[2·idx] (bit 0) and u[2·idx+1] (bit 1), one cycle after `out_idx` |

To decode a frame:

1. Load V prior words and V channel words.
2. Pulse `start`.
3. Wait for `done`.
4. Read V output words.

The message slots are cleared by the decoder itself at every start.

Parameters: `N` (default 1024), `Q` (8), `ITW` (8). The remaining parameters
are derived. Leave `RADIX`/`LOG_R` at 2/1, because the CU is radix-2.

## Where this design departs from or adds to the published algorithm

* **Left-bound address grouping.** The algorithm as published walks
  left-bound stage s with the address sequence of stage s. With in-place
  writes, that produces the wrong layout for the next reader. This design
  uses the sequence of stage s−1, as derived above. It is checked bit-exactly
  against a plain reference decoder.
* **Lower CU outputs.** The equality node's own message is added outside
  `f` (`f(R_a, L_c) + R_b`, `f(R_a, L_c) + L_d`), as in standard BP.
* **Final stage.** It computes the leftmost L and the decisions without
  writing slot 0. This keeps the priors and is what makes the iteration
  2n−1 stages long.
* **Own choices, not given by the algorithm:**
  * 8-bit saturating LLRs, and 29/32 for the factor 0.9;
  * two read ports and one write port;
  * the pipeline drain between stages;
  * the host load and read ports;
  * the iteration count as a run-time input.
* **No early stopping.**
* **Radix 2 only.** The memory layout and transpose generalise to radix r.
  `vec_transpose` and `addr_gen` are tested at r = 4. But no radix-4 CU
  (message equations for a 4-input node) is defined, so none is built.

## Files

`rtl/`:

* `bp_pkg.sv`: operation and state enums, min-sum scale constants.
* `bp_cu.sv`: radix-2 CU.
* `vec_transpose.sv`: streaming r×r transpose.
* `addr_gen.sv`: rotated address sequence.
* `shared_msg_mem.sv`: slot memory, 2R1W.
* `decision_out_mem.sv`: hard decision and output memory.
* `bp_ctrl.sv`: stage scheduler.
* `bp_decoder_top.sv`: top level.

`tb/`:

* `bp_ref_pkg.sv`: integer reference BP decoder, encoder and frozen-set
  choice. It uses natural indexing, with no vectors, transposes or addresses.
* `tb_<block>.sv`: one self-checking testbench per block.
* `tb_bp_decoder_top.sv`: N = 16, 60 frames.
* `tb_bp_decoder_full.sv`: default N = 1024, 16 frames.
* `tb_bp_decoder_sizes.sv` with `bp_top_harness.sv`: N = 8, 64 and 256.

## Simulation

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/bp_pkg.sv tb/bp_ref_pkg.sv tb/tb_bp_decoder_full.sv \
  --top-module tb_bp_decoder_full -Mdir obj_full
./obj_full/Vtb_bp_decoder_full
```

Replace the testbench name to run another. Each testbench prints
`TB_RESULT checks=<n> failures=<m>` and stops. Each has a cycle watchdog.

## What the tests establish

The end-to-end testbenches send random frames through the whole decoder:

* rate-1/2 codes, frozen positions chosen by smallest row weight;
* noiseless, noisy and saturating BPSK LLRs;
* 1 to 6 iterations.

They check:

* every decoded bit equals the reference decoder, bit for bit;
* on noiseless frames the decoded bits equal the transmitted bits;
* the cycle count and the memory-operation count per iteration match the
  formulas above;
* each mechanism occurred: clearing, transposed right-bound and left-bound
  stages, final stage, pipeline drain stalls, right→left and left→final
  switches, repeated iterations, and saturation;
* host writes and start pulses issued while the decoder is busy are ignored.

The unit testbenches check:

* the CU against the integer model;
* the transpose at r = 2 and r = 4, including its latency;
* the address sequence against the listed N = 16 sequence and the radix-4
  grouping, and its permutation and pairing property at N = 1024;
* the memory ports;
* the decision rule, including a zero sum;
* the controller's stage order, slot usage and pairing.

Not established:

* decoding performance in terms of error rate against SNR, since only a
  handful of frames are simulated;
* any timing or area figure for a real technology.
