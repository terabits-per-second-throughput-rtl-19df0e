# SC-MJL: a fully unrolled polar decoder for one codeword per clock

A forward-error-correction decoder for links that carry close to a terabit per
second cannot work through a codeword over many clock cycles. At 500 MHz,
512 Gb/s of coded data means 1024 code bits arrive every cycle. This design
decodes a (1024, 854) systematic polar code at that rate. The
successive-cancellation (SC) decoding tree is unrolled completely into
hardware. Every node of the tree is a separate circuit, pipeline registers
sit between the nodes, and a new codeword enters every clock while 45 others
are still in flight.

Three ideas keep this affordable:

* **Shortcut decoders for easy segments.** SC decoding is sequential: it
  decides bits one at a time. Large parts of the tree have a simple
  structure, so they can be decided in one step. These are rate-0, rate-1,
  repetition and single-parity-check segments, plus one 8-bit pattern handled
  by the MJL(8,2) decoder. The tree stops at those nodes.
* **Adaptive LLR width.** Log-likelihood ratios (LLRs) enter with 5 bits.
  Deeper in the tree they are narrowed, down to 1 bit (the sign only) for
  segments that need only a hard decision.
* **Register balancing.** Pipeline registers are placed after every third
  tree level rather than after every stage. The default code then takes 46
  cycles instead of 159, and far fewer LLRs need to be buffered.

## The code

* Length N = 1024, K = 854 information bits (rate ≈ 0.83), 5-bit channel LLRs.
  At 500 MHz this is 512 Gb/s coded and 427 Gb/s of information.
* Transform `x = u · F^{⊗10}`, `F = [1 0; 1 1]`, in natural bit order. Bit `i`
  of a frozen vector refers to `u_i`; a `1` means frozen (forced to 0).
* The frozen set `polar_pkg::FROZEN_1024_854` comes from the
  polarization-weight rule. `u_i` gets the weight `Σ 2^(b/4)` over the set
  bits `b` of `i`, and the 170 lowest-weight positions are frozen. Ties go to
  the lower index, and `2^(b/4)` is taken as `2^(b div 4) · {65536, 77936,
  92682, 110218}[b mod 4] / 65536`. After that, one 8-bit segment
  (`u_144..u_151`) is changed from information bits {6,7} to {3,7}. That is
  the pattern the MJL(8,2) decoder handles, so the default code uses it.
  The information set still contains every bitwise superset of its members.
  This is the condition for the usual two-pass systematic encoder
  (`v_A = d; u = vG; u_F = 0; x = uG`), which `tb/` uses.
* The code is **systematic**. The decoder re-encodes its decisions into the
  codeword estimate `x_hat`, and the information bits are `x_hat` read at the
  non-frozen positions in increasing order.

## The decoding tree

`sc_node` is a recursive module. A node of size M receives its M LLRs (`alpha`)
and returns the M-bit codeword estimate of its segment (`beta`, the partial
sums its parent needs). It picks its function at elaboration time from its
frozen pattern, in this order:

| node     | condition                                  | hardware |
|----------|--------------------------------------------|----------|
| rate-0   | all frozen                                 | none, `beta = 0` |
| rate-1   | nothing frozen                             | sign bit of each LLR |
| REP      | `{1,…,1,0}`, M ≤ N_LIM = 32                 | `rep_map_dec`: sign of the LLR sum |
| SPC      | only `u_0` frozen, M ≤ N_LIM               | `wagner_dec`: hard decisions, flip the least reliable bit if parity is odd |
| MJL      | M = N_MJL = 8, pattern `{1,1,1,0,1,1,1,0}` | `mjl_8_2` |
| split    | anything else                              | SC step, two child `sc_node`s |

A split node applies the two SC updates to pairs `(alpha[i], alpha[i+M/2])`:

* `f(a,b) = sign(a)·sign(b)·min(|a|,|b|)` (`polar_f`: one comparator and one
  XOR) feeds the left child.
* `g(a,b,u) = b + (1−2u)·a` (`polar_g`: two adders and a multiplexer) uses the
  left child's estimate `u = beta_l[i]` and feeds the right child.
* The result is `beta = {beta_r, beta_l ^ beta_r}`.

In the default code the 1024-bit tree has 55 split nodes and 56 leaf
segments: 18 rate-1 (the largest of 256 bits), 13 REP, 17 SPC, 1 MJL and 7
rate-0 segments. The split nodes reach down to size 4.

### MJL(8,2)

This segment has information bits `u3` and `u7`. Its code has four words:
`{x0..x3, x4..x7}` = `{u3⊕u7 ×4, u7 ×4}`. Plain SC would need two levels of
f stages, a repetition decision, a g stage and a second repetition decision.
`mjl_8_2` gets the same result in one combinational step:

1. Four `f(l_i, l_{i+4})` values are added (3 adders). The sign of the sum is `u3`.
2. `A = l0+l1+l2+l3` and `B = l4+l5+l6+l7` are formed (6 adders). Because g is
   linear in its inputs, the sum of the four `g(l_i, l_{i+4}, u3)` values
   equals `g(A, B, u3)`. So one g function and its sign give `u7`.
3. One XOR forms `u3 ⊕ u7`.

That is nine adders, four f, two decisions, one g and one XOR. The arithmetic
inside the segment is exact (no saturation), so the result is bit-identical
to SC at full precision. This decoder is the one place where the design
departs from the stage-by-stage structure of SC, and it is what "parallel
decisions" means here.

## LLR arithmetic and adaptive width

All LLRs are two's complement, and positive favours bit 0. A zero sum or zero
LLR decides 0. Each tree level `s` has a width `QW[s]`: the width of the LLRs
that enter a node of size `2^s`. The default
`polar_pkg::QW_DEFAULT` for levels 0…10 is `1,3,3,3,4,4,4,5,5,5,5`. The
channel enters at level 10 with 5 bits. Each f or g output is saturated
symmetrically to `±(2^(w−1)−1)` of its child's width. A child that is a
rate-1 segment gets a single bit (the sign) whatever the level, because only
the sign is used there. REP, SPC and MJL sums are formed at full width inside
the segment.

These widths are a choice of this design. The principle — fewer bits where the
segment is already polarized, down to one bit — is the reference design's; its
actual per-segment widths were chosen from measured LLR distributions and are
not reproduced here. Error-rate performance at these widths has not been
characterised beyond the short noisy runs in the testbenches.

## Pipeline and register balancing

There is no flow control. A codeword is accepted every clock, and each node's
delay is fixed at elaboration.

* A segment decoder, or the f stage and the g stage of a split node, of size
  `2^s` ends in a register only when `REGS[s]` is set.
* A split node keeps its input LLRs in a `delay_line` until its left child
  has answered. It keeps the left estimate in a second `delay_line` until the
  right child has answered.
* `polar_pkg::node_lat()` computes every node's latency from the frozen
  pattern and `REGS`, and sizes these buffers.

| `REGS`              | registers at levels | latency, default code |
|---------------------|---------------------|-----------------------|
| `REG_ALL` (`16'hFFFF`) | every stage      | 159 cycles |
| `REG_BAL` (default) | 1, 4, 7, 10         | 46 cycles  |

With `REG_BAL`, one clock cycle holds up to three tree levels of f or g
stages, or a segment decoder followed by g stages. The XOR combines are
never registered. Any mask works functionally. The clock rate it allows
depends on the technology and is not modelled.

The buffers are the largest part of the design. With the default parameters,
synthesis sees about 530 kbit of delay-line storage. This is the "many
codewords in flight" memory cost of an unrolled decoder, and it is why
narrow LLRs and fewer pipeline stages pay off.

## Interface (`scmjl_decoder`)

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| `clk`       | in  | 1      | clock |
| `rst`       | in  | 1      | synchronous, active high; clears the valid pipeline only |
| `in_valid`  | in  | 1      | `llr_in` holds a codeword |
| `llr_in`    | in  | N × Q  | channel LLR of `x_i` in `llr_in[i]` |
| `out_valid` | out | 1      | `x_hat`/`info` belong to the codeword that entered `LATENCY` cycles earlier |
| `x_hat`     | out | N      | codeword estimate |
| `info`      | out | K      | systematic information bits |

Parameters: `N`, `K`, `Q`, `FROZEN` (N bits, exactly N−K ones), `QW`, `REGS`.
The internal `LATENCY` equals `node_lat(N, FROZEN, REGS)`, which is 46 at the
defaults. A codeword may enter on every cycle, and idle cycles are allowed.

## How far to trust it, and where it differs from the reference design

Verified in simulation:

* Each block is checked against an independent model: exhaustive tests for
  f and g; brute-force ML for the repetition and SPC decoders; element-wise
  SC for MJL.
* The 64-bit tree test (`tb_sc_node`) and the full-size decoder test
  (`tb_scmjl_decoder`) compare the RTL bit for bit against a behavioural SC
  reference (`tb/polar_ref_pkg.sv`), under both register masks.
* Noiseless codewords come back exactly.
* The latency is the computed one. Codewords stream back to back, with an
  idle gap.

Differences and choices of this design:

* **Latency.** The reference design reaches 40 cycles with register
  balancing; this one reaches 46 with `REG_BAL`. Its register placement
  is not known in detail.
* **Code.** N = 1024 and K = 854 are derived from the reference throughput
  figures; the frozen set is this design's (see above). With a
  polarization-weight code alone, no MJL segment would occur. One segment was
  changed so that the MJL decoder is used.
* **MJL.** Only the 8-bit pattern `{1,1,1,0,1,1,1,0}` is implemented. Other
  8-bit segments that are not REP/SPC/rate-0/rate-1 are decoded as ordinary
  SC splits.
* **Shortcuts.** Rate-0 and rate-1 shortcuts are applied at every size. REP
  and SPC apply up to 32 bits.
* **Widths.** Per-level LLR widths, not per-segment widths.
* **Not covered.** Clock rate, area and power. The 7 nm projection with two
  decoders in parallel is not built; two `scmjl_decoder` instances side by
  side would form it.

## Files

* `rtl/polar_pkg.sv`: constants, default frozen set, width table, register
  masks, node classification and latency functions.
* `rtl/scmjl_decoder.sv`: top. Root of the tree, valid pipeline, information-bit
  extraction.
* `rtl/sc_node.sv`: recursive tree node.
* `rtl/polar_f.sv`, `rtl/polar_g.sv`: the SC updates.
* `rtl/rep_map_dec.sv`, `rtl/wagner_dec.sv`, `rtl/mjl_8_2.sv`: segment
  decoders.
* `rtl/delay_line.sv`: pipeline buffers.
* `tb/polar_ref_pkg.sv`: behavioural reference decoder, encoder, channel model.
* `tb/tb_*.sv`: one self-checking testbench per module. There is also
  `tb_example_16_9`, a (16, 9) code whose tree is exactly one MJL(8,2) and one
  8-bit Wagner segment.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<m>` and finishes. With
Verilator 5:

```sh
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/polar_pkg.sv tb/polar_ref_pkg.sv tb/tb_scmjl_decoder.sv \
    --top-module tb_scmjl_decoder -j 8
./obj_dir/Vtb_scmjl_decoder
```

Replace `tb_scmjl_decoder` with any other testbench name. The full-size build
takes about two minutes and the run under a second. The small testbenches
build in seconds.

## Changing it

* **Another code.** Set `N`, `K` and `FROZEN` on `scmjl_decoder`. `FROZEN`
  must freeze exactly N−K positions (an assertion checks this). The
  information set should contain every bitwise superset of its members if
  you use a two-pass systematic encoder.
* **Other widths.** Pass a different `QW` table. The channel width is `Q`;
  `QW[s]` is used for levels `s < log2 N`.
* **Another pipeline.** Pass a different `REGS` mask. All buffer depths
  follow automatically.
