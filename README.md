# Direct matching of ECC-protected tags without decoding

A cache tag array or a TLB stores its tags protected by an error-correcting
code. To check a hit, the obvious circuit decodes (corrects) the stored
codeword and then compares it with the incoming tag. Decoding sits on the
critical path. This design takes the other route: it compares codewords and
accepts the stored one when it lies within the code's correctable distance of
the incoming tag's own codeword.

It uses two ideas:

1. **Systematic codewords.** A systematic codeword is `{data, parity}`, and
   its data part is the tag itself. So the data bits can be XORed with the
   incoming tag at once. Only the few parity bits have to wait for the
   encoder. The critical path is *encoder + short parity path*, not
   *encoder + full n-bit compare*.
2. **Butterfly-formed weight accumulators (BWAs).** The Hamming distance is
   counted by networks of half adders. The circuit only needs to know which
   range the distance falls in, not its exact value. So every partial count
   that already proves "too far" is ORed away instead of being added up.

The whole matcher is combinational. It has no clock and no reset, and its
result is valid one propagation delay after the inputs.

## Interface of the top, `ecc_tag_matcher`

| port | dir | width | meaning |
|---|---|---|---|
| `retrieved_cw` | in | N | stored codeword, `{data[K-1:0], parity[N-K-1:0]}` |
| `incoming_tag` | in | K | tag to look up |
| `range` | out | 2 | `ecc_match_pkg::hd_range_e` (see below) |
| `match` | out | 1 | distance ≤ T_MAX: hit, possibly after correction |
| `fault` | out | 1 | T_MAX < distance ≤ R_MAX: uncorrectable error detected |
| `mismatch` | out | 1 | distance > R_MAX: a different tag |

Exactly one of `match`, `fault` and `mismatch` is set.

| parameter | default | meaning |
|---|---|---|
| `K` | 4 | data (tag) bits |
| `N` | 8 | codeword bits |
| `T_MAX` | 1 | largest correctable distance |
| `R_MAX` | 2 | largest detectable distance |

The defaults are the (8,4) single-error-correcting, double-error-detecting
(SEC-DED) example of the published architecture. The RTL is generic. It has
also been simulated at (39,32) and (72,64).

## The four distance ranges

Let `d` be the Hamming distance between `retrieved_cw` and the codeword of
`incoming_tag`.

| `range` | condition | outputs |
|---|---|---|
| `HD_ZERO` | d = 0 | match |
| `HD_CORRECTABLE` | 0 < d ≤ T_MAX | match (the stored copy has correctable errors) |
| `HD_DETECTABLE` | T_MAX < d ≤ R_MAX | fault |
| `HD_BEYOND` | d > R_MAX | mismatch |

## Data path

```
 retrieved_cw[N-1:N-K] --XOR bank--> BWA for tags ----\
 incoming_tag ----------'                              \
       |                                                +-> interconnection -> OR-gate tree (q)
       +--encoder--> parity --XOR bank--> BWA for parities       |             BWA for weight P_max
 retrieved_cw[N-K-1:0] -----'                          /         |             ...
                                                                 |             BWA for weight 1
                                                                 +-----------> decision unit -> range
```

The first level (two XOR banks and two BWAs) turns each difference vector
into weighted bits. The second level merges the two results by weight. The
decision unit turns the merged bits into a range.

## How a BWA counts

A BWA counts the 1s among its inputs. All inputs carry the same weight,
2^BASE. The inputs are padded with zeros to W = 2^M bits. Then come M stages,
each of W/2 half adders. A half adder takes two bits of weight w. It gives a
carry of weight 2w and a sum of weight w.

At stage s the vector is split into 2^s blocks, and all bits in a block have
the same weight. Inside a block, bits 2i and 2i+1 feed one half adder:

- its carry goes to position i of the block;
- its sum goes to position i + (block size)/2.

So the carries of a block form the first half of that block at the next
stage, with twice the weight. The sums form the second half, with the same
weight. Carries are only ever added to carries, and sums to sums. That is the
butterfly.

After M stages, output `j` has weight

    2^(BASE + M - popcount(j))

because every 0 bit in `j` marks one carry taken on the way down. For eight
inputs the weights are 8,4,4,2,4,2,2,1. The count is then
`8*o[0] + 4*(o[1]+o[2]+o[4]) + 2*(o[3]+o[5]+o[6]) + o[7]`.

An output bit can only be set if the inputs that reach it hold exactly that
many 1s. No output overstates the count.

### Pruning above P_max

P_max is the largest power of two not above R_MAX+1. A set bit of weight
2·P_max or more already proves d ≥ 2·P_max > R_MAX, which is a mismatch. So
such bits never need to be added:

- When a block's weight first exceeds P_max (that is, a carry block created
  from a block that was still at or below P_max), its bits are ORed into
  `or_out`.
- The half adders below that block are not generated.
- `w_out` bits heavier than P_max are tied to 0.

The invariant of `bwa` is:

- if `or_out` is 0, the weighted sum of `w_out` is exactly the count times
  2^BASE;
- if `or_out` is 1, the count times 2^BASE is at least that sum plus 2·P_max.

If `PMAX_LOG2` is at least BASE+M, nothing is pruned and you get the plain
counter.

## Second level and the (8,4) example

For (8,4) with R_MAX = 2, P_max is 2. Each first-level BWA has 4 inputs and
outputs of weight 4, 2, 2, 1. Its weight-4 bit becomes its `or_out`.

`hd_second_level` then builds three things:

- **OR-gate tree `q`**: ORs the two first-level `or_out` flags.
- **BWA for 2's**: takes the four weight-2 bits (data part first, then parity
  part). Its stage-1 carries (weight 4) and its final carry (weight 4) go to
  `l2_or[1]`. Its final sum is the weight-2 bit `l2_w[5]`.
- **BWA for 1's**: takes the two weight-1 bits. It gives a carry of weight 2
  (`l2_w[0]`) and a sum of weight 1 (`l2_w[1]`). `l2_or[0]` stays 0.

The outputs of all second-level BWAs are packed into one vector, `l2_w`.
Offsets and weights come from functions in `ecc_match_pkg`: `l2_offset`,
`l2_width`, `l2_bit_exp` and `l2_src`. These functions are the single
definition of the interconnection, and the second level and the decision
unit share them.

**Decision unit.** If `q` or any `l2_or` bit is set, the result is
`HD_BEYOND`. Otherwise d is exactly the weighted sum of `l2_w`. That sum is at
most a few bits wide, and three comparisons against T_MAX and R_MAX pick the
range. In the (8,4) case, d = 2·l2_w[0] + l2_w[1] + 2·l2_w[5].

## The code

`secded_encoder` builds an extended Hamming code:

- The K data bits go, in order, to the Hamming positions 3, 5, 6, 7, 9, …
  (every position that is not a power of two).
- Check bit i is the XOR of the data bits whose position has bit i set.
- The last parity bit is the XOR of all data and check bits.

This gives (8,4), (39,32) and (72,64) for K = 4, 32 and 64. All have minimum
distance 4. The specific code is this implementation's choice. The published
architecture only asks for a systematic code. To use another systematic
linear code, replace the encoder and set T_MAX and R_MAX to that code's
correcting and detecting limits.

## Files

All RTL is in `rtl/`, one unit per file:

| file | role |
|---|---|
| `ecc_match_pkg.sv` | range enum; elaboration-time functions for BWA weights and the interconnection |
| `half_adder.sv` | processing element of the BWAs |
| `bwa.sv` | butterfly-formed weight accumulator, general or pruned |
| `or_tree.sv` | balanced OR tree |
| `xor_bank.sv` | bitwise difference |
| `secded_encoder.sv` | parity generator |
| `hd_second_level.sv` | interconnection, OR tree, one BWA per weight up to P_max |
| `decision_unit.sv` | range classification |
| `ecc_tag_matcher.sv` | top |

Testbenches are in `tb/`. Each one prints `TB_RESULT checks=<n> failures=<n>`.

| testbench | what it checks |
|---|---|
| `tb_ecc_tag_matcher` | default (8,4) top, every pair of 16 tags × 256 retrieved words |
| `tb_ecc_tag_matcher_codes` | (39,32) and (72,64) with T_MAX=1, R_MAX=2; (39,32) with T_MAX=2, R_MAX=5; (8,4) with T_MAX=0, R_MAX=1 and with T_MAX=1, R_MAX=3; uses `tb/matcher_code_check.sv` |
| `tb_bwa` | general form against the weighted-sum formula; pruned forms against the invariant above |
| `tb_hd_second_level` | (8,4) exhaustively against the hand-derived outputs above; (39,32) at random |
| `tb_decision_unit` | (8,4) exhaustively; wide case at random |
| `tb_secded_encoder` | (8,4) against a table; minimum distance ≥ 4 for (39,32) and (72,64) |
| `tb_half_adder`, `tb_or_tree`, `tb_xor_bank` | unit checks |

The threshold settings other than T_MAX=1, R_MAX=2 only exercise the
generic structure, for example P_max = 4 or no pruning at the first level.
They do not claim that the code can correct or detect more than SEC-DED
allows.

The end-to-end test also counts how often each mechanism fires, and it fails
if any count is 0. The mechanisms are:

- each of the four ranges;
- the first-level OR path;
- the second-level OR path;
- a mismatch found only by the decision unit's sum;
- errors confined to the data part, to the parity part, or spread over both.

To simulate with Verilator 5, for example the top:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/ecc_match_pkg.sv tb/tb_ecc_tag_matcher.sv --top-module tb_ecc_tag_matcher
./obj_dir/Vtb_ecc_tag_matcher
```

Every testbench runs in well under a second.

## Fidelity and choices made here

Taken from the published architecture:

- comparing the data part in parallel with encoding;
- the two-level structure (XOR banks, BWAs for tags and parities,
  interconnection, OR-gate tree, per-weight BWAs, decision unit);
- the butterfly connection rule and its output weights;
- the P_max rule;
- the (8,4), r_max = 2 example and its second-level structure.

Filled in here:

- **Ranges.** The range boundaries use T_MAX as the correctable limit.
- **Extended Hamming code.** The published text does not give the code's
  matrix.
- **Pruning rule.** The published drawing of the pruned BWA does not clearly
  show which bits enter its OR gate. The pruning here follows the P_max rule,
  and the count it reports is exact.
- **Combined OR flags.** The two ORed outputs of the BWA for 2's (R and S in
  the published figure) are merged into one flag.
- **Input order and padding.** The order of the interconnection's inputs is
  this design's choice. Inputs are padded to a power of two.
- **Decision unit.** It is written as a small adder and comparators instead
  of an enumerated truth table. The behaviour is the same.
- **No registers.** The architecture is described as combinational. If you
  need pipelining, add it around the top.

Area and delay comparisons with earlier comparators are not part of this
RTL. The design contains no model of the memory that supplies the stored
codeword.
