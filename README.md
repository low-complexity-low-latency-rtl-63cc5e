# Direct compare of ECC-protected tags with butterfly weight accumulators

Cache tag arrays and TLBs are often protected by an error-correcting code:
each tag is stored as a codeword, so an upset memory cell can be repaired.
The usual lookup decodes and corrects the stored codeword first and then
compares the tag. That puts the decoder on the critical path of every lookup.

This design takes the direct-compare route instead. It encodes the *incoming*
tag and measures the Hamming distance `d` between that encoding and the stored
codeword. If `d` is within the correctable distance of the code, the stored
entry is the incoming tag, possibly with a correctable upset. If `d` is larger,
the entry holds a different tag. Two ideas make this fast and small:

* **Systematic code, parallel halves.** The codeword is `{parity, tag}`. The
  tag half can be compared with the incoming tag at once. Only the parity half
  has to wait for the encoder. The two halves have separate XOR banks and
  separate counters, and their results are merged afterwards.
* **Butterfly-formed weight accumulator (BWA).** The distance is counted by a
  network made only of half adders. Any count above a small limit is
  collapsed into one OR-gate tree, because only the range of `d` matters.

The code is a decimal matrix code (DMC). The tag bits are arranged logically
as a matrix. Each row gets a horizontal check bit `H` (the XOR of the row).
Each column gets a vertical check bit `V` (the XOR of the column). The default
is a 4-bit tag in a 2x2 matrix, which gives an (8,4) code:

```
  i1  i0 | H0        H0 = i0^i1   H1 = i2^i3
  i3  i2 | H1        V0 = i0^i2   V1 = i1^i3
  -------
  V1  V0             codeword = {V1, V0, H1, H0, i3, i2, i1, i0}
```

The minimum distance of this code is 3. One upset can be corrected, and any
distance of 2 or more means a different tag.

## Datapath

```
 tag_i ─────────────────────────► XOR bank (K) ──► BWA for tags ─────┐  first level
 tag_i ──► DMC encoder ─────────► XOR bank (P) ──► BWA for parities ─┤
 codeword_i[K-1:0] ──► (tag bank)                                     │
 codeword_i[N-1:K] ──► (parity bank)                                  │
                                                                      ▼
                 interconnection: OR flags ──► OR-gate tree            second level
                                  weight-2^j bits ──► BWA for 2^j's, j = 0..log2(PMAX)
                                                                      │
                                                              decision unit
                                                                      │
                                   result_o = MATCH / FAULT / MISMATCH, soft_err_o, dist_o
 codeword_i ──► DMC corrector ──► corr_tag_o, corr_done_o, corr_parity_o, corr_fail_o
```

The whole matcher is combinational. It has no clock and no reset. The result
is valid one propagation delay after `tag_i` and `codeword_i` settle.
Register the inputs or outputs as the surrounding pipeline requires.

## The butterfly weight accumulator

This is the least obvious part of the design. `rtl/bwa.sv` counts the ones
among `N` bits. The inputs are padded to `2^L` bits. Each of the `L` stages
has `2^L/2` half adders.

* At stage `s` the vector is split into `2^s` groups. All bits of a group
  carry the same weight `w`.
* Inside a group, the half adder on the pair `(2i, 2i+1)` writes its carry
  (weight `2w`) into the first half of the group. It writes its sum
  (weight `w`) into the second half.
* At the next stage each half is a group of its own. So a half adder only
  ever adds two carries or two sums from the stage above. This is the
  butterfly connection.

After the last stage, output bit `idx` has weight `2^(L - popcount(idx))`.
For 8 inputs the weights are `8,4,4,2,4,2,2,1`. The sum of the weights of the
set outputs is exactly the number of ones at the input. A set output of
weight `w` means there are exactly `w` ones among the inputs that reach it.

**Revised form (`PMAX`).** Suppose all counts above `R_MAX` mean the same
thing. Then no carry of weight above `PMAX` needs to be added, where `PMAX` is
the largest power of two not above `R_MAX`. Such a carry already proves that
the count is at least `2*PMAX`, which is more than `R_MAX`. The BWA ORs every
such carry into `ovf_o` and leaves out the half adders that would have added
it. Take the default, `R_MAX = 1` (`PMAX = 1`). A 4-input BWA is then left
with three half adders and a 3-input OR. Its outputs are one weight-1 bit
(the parity of the count) and `ovf_o` (the count is 2 or more).

`ovf_o` is sufficient but not necessary. Several outputs of weight `PMAX` may
be set at once, so a count of `2*PMAX` or more can pass without `ovf_o`. When
`ovf_o` is clear, the weighted sum of the outputs is exact. With
`PMAX >= 2^L` (the module default) nothing is pruned. The BWA is then the
plain common structure, and `ovf_o` is 0.

## Second level and decision

`rtl/bwa_second_level.sv` routes the first-level results by weight:

* The two first-level OR outputs go to a second-level OR-gate tree.
* Every weight bit of weight `2^j`, from either BWA, goes to the BWA for
  `2^j`'s. That BWA counts in units of `2^j`, so its own limit is
  `PMAX >> j`. It is also in revised form, and its overflow goes straight to
  the decision unit.

`rtl/decision_unit.sv` adds the few remaining weight bits into `dist_o`.
Any overflow forces the last range. The ranges are:

| distance `d`        | `result_o`     | `soft_err_o` | meaning                                    |
|---------------------|----------------|--------------|--------------------------------------------|
| 0                   | `RES_MATCH`    | 0            | same tag                                   |
| 1 .. `T_MAX`        | `RES_MATCH`    | 1            | same tag, stored word has a correctable upset |
| `T_MAX+1` .. `R_MAX`| `RES_FAULT`    | 0            | stored word corrupted beyond correction    |
| > `R_MAX`           | `RES_MISMATCH` | 0            | different tag                              |

The defaults are `T_MAX = R_MAX = 1`, which suits the distance-3 DMC. With
these defaults the fault range is empty. A detect-only setting such as
`T_MAX = 0, R_MAX = 2` makes it reachable. `dist_o` is exact whenever the
result is not `RES_MISMATCH`. Its width is just enough for the largest sum
the second level can report. With the defaults it is 1 bit.

At the default size the whole chain is small. Each 4-bit half of the
difference has a 4-input revised BWA. The second level holds one 2-input BWA
for 1's. With `PMAX = 1` its carry means `d >= 2`, so that carry goes to the
mismatch decision like an OR-tree output.

## Corrector

`rtl/dmc_corrector.sv` sits beside the compare path, not on it. It
recomputes `H` and `V` from the stored tag bits and forms the row syndrome
and the column syndrome. The outcomes are:

* One row bit and one column bit set: a single information-bit upset. The
  bit is located and inverted (`corr_done_o`).
* Exactly one syndrome bit set: a check-bit upset. The tag is intact
  (`corr_parity_o`).
* Anything else: `corr_fail_o`.

`corr_tag_o` gives the repaired stored tag, for example for scrubbing the
entry after a `soft_err_o` hit. The code has distance 3. An information-bit
upset together with a check-bit upset in its row or column therefore looks
like a single check-bit upset, and is not detected.

## Files and parameters

| file | role |
|------|------|
| `rtl/ecc_match_pkg.sv` | result enum, defaults, elaboration-time functions (BWA weights, second-level sizes) |
| `rtl/dmc_encoder.sv` | `H`/`V` check bits; `ROWS`, `COLS` (default 2, 2) |
| `rtl/xor_bank.sv` | bitwise difference; `W` |
| `rtl/bwa.sv` | butterfly weight accumulator; `N` (default 8), `PMAX` |
| `rtl/or_tree.sv` | balanced OR tree; `N` |
| `rtl/bwa_second_level.sv` | interconnection, OR tree, BWAs for `2^j`'s; `KT`, `KP`, `PMAX` |
| `rtl/decision_unit.sv` | distance and range decision; `KT`, `KP`, `T_MAX`, `R_MAX` |
| `rtl/dmc_corrector.sv` | single-upset correction of a stored codeword; `ROWS`, `COLS` |
| `rtl/ecc_tag_matcher.sv` | top; `ROWS`, `COLS`, `T_MAX`, `R_MAX` |

To use the matcher with a different tag width, set `ROWS` and `COLS`. Then
`K = ROWS*COLS`, `P = ROWS+COLS` and `N = K+P`. All internal sizes follow
from these. Keep `T_MAX <= R_MAX`; elaboration stops otherwise.

## What follows the source design and what is chosen here

From the source design:

* the 2x2 DMC and its equations;
* the split into a tag path and a parity path;
* the XOR banks;
* the half-adder butterfly and its output weights;
* the OR-tree revision for `r_max = 1`;
* routing by weight to second-level BWAs for each power of two up to `Pmax`;
* a decision unit producing match, mismatch or fault.

Chosen in this design:

* the codeword bit order;
* the generalisation of the DMC to other matrix shapes;
* the exact range boundaries and `T_MAX`;
* the overflow outputs of the second-level BWAs;
* the adder in the decision unit;
* zero padding of widths that are not powers of two;
* with `PMAX = 1`, the carry of the last half adder of a revised BWA is ORed
  into the overflow flag, like every other weight-2 carry, instead of being
  brought out as a weight-2 output (no second-level block takes weight 2);
* the separate `soft_err_o` and `dist_o` outputs;
* the syndrome-based corrector.

Not provided:

* The tag memory itself. The stored codeword is an input port.
* An arithmetic ("decimal") error-detection variant of the DMC, and the
  correction of multi-bit upset patterns. Their equations are not
  specified, so the corrector handles single upsets only.
* Any pipelining.

## Simulation

Each testbench in `tb/` checks its block against values worked out
independently, such as hand-written encoder equations or popcounts. Each ends
by printing `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/ecc_match_pkg.sv tb/ecc_tag_matcher_full_tb.sv \
    --top-module ecc_tag_matcher_full_tb -o sim && ./obj_dir/sim
```

* `ecc_tag_matcher_full_tb` uses the default configuration. It runs all 16
  incoming tags against all 256 possible stored words and checks the result,
  the distance and the corrector.
* `ecc_tag_matcher_tb` runs the default configuration and a 4x4, detect-only
  configuration (`T_MAX = 0`, `R_MAX = 2`). It uses random near-codeword
  stimulus. It checks that each mechanism occurs at least once: exact match,
  corrected match, fault, mismatch, OR-tree overflow, second-level carry
  overflow, correction and uncorrectable flag.
* The other testbenches check one block each, mostly exhaustively.
