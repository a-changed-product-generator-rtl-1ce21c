# Redundant-binary Booth multiplier with no error-correcting row

This is a signed N x N multiplier (default N = 32, 64-bit product) that adds
its partial products in redundant-binary (RB) form. Radix-4 modified Booth
encoding (MBE) turns the multiplier into N/2 rows. Each pair of rows is then
packed into one RB row, giving N/4 rows. Those rows are added by a tree of
carry-free RB adders. A single carry-propagate subtraction at the end turns the
RB result into two's complement.

The point of the design is the row count. Packing Booth rows into RB rows
leaves small correction terms. Each negative Booth digit is missing a +1, and
each RB packing adds a -1. A conventional RB Booth multiplier gathers these
terms into one extra row, the *error-correcting word* (ECW). That makes
N/4 + 1 rows, which costs one more tree level whenever N/4 is a power of two.
Here the correction bits are folded into positions of the existing rows that
would otherwise be empty. With N = 32 the tree therefore has 8 rows and
3 stages instead of 9 rows and 4 stages.

## Structure

```
 a[N-1:0] ─┬──────────────────────────────────────────────┐
 b[N-1:0] ─┤ rbmppg2 (partial product generator)          │
           │  rbbe2 #(IDX=0) ─ecw→ rbbe2 #(1) ─ecw→ ... ─ecw→ rbbe2_last
           │  each block: 2 x mbe_encoder + 2 x mbe_pp_row
           └─→ N/4 RB rows (pos, neg), 2N digits each
                     │
           rb_reduction_tree: log2(N/4) levels of rb_adder
                     │
           rb_nb_converter: pos - neg
                     │
                 p[2N-1:0]
```

| module | role |
|---|---|
| `rb_pkg` | `booth_sel_t` (neg / one / two select lines) |
| `mbe_encoder` | radix-4 Booth encoder, one triplet to select lines |
| `mbe_pp_row` | Booth decoder, one N+1-bit row `(|d|*A) ^ neg` |
| `rbbe2` | one RB row from Booth rows 2i and 2i+1, plus the previous block's correction bits |
| `rbbe2_last` | the last RB row, which also absorbs its own correction |
| `rbmppg2` | the whole generator, N/4 blocks chained by their correction bits |
| `rb_adder` | one accumulation stage: a carry-free W-digit RB adder |
| `rb_reduction_tree` | balanced tree of `rb_adder`s |
| `rb_nb_converter` | RB to two's complement |
| `rb_mbe_multiplier` | top |

Everything is combinational. There is no clock and no reset, and `p` follows
`a` and `b` after one combinational delay.

## Number representation

An RB digit is a pair of bits (pos, neg) with value pos - neg. The encoding
(1,1) is accepted as zero, and the adders never produce it. An RB number of W
digits is two W-bit vectors, and its value is `pos - neg` modulo 2^W. All
rows and sums here are 2N digits wide and carry their absolute weights, so
row r holds zeros below its first occupied bit.

Booth digit j is d_j = -2*b[2j+1] + b[2j] + b[2j-1], with b[-1] = 0. The
decoder outputs `PP_j = (|d_j| * A) xor neg_j`, an N+1-bit two's complement
row, so that `PP_j + neg_j = d_j * A`. The triplet 111 is encoded as a plain
zero (neg = 0), so a zero digit always gives an all-zero row.

## How the corrections disappear (the part to read carefully)

Block i takes the low Booth row X = PP_{2i} (weight 2^(4i)) and the high row
Y = PP_{2i+1} (weight 2^(4i+2)). It puts X, sign-extended, into the positive
bits and ~Y, sign-extended and shifted, into the negative bits. Since
`X + Y = X - ~Y - 1`, the RB row equals the true value of the two Booth rows
minus a correction word:

```
c_i = neg_{2i} * 2^(4i)  -  (1 - neg_{2i+1}) * 2^(4i+2)
```

It contains the two +1s the inverted Booth rows are missing, and the -1 from
the RB coding. The -1 cancels when the high digit is negative. So c_i is one
positive bit at 2^(4i) and one negative bit at 2^(4i+2).

**Blocks 0 .. N/4-2.** Row i+1 starts at weight 2^(4i+4), so its positive
bit at 2^(4i) and its negative bit at 2^(4i+2) are always empty. Block i
passes `ecw_out = {~neg_hi, neg_lo}` to block i+1, which writes the bits
there. Those placements cost wires only, no logic.

**The last block** (`rbbe2_last`, Booth rows N/2-2 and N/2-1) has no
successor, so it absorbs its own correction. Its high row is replaced by

```
Y' = Y + neg_hi + neg_lo - 1  =  d_hi*A - (1 - neg_lo)
```

and ~Y' goes into the negative bits from 2^(N-2) up. The two empty negative
positions 2^(N-4) and 2^(N-3) both get neg_lo, worth -3*neg_lo. Adding it up,
`-~Y'*4 = 4*Y + 4*neg_hi + 4*neg_lo` (relative to 2^(N-4)). Together with the
-3*neg_lo this leaves exactly `4*Y + 4*neg_hi + neg_lo`. The row is therefore
the exact sum of the last two Booth rows, with nothing left over. When the high
digit is zero and the low digit is not negative, Y' is the all-ones row.

The sum of all N/4 rows, modulo 2^(2N), is exactly a*b. The testbench of
`rbmppg2` checks this for every pair of 8-bit operands.

## Carry-free accumulation

`rb_adder` uses the standard two-step RB addition. Per position it forms
z = x + y in {-2..2}, then splits it into a carry c and an interim sum s with
z = 2c + s. For z = +-1 the split depends on whether both operand digits one
position lower are non-negative (`h`):

| z | h = 1 | h = 0 |
|---|---|---|
| +2 | c=+1, s=0 | c=+1, s=0 |
| +1 | c=+1, s=-1 | c=0, s=+1 |
| 0 | c=0, s=0 | c=0, s=0 |
| -1 | c=0, s=-1 | c=-1, s=+1 |
| -2 | c=-1, s=0 | c=-1, s=0 |

The output digit s_i + c_{i-1} always stays in {-1, 0, +1}. So every result
digit depends only on operand positions i, i-1 and i-2, and the stage delay
does not grow with the width. The carry out of the top digit is dropped
(arithmetic modulo 2^W). `rb_reduction_tree` numbers its nodes as a heap:
node k = node 2k+1 + node 2k+2, with the input rows at nodes ROWS-1 ..
2*ROWS-2. `rb_nb_converter` computes `pos + ~neg + 1`, the only carry chain in
the multiplier.

## Parameters and sizes

| parameter | where | default | notes |
|---|---|---|---|
| `N` | top, `rbmppg2`, blocks | 32 | power of two, at least 8; 8, 16, 32 and 64 are tested |
| `IDX` | `rbbe2` | 1 | set by `rbmppg2`, 0 .. N/4-2 |
| `ROWS` | `rb_reduction_tree` | 8 | N/4, power of two |
| `W` | `rb_adder`, tree, converter | 64 | 2N |

| N | RB rows | adder stages | product bits |
|---|---|---|---|
| 8 | 2 | 1 | 16 |
| 16 | 4 | 2 | 32 |
| 32 | 8 | 3 | 64 |
| 64 | 16 | 4 | 128 |

## Where this RTL departs from the published design

- **Last block's circuit.** The published generator absorbs the last
  correction with a modified partial-product bit at the low end of the last
  row. That bit comes from a small multiplexer tree on a[1:0] and the last
  Booth triplet, plus one extra 3-input OR gate in the decoder, so it adds
  only about one pass-gate delay. That gate-level circuit is not reproduced.
  `rbbe2_last` instead forms Y' with an (N+2)-bit addition. The result is
  exact, but it puts a carry path into the generator that the original
  avoids. Replacing that addition with local logic is the main open item if
  delay matters.
- **Where the correction bits go.** In the original, the corrections
  (other than the last row's) are merged into the two most significant bits
  of the first row. Here each block's bits go into the empty low positions of
  the next row. Both leave N/4 rows, but the bit positions differ.
- **Row width.** Rows are full 2N-digit words with explicit sign extension.
  The published design uses narrower rows. Its sign-extension scheme is not
  reproduced here, so this version spends more area in the upper digits.
- **Encoder, decoder, RB adder and converter** are standard textbook forms.
  The original gives no gate equations for them. Its transistor-level choices
  (transmission gates, AND-OR-invert gates) do not appear in RTL.
- Operands are taken to be two's complement.

## Simulating

Each module has a self-checking testbench in `tb/` that prints
`TB_RESULT checks=<n> failures=<m>`. For example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rb_pkg.sv \
          tb/tb_rb_mbe_multiplier.sv --top-module tb_rb_mbe_multiplier
./obj_dir/Vtb_rb_mbe_multiplier
```

| testbench | checks |
|---|---|
| `tb_mbe_encoder` | all 8 triplets |
| `tb_mbe_pp_row` | `pp + neg == d*A` for every digit, N = 32 and 8 |
| `tb_rbbe2` | row value equals the true value minus its own correction plus the incoming one; `ecw_out` |
| `tb_rbbe2_last` | row value is exact for all 64 digit pairs and random A, N = 32 and 8 |
| `tb_rbmppg2` | sum of rows equals a*b: all 65536 pairs at N = 8, random at N = 32 |
| `tb_rb_adder` | value, canonical output digits, W = 64 and 16 |
| `tb_rb_reduction_tree` | 8 x 64 and 2 x 16 trees |
| `tb_rb_nb_converter` | corners and random |
| `tb_rb_mbe_multiplier` | default N = 32, 100 corner pairs and 20000 random; counts negative and magnitude-2 digits, handed-on corrections, the last block's all-ones and negative-low cases, and carries in the first and last tree stage, and fails if any count is zero |
| `tb_wordlengths` | N = 8 (exhaustive), 16, 32 and 64 side by side |

The end-to-end test at N = 32 takes about a minute, most of it compilation.
