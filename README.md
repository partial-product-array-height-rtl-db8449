# Radix-16 Booth multiplier with a 16-row partial product array

This is a 64 x 64-bit unsigned multiplier. It uses radix-16 Booth recoding,
and its partial product array is never more than 16 bits high. A plain
radix-16 Booth array for unsigned 64-bit operands is 17 bits high: the
recoding leaves one transfer digit out of the top group, and that digit
brings a 17th row. Taking that one row away means the array reduces to two
rows in exactly three levels of 4:2 carry-save adders (16 -> 8 -> 4 -> 2).
The result is a regular tree with no odd 3:2 stage. The multiplier then
needs one carry-propagate adder.

The height reduction is the central idea. The rest (recoding, odd
multiples, sign-extension prefixes, 4:2 tree) is a standard radix-16
Booth multiplier, written so that the array layout stays visible.

## Data flow

```
 B ──> booth16_recoder ──digits, extra──┐
                                        v
 A ──> booth16_pp_gen ─────────────────────────────────────────┐
        ├─ booth16_multiples   1A..8A (3A, 5A, 7A by adders)    │ 16 x 128-bit rows
        ├─ booth16_pp_row x16  select |d|·A, complement if d<0  │
        ├─ booth16_ecw         sign-extension prefixes (ECW)    │
        └─ booth16_row_merge   folds the 17th row into row 15   │
                                                                v
                      booth16_reduction_tree (3 levels of booth16_csa42)
                                                                │ sum, carry
                                                                v
                                        booth16_cpa ──> product[127:0]
```

`booth16_mult64` is the top module. `booth16_pkg` holds the digit type and
the layout constants.

## Recoding (`booth16_recoder`)

The multiplier is cut into 16 groups of four bits, v_i in 0..15. Each group
produces a transfer digit t_i = (v_i >= 8) = y[4i+3] and an interim digit
w_i = v_i - 16·t_i. The digit is d_i = w_i + t_{i-1}, which lies in
{-8..8}. The same digit can be written as

    d_i = -8·y[4i+3] + 4·y[4i+2] + 2·y[4i+1] + y[4i] + y[4i-1]     (y[-1] = 0)

Because B is unsigned, the transfer out of the top group,
t_15 = y[63], is left over as a 17th digit of weight 2^64. The output
port `extra` carries it.

Digits are sign/magnitude (`digit_t`: `neg`, `mag` in 0..8). The sign is
always y[4i+3]. So the pattern that gives -8+7+1 = 0 is a "negative zero".
That causes no error: the all-ones row plus its negation bit comes to zero.
It also means that the sign of the last row is exactly `extra`.

## Multiples (`booth16_multiples`)

The digits need 1A to 8A. The even multiples are shifts, and 6A is 3A shifted.
Each odd multiple takes one carry-propagate operation:
3A = A + 2A, 5A = A + 4A, 7A = 8A - A. All multiples are 67 bits wide.
Their low bits settle early and their high bits late, and the height
reduction below depends on that.

## The bit array, and how it is held to 16 rows

Row i (i = 0..15) is `(|d_i|·A) XOR neg_i`, 67 bits wide, at column 4i.
The "+1" of a negative row is the separate bit neg_i at column 4i. Each
row's sign is not extended. Instead the constant -Σ 2^(67+4i) is added,
folded together with the signs into short prefixes that start at column
4i+67 (`booth16_ecw`):

| row | prefix, high to low |
|---|---|
| 0 | `~s0 s0 s0 s0 s0` (columns 71..67) |
| 1..15 | `1 1 1 ~si` (bits beyond column 127 dropped) |

Written out naively, the array is 17 bits high in column 60 (neg_15 is
added there) and in columns 64..71 (the extra row `extra·A`, at columns
64..127, is added there). Every other column holds at most 16 bits.

`booth16_row_merge` removes both extra bits with one short addition in
the 15-column window 60..74:

    {carry, merged[14:0]} = row15[14:0] + neg_15 + ((extra ? A[10:0] : 0) << 4)

- `merged` replaces the low 15 bits of row 15.
- `carry` goes to column 75. Column 75 has only 15 bits, so one more fits.
- The rest of the extra row, `extra·A[63:11]`, sits at columns 75..127,
  above the end of row 0 (column 71).

The adder's inputs are bits 0..14 of a multiple (the early, low-order end
of the 3A/5A/7A adders), 11 bits of A, and y[63]. So the merge runs in
parallel with the slow upper bits of the multiples and does not lengthen
the partial product stage. A 15-bit window is the shortest whose carry
lands in a column below 16.

Column heights for N = 64, counting every bit the array holds:

| layout | maximum height | columns at maximum |
|---|---|---|
| naive | 17 | 60, 64..71 |
| merged (this design) | 16 | 56, 60..71, 75 |

`booth16_pp_gen` packs the bits into exactly 16 vectors of 128 bits, so
the height bound holds by construction:

- vector i holds row i and its prefix;
- vector 0 also holds `extra·A[63:11]` at columns 75..127;
- vector 1 also holds the merge carry at column 75 (row 1 ends at column 74);
- vector 15 also holds neg_0..neg_14 at columns 0, 4, .., 56 (row 15
  starts at column 60).

The sum of the 16 vectors modulo 2^128 is A·B.

## Reduction and final addition

`booth16_csa42` is a vector 4:2 carry-save adder. Each column has two full
adders, and the first one's carry is passed one column to the left as the
horizontal carry. `booth16_reduction_tree` arranges them in
log2(ROWS) - 1 levels. Each level takes consecutive groups of four rows;
at 16 rows that is 4 + 2 + 1 adders. `booth16_cpa` adds the final two
rows with a plain `+`, which leaves the adder architecture to synthesis.

## Interface and timing (`booth16_mult64`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock, rising edge |
| `rst_n` | in | 1 | synchronous active-low reset; clears valids and data registers |
| `in_valid` | in | 1 | `a`, `b` valid this cycle |
| `a` | in | N | multiplicand |
| `b` | in | N | multiplier |
| `out_valid` | out | 1 | `product` valid |
| `product` | out | 2N | a·b, unsigned |

Operands are registered on the edge where `in_valid` is high. The whole
datapath is one combinational stage, and the product is registered on the
next edge. So `out_valid`/`product` follow `in_valid` by two clock edges,
and a new pair can be accepted every cycle. There is no back-pressure.
Where to put pipeline registers inside the datapath is left open: the
flip-flops here only bound the combinational stage.

## Parameters

`N` (default 64) is the operand width. The layout is written in terms of
N, K = N/4 rows and the fixed 15-bit merge window. It works for any N that
is a multiple of 4 and at least 16. The reduction tree additionally needs
K to be a power of two, so N can be 16, 32, 64 or 128. All four widths
are simulated. The `booth16_reduction_tree` parameters `ROWS`
and `W`, and the `W` of `booth16_csa42` and `booth16_cpa`, are set from N
by the top.

## Where this design makes its own choices

- The published method states the goal: a height of n/4 for unsigned
  radix-16 operands, without slowing partial product generation. It
  suggests folding the extra bits into the most significant end of the
  first partial product. This design folds them into the least
  significant end of the last partial product instead. That covers the
  same columns, and its inputs are the early low-order bits of the
  multiples. The window width and the packing into 16 vectors are also
  this design's own.
- In the block diagram the correction word (ECW) feeds the adder
  directly. Here its constant is folded into each row's prefix, because a
  separate constant row would raise the height again.
- The transfer-digit rule t_i = (v_i >= 8), the choice of 3A = A + 2A,
  5A = A + 4A and 7A = 8A - A, and one's complement plus a negation bit are
  the usual choices. The description names the steps but not these
  details.
- The I/O registers, the 2-cycle latency, the synchronous reset and the
  valid handshake are this design's own.
- No gate-level timing, area or power is claimed. Adders are written as
  operators.

## Verification

Every module has a self-checking testbench in `tb/` that compares against
values computed independently in the testbench. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_booth16_recoder` | digits against the digit formula, signs, range; digits sum back to B (random at N=64, exhaustive at N=16) |
| `tb_booth16_multiples` | mult[k] = k·A for k = 1..8 |
| `tb_booth16_pp_row` | every digit -8..8 and -0 gives (\|d\|·A) XOR neg |
| `tb_booth16_ecw` | prefixes add up to -Σ s_i·2^(N+3+4i) mod 2^2N (exhaustive at N=16) |
| `tb_booth16_row_merge` | {carry,sum} = row_low + neg + extra·A_low·16 |
| `tb_booth16_pp_gen` | the 16 (or 4) vectors add up to A·B; extra row and merge carry both occur |
| `tb_booth16_csa42`, `tb_booth16_reduction_tree`, `tb_booth16_cpa` | arithmetic identities |
| `tb_booth16_mult64` | full-size top: a stream of about 22,000 products with gaps and a mid-stream reset; exact latency of 2; counts the extra row, merge carry, every digit value, -0, back-to-back and idle cycles, and fails if one never happens |
| `tb_booth16_mult_sizes` | top at N=16 (all multipliers for 16 multiplicands), N=32 and N=128 (random) |

Run one with Verilator, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/booth16_pkg.sv tb/tb_booth16_mult64.sv --top-module tb_booth16_mult64
./obj_dir/Vtb_booth16_mult64
```

Each testbench finishes within a few seconds.

`verilator --lint-only -Wall` gives two kinds of warning. Both are
expected: unused constants of the shared package, and the top carry bit of
a 4:2 adder, which is dropped because all arithmetic is modulo 2^2N.
