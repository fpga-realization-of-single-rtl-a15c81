# Single-cycle 32x32 Booth multiplier with a compressor tree

This is a combinational multiplier for two 32-bit integers that gives the full
64-bit product in one pass through logic. Each operand has its own mode input,
so the unit can do a signed x signed, signed x unsigned or unsigned x unsigned
product. It has two main ideas:

* **Radix-4 Booth recoding.** The multiplier is recoded into 17 digits in
  {-2, -1, 0, +1, +2}. That gives 17 partial product rows instead of 32 or 33.
* **Counters instead of adders.** The rows are summed by *compressors*:
  5:3, 4:3, 7:3 and 15:4 counters. Each one counts the ones in a column and
  outputs the count in binary. No full-adder array and no `+` operator is used.

There is no clock, no register and no reset. "Single-cycle" means the product
is valid within the same clock period as the operands.

## Interface (`booth_mult32`)

| port           | dir | width | meaning                                          |
|----------------|-----|-------|--------------------------------------------------|
| `mplier`       | in  | 32    | multiplier (this is the operand that is recoded) |
| `mplier_s_u`   | in  | 1     | 1 = `mplier` is signed, 0 = unsigned             |
| `mplicand`     | in  | 32    | multiplicand                                     |
| `mplicand_s_u` | in  | 1     | 1 = `mplicand` is signed, 0 = unsigned           |
| `prod`         | out | 64    | exact product, 64-bit two's complement           |

There are 130 I/O bits in all. Because the product of any two 32-bit operands
fits in 64 bits, in any mode pair, `prod` is always exact.

## Data path

```
mplier ──► bit_extender33 ──► fblock_former ──(17 x {neg,one,two})──┐
                                 (17 booth_encoder)                  ▼
mplicand ► bit_extender33 ─────────────────────────────────► pp_generator
                                                   (17 pp_row_gen + ROW#-1)
                                                                     │ 17 rows x 34 bits
                                                                     │ + 64-bit ROW#-1
                                                                     ▼
                                                              pp_adder ──► prod
                                       (15:4 + 4:3 ─► 7:3 ─► 5:3 carry row)
```

### 1. One signed datapath for both kinds of operand (`bit_extender33`)

A 32-bit unsigned value can reach 2^32 - 1, which a 32-bit signed datapath
cannot hold. So each operand is widened to 33 bits:

* signed operand: bit 31 is copied into bit 32 (sign extension);
* unsigned operand: bit 32 is 0 (zero extension).

After this step, everything downstream treats both operands as 33-bit two's
complement numbers. The mode inputs have no other effect.

### 2. F-blocks and Booth digits (`fblock_former`, `booth_encoder`)

The 33-bit multiplier `a` gets two extra bits: a 0 below bit 0, and a second
copy of bit 32 above it. The resulting 35 bits are cut into 17 groups of three.
Neighbouring groups overlap by one bit:

| digit | bits              | digit | bits               |
|-------|-------------------|-------|--------------------|
| F0    | a1, a0, 0         | F30   | a31, a30, a29      |
| F2    | a3, a2, a1        | F32   | a32, a32, a31      |
| ...   | a(2k+1), a(2k), a(2k-1) |  |                  |

A group {x2, x1, x0} has the value `f = -2*x2 + x1 + x0`. Digit k has weight
4^k, and the 17 digits, weighted this way, add up to the signed value of `a`.
In signed mode F32 is always 0. In unsigned mode F32 is +1 whenever bit 31 is
set; this digit is the extra row that unsigned operands need.

The encoder does not output the value of `f`. It outputs the three controls
the row logic needs (`booth_pkg::booth_ctl_t`):

| x2 x1 x0 | f  | neg (F-bar) | one (F1) | two (F2) |
|----------|----|-------------|----------|----------|
| 000      | 0  | 0           | 0        | 0        |
| 001, 010 | +1 | 0           | 1        | 0        |
| 011      | +2 | 0           | 1        | 1        |
| 100      | -2 | 1           | 1        | 1        |
| 101, 110 | -1 | 1           | 1        | 0        |
| 111      | 0  | 0           | 0        | 0        |

### 3. Partial product rows and ROW#-1 (`pp_row_gen`, `pp_generator`)

Each row is `f * b`, where `b` is the 33-bit multiplicand. It is formed without
an adder:

1. `two` selects `2b` (a left shift) or `b`, sign-extended to 34 bits.
2. Every bit is XORed with `neg`. This gives the one's complement, `-f*b - 1`,
   for a negative digit.
3. The whole row is cleared when `one` is 0.

Each negative row is therefore short by 1. The missing ones are collected in
the correction row **ROW#-1**. This 64-bit word has bit 2k set when digit k is
negative, which is the LSB position of row k. The product is ROW#-1 plus the
17 rows, with row k shifted left by 2k and sign-extended.

### 4. The compressor tree (`pp_adder`)

This is the part that needs the most care. Place the 18 rows in a bit matrix:
row k starts at column 2k and repeats its sign bit up to column 63. Column c
then holds up to 18 bits of weight 2^c. Anything above column 63 is dropped,
so the sum is taken modulo 2^64. That is exact here, because the true product
fits in 64 bits.

A compressor in column c counts its inputs. Bit j of that count has weight
2^(c+j), so it belongs in column c+j of the next stage. The carries therefore
move diagonally: one column left per bit of significance, and one stage down.
Three stages bring every column down to a single bit:

| stage | per column                       | bits per column in → out |
|-------|----------------------------------|--------------------------|
| 1     | `comp_15_4` on bits 0..14, `comp_4_3` on bits 15..17 | 18 → 7: 4 from the 15:4 counts of columns c..c-3, 3 from the 4:3 counts of columns c..c-2 |
| 2     | `comp_7_3`                        | 7 → 3: count bits from columns c, c-1 and c-2 |
| 3     | `comp_5_3`                        | 3 bits, plus Out2 of column c-1 and Out3 of column c-2 → 1 product bit |

The last stage has no stage below it, so its carries run horizontally along
the row. The 5:3 compressor of column c takes 5 inputs: its own 3 bits, the
weight-2 output of column c-1 and the weight-4 output of column c-2. Its count
never exceeds 5, so three output bits are enough. Its weight-1 output is
`prod[c]`. This carry chain, 64 columns long, is the critical path of the
multiplier. Stages 1 and 2 add only a constant depth.

In the arrays `s1a`, `s1b`, `s2` and `s3`, column c is stored at index
c + 3. The three zero entries below index 3 stand for the columns to the right
of column 0, so the code needs no special cases at the edge.

### 5. The compressors

The compressors are all counters: the output is the number of ones among the
inputs, in binary (for the 5:3: none → 000, one → 001, ..., five → 101).

* `comp_5_3`: two sum/majority layers reduce the five inputs to one weight-1
  bit and two weight-2 bits. These two give Out2 (XOR) and Out3 (AND).
* `comp_4_3`: the inputs are taken in two pairs, each giving a sum and a carry.
  The two sums give Out1 and a third carry. That third carry can only be set
  when both pair carries are clear.
* `comp_7_3`: a `comp_5_3` counts inputs 0..4. A `comp_4_3` adds inputs 5 and 6
  to the 5:3's weight-1 output. A half adder and an OR merge the higher bits.
* `comp_15_4`: three `comp_5_3` count the inputs in groups of five. Three more
  `comp_5_3` then add the weight-1 bits, the weight-2 bits plus that carry, and
  the weight-4 bits plus that carry. The two possible weight-8 bits are ORed,
  because both set would mean a count of 16 or more.

## Where this RTL departs from, or adds to, the original description

The original design description leaves these points open. Each was decided
here:

* **Internal structure of the compressors.** Only their counting function and
  their names are given. The gate structures above are this implementation's
  own.
* **Arrangement of the tree.** The description says that carries move
  diagonally, that the last row propagates its carries horizontally, and that
  compressors replace full adders. Which compressor goes where (the
  15:4 + 4:3 / 7:3 / 5:3-chain arrangement) is this implementation's choice.
* **Sign handling of rows.** Rows are sign-extended to 64 bits. No
  sign-extension-avoidance trick is used.
* **Row width.** Rows are 34 bits.
* **Number of rows.** The description is inconsistent about the count (16 or
  17). This RTL follows its F-block table, which has 17 blocks (F0..F32), plus
  ROW#-1.
* **Timing.** The unit is purely combinational, with no registers; the
  description's "single-cycle" is read that way.
* **Encoder placement.** The 17 Booth encoders sit in `fblock_former` rather
  than in the partial product generator. The logic is the same.

Mapping to an FPGA or cell library is not part of this RTL. A generic gate
count (about 5000 single-bit cells after coarse synthesis) says nothing about
LUT usage. The fastest compressor structures are technology-specific, and
`comp_*` can be replaced by other implementations with the same ports.

## Files

* `rtl/booth_pkg.sv`: widths (`MULT_W=32`, `EXT_W=33`, `NDIG=17`, `ROW_W=34`,
  `PROD_W=64`, `NROWS=18`) and `booth_ctl_t`.
* `rtl/booth_mult32.sv`: top level.
* `rtl/bit_extender33.sv`, `rtl/fblock_former.sv`, `rtl/booth_encoder.sv`,
  `rtl/pp_row_gen.sv`, `rtl/pp_generator.sv`, `rtl/pp_adder.sv`.
* `rtl/comp_4_3.sv`, `rtl/comp_5_3.sv`, `rtl/comp_7_3.sv`, `rtl/comp_15_4.sv`.
* `tb/tb_<module>.sv`: one self-checking testbench per module.

The widths are fixed by the package. The tree in `pp_adder` is laid out for
18-bit columns, so it is not a parameterised N-bit multiplier.

## Verification

Every testbench computes its expected values by ordinary integer arithmetic,
independently of the RTL. Each prints `TB_RESULT checks=N failures=M`.

* The compressors and the Booth encoder are checked exhaustively (all 2^n
  input patterns).
* `tb_fblock_former` checks every digit against its 3-bit group, and checks
  that the weighted digits add up to the operand.
* `tb_pp_row_gen` and `tb_pp_generator` check each row against digit × b, check
  ROW#-1, and check the weighted sum of all rows.
* `tb_pp_adder` drives random and full-height (all ones) bit matrices.
* `tb_booth_mult32` runs 20,260 products. These are:
  * four small signed examples: 29×37, 37×(-29), 29×(-37) and (-37)×(-29),
    which give ±1073;
  * all pairs of 8 corner values (0, 1, 2, max, min, all ones, and two
    alternating patterns) in all four mode pairs;
  * 20,000 random operand/mode combinations.

  The product is checked half a clock period after the operands change. The
  testbench also counts how often each of the following is exercised, and
  fails if any never is: each mode pair, each digit value -2..+2, negative rows
  (ROW#-1 in use), a non-zero top digit F32, and the highest rows together with
  ROW#-1 reaching the 4:3 compressors. It runs at the full 32-bit size in a few
  seconds.

Every testbench was also run against a copy of its module with one deliberate
bug, and each reported failures.

The compressors and the Booth encoder also carry deferred immediate
assertions (`assert final`). These check the cases their structure assumes can
never happen: two weight-8 bits set together in the 15:4 compressor, two
weight-4 bits in the 7:3, overlapping carries in the 4:3, and a +-2 or
negative digit that is flagged as zero. Enable them with `--assert`.

To simulate with Verilator, for example the whole multiplier:

```
verilator --binary --timing --assert -Irtl rtl/booth_pkg.sv tb/tb_booth_mult32.sv \
          --top-module tb_booth_mult32
./obj_dir/Vtb_booth_mult32
```

Replace `booth_mult32` with any other module name to run that unit's
testbench. The package must come first on the command line; Verilator finds
the other modules in `rtl/` through `-Irtl`.
