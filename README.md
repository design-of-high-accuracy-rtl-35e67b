# Fixed-width radix-4 Booth multiplier with linear error compensation

A fixed-width multiplier takes two N-bit operands and returns an N-bit
product. DSP datapaths often use one, because they keep every signal at the
same word length. The operands are taken as two's complement fractions, so
the wanted result is the upper half of the 2N-bit product. A full multiplier
followed by truncation wastes about half its adder tree on columns that are
then thrown away. This design does not build most of those columns. It
replaces what they would have contributed with a cheap estimate, computed
from a single column of partial-product bits. The estimate is a linear
function of that column, and it cuts the error far below plain truncation.

At the default size (N = 32) the mean squared error over random operands is
about 0.106 LSB², close to the 1/12 ≈ 0.083 LSB² of an exact, correctly
rounded product. Dropping the same columns without compensation gives
3.35 LSB² (direct truncation). Computing the full product and keeping its
upper half gives 0.334 LSB² (post-truncation), and that needs the whole
array.

The top level, `fwbm_top`, holds two independent units built from the same
cells. The main one is the fixed-width multiplier, `fixed_width_booth_mult`.
Next to it is `split_booth_mult16`, a 16 × 16 → 32 full-width Booth
multiplier whose partial products are organized as four 8-bit sub-arrays
(see the last design section). They share no signals, and each brings its
ports out to the top.

## Datapath of the fixed-width multiplier

```
 x ──────────────┐
                 v
 y ──> booth_pp_array ──(16 rows)──> column select ──┐
       (16 booth_encoder +                           │  kept columns
        16 partial_product_gen)                      │  + neg-bit row
                       │ index column (17 bits)      v
                       └──> linear_comp ──(f row)──> csa_tree (5-2 compressors,
                                                      (3,2) CSA) -> sum, carry
                                                           │
                                          [stage register, PIPELINE=1]
                                                           │
                                     ripple_carry_adder (2-bit cells)
                                                           │
                                              p = top N bits of the sum
```

There are two stages. Stage 1 does the Booth encoding, generates the partial
products and reduces them with the carry-save tree to two rows. Stage 2 adds
those two rows in a ripple-carry adder built from two-bit cells. With
`PIPELINE = 1` (default) a register sits between the stages. `p` and
`out_valid` then appear one clock after `x`, `y` and `in_valid`, and a new
pair can enter on every cycle. With `PIPELINE = 0` the unit is purely
combinational.

## Which columns are kept: the part to understand first

Number the columns of the full 2N-bit partial-product array from 0 (LSB) to
2N-1. With H extra columns and NF compensation bits:

| columns             | name              | treatment                               |
|---------------------|-------------------|-----------------------------------------|
| N .. 2N-1           | most significant part | built, becomes `p`                 |
| N-H .. N-1          | major part of the low half | built, then dropped after the final add |
| N-H-1               | index column (IC) | not added; its ones are counted         |
| 0 .. N-H-2          | minor part of the low half | not built at all                |

The compensation row `f = ALPHA * S + BETA` is added to the tree. S is the
number of ones in IC. The LSB of `f` sits NF columns below the kept columns,
at column N-H-NF. `f` reaches `p` only through the carries it causes. So the
tree is only N+H+NF bits wide (36 bits for N = 32). The low H+NF bits of the
final sum are discarded, and `p` is the sum's bits `[W-1 : H+NF]`.

Why the index column works: the bits just below the kept columns carry most
of the weight of what is thrown away, and they are correlated with it. IC
holds one bit from each Booth row that reaches that column, plus the row's
negation bit if one falls there. Each such bit is an output of a
partial-product multiplexer driven by the Booth encoder. So the correction
follows the actual encoded digits and not just the raw operands.

`BETA` also absorbs the half-LSB offset that turns the final truncation into
rounding. `ALPHA` and `BETA` are integers in units of 2^(N-H-NF), found this
way: a least-squares fit of (exact product + ½ LSB − kept part) against S
over uniformly random operands, then an exhaustive search of the nearby
integer pairs for the lowest mean squared output error. Results:

| N  | H | NF | ALPHA | BETA | MSE (LSB²) | plain truncation MSE |
|----|---|----|-------|------|------------|----------------------|
| 32 | 2 | 2  | 2     | 18   | 0.106      | 3.35                 |
| 8  | 2 | 2  | 2     | 10   | 0.089      | 0.53                 |
| 8  | 1 | 2  | 2     | 6    | 0.106      | 1.18                 |
| 8  | 0 | 2  | 2     | 4    | 0.183      | 2.69                 |

At the fitted values, ALPHA = 2 means each IC bit enters at its own weight.
The unrounded fit gives about 2.3. A larger NF gives ALPHA more resolution.
**If you change N or H, refit BETA** (and check ALPHA). The defaults belong to
N = 32, H = 2, NF = 2.

## Booth encoding and the shortened sign extension

The multiplier `y` gets a zero appended right of bit 0 and is read in
overlapping three-bit groups. Each group gives a digit d in {−2, −1, 0, +1,
+2} and is encoded as `{neg, one, two}` (`fwbm_pkg::booth_sel_t`). The
all-ones group is encoded as +0, so it never yields a row of ones. Each
partial-product row is N+1 bits wide, and each bit is a multiplexer over
x[j], x[j−1], their complements and 0. For a negative digit the row holds
the one's complement. The missing +1 is the `neg` bit, placed at the row's
LSB column (2i).

The rows are not sign-extended to 2N bits. Each sign bit is first assumed to
be 1, and the constants that gives are added up ahead of time. What is left:

* row 0: three bits above the row, `~s0 s0 s0`
* every other row: two bits, `1 ~si`

`booth_pp_array` returns rows already aligned to 2N bits with this pattern,
plus the `neg` vector on its own. This lets the multiplier keep only the
`neg` bits that land in kept columns or in IC.

## Carry-save tree and compressors

`csa_tree` reduces any number of equal-width rows to two. Each level takes
groups of five rows through a row of 5-2 compressors. In that row, column k
passes `cout1`/`cout2` to `cin1`/`cin2` of column k+1. If three or four rows
are left over, a (3,2) adder takes three of them, and a last row passes
straight through. Levels repeat, each a generate block, until two rows
remain. The 32-bit multiplier feeds it 18 rows: 16 Booth rows, the
negation-bit row and the compensation row. It reduces them in four levels,
18 → 8 → 4 → 3 → 2. All sums are modulo 2^W.

`compressor_5_2` has two internal forms with the same function:

* `HIGH_SPEED = 0`: three full adders in a chain.
* `HIGH_SPEED = 1` (default): a carry generator gives
  `cout1 = maj(x1,x2,x3)`. XOR/XNOR stages and multiplexers form
  `x1^x2^x3` and `x4^x5^cin1`, and `cout2 = (x4^x5) ? cin1 : x4`. Then
  `sum = s1^s2^cin2` and `carry = (s1^s2) ? cin2 : s1`.

In both forms `cout1`/`cout2` do not depend on `cin2`, so carries never
ripple more than one column inside a compressor row.

## The 16-bit split-array multiplier

`split_booth_mult16` computes the full 32-bit product of two 16-bit two's
complement operands. Each operand is cut into a high half (`AH`, `BH`,
signed) and a low half (`AL`, `BL`, unsigned). `b` is Booth-encoded as one
number into eight digits. The four low digits read only `b[7:0]` (with the
appended 0), and the four high digits read `b[15:7]`, so `b[7]` is shared as
their appended bit. Each digit drives two partial-product generators, one
for `AL` (extended to `{0, AL}`, 10-bit rows) and one for `AH` (9-bit rows,
placed 8 columns higher). This gives four independent sub-arrays:
AL·BL, AH·BL, AL·BH and AH·BH.

Every row's sign bit is inverted, and one constant row, worked out at
elaboration as −Σ 2^(sign column) mod 2^32, makes up the difference. The +1
bits of negative rows form two more rows. All 19 rows go through the same
`csa_tree` and a 32-bit `ripple_carry_adder`. The unit is combinational and
generic in `N` (a multiple of 4). Its testbench also runs an 8-bit version
exhaustively.

## Parameters of the fixed-width multiplier (`fixed_width_booth_mult`)

| parameter    | default | meaning                                      |
|--------------|---------|----------------------------------------------|
| `N`          | 32      | operand and product width (even, ≥ 4)        |
| `H`          | 2       | kept columns below the product LSB           |
| `NF`         | 2       | compensation bits below the kept columns     |
| `ALPHA`      | 2       | compensation slope (units of 2^(N−H−NF))     |
| `BETA`       | 18      | compensation offset (same units)             |
| `HIGH_SPEED` | 1       | 5-2 compressor form                          |
| `PIPELINE`   | 1       | register between the two stages              |

Ports: `clk`, `rst_n` (asynchronous, active low; clears `out_valid` and the
stage register), `in_valid`, `x[N-1:0]`, `y[N-1:0]`, `out_valid`,
`p[N-1:0]`. All values are two's complement. The sizes 32 bits, H = 2 and a
2-bit compensation function come from the design's published description.
The register, the valid handshake, the reset, the exact linear function and
its coefficients are this implementation's own choices.

## Where this departs from, or goes beyond, the published design

* The published description does not give the compensation formula. It says
  only that it is linear, that it uses Booth encoder outputs, and where the
  IC column and the compensation bits lie. The popcount form and the fitted
  coefficients here are one reasonable reading.
* The description treats a generic fixed-width example as unsigned. A Booth
  multiplier with this sign-extension scheme is two's complement, and that
  is what is built.
* Whether the two stages are clocked is not stated. The register is
  optional (`PIPELINE`).
* The 16-bit split-array multiplier is described only as four Booth
  sub-arrays whose rows are summed with adders and compressors. The
  signedness of the halves, the shared Booth bit and the sign handling are
  this implementation's own. It is built as a separate full-width unit,
  because nothing says how it relates to the fixed-width multiplier.
* A twin-precision mode (two half-width products in one array) is mentioned
  as a feature of earlier radix-2 tree multipliers and is not built.
* A histogram-equalization application is named, but no hardware for it is
  described, so none is provided.
* Area, power and delay figures are not reproduced. The partial-product
  multiplexer is plain logic, not the 11-transistor cell it was originally
  designed as.

## Files

`rtl/` (one unit per file):

* `fwbm_pkg.sv` – Booth select type, row count.
* `booth_encoder.sv`, `partial_product_gen.sv`, `booth_pp_array.sv` – encoding,
  row generation, shortened sign extension.
* `linear_comp.sv` – compensation word.
* `full_adder.sv`, `compressor_5_2.sv`, `csa_3_2.sv`, `csa_tree.sv` –
  carry-save reduction.
* `rca_2bit.sv`, `ripple_carry_adder.sv` – final adder.
* `fixed_width_booth_mult.sv` – fixed-width multiplier.
* `split_booth_mult16.sv` – 16-bit split-array full-width multiplier.
* `fwbm_top.sv` – top level with both units.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`). Each
prints `TB_RESULT checks=… failures=…` and stops itself with a watchdog.
`fwbm_ref_pkg.sv` is a behavioural model of the fixed-width result. It
works from digit values and integer column sums, not from the RTL's
structure. `tb_fixed_width_booth_mult` runs a 20 000-operation random stream
with bubbles through the 32-bit pipelined unit, and an exhaustive 8-bit test
with H = 2, H = 1 and H = 0. It counts every Booth digit value, compensations that
change the result, negation bits in IC, pipeline bubbles and back-to-back
operations. It also checks that the error is lower than with direct
truncation and with post-truncation.
`tb_fwbm_top` drives both units of the top at their default sizes with
5000 cycles of traffic. It checks every fixed-width product bit for bit and
every split-array product against `a * b`.

## Simulating

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fwbm_pkg.sv tb/fwbm_ref_pkg.sv tb/tb_fixed_width_booth_mult.sv \
    --top-module tb_fixed_width_booth_mult -o sim
./obj_dir/sim
```

Any other testbench runs the same way, with its own file and top-module
name. Each testbench finishes in seconds. Lint a module with
`verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/fwbm_pkg.sv rtl/<module>.sv`.
The remaining lint warnings are about unused bits: the carries out of the
top column of the tree, and the low sum bits that the fixed-width output
drops.
