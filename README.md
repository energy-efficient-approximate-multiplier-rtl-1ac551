# Approximate Dadda multiplier for a 3x3 mean filter

A 3x3 mean filter has to divide a sum of nine pixels by 9. In hardware that
division becomes a multiplication by a fixed-point 1/9, and this design makes
that multiplication cheap in two ways:

1. **Truncation.** The filter needs only the integer part of `s * 1/9`, and
   only 8 bits of it. So the 12x12 multiplier never forms the low-order
   sub-product, drops the lowest columns of the two middle sub-products, and
   never computes the top four product bits.
2. **Approximate adders.** The 6x6 Dadda multipliers the 12x12 multiplier is
   built from reduce part of their partial products with half and full adders
   whose XOR has been replaced by an OR. These cells are smaller and faster,
   and wrong for only one or two input patterns.

The filter is error-tolerant: on a noisy 256x256 test image the approximate
filter's output differs from the exact filter's by an MSE of about 4 (PSNR
against the clean image 31.10 dB instead of 31.33 dB).

Two 6x6 sub-multipliers are provided:

* **ADMAA** (approximate adders only): the default, and the more accurate and
  more energy-efficient of the two.
* **ADMAPP** (altered partial products): pairs of mirrored partial products
  are first rewritten as propagate/generate terms.

## Datapath

```
 a1 a2 ... a9  (8 bit each)
   |  adder chain s1 = a1+a2, s2 = s1+a3, ... s8 = s7+a9   (exact, 12 bit)
   v
   s (12 bit) ----+
                  |  adm12_trunc: approx(s * 455) bits 19:12
 455 = 1/9 * 4096 +--------------------------------------------> ymean (8 bit)
```

`455 / 4096 = 0.11108...` is slightly below `1/9`. So even an exact multiplier
rounds down a little: nine pixels of 255 give `2295 * 455 / 4096 = 254.9`, so
the mean is 254. With ADMAA the filter also gives 254 for that window; with
ADMAPP it gives 253.

The datapath is purely combinational. It has no clock, reset or handshake.
Registers, line buffers and the pixel stream belong to whatever system uses
it.

## The truncated 12x12 multiplier (`adm12_trunc`)

The operands are split into halves, `a = {ah, al}` and `b = {bh, bl}`. Three
6x6 products are formed:

| sub-product | weight | use |
|---|---|---|
| `C = ah*bh` | 2^12 | bits C[7:0] used, C[11:8] omitted |
| `A = al*bh` | 2^6  | A[11:4] used, A[3:0] ignored |
| `B = ah*bl` | 2^6  | B[11:4] used, B[3:0] ignored |
| `al*bl`     | 2^0  | not generated |

The kept bits are merged column by column. Column `n` has weight 2^n.

| column | cells |
|---|---|
| 10 | half adder A4+B4, only its carry kept |
| 11 | full adder A5+B5+carry, only its carry kept |
| 12..17 | full adder C[k]+A[k+6]+B[k+6] (k = 0..5) |
| 12..18 | half adders: each sum plus the carry from the column below (column 12 takes the carry from column 11; column 18 takes C[6]) |
| 12..19 | 8-bit carry-propagate adder; C[7] enters column 19; the carry out of column 19 is dropped |

All merge cells are exact. The error comes from the sub-multipliers and from
the truncation. Because of that truncation, a product at or above 2^20 wraps.
The filter never reaches that range with ADMAA: its largest output is 254.

## The 6x6 sub-multipliers

Partial product `pp[i][j] = a[i] & b[j]` sits in column `i+j`. Both
sub-multipliers are Dadda trees that go down to two rows, followed by an exact
11-bit adder. The module sources list every cell by column, with the name the
cell's output has in the dot diagram (sf1, ch2, S3, G4, ...).

**ADMAA (`admaa_mul6`).** The column heights go 6 -> 4 -> 3 -> 2:

* stage 1: six approximate full adders and three approximate half adders on
  columns 2..7;
* stage 2: exact cells on columns 1..8;
* stage 3: exact cells on columns 2..9.

Of the 4096 operand pairs, 2670 give exact products. The mean absolute error
is 19.4 and the error range is -268..+64.

**ADMAPP (`admapp_mul6`).** In columns 3..7, each mirrored pair
`pp[i][j], pp[j][i]` becomes `p = pp[i][j] | pp[j][i]` and
`g = pp[i][j] & pp[j][i]`. This rewrite is exact, because `x + y = (x|y) + (x&y)`.
Then:

* The propagate terms of columns 4..7, and the pair `pp[5][3], pp[3][5]`, are
  reduced with approximate cells.
* The generate terms of each column are ORed into a single bit. Any carry they
  would produce is dropped.
* One exact stage of full adders brings every column down to two rows.

Of the 4096 operand pairs, 2256 give exact products. The mean absolute error
is 42.2 and the error range is -192..+400.

**Approximate cells.**

| cell | sum | carry | wrong for |
|---|---|---|---|
| `approx_half_adder` | `x1 \| x2` | `x1 & x2` | sum at 1,1 |
| `approx_full_adder` | `(x1 \| x2) ^ x3` | `(x1 \| x2) & x3` | sum at 1,1,0 and 1,1,1; carry at 1,1,0 |

The full adder is not symmetric: `x1` and `x2` are merged by the OR, and `x3`
stays separate. The input order in the RTL is part of the design.

## Interpretation choices

The source description gives the cell grouping of each tree as a dot diagram.
It does not say which of those cells are approximate. This RTL takes the one
assignment that reproduces the reference outputs for an all-255 window: 254
with ADMAA and 253 with ADMAPP. Of the eight stage combinations tried for
ADMAA, no other gives 254.

* In both 6x6 trees only the first reduction stage is approximate. Later
  stages and the final adder are exact.
* The merge in `adm12_trunc` is exact. Making its two-input cells approximate
  moves the ADMAPP result to 255.
* The diagram shows a lone "1" in product column 12. It is not treated as a
  constant bias: adding 1 there would move both results up by one.
* The ADMAPP generate merge is a plain OR. The diagram shows one G bit per
  column and no carries from the generate terms.
* The text speaks of four 6x6 multipliers. The diagrams mark the
  `al*bl` product as not generated. The RTL follows the diagrams and uses three.
* The exact adder chain of the window sum and every carry-propagate adder are
  written as `+`. No adder architecture is prescribed for them.

Only one reference output exists per variant. So these choices are
consistent with the reference data, but not uniquely proven by it.

## Not included

* The 16-bit exact and approximate Dadda multipliers the design is compared
  against (four 8x8 blocks with carry-select and ripple adders). They are
  baselines, not part of this design.
* The window source, meaning line buffers and image transfer. In the original
  system, images were fed from a host in co-simulation. The nine pixels are
  ports of `mean_filter`.
* Power, area and delay figures. They depend on the synthesis flow and
  library, and are not reproduced here.

## Files

| file | content |
|---|---|
| `rtl/adm_pkg.sv` | variant enum (`MULT_ADMAA`, `MULT_ADMAPP`), widths, `INV9_Q12 = 455` |
| `rtl/mean_filter.sv` | top: adder chain plus truncated multiplier; parameter `VARIANT` |
| `rtl/adm12_trunc.sv` | truncated 12x12 multiplier, parameter `VARIANT` |
| `rtl/admaa_mul6.sv`, `rtl/admapp_mul6.sv` | 6x6 approximate Dadda multipliers |
| `rtl/approx_half_adder.sv`, `rtl/approx_full_adder.sv` | approximate cells |
| `rtl/half_adder.sv`, `rtl/full_adder.sv` | exact cells |
| `tb/tb_*.sv` | self-checking testbenches: one per module except the exact cells, plus the image workload |

Every testbench prints `TB_RESULT checks=N failures=M`. Reference values
(checksums, error totals) were computed separately from the dot-diagram
netlists.

| testbench | what it covers |
|---|---|
| `tb_approx_half_adder`, `tb_approx_full_adder` | exhaustive truth tables and their error patterns |
| `tb_admaa_mul6`, `tb_admapp_mul6` | all 4096 operand pairs |
| `tb_adm12_trunc` | both variants over every possible window sum times 455, plus 1000 random operand pairs |
| `tb_mean_filter` | the default top, end to end: the all-255 window including the running sums s1..s7 (510 ... 2040), single-pixel windows and 20000 random windows. It also counts how often the approximation changes the result, how often it leaves it exact, and how often the 455/4096 constant rounds below s/9 |
| `tb_mean_filter_image` | both variants side by side on a generated 256x256 noisy image (ramp, inverted square, roughly Gaussian noise with sigma of about 18). It reports MSE and PSNR |

Image results:

| filter | MSE vs clean image | PSNR | MSE vs exact filter |
|---|---|---|---|
| exact | 47.86 | 31.33 dB | 0 |
| ADMAA | 50.50 | 31.10 dB | 3.91 |
| ADMAPP | 96.27 | 28.30 dB | 48.1 |

To run a testbench with Verilator 5:

```
verilator --binary --timing -Irtl rtl/adm_pkg.sv tb/tb_mean_filter.sv \
          --top-module tb_mean_filter -Mdir obj && obj/Vtb_mean_filter
```

To switch the filter to the other sub-multiplier, instantiate it as
`mean_filter #(.VARIANT(adm_pkg::MULT_ADMAPP))`.
