# Vedic (Urdhava Tiryakbhyam) multipliers and a 2x2 matrix multiplier

This design multiplies unsigned integers by the *Urdhava Tiryakbhyam*
("vertically and crosswise") rule of Vedic arithmetic. It also uses those
multipliers for a 2x2 matrix product, the multiply-accumulate kernel of many
DSP algorithms. All of it is combinational. There is no clock, reset or
handshake: outputs follow inputs after the propagation delay.

The idea is the way a person multiplies by hand in columns. Column *k* of the
product collects every digit product `a[i]*b[j]` with `i + j = k`, all at once,
and adds the carry from column *k-1*. The lowest digit of that sum is digit
*k* of the result. Everything above it is the carry into the next column. In
binary, the digit products are AND gates, so all of them are formed in
parallel. The remaining delay is one adder per column, with a carry between
neighbouring columns that can be several bits wide.

## Blocks

| Module | What it is |
|---|---|
| `vedic_ut_mul` | WIDTH x WIDTH Urdhava Tiryakbhyam multiplier, bit-level columns (default 4x4) |
| `vedic_combine` | Joins four half-width products into a full product (helper) |
| `vedic_mul8` | 8x8 multiplier: four 4x4 `vedic_ut_mul` + `vedic_combine` |
| `vedic_mul16` | 16x16 multiplier: four `vedic_mul8` + `vedic_combine` |
| `vedic_matmul2x2` | 2x2 matrix product of 8-bit elements, eight `vedic_mul8` |
| `vedic_pkg` | Element, product and result widths and types |
| `vedic_dsp_top` | The matrix unit and the 16x16 multiplier side by side |

## The 4x4 column multiplier (`vedic_ut_mul`)

For `a = a3..a0` and `b = b3..b0`, the columns are

```
r0     = a0b0
c1 r1  = a1b0 + a0b1
c2 r2  = c1 + a2b0 + a1b1 + a0b2
c3 r3  = c2 + a3b0 + a2b1 + a1b2 + a0b3
c4 r4  = c3 + a3b1 + a2b2 + a1b3
c5 r5  = c4 + a3b2 + a2b3
c6 r6  = c5 + a3b3
p      = {c6, r6, r5, r4, r3, r2, r1, r0}
```

Here `ck rk` means the column's sum: `rk` is its lowest bit and `ck` the
remaining upper bits. The carries are not single bits. For 15 x 15, the carry
into column 4 is 3 (binary 11). The module loops over columns in one
`always_comb`. It keeps the column sums in `col_sum[k]` and the carries in
`carry[k]` (`carry[k]` is the carry *into* column k). Both are 4 bits wide
for WIDTH = 4, since `$clog2(2*WIDTH)+1` bits are always enough. WIDTH is a
parameter, and the same loop builds an n x n multiplier for any n.

## Building wider multipliers (`vedic_combine`, `vedic_mul8`, `vedic_mul16`)

An 8-bit operand is split into nibbles, `A = {X1, X0}` and `B = {Y1, Y0}`.
Four 4x4 multipliers run in parallel:

```
C = X0*Y0          (vertical, low)
D = X1*Y0 + X0*Y1  (crosswise)
E = X1*Y1          (vertical, high)
```

`vedic_combine` then applies the same column rule with 4-bit digits in
place of bits:

```
p[3:0]   = C[3:0]
{k, p[7:4]} = D + C[7:4]          k is the carry, up to 5 bits
p[15:8]  = E + k
```

The 16x16 multiplier repeats this one level up, with 8-bit halves and four
`vedic_mul8`. It therefore contains sixteen 4x4 column multipliers.

The nibble split and the C, D and E terms are the published algorithm. The
digit-wise way the three terms are added is this design's reading of it. So
is building the 16-bit unit from four 8-bit units. The source gives the 16-bit
multiplier's size and speed but not its structure.

## 2x2 matrix product (`vedic_matmul2x2`)

`c[i][j] = a[i][0]*b[0][j] + a[i][1]*b[1][j]`. Each of the eight element
products has its own `vedic_mul8`, and four adders form the sums. All arrays
are indexed `[row][column]`.

The following are this design's own choices:
- Elements are 8 bits wide, the width of the 8x8 multiplier. The source does
  not state an element width.
- Results are 17 bits wide. This is the exact range of a sum of two 16-bit
  products, whose maximum is 2 x 255 x 255 = 130050.
- There is one multiplier per element product, with no sharing or
  time-multiplexing.

## Top level (`vedic_dsp_top`)

| Port | Dir | Type | Meaning |
|---|---|---|---|
| `mat_a`, `mat_b` | in | `elem_mat_t`, 2x2 of 8 bits | matrix operands |
| `mat_c` | out | `acc_mat_t`, 2x2 of 17 bits | `mat_a x mat_b` |
| `mul_a`, `mul_b` | in | 16 bits | operands of the 16x16 multiplier |
| `mul_p` | out | 32 bits | `mul_a * mul_b` |

The two units share nothing.

## How far it can be trusted

- `vedic_ut_mul` (4x4) is checked exhaustively: all 256 pairs. The test also
  checks every inter-column carry against an independent formula. The carry
  into column k equals the place-value sum of all lower-column bit products,
  shifted right by k.
- The same module at other widths, with no nibble split, is checked too.
  `tb_vedic_ut_mul_nxn` runs it at 3 and 8 bits exhaustively, and at 16 bits
  on 50,000 random pairs.
- `vedic_mul8` is checked exhaustively: all 65536 pairs. This includes the
  worked example 8 x 4 = 32 (`00001000 x 00000100 = 0000000000100000`) and
  its intermediate products.
- `vedic_mul16` is checked on corner cases, all single-bit operand pairs,
  325 x 738 = 239850 and 200,000 random pairs.
- `vedic_matmul2x2` is checked on a hand-worked case, the all-255 case, the
  identity and 20,000 random matrix pairs.
- The top-level test runs both units together on 20,000 random steps. It
  counts four mechanisms and fails if any of them never occurs:
  - a multi-bit column carry,
  - a crosswise sum overflowing at the 8-bit level,
  - the same overflow at the 16-bit level,
  - a matrix entry above 16 bits.

Each testbench fails on a deliberately broken copy of its module. The
breakages include a carry cut to one bit, a wrong operand nibble or byte, and
a sum truncated to 16 bits.

The design is written for function, not for a particular timing target. No
gate-level delay or FPGA resource figures were reproduced. Synthesis tools
will restructure the column adders as they see fit.

`vedic_ut_mul` and `vedic_combine` also hold immediate assertions. They check
that the last column's carry is a single bit and that the high half of a
combined product never overflows. Both hold for any operands. They catch
mistakes made when the modules are edited.

## Departures from the original description

- Only the proposed Vedic multiplier is implemented. The array and Booth
  multipliers that it was compared against are not.
- All arithmetic is unsigned. Signed operands were never discussed.
- The original 2x2 matrix implementation reported using the FPGA's hard
  18x18 multipliers. This version uses only the Vedic multipliers.

## Simulating

Each testbench in `tb/` prints `TB_RESULT checks=N failures=M` and stops. For
example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/vedic_pkg.sv tb/tb_vedic_dsp_top.sv --top-module tb_vedic_dsp_top
./obj_dir/Vtb_vedic_dsp_top
```

Replace `tb_vedic_dsp_top` with `tb_vedic_ut_mul`, `tb_vedic_ut_mul_nxn`,
`tb_vedic_mul8`, `tb_vedic_mul16` or `tb_vedic_matmul2x2` to test one block. Every run takes
well under a second of simulation time. `tb_vedic_ut_mul` and `tb_vedic_mul8`
read internal signals (`carry`, `pp_c` and similar) by hierarchical name.
Keep those names if you change the modules.

To change the matrix element width, edit `ELEM_W` in `vedic_pkg`. The matrix
unit instantiates `vedic_mul8` directly, so a width other than 8 also needs a
matching multiplier there.
