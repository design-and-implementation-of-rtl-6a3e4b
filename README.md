# Vedic complex multiplier (32-bit, combinational)

This design multiplies two complex numbers with 32-bit unsigned real and
imaginary parts:

    (re_a + j·im_a) · (re_b + j·im_b) = re_root + j·im_root
    re_root = re_a·re_b − im_a·im_b
    im_root = re_a·im_b + re_b·im_a

It uses the direct four-product form: four real multiplications, one addition
and one subtraction. Each real multiplier follows the Vedic *Urdhva
Tiryakbhyam* ("vertically and crosswise") scheme. A 32×32 product is built from
four 16×16 products, and three ripple carry adders add them up. Inside each
16×16 multiplier, every column of the product adds up its crosswise bit
products plus the carry from the column before. The whole datapath is
combinational. It has no clock, no registers and no handshake: the outputs
follow the inputs after one propagation delay.

The operand width is a parameter, `N`. It defaults to 32. `N = 8` and
`N = 16` give the 8-bit and 16-bit versions of the same structure.

## Number format

| port      | width  | meaning |
|-----------|--------|---------|
| `re_a`, `im_a`, `re_b`, `im_b` | N | unsigned operands |
| `re_root` | 2N+1 | `re_a·re_b − im_a·im_b` in two's complement; bit 2N is the sign |
| `im_root` | 2N+1 | `re_a·im_b + re_b·im_a`, unsigned and exact |

At N = 32 the block has 4·32 + 2·65 = 258 I/O bits. Every product is an
unsigned 2N-bit value. The imaginary sum needs one more bit. The real
difference lies between −(2^2N − 1) and +(2^2N − 1), so 2N+1 bits in two's
complement hold it exactly. For example, at N = 8 the operands
`re_a=08 im_a=55 re_b=aa im_b=33` give `re_root = 1f461`, which is −2975 in 17
bits, and `im_root = 03a0a`.

The operands are unsigned. To multiply signed numbers, you would need a
signed-product stage, which this design does not have.

## Structure

```
mul_complx32x32 (N)
├── u_mul4  vedic_mul32  re_a·re_b ─┐
├── u_mul3  vedic_mul32  im_a·im_b ─┴─ u_adder2  add_sub (SUB=1) → re_root
├── u_mul2  vedic_mul32  im_a·re_b ─┐
├── u_mul1  vedic_mul32  re_a·im_b ─┴─ u_adder1  add_sub (SUB=0) → im_root
│
vedic_mul32 (N)
├── u_mul1..u_mul4  urdhva_mul (N/2)
└── u_rca1..u_rca3  rca (N)  ── full_adder × N
```

## The 32×32 multiplier (`vedic_mul32`)

This is the part that takes the most care. Split the operands into halves:
`x = {XH, XL}` and `y = {YH, YL}`, each half being N/2 = 16 bits. Then:

    x·y = XL·YL + (XL·YH + XH·YL)·2^16 + XH·YH·2^32
        =   m1  + (  m2  +   m3 )·2^16 +   m4 ·2^32

Four `urdhva_mul` instances produce m1 to m4, each 32 bits wide. Three 32-bit
ripple carry adders then align and add them:

| adder | adds | result used as |
|-------|------|----------------|
| RCA1 | `m2 + m3` | `s1` (32 bits) and carry `ca1` (weight 2^48) |
| RCA2 | `s1 + {16'b0, m1[31:16]}` | `s[31:16] = s2[15:0]`; `s2[31:16]` goes on; carry `ca2` (weight 2^48) |
| RCA3 | `m4 + {15'b0, ca1 \| ca2, s2[31:16]}` | `s[63:32]` |

The low 16 bits of the product, `s[15:0]`, are `m1[15:0]` taken directly.

The carries from the middle adders need care. Both `ca1` and `ca2` weigh
2^48, which is bit 16 of RCA3's second operand. In the best-known form of this
structure, only `ca1` goes into RCA3 and `ca2` is left as an unused output.
That form gives a wrong product whenever RCA2 carries. One example is
`x = ffffffff`, `y = 0002ffff`. There, `m2 + m3 = ffffffff`, so there is no
`ca1`, but adding `m1[31:16] = fffe` carries out of RCA2.

The two carries can never both be 1. When `ca1 = 1`, `s1` is at most
2^32 − 2^18 + 2, and adding a 16-bit value to that cannot carry again. So one
OR gate can merge them into that single bit, and the product is exact for all
operand pairs. RCA3's own carry out is always 0 because the product fits in 64
bits. A deferred assertion checks this instead of bringing the carry out as a
port.

`vedic_mul32` accepts any even `N ≥ 4` and uses `urdhva_mul #(N/2)` as its
quarter multipliers. That is how the 8-bit and 16-bit versions are built.

## The 16×16 vertically-and-crosswise multiplier (`urdhva_mul`)

Column k of the product (k = 0 … 2N−2) is the sum of every bit pair
`a[i] & b[k−i]` (the "crosswise" products) plus the carry left over from
column k−1:

- product bit k is the low bit of that column sum;
- the rest of the sum, shifted right by one, is the carry into column k+1;
- the carry left after the last column is product bit 2N−1.

A column has at most N bit products and a carry of at most N, so the
column sums are `clog2(N)+2` bits wide. The module is a single `always_comb`
with two loops, which synthesis unrolls into an adder network. Other
published Vedic multipliers build the 16×16 block recursively from 2×2
cells. That would give the same function with a different structure.

## Adders

- `rca` is an N-bit chain of `full_adder` cells, so `{cout, sum} = a + b + cin`.
  Its carry-in is tied to 0 inside the multiplier.
- `add_sub` wraps an `rca` of W = 2N bits.
  - With `SUB = 0` (Adder1, imaginary part), the carry out becomes bit W of the result.
  - With `SUB = 1` (Adder2, real part), it computes `a + ~b + 1`. The sign bit is
    the inverted carry out, which is 1 exactly when `a < b`.

## Timing and cost

The design is combinational. The longest path runs through a 16×16 column
chain, then three 32-bit ripple adders in series inside `vedic_mul32`, then
the 64-bit ripple adder of `add_sub`. Ripple adders were chosen for simplicity
and match the structure described for this multiplier. To raise throughput,
add pipeline registers at the product boundary.

A reference FPGA implementation of this architecture has been reported with
these figures:

| N  | delay | power | LUTs  |
|----|-------|-------|-------|
| 8  | 10 ns | 47 mW | 352 |
| 16 | 17.2 ns | 52 mW | 1,514 |
| 32 | 29.84 ns | 62 mW | 7,874 |

These figures come from that implementation, not from this RTL.

## What is this design's own choice

- The order of the pair products on `u_mul1`/`u_mul2` (`re_a·im_b`, `im_a·re_b`).
- The bit-level column form of the 16×16 multiplier.
- Merging RCA2's carry into RCA3 (see above).
- Two's complement subtraction on a ripple carry adder, and the carry-in port on `rca`.
- Fully combinational, with no registers or reset.

## Files

| file | contents |
|------|----------|
| `rtl/mul_complx32x32.sv` | top: four multipliers, Adder1, Adder2 |
| `rtl/vedic_mul32.sv` | N×N multiplier from four N/2 multipliers and three RCAs |
| `rtl/urdhva_mul.sv` | vertically-and-crosswise N×N multiplier |
| `rtl/add_sub.sv` | adder/subtractor with a 2N+1-bit result |
| `rtl/rca.sv`, `rtl/full_adder.sv` | ripple carry adder and its cell |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_mul_complx32x32_full.sv` | top at its default N = 32 |

## Simulation

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and ends. For example:

```
verilator --binary --timing --assert -Irtl tb/tb_mul_complx32x32.sv \
          --top-module tb_mul_complx32x32 -Mdir obj && ./obj/Vtb_mul_complx32x32
```

What each testbench checks:

- **Reference model.** All testbenches compare the RTL against the simulator's
  own `*`, `+` and `-` operators.
- **`tb_mul_complx32x32`** runs the top at N = 8, 16 and 32.
  - It applies published reference operand sets with their published results
    (six at 8 bits, four at 16 bits, two at 32 bits), plus 1,000 random
    operand sets per width.
  - It counts how often each datapath case occurs and fails if any never
    happens: a negative and a non-negative real part, a carry out of RCA1 and
    one out of RCA2, and an imaginary sum that reaches bit 2N.
- **`tb_vedic_mul32`** runs the 32-bit multiplier on corner cases, including the
  RCA2-carry case, and on random operands. It also runs an 8-bit build on all
  65,536 operand pairs.
- **`tb_urdhva_mul`** and **`tb_rca`** also run every input of a 4-bit build.
- **`tb_mul_complx32x32_full`** runs the top at its default parameters.
