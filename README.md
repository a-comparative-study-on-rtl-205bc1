# Radix-4 8×8 Booth multiplier with ripple-carry and square-root carry-select adders

This is a signed 8×8 multiplier that uses radix-4 Booth recoding, written as purely
combinational SystemVerilog. Radix-4 recoding turns the 8-bit multiplier into four digits in
{−2, −1, 0, +1, +2}, so only four partial-product steps are needed instead of eight. The
multiplier is the shift-and-add Booth algorithm unrolled into four chained stages. Every stage
after the first contains a 9-bit adder/subtractor, and the critical path runs through those
adders. The design therefore comes in two variants that differ only in that adder:

| variant | adder inside every adder/subtractor | output of `booth_mult_top` |
|---|---|---|
| multiplier 1 | ripple-carry adder (`rca`) | `p_rca` |
| multiplier 2 | modified square-root carry-select adder (`msqrt_csla`), groups 2+3+4 | `p_csla` |

Both variants compute the same product. The carry-select variant is the faster one. Published
45 nm synthesis results for this architecture put its critical path at about half that of the
ripple-carry variant (0.84 ns against 1.64 ns), for roughly 40 % more area and power. The top
module holds both variants on shared inputs, so they can be compared in one netlist.

## How the multiplication is unrolled

Let M = `a` (the multiplicand) and Q = `b` (the multiplier), both two's complement, with
Q[−1] = 0. The sequential radix-4 Booth algorithm keeps a running value A, which starts at 0.
Step i does three things:

1. It recodes the triplet {Q[2i+1], Q[2i], Q[2i−1]} into a digit d (`booth_encoder`):

   | triplet | 000 | 001 | 010 | 011 | 100 | 101 | 110 | 111 |
   |---|---|---|---|---|---|---|---|---|
   | d | 0 | +1 | +1 | +2 | −2 | −1 | −1 | 0 |

2. It forms A + d·M.
3. It shifts the result right arithmetically by two. The two bits shifted out are final product
   bits.

In this design every step is its own block of logic:

```
 a ─┬──────────────┬──────────────┬──────────────┐
    │              │              │              │
 b[1:0]         b[3:1]         b[5:3]         b[7:5]
    ▼              ▼              ▼              ▼
 ┌────────┐ A1 ┌────────┐ A2 ┌────────┐ A3 ┌────────┐
 │ stage1 ├───►│ stage  ├───►│ stage  ├───►│ stage  │
 └───┬────┘    └───┬────┘    └───┬────┘    └───┬────┘
   p[1:0]        p[3:2]        p[5:4]       p[15:6]  (full result of the last stage)
```

- **Stage 1** (`booth_stage1`) needs no adder, because A = 0. A 2:1 multiplexer picks M or 2M,
  giving X. The two's complement converter `b2c` forms −X without a carry chain: it copies bits
  up to and including the lowest 1 and inverts every bit above it. A 3:1 multiplexer then keeps
  0, X or −X. The third bit of this stage's triplet is always 0, so the digit +2 cannot occur
  here.
- **Stages 2–4** (`booth_stage`) each hold their own encoder and the same 2:1 multiplexer for X.
  The adder/subtractor (`booth_addsub`) has two adders side by side. One forms A + X with
  carry-in 0. The other forms A + ~X + 1 = A − X with carry-in 1. A 3:1 multiplexer keeps A,
  A + X or A − X. Both results are computed before the digit is known, so the encoder is off the
  adder's path.
- **Product bits.** Stages 1–3 each give two low product bits. The last stage's exact 10-bit
  result gives p[15:6].

## The tenth bit

This is the one detail that is easy to get wrong. All stage datapaths are 9 bits wide (N+1),
which is enough to hold 2M. Some intermediate results still do not fit in 9 signed bits:

- In stage 1, −2·(−128) = +256.
- In later stages, A + 2M can exceed 255. A value up to about ±85 is left after a shift, and
  ±256 is added to it.

If such a result were truncated to 9 bits, its sign would be wrong and the arithmetic shift
would corrupt every later stage. This design keeps the adders 9 bits wide but adds one exact sign
bit to every stage result:

- **Adders.** The sign of a + b for sign-extended operands is `a[8] ^ b[8] ^ carry_out`. This
  uses the carry-out that the 9-bit adder produces anyway.
- **Stage 1.** `b2c` reports the sign of −x directly. That sign is 1 exactly when x > 0.

The (N+2)-bit stage result, shifted right by two, always fits in N+1 bits again. Of the 65 536
operand pairs, 85 pass through a stage result that needs the tenth bit. The end-to-end test
counts them.

## The modified square-root carry-select adder

`msqrt_csla` cuts the word into groups that grow towards the MSB: 2, 3, 4 for the 9-bit adders
inside the multiplier, and 2, 2, 3, 4, 5 for the 16-bit stand-alone adder. Each group
(`csla_group`) has four parts:

1. **Propagate/generate:** p = a ^ b and g = a & b.
2. **Two carry chains,** written in NAND–NAND form. c0 assumes the group's carry-in is 0. c1
   assumes it is 1, so it starts from a | b. Both chains run while the lower groups are still
   working.
3. **Carry select** with one AND–NOR gate per bit: nc = ~(c0 | (c1 & cin)). This gives the real
   carry in inverted form. It is correct because c1 ≥ c0 bit for bit.
4. **Sum** as XNOR(p, nc of the bit below).

The word carry therefore passes one AND–NOR gate per group instead of one full adder per bit.
The lowest group uses the same cell as the others, with its select driven by the adder's
carry-in.

`rca` is the plain alternative: a chain of `full_adder` cells.

## Modules

| file | role |
|---|---|
| `booth_pkg.sv` | digit-select struct (`two`, `op`) and the adder-type enum |
| `booth_mult_top.sv` | top: both variants on shared `a`, `b` |
| `radix4_booth_mult.sv` | one N×N multiplier; `ADDER` picks the variant |
| `booth_stage1.sv`, `booth_stage.sv` | first stage and later stages |
| `booth_encoder.sv` | radix-4 recoder |
| `b2c.sv` | adder-free negation with exact sign |
| `booth_addsub.sv` | paired adders for A + X and A − X with exact sign |
| `rca.sv`, `full_adder.sv` | ripple-carry adder |
| `msqrt_csla.sv`, `csla_group.sv` | modified square-root carry-select adder |

Parameters:

- `N` is the operand width, 8 by default. It must be even and at least 4.
- `ADDER` is `ADDER_RCA` or `ADDER_MSQRT_CSLA`; the default is the carry-select adder.
- `CSLA_NGROUPS` and `CSLA_GSIZE` give the group split of the N+1-bit adders, by default 3 and
  `'{2, 3, 4}`. The sizes must add up to N+1, and each group needs at least 2 bits. For example,
  N = 4 uses `'{2, 3}`.
- `msqrt_csla` has `WIDTH`, `NGROUPS` and `GSIZE` (default 16 bits, `'{2, 2, 3, 4, 5}`).

There is no clock, reset or register anywhere. The product is valid one combinational delay
after the operands change. Pipelining, if wanted, is left to the user.

## Simulating

Every testbench in `tb/` is self-checking and prints `TB_RESULT checks=… failures=…`. With
Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  rtl/booth_pkg.sv tb/tb_booth_mult_top.sv --top-module tb_booth_mult_top --Mdir obj -o sim
./obj/sim
```

Replace the testbench name to run the others. None takes more than a fraction of a second.

| testbench | what it covers |
|---|---|
| `tb_booth_mult_top` | all 65 536 signed operand pairs through both variants against a·b; counts every Booth digit in every stage and the results that need the tenth bit |
| `tb_radix4_booth_mult` | all pairs for both variants, plus a 4×4 instance |
| `tb_booth_stage` | every multiplicand × triplet × 9-bit running value |
| `tb_booth_stage1`, `tb_booth_encoder`, `tb_b2c` | exhaustive |
| `tb_booth_addsub` | all 9-bit operand pairs, both adder types, exact 10-bit results |
| `tb_rca`, `tb_msqrt_csla` | 16-bit corner cases and 100 000 random pairs with both carry-ins; `tb_msqrt_csla` also checks the 9-bit 2/3/4 adder exhaustively |

## What comes from the original design and what does not

These parts follow the published description:

- four parallel stages;
- a first stage built from a 2:1 multiplexer, a 3:1 multiplexer, an encoder and a two's
  complement converter;
- later stages built from an encoder, a 9-bit adder/subtractor with two adders (carry-in 0 and
  1) and a 3:1 multiplexer;
- two product bits retired per stage;
- the 2/3/4 group split of the 9-bit adder;
- the five-part structure of the carry-select adder.

These are this design's own choices:

- **The exact sign bit** (previous section). It is not described, but without it some operands
  give wrong products.
- **The M/2M multiplexer in stages 2–4.** The description lists a 2:1 multiplexer for stage 1
  only.
- **The encoding of the digit-select signals.**
- **The adder-free copy-then-invert circuit for `b2c`.** Only its function is given.
- **The 16-bit group split.** 2, 2, 3, 4, 5 is the usual square-root split.
- **The exact gate equations inside a carry-select group,** taken from the block names.
- **The choice of the full 16-bit signed product as output.**

The gate-level and transistor-level results quoted above (delay, power, area) come from a 45 nm
standard-cell flow. This RTL does not reproduce them. Its synthesized structure depends on the
tool, which may restructure the NAND–NAND and AND–NOR forms.
