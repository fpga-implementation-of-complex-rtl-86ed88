# Signed complex multiplier on Urdhva Tiryakbhyam (Vedic) multipliers

This is a purely combinational multiplier for complex numbers whose real and imaginary
parts are two's-complement integers:

    (a + jc) · (b + jd) = (ab − cd) + j(ad + bc)

It uses four real multipliers and two adders. Each real multiplier is a *signed Vedic
multiplier*. It turns both operands into magnitudes and multiplies them on an unsigned
"vertically and crosswise" (Urdhva Tiryakbhyam) array, built as 2×2 → 4×4 → 8×8. It then
restores the sign. Each of the two adders is a plain ripple-carry adder with one extra
gate. That gate turns the adder's carry out into the correct sign bit of the widened
result.

With the default width (`N = 4`) the four parts are 4-bit signed numbers (−8 … 7). The
four partial products are 8 bits wide. The real and imaginary results are 9-bit signed
numbers. Unsigned inputs need no separate mode: pass them with a zero sign bit
(values 0 … 7 at `N = 4`).

Example: (3 − j3)(2 + j7) = 27 + j15, and (1 + j3)(5 + j7) = −16 + j22.

## Top level: `complex_mult`

| port    | dir | width  | meaning                                 |
|---------|-----|--------|-----------------------------------------|
| `rp_i1` | in  | N      | a, real part of the first operand       |
| `ip_i1` | in  | N      | c, imaginary part of the first operand  |
| `rp_i2` | in  | N      | b, real part of the second operand      |
| `ip_i2` | in  | N      | d, imaginary part of the second operand |
| `rp_op` | out | 2N+1   | ab − cd                                 |
| `ip_op` | out | 2N+1   | ad + bc                                 |

The design has one parameter, `N`, the width of the operand parts. It works for
2 ≤ N ≤ 8. At N = 5 … 8 the signed multipliers use the 8×8 Vedic core, and the results
are 17 bits wide at N = 8.

The design has no clock, no reset and no registers. Outputs follow inputs after the
combinational delay. The longest path runs through four stages: operand negation, the
Vedic core, product negation, and the final ripple-carry adder. To pipeline the design,
register the ports, or register the four products between the multipliers and the adders.

```
 rp_i1 ─┬──────────► signed_vedic_mult ─ ab ─┐
 rp_i2 ─┼─┬────────► (a·b)                   ├─► real_part_unit ─► rp_op
 ip_i1 ─┼─┼─┬──────► signed_vedic_mult ─ cd ─┘    (ab − cd)
 ip_i2 ─┼─┼─┼─┬────► (c·d)
        │ │ │ │
        └─┼─┼─┴────► signed_vedic_mult ─ ad ─┐
          │ │        (a·d)                   ├─► imag_part_unit ─► ip_op
          └─┴──────► signed_vedic_mult ─ bc ─┘    (ad + bc)
                     (b·c)
```

## Recovering the sign bit after the 2N-bit adder

This part of the design is the least obvious. The two products entering each adder are
2N-bit signed numbers. Their sum or difference needs 2N+1 bits. The adder is an unsigned
2N-bit ripple-carry adder. Its 2N sum bits are already the low bits of the correct
result. Its carry out, however, is **not** the sign of the widened result.

For two sign-extended operands X and Y, the correct top bit is

    top = carry_out XOR X[msb] XOR Y[msb]

Each unit computes this from the sign bits of the two products, which the design calls s1
and s2:

* **Imaginary part** (`imag_part_unit`, A = ad, B = bc). The adder computes A + B with a
  carry in of 0. Let s2 = A[msb] XOR B[msb]. When s2 = 1 (the products differ in sign),
  the carry out is inverted. Otherwise it is used as it is.
* **Real part** (`real_part_unit`, A = ab, B = cd). The adder subtracts by adding the two's
  complement of B: it receives A, the bit-inverted B, and a carry in of 1. The second
  operand is then ~B, whose sign bit is the inverse of B's. Let s1 = A[msb] XOR B[msb].
  When s1 = **0** (the products have the same sign), the carry out is inverted.
  Otherwise it is used as it is.

Both rules are exact for every pair of 2N-bit operands. The testbenches check all 65536
pairs at 8 bits.

Design note: the two's complement of B must reach the adder as "invert B, carry in 1". It
must not be a separately negated 8-bit value. If −B were formed first, B = 0 would give
−B = 0, whose sign bit is not the inverse of B's. The s1 rule would then produce a wrong
sign, for example 5 − 0 = −251. Folding the +1 into the adder's carry in avoids this and
costs nothing.

## The unsigned Vedic core: `vedic_2x2`, `vedic_4x4`, `vedic_8x8`, `vedic_combine`

**`vedic_2x2`** is the leaf. Four AND gates form the vertical products a0·b0 and a1·b1
and the crosswise products a1·b0 and a0·b1. One half adder adds the two crosswise terms,
and a second adds that carry to a1·b1. The result is the 4-bit product.

Each larger W×W multiplier splits its operands into halves of H = W/2 bits. Four H×H
multipliers compute the vertical products q0 = aL·bL and q3 = aH·bH, and the crosswise
products q1 = aH·bL and q2 = aL·bH. **`vedic_combine`** then adds them with three W-bit
ripple-carry adders:

    s1 = q1 + q2                 crosswise sum
    s2 = s1 + (q0 >> H)          add the upper half of q0
    s3 = q3 + {c, s2[W-1:H]}     c = carry(s1) OR carry(s2)
    p  = { s3[W-1:0], s2[H-1:0], q0[H-1:0] }

q1 + q2 + (q0 >> H) is always below 2^(W+1), so the first two adders never both carry.
That is why a single OR gate can merge their carries. The third adder's carry out is
always 0, because the product fits in 2W bits. That one unused bit draws the only lint
warning in the design.

`vedic_4x4` is four 2×2 leaves plus a 4-bit combine stage. `vedic_8x8` is four 4×4
blocks plus an 8-bit combine stage. All three are exhaustively tested.

## Signed multiplication: `signed_vedic_mult`

The signed multiplier works in three steps:

1. Each operand whose sign bit is set is negated by `twos_complement`, which gives its
   magnitude as an unsigned N-bit number. The most negative value −2^(N−1) correctly
   becomes 2^(N−1).
2. The magnitudes are zero-extended to the next power of two (2, 4 or 8) and multiplied on
   the matching Vedic core.
3. If the XOR of the two sign bits is 1, the 2N-bit product is negated. Otherwise it is
   passed through.

The result is the full 2N-bit two's-complement product. This includes (−2^(N−1))², and a
zero product stays zero even when one operand is negative.

`twos_complement` computes y = en ? −x : x. It XORs every bit with `en` and then
increments by `en` through a chain of half-adder cells.

`ripple_carry_adder` is W full adders in a chain, with a carry in and a (W+1)-bit result
whose top bit is the carry out. `half_adder` and `full_adder` are the one-bit cells.

`vedic_pkg` holds `vedic_core_width()`, which picks the core width for a given N.

## How this design departs from the usual description of the method

* **Magnitude of the most negative operand.** A common description of the signed Vedic
  multiplier takes the two's complement of only the N−1 bits below the sign. That turns
  −2^(N−1) into 0. This design negates the whole N-bit operand. All other values give
  the same magnitude either way.
* **Zero products.** The same description attaches the sign bit in front of the
  complemented unsigned product. For 0 × (negative) that gives the most negative number
  instead of 0. Here the 2N-bit product is negated as a whole, so zero stays zero.
* **Product width.** Products are 2N bits (8 bits at N = 4), matching the 8-bit adders.
  They are not 2N−1 bits (sign plus (N−1)+(N−1) magnitude bits).
* **Subtraction** uses the adder's carry in, as explained above.
* **Adder count in the 4×4 and 8×8 blocks.** Each level uses three adders of the full
  partial-product width, plus an OR gate for the carries.
* **Four multipliers, not three.** The structure is the four-multiplier, two-adder form.
  The three-multiplier Gauss rearrangement is not used.
* **Width limit.** Widths above 8 would need a 16×16 or larger core. You can add one as
  four 8×8 blocks plus `vedic_combine #(.W(16))`, then extend the selection in
  `signed_vedic_mult`.

A radix-2 Booth version of the same complex multiplier is a well-known alternative for
comparison. It is not included.

## Verification

Every block has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<m>` and includes a watchdog.

| testbench               | what it covers |
|-------------------------|----------------|
| `tb_complex_mult`       | Top at default N = 4, no parameter overridden. Runs all 2^16 combinations of a, b, c, d, plus the two examples above. Counts and requires each mechanism: negated operands and products, zero product with a negative operand, most negative operand, both MSB rules in both states, a result that needs the ninth bit (only (−8−j8)·(−8−j8)), and unsigned operands. |
| `tb_complex_mult_n8`    | Top at N = 8 (8×8 cores, 17-bit results). Runs all corner combinations of {0, ±1, 127, −127, −128} plus 200 000 random operands. |
| `tb_signed_vedic_mult`  | Exhaustive at N = 8, 5, 4 and 2, plus 15 × (−12) = −180 at N = 5 and 6 × (−7) = −42 at N = 4. |
| `tb_real_part_unit`, `tb_imag_part_unit` | All 8-bit operand pairs, plus a 4-bit instance. Both correction states must occur. |
| `tb_vedic_8x8`, `tb_vedic_4x4`, `tb_vedic_2x2`, `tb_vedic_combine` | Exhaustive. |
| `tb_ripple_carry_adder`, `tb_twos_complement` | Exhaustive at 8 bits, plus a 4-bit instance. |

References are computed with integer arithmetic in the testbench, not taken from the RTL.
Because the design is combinational, each check comes one time step after the inputs change, with
no clock cycles of latency.

The testbenches were run with Verilator 5. The RTL also elaborates under the slang front
end of Yosys. At N = 4, coarse synthesis gives about 555 word-level cells for the top and
no flip-flops.

## Running it

```
verilator --binary --timing --assert -Irtl rtl/vedic_pkg.sv tb/tb_complex_mult.sv \
          --top-module tb_complex_mult -Mdir obj_tb
./obj_tb/Vtb_complex_mult
```

Replace `tb_complex_mult` with any other testbench name. Verilator finds the modules in
`rtl/` through `-Irtl`, one module per file, each named after its file. To lint a module:
`verilator --lint-only -Wall -Irtl rtl/vedic_pkg.sv rtl/<module>.sv --top-module <module>`.
