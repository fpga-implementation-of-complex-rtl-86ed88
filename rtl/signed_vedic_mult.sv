// signed_vedic_mult: N x N two's-complement multiplier built around an
// unsigned Vedic core, by sign-magnitude conversion.
//
// The operands' sign bits select a two's-complement negation of each
// operand, giving its magnitude as an unsigned N-bit number (the most
// negative value -2^(N-1) correctly becomes 2^(N-1)). The magnitudes are
// zero-extended to the next power-of-two width VW (2, 4 or 8, so N <= 8)
// and multiplied by the matching unsigned Vedic core (2x2, 4x4 or 8x8).
// The product's sign is the XOR of the operand signs; when it is 1 the
// unsigned product is negated, otherwise it is passed on. The result is the
// 2N-bit two's-complement product, which holds every product of two N-bit
// operands including (-2^(N-1))^2. A zero product stays zero whatever the
// sign. With N = 4 each product is 8 bits, the width the complex
// multiplier's adders take.
//
// Interface: a, b signed N-bit; p signed 2N-bit product.
// Timing: purely combinational: negate, Vedic core, negate.
module signed_vedic_mult
  import vedic_pkg::*;
#(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned VW = vedic_core_width(N);

  logic [N-1:0]    mag_a, mag_b;
  logic [VW-1:0]   core_a, core_b;
  logic [2*VW-1:0] core_p;
  logic            neg;

  twos_complement #(.W(N)) u_abs_a (.x(a), .en(a[N-1]), .y(mag_a));
  twos_complement #(.W(N)) u_abs_b (.x(b), .en(b[N-1]), .y(mag_b));

  assign core_a = VW'(mag_a);
  assign core_b = VW'(mag_b);

  if (VW == 2) begin : g_core2
    vedic_2x2 u_core (.a(core_a), .b(core_b), .p(core_p));
  end else if (VW == 4) begin : g_core4
    vedic_4x4 u_core (.a(core_a), .b(core_b), .p(core_p));
  end else if (VW == 8) begin : g_core8
    vedic_8x8 u_core (.a(core_a), .b(core_b), .p(core_p));
  end else begin : g_core_none
    $error("signed_vedic_mult: N = %0d needs a Vedic core wider than 8x8", N);
  end

  assign neg = a[N-1] ^ b[N-1];

  // |a|*|b| <= 2^(2N-2), so the core's bits above 2N-1 are always zero.
  twos_complement #(.W(2*N)) u_sign (.x(core_p[2*N-1:0]), .en(neg), .y(p));
endmodule
