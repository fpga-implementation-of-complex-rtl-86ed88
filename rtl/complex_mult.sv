// complex_mult: signed complex multiplier built on signed Vedic multipliers.
//
// Computes (a + jc)(b + jd) = (ab - cd) + j(ad + bc) for two's-complement
// parts a, b, c, d of N bits each. Four signed Vedic multipliers form the
// 2N-bit partial products ab, cd, ad and bc in parallel. The real part unit
// subtracts cd from ab and the imaginary part unit adds ad and bc, each with
// one 2N-bit ripple-carry adder whose carry out is turned into the sign bit
// of a (2N+1)-bit result by the XOR of the two products' sign bits. With the
// default N = 4 the products are 8 bits and both results are 9 bits.
// Unsigned operands work too when they are given with a 0 sign bit.
//
// Interface (names as on the evaluation waveform):
//   rp_i1 = a, ip_i1 = c    first operand  a + jc
//   rp_i2 = b, ip_i2 = d    second operand b + jd
//   rp_op = ab - cd, ip_op = ad + bc, both signed 2N+1 bits
// Timing: purely combinational, with no clock or registers; the longest path
// runs negate -> Vedic core -> negate -> ripple-carry adder.
module complex_mult #(
  parameter int unsigned N = 4
) (
  input  logic signed [N-1:0] rp_i1,
  input  logic signed [N-1:0] ip_i1,
  input  logic signed [N-1:0] rp_i2,
  input  logic signed [N-1:0] ip_i2,
  output logic signed [2*N:0] rp_op,
  output logic signed [2*N:0] ip_op
);
  logic [2*N-1:0] prod_ab, prod_cd, prod_ad, prod_bc;

  signed_vedic_mult #(.N(N)) u_mul_ab (.a(rp_i1), .b(rp_i2), .p(prod_ab));
  signed_vedic_mult #(.N(N)) u_mul_cd (.a(ip_i1), .b(ip_i2), .p(prod_cd));
  signed_vedic_mult #(.N(N)) u_mul_ad (.a(rp_i1), .b(ip_i2), .p(prod_ad));
  signed_vedic_mult #(.N(N)) u_mul_bc (.a(rp_i2), .b(ip_i1), .p(prod_bc));

  real_part_unit #(.W(2*N)) u_real (
    .a_prod(prod_ab), .b_prod(prod_cd), .r(rp_op)
  );
  imag_part_unit #(.W(2*N)) u_imag (
    .a_prod(prod_ad), .b_prod(prod_bc), .i_out(ip_op)
  );
endmodule
