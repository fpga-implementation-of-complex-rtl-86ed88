// imag_part_unit: forms the imaginary part I = A + B of a complex product
// from the two signed partial products A = a*d and B = b*c.
//
// A W-bit ripple-carry adder (carry in 0) adds A and B. Its W sum bits are
// the low bits of A + B; the sign of the (W+1)-bit result is recovered from
// s2 = A[W-1] ^ B[W-1]: when s2 = 1 (the operands differ in sign) the
// adder's carry out is inverted, otherwise it is kept. This is exact for
// every pair of W-bit operands, because the correct top bit is
// carry ^ A[W-1] ^ B[W-1].
//
// Interface: a_prod, b_prod signed W-bit; i_out signed (W+1)-bit.
// Timing: purely combinational, one W-bit carry chain.
module imag_part_unit #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_prod,
  input  logic [W-1:0] b_prod,
  output logic [W:0]   i_out
);
  logic [W:0] rca_out;
  logic       s2;

  ripple_carry_adder #(.W(W)) u_rca (
    .a(a_prod), .b(b_prod), .cin(1'b0), .sum(rca_out)
  );

  assign s2 = a_prod[W-1] ^ b_prod[W-1];

  always_comb begin
    i_out = rca_out;
    if (s2) i_out[W] = ~rca_out[W];
  end
endmodule
