// real_part_unit: forms the real part R = A - B of a complex product from
// the two signed partial products A = a*b and B = c*d.
//
// B is subtracted by adding its two's complement: the W-bit ripple-carry
// adder gets A, the inverted B and a carry in of 1. The adder's W sum bits
// are already the low bits of A - B, but its carry out is not the sign of
// the (W+1)-bit result. The sign is recovered from s1 = A[W-1] ^ B[W-1]:
// when s1 = 0 (A and B have the same sign) the adder's top bit is inverted,
// otherwise it is kept. This is exact for every pair of W-bit operands,
// because the correct top bit is carry ^ A[W-1] ^ ~B[W-1].
//
// Interface: a_prod, b_prod signed W-bit; r signed (W+1)-bit.
// Timing: purely combinational, one W-bit carry chain.
module real_part_unit #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a_prod,
  input  logic [W-1:0] b_prod,
  output logic [W:0]   r
);
  logic [W:0] rca_out;
  logic       s1;

  ripple_carry_adder #(.W(W)) u_rca (
    .a(a_prod), .b(~b_prod), .cin(1'b1), .sum(rca_out)
  );

  assign s1 = a_prod[W-1] ^ b_prod[W-1];

  always_comb begin
    r = rca_out;
    if (!s1) r[W] = ~rca_out[W];
  end
endmodule
