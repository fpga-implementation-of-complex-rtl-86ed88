// vedic_combine: the adder stage that joins four half-width products into
// one product of a W x W Urdhva Tiryakbhyam (Vedic) multiplier.
//
// The operands a and b of the W x W multiplier are split into halves of
// H = W/2 bits. The caller supplies the vertical products q0 = aL*bL and
// q3 = aH*bH and the crosswise products q1 = aH*bL and q2 = aL*bH, each W
// bits. Three W-bit ripple-carry adders line them up:
//   s1 = q1 + q2                         (the crosswise sum)
//   s2 = s1 + (q0 >> H)                  (adds the upper half of q0)
//   s3 = q3 + {carry, s2[W-1:H]}         (adds the upper half of s2 and the
//                                         carry of the first two adders)
//   p  = {s3[W-1:0], s2[H-1:0], q0[H-1:0]}
// q1 + q2 + (q0 >> H) is below 2^(W+1), so the carries of the first two
// adders are never both set and one OR gate merges them. The third adder's
// carry out is always 0 because the product fits in 2W bits; it is left
// unread.
//
// Interface: q0..q3 unsigned W-bit; p unsigned 2W-bit. W even, at least 4.
// Timing: purely combinational, three W-bit carry chains.
module vedic_combine #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0]   q0,
  input  logic [W-1:0]   q1,
  input  logic [W-1:0]   q2,
  input  logic [W-1:0]   q3,
  output logic [2*W-1:0] p
);
  localparam int unsigned H = W / 2;

  logic [W:0] s1, s2, s3;
  logic       mid_carry;

  ripple_carry_adder #(.W(W)) u_add_cross (
    .a(q1), .b(q2), .cin(1'b0), .sum(s1)
  );
  ripple_carry_adder #(.W(W)) u_add_low (
    .a(s1[W-1:0]), .b({{H{1'b0}}, q0[W-1:H]}), .cin(1'b0), .sum(s2)
  );

  assign mid_carry = s1[W] | s2[W];

  ripple_carry_adder #(.W(W)) u_add_high (
    .a(q3), .b(W'({mid_carry, s2[W-1:H]})), .cin(1'b0), .sum(s3)
  );

  assign p = {s3[W-1:0], s2[H-1:0], q0[H-1:0]};
endmodule
