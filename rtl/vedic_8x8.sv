// vedic_8x8: 8-bit x 8-bit unsigned Urdhva Tiryakbhyam (Vedic) multiplier.
//
// Four 4x4 Vedic multipliers form the vertical (low*low, high*high) and
// crosswise (high*low, low*high) products of the 4-bit operand halves in
// parallel; vedic_combine adds the four 8-bit partial products with three
// 8-bit ripple-carry adders into the 16-bit product. The hierarchy is
// therefore 2x2 -> 4x4 -> 8x8, each level reusing the one below.
//
// Interface: a, b unsigned 8-bit; p unsigned 16-bit product.
// Timing: purely combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;

  vedic_4x4 u_ll (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_hl (.a(a[7:4]), .b(b[3:0]), .p(q1));
  vedic_4x4 u_lh (.a(a[3:0]), .b(b[7:4]), .p(q2));
  vedic_4x4 u_hh (.a(a[7:4]), .b(b[7:4]), .p(q3));

  vedic_combine #(.W(8)) u_comb (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
