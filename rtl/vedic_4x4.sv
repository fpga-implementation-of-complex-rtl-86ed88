// vedic_4x4: 4-bit x 4-bit unsigned Urdhva Tiryakbhyam (Vedic) multiplier.
//
// Four 2x2 Vedic leaves multiply the 2-bit halves of the operands
// vertically (low*low, high*high) and crosswise (high*low, low*high) in
// parallel; vedic_combine adds the four 4-bit partial products with three
// 4-bit ripple-carry adders into the 8-bit product.
//
// Interface: a, b unsigned 4-bit; p unsigned 8-bit product.
// Timing: purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;

  vedic_2x2 u_ll (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_hl (.a(a[3:2]), .b(b[1:0]), .p(q1));
  vedic_2x2 u_lh (.a(a[1:0]), .b(b[3:2]), .p(q2));
  vedic_2x2 u_hh (.a(a[3:2]), .b(b[3:2]), .p(q3));

  vedic_combine #(.W(4)) u_comb (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
endmodule
