// vedic_2x2: 2-bit x 2-bit unsigned multiplier, the leaf of the Urdhva
// Tiryakbhyam ("vertically and crosswise") Vedic multiplier.
//
// Four AND gates form the partial products: the vertical ones a0&b0 and
// a1&b1 and the crosswise ones a1&b0 and a0&b1. A first half adder sums the
// two crosswise terms to give p[1]; a second half adder adds its carry to
// a1&b1 to give p[2] and p[3]. That is the gate count the structure is known
// for: four ANDs and two half adders.
//
// Interface: a, b unsigned 2-bit; p unsigned 4-bit product.
// Timing: purely combinational, no clock.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic t_cross0, t_cross1, t_high, c_mid;

  assign p[0]     = a[0] & b[0];
  assign t_cross0 = a[1] & b[0];
  assign t_cross1 = a[0] & b[1];
  assign t_high   = a[1] & b[1];

  half_adder u_ha_mid  (.a(t_cross0), .b(t_cross1), .s(p[1]), .c(c_mid));
  half_adder u_ha_high (.a(t_high),   .b(c_mid),    .s(p[2]), .c(p[3]));
endmodule
