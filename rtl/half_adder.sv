// half_adder: one-bit half adder, sum = a ^ b, carry = a & b.
// Purely combinational. Used by the 2x2 Vedic leaf multiplier.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  assign s = a ^ b;
  assign c = a & b;
endmodule
