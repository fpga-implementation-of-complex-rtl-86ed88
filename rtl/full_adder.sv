// full_adder: one-bit full adder, sum = a ^ b ^ cin, carry = majority(a, b, cin).
// Purely combinational. One stage of the ripple-carry adder.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (a & cin) | (b & cin);
endmodule
