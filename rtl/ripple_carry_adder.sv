// ripple_carry_adder: W-bit ripple-carry adder with carry in and a (W+1)-bit
// result whose top bit is the carry out.
//
// A chain of W full adders; the carry ripples from bit 0 to bit W-1. With
// W = 8 it adds two 8-bit numbers into a 9-bit result, which is how the
// complex multiplier combines its partial products. The carry in lets the
// same adder subtract: feeding ~b with cin = 1 adds the two's complement of b.
// (A plain adder would use a half adder in bit 0; the carry in makes every
// stage a full adder.)
//
// Interface: a, b unsigned W-bit; cin; sum[W-1:0] the sum bits, sum[W] the
// carry out.
// Timing: purely combinational; the critical path is the W-stage carry chain.
module ripple_carry_adder #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W:0]   sum
);
  logic [W:0] carry;

  assign carry[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_stage
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (carry[i]),
      .s   (sum[i]),
      .cout(carry[i+1])
    );
  end

  assign sum[W] = carry[W];
endmodule
