// twos_complement: conditional two's-complement negator, y = en ? -x : x.
//
// Each bit of x is XORed with en (a ones' complement when en = 1) and en is
// then added through an incrementer chain of half-adder cells: bit i flips
// when the carry reaching it is 1, and the carry continues while the inverted
// bits are 1. When en = 0 the carry is 0 throughout and x passes unchanged.
// The result wraps modulo 2^W, so -0 = 0 and the most negative value maps to
// itself, which read as unsigned is its magnitude 2^(W-1).
//
// Interface: x W-bit; en; y W-bit.
// Timing: purely combinational; a W-stage carry chain.
module twos_complement #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] x,
  input  logic         en,
  output logic [W-1:0] y
);
  logic [W-1:0] inv;
  logic [W-1:0] carry;

  assign inv      = x ^ {W{en}};
  assign carry[0] = en;

  for (genvar i = 0; i < W; i++) begin : g_inc
    assign y[i] = inv[i] ^ carry[i];
    if (i < W - 1) begin : g_carry
      assign carry[i+1] = inv[i] & carry[i];
    end
  end
endmodule
