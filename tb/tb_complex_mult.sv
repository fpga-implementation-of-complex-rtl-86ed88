// tb_complex_mult: end-to-end self-checking test of the complex multiplier
// at its default width (N = 4: 4-bit parts, 9-bit results), with no
// parameter overridden.
//
// Applies every one of the 2^16 combinations of the four operand parts and
// compares both outputs with (ab - cd) and (ad + bc) computed here with
// integer arithmetic. Then applies the named examples (1+3j)(5+7j) and
// (3-3j)(2+7j). It counts how often each mechanism of the design was
// exercised and fails if one never was: a negated operand and a negated
// product inside the signed multipliers, a zero product with a negative
// operand, the most negative operand, the MSB correction in the real part
// (products of equal sign) and in the imaginary part (products of unequal
// sign) and their pass-through cases, a result that needs the ninth bit,
// and all-non-negative (unsigned) operands. The multiplier is combinational:
// outputs are checked one time step after the inputs change, i.e. with no clock
// cycles of latency.
module tb_complex_mult;

  logic signed [3:0] rp_i1, ip_i1, rp_i2, ip_i2;
  logic signed [8:0] rp_op, ip_op;
  int checks = 0, failures = 0;

  typedef enum int {
    EV_NEG_OPERAND, EV_NEG_PRODUCT, EV_ZERO_NEG, EV_MOST_NEG,
    EV_RE_INVERT, EV_RE_KEEP, EV_IM_INVERT, EV_IM_KEEP,
    EV_NINTH_BIT, EV_UNSIGNED, EV_COUNT
  } event_e;
  int seen [EV_COUNT];
  string ev_name [EV_COUNT] = '{
    "negated operand", "negated product", "zero product with negative operand",
    "most negative operand", "real MSB inverted", "real MSB kept",
    "imag MSB inverted", "imag MSB kept", "result needs ninth bit",
    "unsigned operands"};

  complex_mult dut (
    .rp_i1(rp_i1), .ip_i1(ip_i1), .rp_i2(rp_i2), .ip_i2(ip_i2),
    .rp_op(rp_op), .ip_op(ip_op)
  );

  task automatic apply(input int a, input int c, input int b, input int d);
    int ab, cd, ad, bc, re, im;
    rp_i1 = 4'(a); ip_i1 = 4'(c); rp_i2 = 4'(b); ip_i2 = 4'(d);
    #1;
    ab = a * b; cd = c * d; ad = a * d; bc = b * c;
    re = ab - cd; im = ad + bc;
    checks++;
    if (int'(rp_op) != re) begin
      failures++;
      if (failures < 20) $display("FAIL real (%0d,%0d)x(%0d,%0d): got %0d want %0d", a, c, b, d, rp_op, re);
    end
    checks++;
    if (int'(ip_op) != im) begin
      failures++;
      if (failures < 20) $display("FAIL imag (%0d,%0d)x(%0d,%0d): got %0d want %0d", a, c, b, d, ip_op, im);
    end
    if (a < 0 || b < 0 || c < 0 || d < 0) seen[EV_NEG_OPERAND]++;
    if (ab < 0 || cd < 0 || ad < 0 || bc < 0) seen[EV_NEG_PRODUCT]++;
    if ((a == 0 && (b < 0 || d < 0)) || (c == 0 && (b < 0 || d < 0))) seen[EV_ZERO_NEG]++;
    if (a == -8 || b == -8 || c == -8 || d == -8) seen[EV_MOST_NEG]++;
    if ((ab < 0) == (cd < 0)) seen[EV_RE_INVERT]++; else seen[EV_RE_KEEP]++;
    if ((ad < 0) != (bc < 0)) seen[EV_IM_INVERT]++; else seen[EV_IM_KEEP]++;
    if (re > 127 || re < -128 || im > 127 || im < -128) seen[EV_NINTH_BIT]++;
    if (a >= 0 && b >= 0 && c >= 0 && d >= 0) seen[EV_UNSIGNED]++;
  endtask

  initial begin
    foreach (seen[k]) seen[k] = 0;
    for (int a = -8; a < 8; a++)
      for (int c = -8; c < 8; c++)
        for (int b = -8; b < 8; b++)
          for (int d = -8; d < 8; d++)
            apply(a, c, b, d);

    // (1 + 3j)(5 + 7j) = -16 + 22j
    apply(1, 3, 5, 7);
    checks++;
    if (rp_op != -9'sd16 || ip_op != 9'sd22) failures++;
    // (3 - 3j)(2 + 7j) = 27 + 15j
    apply(3, -3, 2, 7);
    checks++;
    if (rp_op != 9'sd27 || ip_op != 9'sd15) failures++;

    for (int k = 0; k < EV_COUNT; k++) begin
      $display("%-36s %0d", ev_name[k], seen[k]);
      checks++;
      if (seen[k] == 0) begin
        failures++;
        $display("FAIL mechanism never exercised: %s", ev_name[k]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
