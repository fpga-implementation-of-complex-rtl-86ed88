// tb_complex_mult_n8: self-checking test of the complex multiplier with
// 8-bit parts (N = 8: 8x8 Vedic cores, 16-bit products, 17-bit results).
// Applies corner cases (zeros, +-1, the extremes -128 and 127) in every
// combination, then 200000 random operands from $urandom, and compares
// both outputs with (ab - cd) and (ad + bc) computed here. Combinational:
// checks come one time step after the inputs change.
module tb_complex_mult_n8;

  logic signed [7:0]  rp_i1, ip_i1, rp_i2, ip_i2;
  logic signed [16:0] rp_op, ip_op;
  int checks = 0, failures = 0;
  int corner [6] = '{0, 1, -1, 127, -128, -127};

  complex_mult #(.N(8)) dut (
    .rp_i1(rp_i1), .ip_i1(ip_i1), .rp_i2(rp_i2), .ip_i2(ip_i2),
    .rp_op(rp_op), .ip_op(ip_op)
  );

  task automatic apply(input int a, input int c, input int b, input int d);
    rp_i1 = 8'(a); ip_i1 = 8'(c); rp_i2 = 8'(b); ip_i2 = 8'(d);
    #1;
    checks += 2;
    if (int'(rp_op) != a * b - c * d) begin
      failures++;
      if (failures < 20) $display("FAIL real (%0d,%0d)x(%0d,%0d): got %0d", a, c, b, d, rp_op);
    end
    if (int'(ip_op) != a * d + b * c) begin
      failures++;
      if (failures < 20) $display("FAIL imag (%0d,%0d)x(%0d,%0d): got %0d", a, c, b, d, ip_op);
    end
  endtask

  initial begin
    foreach (corner[i]) foreach (corner[j]) foreach (corner[k]) foreach (corner[l])
      apply(corner[i], corner[j], corner[k], corner[l]);
    for (int n = 0; n < 200000; n++)
      apply(int'($signed(8'($urandom))), int'($signed(8'($urandom))),
            int'($signed(8'($urandom))), int'($signed(8'($urandom))));
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
