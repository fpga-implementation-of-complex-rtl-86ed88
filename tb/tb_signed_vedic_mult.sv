// tb_signed_vedic_mult: exhaustive self-checking test of the signed Vedic
// multiplier at N = 4 (default, 4x4 core), N = 5 and N = 8 (8x8 core) and
// N = 2 (2x2 core). Every operand pair is applied and the 2N-bit result is
// compared with the product of the sign-extended operands. Named cases:
// 15 x (-12) = -180 at N = 5, 6 x (-7) = -42 at N = 4, and the most
// negative operands. Combinational: checks come one time step after the inputs
// change.
module tb_signed_vedic_mult;

  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  logic [4:0]  a5, b5;
  logic [9:0]  p5;
  logic [7:0]  a8, b8;
  logic [15:0] p8;
  logic [1:0]  a2, b2;
  logic [3:0]  p2;
  int checks = 0, failures = 0;

  signed_vedic_mult          dut4 (.a(a4), .b(b4), .p(p4));
  signed_vedic_mult #(.N(5)) dut5 (.a(a5), .b(b5), .p(p5));
  signed_vedic_mult #(.N(8)) dut8 (.a(a8), .b(b8), .p(p8));
  signed_vedic_mult #(.N(2)) dut2 (.a(a2), .b(b2), .p(p2));

  task automatic check(input string what, input int got, input int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    a4 = '0; b4 = '0; a5 = '0; b5 = '0; a2 = '0; b2 = '0;
    // Every pair at N = 8; the narrower instances see the low bits of the
    // same operands and so also cover all their pairs.
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j);
        a4 = 4'(i); b4 = 4'(j);
        a5 = 5'(i); b5 = 5'(j);
        a2 = 2'(i); b2 = 2'(j);
        #1;
        check("n8", int'($signed(p8)), i * j);
        check("n4", int'($signed(p4)), int'($signed(a4)) * int'($signed(b4)));
        check("n5", int'($signed(p5)), int'($signed(a5)) * int'($signed(b5)));
        check("n2", int'($signed(p2)), int'($signed(a2)) * int'($signed(b2)));
      end
    end
    a5 = 5'b01111; b5 = 5'b10100; a4 = 4'd6; b4 = 4'(-7);
    #1;
    check("15*-12", int'($signed(p5)), -180);
    check("6*-7", int'($signed(p4)), -42);
    a4 = 4'b1000; b4 = 4'b1000;
    #1;
    check("-8*-8", int'($signed(p4)), 64);
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
