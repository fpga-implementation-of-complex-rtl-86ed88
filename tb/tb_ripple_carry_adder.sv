// tb_ripple_carry_adder: exhaustive self-checking test of the 8-bit
// ripple-carry adder (every a, b and carry in, 131072 cases), plus a random
// test of a 4-bit instance. The 9-bit result must equal a + b + cin. The
// adder is combinational: results are checked one time step after the inputs change.
module tb_ripple_carry_adder;

  logic [7:0] a8, b8;
  logic [8:0] s8;
  logic [3:0] a4, b4;
  logic [4:0] s4;
  logic       cin;
  int checks = 0, failures = 0;

  ripple_carry_adder dut (.a(a8), .b(b8), .cin(cin), .sum(s8));
  ripple_carry_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(cin), .sum(s4));

  initial begin
    a4 = '0; b4 = '0;
    for (int c = 0; c < 2; c++) begin
      for (int i = 0; i < 256; i++) begin
        for (int j = 0; j < 256; j++) begin
          a8 = 8'(i); b8 = 8'(j); cin = 1'(c);
          a4 = 4'(i); b4 = 4'(j);
          #1;
          checks++;
          if (s8 != 9'(i + j + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 8b %0d+%0d+%0d: got %0d", i, j, c, s8);
          end
          checks++;
          if (s4 != 5'((i % 16) + (j % 16) + c)) begin
            failures++;
            if (failures < 10) $display("FAIL 4b %0d+%0d+%0d: got %0d", i % 16, j % 16, c, s4);
          end
        end
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
