// tb_real_part_unit: exhaustive self-checking test of the real part unit at
// W = 8: for every pair of signed 8-bit products A, B the 9-bit result must
// equal A - B. Counts how often the MSB correction (s1 = 0, same-sign
// operands) and the pass-through (s1 = 1) were taken; both must occur, as
// must B = 0. A 4-bit instance is checked the same way. Combinational:
// checks come one time step after the inputs change.
module tb_real_part_unit;

  logic [7:0] a8, b8;
  logic [8:0] r8;
  logic [3:0] a4, b4;
  logic [4:0] r4;
  int checks = 0, failures = 0;
  int n_invert = 0, n_keep = 0;

  real_part_unit          dut  (.a_prod(a8), .b_prod(b8), .r(r8));
  real_part_unit #(.W(4)) dut4 (.a_prod(a4), .b_prod(b4), .r(r4));

  initial begin
    for (int i = -128; i < 128; i++) begin
      for (int j = -128; j < 128; j++) begin
        a8 = 8'(i); b8 = 8'(j); a4 = 4'(i); b4 = 4'(j);
        #1;
        if ((i < 0) == (j < 0)) n_invert++; else n_keep++;
        checks++;
        if (int'($signed(r8)) != i - j) begin
          failures++;
          if (failures < 10) $display("FAIL %0d-%0d: got %0d", i, j, $signed(r8));
        end
        checks++;
        if (int'($signed(r4)) != int'($signed(a4)) - int'($signed(b4))) begin
          failures++;
          if (failures < 10) $display("FAIL 4b %0d-%0d: got %0d", $signed(a4), $signed(b4), $signed(r4));
        end
      end
    end
    $display("MSB inverted %0d times, kept %0d times", n_invert, n_keep);
    checks++;
    if (n_invert == 0 || n_keep == 0) failures++;
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
