// tb_vedic_4x4: exhaustive self-checking test of the 4x4 Vedic multiplier:
// all 256 operand pairs against the integer product, one time step after each
// input change (the block is combinational).
module tb_vedic_4x4;

  logic [3:0] a, b;
  logic [7:0] p;
  int checks = 0, failures = 0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  initial begin
    for (int i = 0; i < 16; i++) begin
      for (int j = 0; j < 16; j++) begin
        a = 4'(i); b = 4'(j);
        #1;
        checks++;
        if (p != 8'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
