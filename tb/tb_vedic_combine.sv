// tb_vedic_combine: self-checking test of the Vedic adder stage at W = 8.
// The four inputs are the half-width products of two 8-bit operands, worked
// out in the testbench with '*'; the combined result must equal the full
// product. All 65536 operand pairs are covered. A 4-bit instance is fed the
// products of the operands' low nibbles. Combinational: checks come one time step
// after each input change.
module tb_vedic_combine;

  logic [7:0]  q0, q1, q2, q3;
  logic [15:0] p;
  logic [3:0]  r0, r1, r2, r3;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  vedic_combine dut (.q0(q0), .q1(q1), .q2(q2), .q3(q3), .p(p));
  vedic_combine #(.W(4)) dut4 (.q0(r0), .q1(r1), .q2(r2), .q3(r3), .p(p4));

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        q0 = 8'((i % 16) * (j % 16));
        q1 = 8'((i / 16) * (j % 16));
        q2 = 8'((i % 16) * (j / 16));
        q3 = 8'((i / 16) * (j / 16));
        r0 = 4'((i % 4) * (j % 4));
        r1 = 4'(((i / 4) % 4) * (j % 4));
        r2 = 4'((i % 4) * ((j / 4) % 4));
        r3 = 4'(((i / 4) % 4) * ((j / 4) % 4));
        #1;
        checks++;
        if (p != 16'(i * j)) begin
          failures++;
          if (failures < 10) $display("FAIL 8b %0d*%0d: got %0d", i, j, p);
        end
        checks++;
        if (p4 != 8'((i % 16) * (j % 16))) begin
          failures++;
          if (failures < 10) $display("FAIL 4b %0d*%0d: got %0d", i % 16, j % 16, p4);
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
