// tb_twos_complement: exhaustive self-checking test of the conditional
// negator at 8 bits: for every x, en = 0 must pass x and en = 1 must give
// (256 - x) mod 256. A 4-bit instance is checked the same way.
// Combinational: results are checked one time step after the inputs change.
module tb_twos_complement;

  logic [7:0] x8, y8;
  logic [3:0] x4, y4;
  logic       en;
  int checks = 0, failures = 0;

  twos_complement dut (.x(x8), .en(en), .y(y8));
  twos_complement #(.W(4)) dut4 (.x(x4), .en(en), .y(y4));

  initial begin
    for (int e = 0; e < 2; e++) begin
      for (int i = 0; i < 256; i++) begin
        x8 = 8'(i); x4 = 4'(i); en = 1'(e);
        #1;
        checks++;
        if (y8 != ((e != 0) ? 8'(256 - i) : 8'(i))) begin
          failures++;
          $display("FAIL 8b x=%0d en=%0d: got %0d", i, e, y8);
        end
        checks++;
        if (y4 != ((e != 0) ? 4'(16 - (i % 16)) : 4'(i))) begin
          failures++;
          $display("FAIL 4b x=%0d en=%0d: got %0d", i % 16, e, y4);
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
