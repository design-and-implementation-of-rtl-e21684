// Self-checking test of the two-input ternary AND.
// Drives all nine input pairs and compares the output with the gate's
// truth table written out below, row (a, b) at index 3*a + b.
module tand_tb;
  import ternary_pkg::*;
  trit_t a, b, y;
  int checks = 0, failures = 0;
  trit_t expected [9] = '{T0, T0, T0, T0, T1, T1, T0, T1, T2};

  tand dut (.a(a), .b(b), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++)
      for (int j = 0; j < 3; j++) begin
        a = trit_t'(i);
        b = trit_t'(j);
        #1;
        checks++;
        if (y !== expected[3*i+j]) begin
          failures++;
          $display("FAIL tand(%0d,%0d) = %0d, expected %0d", i, j, y, expected[3*i+j]);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
