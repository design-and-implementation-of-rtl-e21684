// Self-checking test of the simple ternary inverter (STI).
// Drives the three input levels and compares the output with the
// inverter truth table written out below (expected output for inputs 0, 1, 2).
module sti_tb;
  import ternary_pkg::*;
  trit_t a, y;
  int checks = 0, failures = 0;
  trit_t expected [3] = '{T2, T1, T0};

  sti dut (.a(a), .y(y));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3; i++) begin
      a = trit_t'(i);
      #1;
      checks++;
      if (y !== expected[i]) begin
        failures++;
        $display("FAIL sti(%0d) = %0d, expected %0d", i, y, expected[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
