// Self-checking test of a one-trit ternary multiplier (tmul1_spmt).
// Applies all nine operand pairs; the expected digits are the radix-3
// digits of the integer product a*b, worked out arithmetically here.
module tmul1_spmt_tb;
  import ternary_pkg::*;
  trit_t a, b, pp0, pp1;
  int checks = 0, failures = 0;

  tmul1_spmt dut (.a(a), .b(b), .pp0(pp0), .pp1(pp1));

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
        int p;
        a = trit_t'(i);
        b = trit_t'(j);
        #1;
        p = i * j;
        checks++;
        if (int'(pp0) != p % 3) begin
          failures++;
          $display("FAIL %0d*%0d: pp0=%0d expected %0d", i, j, pp0, p % 3);
        end
        checks++;
        if (int'(pp1) != p / 3) begin
          failures++;
          $display("FAIL %0d*%0d: pp1=%0d expected %0d", i, j, pp1, p / 3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
