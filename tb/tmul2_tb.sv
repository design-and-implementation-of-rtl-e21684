// Self-checking test of the two-trit ternary multiplier.
// Applies all 81 operand pairs (0..8 times 0..8); the expected four output
// trits are the radix-3 digits of the integer product, worked out here.
// Also checks the largest case, (22)_3 * (22)_3 = (2101)_3, by name.
module tmul2_tb;
  import ternary_pkg::*;
  trit_t [1:0] a, b;
  trit_t [3:0] pp;
  int checks = 0, failures = 0;

  tmul2 dut (.a(a), .b(b), .pp(pp));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 9; x++)
      for (int y = 0; y < 9; y++) begin
        int p;
        a[0] = trit_t'(x % 3); a[1] = trit_t'(x / 3);
        b[0] = trit_t'(y % 3); b[1] = trit_t'(y / 3);
        #1;
        p = x * y;
        for (int k = 0; k < 4; k++) begin
          checks++;
          if (int'(pp[k]) != p % 3) begin
            failures++;
            $display("FAIL %0d*%0d: pp[%0d]=%0d expected %0d", x, y, k, pp[k], p % 3);
          end
          p = p / 3;
        end
      end
    a = '{T2, T2};
    b = '{T2, T2};
    #1;
    checks++;
    if (pp !== '{T2, T1, T0, T1}) begin
      failures++;
      $display("FAIL 8*8 gave %0d%0d%0d%0d, expected 2101", pp[3], pp[2], pp[1], pp[0]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
