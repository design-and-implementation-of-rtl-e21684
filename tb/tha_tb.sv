// Self-checking test of the ternary half adder.
// Applies all nine addend pairs; expected sum and carry are (a+b) mod 3
// and (a+b) div 3, worked out arithmetically here.
module tha_tb;
  import ternary_pkg::*;
  trit_t a, b, sum, cout;
  int checks = 0, failures = 0;

  tha dut (.a(a), .b(b), .sum(sum), .cout(cout));

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
        if (int'(sum) != (i + j) % 3) begin
          failures++;
          $display("FAIL %0d+%0d: sum=%0d expected %0d", i, j, sum, (i + j) % 3);
        end
        checks++;
        if (int'(cout) != (i + j) / 3) begin
          failures++;
          $display("FAIL %0d+%0d: cout=%0d expected %0d", i, j, cout, (i + j) / 3);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
