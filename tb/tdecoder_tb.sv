// Self-checking test of the ternary decoder.
// For each input level K the output dK must be at level 2 and the other two
// outputs at level 0 (decoder truth table).
module tdecoder_tb;
  import ternary_pkg::*;
  trit_t a, d0, d1, d2;
  int checks = 0, failures = 0;

  tdecoder dut (.a(a), .d0(d0), .d1(d1), .d2(d2));

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
      for (int k = 0; k < 3; k++) begin
        trit_t got, want;
        got  = (k == 0) ? d0 : (k == 1) ? d1 : d2;
        want = (k == i) ? T2 : T0;
        checks++;
        if (got !== want) begin
          failures++;
          $display("FAIL decoder in=%0d: d%0d = %0d, expected %0d", i, k, got, want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
