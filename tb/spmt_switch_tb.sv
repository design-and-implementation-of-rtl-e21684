// Self-checking test of the single pole multiple throw switch.
// Checks a triple-throw switch (default) and a double-throw switch with
// every control level and random throw levels: control k must pass throw k,
// and a control at or above the last throw must pass the last throw.
module spmt_switch_tb;
  import ternary_pkg::*;
  trit_t sel, y3, y2;
  trit_t t3 [3];
  trit_t t2 [2];
  int checks = 0, failures = 0;

  spmt_switch              dut3 (.sel(sel), .throws(t3), .y(y3));
  spmt_switch #(.THROWS(2)) dut2 (.sel(sel), .throws(t2), .y(y2));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int k = 0; k < 3; k++) t3[k] = trit_t'($urandom_range(2));
      for (int k = 0; k < 2; k++) t2[k] = trit_t'($urandom_range(2));
      for (int s = 0; s < 3; s++) begin
        sel = trit_t'(s);
        #1;
        checks++;
        if (y3 !== t3[s]) begin
          failures++;
          $display("FAIL SPTT sel=%0d y=%0d expected %0d", s, y3, t3[s]);
        end
        checks++;
        if (y2 !== t2[(s == 0) ? 0 : 1]) begin
          failures++;
          $display("FAIL SPDT sel=%0d y=%0d expected %0d", s, y2, t2[(s == 0) ? 0 : 1]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
