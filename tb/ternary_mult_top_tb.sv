// End-to-end test of the ternary multiplier top level, at its only size.
// Applies every combination of the two-trit multiplier operands (81) and of
// the switch-steered one-trit multiplier operands (9), 729 vectors in all,
// and compares every output trit with the radix-3 digits of the integer
// products. It also counts how often each mechanism of the design is
// exercised and fails if one never is:
//   pp_carry   a 1-trit partial product carries (2*2)
//   col1_carry the 3^1 column of the adder array overflows into 3^2
//   col2_carry the 3^2 column overflows into 3^3
//   pp3_used   the top product trit is nonzero
//   sptt_pos0/1/2  each throw of the product switch is selected
//   spdt_carry the carry switch selects its '1' throw
module ternary_mult_top_tb;
  import ternary_pkg::*;
  trit_t [1:0] a, b;
  trit_t [3:0] pp;
  trit_t s_a, s_b, s_pp0, s_pp1;
  int checks = 0, failures = 0;
  int pp_carry = 0, col1_carry = 0, col2_carry = 0, pp3_used = 0;
  int sptt_pos [3] = '{0, 0, 0};
  int spdt_carry = 0;

  ternary_mult_top dut (
    .a(a), .b(b), .pp(pp),
    .s_a(s_a), .s_b(s_b), .s_pp0(s_pp0), .s_pp1(s_pp1)
  );

  task automatic expect_mech(string name, int count);
    checks++;
    $display("mechanism %-10s exercised %0d times", name, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism %s never exercised", name);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 9; x++)
      for (int y = 0; y < 9; y++)
        for (int s = 0; s < 9; s++) begin
          int p, sp, col1, col2;
          int ad [2], bd [2];
          ad[0] = x % 3; ad[1] = x / 3;
          bd[0] = y % 3; bd[1] = y / 3;
          a = '{trit_t'(ad[1]), trit_t'(ad[0])};
          b = '{trit_t'(bd[1]), trit_t'(bd[0])};
          s_a = trit_t'(s / 3);
          s_b = trit_t'(s % 3);
          #1;

          // Two-trit product.
          p = x * y;
          for (int k = 0; k < 4; k++) begin
            checks++;
            if (int'(pp[k]) != p % 3) begin
              failures++;
              $display("FAIL %0d*%0d: pp[%0d]=%0d expected %0d", x, y, k, pp[k], p % 3);
            end
            p = p / 3;
          end

          // One-trit switch-steered product.
          sp = (s / 3) * (s % 3);
          checks++;
          if (int'(s_pp0) != sp % 3 || int'(s_pp1) != sp / 3) begin
            failures++;
            $display("FAIL switch %0d*%0d: %0d%0d expected %0d%0d",
                     s / 3, s % 3, s_pp1, s_pp0, sp / 3, sp % 3);
          end

          // Mechanism coverage (only once per two-trit operand pair).
          if (s == 0) begin
            if ((ad[0] == 2 && bd[0] == 2) || (ad[0] == 2 && bd[1] == 2) ||
                (ad[1] == 2 && bd[0] == 2) || (ad[1] == 2 && bd[1] == 2))
              pp_carry++;
            col1 = (ad[0] * bd[0]) / 3 + (ad[0] * bd[1]) % 3 + (ad[1] * bd[0]) % 3;
            col2 = (ad[0] * bd[1]) / 3 + (ad[1] * bd[0]) / 3 + (ad[1] * bd[1]) % 3 + col1 / 3;
            if (col1 >= 3) col1_carry++;
            if (col2 >= 3) col2_carry++;
            if (pp[3] != T0) pp3_used++;
          end
          if (y == 0 && x == 0) begin
            sptt_pos[((s / 3) < (s % 3)) ? (s / 3) : (s % 3)]++;
            if (sp == 4) spdt_carry++;
          end
        end

    expect_mech("pp_carry", pp_carry);
    expect_mech("col1_carry", col1_carry);
    expect_mech("col2_carry", col2_carry);
    expect_mech("pp3_used", pp3_used);
    expect_mech("sptt_pos0", sptt_pos[0]);
    expect_mech("sptt_pos1", sptt_pos[1]);
    expect_mech("sptt_pos2", sptt_pos[2]);
    expect_mech("spdt_carry", spdt_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
