// Ternary half adder (THA).
//
// Adds two trits of the same weight: Sum = (A+B) mod 3, Carry = 1 when
// A+B >= 3. As in the multiplier, both addends are decoded into unary lines
// and the outputs are sums of products of those lines:
//   Sum   = A0.B2 + A2.B0 + A1.B1 + 1.(A0.B1 + A1.B0 + A2.B2)
//   Carry = 1.(A1.B2 + A2.B1 + A2.B2)
// "." is TAND, "+" is TOR, "1." is a TAND with the constant middle level.
// The sum expression is the source paper's; the carry expression is read from
// its half-adder schematic and agrees with the half-adder truth table.
// The network uses 11 TANDs and 7 TORs, 18 two-input gates, plus two
// decoders.
// Purely combinational, no clock.
module tha
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t sum,
  output trit_t cout  // weight 3 relative to sum, 0 or 1
);
  trit_t a0, a1, a2, b0, b1, b2;
  // Sum, level-2 terms
  trit_t s02, s20, s11, s_or1, s_two;
  // Sum, level-1 terms
  trit_t s01, s10, s22, s_or2, s_or3, s_one;
  // Carry terms
  trit_t c12, c21, c22, c_or1, c_or2;

  tdecoder u_dec_a (.a(a), .d0(a0), .d1(a1), .d2(a2));
  tdecoder u_dec_b (.a(b), .d0(b0), .d1(b1), .d2(b2));

  tand u_s02 (.a(a0), .b(b2), .y(s02));
  tand u_s20 (.a(a2), .b(b0), .y(s20));
  tand u_s11 (.a(a1), .b(b1), .y(s11));
  tor  u_so1 (.a(s02), .b(s20), .y(s_or1));
  tor  u_so2 (.a(s_or1), .b(s11), .y(s_two));

  tand u_s01 (.a(a0), .b(b1), .y(s01));
  tand u_s10 (.a(a1), .b(b0), .y(s10));
  tand u_s22 (.a(a2), .b(b2), .y(s22));
  tor  u_so3 (.a(s01), .b(s10), .y(s_or2));
  tor  u_so4 (.a(s_or2), .b(s22), .y(s_or3));
  tand u_s1  (.a(s_or3), .b(T1), .y(s_one));

  tor  u_sum (.a(s_two), .b(s_one), .y(sum));

  tand u_c12 (.a(a1), .b(b2), .y(c12));
  tand u_c21 (.a(a2), .b(b1), .y(c21));
  tand u_c22 (.a(a2), .b(b2), .y(c22));
  tor  u_co1 (.a(c12), .b(c21), .y(c_or1));
  tor  u_co2 (.a(c_or1), .b(c22), .y(c_or2));
  tand u_co  (.a(c_or2), .b(T1), .y(cout));
endmodule
