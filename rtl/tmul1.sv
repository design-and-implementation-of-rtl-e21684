// One-trit ternary multiplier built from ternary logic expressions.
//
// Multiplies two trits A and B (0..2) into a two-trit result
// PP1 PP0 = A*B in radix 3; only 2*2 = 4 = (11)_3 produces a carry.
// Both operands are first decoded into unary lines A0/A1/A2 and B0/B1/B2
// (level 2 on the line matching the operand). Then
//   PP0 = A2.B1 + A1.B2 + 1.(A1.B1 + A2.B2)
//   PP1 = 1.(A2.B2)
// where "." is ternary AND (minimum), "+" is ternary OR (maximum) and
// "1." is a ternary AND with the constant middle level, which turns a 0/2
// decoded term into a 0/1 result. The gate network (two decoders, seven
// TANDs, three TORs) is the source paper's; sharing nothing between the PP0 and
// PP1 cones follows its schematic. Purely combinational, no clock.
module tmul1
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t pp0,  // product trit, weight 3^0
  output trit_t pp1   // carry trit, weight 3^1 (0 or 1)
);
  trit_t a0, a1, a2, b0, b1, b2;
  trit_t t21, t12, t11, t22, t22c;
  trit_t o_two, o_one, h_one;

  tdecoder u_dec_a (.a(a), .d0(a0), .d1(a1), .d2(a2));
  tdecoder u_dec_b (.a(b), .d0(b0), .d1(b1), .d2(b2));

  // Terms whose product digit is 2: A=2,B=1 and A=1,B=2.
  tand u_t21 (.a(a2), .b(b1), .y(t21));
  tand u_t12 (.a(a1), .b(b2), .y(t12));
  tor  u_o2  (.a(t21), .b(t12), .y(o_two));

  // Terms whose product digit is 1: A=B=1 and A=B=2, clamped to level 1.
  tand u_t11 (.a(a1), .b(b1), .y(t11));
  tand u_t22 (.a(a2), .b(b2), .y(t22));
  tor  u_o1  (.a(t11), .b(t22), .y(o_one));
  tand u_h1  (.a(o_one), .b(T1), .y(h_one));

  tor  u_pp0 (.a(o_two), .b(h_one), .y(pp0));

  // Carry: only A=B=2, clamped to level 1.
  tand u_c22 (.a(a2), .b(b2), .y(t22c));
  tand u_pp1 (.a(t22c), .b(T1), .y(pp1));

  // b0 is decoded but, as in the expressions above, not needed.
  logic unused_b0, unused_a0;
  assign unused_b0 = ^b0;
  assign unused_a0 = ^a0;
endmodule
