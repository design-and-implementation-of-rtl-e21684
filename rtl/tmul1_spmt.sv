// One-trit ternary multiplier steered by switches.
//
// Same function as tmul1 (PP1 PP0 = A*B in radix 3) with far fewer gates:
// the ternary AND of the operands, m = min(A,B), already tells the product
// digit in most cases, and switches pick the outputs from it.
//   m = 0 : either operand is 0, product 0
//   m = 1 : one operand is 1, product digit = max(A,B) (1*1 = 1, 1*2 = 2)
//   m = 2 : both are 2, 2*2 = (11)_3, digit 1 and carry 1
// PP0 comes from a triple-throw switch steered by m whose throws are 0,
// TOR(A,B) and the constant 1. PP1 comes from a double-throw switch whose
// control NTI(PTI(m)) is high only when m = 2, choosing between 0 and 1.
// Steering a switch by the ternary AND and switching the carry between 0 and
// 1 follow the source paper; the exact throw assignment and the use of a TOR
// for the middle throw are this design's choices. Purely combinational.
module tmul1_spmt
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t pp0,  // product trit, weight 3^0
  output trit_t pp1   // carry trit, weight 3^1 (0 or 1)
);
  trit_t m, mx, p, c_sel;
  trit_t pp0_throws [3];
  trit_t pp1_throws [2];

  tand u_and (.a(a), .b(b), .y(m));
  tor  u_or  (.a(a), .b(b), .y(mx));

  assign pp0_throws[0] = T0;
  assign pp0_throws[1] = mx;
  assign pp0_throws[2] = T1;
  spmt_switch #(.THROWS(3)) u_sptt (.sel(m), .throws(pp0_throws), .y(pp0));

  pti u_pti (.a(m), .y(p));
  nti u_nti (.a(p), .y(c_sel));
  assign pp1_throws[0] = T0;
  assign pp1_throws[1] = T1;
  spmt_switch #(.THROWS(2)) u_spdt (.sel(c_sel), .throws(pp1_throws), .y(pp1));
endmodule
