// Ternary multiplier top level.
//
// Two designs stand side by side, each with its own ports:
//  * the two-trit ternary multiplier (main design): pp = a * b, with a and b
//    two trits each and pp four trits, built from 1-trit logic-expression
//    multipliers and ternary half adders;
//  * the switch-steered one-trit multiplier: {s_pp1, s_pp0} = s_a * s_b.
// All trits use the 2-bit level code of ternary_pkg (0, 1, 2).
// Fully combinational: outputs follow inputs with gate delay only.
module ternary_mult_top
  import ternary_pkg::*;
(
  input  trit_t [1:0] a,
  input  trit_t [1:0] b,
  output trit_t [3:0] pp,
  input  trit_t       s_a,
  input  trit_t       s_b,
  output trit_t       s_pp0,
  output trit_t       s_pp1
);
  tmul2      u_mul2  (.a(a), .b(b), .pp(pp));
  tmul1_spmt u_mul1s (.a(s_a), .b(s_b), .pp0(s_pp0), .pp1(s_pp1));
endmodule
