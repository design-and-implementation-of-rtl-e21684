// Ternary decoder: one trit in, three one-hot "unary" outputs.
//
// Output dK is at level 2 when the input equals K and at level 0 otherwise.
//   d0 = NTI(a)            high only for a = 0
//   d2 = NTI(PTI(a))       high only for a = 2
//   d1 = TNOR(d0, d2)      high when neither of the above, i.e. a = 1
// The decoded signals feed the sum-of-products expressions of the 1-trit
// multiplier and of the half adder. The gate structure follows the source
// paper's decoder schematic. Purely combinational.
module tdecoder
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t d0,
  output trit_t d1,
  output trit_t d2
);
  trit_t p;

  nti  u_n0  (.a(a),  .y(d0));
  pti  u_p   (.a(a),  .y(p));
  nti  u_n2  (.a(p),  .y(d2));
  tnor u_mid (.a(d0), .b(d2), .y(d1));
endmodule
