// Negative ternary inverter (NTI).
//
// Output is high (2) only for an input of 0 and low (0) otherwise:
// 0 -> 2, 1 -> 0, 2 -> 0. Its output uses only levels 0 and 2.
// Truth table as given in the source paper.
// Logic function of the forced-stack NTI; purely combinational.
module nti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);
  always_comb y = (a == T0) ? T2 : T0;

  always_comb assert (trit_ok(a)) else $error("nti: illegal trit code on input");
endmodule
