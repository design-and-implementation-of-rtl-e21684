// Positive ternary inverter (PTI).
//
// Output is high (2) for any input below the high level and low (0) only for
// an input of 2: 0 -> 2, 1 -> 2, 2 -> 0. Its output uses only levels 0 and 2.
// Truth table as given in the source paper.
// Logic function of the forced-stack PTI; purely combinational.
module pti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);
  always_comb y = (a == T2) ? T0 : T2;

  always_comb assert (trit_ok(a)) else $error("pti: illegal trit code on input");
endmodule
