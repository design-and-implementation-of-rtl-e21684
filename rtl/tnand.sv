// Two-input ternary NAND (TNAND).
//
// y = 2 - min(a, b): the simple-inverted ternary minimum. It is the primary
// gate from which the ternary AND is built (TAND = STI after TNAND).
// Truth table as given in the source paper.
// Logic function of the forced-stack TNAND; purely combinational.
module tnand
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t y
);
  logic [1:0] m;
  always_comb begin
    m = (a < b) ? a : b;
    y = trit_t'(2'd2 - m);
  end

  always_comb assert (trit_ok(a) && trit_ok(b)) else $error("tnand: illegal trit code on input");
endmodule
