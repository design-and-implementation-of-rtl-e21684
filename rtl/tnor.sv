// Two-input ternary NOR (TNOR).
//
// y = 2 - max(a, b): the simple-inverted ternary maximum. It is the primary
// gate from which the ternary OR is built (TOR = STI after TNOR) and the
// middle-level detector of the ternary decoder.
// Truth table as given in the source paper.
// Logic function of the forced-stack TNOR; purely combinational.
module tnor
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t y
);
  logic [1:0] m;
  always_comb begin
    m = (a > b) ? a : b;
    y = trit_t'(2'd2 - m);
  end

  always_comb assert (trit_ok(a) && trit_ok(b)) else $error("tnor: illegal trit code on input");
endmodule
