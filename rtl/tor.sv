// Two-input ternary OR (TOR): y = max(a, b).
//
// Built as a TNOR followed by an STI, the same cascade used for the
// transistor-level gate, as in the source paper. Purely combinational.
module tor
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t y
);
  trit_t n;
  tnor u_nor (.a(a), .b(b), .y(n));
  sti  u_inv (.a(n), .y(y));
endmodule
