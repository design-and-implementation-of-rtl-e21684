// Two-input ternary AND (TAND): y = min(a, b).
//
// Built as a TNAND followed by an STI, the same cascade used for the
// transistor-level gate. With one input tied to the middle level 1 it clamps
// the other input to at most 1; the multipliers and half adder use it that
// way to turn a decoded 0/2 signal into a 0/1 signal. Structure and
// function follow the source paper.
// Purely combinational.
module tand
  import ternary_pkg::*;
(
  input  trit_t a,
  input  trit_t b,
  output trit_t y
);
  trit_t n;
  tnand u_nand (.a(a), .b(b), .y(n));
  sti   u_inv  (.a(n), .y(y));
endmodule
