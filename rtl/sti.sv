// Simple ternary inverter (STI).
//
// Mirrors the level about the middle: 0 -> 2, 1 -> 1, 2 -> 0, i.e. y = 2 - a.
// This is the logic function of the multi-threshold, forced-stack inverter;
// the transistor circuit itself (and its power saving) has no RTL form.
// Truth table as given in the source paper. Purely combinational, no clock.
module sti
  import ternary_pkg::*;
(
  input  trit_t a,
  output trit_t y
);
  always_comb begin
    unique case (a)
      T0:      y = T2;
      T1:      y = T1;
      default: y = T0;
    endcase
  end

  always_comb assert (trit_ok(a)) else $error("sti: illegal trit code on input");
endmodule
