// Shared types for the ternary (radix-3) multiplier library.
//
// Every ternary signal ("trit") takes one of three logic levels 0, 1 and 2.
// In silicon these are three voltage levels (0 V, VDD/2 and VDD); in this RTL
// a trit is carried on a two-bit binary code whose value equals the level.
// Code 2'b11 is not a level and never appears on a correctly driven net:
// modules that receive trits assert this. The binary code is this
// design's choice; the source paper works with the voltage levels directly.
package ternary_pkg;

  typedef enum logic [1:0] {
    T0 = 2'd0,  // low level
    T1 = 2'd1,  // middle level (VDD/2)
    T2 = 2'd2   // high level (VDD)
  } trit_t;

  // A trit is legal when it holds one of the three levels.
  function automatic logic trit_ok(logic [1:0] t);
    return t != 2'd3;
  endfunction

endpackage
