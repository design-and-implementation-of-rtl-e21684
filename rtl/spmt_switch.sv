// Single pole multiple throw (SPMT) switch.
//
// Connects one of THROWS input levels to the output, steered by a ternary
// control level: level k selects throw k, and a level at or above THROWS-1
// selects the last throw. With THROWS = 3 it is a single pole triple throw
// (SPTT) switch steered by all three levels; with THROWS = 2 it is a single
// pole double throw (SPDT) switch whose control is a 0/2 level. The level
// mapping of the control is this design's choice. Purely combinational.
module spmt_switch
  import ternary_pkg::*;
#(
  parameter int unsigned THROWS = 3  // 2 (SPDT) or 3 (SPTT)
) (
  input  trit_t sel,
  input  trit_t throws [THROWS],
  output trit_t y
);
  initial assert (THROWS >= 2 && THROWS <= 3) else $fatal(1, "spmt_switch: THROWS must be 2 or 3");

  always_comb begin
    if (int'(sel) >= THROWS - 1) y = throws[THROWS-1];
    else                         y = throws[int'(sel)];
  end

  always_comb assert (trit_ok(sel)) else $error("spmt_switch: illegal control level");
endmodule
