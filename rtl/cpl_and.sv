// cpl_and: dual-rail AND gate in Complementary Pass-Transistor Logic.
//
// B selects, A and the constant 0 are passed:
//   Y  = A  * B + 0 * B'
//   Y' = A' * B + 1 * B'
// Built from one cpl_cell (two pass multiplexers and two restoring
// inverters); the constants are tied to ground and supply.
//
// Interface: dual-rail a, b -> dual-rail y = a & b. Combinational.
module cpl_and
  import cpl_pkg::*;
(
  input  rail_t a,
  input  rail_t b,
  output rail_t y
);

  cpl_cell u_cell (.s(b), .d1(a), .d0(RAIL0), .y(y));

endmodule
