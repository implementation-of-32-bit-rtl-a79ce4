// cpl_or: dual-rail OR gate in Complementary Pass-Transistor Logic.
//
// B selects, the constant 1 and A are passed:
//   Y  = 1 * B + A  * B'
//   Y' = 0 * B + A' * B'
// Built from one cpl_cell; the constants are tied to supply and ground.
//
// Interface: dual-rail a, b -> dual-rail y = a | b. Combinational.
module cpl_or
  import cpl_pkg::*;
(
  input  rail_t a,
  input  rail_t b,
  output rail_t y
);

  cpl_cell u_cell (.s(b), .d1(RAIL1), .d0(a), .y(y));

endmodule
