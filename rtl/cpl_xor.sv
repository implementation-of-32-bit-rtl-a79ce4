// cpl_xor: dual-rail exclusive-OR gate in Complementary Pass-Transistor Logic.
//
// B selects, A is passed in either polarity:
//   Y  = A' * B + A  * B'
//   Y' = A  * B + A' * B'
// The inverted operand costs nothing: the two rails of A are crossed.
// Used for the bitwise propagate P = A xor B and for the sum S = P xor C.
//
// Interface: dual-rail a, b -> dual-rail y = a ^ b. Combinational.
module cpl_xor
  import cpl_pkg::*;
(
  input  rail_t a,
  input  rail_t b,
  output rail_t y
);

  cpl_cell u_cell (.s(b), .d1(swap_rail(a)), .d0(a), .y(y));

endmodule
