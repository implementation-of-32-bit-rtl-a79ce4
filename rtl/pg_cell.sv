// pg_cell: bitwise generate / propagate (the adder's pre-processing stage).
//
//   G_i:i = A_i * B_i     (CPL AND)
//   P_i:i = A_i xor B_i   (CPL EXOR)
//
// One per operand bit; its outputs feed the Brent-Kung prefix network and,
// for P, the sum EXOR of the same bit.
//
// Interface: dual-rail a, b -> dual-rail pg. Combinational.
module pg_cell
  import cpl_pkg::*;
(
  input  rail_t a,
  input  rail_t b,
  output pg_t   pg
);

  cpl_and u_gen  (.a(a), .b(b), .y(pg.g));
  cpl_xor u_prop (.a(a), .b(b), .y(pg.p));

endmodule
