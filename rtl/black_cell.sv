// black_cell: prefix cell that computes group generate and group propagate.
//
//   G_i:j = G_i:k + P_i:k * G_k-1:j   (a gray cell)
//   P_i:j = P_i:k * P_k-1:j           (one more CPL AND)
//
// Used for groups that do not reach the carry-in column, whose propagate is
// still needed further down the prefix tree.
//
// Interface: hi = upper group G/P, lo = adjacent lower group G/P; pg = merged
// group G/P. All dual-rail, combinational.
module black_cell
  import cpl_pkg::*;
(
  input  pg_t hi,
  input  pg_t lo,
  output pg_t pg
);

  gray_cell u_gen  (.hi(hi), .g_lo(lo.g), .g(pg.g));
  cpl_and   u_prop (.a(lo.p), .b(hi.p), .y(pg.p));

endmodule
