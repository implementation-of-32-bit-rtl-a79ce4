// gray_cell: prefix cell that computes a group generate only.
//
//   G_i:j = G_i:k + P_i:k * G_k-1:j
//
// A CPL AND forms P_i:k * G_k-1:j and its output is one input of a CPL OR
// whose other input is G_i:k. Used where the combined group reaches column 0
// (the carry-in column): there the group generate is the carry and no group
// propagate is needed.
//
// Interface: hi = upper (more significant) group G/P, g_lo = generate of the
// adjacent lower group; g = generate of the merged group. All dual-rail,
// combinational.
module gray_cell
  import cpl_pkg::*;
(
  input  pg_t   hi,
  input  rail_t g_lo,
  output rail_t g
);

  rail_t carried;  // P_i:k * G_k-1:j

  cpl_and u_and (.a(g_lo), .b(hi.p), .y(carried));
  cpl_or  u_or  (.a(carried), .b(hi.g), .y(g));

endmodule
