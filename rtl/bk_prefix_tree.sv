// bk_prefix_tree: Brent-Kung parallel-prefix carry network.
//
// Input is the bitwise generate/propagate of N columns, where column 0 holds
// the carry-in (G = cin, P = 0) and column i > 0 holds operand bit i. Output
// is the prefix generate G_i:0 of every column, which is the carry into the
// next bit.
//
// The tree has 2*log2(N)-1 stages (9 for N = 32). Up-sweep stage l
// (1 <= l <= log2 N) places a cell in every column i with (i+1) a multiple of
// 2^l, merging it with column i - 2^(l-1): this builds the 2-, 4-, 8-, 16-
// and 32-column groups, ending with G_31:0 at stage 5. Down-sweep stages
// then fill in the other columns, each merging a partial group with an
// already complete prefix 2^(l-1) columns below: G_23:0 at stage 6, G_11:0,
// G_19:0 and G_27:0 at stage 7, and so on down to the even columns at stage
// 9. A cell whose group reaches column 0 is a gray cell (generate only); the
// others are black cells. Columns without a cell at a stage are plain
// wires. The classic drawing of the tree puts drive buffers there, so that no
// cell drives more than two loads; like most implementations this one omits
// them, so a complete prefix such as G15:0 fans out to every cell that later
// merges with it (G31:0, G23:0, G19:0, G17:0, G16:0) and to the sum gate
// of bit 16.
//
// For a group reaching column 0 the propagate is not computed; it is 0,
// because P of the carry-in column is 0. Column 0 itself holds no cell: its
// output G0:0 is the carry-in, wired through.
//
// Parameter N: number of prefix columns, a power of two (32 for the 32-bit
// adder: carry-in plus operand bits 1..31; bit 32 is combined separately).
// Combinational, no clock or reset.
module bk_prefix_tree
  import cpl_pkg::*;
#(
  parameter int N = 32
) (
  input  pg_t   [N-1:0] pg_in,
  output rail_t [N-1:0] g_out
);

  localparam int STAGES = bk_stages(N);

  if (N < 2 || N != (1 << $clog2(N))) begin : g_bad_n
    $error("bk_prefix_tree: N must be a power of two, at least 2");
  end

  // lvl[s][i]: group G/P of column i after stage s; lvl[0] is the input.
  pg_t [N-1:0] lvl [STAGES+1];

  assign lvl[0] = pg_in;

  for (genvar s = 1; s <= STAGES; s++) begin : g_stage
    for (genvar i = 0; i < N; i++) begin : g_col
      if (bk_has_cell(N, s, i) && bk_is_gray(N, s, i)) begin : g_gray
        gray_cell u_cell (
          .hi  (lvl[s-1][i]),
          .g_lo(lvl[s-1][i - bk_offset(N, s)].g),
          .g   (lvl[s][i].g)
        );
        assign lvl[s][i].p = RAIL0;
      end else if (bk_has_cell(N, s, i)) begin : g_black
        black_cell u_cell (
          .hi(lvl[s-1][i]),
          .lo(lvl[s-1][i - bk_offset(N, s)]),
          .pg(lvl[s][i])
        );
      end else begin : g_wire
        assign lvl[s][i] = lvl[s-1][i];
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_out_col
    assign g_out[i] = lvl[STAGES][i].g;
  end

endmodule
