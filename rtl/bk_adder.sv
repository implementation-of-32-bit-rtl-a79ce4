// bk_adder: WIDTH-bit Brent-Kung adder in Complementary Pass-Transistor Logic.
//
// The adder works in three steps, all in dual-rail CPL gates:
//   1. Input inverters form the complement rail of every operand bit and of
//      the carry-in; pg_cell forms G_i = A_i*B_i and P_i = A_i xor B_i.
//   2. bk_prefix_tree combines the carry-in (column 0: G = cin, P = 0) with
//      bits 1..WIDTH-1 and returns every carry G_i:0 in 2*log2(WIDTH)-1
//      stages of gray and black cells.
//   3. A CPL EXOR per bit forms S_i = P_i xor G_i-1:0, and one extra gray
//      cell forms the carry-out G_WIDTH:0 = G_WIDTH + P_WIDTH * G_WIDTH-1:0,
//      in parallel with the down-sweep of the tree.
// Bit numbering: port bit k is operand bit k+1 in the 1-based numbering of
// the adder's columns (a[0] is bit 1, a[31] is bit 32; sum[31] is sum bit 32).
// The longest logic path is a[0] -> G1:0 -> G3:0 -> G7:0 -> G15:0 -> G31:0
// -> sum[31]. The output complements (sum_n, cout_n) are the second CPL rail.
//
// Following the published design: the three steps, the cell types, the tree
// shape and the carry-in handling. This design's own choices: single-rail
// ports with inverters for the input complements, and bringing both output
// rails out.
//
// Parameter WIDTH: operand width, a power of two (32; 16 gives the smaller
// adder the 32-bit one was extended from). Purely combinational: no clock,
// no reset, results valid one propagation delay after the inputs.
module bk_adder
  import cpl_pkg::*;
#(
  parameter int WIDTH = 32
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] sum_n,
  output logic             cout,
  output logic             cout_n
);

  rail_t [WIDTH-1:0] a_r, b_r, sum_r;
  rail_t             cin_r, cout_r;
  pg_t   [WIDTH:0]   bit_pg;  // column 0 = carry-in, column i = operand bit i
  rail_t [WIDTH-1:0] carry;   // carry[i] = G_i:0

  // Complement rails of the primary inputs.
  assign cin_r.t = cin;
  cpl_not u_inv_cin (.a(cin), .y(cin_r.f));

  for (genvar k = 0; k < WIDTH; k++) begin : g_in
    assign a_r[k].t = a[k];
    assign b_r[k].t = b[k];
    cpl_not u_inv_a (.a(a[k]), .y(a_r[k].f));
    cpl_not u_inv_b (.a(b[k]), .y(b_r[k].f));
  end

  // Step 1: bitwise generate / propagate.
  assign bit_pg[0] = '{g: cin_r, p: RAIL0};
  for (genvar i = 1; i <= WIDTH; i++) begin : g_pg
    pg_cell u_pg (.a(a_r[i-1]), .b(b_r[i-1]), .pg(bit_pg[i]));
  end

  // Step 2: carries.
  bk_prefix_tree #(.N(WIDTH)) u_tree (
    .pg_in(bit_pg[WIDTH-1:0]),
    .g_out(carry)
  );

  // Step 3: sums and carry-out.
  for (genvar i = 1; i <= WIDTH; i++) begin : g_sum
    cpl_xor u_sum (.a(carry[i-1]), .b(bit_pg[i].p), .y(sum_r[i-1]));
    assign sum[i-1]   = sum_r[i-1].t;
    assign sum_n[i-1] = sum_r[i-1].f;
  end

  gray_cell u_cout (.hi(bit_pg[WIDTH]), .g_lo(carry[WIDTH-1]), .g(cout_r));
  assign cout   = cout_r.t;
  assign cout_n = cout_r.f;

endmodule
