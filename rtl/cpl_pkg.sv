// cpl_pkg: types and helpers shared by the Complementary Pass-Transistor
// Logic (CPL) Brent-Kung adder.
//
// In CPL every signal travels on two wires, the value and its complement.
// rail_t carries such a pair (t = true rail, f = complement rail); pg_t is a
// dual-rail group generate / group propagate pair, the quantity the prefix
// network of the adder combines. Swapping the two wires of a rail_t inverts
// it for free, which is how the CPL gates obtain inverted operands.
//
// The Brent-Kung placement helpers describe where the prefix network puts a
// cell: an up-sweep of log2(N) stages builds the 2-, 4-, 8-, ... bit groups,
// a down-sweep of log2(N)-1 stages fills in the remaining columns, giving
// 2*log2(N)-1 stages in all (9 for 32 columns). Column 0 holds the carry-in,
// so any group that reaches column 0 needs only its generate (a gray cell);
// every other group needs generate and propagate (a black cell).
package cpl_pkg;

  typedef struct packed {
    logic t;  // true rail
    logic f;  // complement rail
  } rail_t;

  typedef struct packed {
    rail_t g;  // group generate
    rail_t p;  // group propagate
  } pg_t;

  localparam rail_t RAIL0 = '{t: 1'b0, f: 1'b1};  // tied to ground / supply
  localparam rail_t RAIL1 = '{t: 1'b1, f: 1'b0};  // tied to supply / ground

  // Dual-rail encoding of a single-rail value (for testbenches and constants).
  function automatic rail_t to_rail(logic v);
    return '{t: v, f: ~v};
  endfunction

  // Logical inversion of a dual-rail signal: the two wires are crossed.
  function automatic rail_t swap_rail(rail_t r);
    return '{t: r.f, f: r.t};
  endfunction

  // Number of prefix stages of an N-column Brent-Kung tree.
  function automatic int bk_stages(int n);
    return 2 * $clog2(n) - 1;
  endfunction

  // Group-size level handled by stage s (1-based): up-sweep stages 1..L use
  // levels 1..L, down-sweep stages L+1..2L-1 use levels L-1..1.
  function automatic int bk_level(int n, int s);
    int l;
    l = $clog2(n);
    return (s <= l) ? s : 2 * l - s;
  endfunction

  // Distance from a cell's column to the column of its lower operand.
  function automatic int bk_offset(int n, int s);
    return 1 << (bk_level(n, s) - 1);
  endfunction

  // Does stage s hold a cell in column i?
  function automatic bit bk_has_cell(int n, int s, int i);
    int l;
    int lv;
    l  = $clog2(n);
    lv = bk_level(n, s);
    if (s <= l) return ((i + 1) % (1 << lv)) == 0;
    return (((i + 1) % (1 << lv)) == (1 << (lv - 1))) && ((i + 1) > (1 << lv));
  endfunction

  // Is that cell a gray cell (its group reaches column 0)?
  function automatic bit bk_is_gray(int n, int s, int i);
    if (s <= $clog2(n)) return (i + 1) == (1 << s);
    return 1'b1;
  endfunction

endpackage
