// cpl_cell: the generic Complementary Pass-Transistor Logic gate.
//
// A CPL gate is two nMOS pass-transistor 2:1 multiplexers that share a
// dual-rail select. The true select rail s.t gates the transistor that passes
// d1, the complement rail s.f gates the one that passes d0. Each multiplexer
// drives an internal node of the opposite polarity, and a restoring inverter
// (cpl_not) turns that node into an output rail:
//
//   Y  = d1  * S + d0  * S'
//   Y' = d1' * S + d0' * S'
//
// AND, OR and EXOR are this same cell with different pass inputs, which is
// why every CPL gate has the same transistor count. The inverter on each rail
// follows the adder's published structure. Writing each pass network as a
// sum of products of its two transistors is this model's choice. It gives the
// right value whenever the select rails are complementary.
//
// Interface: dual-rail select s, data d1 (passed when s = 1), d0 (passed when
// s = 0); dual-rail result y. Combinational, no clock or reset.
module cpl_cell
  import cpl_pkg::*;
(
  input  rail_t s,
  input  rail_t d1,
  input  rail_t d0,
  output rail_t y
);

  logic node_t;  // pass-network node feeding the true-rail inverter
  logic node_f;  // pass-network node feeding the complement-rail inverter

  always_comb begin
    node_t = (s.t & d1.f) | (s.f & d0.f);
    node_f = (s.t & d1.t) | (s.f & d0.t);
  end

  cpl_not u_restore_t (.a(node_t), .y(y.t));
  cpl_not u_restore_f (.a(node_f), .y(y.f));

endmodule
