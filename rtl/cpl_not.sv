// cpl_not: static CMOS inverter (NOT gate).
//
// In the CPL adder this gate is the level-restoring output stage of every
// pass-transistor gate: an nMOS pass network cannot pass a full logic 1, so
// each output rail is driven through an inverter that restores a full swing.
// Two of them in series form the adder's buffer cell.
//
// Interface: a -> y = ~a. Purely combinational, no clock or reset.
module cpl_not (
  input  logic a,
  output logic y
);

  always_comb y = ~a;

endmodule
