// q_gate: quaternary operator unit covering the whole gate library.
//
// One combinational two-input cell that computes any of the 19 quaternary
// operators, chosen by `op` (qlogic_pkg::q_op_e): the basic operators AND,
// OR, XOR and basic NOT/NAND/NOR/XNOR, which act bitwise on the 2-bit binary
// equivalent of each qudit; the special unary operators inward inverter,
// outward inverter and binary bitswap; and the compound gates that put a
// special operator after AND, OR or XOR. Unary operators take `a` and
// ignore `b`. Operator codes above 18 give 0.
//
// Interface: op (5 bits), a, b (one qudit each) -> y (one qudit).
// Timing: purely combinational, no clock.
// The operator truth tables follow the quaternary algebra described above;
// packing them behind one operator-select input is this design's choice,
// as is the reading of the compound gates (special operator applied to the
// basic gate's output).
module q_gate
  import qlogic_pkg::*;
(
  input  q_op_e  op,
  input  qudit_t a,
  input  qudit_t b,
  output qudit_t y
);

  always_comb y = q_apply(op, a, b);

endmodule
