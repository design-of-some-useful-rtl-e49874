// q_equality: quaternary equality operator.
//
// Compares two qudits and returns absolute high (3) when they are
// identical and absolute low (0) when they differ. It is built from the
// quaternary operators: x = a XNOR b is 3 exactly when a == b; then
// x AND bitswap(x) keeps 3 for x = 3 and gives 0 for x = 0, 1 or 2 (for the
// asymmetrical 1 and 2, bitswap gives the other one and the AND is 0).
// The function is the one of the document; this particular gate network is
// this design's choice among the possible circuits.
//
// Interface: a, b (one qudit each) -> eq (one qudit, 0 or 3).
// Timing: purely combinational.
module q_equality
  import qlogic_pkg::*;
(
  input  qudit_t a,
  input  qudit_t b,
  output qudit_t eq
);

  qudit_t same;     // 3 where a and b agree bit for bit
  qudit_t swapped;

  always_comb begin
    same    = q_not(q_xor(a, b));
    swapped = q_bitswap(same);
    eq      = q_and(same, swapped);
  end

endmodule
