// q_decoder_1to4: quaternary 1-to-4 decoder.
//
// One selector qudit s drives four active-high output lines: line i is
// absolute high (3) when s equals i and 0 otherwise, i.e. L_i = s^i. Each
// line is one equality operator comparing s with the constant i, as in the
// document's decoder built from equality blocks. Exactly one line is high
// for every selector value.
//
// Interface: sel (one qudit) -> line[3:0] (four qudits, one-hot at 3).
// Timing: purely combinational.
module q_decoder_1to4
  import qlogic_pkg::*;
(
  input  qudit_t         sel,
  output qudit_t [3:0]   line
);

  for (genvar i = 0; i < 4; i++) begin : g_line
    q_equality u_eq (
      .a  (sel),
      .b  (qudit_t'(i)),
      .eq (line[i])
    );
  end

endmodule
