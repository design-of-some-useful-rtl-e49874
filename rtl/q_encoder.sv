// q_encoder: quaternary 4-to-1 encoder with a tri-state output stage.
//
// Four active-high input lines; at most one is expected to be absolute
// high (3) at a time, and the output F gives that line's number (0..3).
// Each line is first reduced to the literal in_i^3 (3 when the line is at
// absolute high, 0 otherwise); F is the OR of (literal_i AND i). An OR of
// the literals drives the enable of the output buffer: when no line is
// high the buffer is off, which the document's circuit shows as a high
// impedance fifth output state.
//
// The output buffer is a real tri-state driver on `q`: its two wires float
// when no line is high. Next to it the block gives a two-valued view of
// the same output, the code `f` (held at 0 while the buffer is off) and the
// buffer enable `oe`, for logic that cannot read a floating net. Treating
// only the value 3 as "high" (1 and 2 count as low) is this design's
// choice. If several lines are high at once, F is the OR of their
// numbers, as with a plain binary encoder.
//
// Interface: in[3:0] (qudits) -> q (tri-state qudit pin), plus f (qudit)
// and oe (1 bit), the two-valued view of the same output.
// Timing: purely combinational.
module q_encoder
  import qlogic_pkg::*;
(
  input  qudit_t [3:0] in,
  output qudit_t       f,
  output logic         oe,
  output tri   [1:0]   q
);

  qudit_t [3:0] hi;       // in_i^3
  qudit_t       code;
  qudit_t       any_hi;   // OR of the literals, the buffer enable

  always_comb begin
    code   = Q0;
    any_hi = Q0;
    for (int unsigned i = 0; i < 4; i++) begin
      hi[i]  = q_lit(in[i], Q3);
      code   = q_or(code, q_and(hi[i], qudit_t'(i)));
      any_hi = q_or(any_hi, hi[i]);
    end
    oe = (any_hi == Q3);
    f  = oe ? code : Q0;
  end

  q_tristate_buffer u_out_buf (
    .en (oe),
    .a  (code),
    .y  (q)
  );

endmodule
