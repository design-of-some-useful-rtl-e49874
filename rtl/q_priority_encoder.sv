// q_priority_encoder: quaternary 4-to-1 priority encoder, priority 3>2>1>0.
//
// Four active-high input lines. The output F gives the number of the
// highest-numbered line that is absolute high (3); all lower lines are
// then ignored. Each line is reduced to the literal in_i^3; the sum of
// products
//   F = h3.3 + ~h3.h2.2 + ~h3.~h2.h1.1     (~ = basic inverter, h_i = in_i^3)
// masks each line with the basic inverse of every higher-priority literal.
// Line 0 contributes the code 0, so it only matters through the buffer
// enable: an OR of the literals turns the output buffer on when any line
// is high and off (high impedance in the document's circuit) when none is.
//
// As in q_encoder, the tri-state pin `q` floats when no line is high, and
// `f`/`oe` give the same output in two-valued form (f held at 0 while the
// buffer is off). Only the value 3 counts as high, a choice of this design.
//
// Interface: in[3:0] (qudits) -> q (tri-state qudit pin), plus f (qudit)
// and oe (1 bit), the two-valued view of the same output.
// Timing: purely combinational.
module q_priority_encoder
  import qlogic_pkg::*;
(
  input  qudit_t [3:0] in,
  output qudit_t       f,
  output logic         oe,
  output tri   [1:0]   q
);

  qudit_t [3:0] hi;        // in_i^3
  qudit_t       mask;      // AND of the inverses of higher-priority literals
  qudit_t       code;
  qudit_t       any_hi;

  always_comb begin
    for (int unsigned i = 0; i < 4; i++) hi[i] = q_lit(in[i], Q3);
    code   = Q0;
    mask   = Q3;
    any_hi = Q0;
    for (int i = 3; i >= 0; i--) begin
      code   = q_or(code, q_and(q_and(mask, hi[i]), qudit_t'(i)));
      mask   = q_and(mask, q_not(hi[i]));
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
