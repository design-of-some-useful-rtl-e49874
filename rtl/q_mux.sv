// q_mux: quaternary 4^n-to-1 multiplexer.
//
// The N selector qudits choose one of 4^N data qudits and pass it to the
// output. The circuit is in sum-of-products form: an n-to-4^n decoder
// produces the select lines L_j (3 on the chosen line, 0 elsewhere), each
// is ANDed with its data line, and the products are ORed:
//   M = OR_j ( L_j AND d_j );  for N = 1: M = d0.s^0 + d1.s^1 + d2.s^2 + d3.s^3
//
// Parameter: N selector qudits (default 1: the 4-to-1 multiplexer).
// Interface: d[4^N-1:0] (qudits), sel[N-1:0] -> y (qudit). Data index as
// in q_decoder (sel[0] least significant).
// Timing: purely combinational.
module q_mux
  import qlogic_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  qudit_t [4**N-1:0]  d,
  input  qudit_t [N-1:0]     sel,
  output qudit_t             y
);

  qudit_t [4**N-1:0] dec;

  q_decoder #(.N(N)) u_dec (
    .sel  (sel),
    .line (dec)
  );

  always_comb begin
    y = Q0;
    for (int unsigned j = 0; j < 4**N; j++) y = q_or(y, q_and(dec[j], d[j]));
  end

endmodule
