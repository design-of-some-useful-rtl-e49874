// q_demux: quaternary 1-to-4^n demultiplexer.
//
// The data qudit d is passed to the output line chosen by the N selector
// qudits; every other line is 0:
//   L[i_1 ... i_N] = d AND s_1^i_1 AND ... AND s_N^i_N
// It is an n-to-4^n decoder whose outputs are each ANDed with d. Because a
// selected decoder line is 3 (all ones) the AND passes d unchanged, and an
// unselected line (0) forces 0.
//
// Parameter: N selector qudits (default 1: the 1-to-4 demultiplexer).
// Interface: d (qudit), sel[N-1:0] -> line[4^N-1:0]. Line numbering as in
// q_decoder (sel[0] least significant).
// Timing: purely combinational.
module q_demux
  import qlogic_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  qudit_t                d,
  input  qudit_t [N-1:0]        sel,
  output qudit_t [4**N-1:0]     line
);

  qudit_t [4**N-1:0] dec;

  q_decoder #(.N(N)) u_dec (
    .sel  (sel),
    .line (dec)
  );

  always_comb begin
    for (int unsigned j = 0; j < 4**N; j++) line[j] = q_and(d, dec[j]);
  end

endmodule
