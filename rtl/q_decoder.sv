// q_decoder: hierarchical quaternary n-to-4^n decoder.
//
// N selector qudits select one of 4^N active-high output lines:
//   L[i_1 ... i_N] = s_1^i_1 AND s_2^i_2 AND ... AND s_N^i_N
// where s^i is 3 when s equals i and 0 otherwise. Each selector qudit has
// its own 1-to-4 decoder; every output line is the quaternary AND of one
// line from each of them, which is the hierarchical construction the
// decoder equation suggests. Since every literal is 0 or 3, the AND is 3
// only on the selected line.
//
// Line numbering (this design's choice): sel[0] is the least significant
// quaternary digit, so line j is selected when
// j = sel[0] + 4*sel[1] + 16*sel[2] + ...
//
// Parameter: N, the number of selector qudits (default 1, the 1-to-4
// decoder the document draws).
// Interface: sel[N-1:0] (qudits) -> line[4^N-1:0] (qudits, one-hot at 3).
// Timing: purely combinational.
module q_decoder
  import qlogic_pkg::*;
#(
  parameter int unsigned N = 1
) (
  input  qudit_t [N-1:0]      sel,
  output qudit_t [4**N-1:0]   line
);

  localparam int unsigned LINES = 4**N;

  // Literals s_k^i of every selector digit.
  qudit_t [N-1:0][3:0] lit;

  for (genvar k = 0; k < N; k++) begin : g_digit
    q_decoder_1to4 u_dec (
      .sel  (sel[k]),
      .line (lit[k])
    );
  end

  // AND of one literal per digit for every output line.
  for (genvar j = 0; j < LINES; j++) begin : g_line
    always_comb begin
      line[j] = Q3;
      for (int unsigned k = 0; k < N; k++) begin
        line[j] = q_and(line[j], lit[k][(j >> (2 * k)) & 3]);
      end
    end
  end

endmodule
