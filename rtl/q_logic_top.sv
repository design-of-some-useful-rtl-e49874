// q_logic_top: the quaternary logic blocks side by side.
//
// The design is a small library of combinational blocks for a four-valued
// (quaternary) logic whose qudits are carried as 2-bit binary equivalents.
// The blocks do not feed each other, so this top places one of each next
// to the others, every block with its own ports:
//   - a quaternary operator unit (every gate of the library, by op code)
//   - an equality operator
//   - an n-to-4^n decoder (built from 1-to-4 decoders, themselves built
//     from equality operators)
//   - a 1-to-4^n demultiplexer and a 4^n-to-1 multiplexer, each around its
//     own decoder
//   - a 4-to-1 encoder and a 4-to-1 priority encoder, each ending in a
//     tri-state output pin (enc_q, penc_q) that floats when no input line
//     is high; enc_f/enc_oe and penc_f/penc_oe give the same output in
//     two-valued form
//
// Parameters: DEC_N, DEMUX_N, MUX_N, the selector widths in qudits of the
// decoder, demultiplexer and multiplexer (default 1, the 1-to-4 and 4-to-1
// blocks of the document).
// Timing: purely combinational; no clock or reset.
module q_logic_top
  import qlogic_pkg::*;
#(
  parameter int unsigned DEC_N   = 1,
  parameter int unsigned DEMUX_N = 1,
  parameter int unsigned MUX_N   = 1
) (
  // operator unit
  input  q_op_e                      gate_op,
  input  qudit_t                     gate_a,
  input  qudit_t                     gate_b,
  output qudit_t                     gate_y,
  // equality operator
  input  qudit_t                     eq_a,
  input  qudit_t                     eq_b,
  output qudit_t                     eq_y,
  // decoder
  input  qudit_t [DEC_N-1:0]         dec_sel,
  output qudit_t [4**DEC_N-1:0]      dec_line,
  // demultiplexer
  input  qudit_t                     demux_d,
  input  qudit_t [DEMUX_N-1:0]       demux_sel,
  output qudit_t [4**DEMUX_N-1:0]    demux_line,
  // multiplexer
  input  qudit_t [4**MUX_N-1:0]      mux_d,
  input  qudit_t [MUX_N-1:0]         mux_sel,
  output qudit_t                     mux_y,
  // encoder
  input  qudit_t [3:0]               enc_in,
  output qudit_t                     enc_f,
  output logic                       enc_oe,
  output tri   [1:0]                 enc_q,
  // priority encoder
  input  qudit_t [3:0]               penc_in,
  output qudit_t                     penc_f,
  output logic                       penc_oe,
  output tri   [1:0]                 penc_q
);

  q_gate u_gate (
    .op (gate_op),
    .a  (gate_a),
    .b  (gate_b),
    .y  (gate_y)
  );

  q_equality u_equality (
    .a  (eq_a),
    .b  (eq_b),
    .eq (eq_y)
  );

  q_decoder #(.N(DEC_N)) u_decoder (
    .sel  (dec_sel),
    .line (dec_line)
  );

  q_demux #(.N(DEMUX_N)) u_demux (
    .d    (demux_d),
    .sel  (demux_sel),
    .line (demux_line)
  );

  q_mux #(.N(MUX_N)) u_mux (
    .d    (mux_d),
    .sel  (mux_sel),
    .y    (mux_y)
  );

  q_encoder u_encoder (
    .in (enc_in),
    .f  (enc_f),
    .oe (enc_oe),
    .q  (enc_q)
  );

  q_priority_encoder u_priority_encoder (
    .in (penc_in),
    .f  (penc_f),
    .oe (penc_oe),
    .q  (penc_q)
  );

endmodule
