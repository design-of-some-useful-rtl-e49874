// q_tristate_buffer: tri-state output buffer for one qudit.
//
// When `en` is high the buffer drives the qudit `a` onto `y`; when it is
// low both wires of `y` float (high impedance), which gives a quaternary
// output line its fifth state. It is the final stage of the encoders.
// `y` is a resolved net so that several buffers, a pull-up or a pull-down
// may share it.
//
// Interface: en (1 bit), a (qudit) -> y (2-wire tri-state net).
// Timing: purely combinational.
module q_tristate_buffer
  import qlogic_pkg::*;
(
  input  logic        en,
  input  qudit_t      a,
  output tri   [1:0]  y
);

  assign y = en ? a : 2'bzz;

endmodule
