# Quaternary logic blocks built on an extended Boolean algebra

This is a library of combinational building blocks for four-valued
(quaternary) logic: an operator unit, an equality operator, decoders,
demultiplexers, multiplexers, an encoder and a priority encoder. The main
idea is that a quaternary digit (a *qudit*, value 0..3) is treated as its
2-bit binary equivalent. The basic quaternary operators then act bitwise,
exactly like Boolean ones. Three extra unary operators supply what bitwise
logic lacks. Because of that, every block below has the same structure as
its binary counterpart. A pair of ordinary binary signals ("coupled
binary") can be fed in as one qudit without conversion.

All blocks are purely combinational: there is no clock and no reset.
Every port is an ordinary two-valued SystemVerilog signal except the two
encoder output pins, which are real tri-state nets.

## Qudits and the operator set

`qlogic_pkg` defines `qudit_t` (`logic [1:0]`), the constants `Q0`..`Q3`
and one function per operator. All other files use these functions.

States 0 (`00`) and 3 (`11`) are *symmetrical*: swapping their two bits
leaves them unchanged. States 1 and 2 are *asymmetrical*. The value 3 is
"absolute high" and 0 is "absolute low".

**Basic operators** are bitwise on the binary equivalent: AND, OR, XOR,
the basic inverter NOT (which gives `3 - a`), and NAND, NOR, XNOR. For
example, `1 AND 2 = 0` and `1 OR 2 = 3`. All Boolean laws still hold,
including commutativity, associativity, distributivity and De Morgan.

**Special operators** are unary. They are what makes the algebra more
than two binary wires side by side:

| a | basic NOT | inward (half) inverter | outward (full) inverter | binary bitswap |
|---|-----------|------------------------|-------------------------|----------------|
| 0 | 3 | 2 | 3 | 0 |
| 1 | 2 | 2 | 3 | 2 |
| 2 | 1 | 1 | 0 | 1 |
| 3 | 0 | 1 | 0 | 3 |

- The inward inverter maps the lower half {0,1} to 2 and the upper half
  {2,3} to 1. In operator form it is `NOT(a) AND 2` for `a < 2`, and
  `NOT(a) OR 1` for `a > 1`.
- The outward inverter maps the lower half to 3 and the upper half to 0.
  It is a threshold detector: it gives 3 exactly when the MSB is 0.
- Bitswap exchanges the two bits. Symmetrical states stay fixed and 1 and
  2 change places.

Unlike basic NOT, neither the inward nor the outward inverter undoes
itself. Bitswap does. Bitswap also combines with AND/OR to give useful
detectors:

- `bitswap(a) AND a` is 3 only for `a = 3`.
- `bitswap(a) OR a` is 0 only for `a = 0`.
- `bitswap(a) XOR a` is 3 for the asymmetrical states and 0 for the
  symmetrical ones.

**Compound gates.** Each special operator also comes in NAND, NOR and
XNOR versions (the bitswap versions are AND, OR and XOR). Here a compound
gate is the special operator applied to the basic gate's output. For
example, inward NAND is `inward(a AND b)` and outward NOR is
`outward(a OR b)`. This reading matches the identity
`outward(a OR b) = outward(a) AND outward(b)` and its bitswap counterpart.
It is an interpretation; the source material gives only the symbol names.

`q_gate` provides all 19 operators in one cell. The 5-bit `op` input
(`q_op_e`) chooses the operator. Unary operators use `a` and ignore `b`.
Codes 19-31 give 0.

## The equality operator and the literal `s^i`

`q_equality` returns 3 when its two qudits are equal and 0 otherwise. It
is built from the operators above rather than a comparator:

    x  = a XNOR b          -- 3 exactly when a == b; otherwise 0, 1 or 2
    eq = x AND bitswap(x)  -- keeps 3, sends 0/1/2 to 0

The second line is the `bitswap(a) AND a` detector from the previous
section. Other circuits give the same function, and this one was chosen
here.

The decoder equations use the **literal** `s^i`: the equality of `s` with
the constant `i`. It is 3 when `s == i` and 0 otherwise (`q_lit` in the
package). Because a literal is always 0 or 3 (all zeros or all ones), it
works as a mask. ANDing it with a qudit passes the qudit or clears it.
Every selection block below depends on this.

## Decoders

`q_decoder_1to4` has four lines, and line `i` is `s^i`. It is four
equality operators against the constants 0..3, so exactly one line is 3.

`q_decoder #(N)` is the n-to-4^n decoder:

    L[i_1 .. i_N] = s_1^i_1 AND s_2^i_2 AND ... AND s_N^i_N

It is hierarchical. There is one `q_decoder_1to4` per selector qudit, and
each output line ANDs one literal from each of them. `sel[0]` is the least
significant digit, so line `j` is chosen by
`j = sel[0] + 4*sel[1] + 16*sel[2] + ...`. This numbering is a choice of
this design. `N` defaults to 1, the 1-to-4 decoder.

## Demultiplexer and multiplexer

`q_demux #(N)` is the decoder with every line ANDed with the data qudit:
`L_j = d AND dec_j`. The selected line is 3 (all ones), so it carries `d`
unchanged, and every other line is 0. With the 1-to-4 default, selector
value `k` puts `d` on line `k`.

`q_mux #(N)` is the same decoder used in sum-of-products form. Each
decoder line is ANDed with its data line, and all the products are ORed:

    y = OR_j ( dec_j AND d_j )   -- N = 1: d0.s^0 + d1.s^1 + d2.s^2 + d3.s^3

Only one product is non-zero, so `y` is the selected data qudit. Data
indexing follows the decoder's line numbering.

## Encoders and the fifth output state

An encoder's output has five states: the four qudit values, plus high
impedance when no input line is high. An input line counts as high only
when it is exactly 3; 1 and 2 count as low (a choice of this design).
Each line is first reduced to its literal `h_i = in_i^3`.

- `q_encoder` (4-to-1) assumes that at most one line is high. Its code is
  `F = OR_i (h_i AND i)`. If several lines are high, `F` is the OR of
  their numbers, as with a plain binary encoder.
- `q_priority_encoder` (4-to-1, priority 3 > 2 > 1 > 0) masks each line
  with the basic inverse of every higher literal. High-priority lines win
  and the rest are ignored:

      F = h3.3 + ~h3.h2.2 + ~h3.~h2.h1.1

  Line 0 adds the code 0, so it matters only through the buffer enable.

In both encoders, an OR of the literals drives the enable of a
`q_tristate_buffer`, whose output is the pin `q`. When no line is high,
both wires of `q` float. For logic that cannot read a floating net, each
encoder also gives the same result in two-valued form: the code `f` (held
at 0 while the buffer is off) and the enable `oe`. Those two ports are an
addition of this design.

## Top level

The blocks are independent designs that share one algebra; nothing ties
them into a single datapath. `q_logic_top` therefore places one of each
side by side, each with its own prefixed ports (`gate_*`, `eq_*`,
`dec_*`, `demux_*`, `mux_*`, `enc_*`, `penc_*`). The parameters `DEC_N`,
`DEMUX_N` and `MUX_N` set the selector widths in qudits. All three default
to 1: the 1-to-4 decoder and demultiplexer and the 4-to-1 multiplexer.
The decoder inside the demultiplexer and multiplexer is the same
hierarchical `q_decoder`, so their 1-to-4 building block is
`q_decoder_1to4` in every case.

## Verification

Each module has a self-checking testbench in `tb/`. Expected values are
computed independently of the design: hand-written truth tables in the
operator test, and integer arithmetic everywhere else.

- `tb_q_gate` runs every operator code (all 32, unused ones included)
  over every operand pair. It also checks the identities of the special
  operators: the bitswap detectors, the inward/outward combinations, and
  `bitswap(inward(a))`.
- `tb_q_equality`, `tb_q_decoder_1to4`, `tb_q_encoder`,
  `tb_q_priority_encoder` and `tb_q_tristate_buffer` are exhaustive.
- `tb_q_decoder` checks N = 1, 2 and 3 exhaustively. `tb_q_demux` checks
  N = 1 and 2 exhaustively. `tb_q_mux` checks N = 1 exhaustively and
  N = 2 on random data with every selector.
- The encoder and buffer tests attach a pull-up and a pull-down to the
  tri-state pin. A floating pin therefore reads 3 and 0, which tells it
  apart from a driven one in a two-valued simulator.
- `tb_q_logic_top` drives the whole top at its default parameters with
  4000 random vectors. It checks every output against a reference model.
  It also counts coverage and fails if something never happened: every
  operator used, equality true and false, every decoder, demultiplexer
  and multiplexer line selected, each encoder's pin floating and driven,
  and the priority encoder overriding a lower high line.

Every testbench ends with a line `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the repository root:

    verilator --binary --timing --assert -Wno-fatal rtl/qlogic_pkg.sv rtl/q_*.sv \
        tb/tb_q_logic_top.sv --top-module tb_q_logic_top
    ./obj_dir/Vtb_q_logic_top

To run another testbench, replace the testbench file and `--top-module`.
The package must come first on the command line. `-Wno-fatal` keeps the
testbenches' width-extension lint warnings from stopping the build. Each
testbench finishes in well under a second.

## Where this design departs from, or goes beyond, its description

- **Bit-level circuits are this design's own.** The equality operator, the
  encoder gate networks and the compound gates were specified only by
  their function or name. The circuits here are the simplest ones built
  from the operator set.
- **Two-valued encoder outputs.** `f` and `oe` sit next to the tri-state
  pin `q`.
- **"High" means exactly 3** at the encoder inputs.
- **Operator unit.** The operators are packaged as one cell with an
  operator-select input rather than as separate gates.
- **Selector digit order** (`sel[0]` least significant) in the larger
  decoders, demultiplexers and multiplexers.
- The blocks are modelled at the logic level only, on binary-encoded
  qudits. Multi-level voltage circuits that would carry a qudit on one
  wire are outside the scope of this RTL.
