// qlogic_pkg: types, constants and operator functions of the quaternary logic.
//
// A qudit holds one of the four states 0..3 and is carried as its 2-bit
// binary equivalent (00, 01, 10, 11), so a pair of ordinary binary signals
// ("coupled binary") is a qudit as it stands. States 0 and 3 are symmetrical
// (swapping the two bits leaves them unchanged); 1 and 2 are asymmetrical.
//
// The basic operators (AND, OR, XOR, basic NOT and their NAND/NOR/XNOR
// derivatives) act bitwise on the two bits, exactly as Boolean operators.
// The special unary operators are:
//   inward (half) inverter  : 0,1 -> 2 and 2,3 -> 1
//   outward (full) inverter : 0,1 -> 3 and 2,3 -> 0
//   binary bitswap          : swaps the two bits (1 <-> 2, 0 and 3 fixed)
// The compound gates apply a special operator to the output of AND, OR or
// XOR (inward NAND = inward(a AND b), and so on); this reading of the
// compound symbols is this design's, checked against the De Morgan-like
// identities outward(a OR b) = outward(a) AND outward(b) and
// bitswap(a AND b) = bitswap(a) AND bitswap(b).
//
// The literal s^i, used by the decoders, is the equality operator applied
// to s and the constant i: 3 when s equals i, otherwise 0.
// Everything here is combinational; the functions are used by every block.
package qlogic_pkg;

  typedef logic [1:0] qudit_t;

  localparam qudit_t Q0 = 2'd0;   // absolute low
  localparam qudit_t Q1 = 2'd1;
  localparam qudit_t Q2 = 2'd2;
  localparam qudit_t Q3 = 2'd3;   // absolute high

  // Operators of the gate library, in the order of the circuit symbols.
  typedef enum logic [4:0] {
    OP_AND          = 5'd0,
    OP_OR           = 5'd1,
    OP_XOR          = 5'd2,
    OP_NOT          = 5'd3,   // basic inverter (unary, uses a)
    OP_NAND         = 5'd4,
    OP_NOR          = 5'd5,
    OP_XNOR         = 5'd6,
    OP_INWARD       = 5'd7,   // inward / half inverter (unary)
    OP_INWARD_NAND  = 5'd8,
    OP_INWARD_NOR   = 5'd9,
    OP_INWARD_XNOR  = 5'd10,
    OP_OUTWARD      = 5'd11,  // outward / full inverter (unary)
    OP_OUTWARD_NAND = 5'd12,
    OP_OUTWARD_NOR  = 5'd13,
    OP_OUTWARD_XNOR = 5'd14,
    OP_BITSWAP      = 5'd15,  // binary bitswap (unary)
    OP_BITSWAP_AND  = 5'd16,
    OP_BITSWAP_OR   = 5'd17,
    OP_BITSWAP_XOR  = 5'd18
  } q_op_e;

  // ---- basic operators: bitwise on the binary equivalent ----
  function automatic qudit_t q_and(qudit_t a, qudit_t b);
    return a & b;
  endfunction

  function automatic qudit_t q_or(qudit_t a, qudit_t b);
    return a | b;
  endfunction

  function automatic qudit_t q_xor(qudit_t a, qudit_t b);
    return a ^ b;
  endfunction

  function automatic qudit_t q_not(qudit_t a);
    return ~a;
  endfunction

  // ---- special operators ----
  // Inward inverter: not(a) AND 2 for a < 2, not(a) OR 1 for a > 1.
  function automatic qudit_t q_inward(qudit_t a);
    return a[1] ? (q_not(a) | Q1) : (q_not(a) & Q2);
  endfunction

  // Outward inverter: not(a) OR 3 for a < 2, not(a) AND 0 for a > 1.
  function automatic qudit_t q_outward(qudit_t a);
    return a[1] ? (q_not(a) & Q0) : (q_not(a) | Q3);
  endfunction

  // Binary bitswap: swap the two bits of the binary equivalent.
  function automatic qudit_t q_bitswap(qudit_t a);
    return {a[0], a[1]};
  endfunction

  // Equality operator: 3 when identical, 0 otherwise. Built from the
  // operators themselves: x = a XNOR b is 3 exactly when a == b, and
  // x AND bitswap(x) is 3 when x = 3 and 0 for every other x.
  function automatic qudit_t q_eq(qudit_t a, qudit_t b);
    qudit_t x;
    x = q_not(q_xor(a, b));
    return q_and(x, q_bitswap(x));
  endfunction

  // Literal s^i of the decoder equations.
  function automatic qudit_t q_lit(qudit_t s, qudit_t i);
    return q_eq(s, i);
  endfunction

  // Any of the operators, by code. Unary operators use a only.
  function automatic qudit_t q_apply(q_op_e op, qudit_t a, qudit_t b);
    unique case (op)
      OP_AND:          return q_and(a, b);
      OP_OR:           return q_or(a, b);
      OP_XOR:          return q_xor(a, b);
      OP_NOT:          return q_not(a);
      OP_NAND:         return q_not(q_and(a, b));
      OP_NOR:          return q_not(q_or(a, b));
      OP_XNOR:         return q_not(q_xor(a, b));
      OP_INWARD:       return q_inward(a);
      OP_INWARD_NAND:  return q_inward(q_and(a, b));
      OP_INWARD_NOR:   return q_inward(q_or(a, b));
      OP_INWARD_XNOR:  return q_inward(q_xor(a, b));
      OP_OUTWARD:      return q_outward(a);
      OP_OUTWARD_NAND: return q_outward(q_and(a, b));
      OP_OUTWARD_NOR:  return q_outward(q_or(a, b));
      OP_OUTWARD_XNOR: return q_outward(q_xor(a, b));
      OP_BITSWAP:      return q_bitswap(a);
      OP_BITSWAP_AND:  return q_bitswap(q_and(a, b));
      OP_BITSWAP_OR:   return q_bitswap(q_or(a, b));
      OP_BITSWAP_XOR:  return q_bitswap(q_xor(a, b));
      default:         return Q0;
    endcase
  endfunction

endpackage
