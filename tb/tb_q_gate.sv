// tb_q_gate: exhaustive self-checking test of the quaternary operator unit.
//
// Every operator code is applied to every pair of operands. The expected
// values come from truth tables written out here by hand: the single-input
// table (basic NOT, inward, outward, bitswap) and the two-input table (AND,
// OR, XOR, NAND, NOR, XNOR); a compound gate's value is the special
// operator's table entry at the basic gate's table entry. The algebraic
// identities of the special operators (for example bitswap(a) OR a = 3 for
// every a except 0) are checked on the unit's outputs as well. Unused
// operator codes must give 0. Combinational: one check every time step.
module tb_q_gate;
  import qlogic_pkg::*;

  localparam logic [1:0] T_NOT [4] = '{2'd3, 2'd2, 2'd1, 2'd0};
  localparam logic [1:0] T_INW [4] = '{2'd2, 2'd2, 2'd1, 2'd1};
  localparam logic [1:0] T_OUT [4] = '{2'd3, 2'd3, 2'd0, 2'd0};
  localparam logic [1:0] T_BSW [4] = '{2'd0, 2'd2, 2'd1, 2'd3};

  localparam logic [1:0] T_AND  [4][4] = '{'{0,0,0,0}, '{0,1,0,1}, '{0,0,2,2}, '{0,1,2,3}};
  localparam logic [1:0] T_OR   [4][4] = '{'{0,1,2,3}, '{1,1,3,3}, '{2,3,2,3}, '{3,3,3,3}};
  localparam logic [1:0] T_XOR  [4][4] = '{'{0,1,2,3}, '{1,0,3,2}, '{2,3,0,1}, '{3,2,1,0}};
  localparam logic [1:0] T_NAND [4][4] = '{'{3,3,3,3}, '{3,2,3,2}, '{3,3,1,1}, '{3,2,1,0}};
  localparam logic [1:0] T_NOR  [4][4] = '{'{3,2,1,0}, '{2,2,0,0}, '{1,0,1,0}, '{0,0,0,0}};
  localparam logic [1:0] T_XNOR [4][4] = '{'{3,2,1,0}, '{2,3,0,1}, '{1,0,3,2}, '{0,1,2,3}};

  int checks = 0;
  int failures = 0;

  q_op_e  op;
  qudit_t a, b, y;

  q_gate dut (.op(op), .a(a), .b(b), .y(y));

  function automatic logic [1:0] expected(int code, int x, int z);
    case (code)
      0:  return T_AND[x][z];
      1:  return T_OR[x][z];
      2:  return T_XOR[x][z];
      3:  return T_NOT[x];
      4:  return T_NAND[x][z];
      5:  return T_NOR[x][z];
      6:  return T_XNOR[x][z];
      7:  return T_INW[x];
      8:  return T_INW[T_AND[x][z]];
      9:  return T_INW[T_OR[x][z]];
      10: return T_INW[T_XOR[x][z]];
      11: return T_OUT[x];
      12: return T_OUT[T_AND[x][z]];
      13: return T_OUT[T_OR[x][z]];
      14: return T_OUT[T_XOR[x][z]];
      15: return T_BSW[x];
      16: return T_BSW[T_AND[x][z]];
      17: return T_BSW[T_OR[x][z]];
      18: return T_BSW[T_XOR[x][z]];
      default: return 2'd0;
    endcase
  endfunction

  // Apply one operator and return the unit's output.
  task automatic run(input int code, input int x, input int z, output qudit_t r);
    op = q_op_e'(code);
    a  = qudit_t'(x);
    b  = qudit_t'(z);
    #1;
    r = y;
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    qudit_t r, r1, r2;
    // Truth tables, every code including the unused ones.
    for (int code = 0; code < 32; code++)
      for (int x = 0; x < 4; x++)
        for (int z = 0; z < 4; z++) begin
          run(code, x, z, r);
          check($sformatf("op %0d a=%0d b=%0d", code, x, z), r, expected(code, x, z));
        end

    // Identities of the special operators, measured on the unit.
    for (int x = 0; x < 4; x++) begin
      run(15, x, 0, r1);                  // bitswap(a)
      run(1, int'(r1), x, r);             // bitswap(a) OR a
      check($sformatf("~a+a a=%0d", x), r, (x != 0) ? 3 : 0);
      run(0, int'(r1), x, r);             // bitswap(a) AND a
      check($sformatf("~a.a a=%0d", x), r, (x == 3) ? 3 : 0);
      run(2, int'(r1), x, r);             // bitswap(a) XOR a
      check($sformatf("~a^a a=%0d", x), r, (x == 1 || x == 2) ? 3 : 0);
      run(15, int'(r1), 0, r);            // bitswap twice
      check($sformatf("~~a a=%0d", x), r, x);
      run(7, x, 0, r1);                   // inward(a)
      run(11, x, 0, r2);                  // outward(a)
      run(0, int'(r1), int'(r2), r);      // inward(a) AND outward(a)
      check($sformatf("a'.^a a=%0d", x), r, (x > 1) ? 0 : 2);
      run(1, int'(r1), int'(r2), r);      // inward(a) OR outward(a)
      check($sformatf("a'+^a a=%0d", x), r, (x > 1) ? 1 : 3);
      run(7, x, 0, r1);
      run(15, int'(r1), 0, r);            // bitswap(inward(a))
      check($sformatf("(~a)' a=%0d", x), r, (x < 2) ? (x | 1) : (x & 2));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
