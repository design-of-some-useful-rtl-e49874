// tb_q_equality: exhaustive test of the quaternary equality operator.
// All 16 operand pairs; the output must be 3 for equal qudits and 0
// otherwise. Combinational: one check per time step.
module tb_q_equality;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  qudit_t a, b, eq;

  q_equality dut (.a(a), .b(b), .eq(eq));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int x = 0; x < 4; x++)
      for (int z = 0; z < 4; z++) begin
        a = qudit_t'(x);
        b = qudit_t'(z);
        #1;
        checks++;
        if (eq !== ((x == z) ? 2'd3 : 2'd0)) begin
          failures++;
          $display("FAIL a=%0d b=%0d eq=%0d", x, z, eq);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
