// tb_q_demux: checks the demultiplexer for 1 and 2 selector qudits.
// For every data value and selector combination the selected line must
// carry the data qudit and every other line must be 0.
module tb_q_demux;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  qudit_t        d;
  qudit_t [0:0]  sel1;
  qudit_t [3:0]  line1;
  qudit_t [1:0]  sel2;
  qudit_t [15:0] line2;

  q_demux          dut1 (.d(d), .sel(sel1), .line(line1));
  q_demux #(.N(2)) dut2 (.d(d), .sel(sel2), .line(line2));

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
    for (int dv = 0; dv < 4; dv++)
      for (int s = 0; s < 16; s++) begin
        d       = qudit_t'(dv);
        sel1[0] = qudit_t'(s & 3);
        sel2    = 4'(s);
        #1;
        if (s < 4)
          for (int j = 0; j < 4; j++)
            check($sformatf("n=1 d=%0d sel=%0d line %0d", dv, s, j), line1[j], (j == s) ? dv : 0);
        for (int j = 0; j < 16; j++)
          check($sformatf("n=2 d=%0d sel=%0d line %0d", dv, s, j), line2[j], (j == s) ? dv : 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
