// tb_q_decoder: checks the hierarchical n-to-4^n decoder for n = 1, 2, 3.
// For every selector combination the line numbered
// sel[0] + 4*sel[1] + 16*sel[2] must be 3 and every other line 0.
module tb_q_decoder;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  qudit_t [0:0]  sel1;
  qudit_t [3:0]  line1;
  qudit_t [1:0]  sel2;
  qudit_t [15:0] line2;
  qudit_t [2:0]  sel3;
  qudit_t [63:0] line3;

  q_decoder              dut1 (.sel(sel1), .line(line1));
  q_decoder #(.N(2))     dut2 (.sel(sel2), .line(line2));
  q_decoder #(.N(3))     dut3 (.sel(sel3), .line(line3));

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
    for (int s = 0; s < 64; s++) begin
      sel1[0] = qudit_t'(s & 3);
      sel2    = 4'(s & 15);
      sel3    = 6'(s);
      #1;
      if (s < 4)
        for (int j = 0; j < 4; j++)
          check($sformatf("n=1 sel=%0d line %0d", s, j), line1[j], (j == s) ? 3 : 0);
      if (s < 16)
        for (int j = 0; j < 16; j++)
          check($sformatf("n=2 sel=%0d line %0d", s, j), line2[j], (j == s) ? 3 : 0);
      for (int j = 0; j < 64; j++)
        check($sformatf("n=3 sel=%0d line %0d", s, j), line3[j], (j == s) ? 3 : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
