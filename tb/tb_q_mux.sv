// tb_q_mux: checks the multiplexer for 1 and 2 selector qudits.
// The 4-to-1 multiplexer is run over every data pattern and selector
// (4^4 * 4 cases); the 16-to-1 one over random data patterns and every
// selector. The output must equal the selected data qudit.
module tb_q_mux;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  qudit_t [3:0]  d1;
  qudit_t [0:0]  sel1;
  qudit_t        y1;
  qudit_t [15:0] d2;
  qudit_t [1:0]  sel2;
  qudit_t        y2;

  q_mux          dut1 (.d(d1), .sel(sel1), .y(y1));
  q_mux #(.N(2)) dut2 (.d(d2), .sel(sel2), .y(y2));

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
    for (int pat = 0; pat < 256; pat++)
      for (int s = 0; s < 4; s++) begin
        d1      = 8'(pat);
        sel1[0] = qudit_t'(s);
        #1;
        check($sformatf("n=1 data=%02h sel=%0d", pat, s), y1, (pat >> (2 * s)) & 3);
      end
    for (int k = 0; k < 64; k++) begin
      logic [31:0] pat;
      pat = $urandom;
      for (int s = 0; s < 16; s++) begin
        d2   = pat;
        sel2 = 4'(s);
        #1;
        check($sformatf("n=2 data=%08h sel=%0d", pat, s), y2, int'((pat >> (2 * s)) & 3));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
