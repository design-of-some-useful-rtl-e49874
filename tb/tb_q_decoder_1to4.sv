// tb_q_decoder_1to4: checks the 1-to-4 decoder against its truth table.
// For each selector value exactly the line of that number is 3 and the
// other three lines are 0.
module tb_q_decoder_1to4;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  qudit_t       sel;
  qudit_t [3:0] line;

  q_decoder_1to4 dut (.sel(sel), .line(line));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int s = 0; s < 4; s++) begin
      sel = qudit_t'(s);
      #1;
      for (int i = 0; i < 4; i++) begin
        checks++;
        if (line[i] !== ((i == s) ? 2'd3 : 2'd0)) begin
          failures++;
          $display("FAIL sel=%0d line[%0d]=%0d", s, i, line[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
