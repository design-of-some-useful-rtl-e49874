// tb_q_priority_encoder: checks the 4-to-1 priority encoder over all 256
// input patterns. A line is high only at 3; the code must be the number
// of the highest line that is high (priority 3 > 2 > 1 > 0), the buffer on;
// with no line high the buffer must be off (the output pin takes the value
// of its pull-up or pull-down) and the held value 0.
module tb_q_priority_encoder;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  qudit_t [3:0] in;
  qudit_t       f, f_pd;
  logic         oe, oe_pd;
  tri   [1:0]   q_up, q_dn;   // output pin, pulled up and pulled down

  q_priority_encoder dut    (.in(in), .f(f),    .oe(oe),    .q(q_up));
  q_priority_encoder dut_pd (.in(in), .f(f_pd), .oe(oe_pd), .q(q_dn));

  pullup   (q_up[0]);
  pullup   (q_up[1]);
  pulldown (q_dn[0]);
  pulldown (q_dn[1]);

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int pat = 0; pat < 256; pat++) begin
      int code;
      bit any;
      in = 8'(pat);
      #1;
      code = 0;
      any  = 0;
      for (int i = 0; i < 4; i++)
        if (((pat >> (2 * i)) & 3) == 3) begin
          code = i;
          any  = 1;
        end
      check($sformatf("in=%02h oe", pat), oe, any);
      check($sformatf("in=%02h f", pat), f, code);
      // A driven pin reads the code under either pull; a floating pin reads
      // the pull value, 3 under the pull-up and 0 under the pull-down.
      check($sformatf("in=%02h pin (pull-up)", pat), q_up, any ? code : 3);
      check($sformatf("in=%02h pin (pull-down)", pat), q_dn, any ? code : 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
