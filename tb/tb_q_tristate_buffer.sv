// tb_q_tristate_buffer: checks the tri-state qudit buffer. Two copies drive
// nets with a pull-up and a pull-down. Enabled, both nets must carry the
// input qudit; disabled, the nets must float to the pull values (3 and 0).
module tb_q_tristate_buffer;
  import qlogic_pkg::*;

  int checks = 0;
  int failures = 0;

  logic       en;
  qudit_t     a;
  tri   [1:0] y_up, y_dn;

  q_tristate_buffer dut    (.en(en), .a(a), .y(y_up));
  q_tristate_buffer dut_pd (.en(en), .a(a), .y(y_dn));

  pullup   (y_up[0]);
  pullup   (y_up[1]);
  pulldown (y_dn[0]);
  pulldown (y_dn[1]);

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
    for (int e = 0; e < 2; e++)
      for (int x = 0; x < 4; x++) begin
        en = 1'(e);
        a  = qudit_t'(x);
        #1;
        check($sformatf("en=%0d a=%0d pull-up", e, x), y_up, e ? x : 3);
        check($sformatf("en=%0d a=%0d pull-down", e, x), y_dn, e ? x : 0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
