// tb_q_logic_top: end-to-end test of the whole block library at its
// default sizes (1-to-4 decoder and demultiplexer, 4-to-1 multiplexer).
//
// Random stimulus drives every block of the top at once; each output is
// compared with an arithmetic reference model written here (integer
// bit operations, not the qudit functions of the design). The test also
// counts how often each behaviour happened: every operator code, equal and
// unequal operands, every decoder and demultiplexer line selected, every
// multiplexer input passed, the encoders' output buffer switched off (high
// impedance: the pins are pulled up and down, so a floating pin reads 3
// and 0 respectively) and on, and the priority encoder ignoring a lower line that
// is also high. A behaviour that never happened counts as a failure.
module tb_q_logic_top;
  import qlogic_pkg::*;

  localparam int ITER = 4000;
  localparam int NUM_OPS = int'(OP_BITSWAP_XOR) + 1;   // operator codes in use

  int checks = 0;
  int failures = 0;

  q_op_e        gate_op;
  qudit_t       gate_a, gate_b, gate_y;
  qudit_t       eq_a, eq_b, eq_y;
  qudit_t [0:0] dec_sel;
  qudit_t [3:0] dec_line;
  qudit_t       demux_d;
  qudit_t [0:0] demux_sel;
  qudit_t [3:0] demux_line;
  qudit_t [3:0] mux_d;
  qudit_t [0:0] mux_sel;
  qudit_t       mux_y;
  qudit_t [3:0] enc_in;
  qudit_t       enc_f;
  logic         enc_oe;
  tri   [1:0]   enc_q;      // pulled up: floats to 3
  qudit_t [3:0] penc_in;
  qudit_t       penc_f;
  logic         penc_oe;
  tri   [1:0]   penc_q;     // pulled down: floats to 0

  q_logic_top dut (.*);

  pullup   (enc_q[0]);
  pullup   (enc_q[1]);
  pulldown (penc_q[0]);
  pulldown (penc_q[1]);

  // Coverage counters.
  int op_seen [NUM_OPS];
  int eq_true, eq_false;
  int dec_seen [4];
  int demux_seen [4];
  int mux_seen [4];
  int enc_hiz, enc_on, penc_hiz, penc_on, penc_override;

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic int ref_inward(int x);  return (x < 2) ? 2 : 1; endfunction
  function automatic int ref_outward(int x); return (x < 2) ? 3 : 0; endfunction
  function automatic int ref_bitswap(int x); return ((x & 1) << 1) | (x >> 1); endfunction

  function automatic int ref_gate(int code, int x, int z);
    int base;
    case (code % 4)
      0:       base = x & z;
      1:       base = x | z;
      default: base = x ^ z;
    endcase
    case (code)
      0, 1, 2:    return base;
      3:          return 3 - x;
      4:          return 3 - (x & z);
      5:          return 3 - (x | z);
      6:          return 3 - (x ^ z);
      7:          return ref_inward(x);
      8:          return ref_inward(x & z);
      9:          return ref_inward(x | z);
      10:         return ref_inward(x ^ z);
      11:         return ref_outward(x);
      12:         return ref_outward(x & z);
      13:         return ref_outward(x | z);
      14:         return ref_outward(x ^ z);
      15:         return ref_bitswap(x);
      16:         return ref_bitswap(x & z);
      17:         return ref_bitswap(x | z);
      18:         return ref_bitswap(x ^ z);
      default:    return 0;
    endcase
  endfunction

  // Encoder inputs biased towards 0 and 3 so that one-hot, empty and
  // conflicting patterns all occur.
  function automatic qudit_t enc_line();
    int r;
    r = $urandom_range(0, 9);
    return (r < 5) ? Q0 : (r < 9) ? Q3 : qudit_t'($urandom_range(1, 2));
  endfunction

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    for (int n = 0; n < ITER; n++) begin
      int code, hi_mask, top_hi, or_code;
      code       = $urandom_range(0, NUM_OPS - 1);
      gate_op    = q_op_e'(code);
      gate_a     = qudit_t'($urandom);
      gate_b     = qudit_t'($urandom);
      eq_a       = qudit_t'($urandom);
      eq_b       = ($urandom_range(0, 1) == 1) ? eq_a : qudit_t'($urandom);
      dec_sel    = qudit_t'($urandom);
      demux_d    = qudit_t'($urandom);
      demux_sel  = qudit_t'($urandom);
      mux_d      = 8'($urandom);
      mux_sel    = qudit_t'($urandom);
      for (int i = 0; i < 4; i++) begin
        enc_in[i]  = enc_line();
        penc_in[i] = enc_line();
      end
      #1;

      // operator unit
      check($sformatf("gate op=%0d a=%0d b=%0d", code, gate_a, gate_b),
            gate_y, ref_gate(code, gate_a, gate_b));
      op_seen[code]++;

      // equality
      check($sformatf("eq %0d %0d", eq_a, eq_b), eq_y, (eq_a == eq_b) ? 3 : 0);
      if (eq_a == eq_b) eq_true++; else eq_false++;

      // decoder and demultiplexer
      for (int j = 0; j < 4; j++) begin
        check($sformatf("dec sel=%0d line %0d", dec_sel[0], j), dec_line[j],
              (j == dec_sel[0]) ? 3 : 0);
        check($sformatf("demux d=%0d sel=%0d line %0d", demux_d, demux_sel[0], j),
              demux_line[j], (j == demux_sel[0]) ? demux_d : 0);
      end
      dec_seen[dec_sel[0]]++;
      demux_seen[demux_sel[0]]++;

      // multiplexer
      check($sformatf("mux sel=%0d", mux_sel[0]), mux_y, (mux_d >> (2 * mux_sel[0])) & 3);
      mux_seen[mux_sel[0]]++;

      // encoder
      hi_mask = 0; or_code = 0;
      for (int i = 0; i < 4; i++)
        if (enc_in[i] == 3) begin hi_mask |= 1 << i; or_code |= i; end
      check("enc oe", enc_oe, hi_mask != 0);
      check("enc f", enc_f, or_code);
      check("enc pin", enc_q, (hi_mask != 0) ? or_code : 3);
      if (hi_mask == 0) enc_hiz++; else enc_on++;

      // priority encoder
      hi_mask = 0; top_hi = 0;
      for (int i = 0; i < 4; i++)
        if (penc_in[i] == 3) begin hi_mask |= 1 << i; top_hi = i; end
      check("penc oe", penc_oe, hi_mask != 0);
      check("penc f", penc_f, top_hi);
      check("penc pin", penc_q, (hi_mask != 0) ? top_hi : 0);
      if (hi_mask == 0) penc_hiz++; else penc_on++;
      if ($countones(hi_mask) > 1) penc_override++;
    end

    // Every behaviour must have happened.
    for (int k = 0; k < NUM_OPS; k++) check($sformatf("operator %0d used", k), op_seen[k] > 0, 1);
    for (int j = 0; j < 4; j++) begin
      check($sformatf("decoder line %0d selected", j), dec_seen[j] > 0, 1);
      check($sformatf("demux line %0d selected", j), demux_seen[j] > 0, 1);
      check($sformatf("mux input %0d passed", j), mux_seen[j] > 0, 1);
    end
    check("equality true seen", eq_true > 0, 1);
    check("equality false seen", eq_false > 0, 1);
    check("encoder high impedance seen", enc_hiz > 0, 1);
    check("encoder driving seen", enc_on > 0, 1);
    check("priority encoder high impedance seen", penc_hiz > 0, 1);
    check("priority encoder driving seen", penc_on > 0, 1);
    check("priority override seen", penc_override > 0, 1);
    $display("coverage: eq %0d/%0d, enc hiz %0d on %0d, penc hiz %0d on %0d override %0d",
             eq_true, eq_false, enc_hiz, enc_on, penc_hiz, penc_on, penc_override);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
