// tb_phase_detector: random inputs in each of the three stages; the output
// must equal a_q*sgn(s_i) - a_i*sgn(s_q) for the stage's (a, s) choice,
// computed here with explicit +-1 multiplications. A rotated-constellation
// case (a diagonal point) checks that all three detectors give a positive error for a positive
// phase rotation.
module tb_phase_detector;
  import cr_pkg::*;
  int checks = 0, failures = 0;
  cr_state_t state;
  logic signed [SIG_W-1:0] lpf_i, lpf_q, eq_i, eq_q, dec_i, dec_q, err_i, err_q;
  logic signed [ERR_W-1:0] e;

  phase_detector dut (.state, .lpf_i, .lpf_q, .eq_i, .eq_q, .dec_i, .dec_q, .err_i, .err_q, .e);

  function automatic int sgn(input int v);
    return (v < 0) ? -1 : 1;
  endfunction

  function automatic int rnd();
    return int'($urandom_range(0, 4095)) - 2048;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ai, aq, si, sq, exp_e;
    cr_state_t sts [3] = '{ST_PRIOR, ST_DDML, ST_MMSE};
    for (int n = 0; n < 3000; n++) begin
      state = sts[n % 3];
      lpf_i = SIG_W'(rnd()); lpf_q = SIG_W'(rnd());
      eq_i  = SIG_W'(rnd()); eq_q  = SIG_W'(rnd());
      dec_i = SIG_W'(rnd()); dec_q = SIG_W'(rnd());
      err_i = SIG_W'(rnd()); err_q = SIG_W'(rnd());
      #1;
      case (state)
        ST_PRIOR: begin ai = lpf_i; aq = lpf_q; si = lpf_i; sq = lpf_q; end
        ST_DDML:  begin ai = eq_i;  aq = eq_q;  si = dec_i; sq = dec_q; end
        default:  begin ai = err_i; aq = err_q; si = eq_i;  sq = eq_q;  end
      endcase
      exp_e = aq * sgn(si) - ai * sgn(sq);
      checks++;
      if (int'(e) != exp_e) begin
        failures++;
        $display("FAIL: state %0d e=%0d expected %0d", state, e, exp_e);
      end
    end
    // diagonal point (3,3)*64 rotated by +0.1 rad; decision is the unrotated point
    begin
      int ri, rq;
      ri = $rtoi($floor(64.0 * (3.0 * $cos(0.1) - 3.0 * $sin(0.1)) + 0.5));
      rq = $rtoi($floor(64.0 * (3.0 * $sin(0.1) + 3.0 * $cos(0.1)) + 0.5));
      lpf_i = SIG_W'(ri); lpf_q = SIG_W'(rq);
      eq_i = SIG_W'(ri);  eq_q = SIG_W'(rq);
      dec_i = 12'sd192;   dec_q = 12'sd192;
      err_i = SIG_W'(ri - 192); err_q = SIG_W'(rq - 192);
      for (int k = 0; k < 3; k++) begin
        state = sts[k];
        #1;
        checks++;
        if (e <= 0) begin
          failures++;
          $display("FAIL: stage %0d error %0d not positive for a positive rotation", k, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
