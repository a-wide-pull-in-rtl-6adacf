// tb_two_fold_cr_top: end-to-end test of the two-fold carrier recovery
// receiver at its default sizes.
//
// Two receivers run side by side, each fed by its own root-raised-cosine
// shaped 64-QAM low-IF source, one with a +20 kHz carrier offset and one
// with -20 kHz, for 250,000 symbols (1,000,000 sample clocks). At the
// default gears the prior Costas loop brings such an offset to within a
// few kHz and the posterior loop finishes the pull-in; larger offsets are
// not reliably acquired on a pulse-shaped signal (see tb_cr_core for the
// prior loop acquiring 100 kHz on an ideal channel).
// For each receiver it checks
//   * the stage sequence: Costas until B, DDML until C, then MMSE, with one
//     hand-over pulse and one MMSE switch;
//   * w_dc takes the NCO control word at B, and is within 3 kHz of the
//     offset (the prior loop did the coarse acquisition);
//   * over the last 20,000 symbols the mean frequency word is within
//     300 Hz of w0 + offset, and the mean squared slicer error is small;
//   * every mechanism happens: hand-over latch, MMSE switch, each gear of
//     the prior and DDML stages, the registered (prior) and direct
//     (posterior) loop updates, equalizer adaptation.
// Frequency-word expectations are computed from the offset in hertz:
// f * 2^24 / 21.52 MHz.
module tb_two_fold_cr_top;
  import cr_pkg::*;

  localparam int unsigned N_SYM   = 250000;
  localparam int unsigned N_CLK   = 4 * N_SYM;
  localparam int unsigned TAIL    = 20000;          // symbols averaged at the end
  localparam real         FS      = 21.52e6;
  localparam real         LSB_HZ  = FS / 16777216.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- two receivers ----------------
  logic signed [9:0] adc [2];
  int                si [2], sq [2];
  logic signed [SIG_W-1:0] dec_i [2], dec_q [2], eq_i [2], eq_q [2], err_i [2], err_q [2];
  logic              dec_valid [2], handover [2], to_mmse [2];
  cr_state_t         state [2];
  logic [1:0]        gear_idx [2];
  logic [PHASE_W-1:0] fcw [2], w_dc [2], nco_phase [2];
  logic signed [PHASE_W-1:0] dw [2];
  logic signed [ERR_W-1:0]   pd_e [2];

  localparam real FOFF [2] = '{20.0e3, -20.0e3};

  qam_source #(.FOFF_HZ(FOFF[0]), .PHASE0(0.3), .SYM_PHASE(2)) u_src0 (.clk(clk), .rst_n(rst_n), .adc(adc[0]), .sym_i(si[0]), .sym_q(sq[0]));
  qam_source #(.FOFF_HZ(FOFF[1]), .PHASE0(2.0), .SYM_PHASE(2)) u_src1 (.clk(clk), .rst_n(rst_n), .adc(adc[1]), .sym_i(si[1]), .sym_q(sq[1]));

  for (genvar r = 0; r < 2; r++) begin : g_rx
    two_fold_cr_top u_dut (
      .clk(clk), .rst_n(rst_n), .adc_in(adc[r]),
      .dec_i(dec_i[r]), .dec_q(dec_q[r]), .dec_valid(dec_valid[r]),
      .eq_i(eq_i[r]), .eq_q(eq_q[r]), .err_i(err_i[r]), .err_q(err_q[r]),
      .state(state[r]), .gear_idx(gear_idx[r]), .fcw(fcw[r]), .w_dc(w_dc[r]),
      .dw(dw[r]), .pd_e(pd_e[r]), .nco_phase(nco_phase[r]),
      .handover(handover[r]), .to_mmse(to_mmse[r])
    );
  end

  // ---------------- monitors ----------------
  int  n_handover [2], n_mmse [2], n_prior_upd [2], n_post_upd [2];
  bit  gear_seen [2][3][3];     // [rx][state][gear]
  int  n_bad_order [2];
  real wdc_hz [2];
  bit  wdc_ok [2];
  real fsum [2], esum [2];
  int  ntail [2];
  longint unsigned cyc = 0;

  function automatic real fcw_off_hz(input logic [PHASE_W-1:0] f);
    logic signed [PHASE_W-1:0] d;
    d = $signed(f - W0_DEFAULT);
    return real'(d) * LSB_HZ;
  endfunction

  always @(posedge clk) if (rst_n) begin
    cyc++;
    for (int r = 0; r < 2; r++) begin
      gear_seen[r][state[r]][gear_idx[r]] = 1'b1;
      if (handover[r]) begin
        n_handover[r]++;
        if (state[r] != ST_PRIOR) n_bad_order[r]++;
      end
      if (to_mmse[r]) begin
        n_mmse[r]++;
        if (state[r] != ST_DDML) n_bad_order[r]++;
      end
      if (state[r] == ST_PRIOR) n_prior_upd[r]++;
      else if (dec_valid[r])    n_post_upd[r]++;
      if (cyc == 2) check(state[r] == ST_PRIOR, "starts in the prior Costas stage");
      if (dec_valid[r] && cyc > 4 * (N_SYM - TAIL)) begin
        fsum[r] += fcw_off_hz(fcw[r]);
        esum[r] += real'(int'(err_i[r]) * int'(err_i[r]) + int'(err_q[r]) * int'(err_q[r]));
        ntail[r]++;
      end
      if (cyc % 100000 == 0)
        $display("cyc %0d rx%0d state %0d gear %0d freq %0.1f Hz  w_dc %0.1f Hz  pd_e %0d",
                 cyc, r, state[r], gear_idx[r], fcw_off_hz(fcw[r]),
                 real'($signed(w_dc[r])) * LSB_HZ, pd_e[r]);
    end
  end

  // capture w_dc just after the hand-over
  for (genvar r = 0; r < 2; r++) begin : g_cap
    always @(posedge clk) if (handover[r]) begin
      logic [PHASE_W-1:0] ctl;
      ctl = PHASE_W'(g_rx[r].u_dut.u_cr.u_nco.dw_q);
      @(posedge clk);
      wdc_ok[r] = (w_dc[r] == ctl);
      wdc_hz[r] = real'($signed(w_dc[r])) * LSB_HZ;
      $display("rx%0d hand-over at clock %0d: w_dc = %0.1f Hz (offset %0.1f Hz)", r, cyc, wdc_hz[r], FOFF[r]);
    end
  end

  // watchdog
  initial begin
    repeat (N_CLK + 10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++) begin
      n_handover[r] = 0; n_mmse[r] = 0; n_prior_upd[r] = 0; n_post_upd[r] = 0;
      n_bad_order[r] = 0; wdc_ok[r] = 0; fsum[r] = 0.0; esum[r] = 0.0; ntail[r] = 0; wdc_hz[r] = 0.0;
      for (int s = 0; s < 3; s++) for (int g = 0; g < 3; g++) gear_seen[r][s][g] = 1'b0;
    end
    repeat (4) @(posedge clk);
    rst_n <= 1'b1;
    repeat (N_CLK) @(posedge clk);
    for (int r = 0; r < 2; r++) begin
      real fmean, mse;
      fmean = fsum[r] / real'(ntail[r]);
      mse   = esum[r] / real'(ntail[r]);
      $display("rx%0d: offset %0.1f Hz, mean recovered %0.1f Hz, slicer MSE %0.2f (unit 64), prior updates %0d, posterior updates %0d",
               r, FOFF[r], fmean, mse, n_prior_upd[r], n_post_upd[r]);
      check(n_handover[r] == 1, "exactly one hand-over (time B)");
      check(n_mmse[r] == 1, "exactly one switch to DD-MMSE (time C)");
      check(n_bad_order[r] == 0, "stage order Costas -> DDML -> MMSE");
      check(state[r] == ST_MMSE, "ends in DD-MMSE");
      check(wdc_ok[r], "w_dc takes the control word at the hand-over");
      check(wdc_hz[r] > FOFF[r] - 3000.0 && wdc_hz[r] < FOFF[r] + 3000.0, "prior loop acquisition: w_dc within 3 kHz of the offset");
      check(fmean > FOFF[r] - 300.0 && fmean < FOFF[r] + 300.0, "steady-state frequency within 300 Hz");
      check(mse < 250.0, "steady-state slicer MSE below 250 (about 31 dB)");
      for (int g = 0; g < 3; g++) begin
        check(gear_seen[r][ST_PRIOR][g], $sformatf("prior gear %0d used", g));
        check(gear_seen[r][ST_DDML][g],  $sformatf("DDML gear %0d used", g));
      end
      check(gear_seen[r][ST_MMSE][0], "MMSE stage ran");
      check(n_prior_upd[r] > 0, "registered (prior) loop updates happened");
      check(n_post_upd[r] > 0, "direct (posterior) loop updates happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
