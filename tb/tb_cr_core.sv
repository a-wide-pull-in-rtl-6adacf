// tb_cr_core: closed-loop test of the shared carrier recovery core.
//
// The testbench closes the loop around cr_core with an ideal channel: a
// stream of random 64-QAM symbols (unit 64 per level step of 2), held for
// four sample clocks each, is rotated by (carrier phase - NCO phase), where
// the carrier advances by w0 + offset per clock and the NCO phase is the
// core's own accumulator. In the prior stage the rotated samples drive the
// LPF inputs every clock; in the posterior stages they drive the equalizer
// inputs once per symbol, with decisions and errors from the testbench's own
// slicer. The stages are switched by the testbench. Checks:
//   * prior Costas loop (run with wide prior gears) acquires a +OFF_HZ offset: mean frequency word
//     within 2 kHz of it at the end of the prior stage;
//   * w_dc takes the control word at the hand-over and the loop filter is
//     cleared;
//   * DDML and MMSE keep the frequency (within 300 Hz) and the phase locked
//     to a multiple of 90 degrees (slicer MSE small);
//   * the gear index steps 0 -> 1 -> 2 in the prior stage.
module tb_cr_core;
  import cr_pkg::*;

  localparam real OFF_HZ  = 100.0e3;
  localparam real FS      = 21.52e6;
  localparam real PI      = 3.14159265358979323846;
  localparam int  PRIOR_N = 60000;      // clocks in the prior stage
  localparam int  POST_N  = 40000;      // clocks in each posterior stage

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  cr_state_t state;
  logic handover;
  logic signed [SIG_W-1:0] lpf_i, lpf_q, eq_i, eq_q, dec_i, dec_q, err_i, err_q;
  logic eq_valid;
  logic signed [ERR_W-1:0] pd_e;
  logic signed [PHASE_W-1:0] dw;
  logic [PHASE_W-1:0] w_dc, fcw, phase;
  logic [1:0] gear_idx;
  logic signed [ROM_DW-1:0] lo_cos, lo_msin;

  // Wide prior gears for the ideal channel, whose detector gain is about
  // eight times that of the pulse-shaped signal the defaults are set for.
  localparam gear_t WIDE [3] = '{'{5'd0, 5'd6}, '{5'd1, 5'd8}, '{5'd2, 5'd10}};

  cr_core #(.GEAR_PRIOR(WIDE), .PF_B1_PRIOR(16'sd4096), .PF_A1_PRIOR(-16'sd12288),
            .G1_AT_PRIOR(20000), .G2_AT_PRIOR(40000), .G1_AT_POST(3000), .G2_AT_POST(6000)) dut (
    .clk, .rst_n, .state, .handover, .lpf_i, .lpf_q, .eq_i, .eq_q, .dec_i, .dec_q,
    .err_i, .err_q, .eq_valid, .pd_e, .dw, .w_dc, .fcw, .gear_idx, .phase, .lo_cos, .lo_msin
  );

  function automatic int slice(input int y);
    int best, d, bd;
    best = -448; bd = 1 << 30;
    for (int l = -7; l <= 7; l += 2) begin
      d = (y - 64 * l) * (y - 64 * l);
      if (d < bd) begin bd = d; best = 64 * l; end
    end
    return best;
  endfunction

  real carrier = 0.7;
  int  si = 0, sq = 0, cnt4 = 0;
  real fsum, esum;
  int  nf, ne;
  bit  gear_seen [3];

  always @(posedge clk) if (rst_n) begin
    real th, yi, yq;
    int  ri, rq;
    if (cnt4 == 0) begin
      si = 2 * int'($urandom_range(0, 7)) - 7;
      sq = 2 * int'($urandom_range(0, 7)) - 7;
    end
    th = carrier - 2.0 * PI * real'(phase) / 16777216.0;
    yi = 64.0 * (real'(si) * $cos(th) - real'(sq) * $sin(th));
    yq = 64.0 * (real'(si) * $sin(th) + real'(sq) * $cos(th));
    ri = $rtoi($floor(yi + 0.5));
    rq = $rtoi($floor(yq + 0.5));
    carrier += 2.0 * PI * (3.0 / 16.0 + OFF_HZ / FS);
    if (carrier > 2.0 * PI) carrier -= 2.0 * PI;
    lpf_i <= SIG_W'(ri / 8);   // LPF-level amplitude in the prior stage
    lpf_q <= SIG_W'(rq / 8);
    eq_valid <= (cnt4 == 3);
    if (cnt4 == 3) begin
      eq_i  <= SIG_W'(ri);
      eq_q  <= SIG_W'(rq);
      dec_i <= SIG_W'(slice(ri));
      dec_q <= SIG_W'(slice(rq));
      err_i <= SIG_W'(ri - slice(ri));
      err_q <= SIG_W'(rq - slice(rq));
    end
    cnt4 = (cnt4 + 1) % 4;
    if (state == ST_PRIOR) gear_seen[gear_idx] = 1'b1;
  end

  function automatic real off_hz(input logic [PHASE_W-1:0] f);
    return real'($signed(f - W0_DEFAULT)) * FS / 16777216.0;
  endfunction

  initial begin
    repeat (PRIOR_N + 2 * POST_N + 1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PHASE_W-1:0] ctl;
    state = ST_PRIOR; handover = 0; eq_valid = 0;
    lpf_i = 0; lpf_q = 0; eq_i = 0; eq_q = 0; dec_i = 0; dec_q = 0; err_i = 0; err_q = 0;
    for (int g = 0; g < 3; g++) gear_seen[g] = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // prior stage
    fsum = 0; nf = 0;
    for (int c = 0; c < PRIOR_N; c++) begin
      @(posedge clk);
      if (c > PRIOR_N - 5000) begin fsum += off_hz(fcw); nf++; end
    end
    $display("prior: mean frequency %0.1f Hz (offset %0.1f Hz)", fsum / nf, OFF_HZ);
    check(fsum / nf > OFF_HZ - 2000.0 && fsum / nf < OFF_HZ + 2000.0, "prior Costas loop acquires the offset");
    check(gear_seen[0] && gear_seen[1] && gear_seen[2], "prior gears 0, 1, 2 all used");
    // hand-over
    @(negedge clk);
    ctl = PHASE_W'(dut.u_nco.dw_q);
    handover = 1;
    @(negedge clk);
    handover = 0;
    state = ST_DDML;
    #1;
    check(w_dc == ctl, "w_dc takes the control word at the hand-over");
    check(dw == 0, "loop filter cleared at the hand-over");
    check(fcw == W0_DEFAULT + ctl, "posterior starts from w0 + w_dc");
    // DDML
    repeat (POST_N) @(posedge clk);
    state = ST_MMSE;
    fsum = 0; nf = 0; esum = 0; ne = 0;
    for (int c = 0; c < POST_N; c++) begin
      @(posedge clk);
      if (c > POST_N / 2) begin
        fsum += off_hz(fcw); nf++;
        if (eq_valid) begin
          esum += real'(int'(err_i) * int'(err_i) + int'(err_q) * int'(err_q)); ne++;
        end
      end
    end
    $display("MMSE: mean frequency %0.1f Hz, slicer MSE %0.2f", fsum / nf, esum / ne);
    check(fsum / nf > OFF_HZ - 300.0 && fsum / nf < OFF_HZ + 300.0, "posterior loop holds the frequency");
    check(esum / ne < 40.0, "posterior loop holds the phase (slicer MSE < 40)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
