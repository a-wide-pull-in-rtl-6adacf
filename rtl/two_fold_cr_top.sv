// two_fold_cr_top: low-IF 64-QAM receiver path with the two-fold,
// hardware-sharing carrier recovery loop.
//
// Signal path (one sample clock, 4 samples per symbol):
//   adc_in --mixer(cos, -sin from the NCO)--> y_c, y_s
//     |-> iir_lpf ------------------------------> prior phase detector input
//     |-> rcf_decim (x2, root raised cosine) -> T/2 samples
//           -> ffe (T/2-spaced, per rail, decimates to 1/T) -> y_eq
//                -> slicer -> decisions dec, error err = y_eq - dec
//   cr_core: phase detector / pre-filter / PI loop filter / NCO shared by
//   the three stages, steered by cr_controller:
//     A (reset) .. B : ST_PRIOR, modified Costas loop on the LPF output at
//                      the sample rate; the equalizer is frozen.
//     B              : hand-over: NCO centre frequency becomes w0 + w_dc,
//                      loop filters cleared, equalizer re-initialised.
//     B .. C         : ST_DDML, decision-directed ML at the symbol rate.
//     C ..           : ST_MMSE, decision-directed MMSE, low-jitter tracking;
//                      equalizer adapting (decision-directed LMS).
//
// Outputs: the decided symbols with a one-clock valid per symbol, the
// equalizer output and error, and loop observables (state, gear, frequency
// word, latched w_dc, phase detector output).
//
// The receiver path and the three-stage sharing follow the description.
// The decision-feedback part of the equalizer and the blind equalizer
// algorithm are not included; stage switching uses fixed lengths.
module two_fold_cr_top
  import cr_pkg::*;
#(
  parameter int unsigned PRIOR_LEN   = 65536,   // samples
  parameter int unsigned DDML_LEN    = 16384,   // symbols
  parameter int unsigned G1_AT_PRIOR = 8192, 
  parameter int unsigned G2_AT_PRIOR = 16384,
  parameter int unsigned G1_AT_POST  = 4096,
  parameter int unsigned G2_AT_POST  = 8192,
  parameter gear_t GEAR_PRIOR [3] = '{'{5'd0, 5'd7}, '{5'd1, 5'd9}, '{5'd3, 5'd13}},
  parameter gear_t GEAR_DDML  [3] = '{'{5'd5, 5'd12}, '{5'd6, 5'd14}, '{5'd6, 5'd14}},
  parameter gear_t GEAR_MMSE  [3] = '{'{5'd7, 5'd16}, '{5'd7, 5'd16}, '{5'd7, 5'd16}},
  parameter logic signed [COEF_W-1:0] PF_B0_PRIOR = 16'sd0,
  parameter logic signed [COEF_W-1:0] PF_B1_PRIOR = 16'sd512,
  parameter logic signed [COEF_W-1:0] PF_A1_PRIOR = -16'sd15872,
  parameter logic signed [COEF_W-1:0] PF_B0_POST  = 16'sd0,
  parameter logic signed [COEF_W-1:0] PF_B1_POST  = 16'sd2048,
  parameter logic signed [COEF_W-1:0] PF_A1_POST  = -16'sd14336,
  parameter int unsigned LPF_K       = 1,
  parameter int unsigned LPF_STAGES  = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [ADC_W-1:0]    adc_in,
  output logic signed [SIG_W-1:0]    dec_i,
  output logic signed [SIG_W-1:0]    dec_q,
  output logic                       dec_valid,
  output logic signed [SIG_W-1:0]    eq_i,
  output logic signed [SIG_W-1:0]    eq_q,
  output logic signed [SIG_W-1:0]    err_i,
  output logic signed [SIG_W-1:0]    err_q,
  output cr_state_t                  state,
  output logic [1:0]                 gear_idx,
  output logic [PHASE_W-1:0]         fcw,
  output logic [PHASE_W-1:0]         w_dc,
  output logic signed [PHASE_W-1:0]  dw,
  output logic signed [ERR_W-1:0]    pd_e,
  output logic [PHASE_W-1:0]         nco_phase,
  output logic                       handover,   // pulse at B
  output logic                       to_mmse     // pulse at C
);

  logic                    half_stb, sym_stb;
  logic signed [ROM_DW-1:0] lo_cos, lo_msin;
  logic signed [SIG_W-1:0] y_c, y_s, lpf_i, lpf_q, rcf_i, rcf_q;
  logic                    rcf_vi, rcf_vq, eq_vi, eq_vq;
  logic                    adapt_en;

  cr_controller #(.PRIOR_LEN(PRIOR_LEN), .DDML_LEN(DDML_LEN)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .state(state), .handover(handover),
    .to_mmse(to_mmse), .half_stb(half_stb), .sym_stb(sym_stb)
  );

  mixer u_mix (
    .clk(clk), .rst_n(rst_n), .s(adc_in), .lo_cos(lo_cos), .lo_msin(lo_msin),
    .y_c(y_c), .y_s(y_s)
  );

  iir_lpf #(.K(LPF_K), .STAGES(LPF_STAGES)) u_lpf (
    .clk(clk), .rst_n(rst_n), .x_i(y_c), .x_q(y_s), .y_i(lpf_i), .y_q(lpf_q)
  );

  rcf_decim u_rcf_i (
    .clk(clk), .rst_n(rst_n), .x(y_c), .half_stb(half_stb), .y(rcf_i), .out_valid(rcf_vi)
  );
  rcf_decim u_rcf_q (
    .clk(clk), .rst_n(rst_n), .x(y_s), .half_stb(half_stb), .y(rcf_q), .out_valid(rcf_vq)
  );

  // The equalizer adapts (decision-directed LMS) from time C on. Adapting
  // decision-directed while the DDML loop is still pulling in lets the taps
  // follow a slipping constellation.
  assign adapt_en = (state == ST_MMSE);

  ffe u_ffe_i (
    .clk(clk), .rst_n(rst_n), .init(handover), .in_valid(rcf_vi), .x(rcf_i),
    .sym_stb(sym_stb), .adapt_en(adapt_en), .err_valid(dec_valid), .err(err_i),
    .y(eq_i), .y_valid(eq_vi)
  );
  ffe u_ffe_q (
    .clk(clk), .rst_n(rst_n), .init(handover), .in_valid(rcf_vq), .x(rcf_q),
    .sym_stb(sym_stb), .adapt_en(adapt_en), .err_valid(dec_valid), .err(err_q),
    .y(eq_q), .y_valid(eq_vq)
  );

  assign dec_valid = eq_vi & eq_vq;

  slicer u_slc (
    .y_i(eq_i), .y_q(eq_q), .dec_i(dec_i), .dec_q(dec_q), .err_i(err_i), .err_q(err_q)
  );

  cr_core #(
    .G1_AT_PRIOR(G1_AT_PRIOR), .G2_AT_PRIOR(G2_AT_PRIOR),
    .G1_AT_POST (G1_AT_POST),  .G2_AT_POST (G2_AT_POST),
    .GEAR_PRIOR (GEAR_PRIOR),  .GEAR_DDML  (GEAR_DDML),  .GEAR_MMSE(GEAR_MMSE),
    .PF_B0_PRIOR(PF_B0_PRIOR), .PF_B1_PRIOR(PF_B1_PRIOR), .PF_A1_PRIOR(PF_A1_PRIOR),
    .PF_B0_POST (PF_B0_POST),  .PF_B1_POST (PF_B1_POST),  .PF_A1_POST (PF_A1_POST)
  ) u_cr (
    .clk(clk), .rst_n(rst_n), .state(state), .handover(handover),
    .lpf_i(lpf_i), .lpf_q(lpf_q), .eq_i(eq_i), .eq_q(eq_q),
    .dec_i(dec_i), .dec_q(dec_q), .err_i(err_i), .err_q(err_q),
    .eq_valid(dec_valid), .pd_e(pd_e), .dw(dw), .w_dc(w_dc), .fcw(fcw),
    .gear_idx(gear_idx), .phase(nco_phase), .lo_cos(lo_cos), .lo_msin(lo_msin)
  );

endmodule
