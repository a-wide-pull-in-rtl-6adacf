// cr_core: the hardware-sharing carrier recovery loop.
//
// One chain, phase detector -> pre-filter -> PI loop filter -> NCO, serves
// the three stages of the two-fold loop; `state` re-steers it:
//   ST_PRIOR  modified Costas loop on the IIR LPF output, updated every
//             sample clock (4x symbol rate); the phase error and the NCO
//             control word each pass through a register (Z^-1/MUX); the
//             pre-filter uses its prior coefficients; gears from the prior
//             table.
//   ST_DDML / ST_MMSE
//             decision-directed ML, then MMSE, on the equalizer output,
//             updated once per symbol (eq_valid); both registers are
//             bypassed; posterior pre-filter coefficients and gears.
// `handover` (end of ST_PRIOR) latches the NCO control word into the w_dc
// register and clears the pre-filter and loop filter, so the posterior loop
// starts from w0 + w_dc.
//
// Loop delay in ST_PRIOR, from an NCO phase step to the control word it
// causes: ROM 1, mixer 1, LPF 1, Z^-1 1, pre-filter 1, loop filter 1 clock,
// plus the Z^-1 in the NCO.
//
// The partition and the sharing follow the description's circuit-level
// diagram of the loop.
module cr_core
  import cr_pkg::*;
#(
  parameter logic [PHASE_W-1:0] W0 = W0_DEFAULT,
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
  parameter logic signed [COEF_W-1:0] PF_A1_POST  = -16'sd14336
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  cr_state_t                   state,
  input  logic                        handover,
  input  logic signed [SIG_W-1:0]     lpf_i, lpf_q,
  input  logic signed [SIG_W-1:0]     eq_i,  eq_q,
  input  logic signed [SIG_W-1:0]     dec_i, dec_q,
  input  logic signed [SIG_W-1:0]     err_i, err_q,
  input  logic                        eq_valid,
  output logic signed [ERR_W-1:0]     pd_e,
  output logic signed [PHASE_W-1:0]   dw,
  output logic [PHASE_W-1:0]          w_dc,
  output logic [PHASE_W-1:0]          fcw,
  output logic [1:0]                  gear_idx,
  output logic [PHASE_W-1:0]          phase,
  output logic signed [ROM_DW-1:0]    lo_cos,
  output logic signed [ROM_DW-1:0]    lo_msin
);

  logic                    pd_valid;
  logic                    pf_valid;
  logic signed [PF_W-1:0]  pf_y;
  logic                    lf_valid;
  gear_t                   gear;

  assign pd_valid = (state == ST_PRIOR) ? !handover : eq_valid;

  phase_detector u_pd (
    .state (state),
    .lpf_i (lpf_i), .lpf_q (lpf_q),
    .eq_i  (eq_i),  .eq_q  (eq_q),
    .dec_i (dec_i), .dec_q (dec_q),
    .err_i (err_i), .err_q (err_q),
    .e     (pd_e)
  );

  prefilter #(
    .B0_PRIOR(PF_B0_PRIOR), .B1_PRIOR(PF_B1_PRIOR), .A1_PRIOR(PF_A1_PRIOR),
    .B0_POST (PF_B0_POST),  .B1_POST (PF_B1_POST),  .A1_POST (PF_A1_POST)
  ) u_pf (
    .clk      (clk),
    .rst_n    (rst_n),
    .state    (state),
    .clear    (handover),
    .in_valid (pd_valid),
    .e        (pd_e),
    .out_valid(pf_valid),
    .y_o      (pf_y)
  );

  gear_shift #(
    .G1_AT_PRIOR(G1_AT_PRIOR), .G2_AT_PRIOR(G2_AT_PRIOR),
    .G1_AT_POST (G1_AT_POST),  .G2_AT_POST (G2_AT_POST),
    .TAB_PRIOR  (GEAR_PRIOR),  .TAB_DDML   (GEAR_DDML),  .TAB_MMSE(GEAR_MMSE)
  ) u_gear (
    .clk     (clk),
    .rst_n   (rst_n),
    .state   (state),
    .step    (pf_valid),
    .gear    (gear),
    .gear_idx(gear_idx)
  );

  loop_filter u_lf (
    .clk      (clk),
    .rst_n    (rst_n),
    .clear    (handover),
    .in_valid (pf_valid),
    .x        (pf_y),
    .gear     (gear),
    .out_valid(lf_valid),
    .dw       (dw)
  );

  nco #(.W0(W0)) u_nco (
    .clk     (clk),
    .rst_n   (rst_n),
    .state   (state),
    .dw      (dw),
    .dw_valid(lf_valid),
    .hold    (handover),
    .w_dc    (w_dc),
    .fcw     (fcw),
    .phase   (phase),
    .cos_o   (lo_cos),
    .msin_o  (lo_msin)
  );

endmodule
