// prefilter: shared first-order IIR pre-filter ahead of the PI loop filter.
//
// The sign-bit phase detector is noisy, so its output is smoothed by an IIR
// filter whose bandwidth is several times (the description says 5 to 10)
// that of the closed loop. One filter is shared by all stages; the `state`
// signal switches its three coefficients between a prior-stage set (4x
// oversampled rate) and a posterior-stage set (symbol rate).
//
// Input stage (Z^-1 + MUX): in ST_PRIOR, the sample-rate stage, the phase
// error is first latched in a register and the filter steps one clock later;
// in the posterior stages the error feeds the filter directly.
//
// Filter (transposed direct form, as drawn with b1, b0, a1 and one delay):
//     y[n] = b0*x[n] + s[n-1]
//     s[n] = b1*x[n] - a1*y[n]
//     H(z) = (b0 + b1 z^-1) / (1 + a1 z^-1)
// Coefficients are Q2.14. The defaults are one-pole low-pass filters with
// unity DC gain: pole at 1-2^-5 in the prior stage and at 1-2^-3 in the
// posterior stages. y is kept at full precision in the recursion; the output
// y_o carries 4 fractional bits, so a constant input x gives y_o = 16*x.
//
// Interface: in_valid marks a new phase error e. out_valid marks a new y_o,
// one clock after the filter step. `clear` empties the filter state.
//
// The structure and the switched coefficients follow the description; the
// coefficient values and widths are this design's choices.
module prefilter
  import cr_pkg::*;
#(
  parameter logic signed [COEF_W-1:0] B0_PRIOR = 16'sd0,
  parameter logic signed [COEF_W-1:0] B1_PRIOR = 16'sd512,     // 2^-5
  parameter logic signed [COEF_W-1:0] A1_PRIOR = -16'sd15872,  // -(1-2^-5)
  parameter logic signed [COEF_W-1:0] B0_POST  = 16'sd0,
  parameter logic signed [COEF_W-1:0] B1_POST  = 16'sd2048,    // 2^-3
  parameter logic signed [COEF_W-1:0] A1_POST  = -16'sd14336   // -(1-2^-3)
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  cr_state_t                  state,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic signed [ERR_W-1:0]    e,
  output logic                       out_valid,
  output logic signed [PF_W-1:0]     y_o
);

  localparam int unsigned FRAC = 14;          // coefficient fraction bits
  localparam int unsigned ACC_W = 40;

  logic                       prior;
  logic signed [ERR_W-1:0]    x_q;            // Z^-1 in front of the filter
  logic                       v_q;
  logic signed [ERR_W-1:0]    x;              // MUX output
  logic                       step;
  logic signed [COEF_W-1:0]   b0, b1, a1;
  logic signed [ACC_W-1:0]    s_q;            // filter delay element
  logic signed [ACC_W-1:0]    y_full, s_next;
  logic signed [ACC_W+COEF_W-1:0] fb;

  assign prior = (state == ST_PRIOR);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q <= '0;
      v_q <= 1'b0;
    end else if (clear) begin
      x_q <= '0;
      v_q <= 1'b0;
    end else begin
      v_q <= in_valid;
      if (in_valid) x_q <= e;
    end
  end

  assign x    = prior ? x_q : e;
  assign step = prior ? v_q : in_valid;

  always_comb begin
    b0 = prior ? B0_PRIOR : B0_POST;
    b1 = prior ? B1_PRIOR : B1_POST;
    a1 = prior ? A1_PRIOR : A1_POST;
    y_full = ACC_W'(b0 * x) + s_q;
    fb     = a1 * y_full;
    s_next = ACC_W'(b1 * x) - ACC_W'(fb >>> FRAC);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q       <= '0;
      y_o       <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      s_q       <= '0;
      y_o       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= step;
      if (step) begin
        s_q <= s_next;
        y_o <= PF_W'(y_full >>> (FRAC - 4));
      end
    end
  end

endmodule
