// phase_detector: the shared multiplier-free phase detector.
//
// One circuit serves all three stages. An input MUX, steered by `state`,
// picks the data pair a = (a_i, a_q) and the sign pair s = (s_i, s_q):
//   ST_PRIOR  modified Costas (non-decision-directed ML):
//             a = IIR LPF output,   s = IIR LPF output
//   ST_DDML   decision-directed ML:
//             a = equalizer output, s = slicer decision
//   ST_MMSE   decision-directed MMSE:
//             a = equalizer error (output - decision), s = equalizer output
// and forms  e = a_q * sgn(s_i) - a_i * sgn(s_q).
// The sign "multiplications" are conditional negations, so the detector has
// no multiplier. For a constellation point rotated by a small angle theta
// each stage gives e ~ theta * (|I_i| + |I_q|) plus data-dependent noise, so
// all three share one loop polarity. sgn(0) is taken as +1.
//
// Timing: combinational. The register that follows it in the prior stage
// lives in prefilter.
//
// The three sources and the sign-bit detectors follow the description. The
// MMSE detector is written as the imaginary part of sgn(y)^* (y - I), chosen
// so that its polarity matches the other two; the detector equations as
// printed leave the sign convention open.
module phase_detector
  import cr_pkg::*;
(
  input  cr_state_t                  state,
  input  logic signed [SIG_W-1:0]    lpf_i,  lpf_q,   // IIR LPF output
  input  logic signed [SIG_W-1:0]    eq_i,   eq_q,    // equalizer output
  input  logic signed [SIG_W-1:0]    dec_i,  dec_q,   // slicer decision
  input  logic signed [SIG_W-1:0]    err_i,  err_q,   // equalizer error
  output logic signed [ERR_W-1:0]    e
);

  logic signed [SIG_W-1:0] a_i, a_q, s_i, s_q;
  logic signed [ERR_W-1:0] t_q, t_i;

  always_comb begin
    unique case (state)
      ST_DDML: begin a_i = eq_i;  a_q = eq_q;  s_i = dec_i; s_q = dec_q; end
      ST_MMSE: begin a_i = err_i; a_q = err_q; s_i = eq_i;  s_q = eq_q;  end
      default: begin a_i = lpf_i; a_q = lpf_q; s_i = lpf_i; s_q = lpf_q; end
    endcase
    t_q = s_i[SIG_W-1] ? -ERR_W'(a_q) : ERR_W'(a_q);
    t_i = s_q[SIG_W-1] ? -ERR_W'(a_i) : ERR_W'(a_i);
    e   = t_q - t_i;
  end

endmodule
