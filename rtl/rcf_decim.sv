// rcf_decim: root raised-cosine (square-root RCF) shaping filter on one
// rail, decimating from 4 to 2 samples per symbol.
//
// An NTAP-tap FIR over the 4x oversampled input, with taps
//     c[k] = round(2^CSH * g((k - (NTAP-1)/2) / 4))
// where g(t) is the root raised-cosine pulse of roll-off BETA (t in
// symbols), normalised to g(t) = [sin(pi t (1-b)) + 4 b t cos(pi t (1+b))]
//                              / [pi t (1 - (4 b t)^2)],  g(0) = 1 - b + 4b/pi.
// The taps are computed at elaboration. The output is
//     y = sat(sum c[k] x[n-k] >>> CSH)
// and is registered only when `half_stb` is high, giving the T/2-spaced
// stream for the fractionally spaced equalizer. A transmit pulse
// p = g / sum(g^2) through this filter has unit gain at the symbol instant.
//
// Timing: x enters the delay line every clock; y and out_valid update one
// clock after a half_stb.
//
// The description gives the filter's role and its down-sampling by two; the
// roll-off, length and coefficient width are this design's choices.
module rcf_decim
  import cr_pkg::*;
#(
  parameter int unsigned NTAP = 25,
  parameter int unsigned CSH  = 10,
  parameter real         BETA = 0.18
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [SIG_W-1:0]  x,
  input  logic                     half_stb,
  output logic signed [SIG_W-1:0]  y,
  output logic                     out_valid
);

  localparam int unsigned CW = CSH + 3;
  localparam int unsigned AW = SIG_W + CW + $clog2(NTAP);
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [CW-1:0] coef_t [NTAP];

  function automatic real rrc(input real t, input real b);
    real den;
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    den = PI * t * (1.0 - (4.0 * b * t) * (4.0 * b * t));
    if (den < 1.0e-9 && den > -1.0e-9)
      return (b / $sqrt(2.0)) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) +
                                 (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) / den;
  endfunction

  function automatic coef_t make_coefs();
    coef_t c;
    for (int k = 0; k < int'(NTAP); k++)
      c[k] = CW'($rtoi($floor(rrc((real'(k) - real'(NTAP - 1) / 2.0) / 4.0, BETA)
                              * real'(1 << CSH) + 0.5)));
    return c;
  endfunction

  localparam coef_t C = make_coefs();
  localparam logic signed [AW-1:0] YMAX = AW'((1 << (SIG_W - 1)) - 1);

  logic signed [SIG_W-1:0] dl [NTAP];
  logic signed [AW-1:0]    acc, acc_sh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAP); k++) dl[k] <= '0;
    end else begin
      dl[0] <= x;
      for (int k = 1; k < int'(NTAP); k++) dl[k] <= dl[k-1];
    end
  end

  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(NTAP); k++) acc += AW'(dl[k] * C[k]);
    acc_sh = acc >>> CSH;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= half_stb;
      if (half_stb) begin
        if (acc_sh > YMAX)        y <= SIG_W'(YMAX);
        else if (acc_sh < -YMAX)  y <= SIG_W'(-YMAX);
        else                      y <= SIG_W'(acc_sh);
      end
    end
  end

endmodule
