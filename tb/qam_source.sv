// qam_source: test signal generator (behavioural, testbench only).
//
// Produces the real low-IF samples an ADC would deliver for a 64-QAM
// stream: random symbols with levels (2k-7)*LEVEL per rail, shaped at 4
// samples per symbol by a root raised-cosine pulse p = g / sum(g^2) (the
// same pulse family as the receiver's shaping filter, so the cascade has
// unit gain and no ISI at the symbol instant), modulated onto a carrier of
// 3/16 of the sample rate plus an offset of FOFF_HZ (sample rate 21.52 MHz)
// and a start phase, with Gaussian noise of NOISE_RMS LSB added, rounded
// and clipped to 10 bits. One sample per clock, on the rising edge.
// sym_i/sym_q give the level index (-7..7) of the symbol whose pulse peak
// is leaving the generator, for reference.
module qam_source #(
  parameter real         FOFF_HZ   = 100.0e3,
  parameter real         PHASE0    = 0.3,
  parameter real         LEVEL     = 32.0,
  parameter real         NOISE_RMS = 1.0,
  parameter int unsigned NTAP      = 25,
  parameter real         BETA      = 0.18,
  parameter int unsigned SYM_PHASE = 0      // sample of the 4 on which symbols start
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic signed [9:0] adc,
  output int                sym_i,
  output int                sym_q
);

  localparam real PI = 3.14159265358979323846;
  localparam real FS = 21.52e6;

  real p [NTAP];
  int  hist_i [NTAP];   // upsampled symbol stream (zero between symbols)
  int  hist_q [NTAP];
  real carrier_ph;
  int  ph4;

  function automatic real pulse(input real t);
    real d;
    if (t == 0.0) return 1.0 - BETA + 4.0 * BETA / PI;
    d = PI * t * (1.0 - 16.0 * BETA * BETA * t * t);
    return ($sin(PI * t * (1.0 - BETA)) + 4.0 * BETA * t * $cos(PI * t * (1.0 + BETA))) / d;
  endfunction

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 65535))) / 65536.0;
    u2 = (real'($urandom_range(0, 65535))) / 65536.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  initial begin
    real e;
    e = 0.0;
    for (int k = 0; k < int'(NTAP); k++) e += pulse((real'(k) - real'(NTAP - 1) / 2.0) / 4.0) ** 2;
    for (int k = 0; k < int'(NTAP); k++) p[k] = pulse((real'(k) - real'(NTAP - 1) / 2.0) / 4.0) / e;
    for (int k = 0; k < int'(NTAP); k++) begin hist_i[k] = 0; hist_q[k] = 0; end
    carrier_ph = PHASE0;
    ph4 = (4 - int'(SYM_PHASE)) % 4;
    adc = '0;
    sym_i = 0;
    sym_q = 0;
  end

  always @(posedge clk) begin
    real xi, xq, s;
    int  si;
    if (rst_n) begin
      for (int k = int'(NTAP) - 1; k > 0; k--) begin
        hist_i[k] = hist_i[k-1];
        hist_q[k] = hist_q[k-1];
      end
      if (ph4 == 0) begin
        hist_i[0] = 2 * int'($urandom_range(0, 7)) - 7;
        hist_q[0] = 2 * int'($urandom_range(0, 7)) - 7;
      end else begin
        hist_i[0] = 0;
        hist_q[0] = 0;
      end
      ph4 = (ph4 + 1) % 4;
      xi = 0.0;
      xq = 0.0;
      for (int k = 0; k < int'(NTAP); k++) begin
        xi += p[k] * real'(hist_i[k]);
        xq += p[k] * real'(hist_q[k]);
      end
      s = LEVEL * (xi * $cos(carrier_ph) - xq * $sin(carrier_ph)) + NOISE_RMS * gauss();
      carrier_ph += 2.0 * PI * (3.0 / 16.0 + FOFF_HZ / FS);
      if (carrier_ph > 2.0 * PI) carrier_ph -= 2.0 * PI;
      si = $rtoi($floor(s + 0.5));
      if (si > 511)  si = 511;
      if (si < -512) si = -512;
      adc   <= 10'(si);
      sym_i <= hist_i[(NTAP - 1) / 2];
      sym_q <= hist_q[(NTAP - 1) / 2];
    end
  end

endmodule
