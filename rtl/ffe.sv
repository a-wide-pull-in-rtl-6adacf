// ffe: fractionally spaced (T/2) feed-forward equalizer on one rail,
// decimating to the symbol rate, with decision-directed LMS adaptation.
//
// A delay line of NTAP samples is shifted on every T/2 input (in_valid).
// On each symbol strobe the equalizer snapshots the line and forms
//     y = sat(sum w[k] * x[k] >>> 12)
// with taps w in Q3.12 (4096 = 1.0). Every tap starts at zero except tap
// CENTER, which starts at INIT_GAIN; `init` reloads that state. When
// adapt_en is high and the slicer error for the last output arrives
// (err_valid), every tap is updated by the LMS rule
//     wa[k] <- wa[k] - (err * xs[k]) >>> MU_SH
// on a 36-bit tap accumulator wa = w * 2^12, so small updates are kept.
//
// Interface: y_valid pulses one clock after sym_stb. The I and Q rails each
// have their own real equalizer, so the equalizer cannot rotate the
// constellation and leaves the carrier phase to the carrier recovery loop.
//
// The description uses a fractionally spaced FFE that down-samples to the
// symbol rate and is adapted by a multi-stage LMS-based blind algorithm
// taken from other work. That blind algorithm is not reproduced: this FFE
// is frozen at its initial taps until adaptation is enabled and then runs
// plain decision-directed LMS. Length, step size and widths are this
// design's choices.
module ffe
  import cr_pkg::*;
#(
  parameter int unsigned NTAP      = 16,
  parameter int unsigned CENTER    = 8,
  parameter int signed   INIT_GAIN = 8192,   // 2.0 in Q3.12
  parameter int unsigned MU_SH     = 0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     init,
  input  logic                     in_valid,   // new T/2 sample
  input  logic signed [SIG_W-1:0]  x,
  input  logic                     sym_stb,    // form an output
  input  logic                     adapt_en,
  input  logic                     err_valid,
  input  logic signed [SIG_W-1:0]  err,
  output logic signed [SIG_W-1:0]  y,
  output logic                     y_valid
);

  localparam int unsigned WF  = 12;           // tap fraction bits
  localparam int unsigned XF  = 12;           // extra accumulator bits
  localparam int unsigned TW  = 36;           // tap accumulator width
  localparam int unsigned AW  = 40;
  localparam logic signed [AW-1:0] YMAX = AW'((1 << (SIG_W - 1)) - 1);

  logic signed [SIG_W-1:0] dl [NTAP];
  logic signed [SIG_W-1:0] xs [NTAP];         // snapshot for the update
  logic signed [TW-1:0]    wa [NTAP];
  logic signed [AW-1:0]    acc, acc_sh;

  always_comb begin
    acc = '0;
    for (int k = 0; k < int'(NTAP); k++)
      acc += AW'(dl[k]) * AW'(wa[k] >>> XF);
    acc_sh = acc >>> WF;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAP); k++) begin
        dl[k] <= '0;
        xs[k] <= '0;
      end
      y       <= '0;
      y_valid <= 1'b0;
    end else begin
      if (in_valid) begin
        dl[0] <= x;
        for (int k = 1; k < int'(NTAP); k++) dl[k] <= dl[k-1];
      end
      y_valid <= sym_stb;
      if (sym_stb) begin
        for (int k = 0; k < int'(NTAP); k++) xs[k] <= dl[k];
        if (acc_sh > YMAX)       y <= SIG_W'(YMAX);
        else if (acc_sh < -YMAX) y <= SIG_W'(-YMAX);
        else                     y <= SIG_W'(acc_sh);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < int'(NTAP); k++)
        wa[k] <= (k == int'(CENTER)) ? (TW'(INIT_GAIN) <<< XF) : '0;
    end else if (init) begin
      for (int k = 0; k < int'(NTAP); k++)
        wa[k] <= (k == int'(CENTER)) ? (TW'(INIT_GAIN) <<< XF) : '0;
    end else if (adapt_en && err_valid) begin
      for (int k = 0; k < int'(NTAP); k++)
        wa[k] <= wa[k] - (TW'(err * xs[k]) >>> MU_SH);
    end
  end

endmodule
