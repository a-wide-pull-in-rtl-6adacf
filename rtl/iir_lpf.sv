// iir_lpf: IIR low-pass filter on both mixer rails, feeding the prior
// (Costas) phase detector. STAGES (1 or 2) cascaded one-pole sections:
//
//     a1[n] = a1[n-1] + ((x[n] << F) - a1[n-1]) >>> K
//     a2[n] = a2[n-1] + (a1[n-1] - a2[n-1]) >>> K,       y = a2 >>> F
//
// each with DC gain 1 and pole at 1 - 2^-K, running at the sample clock.
// F = 4 fractional bits are kept in the state to avoid a truncation bias.
// The filter attenuates the image at twice the carrier that the mixer
// leaves; the prior loop's pre-filter and loop filter average the residue.
// With STAGES = 1 the output is a1 delayed by one clock.
//
// Timing: two register stages from x to y.
//
// The description only names this as an IIR LPF in the prior-loop path;
// the order, poles and widths are this design's choices.
module iir_lpf
  import cr_pkg::*;
#(
  parameter int unsigned K = 1,
  parameter int unsigned STAGES = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [SIG_W-1:0]  x_i,
  input  logic signed [SIG_W-1:0]  x_q,
  output logic signed [SIG_W-1:0]  y_i,
  output logic signed [SIG_W-1:0]  y_q
);

  localparam int unsigned F  = 4;
  localparam int unsigned AW = SIG_W + F + 1;

  logic signed [AW-1:0] a1_i, a1_q, a2_i, a2_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a1_i <= '0;
      a1_q <= '0;
      a2_i <= '0;
      a2_q <= '0;
    end else begin
      a1_i <= a1_i + (((AW'(x_i) <<< F) - a1_i) >>> K);
      a1_q <= a1_q + (((AW'(x_q) <<< F) - a1_q) >>> K);
      a2_i <= (STAGES > 1) ? a2_i + ((a1_i - a2_i) >>> K) : a1_i;
      a2_q <= (STAGES > 1) ? a2_q + ((a1_q - a2_q) >>> K) : a1_q;
    end
  end

  assign y_i = SIG_W'(a2_i >>> F);
  assign y_q = SIG_W'(a2_q >>> F);

endmodule
