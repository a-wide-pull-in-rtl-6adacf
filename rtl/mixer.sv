// mixer: I/Q down-conversion of the real low-IF input by the recovered
// carrier.
//
//     y_c = s * cos(theta),   y_s = s * (-sin(theta))
// with theta the NCO phase, so (y_c + j*y_s) = s * exp(-j*theta): the
// complex envelope of the input appears at baseband (plus an image at
// twice the carrier, removed by the filters that follow).
//
// Scaling: a 10-bit input times a 12-bit carrier of amplitude 2047 is
// shifted right by 10, so a full-scale carrier has unity gain on the
// complex envelope (the factor 1/2 of mixing times the carrier's 2047/1024).
// Timing: one register stage.
//
// The quadrature mixer with cos and -sin branches is as drawn in the loop
// diagrams; widths and scaling are this design's choices.
module mixer
  import cr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [ADC_W-1:0]    s,
  input  logic signed [ROM_DW-1:0]   lo_cos,
  input  logic signed [ROM_DW-1:0]   lo_msin,
  output logic signed [SIG_W-1:0]    y_c,
  output logic signed [SIG_W-1:0]    y_s
);

  localparam int unsigned PW = ADC_W + ROM_DW;
  localparam int unsigned SH = ROM_DW - 2;

  logic signed [PW-1:0] p_c, p_s;

  assign p_c = s * lo_cos;
  assign p_s = s * lo_msin;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_c <= '0;
      y_s <= '0;
    end else begin
      y_c <= SIG_W'(p_c >>> SH);
      y_s <= SIG_W'(p_s >>> SH);
    end
  end

endmodule
