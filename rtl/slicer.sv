// slicer: 64-QAM decision device on both rails.
//
// Each rail is decided to the nearest of the eight levels (2k+1)*U,
// k = -4..3, U = SLICE_UNIT (64), i.e. +-64, +-192, +-320, +-448:
//     dec = clamp(floor(y / 2U) * 2U + U, -7U, 7U)
// and the equalizer error err = y - dec is formed alongside. The decision
// feeds the DDML phase detector (its sign), the error feeds the DD-MMSE
// phase detector and the FFE adaptation.
//
// Timing: combinational.
//
// The 64-QAM slicer follows the description; the level spacing is this
// design's choice.
module slicer
  import cr_pkg::*;
(
  input  logic signed [SIG_W-1:0] y_i,
  input  logic signed [SIG_W-1:0] y_q,
  output logic signed [SIG_W-1:0] dec_i,
  output logic signed [SIG_W-1:0] dec_q,
  output logic signed [SIG_W-1:0] err_i,
  output logic signed [SIG_W-1:0] err_q
);

  localparam logic signed [SIG_W-1:0] U    = SIG_W'(SLICE_UNIT);
  localparam int unsigned             LSH  = $clog2(2 * SLICE_UNIT);

  function automatic logic signed [SIG_W-1:0] decide(input logic signed [SIG_W-1:0] y);
    logic signed [SIG_W-1:0] d;
    d = ((y >>> LSH) <<< LSH) + U;
    if (d > 7 * U)  d = 7 * U;
    if (d < -7 * U) d = -7 * U;
    return d;
  endfunction

  always_comb begin
    dec_i = decide(y_i);
    dec_q = decide(y_q);
    err_i = y_i - dec_i;
    err_q = y_q - dec_q;
  end

endmodule
