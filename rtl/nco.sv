// nco: numerically controlled oscillator of the shared carrier recovery loop.
//
// The PI loop filter's control word dw passes through a Z^-1/MUX pair: in
// the prior (Costas) stage, which updates at the 4x oversampled rate, dw is
// registered; in the posterior stages, which update at the symbol rate, it
// is taken directly. The frequency word is
//     fcw = w0 + w_dc + dw
// where w0 is the free-running centre frequency and w_dc is the hold
// register (REG). A one-cycle `hold` pulse, issued at the end of the prior
// stage, latches the control word into w_dc, so that the posterior loop
// starts from w0 + w_dc. The phase accumulator advances by fcw every sample
// clock and its top bits address nco_rom, which gives cos and -sin for the
// mixer.
//
// Timing: fcw acts on the accumulator in the same clock it is formed; the
// ROM adds one register stage, so cos_o/msin_o follow the accumulator by one
// clock.
//
// The structure (Z^-1, MUX, Hold, REG, the two adders and the accumulator)
// follows the described circuit. Word widths, the reset value of w_dc
// (zero) and truncating the phase to the ROM address are this design's
// choices.
module nco
  import cr_pkg::*;
#(
  parameter int unsigned         PW = PHASE_W,
  parameter logic [PW-1:0]       W0 = W0_DEFAULT
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  cr_state_t                   state,
  input  logic signed [PW-1:0]        dw,        // loop filter control word
  input  logic                        dw_valid,  // dw updated this clock
  input  logic                        hold,      // latch w_dc (end of prior stage)
  output logic [PW-1:0]               w_dc,      // latched frequency correction
  output logic [PW-1:0]               fcw,       // w0 + w_dc + dw
  output logic [PW-1:0]               phase,     // phase accumulator
  output logic signed [ROM_DW-1:0]    cos_o,
  output logic signed [ROM_DW-1:0]    msin_o
);

  logic signed [PW-1:0] dw_q;    // Z^-1 of the control word
  logic signed [PW-1:0] dw_sel;  // MUX output

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        dw_q <= '0;
    else if (dw_valid) dw_q <= dw;
  end

  assign dw_sel = (state == ST_PRIOR) ? dw_q : dw;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    w_dc <= '0;
    else if (hold) w_dc <= w_dc + dw_sel;
  end

  assign fcw = W0 + w_dc + dw_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase <= '0;
    else        phase <= phase + fcw;
  end

  nco_rom u_rom (
    .clk   (clk),
    .rst_n (rst_n),
    .phase (phase[PW-1 -: ROM_AW]),
    .cos_o (cos_o),
    .msin_o(msin_o)
  );

endmodule
