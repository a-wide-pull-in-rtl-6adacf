// cr_pkg: types and constants shared by the two-fold carrier recovery loop.
//
// The loop runs in three consecutive stages that reuse one phase detector,
// one IIR pre-filter, one PI loop filter and one NCO. The stage is carried
// on the `state` control signal as cr_state_t. Word widths below are this
// implementation's choice; the stage rates (21.52 MHz sample clock, 4x
// oversampling, 5.38 MHz symbol rate) and the 4.035 MHz low-IF carrier
// come from the design description.
package cr_pkg;

  // Stage of the two-fold loop. ST_PRIOR is the non-decision-directed
  // modified Costas loop (prior, wide-band loop). ST_DDML and ST_MMSE are the
  // two decision-directed stages of the posterior, narrow-band loop.
  typedef enum logic [1:0] {
    ST_PRIOR = 2'd0,
    ST_DDML  = 2'd1,
    ST_MMSE  = 2'd2
  } cr_state_t;

  localparam int unsigned ADC_W   = 10;  // real input sample from the ADC
  localparam int unsigned SIG_W   = 12;  // baseband I/Q samples
  localparam int unsigned ERR_W   = 16;  // phase detector output
  localparam int unsigned PF_W    = 20;  // pre-filter output, 4 fractional bits
  localparam int unsigned PHASE_W = 24;  // NCO phase accumulator / frequency word
  localparam int unsigned ROM_AW  = 10;  // phase bits used to address the NCO ROM
  localparam int unsigned ROM_DW  = 12;  // sine / cosine amplitude
  localparam int unsigned COEF_W  = 16;  // pre-filter coefficients, Q2.14
  localparam int unsigned SH_W    = 5;   // loop filter shift amount

  // 64-QAM slicer: levels are +-1,3,5,7 times SLICE_UNIT on each rail.
  localparam int signed SLICE_UNIT = 64;

  // Centre frequency w0: 4.035 MHz / 21.52 MHz = 3/16 cycle per sample.
  localparam logic [PHASE_W-1:0] W0_DEFAULT = PHASE_W'(3) << (PHASE_W - 4);

  // Shift pair chosen by the gear-shifting table for the PI loop filter.
  typedef struct packed {
    logic [SH_W-1:0] kp_sh;
    logic [SH_W-1:0] ki_sh;
  } gear_t;

endpackage
