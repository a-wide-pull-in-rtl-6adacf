// loop_filter: proportional-integral loop filter with power-of-two gains.
//
// The two multipliers of a PI filter are replaced by shifts. A bank of
// parallel fixed right-shifts of the (pre-scaled) input feeds two MUXes,
// one choosing the proportional path and one the integral path; the shift
// amounts come from the gear-shifting table (gear_shift), which narrows the
// loop bandwidth as acquisition proceeds.
//     dw = Kp*x + sum(Ki*x),   Kp = 2^(10-kp_sh),  Ki = 2^(10-ki_sh)
// with gains stated relative to the phase error before the pre-filter (the
// pre-filter output x carries 4 fractional bits). The integrator keeps 18
// bits below the frequency-word LSB so that small integral gains do not
// round away. dw is in NCO frequency-word LSBs (2^-24 cycle per sample).
//
// Interface: in_valid marks a new pre-filter output; dw and out_valid are
// registered one clock later. `clear` empties the integrator (used when the
// prior loop hands over to the posterior loop, whose NCO centre frequency
// has just taken the prior loop's correction).
//
// The shifter/MUX structure follows the description; the gain scaling,
// fractional bits and the clear on hand-over are this design's choices.
module loop_filter
  import cr_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       clear,
  input  logic                       in_valid,
  input  logic signed [PF_W-1:0]     x,
  input  gear_t                      gear,
  output logic                       out_valid,
  output logic signed [PHASE_W-1:0]  dw
);

  localparam int unsigned SHL    = 24;          // input pre-scale
  localparam int unsigned OUT_SH = 18;          // integrator fraction bits
  localparam int unsigned W      = PF_W + SHL + 4;
  localparam int unsigned NSH    = 1 << SH_W;

  logic signed [W-1:0] x_w;
  logic signed [W-1:0] shifted [NSH];           // parallel shifters
  logic signed [W-1:0] prop, inc, integ, integ_next;

  assign x_w = W'(x) <<< SHL;

  always_comb begin
    for (int k = 0; k < int'(NSH); k++) shifted[k] = x_w >>> k;
    prop       = shifted[gear.kp_sh];          // Kp MUX
    inc        = shifted[gear.ki_sh];          // Ki MUX
    integ_next = integ + inc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      integ     <= '0;
      dw        <= '0;
      out_valid <= 1'b0;
    end else if (clear) begin
      integ     <= '0;
      dw        <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        integ <= integ_next;
        dw    <= PHASE_W'((prop + integ_next) >>> OUT_SH);
      end
    end
  end

endmodule
