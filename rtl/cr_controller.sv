// cr_controller: stage sequencer and rate strobes of the two-fold loop.
//
// After reset (time A) the loop runs the prior modified Costas stage for
// PRIOR_LEN sample clocks. On its last clock (time B) the controller pulses
// `handover`: the NCO latches its control word into the w_dc register, the
// pre-filter and loop filter are cleared, and the equalizer restarts from
// its initial taps. The state then becomes ST_DDML for DDML_LEN symbols and
// finally ST_MMSE (time C), where it stays.
//
// The controller also owns the decimation phase: a 2-bit counter of the
// 4x oversampled clock gives half_stb (one clock in two, the shaping
// filter's T/2 output rate) and sym_stb (one clock in four, the symbol rate
// seen by the FFE, slicer and posterior loop). sym_stb coincides with
// half_stb.
//
// Stage order and hand-over actions follow the description. It switches
// stages when the equalizer has roughly, then fully, converged; lacking a
// convergence criterion, this controller uses fixed stage lengths.
module cr_controller
  import cr_pkg::*;
#(
  parameter int unsigned PRIOR_LEN = 65536,  // sample clocks (16384 symbols)
  parameter int unsigned DDML_LEN  = 16384   // symbols
) (
  input  logic        clk,
  input  logic        rst_n,
  output cr_state_t   state,
  output logic        handover,   // one-clock pulse at B
  output logic        to_mmse,    // one-clock pulse at C
  output logic        half_stb,
  output logic        sym_stb
);

  localparam int unsigned CW = $clog2((PRIOR_LEN > DDML_LEN ? PRIOR_LEN : DDML_LEN) + 1);

  logic [1:0]    ph;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ph <= '0;
    else        ph <= ph + 2'd1;
  end

  assign half_stb = ph[0];
  assign sym_stb  = (ph == 2'd3);

  assign handover = (state == ST_PRIOR) && (cnt == CW'(PRIOR_LEN - 1));
  assign to_mmse  = (state == ST_DDML) && sym_stb && (cnt == CW'(DDML_LEN - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= ST_PRIOR;
      cnt   <= '0;
    end else begin
      unique case (state)
        ST_PRIOR: begin
          if (handover) begin
            state <= ST_DDML;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        ST_DDML: begin
          if (to_mmse) begin
            state <= ST_MMSE;
            cnt   <= '0;
          end else if (sym_stb) begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= ST_MMSE;
      endcase
    end
  end

endmodule
