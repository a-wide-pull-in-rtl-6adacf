// gear_shift: gear-shifting control of the PI loop filter bandwidth.
//
// Each stage starts in gear 0 (widest bandwidth, fastest pull-in) and steps
// to gear 1 and gear 2 after G1_AT and G2_AT loop updates in that stage,
// each gear a narrower loop. The table gives, per stage and gear, the right
// shifts that select Kp and Ki in loop_filter (gain = 2^(10-shift)):
//     ST_PRIOR : Kp 2^10, 2^9, 2^7     Ki 2^3,  2^1,  2^-3  (per sample)
//     ST_DDML  : Kp 2^5,  2^4, 2^4     Ki 2^-2, 2^-4, 2^-4  (per symbol)
//     ST_MMSE  : Kp 2^3                Ki 2^-6               (per symbol)
// The posterior gears come from a second-order loop design (damping near
// 0.9) for a phase detector gain of about 512 LSB per radian (64-QAM grid
// with unit 64). The prior gears were set by simulation on a pulse-shaped
// 64-QAM signal: a wide first gear for pull-in, then a quick step down,
// because the Costas detector's data-pattern noise makes a wide loop
// wander.
//
// Interface: `step` counts one loop update; the count restarts whenever
// `state` changes. `gear` is combinational from the count; gear_idx shows
// the current gear.
//
// The description states that parallel shifters and a MUX perform gear
// shifting toward optimal bandwidths; the number of gears, their switching
// points and the gains are this design's choices.
module gear_shift
  import cr_pkg::*;
#(
  parameter int unsigned CNT_W = 20,
  parameter int unsigned G1_AT_PRIOR = 8192,    // samples
  parameter int unsigned G2_AT_PRIOR = 16384,
  parameter int unsigned G1_AT_POST  = 4096,    // symbols
  parameter int unsigned G2_AT_POST  = 8192,
  parameter gear_t TAB_PRIOR [3] = '{'{5'd0, 5'd7}, '{5'd1, 5'd9}, '{5'd3, 5'd13}},
  parameter gear_t TAB_DDML  [3] = '{'{5'd5, 5'd12}, '{5'd6, 5'd14}, '{5'd6, 5'd14}},
  parameter gear_t TAB_MMSE  [3] = '{'{5'd7, 5'd16}, '{5'd7, 5'd16}, '{5'd7, 5'd16}}
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cr_state_t   state,
  input  logic        step,
  output gear_t       gear,
  output logic [1:0]  gear_idx
);

  logic [CNT_W-1:0] cnt;
  cr_state_t        state_q;
  logic [CNT_W-1:0] g1, g2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt     <= '0;
      state_q <= ST_PRIOR;
    end else begin
      state_q <= state;
      if (state != state_q)             cnt <= '0;
      else if (step && cnt != '1)       cnt <= cnt + 1'b1;
    end
  end

  always_comb begin
    g1 = (state == ST_PRIOR) ? CNT_W'(G1_AT_PRIOR) : CNT_W'(G1_AT_POST);
    g2 = (state == ST_PRIOR) ? CNT_W'(G2_AT_PRIOR) : CNT_W'(G2_AT_POST);
    if (cnt >= g2)      gear_idx = 2'd2;
    else if (cnt >= g1) gear_idx = 2'd1;
    else                gear_idx = 2'd0;
    unique case (state)
      ST_DDML: gear = TAB_DDML[gear_idx];
      ST_MMSE: gear = TAB_MMSE[gear_idx];
      default: gear = TAB_PRIOR[gear_idx];
    endcase
  end

endmodule
