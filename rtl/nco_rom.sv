// nco_rom: sine/cosine look-up for the recovered carrier.
//
// The NCO phase accumulator's top ROM_AW bits address this ROM, which returns
// cos(theta) and -sin(theta), the two local-oscillator rails driven into the
// I/Q mixer (the -90 degree branch of the loop). Only a quarter wave is
// stored: QN = 2^(ROM_AW-2) entries of sin(2*pi*(k+0.5)/2^ROM_AW), scaled to
// AMP. The half-step offset makes the four quadrants exact mirror images, so
// each output is one table read plus an index mirror and a sign flip. The
// table is computed at elaboration from that formula.
//
// Timing: one register stage; outputs correspond to the phase presented on
// the previous clock.
//
// The description names the NCO ROM and its role; table size, amplitude and
// quarter-wave folding are this design's choices.
module nco_rom #(
  parameter int unsigned AW  = cr_pkg::ROM_AW,
  parameter int unsigned DW  = cr_pkg::ROM_DW,
  parameter int signed   AMP = (1 << (cr_pkg::ROM_DW - 1)) - 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [AW-1:0]        phase,
  output logic signed [DW-1:0] cos_o,   // cos(theta)
  output logic signed [DW-1:0] msin_o   // -sin(theta)
);

  localparam int unsigned QN = 1 << (AW - 2);
  typedef logic signed [DW-1:0] table_t [QN];

  function automatic table_t make_table();
    table_t t;
    for (int k = 0; k < int'(QN); k++) begin
      t[k] = DW'($rtoi($floor(real'(AMP) *
                   $sin(2.0 * 3.14159265358979323846 * (real'(k) + 0.5) / real'(1 << AW)) + 0.5)));
    end
    return t;
  endfunction

  localparam table_t QTAB = make_table();

  // sin of a phase: quadrant in the two top bits, position in the rest.
  function automatic logic signed [DW-1:0] sin_of(input logic [AW-1:0] p);
    logic [AW-3:0]        idx;
    logic signed [DW-1:0] mag;
    idx = p[AW-2] ? ~p[AW-3:0] : p[AW-3:0];
    mag = QTAB[idx];
    return p[AW-1] ? -mag : mag;
  endfunction

  localparam logic [AW-1:0] QUARTER = AW'(1) << (AW - 2);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cos_o  <= '0;
      msin_o <= '0;
    end else begin
      cos_o  <= sin_of(phase + QUARTER);
      msin_o <= -sin_of(phase);
    end
  end

endmodule
