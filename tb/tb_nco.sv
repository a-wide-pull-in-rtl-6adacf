// tb_nco: checks the NCO frequency word and phase accumulator against a
// model fcw = W0 + w_dc + dw_sel, where dw_sel is the control word delayed
// by one update (Z^-1) in ST_PRIOR and taken directly otherwise; checks that
// hold adds the selected word into w_dc; and checks that the carrier
// outputs follow the accumulator's top bits through the ROM (cos/-sin of
// the phase, within 2 LSB of 2047*cos at the ROM's half-step phase).
module tb_nco;
  import cr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cr_state_t state;
  logic signed [PHASE_W-1:0] dw;
  logic dw_valid, hold;
  logic [PHASE_W-1:0] w_dc, fcw, phase;
  logic signed [ROM_DW-1:0] cos_o, msin_o;

  nco dut (.clk, .rst_n, .state, .dw, .dw_valid, .hold, .w_dc, .fcw, .phase, .cos_o, .msin_o);

  localparam logic [PHASE_W-1:0] W0 = W0_DEFAULT;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [PHASE_W-1:0] m_dwq, m_wdc, m_ph, m_fcw, sel, prev_ph;
    int ec, es;
    real th;
    cr_state_t sts [3] = '{ST_PRIOR, ST_DDML, ST_MMSE};
    state = ST_PRIOR; dw = '0; dw_valid = 0; hold = 0;
    m_dwq = '0; m_wdc = '0; m_ph = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 30000; n++) begin
      if (n % 2000 == 0) state = sts[(n / 2000) % 3];
      dw = PHASE_W'(int'($urandom_range(0, 2 * 40000)) - 40000);
      dw_valid = ($urandom_range(0, 3) == 0);
      hold = ($urandom_range(0, 499) == 0);
      #1;
      sel = (state == ST_PRIOR) ? m_dwq : dw;
      m_fcw = W0 + m_wdc + sel;
      checks += 2;
      if (fcw != m_fcw) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d fcw %0h expected %0h", n, fcw, m_fcw);
      end
      if (phase != m_ph) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d phase %0h expected %0h", n, phase, m_ph);
      end
      prev_ph = m_ph;
      @(posedge clk);
      m_ph = m_ph + m_fcw;
      if (hold) m_wdc = m_wdc + sel;
      if (dw_valid) m_dwq = dw;
      #1;
      // ROM output now reflects the accumulator value before this edge
      th = 2.0 * 3.14159265358979 * (real'(prev_ph[PHASE_W-1 -: ROM_AW]) + 0.5) / 1024.0;
      ec = $rtoi($floor(2047.0 * $cos(th) + 0.5));
      es = $rtoi($floor(-2047.0 * $sin(th) + 0.5));
      checks++;
      if (int'(cos_o) - ec > 2 || ec - int'(cos_o) > 2 || int'(msin_o) - es > 2 || es - int'(msin_o) > 2) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d carrier %0d/%0d expected %0d/%0d", n, cos_o, msin_o, ec, es);
      end
      checks++;
      if (w_dc != m_wdc) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d w_dc %0h expected %0h", n, w_dc, m_wdc);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
