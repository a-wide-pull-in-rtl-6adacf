// tb_prefilter: drives random error samples with random valid gaps in both
// filter settings and compares every output against an integer model of
// the first-order IIR  y = b0*x + s,  s' = b1*x - floor(a1*y / 2^14),
// output floor(y / 2^10). In ST_PRIOR the model also carries the Z^-1 input
// register. Also checks the DC gain (16*x at 4 fraction bits) and clear.
module tb_prefilter;
  import cr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cr_state_t state;
  logic clear, in_valid, out_valid;
  logic signed [ERR_W-1:0] e;
  logic signed [PF_W-1:0] y_o;

  prefilter dut (.clk, .rst_n, .state, .clear, .in_valid, .e, .out_valid, .y_o);

  longint m_s, m_xq, m_y;
  bit m_vq, m_ov;

  function automatic longint fdiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  // one clock of the model; called with the inputs applied for this edge
  task automatic model_step(input bit prior, input bit v, input longint x_in);
    longint x, yf, b0, b1, a1;
    bit st;
    b0 = prior ? 0 : 0;
    b1 = prior ? 512 : 2048;
    a1 = prior ? -15872 : -14336;
    x  = prior ? m_xq : x_in;
    st = prior ? m_vq : v;
    m_ov = st;
    if (st) begin
      yf  = b0 * x + m_s;
      m_s = b1 * x - fdiv(a1 * yf, 16384);
      m_y = fdiv(yf, 1024);
    end
    m_vq = v;
    if (v) m_xq = x_in;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input cr_state_t st, input int n, input bit constant, input int cval);
    longint xv;
    state = st;
    for (int k = 0; k < n; k++) begin
      @(negedge clk);
      in_valid = ($urandom_range(0, 3) != 0);
      xv = constant ? cval : (int'($urandom_range(0, 8191)) - 4096);
      e = ERR_W'(xv);
      model_step(st == ST_PRIOR, in_valid, xv);
      @(posedge clk);
      #1;
      checks++;
      if (out_valid != m_ov || (m_ov && longint'(y_o) != m_y)) begin
        failures++;
        if (failures < 10) $display("FAIL: state %0d step %0d y=%0d exp %0d v=%0b exp %0b",
                                    st, k, y_o, m_y, out_valid, m_ov);
      end
    end
  endtask

  initial begin
    state = ST_PRIOR; clear = 0; in_valid = 0; e = '0;
    m_s = 0; m_xq = 0; m_y = 0; m_vq = 0; m_ov = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    run(ST_PRIOR, 3000, 0, 0);
    // clear in the posterior setting
    @(negedge clk) clear = 1; in_valid = 0; state = ST_DDML;
    @(negedge clk) clear = 0;
    checks++;
    if (y_o != 0 || out_valid) begin failures++; $display("FAIL: clear"); end
    m_s = 0; m_xq = 0; m_y = 0; m_vq = 0; m_ov = 0;
    run(ST_DDML, 3000, 0, 0);
    run(ST_MMSE, 3000, 0, 0);
    // DC gain: a constant input settles to 16 * x
    run(ST_MMSE, 400, 1, 100);
    checks++;
    if (y_o < 1590 || y_o > 1600) begin failures++; $display("FAIL: DC gain, y=%0d", y_o); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
