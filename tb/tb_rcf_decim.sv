// tb_rcf_decim: computes the root-raised-cosine taps in the testbench
// (roll-off 0.18, 4 samples per symbol, 25 taps, 10 fraction bits), runs
// random input and an isolated impulse through the filter, and checks every
// output taken on half_stb against the FIR model, including saturation.
// Also checks the impulse response reproduces the taps and is symmetric.
module tb_rcf_decim;
  import cr_pkg::*;
  localparam int NT = 25;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [SIG_W-1:0] x, y;
  logic half_stb, out_valid;

  rcf_decim dut (.clk, .rst_n, .x, .half_stb, .y, .out_valid);

  int c [NT];
  longint dl [NT];
  int imp [NT];

  function automatic longint fdiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  // RRC impulse response, t in symbol periods
  function automatic real h(input real t, input real b);
    real num, den;
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if ((4.0 * b * t - 1.0) * (4.0 * b * t - 1.0) < 1.0e-12 ||
        (4.0 * b * t + 1.0) * (4.0 * b * t + 1.0) < 1.0e-12)
      return (b / $sqrt(2.0)) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) +
                                 (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    num = $sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b));
    den = PI * t * (1.0 - 16.0 * b * b * t * t);
    return num / den;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint acc, m_y;
    int xv;
    for (int k = 0; k < NT; k++) begin
      c[k] = $rtoi($floor(h((real'(k) - 12.0) / 4.0, 0.18) * 1024.0 + 0.5));
      dl[k] = 0;
    end
    x = '0; half_stb = 0; m_y = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      if (n < 4000) xv = int'($urandom_range(0, 4095)) - 2048;
      else if (n < 5000) xv = (n % 50 == 0) ? 2047 : -2048;  // drives saturation
      else xv = (n == 5100) ? 512 : 0;
      x = SIG_W'(xv);
      half_stb = (n % 2 == 1);
      acc = 0;
      for (int k = 0; k < NT; k++) acc += dl[k] * c[k];
      acc = fdiv(acc, 1024);
      if (acc > 2047) acc = 2047;
      if (acc < -2047) acc = -2047;
      @(posedge clk);
      if (half_stb) m_y = acc;
      for (int k = NT - 1; k > 0; k--) dl[k] = dl[k-1];
      dl[0] = xv;
      #1;
      checks++;
      if (longint'(y) != m_y || out_valid != half_stb) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d y=%0d expected %0d", n, y, m_y);
      end
      // impulse at n=5100 enters dl at that edge; outputs from n=5101 on
      if (n > 5100 && half_stb && n - 5101 < NT) begin
        imp[n - 5101] = int'(y);
      end
      @(negedge clk);
    end
    // every other tap seen (one output per two samples): compare to 512*c/1024
    for (int k = 0; k < NT; k += 2) begin
      checks++;
      if (imp[k] != int'(fdiv(longint'(512) * c[k], 1024))) begin
        failures++; $display("FAIL: impulse tap %0d = %0d, tap %0d", k, imp[k], c[k]);
      end
      checks++;
      if (imp[k] != imp[NT - 1 - k]) begin
        failures++; $display("FAIL: impulse not symmetric at %0d", k);
      end
    end
    checks++;
    if (c[12] < 1000 || c[12] > 1100) begin failures++; $display("FAIL: centre tap %0d", c[12]); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
