// tb_iir_lpf: random inputs on both rails compared every clock against an
// integer model of the two cascaded one-pole sections (pole 1 - 2^-K, four
// fraction bits, floor shifts); then a constant input must settle to itself
// (DC gain 1) and a tone at a quarter of the sample rate must be attenuated
// (to 0.2 of its amplitude at the default pole 0.5).
module tb_iir_lpf;
  import cr_pkg::*;
  localparam int K = 1, F = 4;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [SIG_W-1:0] x_i, x_q, y_i, y_q;

  iir_lpf dut (.clk, .rst_n, .x_i, .x_q, .y_i, .y_q);

  function automatic longint fdiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint a1i, a1q, a2i, a2q, n1i, n1q;
    int xi, xq, peak;
    x_i = '0; x_q = '0;
    a1i = 0; a1q = 0; a2i = 0; a2q = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int n = 0; n < 12000; n++) begin
      if (n < 8000) begin
        xi = int'($urandom_range(0, 4000)) - 2000;
        xq = int'($urandom_range(0, 4000)) - 2000;
      end else if (n < 9000) begin
        xi = 1234; xq = -777;
      end else begin
        // cos at fs/4: +A, 0, -A, 0
        xi = (n % 4 == 0) ? 1500 : (n % 4 == 2) ? -1500 : 0;
        xq = 0;
      end
      x_i = SIG_W'(xi); x_q = SIG_W'(xq);
      @(posedge clk);
      n1i = a1i + fdiv(longint'(xi) * 16 - a1i, 1 << K);
      n1q = a1q + fdiv(longint'(xq) * 16 - a1q, 1 << K);
      a2i = a2i + fdiv(a1i - a2i, 1 << K);
      a2q = a2q + fdiv(a1q - a2q, 1 << K);
      a1i = n1i; a1q = n1q;
      #1;
      checks++;
      if (longint'(y_i) != fdiv(a2i, 1 << F) || longint'(y_q) != fdiv(a2q, 1 << F)) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d y=%0d/%0d expected %0d/%0d", n, y_i, y_q,
                                    fdiv(a2i, 1 << F), fdiv(a2q, 1 << F));
      end
      if (n == 8999) begin
        checks++;
        if (y_i < 1232 || y_i > 1234 || y_q < -778 || y_q > -776) begin
          failures++; $display("FAIL: DC gain, y=%0d/%0d", y_i, y_q);
        end
      end
      if (n == 11000) peak = 0;
      if (n > 11000) peak = (y_i > peak) ? int'(y_i) : (-y_i > peak) ? -int'(y_i) : peak;
      @(negedge clk);
    end
    // |H(fs/4)| for two sections with K=1: (0.5/|1+0.5j|)^2 = 0.2
    checks++;
    if (peak > 1500 / 4) begin failures++; $display("FAIL: fs/4 tone passed with peak %0d", peak); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
