// tb_mixer: random input samples and carrier values; each output must equal
// floor(s * lo / 1024) one clock later.
module tb_mixer;
  import cr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic signed [ADC_W-1:0] s;
  logic signed [ROM_DW-1:0] lo_cos, lo_msin;
  logic signed [SIG_W-1:0] y_c, y_s;

  mixer dut (.clk, .rst_n, .s, .lo_cos, .lo_msin, .y_c, .y_s);

  function automatic int fdiv(input int a, input int b);
    int q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a, c, m;
    s = 0; lo_cos = 0; lo_msin = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 2000; n++) begin
      a = int'($urandom_range(0, 1023)) - 512;
      c = int'($urandom_range(0, 4094)) - 2047;
      m = int'($urandom_range(0, 4094)) - 2047;
      if (n == 0) begin a = -512; c = -2047; m = 2047; end
      @(negedge clk);
      s = ADC_W'(a); lo_cos = ROM_DW'(c); lo_msin = ROM_DW'(m);
      @(negedge clk);
      checks += 2;
      if (int'(y_c) != fdiv(a * c, 1024)) begin failures++; $display("FAIL: y_c %0d*%0d -> %0d", a, c, y_c); end
      if (int'(y_s) != fdiv(a * m, 1024)) begin failures++; $display("FAIL: y_s %0d*%0d -> %0d", a, m, y_s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
