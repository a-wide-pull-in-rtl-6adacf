// tb_nco_rom: checks every ROM address against cos/-sin computed in real
// arithmetic: out(p) = round(2047 * f(2*pi*(p+0.5)/1024)), within 1 LSB,
// with one clock of latency.
module tb_nco_rom;
  import cr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic [ROM_AW-1:0] phase;
  logic signed [ROM_DW-1:0] cos_o, msin_o;

  nco_rom dut (.clk, .rst_n, .phase, .cos_o, .msin_o);

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th;
    int ec, es;
    phase = '0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int p = 0; p < (1 << ROM_AW); p++) begin
      @(negedge clk) phase = ROM_AW'(p);
      @(negedge clk);
      th = 2.0 * 3.14159265358979 * (real'(p) + 0.5) / real'(1 << ROM_AW);
      ec = $rtoi($floor(2047.0 * $cos(th) + 0.5));
      es = $rtoi($floor(-2047.0 * $sin(th) + 0.5));
      checks += 2;
      if (int'(cos_o) - ec > 1 || ec - int'(cos_o) > 1) begin
        failures++; $display("FAIL: cos at %0d: %0d expected %0d", p, cos_o, ec);
      end
      if (int'(msin_o) - es > 1 || es - int'(msin_o) > 1) begin
        failures++; $display("FAIL: -sin at %0d: %0d expected %0d", p, msin_o, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
