// tb_loop_filter: random inputs and random gear settings; each output is
// compared against the PI model
//   integ += x * 2^(24-ki),  dw = floor((x * 2^(24-kp) + integ) / 2^18)
// (the power-of-two shifts done as integer multiply/floor-divide). Checks
// that the output holds when no input is valid and that clear zeroes it.
module tb_loop_filter;
  import cr_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic clear, in_valid, out_valid;
  logic signed [PF_W-1:0] x;
  gear_t gear;
  logic signed [PHASE_W-1:0] dw;

  loop_filter dut (.clk, .rst_n, .clear, .in_valid, .x, .gear, .out_valid, .dw);

  function automatic longint fdiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q -= 1;
    return q;
  endfunction

  function automatic longint shr(input longint v, input int k);
    return fdiv(v, longint'(1) << k);
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint integ, m_dw, xv, xs;
    int kp, ki;
    clear = 0; in_valid = 0; x = '0; gear = '{5'd4, 5'd12};
    integ = 0; m_dw = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n % 500 == 0) begin
        kp = int'($urandom_range(0, 16));
        ki = int'($urandom_range(kp + 1, 24));
      end
      xv = int'($urandom_range(0, 4095)) - 2048;
      if (n % 4000 == 3999) begin
        clear = 1;
      end else begin
        clear = 0;
      end
      in_valid = ($urandom_range(0, 1) == 1);
      x = PF_W'(xv);
      gear.kp_sh = SH_W'(kp);
      gear.ki_sh = SH_W'(ki);
      if (clear) begin
        integ = 0; m_dw = 0;
      end else if (in_valid) begin
        xs = xv * (longint'(1) << 24);
        integ = integ + shr(xs, ki);
        m_dw = shr(shr(xs, kp) + integ, 18);
        m_dw = longint'(PHASE_W'(m_dw));
        if (m_dw >= (1 << (PHASE_W - 1))) m_dw -= (1 << PHASE_W);
      end
      @(posedge clk);
      #1;
      checks++;
      if (longint'(dw) != m_dw || out_valid != (in_valid && !clear)) begin
        failures++;
        if (failures < 10) $display("FAIL: n=%0d kp=%0d ki=%0d dw=%0d expected %0d", n, kp, ki, dw, m_dw);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
