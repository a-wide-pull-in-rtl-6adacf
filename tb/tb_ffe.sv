// tb_ffe: feeds T/2 samples (in_valid every second clock, sym_stb every
// fourth) and checks:
//   * after reset and after init the filter is a pure gain of INIT_GAIN
//     (2.0) on the centre tap: y equals 2 * the sample at delay CENTER;
//   * with adapt_en low the taps do not move;
//   * with adapt_en high and err = y - d, where d is the average of the
//     samples at delays CENTER and CENTER-1 (a target the taps can reach
//     exactly), the LMS update
//     drives the mean-square error well below its starting value;
//   * init restores the initial taps.
module tb_ffe;
  import cr_pkg::*;
  localparam int NT = 16, CTR = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  logic init, in_valid, sym_stb, adapt_en, err_valid, y_valid;
  logic signed [SIG_W-1:0] x, err, y;

  ffe dut (.clk, .rst_n, .init, .in_valid, .x, .sym_stb, .adapt_en, .err_valid, .err, .y, .y_valid);

  int dl [NT];
  int d_q;            // desired value for the registered output

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // runs nsym symbols; target: 'gain' mode checks y = 2*centre exactly,
  // otherwise returns the mean-square error over the last quarter
  task automatic run(input int nsym, input bit adapt, input bit exact, output real mse);
    real acc;
    int cnt, xv;
    acc = 0.0; cnt = 0;
    adapt_en = adapt;
    for (int n = 0; n < 4 * nsym; n++) begin
      @(negedge clk);
      in_valid = (n % 2 == 1);
      sym_stb  = (n % 4 == 3);
      // random +-200 T/2 samples
      xv = int'($urandom_range(0, 1)) ? 200 : -200;
      x = SIG_W'(xv);
      // error for the output registered at the previous sym_stb
      if (y_valid) begin
        err = SIG_W'(int'(y) - d_q);
        err_valid = 1;
        if (exact) chk(int'(y) == d_q, $sformatf("gain mode y=%0d expected %0d", y, d_q));
        if (n > 3 * nsym) begin
          acc += real'((int'(y) - d_q) * (int'(y) - d_q)); cnt++;
        end
      end else begin
        err = '0;
        err_valid = 0;
      end
      if (sym_stb) d_q = exact ? 2 * dl[CTR] : (dl[CTR] + dl[CTR - 1]) / 2;
      @(posedge clk);
      if (in_valid) begin
        for (int k = NT - 1; k > 0; k--) dl[k] = dl[k-1];
        dl[0] = xv;
      end
    end
    mse = (cnt > 0) ? acc / real'(cnt) : 0.0;
  endtask

  initial begin
    real m0, m1, m2;
    init = 0; in_valid = 0; sym_stb = 0; adapt_en = 0; err_valid = 0; x = '0; err = '0; d_q = 0;
    for (int k = 0; k < NT; k++) dl[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    run(200, 0, 1, m0);                 // initial taps: y = 2 * centre
    run(200, 0, 0, m0);                 // no adaptation: error stays
    run(6000, 1, 0, m1);                // adaptation
    $display("MSE without adaptation %0.1f, after adaptation %0.1f", m0, m1);
    chk(m0 > 10000.0, "initial error unexpectedly small");
    chk(m1 < m0 / 100.0, "LMS did not converge");
    @(negedge clk) init = 1; sym_stb = 0; in_valid = 0; err_valid = 0;
    @(negedge clk) init = 0;
    run(200, 0, 1, m2);                 // init restores the gain
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
