// tb_slicer: every input value from -2048 to 2047 on both rails; the
// decision must be the nearest 64-QAM level (ties to the upper level) and
// the error y - decision.
module tb_slicer;
  import cr_pkg::*;
  int checks = 0, failures = 0;
  logic signed [SIG_W-1:0] y_i, y_q, dec_i, dec_q, err_i, err_q;

  slicer dut (.y_i, .y_q, .dec_i, .dec_q, .err_i, .err_q);

  function automatic int nearest(input int y);
    int best, bd, d;
    best = 0; bd = 1 << 30;
    for (int l = -7; l <= 7; l += 2) begin
      d = (y - 64 * l) < 0 ? (64 * l - y) : (y - 64 * l);
      if (d <= bd) begin bd = d; best = 64 * l; end
    end
    return best;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int y = -2048; y < 2048; y++) begin
      y_i = SIG_W'(y);
      y_q = SIG_W'(-1 - y);
      #1;
      checks += 4;
      if (int'(dec_i) != nearest(y))      begin failures++; $display("FAIL: dec_i(%0d) = %0d", y, dec_i); end
      if (int'(dec_q) != nearest(-1 - y)) begin failures++; $display("FAIL: dec_q(%0d) = %0d", -1 - y, dec_q); end
      if (int'(err_i) != y - nearest(y))  begin failures++; $display("FAIL: err_i(%0d) = %0d", y, err_i); end
      if (int'(err_q) != -1 - y - nearest(-1 - y)) begin failures++; $display("FAIL: err_q(%0d)", -1 - y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
