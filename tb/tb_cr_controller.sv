// tb_cr_controller: short stage lengths. Checks the strobe pattern
// (half_stb every 2nd clock, sym_stb every 4th and only with half_stb),
// that ST_PRIOR lasts exactly PRIOR_LEN clocks with handover on its last
// clock, that ST_DDML lasts exactly DDML_LEN symbol strobes with to_mmse on
// the last one, and that ST_MMSE is never left.
module tb_cr_controller;
  import cr_pkg::*;
  localparam int PL = 37, DL = 9;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cr_state_t state;
  logic handover, to_mmse, half_stb, sym_stb;

  cr_controller #(.PRIOR_LEN(PL), .DDML_LEN(DL)) dut (.clk, .rst_n, .state, .handover, .to_mmse, .half_stb, .sym_stb);

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    int n_prior, n_ddml_sym, n_ho, n_tm, clk_n;
    bit seen_mmse;
    n_prior = 0; n_ddml_sym = 0; n_ho = 0; n_tm = 0; seen_mmse = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (clk_n = 0; clk_n < 1000; clk_n++) begin
      #1;
      chk(half_stb == clk_n[0], $sformatf("half_stb at clock %0d", clk_n));
      chk(sym_stb == (clk_n % 4 == 3), $sformatf("sym_stb at clock %0d", clk_n));
      if (state == ST_PRIOR) begin
        chk(!seen_mmse && n_ddml_sym == 0, "returned to ST_PRIOR");
        n_prior++;
        chk(handover == (n_prior == PL), $sformatf("handover at prior clock %0d", n_prior));
        if (handover) n_ho++;
      end else if (state == ST_DDML) begin
        chk(!seen_mmse, "returned to ST_DDML");
        chk(!handover, "handover in ST_DDML");
        if (sym_stb) begin
          n_ddml_sym++;
          chk(to_mmse == (n_ddml_sym == DL), $sformatf("to_mmse at DDML symbol %0d", n_ddml_sym));
        end else begin
          chk(!to_mmse, "to_mmse without sym_stb");
        end
        if (to_mmse) n_tm++;
      end else begin
        seen_mmse = 1;
        chk(!handover && !to_mmse, "pulse in ST_MMSE");
      end
      @(negedge clk);
    end
    chk(n_prior == PL, $sformatf("prior lasted %0d clocks", n_prior));
    chk(n_ddml_sym == DL, $sformatf("DDML lasted %0d symbols", n_ddml_sym));
    chk(n_ho == 1 && n_tm == 1 && seen_mmse, "one handover, one to_mmse, ends in MMSE");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
