// tb_gear_shift: small switch counts; walks each stage through its three
// gears and checks the switch points (counted in valid steps), the table
// entries selected, that non-valid clocks do not count, and that a stage
// change restarts the count.
module tb_gear_shift;
  import cr_pkg::*;
  localparam int G1P = 20, G2P = 45, G1Q = 7, G2Q = 16;
  localparam gear_t TP [3] = '{'{5'd1, 5'd9},  '{5'd2, 5'd10}, '{5'd3, 5'd11}};
  localparam gear_t TD [3] = '{'{5'd4, 5'd12}, '{5'd5, 5'd13}, '{5'd6, 5'd14}};
  localparam gear_t TM [3] = '{'{5'd7, 5'd15}, '{5'd8, 5'd16}, '{5'd9, 5'd17}};
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  cr_state_t state;
  logic step;
  gear_t gear;
  logic [1:0] gear_idx;

  gear_shift #(.CNT_W(8), .G1_AT_PRIOR(G1P), .G2_AT_PRIOR(G2P),
               .G1_AT_POST(G1Q), .G2_AT_POST(G2Q),
               .TAB_PRIOR(TP), .TAB_DDML(TD), .TAB_MMSE(TM))
    dut (.clk, .rst_n, .state, .step, .gear, .gear_idx);

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic walk(input cr_state_t st, input int g1, input int g2, input gear_t tab [3]);
    int cnt, ei;
    cnt = 0;
    @(negedge clk) state = st; step = 0;
    @(negedge clk);               // count restarts on the stage change
    for (int n = 0; n < 4 * g2; n++) begin
      ei = (cnt >= g2) ? 2 : (cnt >= g1) ? 1 : 0;
      #1;
      checks++;
      if (gear_idx != 2'(ei) || gear != tab[ei]) begin
        failures++;
        $display("FAIL: stage %0d count %0d gear %0d expected %0d", st, cnt, gear_idx, ei);
      end
      step = ($urandom_range(0, 2) != 0);
      @(posedge clk);
      if (step) cnt++;
      @(negedge clk);
    end
  endtask

  initial begin
    state = ST_PRIOR; step = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    walk(ST_PRIOR, G1P, G2P, TP);
    walk(ST_DDML, G1Q, G2Q, TD);
    walk(ST_MMSE, G1Q, G2Q, TM);
    walk(ST_DDML, G1Q, G2Q, TD);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
