// tb_dfs_link_ctrl: checks the link controller.
//
// In each control period the testbench asserts busy for a chosen number of
// cycles, spread at random over the period. After the period ends the boost
// factor must be 1 below TH_LOW busy cycles, 2 below TH_HIGH and 4 above;
// it must not change inside a period. Values at and next to both thresholds
// are covered, then random counts.
module tb_dfs_link_ctrl;
  localparam int P = 64, TL = 16, TH = 40;
  logic clk = 0, rst_n = 0, busy = 0;
  logic [2:0] boost;
  int checks = 0, failures = 0;
  int seen[5] = '{0, 0, 0, 0, 0};

  dfs_link_ctrl #(.CTRL_PERIOD(P), .TH_LOW(TL), .TH_HIGH(TH)) dut (.clk, .rst_n, .busy, .boost);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_period(int nbusy);
    bit pattern[P];
    int placed = 0, expb;
    logic [2:0] at_start;
    foreach (pattern[i]) pattern[i] = 0;
    while (placed < nbusy) begin
      int i = $urandom % P;
      if (!pattern[i]) begin pattern[i] = 1; placed++; end
    end
    at_start = boost;
    for (int i = 0; i < P; i++) begin
      busy = pattern[i];
      @(negedge clk);
      if (i != P - 1) begin
        checks++;
        if (boost !== at_start) begin failures++; $display("FAIL boost changed inside a period"); end
      end
    end
    expb = (nbusy < TL) ? 1 : (nbusy < TH) ? 2 : 4;
    checks++;
    if (int'(boost) != expb) begin
      failures++;
      $display("FAIL %0d busy cycles: boost %0d exp %0d", nbusy, boost, expb);
    end
    seen[boost]++;
  endtask

  initial begin
    int tests[$] = '{0, TL - 1, TL, TL + 1, TH - 1, TH, TH + 1, P, 5, 30, 60};
    @(negedge clk);
    @(negedge clk);
    rst_n = 1;
    checks++;
    if (boost !== 3'd1) begin failures++; $display("FAIL reset boost %0d", boost); end
    foreach (tests[i]) run_period(tests[i]);
    for (int n = 0; n < 100; n++) run_period($urandom % (P + 1));
    checks++;
    if (seen[1] == 0 || seen[2] == 0 || seen[4] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
