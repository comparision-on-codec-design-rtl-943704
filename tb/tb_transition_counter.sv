// tb_transition_counter: checks the pair classification and the Ty, Te and
// T4** counts. The reference classifies each pair of the two words directly;
// Ty and Te are obtained by actually odd- or even-inverting the new word and
// counting the Type I pairs that became Type II. Directed cases from the
// transition tables come first, then random words.
module tb_transition_counter;
  import tb_ref_pkg::*;
  localparam int W = 16;
  localparam int CW = $clog2(W);
  logic [W-1:0] prev, cur;
  logic [CW-1:0] t1, t2, t3, t4, t4ss, ty, te;
  int checks = 0, failures = 0;

  transition_counter #(.DATA_W(W)) dut (.prev, .cur, .t1, .t2, .t3, .t4, .t4ss, .ty, .te);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] a, logic [W-1:0] b);
    int n[5] = '{0, 0, 0, 0, 0};
    int nss = 0, o2 = 0, e2 = 0, got[7], exp[7];
    for (int i = 0; i < W - 1; i++) begin
      int t = pair_type(a, b, i);
      n[t]++;
      if (t == 4 && a[i] != a[i+1]) nss++;
      if (t == 1 && pair_type(a, b ^ W'(mask_of(1, W)), i) == 2) o2++;
      if (t == 1 && pair_type(a, b ^ W'(mask_of(2, W)), i) == 2) e2++;
    end
    prev = a; cur = b; #1;
    got = '{int'(t1), int'(t2), int'(t3), int'(t4), int'(t4ss), int'(ty), int'(te)};
    exp = '{n[1], n[2], n[3], n[4], nss, n[1] + n[2] - o2, n[1] + n[2] - e2};
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL prev=%h cur=%h got=%p exp=%p", a, b, got, exp);
    end
  endtask

  initial begin
    // lines 0,1 only (other lines quiet): T1*** 01->11 turns into Type II under odd inversion
    check(16'h0002, 16'h0003);
    // Type II 01->10, Type III 00->11, Type IV with differing lines 01->01
    check(16'h0002, 16'h0001);
    check(16'h0000, 16'h0003);
    check(16'h0002, 16'h0002);
    // all lines toggling, alternating pattern
    check(16'h5555, 16'hAAAA);
    check(16'h0000, 16'hFFFF);
    for (int k = 0; k < 5000; k++) check(W'(rand_word(W)), W'(rand_word(W)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
