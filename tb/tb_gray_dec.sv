// tb_gray_dec: checks the Gray-to-binary converter against the bit-level
// definition for random words and exhaustively for the low 12 bits.
module tb_gray_dec;
  import tb_ref_pkg::*;
  localparam int W = 16;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  gray_dec #(.DATA_W(W)) dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] g);
    din = g; #1;
    checks++;
    if (dout !== W'(from_gray(g, W))) begin
      failures++;
      $display("FAIL din=%h dout=%h exp=%h", din, dout, W'(from_gray(g, W)));
    end
  endtask

  initial begin
    for (int n = 0; n < 2000; n++) check(W'(rand_word(W)));
    for (int n = 0; n < 4096; n++) check(W'(n) | W'(16'hA000));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
