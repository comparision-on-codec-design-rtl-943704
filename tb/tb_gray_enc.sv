// tb_gray_enc: checks the binary-to-Gray converter against the bit-level
// definition for random words and for a counting sequence, where consecutive
// Gray words must differ in exactly one bit.
module tb_gray_enc;
  import tb_ref_pkg::*;
  localparam int W = 16;
  logic [W-1:0] din, dout, last;
  int checks = 0, failures = 0;

  gray_enc #(.DATA_W(W)) dut (.din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      din = W'(rand_word(W));
      #1;
      checks++;
      if (dout !== W'(to_gray(din, W))) begin
        failures++;
        $display("FAIL din=%h dout=%h exp=%h", din, dout, W'(to_gray(din, W)));
      end
    end
    din = '0; #1; last = dout;
    for (int n = 1; n < 3000; n++) begin
      din = W'(n); #1;
      checks++;
      if ($countones(dout ^ last) != 1) begin
        failures++;
        $display("FAIL step %0d changes %0d bits", n, $countones(dout ^ last));
      end
      last = dout;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
