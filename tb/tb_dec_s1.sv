// tb_dec_sN: checks the scheme N link decoder (N = SCHEME below).
//
// For random data words and every inversion code the scheme sends, the word
// is inverted by the reference mask and must come back unchanged from the
// decoder.
module tb_dec_s1;
  import tb_ref_pkg::*;
  localparam int W = 16;
  localparam int SCHEME = 1;
  localparam int IW = (SCHEME == 1) ? 1 : 2;
  logic [IW-1:0] inv;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  dec_s1 #(.DATA_W(W)) dut (.inv, .din, .dout);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      int code;
      logic [W-1:0] d;
      code = (SCHEME == 1) ? ($urandom % 2) : (SCHEME == 2) ? (($urandom % 3) == 2 ? 3 : ($urandom % 2))
                                          : ($urandom % 4);
      d   = W'(rand_word(W));
      din = d ^ W'(mask_of(code, W));
      inv = IW'(code);
      #1;
      checks++;
      if (dout !== d) begin
        failures++;
        $display("FAIL code %0d din=%h dout=%h exp=%h", code, din, dout, d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
