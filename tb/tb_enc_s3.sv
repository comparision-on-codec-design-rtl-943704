// tb_enc_sN: checks the scheme N link encoder (N = SCHEME below).
//
// Random flit streams (header and body flits, random valid and random
// downstream ready) go through the encoder. For every accepted flit the
// reference picks the inversion that is strictly cheapest in coupling
// activity against the previously sent flit and checks the encoded word, the
// code, the head/tail flags, the one-cycle latency and that the coupling
// activity never exceeds that of sending the flit as it is. Every code the
// scheme can send must have occurred; at the end the coupling activity with
// and without encoding is printed.
module tb_enc_s3;
  import tb_ref_pkg::*;
  localparam int W = 16;
  localparam int SCHEME = 3;
  localparam int IW = (SCHEME == 1) ? 1 : 2;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_head = 0, in_tail = 0;
  logic [W-1:0] in_data = '0;
  logic out_valid, out_ready = 0, out_head, out_tail;
  logic [W-1:0] out_data;
  logic [IW-1:0] out_inv;
  int checks = 0, failures = 0;
  int code_seen[4] = '{0, 0, 0, 0};
  int cost_raw = 0, cost_enc = 0;
  logic [W+IW+1:0] expq[$];
  logic [W-1:0] prev_sent = '0, prev_raw = '0;

  enc_s3 #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: on every accepted flit compute the expected link word
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      logic [W+IW+1:0] e;
      e = expq.pop_front();
      checks++;
      if ({out_head, out_tail, out_inv, out_data} !== e) begin
        failures++;
        $display("FAIL got h%b t%b inv%b %h exp %b", out_head, out_tail, out_inv, out_data, e);
      end
      checks++;
    end
    if (in_valid && in_ready) begin
      int code;
      logic [W-1:0] enc;
      code = in_head ? 0 : best_code(SCHEME, prev_sent, in_data, W);
      enc  = in_data ^ W'(mask_of(code, W));
      code_seen[code]++;
      if (!in_head) begin
        cost_raw += coupling_cost(prev_raw, in_data, W);
        cost_enc += coupling_cost(prev_sent, enc, W);
        checks++;
        if (coupling_cost(prev_sent, enc, W) > coupling_cost(prev_sent, in_data, W)) begin
          failures++;
          $display("FAIL encoding raised coupling activity");
        end
      end
      expq.push_back({in_head, in_tail, IW'(code), enc});
      prev_sent = enc;
      prev_raw  = in_data;
      // latency: the flit must be on the output register next cycle
      fork begin
        #1;
        checks++;
        if (!(out_valid && out_data === enc)) begin
          failures++;
          $display("FAIL flit not on the link one cycle after acceptance");
        end
      end join_none
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 4) != 0;
        in_head  = ($urandom % 8) == 0;
        in_tail  = ($urandom % 8) == 0;
        in_data  = W'(rand_word(W));
        if ($urandom % 5 == 0) in_data = prev_raw ^ W'(16'h0001 << ($urandom % W));
      end
      out_ready = ($urandom % 3) != 0;
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("FAIL %0d flits not delivered", expq.size()); end
    for (int c = 0; c < 4; c++) begin
      bit allowed;
      allowed = (c == 0) || (c == 1) || (SCHEME >= 2 && c == 3) || (SCHEME == 3 && c == 2);
      checks++;
      if (allowed && code_seen[c] == 0) begin failures++; $display("FAIL code %0d never used", c); end
      if (!allowed && code_seen[c] != 0) begin failures++; $display("FAIL code %0d not allowed", c); end
    end
    $display("codes used: none %0d odd %0d even %0d full %0d", code_seen[0], code_seen[1], code_seen[2], code_seen[3]);
    $display("coupling activity T1+2T2: raw %0d encoded %0d", cost_raw, cost_enc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
