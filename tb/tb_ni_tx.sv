// tb_ni_tx: checks the transmit network interface for all three schemes.
//
// One instance per scheme receives the same random packet stream (a header
// flit then body flits, random valid, random downstream ready). The
// reference converts body payloads to Gray code and applies the strictly
// cheapest inversion of the scheme against the previous link word; header
// flits must pass unchanged with code 00. Checks the link word, the code,
// the flags and that bit 1 of the code stays 0 for scheme I.
module tb_ni_tx;
  import tb_ref_pkg::*;
  localparam int W = 16;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_head = 0, in_tail = 0;
  logic [W-1:0] in_data = '0;
  logic out_ready = 0;
  logic [2:0] in_ready, out_valid, out_head, out_tail;
  logic [W-1:0] out_data [3];
  logic [1:0] out_inv [3];
  int checks = 0, failures = 0, heads = 0, inv_used[3] = '{0, 0, 0};
  logic [W+3:0] expq [3][$];
  logic [W-1:0] prev_sent [3] = '{default: '0};

  for (genvar k = 0; k < 3; k++) begin : g
    ni_tx #(.DATA_W(W), .SCHEME(k + 1)) dut (
      .clk, .rst_n, .in_valid, .in_ready(in_ready[k]), .in_head, .in_tail, .in_data,
      .out_valid(out_valid[k]), .out_ready, .out_head(out_head[k]), .out_tail(out_tail[k]),
      .out_data(out_data[k]), .out_inv(out_inv[k]));
  end

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (out_valid[k] && out_ready) begin
        logic [W+3:0] e;
        e = expq[k].pop_front();
        checks++;
        if ({out_head[k], out_tail[k], out_inv[k], out_data[k]} !== e) begin
          failures++;
          $display("FAIL scheme %0d got h%b t%b inv%b %h exp %b", k + 1, out_head[k],
                   out_tail[k], out_inv[k], out_data[k], e);
        end
      end
      if (in_valid && in_ready[k]) begin
        int code;
        logic [W-1:0] g, enc;
        g    = in_head ? in_data : W'(to_gray(in_data, W));
        code = in_head ? 0 : best_code(k + 1, prev_sent[k], g, W);
        enc  = g ^ W'(mask_of(code, W));
        if (code != 0) inv_used[k]++;
        expq[k].push_back({in_head, in_tail, 2'(code), enc});
        prev_sent[k] = enc;
      end
    end
    if (in_valid && in_ready[0] && in_head) heads++;
  end

  initial begin
    int body_left = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // all three instances see the same ready pattern, so they stay in step
      if (!in_valid || in_ready[0]) begin
        in_valid = ($urandom % 4) != 0;
        if (in_valid) begin
          in_head = (body_left == 0);
          if (in_head) body_left = 1 + $urandom % 8;
          else body_left--;
          in_tail = !in_head && body_left == 0;
          in_data = W'(rand_word(W));
        end
      end
      out_ready = ($urandom % 3) != 0;
    end
    @(negedge clk);
    in_valid = 0; out_ready = 1;
    repeat (4) @(posedge clk);
    for (int k = 0; k < 3; k++) begin
      checks++;
      if (expq[k].size() != 0 || inv_used[k] == 0) begin
        failures++;
        $display("FAIL scheme %0d: %0d flits left, %0d inverted", k + 1, expq[k].size(), inv_used[k]);
      end
    end
    checks++;
    if (heads == 0) failures++;
    $display("header flits %0d, inverted flits per scheme %0d %0d %0d", heads, inv_used[0], inv_used[1], inv_used[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
