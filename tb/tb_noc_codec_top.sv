// tb_noc_codec_top: end-to-end test of the three link channels at the
// design's default parameters.
//
// Packets (one header flit, 1..12 body flits) are sent on all three lanes in
// three traffic phases: light, medium and saturated, so that the link
// controllers pick each boost factor. Checked on every lane:
//  - every flit arrives unchanged, in order, with its head/tail flags;
//  - each decoded flit appears one cycle after its launch on the link;
//  - header flits cross the link unencoded (code 00, raw payload);
//  - back-to-back body flits are launched BASE_DIV/boost cycles apart.
// Counted, and a failure if never seen: every inversion code the lane's
// scheme can send, each boost factor 1, 2 and 4, and an input stall
// (in_valid while in_ready is low). The coupling activity T1 + 2*T2 of the
// body flits on the link lines is compared with that of the same Gray-coded
// payloads sent without inversion, and printed.
module tb_noc_codec_top;
  import tb_ref_pkg::*;
  localparam int W = 16;
  localparam int BD = 4;

  logic clk = 0, rst_n = 0;
  logic [2:0] in_valid = '0, in_ready, in_head = '0, in_tail = '0;
  logic [2:0][W-1:0] in_data = '0;
  logic [2:0][W-1:0] link_data, out_data;
  logic [2:0][1:0] link_inv;
  logic [2:0] link_strobe, out_valid, out_head, out_tail;
  logic [2:0][2:0] boost;

  int checks = 0, failures = 0;
  logic [W+1:0] q [3][$];
  int code_seen [3][4];
  int boost_seen [3][5];
  int stalls [3];
  int heads [3];
  int delivered [3];
  int cost_plain [3], cost_link [3];
  logic [W-1:0] prev_link [3], prev_plain [3];
  longint cycle = 0, last_launch [3];
  int last_len [3];
  logic [2:0][2:0] boost_at_edge;
  bit pend_check [3];
  int phase = 0;

  noc_codec_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    for (int k = 0; k < 3; k++) begin
      if (in_valid[k] && in_ready[k]) q[k].push_back({in_head[k], in_tail[k], in_data[k]});
      if (in_valid[k] && !in_ready[k]) stalls[k]++;
      boost_at_edge[k] = boost[k];   // value the link sampled at this edge
    end
  end

  // Link side and output side, observed just after each edge
  always @(posedge clk) if (rst_n) begin
    #1;
    for (int k = 0; k < 3; k++) begin
      // decoded flit: one cycle after the launch
      checks++;
      if (out_valid[k] !== pend_check[k]) begin
        failures++;
        $display("FAIL lane %0d out_valid %b, expected %b", k, out_valid[k], pend_check[k]);
      end
      if (out_valid[k]) begin
        logic [W+1:0] e;
        e = q[k].pop_front();
        delivered[k]++;
        checks++;
        if ({out_head[k], out_tail[k], out_data[k]} !== e) begin
          failures++;
          $display("FAIL lane %0d got h%b t%b %h exp %h", k, out_head[k], out_tail[k], out_data[k], e);
        end
      end
      pend_check[k] = link_strobe[k];
      if (link_strobe[k]) begin
        logic [W+1:0] f;
        f = q[k][0];
        code_seen[k][link_inv[k]]++;
        if (f[W+1]) begin
          heads[k]++;
          checks++;
          if (link_inv[k] !== 2'b00 || link_data[k] !== f[W-1:0]) begin
            failures++;
            $display("FAIL lane %0d header flit altered on the link", k);
          end
        end else begin
          logic [W-1:0] g;
          g = W'(to_gray(f[W-1:0], W));
          cost_plain[k] += coupling_cost(prev_plain[k], g, W);
          cost_link[k]  += coupling_cost(prev_link[k], link_data[k], W);
          prev_plain[k] = g;
          boost_seen[k][boost_at_edge[k]]++;
          // back-to-back body flits: rate of the boosted clock
          if (last_launch[k] >= 0 && int'(cycle - last_launch[k]) < last_len[k]) begin
            failures++;
            $display("FAIL lane %0d flit launched %0d cycles after the previous, slot %0d",
                     k, cycle - last_launch[k], last_len[k]);
          end
        end
        if (f[W+1]) prev_plain[k] = f[W-1:0];
        prev_link[k]   = link_data[k];
        last_launch[k] = cycle;
        last_len[k]    = f[W+1] ? BD : BD / int'(boost_at_edge[k]);
      end
    end
  end

  // Source: one packet generator per lane
  for (genvar k = 0; k < 3; k++) begin : g_src
    initial begin
      int body_left = 0;
      @(posedge rst_n);
      forever begin
        @(negedge clk);
        if (!in_valid[k] || in_ready[k]) begin
          int pct;
          pct = (phase == 0) ? 3 : (phase == 1) ? 35 : (phase == 2) ? 100 : 0;
          in_valid[k] = ($urandom % 100) < pct;
          if (in_valid[k]) begin
            in_head[k] = (body_left == 0);
            if (in_head[k]) body_left = 1 + $urandom % 12;
            else body_left--;
            in_tail[k] = !in_head[k] && body_left == 0;
            // mix of random payloads and slowly varying (counter-like) ones
            in_data[k] = ($urandom % 2) ? W'($urandom) : W'(int'(cycle) * 3 + k);
          end
        end
      end
    end
  end

  initial begin
    for (int k = 0; k < 3; k++) begin
      code_seen[k] = '{0, 0, 0, 0};
      boost_seen[k] = '{0, 0, 0, 0, 0};
      stalls[k] = 0; heads[k] = 0; delivered[k] = 0;
      cost_plain[k] = 0; cost_link[k] = 0;
      prev_link[k] = '0; prev_plain[k] = '0;
      last_launch[k] = -1; last_len[k] = 0; pend_check[k] = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    phase = 0; repeat (3000) @(posedge clk);
    phase = 1; repeat (3000) @(posedge clk);
    phase = 2; repeat (3000) @(posedge clk);
    phase = 3;
    // drain: stop new flits after the current packets end
    @(negedge clk);
    for (int k = 0; k < 3; k++) in_valid[k] = 0;
    repeat (200) @(posedge clk);
    #2;
    for (int k = 0; k < 3; k++) begin
      checks++;
      // a packet cut short by the drain leaves no flit behind in the queue
      if (q[k].size() != 0) begin failures++; $display("FAIL lane %0d: %0d flits lost", k, q[k].size()); end
      for (int c = 0; c < 4; c++) begin
        bit allowed;
        allowed = (c == 0) || (c == 1) || (k >= 1 && c == 3) || (k == 2 && c == 2);
        checks++;
        if (allowed == (code_seen[k][c] == 0)) begin
          failures++;
          $display("FAIL lane %0d code %0d used %0d times", k, c, code_seen[k][c]);
        end
      end
      for (int b = 1; b <= 4; b *= 2) begin
        checks++;
        if (boost_seen[k][b] == 0) begin failures++; $display("FAIL lane %0d boost %0d never used", k, b); end
      end
      checks++;
      if (stalls[k] == 0 || heads[k] == 0) begin failures++; $display("FAIL lane %0d no stall or no header", k); end
      $display("scheme %0d: %0d flits (%0d headers), codes none/odd/even/full %0d/%0d/%0d/%0d, boost 1/2/4 %0d/%0d/%0d, stalls %0d",
               k + 1, delivered[k], heads[k], code_seen[k][0], code_seen[k][1], code_seen[k][2], code_seen[k][3],
               boost_seen[k][1], boost_seen[k][2], boost_seen[k][4], stalls[k]);
      $display("scheme %0d: body-flit coupling activity T1+2T2 plain %0d, encoded %0d (%0d%% saved)",
               k + 1, cost_plain[k], cost_link[k], 100 - (100 * cost_link[k]) / (cost_plain[k] == 0 ? 1 : cost_plain[k]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
