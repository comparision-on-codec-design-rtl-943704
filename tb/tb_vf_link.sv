// tb_vf_link: checks the variable-frequency link.
//
// A random flit stream (header flits, body flits, gaps) crosses the link
// while the testbench changes the boost factor among 1, 2 and 4. Checked:
// flits arrive in order and unchanged; the time from one launch to the next
// equals the slot length of the first flit (BASE_DIV cycles for a header
// flit, BASE_DIV/boost for a body flit) plus whole idle slots of BASE_DIV
// cycles, and exactly the slot length when the next flit was already
// waiting, which is the link rate. Every boost factor must have carried body
// flits back to back.
module tb_vf_link;
  localparam int W = 16;
  localparam int BD = 4;

  logic clk = 0, rst_n = 0;
  logic [2:0] boost = 3'd1;
  logic in_valid = 0, in_ready, in_head = 0, in_tail = 0;
  logic [W-1:0] in_data = '0;
  logic [1:0] in_inv = '0;
  logic link_strobe, link_head, link_tail, busy;
  logic [W-1:0] link_data;
  logic [1:0] link_inv;
  int checks = 0, failures = 0;
  logic [W+4:0] q[$];
  longint cycle = 0, last_launch = -1;
  int last_len = 0;
  bit waited = 0;               // the next flit was offered during the whole slot
  int rate_seen[5] = '{0, 0, 0, 0, 0};

  vf_link #(.DATA_W(W), .BASE_DIV(BD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (in_valid && in_ready) q.push_back({in_head, in_tail, in_inv, in_data, 1'b0});
    if (!in_valid) waited = 0;
  end

  // observe launches one delta after the edge that made them
  always @(posedge clk) if (rst_n) begin
    #1;
    if (link_strobe) begin
      logic [W+4:0] e;
      int gap;
      e = q.pop_front();
      checks++;
      if ({link_head, link_tail, link_inv, link_data, 1'b0} !== e) begin
        failures++;
        $display("FAIL flit got %h exp %h", {link_head, link_tail, link_inv, link_data}, e >> 1);
      end
      if (last_launch >= 0) begin
        gap = int'(cycle - last_launch);
        checks++;
        if (gap < last_len || (gap - last_len) % BD != 0 || (waited && gap != last_len)) begin
          failures++;
          $display("FAIL gap %0d after slot of %0d (waited %0b)", gap, last_len, waited);
        end
        if (waited && !link_head && last_len < BD) rate_seen[BD / last_len]++;
      end
      last_launch = cycle;
      last_len = link_head ? BD : BD / int'(boost);
      waited = 1;
    end
  end

  initial begin
    int body_left = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      @(negedge clk);
      if (n % 200 == 0) boost = 3'(1 << (($urandom % 3)));
      if (!in_valid || in_ready) begin
        in_valid = ($urandom % 8) != 0;
        if (in_valid) begin
          in_head = (body_left == 0);
          if (in_head) body_left = 1 + $urandom % 10;
          else body_left--;
          in_tail = !in_head && body_left == 0;
          in_data = W'($urandom);
          in_inv  = 2'($urandom);
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3 * BD) @(posedge clk);
    #2;
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL %0d flits not launched", q.size()); end
    for (int b = 1; b <= 4; b *= 2) begin
      checks++;
      if (b > 1 && rate_seen[b] == 0) begin failures++; $display("FAIL boost %0d never streamed", b); end
    end
    $display("back-to-back body flits at boost 2: %0d, boost 4: %0d", rate_seen[2], rate_seen[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
