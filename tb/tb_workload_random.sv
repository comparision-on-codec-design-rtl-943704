// tb_workload_random: link activity of the three schemes on random 16-bit
// payloads, the data set the encoding schemes are analysed for.
//
// Part 1 feeds uniformly random word pairs to the transition counter and
// checks the occurrence probability of the four coupling transition types
// between two adjacent lines: 1/2, 1/8, 1/8 and 1/4 for Types I to IV.
// Part 2 sends the same stream of 20000 random body flits through the
// transmit network interface of each scheme and measures, on the link data
// lines, the self-switching activity T0->1, the coupling activity T1 + 2*T2
// and the power figure T0->1 + 4*(T1 + 2*T2) (coupling capacitance taken as
// four times the substrate capacitance). Checked: each scheme lowers the
// coupling activity against the unencoded Gray-coded stream, and the
// schemes rank III <= II <= I. The numbers are printed.
module tb_workload_random;
  import tb_ref_pkg::*;
  localparam int W = 16;
  localparam int CW = $clog2(W);
  localparam int NFLITS = 20000;

  int checks = 0, failures = 0;

  // Part 1: transition type statistics
  logic [W-1:0] tp, tc;
  logic [CW-1:0] t1, t2, t3, t4, t4ss, ty, te;
  transition_counter #(.DATA_W(W)) u_tc (.prev(tp), .cur(tc), .t1, .t2, .t3, .t4, .t4ss, .ty, .te);

  // Part 2: the three transmit interfaces, always ready
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [W-1:0] in_data = '0;
  logic [2:0] in_ready, out_valid, out_head, out_tail;
  logic [W-1:0] out_data [3];
  logic [1:0] out_inv [3];
  for (genvar k = 0; k < 3; k++) begin : g
    ni_tx #(.DATA_W(W), .SCHEME(k + 1)) u_tx (
      .clk, .rst_n, .in_valid, .in_ready(in_ready[k]), .in_head(1'b0), .in_tail(1'b0),
      .in_data, .out_valid(out_valid[k]), .out_ready(1'b1), .out_head(out_head[k]),
      .out_tail(out_tail[k]), .out_data(out_data[k]), .out_inv(out_inv[k]));
  end

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint rise [4], coup [4];   // index 0: Gray-coded stream without inversion
  logic [W-1:0] prev [4];

  always @(posedge clk) if (rst_n) begin
    #1;
    for (int k = 0; k < 3; k++) if (out_valid[k]) begin
      rise[k+1] += rise_count(prev[k+1], out_data[k], W);
      coup[k+1] += coupling_cost(prev[k+1], out_data[k], W);
      prev[k+1] = out_data[k];
    end
  end

  function automatic bit near(real x, real ref_value);
    return (x > ref_value - 0.01) && (x < ref_value + 0.01);
  endfunction

  initial begin
    longint n[5] = '{0, 0, 0, 0, 0};
    real p[5];
    longint pw[4];
    // Part 1
    for (int i = 0; i < NFLITS; i++) begin
      tp = W'($urandom); tc = W'($urandom); #1;
      n[1] += t1; n[2] += t2; n[3] += t3; n[4] += t4;
    end
    for (int t = 1; t <= 4; t++) p[t] = real'(n[t]) / real'(NFLITS * (W - 1));
    $display("type probabilities I %0.4f II %0.4f III %0.4f IV %0.4f", p[1], p[2], p[3], p[4]);
    checks++;
    if (!(near(p[1], 0.5) && near(p[2], 0.125) && near(p[3], 0.125) && near(p[4], 0.25))) begin
      failures++;
      $display("FAIL transition type probabilities");
    end

    // Part 2
    for (int k = 0; k < 4; k++) begin rise[k] = 0; coup[k] = 0; prev[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NFLITS; i++) begin
      logic [W-1:0] g;
      @(negedge clk);
      in_valid = 1;
      in_data  = W'($urandom);
      g = W'(to_gray(in_data, W));
      rise[0] += rise_count(prev[0], g, W);
      coup[0] += coupling_cost(prev[0], g, W);
      prev[0] = g;
    end
    @(negedge clk);
    in_valid = 0;
    repeat (3) @(posedge clk);
    #2;
    for (int k = 0; k < 4; k++) begin
      pw[k] = rise[k] + 4 * coup[k];
      if (k == 0) $display("no inversion: T0->1 %0d, T1+2T2 %0d, T0->1+4(T1+2T2) %0d", rise[k], coup[k], pw[k]);
      else $display("scheme %0d:     T0->1 %0d, T1+2T2 %0d, T0->1+4(T1+2T2) %0d (%0.1f%% below no inversion)",
                    k, rise[k], coup[k], pw[k], 100.0 * (1.0 - real'(pw[k]) / real'(pw[0])));
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (coup[k] >= coup[0]) begin failures++; $display("FAIL scheme %0d does not lower coupling", k); end
    end
    checks++;
    if (!(coup[3] <= coup[2] && coup[2] <= coup[1])) begin
      failures++;
      $display("FAIL schemes do not rank III <= II <= I");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
