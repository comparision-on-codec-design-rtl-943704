// dfs_link_ctrl: link controller that picks the boost factor of a link.
//
// It counts, over a control period of CTRL_PERIOD cycles, the cycles in which
// the link is busy (a flit waits for it or occupies it). At the end of each
// period it sets the boost factor for the next one:
//   busy count <  TH_LOW            -> 1 (body flits at F1)
//   TH_LOW <= busy count < TH_HIGH  -> 2
//   busy count >= TH_HIGH           -> 4
// so a lightly used link stays slow and a heavily used one is boosted.
// Interface: busy in, boost out (1, 2 or 4; 1 after reset). The new value
// appears the cycle after the last cycle of a period.
// Selecting the boost factor among 1, 2 and 4 from the link utilization, once
// per short control period, follows the description of the DFS link; the
// period length, the thresholds and the busy measure are this design's
// choices.
module dfs_link_ctrl #(
  parameter int unsigned CTRL_PERIOD = 64,
  parameter int unsigned TH_LOW      = 16,
  parameter int unsigned TH_HIGH     = 40
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       busy,
  output logic [2:0] boost
);
  localparam int unsigned PW = $clog2(CTRL_PERIOD + 1);

  logic [PW-1:0] period_cnt;
  logic [PW-1:0] busy_cnt;
  logic [PW-1:0] busy_total;   // count including this cycle

  assign busy_total = busy_cnt + PW'(busy);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      period_cnt <= '0;
      busy_cnt   <= '0;
      boost      <= 3'd1;
    end else if (period_cnt == PW'(CTRL_PERIOD - 1)) begin
      period_cnt <= '0;
      busy_cnt   <= '0;
      if (busy_total < PW'(TH_LOW))       boost <= 3'd1;
      else if (busy_total < PW'(TH_HIGH)) boost <= 3'd2;
      else                                boost <= 3'd4;
    end else begin
      period_cnt <= period_cnt + PW'(1);
      busy_cnt   <= busy_total;
    end
  end

  initial assert (TH_LOW <= TH_HIGH && TH_HIGH <= CTRL_PERIOD)
    else $error("thresholds must satisfy TH_LOW <= TH_HIGH <= CTRL_PERIOD");
endmodule
