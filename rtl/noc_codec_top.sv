// noc_codec_top: three low-power NI-to-NI link channels, one per encoding
// scheme, side by side.
//
// Lane 0 uses scheme I (odd inversion), lane 1 scheme II (odd or full
// inversion), lane 2 scheme III (odd, even or full inversion). In each lane a
// packet's flits enter the transmit network interface, where body payloads
// are Gray coded and encoded to reduce coupling transitions between adjacent
// link lines; they cross a variable-frequency link whose body-flit clock is
// boosted by 1, 2 or 4 as chosen by the lane's link controller from the link
// utilization; the receive network interface decodes them.
// Ports: per-lane flit stream in (valid/ready, head, tail, data), per-lane
// link lines (data, inversion code, launch strobe) for observing link
// activity, the boost factor of each link, and the decoded flits out.
// Timing: a flit leaves the encoder one cycle after it is accepted, is
// launched on the link at the next slot boundary of the link clock and
// appears at out_* one cycle after its launch.
// The routers between the two network interfaces are not modelled; the
// encoders work end to end, so every link of the route would carry the same
// encoded flits. Putting the three schemes side by side is this design's
// way of offering all of them; a system would use one.
module noc_codec_top #(
  parameter int unsigned DATA_W      = 16,
  parameter int unsigned BASE_DIV    = 4,
  parameter int unsigned CTRL_PERIOD = 64,
  parameter int unsigned TH_LOW      = 16,
  parameter int unsigned TH_HIGH     = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [2:0]             in_valid,
  output logic [2:0]             in_ready,
  input  logic [2:0]             in_head,
  input  logic [2:0]             in_tail,
  input  logic [2:0][DATA_W-1:0] in_data,
  output logic [2:0][DATA_W-1:0] link_data,
  output logic [2:0][1:0]        link_inv,
  output logic [2:0]             link_strobe,
  output logic [2:0][2:0]        boost,
  output logic [2:0]             out_valid,
  output logic [2:0]             out_head,
  output logic [2:0]             out_tail,
  output logic [2:0][DATA_W-1:0] out_data
);
  for (genvar k = 0; k < 3; k++) begin : g_lane
    logic              e_valid, e_ready, e_head, e_tail, l_head, l_tail, busy;
    logic [DATA_W-1:0] e_data;
    logic [1:0]        e_inv;

    ni_tx #(.DATA_W(DATA_W), .SCHEME(k + 1)) u_tx (
      .clk, .rst_n,
      .in_valid(in_valid[k]), .in_ready(in_ready[k]), .in_head(in_head[k]),
      .in_tail(in_tail[k]), .in_data(in_data[k]),
      .out_valid(e_valid), .out_ready(e_ready), .out_head(e_head),
      .out_tail(e_tail), .out_data(e_data), .out_inv(e_inv));

    vf_link #(.DATA_W(DATA_W), .BASE_DIV(BASE_DIV)) u_link (
      .clk, .rst_n, .boost(boost[k]),
      .in_valid(e_valid), .in_ready(e_ready), .in_head(e_head),
      .in_tail(e_tail), .in_data(e_data), .in_inv(e_inv),
      .link_strobe(link_strobe[k]), .link_head(l_head), .link_tail(l_tail),
      .link_data(link_data[k]), .link_inv(link_inv[k]), .busy);

    dfs_link_ctrl #(.CTRL_PERIOD(CTRL_PERIOD), .TH_LOW(TH_LOW), .TH_HIGH(TH_HIGH)) u_ctrl (
      .clk, .rst_n, .busy, .boost(boost[k]));

    ni_rx #(.DATA_W(DATA_W), .SCHEME(k + 1)) u_rx (
      .clk, .rst_n,
      .link_valid(link_strobe[k]), .link_head(l_head), .link_tail(l_tail),
      .link_data(link_data[k]), .link_inv(link_inv[k]),
      .out_valid(out_valid[k]), .out_head(out_head[k]), .out_tail(out_tail[k]),
      .out_data(out_data[k]));
  end
endmodule
