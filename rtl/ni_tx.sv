// ni_tx: transmit side of the network interface, with encoder block E.
//
// Body flits have their payload converted to Gray code and then pass through
// the link encoder of the selected scheme (SCHEME = 1, 2 or 3), which may
// invert odd, even or all data lines to cut coupling transitions on the link
// and sends the inversion code on extra lines. Header flits are passed as
// they are (no Gray conversion, code 00) so routers can read them.
// Interface: valid/ready flit stream in, valid/ready link stream out. out_inv
// is two bits for every scheme; with SCHEME = 1 only bit 0 is a link line and
// bit 1 is constant 0. Timing: one flit per cycle, one cycle latency (the
// encoder's link register).
// The Gray input and the three encoders follow the design description; the
// parameterised scheme choice and the stream handshake are this design's.
module ni_tx #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned SCHEME = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_head,
  input  logic              in_tail,
  input  logic [DATA_W-1:0] in_data,
  output logic              out_valid,
  input  logic              out_ready,
  output logic              out_head,
  output logic              out_tail,
  output logic [DATA_W-1:0] out_data,
  output logic [1:0]        out_inv
);
  logic [DATA_W-1:0] gray, enc_in;

  gray_enc #(.DATA_W(DATA_W)) u_gray (.din(in_data), .dout(gray));
  assign enc_in = in_head ? in_data : gray;

  if (SCHEME == 1) begin : g_s1
    logic inv1;
    enc_s1 #(.DATA_W(DATA_W)) u_enc (
      .clk, .rst_n, .in_valid, .in_ready, .in_head, .in_tail, .in_data(enc_in),
      .out_valid, .out_ready, .out_head, .out_tail, .out_data, .out_inv(inv1));
    assign out_inv = {1'b0, inv1};
  end else if (SCHEME == 2) begin : g_s2
    enc_s2 #(.DATA_W(DATA_W)) u_enc (
      .clk, .rst_n, .in_valid, .in_ready, .in_head, .in_tail, .in_data(enc_in),
      .out_valid, .out_ready, .out_head, .out_tail, .out_data, .out_inv);
  end else begin : g_s3
    enc_s3 #(.DATA_W(DATA_W)) u_enc (
      .clk, .rst_n, .in_valid, .in_ready, .in_head, .in_tail, .in_data(enc_in),
      .out_valid, .out_ready, .out_head, .out_tail, .out_data, .out_inv);
  end

  initial assert (SCHEME >= 1 && SCHEME <= 3) else $error("SCHEME must be 1, 2 or 3");
endmodule
