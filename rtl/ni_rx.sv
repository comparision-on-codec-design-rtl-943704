// ni_rx: receive side of the network interface, with the link decoder.
//
// A flit taken from the link (link_valid) is decoded with the decoder of the
// selected scheme (SCHEME = 1, 2 or 3) using the received inversion code, and
// the payload of body flits is converted from Gray code back to binary.
// Header flits pass unchanged. Interface: link flit in with a one-cycle
// valid, decoded flit out with a one-cycle valid; there is no backpressure.
// Timing: one cycle latency (output register), one flit per cycle.
// The decoders and the Gray input follow the design description; the output
// register and the lack of backpressure are this design's choices.
module ni_rx #(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned SCHEME = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              link_valid,
  input  logic              link_head,
  input  logic              link_tail,
  input  logic [DATA_W-1:0] link_data,
  input  logic [1:0]        link_inv,
  output logic              out_valid,
  output logic              out_head,
  output logic              out_tail,
  output logic [DATA_W-1:0] out_data
);
  logic [DATA_W-1:0] dec, bin;

  if (SCHEME == 1) begin : g_s1
    dec_s1 #(.DATA_W(DATA_W)) u_dec (.inv(link_inv[0]), .din(link_data), .dout(dec));
  end else if (SCHEME == 2) begin : g_s2
    dec_s2 #(.DATA_W(DATA_W)) u_dec (.inv(link_inv), .din(link_data), .dout(dec));
  end else begin : g_s3
    dec_s3 #(.DATA_W(DATA_W)) u_dec (.inv(link_inv), .din(link_data), .dout(dec));
  end

  gray_dec #(.DATA_W(DATA_W)) u_gray (.din(dec), .dout(bin));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_tail  <= 1'b0;
      out_data  <= '0;
    end else begin
      out_valid <= link_valid;
      if (link_valid) begin
        out_head <= link_head;
        out_tail <= link_tail;
        out_data <= link_head ? link_data : bin;
      end
    end
  end
endmodule
