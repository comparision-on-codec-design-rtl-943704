// gray_enc: binary to reflected Gray code, g = b ^ (b >> 1).
//
// The transmit side of the network interface converts the payload of body
// flits to Gray code before the link encoder sees it, so that counting-like
// data changes one line per step. Gray coding of the encoder input comes from
// the design description; the circuit is the standard reflected Gray code.
// Purely combinational, DATA_W bits in and out.
module gray_enc #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  assign dout = din ^ (din >> 1);
endmodule
