// gray_dec: reflected Gray code back to binary.
//
// Bit i of the result is the XOR of Gray bits DATA_W-1 down to i, built as a
// ripple from the top bit. Used on the receive side after the link decoder.
// Purely combinational, DATA_W bits in and out. The circuit is the standard
// inverse of gray_enc; the description only names Gray coding.
module gray_dec #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  always_comb begin
    dout[DATA_W-1] = din[DATA_W-1];
    for (int i = int'(DATA_W) - 2; i >= 0; i--)
      dout[i] = dout[i+1] ^ din[i];
  end
endmodule
