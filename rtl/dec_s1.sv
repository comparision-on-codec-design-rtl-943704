// dec_s1: link decoder of scheme I.
//
// The received data lines are odd-inverted back (lines y1, y3, ...) when the
// inversion line is 1, and passed on unchanged when it is 0. Header flits are
// always sent with inv = 0 and so pass unchanged. Purely combinational; the
// decoding rule follows scheme I.
module dec_s1 #(
  parameter int unsigned DATA_W = 16
) (
  input  logic              inv,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  import codec_pkg::*;
  assign dout = din ^ (inv ? DATA_W'(inv_mask(INV_ODD)) : '0);
endmodule
