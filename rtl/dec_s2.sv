// dec_s2: link decoder of scheme II.
//
// The two inversion lines select how the data lines are restored:
// 01 odd lines inverted back, 11 all lines inverted back, 00 unchanged.
// Code 10 is never sent by the scheme II encoder; it is treated as 00.
// Purely combinational; the codes follow scheme II.
module dec_s2 #(
  parameter int unsigned DATA_W = 16
) (
  input  logic [1:0]        inv,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] dout
);
  import codec_pkg::*;
  logic [DATA_W-1:0] mask;
  always_comb begin
    unique case (inv)
      INV_ODD:  mask = DATA_W'(inv_mask(INV_ODD));
      INV_FULL: mask = '1;
      default:  mask = '0;
    endcase
  end
  assign dout = din ^ mask;
endmodule
