// dec_s3: link decoder of scheme III.
//
// The two inversion lines select how the data lines are restored:
// 01 odd lines (y1, y3, ...) inverted back, 10 even lines (y0, y2, ...)
// inverted back, 11 all lines inverted back, 00 unchanged.
// Purely combinational; the codes follow scheme III.
module dec_s3 #(
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
      INV_EVEN: mask = DATA_W'(inv_mask(INV_EVEN));
      INV_FULL: mask = '1;
      default:  mask = '0;
    endcase
  end
  assign dout = din ^ mask;
endmodule
