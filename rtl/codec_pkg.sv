// codec_pkg: types and helpers shared by the link encoders and decoders.
//
// The inversion code that travels with every body flit says which lines of
// the data word were inverted before the flit entered the link:
//   00 none, 01 odd lines, 10 even lines, 11 all lines (full inversion).
// Scheme I sends only the low bit (odd inversion or none); schemes II and III
// send both bits. The code values follow the encoding schemes' description;
// the enum and the mask helper are this design's packaging of them.
package codec_pkg;

  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_ODD  = 2'b01,
    INV_EVEN = 2'b10,
    INV_FULL = 2'b11
  } inv_code_e;

  // Largest data word the helpers below support.
  localparam int unsigned MAX_W = 64;

  // Inversion mask for a code: bit i is set when line i is inverted.
  // Odd lines are y1, y3, ...; even lines are y0, y2, ...
  function automatic logic [MAX_W-1:0] inv_mask(inv_code_e code);
    logic [MAX_W-1:0] m;
    for (int i = 0; i < MAX_W; i++) begin
      unique case (code)
        INV_ODD:  m[i] = (i % 2) == 1;
        INV_EVEN: m[i] = (i % 2) == 0;
        INV_FULL: m[i] = 1'b1;
        default:  m[i] = 1'b0;
      endcase
    end
    return m;
  endfunction

endpackage
