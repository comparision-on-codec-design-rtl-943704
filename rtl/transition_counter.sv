// transition_counter: first stage of every link encoder.
//
// For each of the DATA_W-1 pairs of adjacent lines (i, i+1) it compares the
// flit that was last put on the link (prev, time t-1) with the incoming flit
// (cur, time t) and classifies the coupling transition:
//   Type I   one line switches, the other stays              (weight 1)
//   Type II  both switch in opposite directions              (weight 2)
//   Type III both switch in the same direction               (weight 0)
//   Type IV  neither switches                                (weight 0)
// Inverting one line of a pair turns Types II, III, IV into Type I; a Type I
// pair whose non-switching line is inverted and whose lines differed at t-1
// becomes Type II. Which line of the pair is inverted depends on odd or even
// inversion, so two such counts are kept. A Type IV pair whose lines differ
// becomes Type II under full inversion (T4**).
// Outputs (all counts of pairs, 0..DATA_W-1):
//   t1..t4  number of pairs of each type
//   t4ss    T4**, Type IV pairs with differing lines
//   ty      Ty = T1 + T2 - T1(odd inversion -> Type II)
//   te      Te = T1 + T2 - T1(even inversion -> Type II)
// The classification and the Ty/Te/T4** quantities are those of the encoding
// schemes; defining the Type I subclasses by which line is inverted (instead
// of by table columns for one pair position) is this design's formulation.
// Purely combinational.
module transition_counter #(
  parameter int unsigned DATA_W = 16,
  localparam int unsigned CW = $clog2(DATA_W)
) (
  input  logic [DATA_W-1:0] prev,
  input  logic [DATA_W-1:0] cur,
  output logic [CW-1:0]     t1,
  output logic [CW-1:0]     t2,
  output logic [CW-1:0]     t3,
  output logic [CW-1:0]     t4,
  output logic [CW-1:0]     t4ss,
  output logic [CW-1:0]     ty,
  output logic [CW-1:0]     te
);
  logic [DATA_W-1:0] sw;   // line switches between t-1 and t
  assign sw = prev ^ cur;

  always_comb begin
    logic d0, d1, adiff, odd_first;
    logic is1, is2, is3, is4, o2, e2, cy, ce;
    t1 = '0; t2 = '0; t3 = '0; t4 = '0; t4ss = '0; ty = '0; te = '0;
    for (int i = 0; i < int'(DATA_W) - 1; i++) begin
      d0        = sw[i];
      d1        = sw[i+1];
      adiff     = prev[i] ^ prev[i+1];
      odd_first = (i % 2) == 1;          // line i is an odd line
      is1 = d0 ^ d1;
      is2 = d0 & d1 & adiff;
      is3 = d0 & d1 & ~adiff;
      is4 = ~d0 & ~d1;
      // Type I, lines differed at t-1, and the inverted line is the quiet one
      o2  = is1 & adiff & (odd_first ? ~d0 : ~d1);
      e2  = is1 & adiff & (odd_first ? ~d1 : ~d0);
      cy  = (is1 & ~o2) | is2;
      ce  = (is1 & ~e2) | is2;
      t1   += CW'(is1);
      t2   += CW'(is2);
      t3   += CW'(is3);
      t4   += CW'(is4);
      t4ss += CW'(is4 & adiff);
      ty   += CW'(cy);
      te   += CW'(ce);
    end
  end
endmodule
