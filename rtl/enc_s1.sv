// enc_s1: link encoder of scheme I (odd inversion).
//
// Each body flit is compared with the flit last put on the link. Odd-inverting
// it (inverting lines y1, y3, ...) turns Type II, III and IV pairs into Type I
// and some Type I pairs into Type II, III or IV; neglecting self-switching
// the inversion lowers the coupling power T1 + 2*T2 exactly when
//   Ty > (w-1)/2,  Ty = T1 + T2 - T1(odd->II), w-1 = DATA_W-1 pairs,
// i.e. a majority vote over the pairs. The flit is then sent odd-inverted with
// out_inv = 1, otherwise unchanged with out_inv = 0. Header flits are never
// encoded and go out with out_inv = 0, but they are on the link and so become
// the reference for the next flit.
// Timing: valid/ready stream, one flit per cycle, one cycle from in_* to out_*.
// out_data is the link register: it also holds the previous flit for the next
// decision, so both encoder stages (type count, threshold) fit in one cycle.
// The condition and the inversion bit follow the scheme I description; the
// stream handshake, the single-cycle timing, the reset to zero and counting
// over the data lines only (the inversion line is not in the count) are this
// design's choices.
module enc_s1 #(
  parameter int unsigned DATA_W = 16
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
  output logic              out_inv
);
  import codec_pkg::*;

  localparam int unsigned CW = $clog2(DATA_W);
  localparam int PAIRS = int'(DATA_W) - 1;   // w - 1 adjacent line pairs

  logic [CW-1:0] t1, t2, t3, t4, t4ss, ty, te;
  inv_code_e     code;
  logic [DATA_W-1:0] mask;

  // Stage 1: transition types against the flit last put on the link.
  transition_counter #(.DATA_W(DATA_W)) u_tc (
    .prev(out_data), .cur(in_data),
    .t1, .t2, .t3, .t4, .t4ss, .ty, .te
  );

  // Stage 2: threshold conditions.
  always_comb begin
    code = INV_NONE;
    if (!in_head && 2 * int'(ty) > PAIRS)   // (12) Ty > (w-1)/2
      code = INV_ODD;
  end

  assign mask     = DATA_W'(inv_mask(code));
  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_head  <= 1'b0;
      out_tail  <= 1'b0;
      out_data  <= '0;
      out_inv   <= '0;
    end else if (in_valid && in_ready) begin
      out_valid <= 1'b1;
      out_head  <= in_head;
      out_tail  <= in_tail;
      out_data  <= in_data ^ mask;
      out_inv   <= code[0];
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // A flit waiting on the link must stay unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
