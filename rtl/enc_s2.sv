// enc_s2: link encoder of scheme II (odd or full inversion).
//
// As scheme I, and in addition full inversion, which turns Type II pairs into
// Type IV. With T4** the Type IV pairs whose lines differ (they become Type II
// under full inversion), the encoder picks
//   odd  when 2(T2 - T4**) < 2Ty - (w-1)  and  Ty > (w-1)/2        (16)
//   full when 2(T2 - T4**) > 2Ty - (w-1)  and  T2 > T4**           (18)
//   none otherwise,
// i.e. the option of strictly lowest coupling cost, and sends the code
// 01 (odd), 11 (full) or 00 (none) on two extra lines. Header flits are sent
// unencoded with code 00 and become the reference for the next flit.
// Timing: valid/ready stream, one flit per cycle, one cycle latency; out_data
// is the link register and the previous flit for the next decision.
// Conditions and codes follow the scheme II description; handshake, timing,
// reset and counting over the data lines only are this design's choices.
module enc_s2 #(
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
  output logic [1:0]        out_inv
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
    int lhs, ry;
    lhs  = 2 * (int'(t2) - int'(t4ss));
    ry   = 2 * int'(ty) - PAIRS;
    code = INV_NONE;
    if (!in_head) begin
      if (lhs < ry && 2 * int'(ty) > PAIRS)            // (16)
        code = INV_ODD;
      else if (lhs > ry && int'(t2) > int'(t4ss))   // (18)
        code = INV_FULL;
    end
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
      out_inv   <= code;
    end else if (out_ready) begin
      out_valid <= 1'b0;
    end
  end

  // A flit waiting on the link must stay unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
