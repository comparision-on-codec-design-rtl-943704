// vf_link: variable-frequency link with clock boosting.
//
// The link runs at a base clock F1 for header flits and idle slots, and at a
// boosted clock boost*F1 (boost = 1, 2 or 4) for body flits, which follow the
// path the header flit has already reserved. The boosted clocks are modelled
// inside one clock domain: clk is the fastest supported clock, BASE_DIV*F1,
// and a slot counter lets the link register change only on the edges of the
// clock that applies. A header flit or an idle slot lasts BASE_DIV cycles of
// clk, a body flit BASE_DIV/boost cycles.
// Interface: valid/ready stream in (in_ready is high in the last cycle of a
// slot, when the next slot may start); the link register link_* and a
// one-cycle link_strobe when a flit is launched. busy reports that a flit is
// waiting for the link or occupying it, for the link controller.
// boost is sampled when a body flit is launched, so a change takes effect
// from the next body flit on.
// Boosting body flits only, with the base clock kept for header flits and
// idle cycles, and the factors 1, 2, 4 follow the description of the
// variable-frequency link; modelling the clocks by slot counters on one fast
// clock is this design's choice.
module vf_link #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned BASE_DIV = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [2:0]        boost,
  input  logic              in_valid,
  output logic              in_ready,
  input  logic              in_head,
  input  logic              in_tail,
  input  logic [DATA_W-1:0] in_data,
  input  logic [1:0]        in_inv,
  output logic              link_strobe,
  output logic              link_head,
  output logic              link_tail,
  output logic [DATA_W-1:0] link_data,
  output logic [1:0]        link_inv,
  output logic              busy
);
  localparam int unsigned SW = $clog2(BASE_DIV + 1);

  logic [SW-1:0] cnt;        // cycles left in the current slot, minus one
  logic          flit_slot;  // current slot carries a flit (not idle)
  logic [SW-1:0] body_len;

  always_comb begin
    unique case (boost)
      3'd4:    body_len = SW'(BASE_DIV / 4);
      3'd2:    body_len = SW'(BASE_DIV / 2);
      default: body_len = SW'(BASE_DIV);
    endcase
  end

  assign in_ready = (cnt == '0);
  assign busy     = in_valid || (flit_slot && cnt != '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt         <= '0;
      flit_slot   <= 1'b0;
      link_strobe <= 1'b0;
      link_head   <= 1'b0;
      link_tail   <= 1'b0;
      link_data   <= '0;
      link_inv    <= '0;
    end else if (cnt == '0) begin
      link_strobe <= in_valid;
      flit_slot   <= in_valid;
      if (in_valid) begin
        link_head <= in_head;
        link_tail <= in_tail;
        link_data <= in_data;
        link_inv  <= in_inv;
        cnt       <= (in_head ? SW'(BASE_DIV) : body_len) - SW'(1);
      end else begin
        cnt       <= SW'(BASE_DIV - 1);
      end
    end else begin
      link_strobe <= 1'b0;
      cnt         <= cnt - SW'(1);
    end
  end

  initial assert (BASE_DIV % 4 == 0 && BASE_DIV > 0) else $error("BASE_DIV must be a multiple of 4");
  a_boost: assert property (@(posedge clk) disable iff (!rst_n)
                            boost == 3'd1 || boost == 3'd2 || boost == 3'd4);
endmodule
