// tb_ni_rx: checks the receive network interface for all three schemes.
//
// The testbench builds link flits itself: header flits unchanged with code
// 00, body flits Gray coded and inverted with a random code the scheme can
// send. Each instance must return the original payload one cycle after the
// link valid, with the flags, and nothing when the link is idle.
module tb_ni_rx;
  import tb_ref_pkg::*;
  localparam int W = 16;

  logic clk = 0, rst_n = 0;
  logic link_valid = 0, link_head = 0, link_tail = 0;
  logic [W-1:0] link_data [3];
  logic [1:0] link_inv [3];
  logic [2:0] out_valid, out_head, out_tail;
  logic [W-1:0] out_data [3];
  int checks = 0, failures = 0;
  logic [W-1:0] exp_data;
  logic exp_valid = 0, exp_head, exp_tail;

  for (genvar k = 0; k < 3; k++) begin : g
    ni_rx #(.DATA_W(W), .SCHEME(k + 1)) dut (
      .clk, .rst_n, .link_valid, .link_head, .link_tail, .link_data(link_data[k]),
      .link_inv(link_inv[k]), .out_valid(out_valid[k]), .out_head(out_head[k]),
      .out_tail(out_tail[k]), .out_data(out_data[k]));
  end

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    link_data = '{default: '0};
    link_inv  = '{default: '0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // check what the previous cycle's link flit produced
      for (int k = 0; k < 3; k++) begin
        checks++;
        if (out_valid[k] !== exp_valid ||
            (exp_valid && {out_head[k], out_tail[k], out_data[k]} !== {exp_head, exp_tail, exp_data})) begin
          failures++;
          $display("FAIL scheme %0d v%b h%b t%b %h exp v%b %h", k + 1, out_valid[k], out_head[k],
                   out_tail[k], out_data[k], exp_valid, exp_data);
        end
      end
      link_valid = ($urandom % 4) != 0;
      link_head  = ($urandom % 6) == 0;
      link_tail  = ($urandom % 6) == 0;
      exp_data   = W'(rand_word(W));
      for (int k = 0; k < 3; k++) begin
        int code;
        code = (k == 0) ? $urandom % 2 : (k == 1) ? (($urandom % 2) ? 3 : $urandom % 2) : $urandom % 4;
        if (link_head) begin
          link_data[k] = exp_data;
          link_inv[k]  = 2'b00;
        end else begin
          link_data[k] = W'(to_gray(exp_data, W)) ^ W'(mask_of(code, W));
          link_inv[k]  = 2'(code);
        end
      end
      exp_valid = link_valid;
      exp_head  = link_head;
      exp_tail  = link_tail;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
