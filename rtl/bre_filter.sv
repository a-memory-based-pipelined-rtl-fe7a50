// Boundary-pixel filter, used once as the horizontal filter and once as the
// vertical filter. The amount selector turns the block's edge direction
// into per-tap shifts; each used tap is shifted left by wiring (no
// multiplier), the nine terms are reduced by a Wallace tree, the two
// remaining words are added by a carry-select adder and the sum is shifted
// right by 10 bits (the masks are scaled by 1024). Because every mask sums
// to 1024 the result always fits 8 bits. One pipeline register: the result
// for the window presented in cycle t appears in cycle t+1 with out_valid.
// Shifters, Wallace tree, carry-select adder and the 10-bit right shift
// follow the architecture; truncation and the single pipeline register are
// this design's choices.
module bre_filter
  import bre_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  dir_t dir,
  input  pix_t win [9],      // 3x3 window, row-major, win[4] = centre
  output logic out_valid,
  output pix_t out_pix
);
  localparam int W = 20;

  logic [8:0]   en;
  logic [3:0]   amt [9];
  logic [W-1:0] term [9];
  logic [W-1:0] ws, wc, total;

  amount_selector u_amt (.dir(dir), .en(en), .amt(amt));

  // shifters: the shift amounts are 6, 8 or 9, so each is a fixed rewiring
  always_comb begin
    for (int t = 0; t < 9; t++) begin
      case (amt[t])
        4'd6:    term[t] = {6'b0, win[t], 6'b0};
        4'd8:    term[t] = {4'b0, win[t], 8'b0};
        default: term[t] = {3'b0, win[t], 9'b0};
      endcase
      if (!en[t]) term[t] = '0;
    end
  end

  wallace_tree #(.W(W)) u_wt (.op(term), .s(ws), .c(wc));
  carry_select_adder #(.W(W), .B(4)) u_csa (.a(ws), .b(wc), .sum(total));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_pix   <= '0;
    end else begin
      out_valid <= in_valid;
      out_pix   <= total[17:10];
    end
  end
endmodule
