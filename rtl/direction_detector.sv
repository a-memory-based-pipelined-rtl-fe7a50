// Direction detector. Counts K (horizontal pairs) and L (vertical pairs)
// up or down with the edge detector's controls over one 8x8 block, and on
// the block's last pixel classifies the block with minimum edge length M
// (M = 6) and writes the encoded direction out:
//   |K| <  M, |L| <  M            monotone
//   |K| <  M, |L| >= M            0 degree edge
//   |K| >= M, |L| <  M            90 degree edge
//   |K| >= M, |L| >= M, same sign 45 degree edge, opposite sign 135 degree
// The counters include the controls of the last pixel itself and restart
// from zero for the next block. dir_we pulses in the cycle of the block's
// last pixel, with the block index passed through.
// The classification rules and M = 6 follow the architecture; treating a
// count equal to M as an edge and the 3-bit code are this design's choices.
module direction_detector
  import bre_pkg::*;
#(
  parameter int M = 6
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        valid,
  input  logic        blk_last,
  input  logic [15:0] blk_idx,
  input  logic        k_inc, k_dec, l_inc, l_dec,
  output logic        dir_we,
  output logic [15:0] dir_idx,
  output dir_t        dir
);
  logic signed [7:0] k_cnt, l_cnt, k_nxt, l_nxt;
  logic [7:0]        k_abs, l_abs;
  logic              big_k, big_l;

  always_comb begin
    k_nxt = k_cnt + 8'(signed'({1'b0, k_inc})) - 8'(signed'({1'b0, k_dec}));
    l_nxt = l_cnt + 8'(signed'({1'b0, l_inc})) - 8'(signed'({1'b0, l_dec}));
    k_abs = k_nxt[7] ? 8'(-k_nxt) : 8'(k_nxt);
    l_abs = l_nxt[7] ? 8'(-l_nxt) : 8'(l_nxt);
    big_k = int'(k_abs) >= M;
    big_l = int'(l_abs) >= M;
    if (!big_k && !big_l)      dir = DIR_MONO;
    else if (!big_k)           dir = DIR_0;
    else if (!big_l)           dir = DIR_90;
    else if (k_nxt[7] == l_nxt[7]) dir = DIR_45;
    else                       dir = DIR_135;
  end

  assign dir_we  = valid && blk_last;
  assign dir_idx = blk_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k_cnt <= '0;
      l_cnt <= '0;
    end else if (valid) begin
      k_cnt <= blk_last ? '0 : k_nxt;
      l_cnt <= blk_last ? '0 : l_nxt;
    end
  end
endmodule
