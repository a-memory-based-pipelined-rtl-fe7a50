// Test of the filter mappers at 48-pixel lines, horizontal (VERT=0) and
// vertical (VERT=1) side by side. Behavioural memories hold three strips
// of a 24-line picture (previous, own, next) and answer bank reads one
// cycle later by decoding bank and address back to coordinates. For each
// boundary pixel in order the presented 3x3 window must equal the picture
// around it, with border replication at the picture's left/right edges and,
// when the strip is flagged first/last of its frame, at the top/bottom. A
// stand-in filter (centre + 1, one cycle) checks that results are written
// at block*28 + p. Runs with first/last = 00, 10, 01 and checks the pixel
// count (16 or 12 per block).
module tb_filter_mapper;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int W = 48, CPB = W / 3, NB = W / 8;
  logic clk = 0, rst_n = 0, start = 0, first = 0, last = 0;
  pix_t img [24][W];

  // behavioural strip memory: strip s of the picture
  function automatic pix_t mem_rd(input int s, input int b, input addr_t a);
    int r, c;
    r = 3 * (int'(a) / CPB) + b / 3;
    c = 3 * (int'(a) % CPB) + b % 3;
    return (r < 8 && c < W) ? img[s * 8 + r][c] : 8'h00;
  endfunction

  function automatic pix_t clamp_px(input int y, input int x, input bit f, input bit l);
    int yy, xx;
    yy = y; xx = x;
    if (f && yy < 8) yy = 8;
    if (l && yy > 15) yy = 15;
    if (xx < 0) xx = 0;
    if (xx >= W) xx = W - 1;
    return img[yy][xx];
  endfunction

  function automatic int pidx(input int r, input int cc);
    if (cc == 0) return r;
    if (cc == 7) return 8 + r;
    if (r == 0) return 15 + cc;
    return 21 + cc;
  endfunction

  for (genvar V = 0; V < 2; V++) begin : g
    logic done, win_valid, res_valid;
    rd_req_t own_rd, prev_rd, next_rd;
    rd_dat_t own_q, prev_q, next_q;
    logic [15:0] dir_idx;
    pix_t win [9];
    pix_t res_pix;
    ob_wr_t ob_wr;
    int n, nw;
    logic [15:0] didx_q;

    filter_mapper #(.WIDTH(W), .VERT(V[0])) dut (
      .clk, .rst_n, .start, .first, .last, .done,
      .own_rd, .prev_rd, .next_rd, .own_q, .prev_q, .next_q,
      .dir_idx, .win_valid, .win, .res_valid, .res_pix, .ob_wr
    );

    always @(posedge clk) begin
      for (int b = 0; b < 9; b++) begin
        prev_q[b] <= mem_rd(0, b, prev_rd[b]);
        own_q[b]  <= mem_rd(1, b, own_rd[b]);
        next_q[b] <= mem_rd(2, b, next_rd[b]);
      end
      res_valid <= win_valid;
      res_pix   <= win[4] + 8'd1;
      didx_q    <= dir_idx;
    end

    // expected position of the k-th boundary pixel
    function automatic void pos(input int k, output int r, output int col, output int p);
      int b, i, cc;
      if (V == 0) begin b = k / 16; i = k % 16; r = i % 8; cc = (i < 8) ? 0 : 7; end
      else        begin b = k / 12; i = k % 12; r = (i < 6) ? 0 : 7; cc = 1 + i % 6; end
      col = b * 8 + cc;
      p = b * 28 + pidx(r, cc);
    endfunction

    always @(negedge clk) if (rst_n) begin
      if (win_valid) begin
        int r, col, p;
        pos(n, r, col, p);
        for (int dr = 0; dr < 3; dr++)
          for (int dc = 0; dc < 3; dc++)
            check(win[dr*3+dc] == clamp_px(8 + r + dr - 1, col + dc - 1, first, last),
                  $sformatf("V%0d pixel %0d tap %0d", V, n, dr*3+dc));
        check(int'(didx_q) == col / 8, "block index to direction registers");
        n++;
      end
      if (ob_wr.en) begin
        int r, col, p;
        pos(nw, r, col, p);
        check(int'(ob_wr.addr) == p && ob_wr.data == img[8 + r][col] + 8'd1,
              $sformatf("V%0d result %0d written at %0d", V, nw, ob_wr.addr));
        nw++;
      end
    end
  end

  always #5 clk = ~clk;

  initial begin
    foreach (img[y, x]) img[y][x] = pix_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 3; m++) begin
      g[0].n = 0; g[0].nw = 0; g[1].n = 0; g[1].nw = 0;
      first = (m == 1); last = (m == 2);
      @(negedge clk); start = 1; @(negedge clk); start = 0; first = 0; last = 0;
      first = (m == 1); last = (m == 2);
      while (!(g[0].done && g[1].done)) @(negedge clk);
      check(g[0].n == NB * 16 && g[0].nw == NB * 16, "horizontal: 16 pixels per block");
      check(g[1].n == NB * 12 && g[1].nw == NB * 12, "vertical: 12 pixels per block");
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
