// Test of the edge-detector mapper at 48-pixel lines. A behavioural strip
// memory answers the nine bank reads one cycle later by decoding bank and
// address back to picture coordinates. The mapper must present, for every
// block in order and every pixel in raster order within it, the pixel, its
// right neighbour and the pixel below with the right pair flags, block-end
// flag and block index, and finish in 64 cycles per block.
module tb_edge_mapper;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int W = 48, CPB = W / 3, NB = W / 8;
  logic clk = 0, rst_n = 0, start = 0, done, valid, hv, vv, blk_last;
  rd_req_t rd;
  rd_dat_t q;
  pix_t x, xr, xd;
  logic [15:0] blk_idx;
  edge_mapper #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  pix_t img [8][W];
  always @(posedge clk)
    for (int b = 0; b < 9; b++) begin
      int r, c;
      r = 3 * (int'(rd[b]) / CPB) + b / 3;
      c = 3 * (int'(rd[b]) % CPB) + b % 3;
      q[b] <= (r < 8 && c < W) ? img[r][c] : 8'h00;
    end
  int n = 0, cyc = 0, t0, t1;
  always @(posedge clk) cyc <= cyc + 1;
  always @(negedge clk) if (valid) begin
    int b, r, c, col;
    b = n / 64; r = (n % 64) / 8; c = n % 8; col = b * 8 + c;
    check(x == img[r][col], "pixel");
    check(hv == (c != 7) && vv == (r != 7), "pair flags");
    if (c != 7) check(xr == img[r][col + 1], "right neighbour");
    if (r != 7) check(xd == img[r + 1][col], "lower neighbour");
    check(blk_last == (n % 64 == 63) && int'(blk_idx) == b, "block end and index");
    n++;
  end
  initial begin
    foreach (img[r, c]) img[r][c] = pix_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; @(negedge clk); start = 0; t0 = cyc;
    check(!done, "busy after start");
    while (!done) @(negedge clk);
    t1 = cyc;
    check(n == NB * 64, $sformatf("%0d pixels presented", n));
    check(t1 - t0 == NB * 64 + 1, $sformatf("took %0d cycles", t1 - t0));
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
