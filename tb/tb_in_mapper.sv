// Test of the input mapper at 48-pixel lines: two strips are sent (the
// second with random input gaps). Each write is decoded back to picture
// coordinates with the inverse of the bank map, which checks the bank and
// address, and must carry the pixel sent for that position. Also checked:
// in_ready only while the strip is open, and 8*WIDTH cycles for a strip
// without gaps.
module tb_in_mapper;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int W = 48, CPB = W / 3;
  logic clk = 0, rst_n = 0, start = 0, done, in_valid = 0, in_ready;
  pix_t in_pix = 0;
  wr_req_t wr;
  in_mapper #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  pix_t img [8][W];
  int written [8][W];
  int cyc = 0, t0;
  always @(posedge clk) cyc <= cyc + 1;
  // decode writes
  always @(posedge clk) if (wr.en) begin
    int r, c;
    r = 3 * (int'(wr.addr) / CPB) + int'(wr.bank) / 3;
    c = 3 * (int'(wr.addr) % CPB) + int'(wr.bank) % 3;
    check(wr.bank < 9 && r < 8 && c < W, "write inside the strip");
    if (r < 8 && c < W) begin
      check(wr.data == img[r][c], $sformatf("pixel (%0d,%0d)", r, c));
      written[r][c]++;
    end
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      foreach (img[r, c]) begin img[r][c] = pix_t'($urandom); written[r][c] = 0; end
      @(negedge clk);
      check(!in_ready && done, "idle before start");
      start = 1; @(negedge clk); start = 0;
      t0 = cyc;
      for (int r = 0; r < 8; r++)
        for (int c = 0; c < W; c++) begin
          if (s == 1) while ($urandom_range(0, 2) == 0) begin in_valid = 0; @(negedge clk); end
          in_valid = 1; in_pix = img[r][c];
          check(in_ready, "ready while strip open");
          @(negedge clk);
        end
      in_valid = 0;
      if (s == 0) check(cyc - t0 == 8 * W, $sformatf("strip took %0d cycles", cyc - t0));
      check(!in_ready && done, "closed after 8 lines");
      foreach (written[r, c]) check(written[r][c] == 1, "each position written once");
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
