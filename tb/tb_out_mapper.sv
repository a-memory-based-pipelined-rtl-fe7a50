// Test of the output mapper at 48-pixel lines with random back-pressure. A
// behavioural strip memory holds distinct values in the input banks and in
// the filtered-pixel bank; the strip must come out in raster order with
// every block-border pixel taken from the filtered-pixel bank (address
// block*28 + p) and every inner pixel from the input banks.
module tb_out_mapper;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int W = 48, CPB = W / 3, NB = W / 8;
  logic clk = 0, rst_n = 0, start = 0, done, out_valid, out_ready = 1;
  rd_req_t rd;
  rd_dat_t q;
  addr_t ob_raddr;
  pix_t ob_q, out_pix;
  out_mapper #(.WIDTH(W)) dut (.*);
  always #5 clk = ~clk;
  pix_t img [8][W];
  pix_t filt [NB * 28];
  always @(posedge clk) begin
    for (int b = 0; b < 9; b++) begin
      int r, c;
      r = 3 * (int'(rd[b]) / CPB) + b / 3;
      c = 3 * (int'(rd[b]) % CPB) + b % 3;
      q[b] <= (r < 8 && c < W) ? img[r][c] : 8'h00;
    end
    ob_q <= (int'(ob_raddr) < NB * 28) ? filt[ob_raddr] : 8'h00;
  end
  function automatic int pidx(input int r, input int cc);
    if (cc == 0) return r;
    if (cc == 7) return 8 + r;
    if (r == 0) return 15 + cc;
    return 21 + cc;
  endfunction
  int n = 0, stalls = 0;
  initial begin
    foreach (img[r, c]) img[r][c] = pix_t'($urandom);
    foreach (filt[i]) filt[i] = pix_t'($urandom);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int s = 0; s < 2; s++) begin
      n = 0;
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      while (n < 8 * W) begin
        out_ready = (s == 0) || ($urandom_range(0, 2) != 0);
        #1;
        if (!out_ready && out_valid) stalls++;
        if (out_valid && out_ready) begin
          int r, c, cc, e;
          r = n / W; c = n % W; cc = c % 8;
          e = (r == 0 || r == 7 || cc == 0 || cc == 7) ? int'(filt[(c / 8) * 28 + pidx(r, cc)]) : int'(img[r][c]);
          check(int'(out_pix) == e, $sformatf("pixel (%0d,%0d)", r, c));
          n++;
        end
        @(negedge clk);
      end
      out_ready = 1;
      check(done && !out_valid, "idle after the strip");
    end
    check(stalls > 0, "back-pressure exercised");
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
