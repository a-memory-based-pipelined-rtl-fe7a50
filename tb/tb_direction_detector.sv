// Test of the direction detector: random K/L up/down controls over 64-pixel
// blocks (biased so that all classes occur, with idle cycles in between);
// the class written at each block end is compared with the counts kept by
// the testbench and the rules |K|,|L| against M = 6 and sign(K) vs sign(L).
module tb_direction_detector;
  import bre_pkg::*;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0;
  logic valid = 0, blk_last = 0, k_inc = 0, k_dec = 0, l_inc = 0, l_dec = 0;
  logic [15:0] blk_idx = 0;
  logic dir_we;
  logic [15:0] dir_idx;
  dir_t dir;
  direction_detector #(.M(6)) dut (.*);
  always #5 clk = ~clk;
  int seen [5];
  initial begin
    int k, l, exp_d, kb, lb;
    foreach (seen[i]) seen[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 400; b++) begin
      k = 0; l = 0;
      kb = $urandom_range(0, 2); lb = $urandom_range(0, 2);   // 0 none, 1 up, 2 down
      for (int p = 0; p < 64; p++) begin
        @(negedge clk);
        if ($urandom_range(0, 4) == 0) begin valid = 0; @(negedge clk); end
        valid = 1; blk_last = (p == 63); blk_idx = 16'(b);
        k_inc = (kb == 1) ? ($urandom_range(0, 4) == 0) : ($urandom_range(0, 19) == 0);
        k_dec = !k_inc && ((kb == 2) ? ($urandom_range(0, 4) == 0) : ($urandom_range(0, 19) == 0));
        l_inc = (lb == 1) ? ($urandom_range(0, 4) == 0) : ($urandom_range(0, 19) == 0);
        l_dec = !l_inc && ((lb == 2) ? ($urandom_range(0, 4) == 0) : ($urandom_range(0, 19) == 0));
        k += int'(k_inc) - int'(k_dec);
        l += int'(l_inc) - int'(l_dec);
        #1;
        check(dir_we == blk_last, "write strobe at block end only");
        if (blk_last) begin
          int ak, al;
          ak = (k < 0) ? -k : k; al = (l < 0) ? -l : l;
          if (ak < 6 && al < 6) exp_d = 0;
          else if (ak < 6) exp_d = 1;
          else if (al < 6) exp_d = 3;
          else exp_d = ((k > 0) == (l > 0)) ? 2 : 4;
          seen[exp_d]++;
          check(int'(dir) == exp_d, $sformatf("block %0d K=%0d L=%0d got %0d expected %0d", b, k, l, dir, exp_d));
          check(dir_idx == 16'(b), "block index");
        end
      end
    end
    @(negedge clk); valid = 0;
    for (int d = 0; d < 5; d++) check(seen[d] > 0, $sformatf("class %0d exercised", d));
    report();
    $finish;
  end
  initial begin #2000000; failures++; report(); $finish; end
endmodule
