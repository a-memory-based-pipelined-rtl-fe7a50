// Test of the boundary filter: random windows and edge classes; the result
// must appear one cycle later and equal floor(sum(coefficient*pixel)/1024)
// with the masks of the design computed by multiplication.
module tb_bre_filter;
  import bre_pkg::*;
  `include "tb_util.svh"
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  dir_t dir = DIR_MONO;
  pix_t win [9];
  pix_t out_pix;
  bre_filter dut (.*);
  always #5 clk = ~clk;
  int coef [5][9] = '{
    '{64, 64, 64, 64, 512, 64, 64, 64, 64},
    '{0, 0, 0, 256, 512, 256, 0, 0, 0},
    '{0, 0, 256, 0, 512, 0, 256, 0, 0},
    '{0, 256, 0, 0, 512, 0, 0, 256, 0},
    '{256, 0, 0, 0, 512, 0, 0, 0, 256}
  };
  initial begin
    int exp_q, exp_v;
    foreach (win[i]) win[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_v = 0; exp_q = 0;
    for (int n = 0; n < 5000; n++) begin
      int acc;
      in_valid = 1'($urandom_range(0, 3) != 0);
      dir = dir_t'($urandom_range(0, 4));
      for (int t = 0; t < 9; t++) win[t] = (n < 5) ? 8'hFF : pix_t'($urandom);
      acc = 0;
      for (int t = 0; t < 9; t++) acc += coef[int'(dir)][t] * int'(win[t]);
      @(negedge clk);
      check(out_valid == in_valid, "valid follows one cycle later");
      if (in_valid) check(int'(out_pix) == acc / 1024, $sformatf("dir %0d got %0d expected %0d", dir, out_pix, acc / 1024));
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
