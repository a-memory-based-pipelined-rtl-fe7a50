// Test of the direction registers: random writes to all modules and blocks,
// then reads on both ports with one cycle of latency compared with a shadow.
module tb_dir_regs;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int NB = 240;
  logic clk = 0, we = 0;
  mod_idx_t wmod = 0, rmod_h = 0, rmod_v = 0;
  logic [15:0] widx = 0, ridx_h = 0, ridx_v = 0;
  dir_t wdir = DIR_MONO, rdir_h, rdir_v;
  dir_regs #(.NB(NB)) dut (.*);
  always #5 clk = ~clk;
  dir_t shadow [NMOD][NB];
  initial begin
    for (int m = 0; m < NMOD; m++)
      for (int i = 0; i < NB; i++) begin
        @(negedge clk); we = 1; wmod = mod_idx_t'(m); widx = 16'(i);
        wdir = dir_t'($urandom_range(0, 4)); shadow[m][i] = wdir;
      end
    @(negedge clk); we = 0;
    for (int n = 0; n < 3000; n++) begin
      int mh, ih, mv, iv;
      mh = $urandom_range(0, NMOD - 1); ih = $urandom_range(0, NB - 1);
      mv = $urandom_range(0, NMOD - 1); iv = $urandom_range(0, NB - 1);
      rmod_h = mod_idx_t'(mh); ridx_h = 16'(ih); rmod_v = mod_idx_t'(mv); ridx_v = 16'(iv);
      @(negedge clk);
      check(rdir_h == shadow[mh][ih] && rdir_v == shadow[mv][iv], "direction read");
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
