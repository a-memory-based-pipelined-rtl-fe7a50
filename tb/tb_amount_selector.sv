// Test of the amount selector: for each edge class the selected taps and
// shifts must give the masks of the design (2-D: 512 centre, 64 around;
// 1-D: 512 centre, 256 on the two neighbours along the edge), each summing
// to 1024.
module tb_amount_selector;
  import bre_pkg::*;
  `include "tb_util.svh"
  dir_t dir;
  logic [8:0] en;
  logic [3:0] amt [9];
  amount_selector dut (.*);
  int expw [5][9] = '{
    '{64, 64, 64, 64, 512, 64, 64, 64, 64},   // monotone
    '{0, 0, 0, 256, 512, 256, 0, 0, 0},       // 0 degree
    '{0, 0, 256, 0, 512, 0, 256, 0, 0},       // 45 degree
    '{0, 256, 0, 0, 512, 0, 0, 256, 0},       // 90 degree
    '{256, 0, 0, 0, 512, 0, 0, 0, 256}        // 135 degree
  };
  initial begin
    for (int d = 0; d < 5; d++) begin
      int sum;
      dir = dir_t'(d);
      #1;
      sum = 0;
      for (int t = 0; t < 9; t++) begin
        int w;
        w = en[t] ? (1 << amt[t]) : 0;
        sum += w;
        check(w == expw[d][t], $sformatf("dir %0d tap %0d weight %0d", d, t, w));
      end
      check(sum == 1024, "mask sums to 1024");
    end
    report();
    $finish;
  end
  initial begin #1000; failures++; report(); $finish; end
endmodule
