// Exhaustive test of one edge-detector half: every pair of 8-bit pixels is
// compared with the relative test (b-a)/avg(a,b) against +-1/4 computed in
// floating point.
module tb_edge_cmp;
  import bre_pkg::*;
  `include "tb_util.svh"
  pix_t a, b;
  logic inc, dec;
  edge_cmp dut (.*);
  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        real avg, rel;
        a = pix_t'(i); b = pix_t'(j);
        #1;
        avg = (real'(i) + real'(j)) / 2.0;
        rel = (avg == 0.0) ? 0.0 : (real'(j) - real'(i)) / avg;
        check(inc == (rel > 0.25) && dec == (rel < -0.25),
              $sformatf("a=%0d b=%0d inc=%b dec=%b", i, j, inc, dec));
      end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
