// Random test of the edge detector: K controls from the pixel and its right
// neighbour, L controls from the pixel and the pixel below, each gated by
// its pair flag; expected values from the relative test in floating point.
module tb_edge_detector;
  import bre_pkg::*;
  `include "tb_util.svh"
  pix_t x, xr, xd;
  logic hv, vv, k_inc, k_dec, l_inc, l_dec;
  edge_detector dut (.*);
  function automatic int rel(input int a, input int b);
    real r;
    if (a + b == 0) return 0;
    r = 2.0 * real'(b - a) / real'(a + b);
    return (r > 0.25) ? 1 : (r < -0.25) ? -1 : 0;
  endfunction
  initial begin
    int ek, el;
    for (int n = 0; n < 20000; n++) begin
      x = pix_t'($urandom); xr = pix_t'($urandom); xd = pix_t'($urandom);
      if (n % 3 == 0) xr = x + pix_t'($urandom_range(0, 40));
      hv = 1'($urandom); vv = 1'($urandom);
      #1;
      ek = hv ? rel(int'(x), int'(xr)) : 0;
      el = vv ? rel(int'(x), int'(xd)) : 0;
      check(k_inc == (ek == 1) && k_dec == (ek == -1), "K controls");
      check(l_inc == (el == 1) && l_dec == (el == -1), "L controls");
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
