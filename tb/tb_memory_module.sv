// Test of a memory module at its default sizes: every input bank is filled
// through the write port, read back on ports A and B with different
// addresses, and the filtered-pixel bank is written and read.
module tb_memory_module;
  import bre_pkg::*;
  `include "tb_util.svh"
  logic clk = 0;
  wr_req_t wr = '0;
  rd_req_t rda = '0, rdb = '0;
  rd_dat_t qa, qb;
  ob_wr_t ob_wr = '0;
  addr_t ob_raddr = '0;
  pix_t ob_q;
  memory_module dut (.*);
  always #5 clk = ~clk;
  function automatic pix_t pat(input int b, input int a);
    return pix_t'(a * 7 + b * 31 + (a >> 5));
  endfunction
  initial begin
    for (int a = 0; a < 1920; a++)
      for (int b = 0; b < 9; b++) begin
        @(negedge clk); wr.en = 1; wr.bank = 4'(b); wr.addr = addr_t'(a); wr.data = pat(b, a);
      end
    for (int a = 0; a < 6720; a++) begin
      @(negedge clk); wr.en = 0; ob_wr.en = 1; ob_wr.addr = addr_t'(a); ob_wr.data = pix_t'(a ^ (a >> 8));
    end
    @(negedge clk); ob_wr.en = 0;
    for (int n = 0; n < 3000; n++) begin
      int aa [9], ab [9];
      int ao;
      for (int b = 0; b < 9; b++) begin
        aa[b] = $urandom_range(0, 1919); ab[b] = $urandom_range(0, 1919);
        rda[b] = addr_t'(aa[b]); rdb[b] = addr_t'(ab[b]);
      end
      ao = $urandom_range(0, 6719);
      ob_raddr = addr_t'(ao);
      @(negedge clk);
      for (int b = 0; b < 9; b++) begin
        check(qa[b] == pat(b, aa[b]), $sformatf("port A bank %0d", b));
        check(qb[b] == pat(b, ab[b]), $sformatf("port B bank %0d", b));
      end
      check(ob_q == pix_t'(ao ^ (ao >> 8)), "filtered-pixel bank");
    end
    report();
    $finish;
  end
  initial begin #10000000; failures++; report(); $finish; end
endmodule
