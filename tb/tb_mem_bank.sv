// Test of one memory bank: random writes, then reads on both ports with one
// cycle of latency compared with a shadow copy; read-during-write returns
// the old word.
module tb_mem_bank;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int D = 1920;
  logic clk = 0, we = 0;
  addr_t waddr = 0;
  pix_t wdata = 0;
  addr_t [1:0] raddr = '0;
  pix_t [1:0] rdata;
  mem_bank #(.DEPTH(D), .NRD(2)) dut (.*);
  always #5 clk = ~clk;
  pix_t shadow [D];
  initial begin
    for (int a = 0; a < D; a++) begin
      @(negedge clk); we = 1; waddr = addr_t'(a); wdata = pix_t'($urandom); shadow[a] = wdata;
    end
    for (int n = 0; n < 4000; n++) begin
      int a0, a1;
      pix_t old0, old1;
      @(negedge clk);
      a0 = $urandom_range(0, D - 1); a1 = $urandom_range(0, D - 1);
      raddr[0] = addr_t'(a0); raddr[1] = addr_t'(a1);
      old0 = shadow[a0]; old1 = shadow[a1];
      we = 1'($urandom); waddr = addr_t'((n % 2) ? a0 : $urandom_range(0, D - 1)); wdata = pix_t'($urandom);
      if (we) shadow[waddr] = wdata;
      @(negedge clk);
      we = 0;
      check(rdata[0] == old0 && rdata[1] == old1, $sformatf("read %0d/%0d", a0, a1));
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
