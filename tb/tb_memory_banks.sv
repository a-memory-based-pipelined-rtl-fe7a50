// Test of the memory with its routing, at 48-pixel lines. For each of the
// six schedule steps (write module w, operation k on module w-k mod 6) the
// module being written is filled with values that encode module, bank and
// address; every reader (edge mapper, both filters' own/previous/next
// ports, output mapper) must then receive the words of the module its
// operation assigns, and each filter's filtered-pixel writes must land in
// its own module, read back through the output port.
module tb_memory_banks;
  import bre_pkg::*;
  `include "tb_util.svh"
  localparam int W = 48, BD = W, OD = W / 8 * 28;
  logic clk = 0;
  mod_idx_t [NOPS-1:0] mod_op;
  wr_req_t in_wr = '0;
  rd_req_t edge_rd = '0, hf_own_rd = '0, hf_prev_rd = '0, hf_next_rd = '0;
  rd_req_t vf_own_rd = '0, vf_prev_rd = '0, vf_next_rd = '0, out_rd = '0;
  rd_dat_t edge_q, hf_own_q, hf_prev_q, hf_next_q, vf_own_q, vf_prev_q, vf_next_q, out_q;
  ob_wr_t hf_ob_wr = '0, vf_ob_wr = '0;
  addr_t out_ob_raddr = '0;
  pix_t out_ob_q;
  memory_banks #(.BANK_DEPTH(BD), .OUT_DEPTH(OD)) dut (.*);
  always #5 clk = ~clk;

  function automatic pix_t pat(input int m, input int b, input int a);
    return pix_t'(m * 41 + b * 13 + a * 3);
  endfunction
  function automatic void set_step(input int w);
    for (int k = 0; k < NOPS; k++) mod_op[k] = mod_idx_t'((w - k + NMOD) % NMOD);
  endfunction
  function automatic int mo(input int w, input int k);
    return (w - k + NMOD) % NMOD;
  endfunction

  initial begin
    set_step(0);
    // fill: in step w, module w is written
    for (int w = 0; w < NMOD; w++) begin
      set_step(w);
      for (int a = 0; a < BD; a++)
        for (int b = 0; b < 9; b++) begin
          @(negedge clk);
          in_wr.en = 1; in_wr.bank = 4'(b); in_wr.addr = addr_t'(a); in_wr.data = pat(w, b, a);
        end
      @(negedge clk); in_wr.en = 0;
    end
    for (int w = 0; w < NMOD; w++) begin
      set_step(w);
      // filtered-pixel writes of both filters in this step
      for (int a = 0; a < 8; a++) begin
        @(negedge clk);
        hf_ob_wr = '{en: 1'b1, addr: addr_t'(a), data: pix_t'(8'h80 + w * 8 + a)};
        vf_ob_wr = '{en: 1'b1, addr: addr_t'(a + 8), data: pix_t'(8'h40 + w * 8 + a)};
      end
      @(negedge clk); hf_ob_wr = '0; vf_ob_wr = '0;
      for (int n = 0; n < 50; n++) begin
        int aa [8];
        for (int i = 0; i < 8; i++) aa[i] = $urandom_range(0, BD - 1);
        for (int b = 0; b < 9; b++) begin
          edge_rd[b] = addr_t'(aa[0]); hf_own_rd[b] = addr_t'(aa[1]); hf_prev_rd[b] = addr_t'(aa[2]);
          hf_next_rd[b] = addr_t'(aa[3]); vf_own_rd[b] = addr_t'(aa[4]); vf_prev_rd[b] = addr_t'(aa[5]);
          vf_next_rd[b] = addr_t'(aa[6]); out_rd[b] = addr_t'(aa[7]);
        end
        @(negedge clk);
        for (int b = 0; b < 9; b++) begin
          check(edge_q[b]    == pat(mo(w, 1), b, aa[0]), "edge reads its module");
          check(hf_own_q[b]  == pat(mo(w, 2), b, aa[1]), "hfilt own");
          check(hf_prev_q[b] == pat(mo(w, 3), b, aa[2]), "hfilt previous strip");
          check(hf_next_q[b] == pat(mo(w, 1), b, aa[3]), "hfilt next strip");
          check(vf_own_q[b]  == pat(mo(w, 3), b, aa[4]), "vfilt own");
          check(vf_prev_q[b] == pat(mo(w, 4), b, aa[5]), "vfilt previous strip");
          check(vf_next_q[b] == pat(mo(w, 2), b, aa[6]), "vfilt next strip");
          check(out_q[b]     == pat(mo(w, 4), b, aa[7]), "output reads its module");
        end
      end
    end
    // filtered pixels: module m got hfilt data in step w = m+2, vfilt in w = m+3;
    // read them back when that module is the output module (w = m+4)
    for (int m = 0; m < NMOD; m++) begin
      set_step((m + 4) % NMOD);
      for (int a = 0; a < 16; a++) begin
        out_ob_raddr = addr_t'(a);
        @(negedge clk);
        if (a < 8) check(out_ob_q == pix_t'(8'h80 + ((m + 2) % NMOD) * 8 + a), "hfilt result in its module");
        else       check(out_ob_q == pix_t'(8'h40 + ((m + 3) % NMOD) * 8 + a - 8), "vfilt result in its module");
      end
    end
    report();
    $finish;
  end
  initial begin #10000000; failures++; report(); $finish; end
endmodule
