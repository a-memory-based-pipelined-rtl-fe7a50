// Random test of the nine-operand Wallace tree: sum word plus carry word
// must equal the sum of the nine operands modulo 2^20.
module tb_wallace_tree;
  `include "tb_util.svh"
  logic [19:0] op [9];
  logic [19:0] s, c;
  wallace_tree #(.W(20)) dut (.*);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      int ref_sum;
      ref_sum = 0;
      for (int i = 0; i < 9; i++) begin
        op[i] = (n < 10) ? 20'hFFFFF : 20'($urandom);
        ref_sum += int'(op[i]);
      end
      #1;
      check(20'(s + c) == 20'(ref_sum), $sformatf("sum %0d expected %0d", 20'(s + c), 20'(ref_sum)));
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
