// Test of the carry-select adder: random and carry-chain corner operands,
// compared with the sum modulo 2^20.
module tb_carry_select_adder;
  `include "tb_util.svh"
  logic [19:0] a, b, sum;
  carry_select_adder #(.W(20), .B(4)) dut (.*);
  initial begin
    for (int n = 0; n < 20000; n++) begin
      case (n % 4)
        0: begin a = 20'hFFFFF; b = 20'($urandom_range(0, 3)); end
        1: begin a = 20'($urandom); b = ~a + 20'($urandom_range(0, 1)); end
        default: begin a = 20'($urandom); b = 20'($urandom); end
      endcase
      #1;
      check(sum == 20'(a + b), $sformatf("%h + %h = %h", a, b, sum));
    end
    report();
    $finish;
  end
  initial begin #1000000; failures++; report(); $finish; end
endmodule
