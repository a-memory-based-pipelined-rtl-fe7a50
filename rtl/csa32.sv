// 3:2 carry-save adder (a row of full adders): a + b + c = s + cy, with the
// carry word already shifted one place left. Widths wrap at W bits.
module csa32 #(
  parameter int W = 20
) (
  input  logic [W-1:0] a, b, c,
  output logic [W-1:0] s, cy
);
  assign s  = a ^ b ^ c;
  assign cy = ((a & b) | (a & c) | (b & c)) << 1;
endmodule
