// Wallace tree for nine operands: four levels of 3:2 carry-save adders
// (9 -> 6 -> 4 -> 3 -> 2) reduce the nine shifted taps to a sum word and a
// carry word whose sum equals the sum of the inputs modulo 2^W. Purely
// combinational; W must hold the full sum (20 bits covers nine 18-bit taps).
// The architecture calls for a Wallace tree here; the tree shape is the
// usual one.
module wallace_tree #(
  parameter int W = 20
) (
  input  logic [W-1:0] op [9],
  output logic [W-1:0] s,
  output logic [W-1:0] c
);
  logic [W-1:0] l1 [6];
  logic [W-1:0] l2 [4];
  logic [W-1:0] l3 [3];

  // level 1: 9 -> 6
  csa32 #(W) u10 (.a(op[0]), .b(op[1]), .c(op[2]), .s(l1[0]), .cy(l1[1]));
  csa32 #(W) u11 (.a(op[3]), .b(op[4]), .c(op[5]), .s(l1[2]), .cy(l1[3]));
  csa32 #(W) u12 (.a(op[6]), .b(op[7]), .c(op[8]), .s(l1[4]), .cy(l1[5]));
  // level 2: 6 -> 4
  csa32 #(W) u20 (.a(l1[0]), .b(l1[1]), .c(l1[2]), .s(l2[0]), .cy(l2[1]));
  csa32 #(W) u21 (.a(l1[3]), .b(l1[4]), .c(l1[5]), .s(l2[2]), .cy(l2[3]));
  // level 3: 4 -> 3
  csa32 #(W) u30 (.a(l2[0]), .b(l2[1]), .c(l2[2]), .s(l3[0]), .cy(l3[1]));
  assign l3[2] = l2[3];
  // level 4: 3 -> 2
  csa32 #(W) u40 (.a(l3[0]), .b(l3[1]), .c(l3[2]), .s(s), .cy(c));
endmodule
