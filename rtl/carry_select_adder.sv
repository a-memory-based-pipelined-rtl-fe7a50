// Carry-select adder: the W-bit operands are cut into blocks of B bits. The
// lowest block adds directly; every other block adds twice in parallel,
// assuming carry-in 0 and 1, and the carry from below selects the result.
// Purely combinational; sum is modulo 2^W. W must be a multiple of B.
// The architecture calls for a carry-select adder; the 4-bit block size is
// this design's choice.
module carry_select_adder #(
  parameter int W = 20,
  parameter int B = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] sum
);
  localparam int NBLK = W / B;

  logic [NBLK:0] carry;

  assign carry[0] = 1'b0;
  for (genvar k = 0; k < NBLK; k++) begin : g_blk
    logic [B:0] r0, r1;
    assign r0 = {1'b0, a[k*B +: B]} + {1'b0, b[k*B +: B]};
    assign r1 = {1'b0, a[k*B +: B]} + {1'b0, b[k*B +: B]} + (B+1)'(1);
    assign sum[k*B +: B] = carry[k] ? r1[B-1:0] : r0[B-1:0];
    assign carry[k+1]    = carry[k] ? r1[B]     : r0[B];
  end
endmodule
