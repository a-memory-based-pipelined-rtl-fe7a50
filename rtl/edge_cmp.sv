// One half of the edge detector: compares two adjacent pixels a (first) and
// b (second) against the relative threshold tau = 1/4. The test
// (b-a)/avg(a,b) > tau is rewritten without division as
// 8*(b-a) > a+b, the factor 8 being a 3-bit left shift; the mirror test
// 8*(b-a) < -(a+b) gives the decrement. Purely combinational.
// The shifted comparison and tau = 1/4 follow the architecture's hardware
// formulation (the algorithm itself was tuned with 0.2); the decrement test
// is written as the mirror of the increment test.
module edge_cmp
  import bre_pkg::*;
(
  input  pix_t a,
  input  pix_t b,
  output logic inc,   // (b-a)/avg >  1/4
  output logic dec    // (b-a)/avg < -1/4
);
  logic signed [12:0] diff8;  // 8*(b-a), range -2040..2040
  logic signed [12:0] sum;    // a+b,     range 0..510

  always_comb begin
    diff8 = (13'(signed'({1'b0, b})) - 13'(signed'({1'b0, a}))) <<< 3;
    sum   = 13'(signed'({1'b0, a})) + 13'(signed'({1'b0, b}));
    inc   = diff8 > sum;
    dec   = diff8 < -sum;
  end
endmodule
