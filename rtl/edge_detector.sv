// Edge detector: two identical comparator halves (edge_cmp). One compares
// a pixel with its right-hand neighbour and drives the K counter controls,
// the other compares it with the pixel below and drives the L counter
// controls. hv / vv mark whether the pair exists inside the 8x8 block (no
// right neighbour in column 7, none below in row 7); without a pair the
// controls stay low. Purely combinational.
// The two identical halves, one per counter, follow the architecture; the
// pair gating is this design's.
module edge_detector
  import bre_pkg::*;
(
  input  pix_t x,        // pixel (i, j)
  input  pix_t xr,       // pixel (i+1, j), right neighbour
  input  pix_t xd,       // pixel (i, j+1), lower neighbour
  input  logic hv,
  input  logic vv,
  output logic k_inc, k_dec,
  output logic l_inc, l_dec
);
  logic hi, hd, vi, vd;

  edge_cmp u_k (.a(x), .b(xr), .inc(hi), .dec(hd));
  edge_cmp u_l (.a(x), .b(xd), .inc(vi), .dec(vd));

  assign k_inc = hv && hi;
  assign k_dec = hv && hd;
  assign l_inc = vv && vi;
  assign l_dec = vv && vd;
endmodule
