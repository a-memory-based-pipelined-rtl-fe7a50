// Amount selector of the filters. For the block's edge direction it gives,
// for each of the nine taps of the 3x3 window (row-major, tap 4 = centre),
// whether the tap is used and by how many bits it is shifted left. The
// shifts are the base-2 logarithms of the integer mask coefficients
// (coefficients scaled by 1024):
//   monotone: centre 512 (<<9), the eight neighbours 64 (<<6)
//   edges:    centre 512 (<<9), the two neighbours along the edge 256 (<<8)
// The neighbours along an edge are: 0 degree left/right (taps 3,5),
// 90 degree above/below (1,7), 45 degree upper-right/lower-left (2,6),
// 135 degree upper-left/lower-right (0,8). Every mask sums to 1024.
// The coefficients are the architecture's masks; pairing each one-
// dimensional mask with the edge direction it runs along is this design's
// reading.
module amount_selector
  import bre_pkg::*;
(
  input  dir_t       dir,
  output logic [8:0] en,
  output logic [3:0] amt [9]
);
  always_comb begin
    en = '0;
    for (int t = 0; t < 9; t++) amt[t] = 4'd8;
    amt[4] = 4'd9;
    en[4]  = 1'b1;
    case (dir)
      DIR_0:   begin en[3] = 1'b1; en[5] = 1'b1; end
      DIR_90:  begin en[1] = 1'b1; en[7] = 1'b1; end
      DIR_45:  begin en[2] = 1'b1; en[6] = 1'b1; end
      DIR_135: begin en[0] = 1'b1; en[8] = 1'b1; end
      default: begin
        en = '1;
        for (int t = 0; t < 9; t++) if (t != 4) amt[t] = 4'd6;
      end
    endcase
  end
endmodule
