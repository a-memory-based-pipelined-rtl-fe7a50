// Memory mapper for the edge detector (operation 1). After start it scans
// the strip block by block (left to right) and inside a block row by row,
// one pixel per cycle, 64 cycles per block. For pixel (r, c) it reads in the
// same cycle the pixel, its right neighbour (c+1) and the pixel below (r+1):
// the three lie in different banks. One cycle later the three bytes are
// picked from the banks' outputs and presented with the pair flags, the
// block-end flag and the block index. done is high when idle and once the
// last pixel has left the output stage.
// The architecture names this mapper only; the scan order and the three-
// pixel fetch are this design's choices.
module edge_mapper
  import bre_pkg::*;
#(
  parameter int WIDTH = 1920
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  output logic        done,
  output rd_req_t     rd,
  input  rd_dat_t     q,
  output logic        valid,
  output pix_t        x, xr, xd,
  output logic        hv, vv,
  output logic        blk_last,
  output logic [15:0] blk_idx
);
  localparam int CPB = WIDTH / 3;
  localparam int NB  = WIDTH / BLK;

  logic        busy;
  logic [15:0] blk;
  logic [2:0]  r, c;
  // registered selection for the output stage
  logic        v1, hv1, vv1, last1;
  logic [15:0] blk1;
  logic [3:0]  b0_1, br_1, bd_1;

  int col;
  always_comb begin
    col = int'(blk) * BLK + int'(c);
    rd = '0;
    rd[bank_of(r, col)]         = addr_of(r, col, CPB);
    if (c != 3'd7) rd[bank_of(r, col + 1)]     = addr_of(r, col + 1, CPB);
    if (r != 3'd7) rd[bank_of(r + 3'd1, col)] = addr_of(r + 3'd1, col, CPB);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      blk  <= '0;
      r    <= '0;
      c    <= '0;
      v1   <= 1'b0;
    end else begin
      v1 <= busy;
      if (start) begin
        busy <= 1'b1;
        blk  <= '0;
        r    <= '0;
        c    <= '0;
      end else if (busy) begin
        c <= c + 1'b1;
        if (c == 3'd7) begin
          r <= r + 1'b1;
          if (r == 3'd7) begin
            if (int'(blk) == NB - 1) busy <= 1'b0;
            blk <= blk + 1'b1;
          end
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    hv1   <= (c != 3'd7);
    vv1   <= (r != 3'd7);
    last1 <= (c == 3'd7) && (r == 3'd7);
    blk1  <= blk;
    b0_1  <= bank_of(r, col);
    br_1  <= bank_of(r, col + 1);
    bd_1  <= bank_of(r + 3'd1, col);
  end

  assign done     = !busy && !v1;
  assign valid    = v1;
  assign x        = q[b0_1];
  assign xr       = q[br_1];
  assign xd       = q[bd_1];
  assign hv       = hv1;
  assign vv       = vv1;
  assign blk_last = last1;
  assign blk_idx  = blk1;
endmodule
