// Memory mapper for one filter (operations 2 and 3), including the mapper
// that writes the filter's results into the filtered-pixel bank.
// VERT = 0 (horizontal filtering): the left and right border columns of
// every block, all 8 rows (16 pixels per block, corners included).
// VERT = 1 (vertical filtering): the top and bottom border rows, columns 1
// to 6 (12 pixels per block). Together they cover the 28 boundary pixels.
// One pixel per cycle: for boundary pixel (r, C) the 3x3 window is read in
// one cycle, from this strip's module (own) and, for row -1 or row 8, from
// the previous or next strip's module. Rows above the first strip or below
// the last strip of a frame and columns outside the picture are not read:
// the centre row or column is repeated instead (edge replication). The
// block index goes to the direction registers in the same cycle. One cycle
// later the window is assembled for the filter; the filter's result, one
// cycle after that, is written at address block*28 + p of this module's
// filtered-pixel bank. done is high when idle and after the last write.
// Which filter handles which border and the 28 filtered pixels per block
// follow the architecture; giving the corners to the horizontal filter, the
// edge replication and the result-bank layout are this design's choices.
module filter_mapper
  import bre_pkg::*;
#(
  parameter int WIDTH = 1920,
  parameter bit VERT  = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        first,     // this strip is the first of its frame
  input  logic        last,      // this strip is the last of its frame
  output logic        done,
  output rd_req_t     own_rd, prev_rd, next_rd,
  input  rd_dat_t     own_q,  prev_q,  next_q,
  output logic [15:0] dir_idx,   // block index to the direction registers
  output logic        win_valid,
  output pix_t        win [9],
  input  logic        res_valid, // filter result of the window
  input  pix_t        res_pix,
  output ob_wr_t      ob_wr
);
  localparam int CPB  = WIDTH / 3;
  localparam int NB   = WIDTH / BLK;
  localparam int NPIX = VERT ? 12 : 16;

  logic        busy;
  logic [15:0] blk;
  logic [4:0]  p;
  logic        first_q, last_q;

  // position of the current boundary pixel
  int r, cc, col, bidx;
  always_comb begin
    if (!VERT) begin
      r  = int'(p) % 8;
      cc = (p < 5'd8) ? 0 : 7;
    end else begin
      r  = (p < 5'd6) ? 0 : 7;
      cc = 1 + int'(p) % 6;
    end
    col  = int'(blk) * BLK + cc;
    bidx = int'(blk) * NBND + bnd_index(r, cc);
  end

  // tap sources: 0 own strip, 1 previous strip, 2 next strip
  logic [1:0] src0  [9];
  logic [3:0] bank0 [9];
  logic [2:0] rowrep0, colrep0;

  always_comb begin
    own_rd  = '0;
    prev_rd = '0;
    next_rd = '0;
    for (int dr = 0; dr < 3; dr++) begin
      int rr;
      logic [2:0] rm;
      rr = r + dr - 1;
      rowrep0[dr] = (rr < 0 && first_q) || (rr > 7 && last_q);
      rm = (rr < 0) ? 3'd7 : (rr > 7) ? 3'd0 : 3'(rr);
      for (int dc = 0; dc < 3; dc++) begin
        int c2;
        int t;
        t  = dr * 3 + dc;
        c2 = col + dc - 1;
        colrep0[dc] = (c2 < 0) || (c2 >= WIDTH);
        src0[t]  = (rr < 0) ? 2'd1 : (rr > 7) ? 2'd2 : 2'd0;
        bank0[t] = bank_of(rm, c2);
        if (busy && !rowrep0[dr] && !colrep0[dc]) begin
          case (src0[t])
            2'd1:    prev_rd[bank0[t]] = addr_of(rm, c2, CPB);
            2'd2:    next_rd[bank0[t]] = addr_of(rm, c2, CPB);
            default: own_rd[bank0[t]]  = addr_of(rm, c2, CPB);
          endcase
        end
      end
    end
  end

  assign dir_idx = blk;

  // stage 1 (window) and stage 2 (filter result) bookkeeping
  logic        v1;
  logic [1:0]  src1  [9];
  logic [3:0]  bank1 [9];
  logic [2:0]  rowrep1, colrep1;
  addr_t       oaddr1, oaddr2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      blk     <= '0;
      p       <= '0;
      v1      <= 1'b0;
      first_q <= 1'b0;
      last_q  <= 1'b0;
    end else begin
      v1 <= busy;
      if (start) begin
        busy    <= 1'b1;
        blk     <= '0;
        p       <= '0;
        first_q <= first;
        last_q  <= last;
      end else if (busy) begin
        if (int'(p) == NPIX - 1) begin
          p <= '0;
          blk <= blk + 1'b1;
          if (int'(blk) == NB - 1) busy <= 1'b0;
        end else begin
          p <= p + 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    src1    <= src0;
    bank1   <= bank0;
    rowrep1 <= rowrep0;
    colrep1 <= colrep0;
    oaddr1  <= addr_t'(bidx);
    oaddr2  <= oaddr1;
  end

  // window assembly with edge replication
  pix_t raw [9];
  pix_t cfix [9];
  always_comb begin
    for (int t = 0; t < 9; t++) begin
      case (src1[t])
        2'd1:    raw[t] = prev_q[bank1[t]];
        2'd2:    raw[t] = next_q[bank1[t]];
        default: raw[t] = own_q[bank1[t]];
      endcase
    end
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++)
        cfix[dr*3+dc] = colrep1[dc] ? raw[dr*3+1] : raw[dr*3+dc];
    for (int dr = 0; dr < 3; dr++)
      for (int dc = 0; dc < 3; dc++)
        win[dr*3+dc] = rowrep1[dr] ? cfix[3+dc] : cfix[dr*3+dc];
  end
  assign win_valid = v1;

  logic v2;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v2 <= 1'b0;
    else        v2 <= v1;
  end

  assign ob_wr.en   = res_valid;
  assign ob_wr.addr = oaddr2;
  assign ob_wr.data = res_pix;
  assign done = !busy && !v1 && !v2;
endmodule
