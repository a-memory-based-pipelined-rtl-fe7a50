// Memory mapper for the signal output (operation 4). After start it reads
// the strip back in raster order (8 lines of WIDTH pixels) over a
// valid/ready handshake. Inner pixels come from the nine input banks,
// boundary pixels of each block from the filtered-pixel bank. The read
// address is formed from the position that will be current in the next
// cycle (held while out_ready is low), so with one cycle of bank latency
// the bank outputs always belong to the current position and a pixel can
// leave every cycle. out_valid rises the cycle after start; done is high
// while idle.
// The architecture names this mapper only; merging the filtered border
// pixels with the inner pixels here, and the handshake, are this design's
// choices.
module out_mapper
  import bre_pkg::*;
#(
  parameter int WIDTH = 1920
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    done,
  output rd_req_t rd,
  input  rd_dat_t q,
  output addr_t   ob_raddr,
  input  pix_t    ob_q,
  output logic    out_valid,
  input  logic    out_ready,
  output pix_t    out_pix
);
  localparam int CPB = WIDTH / 3;

  logic        busy;
  logic [2:0]  row;
  logic [15:0] col;
  logic        fire, lastpix;
  logic [2:0]  nrow;
  logic [15:0] ncol;

  assign out_valid = busy;
  assign fire      = busy && out_ready;
  assign lastpix   = (row == 3'd7) && (int'(col) == WIDTH - 1);
  assign done      = !busy;

  // next position
  always_comb begin
    nrow = row;
    ncol = col;
    if (start) begin
      nrow = '0;
      ncol = '0;
    end else if (fire) begin
      if (int'(col) == WIDTH - 1) begin
        ncol = '0;
        nrow = row + 1'b1;
      end else begin
        ncol = col + 1'b1;
      end
    end
  end

  always_comb begin
    int cc;
    cc = int'(ncol) % BLK;
    rd = '0;
    rd[bank_of(nrow, int'(ncol))] = addr_of(nrow, int'(ncol), CPB);
    ob_raddr = addr_t'((int'(ncol) / BLK) * NBND + bnd_index(int'(nrow), cc));
  end

  // output select for the current position
  always_comb begin
    int cc;
    cc = int'(col) % BLK;
    if (cc == 0 || cc == 7 || row == 3'd0 || row == 3'd7) out_pix = ob_q;
    else                                               out_pix = q[bank_of(row, int'(col))];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
      col  <= '0;
    end else begin
      row <= nrow;
      col <= ncol;
      if (start)                busy <= 1'b1;
      else if (fire && lastpix) busy <= 1'b0;
    end
  end
endmodule
