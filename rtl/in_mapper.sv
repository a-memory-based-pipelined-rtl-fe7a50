// Memory mapper for the signal input (operation 0). After start it accepts
// one 8-line strip of WIDTH-pixel lines in raster order over a valid/ready
// handshake and writes each pixel into the input bank and address given by
// the bank map (bre_pkg). in_ready is high from the cycle after start until
// the last pixel of the strip is taken; done is high while idle. The write
// request is combinational from the accepted pixel, so one pixel can be
// taken every cycle.
// The bank map is the architecture's; the handshake and the one-pixel-per-
// cycle rate are this design's choices.
module in_mapper
  import bre_pkg::*;
#(
  parameter int WIDTH = 1920
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    done,
  input  logic    in_valid,
  output logic    in_ready,
  input  pix_t    in_pix,
  output wr_req_t wr
);
  localparam int CPB = WIDTH / 3;

  logic        busy;
  logic [2:0]  row;
  logic [15:0] col;
  logic        fire;

  assign in_ready = busy;
  assign done     = !busy;
  assign fire     = busy && in_valid;

  always_comb begin
    wr.en   = fire;
    wr.bank = bank_of(row, int'(col));
    wr.addr = addr_of(row, int'(col), CPB);
    wr.data = in_pix;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      row  <= '0;
      col  <= '0;
    end else if (start) begin
      busy <= 1'b1;
      row  <= '0;
      col  <= '0;
    end else if (fire) begin
      if (int'(col) == WIDTH - 1) begin
        col <= '0;
        row <= row + 1'b1;
        if (row == 3'd7) busy <= 1'b0;
      end else begin
        col <= col + 1'b1;
      end
    end
  end
endmodule
