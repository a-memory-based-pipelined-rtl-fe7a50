// One memory module: the storage for one 8-line strip. Nine input banks of
// BANK_DEPTH bytes hold the received pixels (bank map in bre_pkg), and a
// larger tenth bank of OUT_DEPTH bytes holds the 28 filtered boundary pixels
// of every block of the strip. With the defaults (1920-pixel lines) these
// are 1920 and 6720 bytes, the sizes the architecture specifies.
// Port A reads all nine input banks for the unit working on this module's
// strip; port B reads them for a filter working on a neighbouring strip.
// All reads have one cycle of latency.
// The bank counts and sizes follow the architecture; the second read port
// and the one-cycle read latency are this design's choices.
module memory_module
  import bre_pkg::*;
#(
  parameter int BANK_DEPTH = 1920,
  parameter int OUT_DEPTH  = 6720
) (
  input  logic    clk,
  input  wr_req_t wr,        // input-bank write
  input  rd_req_t rda,       // port A read addresses
  output rd_dat_t qa,
  input  rd_req_t rdb,       // port B read addresses
  output rd_dat_t qb,
  input  ob_wr_t  ob_wr,     // filtered-pixel bank write
  input  addr_t   ob_raddr,  // filtered-pixel bank read
  output pix_t    ob_q
);
  for (genvar b = 0; b < NBANK; b++) begin : g_bank
    pix_t [1:0] q;
    mem_bank #(.DEPTH(BANK_DEPTH), .NRD(2)) u_bank (
      .clk   (clk),
      .we    (wr.en && (wr.bank == 4'(b))),
      .waddr (wr.addr),
      .wdata (wr.data),
      .raddr ({rdb[b], rda[b]}),
      .rdata (q)
    );
    assign qa[b] = q[0];
    assign qb[b] = q[1];
  end

  pix_t [0:0] obq;
  mem_bank #(.DEPTH(OUT_DEPTH), .NRD(1)) u_out_bank (
    .clk   (clk),
    .we    (ob_wr.en),
    .waddr (ob_wr.addr),
    .wdata (ob_wr.data),
    .raddr (ob_raddr),
    .rdata (obq)
  );
  assign ob_q = obq[0];
endmodule
