// One memory bank: a synchronous RAM of DEPTH bytes with one write port and
// NRD read ports. Reads are registered: the word addressed in cycle t is on
// rdata in cycle t+1. A read of an address being written returns the old
// word. The number of read ports is this design's choice: each input bank is
// read by at most two units in one schedule step (its own strip's unit and a
// neighbouring strip's filter), so input banks use two, the filtered-pixel
// bank one. Addresses at or above DEPTH are not used by the mappers.
module mem_bank
  import bre_pkg::*;
#(
  parameter int DEPTH = 1920,
  parameter int NRD   = 2
) (
  input  logic              clk,
  input  logic              we,
  input  addr_t             waddr,
  input  pix_t              wdata,
  input  addr_t [NRD-1:0]   raddr,
  output pix_t  [NRD-1:0]   rdata
);
  localparam int AW = $clog2(DEPTH);

  pix_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < DEPTH)) mem[waddr[AW-1:0]] <= wdata;
    for (int p = 0; p < NRD; p++) rdata[p] <= mem[raddr[p][AW-1:0]];
  end
endmodule
