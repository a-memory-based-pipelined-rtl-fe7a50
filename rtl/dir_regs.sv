// Direction registers: the encoded edge direction of every block of every
// memory module's strip (NMOD x NB entries of 3 bits). The direction
// detector writes the entry of a block in the step after the strip arrived;
// the two filters read it in the following two steps. One write port, two
// read ports (horizontal and vertical filter), reads registered with one
// cycle of latency to line up with the memory banks.
// The architecture shows this register block between the direction detector
// and the filters; its size and organisation are this design's.
module dir_regs
  import bre_pkg::*;
#(
  parameter int NB = 240   // blocks per strip
) (
  input  logic        clk,
  input  logic        we,
  input  mod_idx_t    wmod,
  input  logic [15:0] widx,
  input  dir_t        wdir,
  input  mod_idx_t    rmod_h,
  input  logic [15:0] ridx_h,
  output dir_t        rdir_h,
  input  mod_idx_t    rmod_v,
  input  logic [15:0] ridx_v,
  output dir_t        rdir_v
);
  localparam int IW = $clog2(NB);

  dir_t regs [NMOD][NB];

  always_ff @(posedge clk) begin
    if (we && int'(widx) < NB && int'(wmod) < NMOD) regs[wmod][widx[IW-1:0]] <= wdir;
    rdir_h <= regs[rmod_h][ridx_h[IW-1:0]];
    rdir_v <= regs[rmod_v][ridx_v[IW-1:0]];
  end
endmodule
