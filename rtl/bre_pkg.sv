// Shared types and helpers of the blocking-effect remover.
//
// A strip is 8 picture lines held in one memory module. Inside a module a
// pixel at strip row r (0..7) and picture column c lives in bank
// 3*(r mod 3) + (c mod 3), at address (r div 3)*(WIDTH/3) + (c div 3). Any
// 3x3 window therefore touches nine different banks (rows that cross into a
// neighbouring strip come from a different module). Bank numbering is 0..8
// here where the bank map of the architecture counts 1..9 per module.
// Each block has 28 boundary pixels; their filtered values are kept in a
// tenth bank at address block*28 + p, with p = row for column 0, 8+row for
// column 7, 16+(col-1) for row 0 and 22+(col-1) for row 7.
package bre_pkg;
  typedef logic [7:0]  pix_t;
  typedef logic [15:0] addr_t;

  localparam int NBANK = 9;   // input banks per memory module
  localparam int NMOD  = 6;   // memory modules
  localparam int BLK   = 8;   // block size
  localparam int NBND  = 28;  // boundary pixels per block
  localparam int NOPS  = 5;   // operations of the schedule

  // Encoded edge direction of a block (direction detector output).
  typedef enum logic [2:0] {
    DIR_MONO = 3'd0,   // monotone area: 2-D mask
    DIR_0    = 3'd1,   // 0 degree edge
    DIR_45   = 3'd2,   // 45 degree edge
    DIR_90   = 3'd3,   // 90 degree edge
    DIR_135  = 3'd4    // 135 degree edge
  } dir_t;

  // Schedule operations (one per unit).
  typedef enum logic [2:0] {
    OP_WRITE = 3'd0, OP_EDGE = 3'd1, OP_HFILT = 3'd2, OP_VFILT = 3'd3, OP_READ = 3'd4
  } op_t;

  typedef logic [2:0] mod_idx_t;           // 0..NMOD-1
  typedef addr_t [NBANK-1:0] rd_req_t;     // one read address per input bank
  typedef pix_t  [NBANK-1:0] rd_dat_t;     // one read word per input bank

  typedef struct packed {
    logic       en;
    logic [3:0] bank;
    addr_t      addr;
    pix_t       data;
  } wr_req_t;

  typedef struct packed {
    logic  en;
    addr_t addr;
    pix_t  data;
  } ob_wr_t;

  function automatic logic [3:0] bank_of(input logic [2:0] r, input int c);
    return 4'(3 * (int'(r) % 3) + (c % 3));
  endfunction

  function automatic addr_t addr_of(input logic [2:0] r, input int c, input int cols_per_bank);
    return addr_t'((int'(r) / 3) * cols_per_bank + c / 3);
  endfunction

  // Boundary-pixel index p of block-local position (r, cc), valid when the
  // position lies on the block border.
  function automatic int bnd_index(input int r, input int cc);
    if (cc == 0)      return r;
    else if (cc == 7) return 8 + r;
    else if (r == 0)  return 16 + cc - 1;
    else              return 22 + cc - 1;
  endfunction
endpackage
