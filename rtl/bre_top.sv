// Blocking-effect remover for block-coded video (8x8 blocks).
//
// Pixels arrive line by line. Every group of 8 lines (a strip) goes into one
// of six memory modules; the scheduler moves each module through five
// operations, one step apart: write the strip, classify the edge direction
// of each 8x8 block, filter the blocks' left/right border pixels, filter
// their top/bottom border pixels, read the strip out. Classification counts
// strong relative steps between horizontal (K) and vertical (L) neighbours;
// the border pixels are then low-pass filtered with a 3x3 mask that follows
// the edge (or with a 2-D mask in flat areas), using only shifts and adds.
// Inner pixels pass unchanged.
//
// Interface: valid/ready input and output streams of 8-bit pixels, frames
// of STRIPS*8 lines of WIDTH pixels, in raster order. A frame leaves with
// the same size and order, four schedule steps (about 4*8*WIDTH cycles)
// after it arrived. One schedule step lasts as long as its slowest unit:
// 8*WIDTH cycles plus a few when input and output flow freely. WIDTH must be
// a multiple of 24. Between frames the pipeline drains on its own.
// The unit structure, memory organisation, schedule, thresholds and masks
// follow the architecture; the stream handshakes, edge replication at the
// picture border, frame height and the details listed in each module are
// this design's choices.
module bre_top
  import bre_pkg::*;
#(
  parameter int WIDTH  = 1920,   // pixels per line
  parameter int STRIPS = 135     // 8-line strips per frame (1080 lines)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  pix_t in_pix,
  output logic out_valid,
  input  logic out_ready,
  output pix_t out_pix,
  output logic step_start,       // a schedule step begins
  output logic bubble            // ... and it has no input strip
);
  localparam int NB         = WIDTH / BLK;
  localparam int BANK_DEPTH = WIDTH;           // 3 rows x WIDTH/3 columns
  localparam int OUT_DEPTH  = NB * NBND;

  mod_idx_t [NOPS-1:0] mod_op;
  logic [NOPS-1:0]     start, done, first, last;

  scheduler #(.STRIPS(STRIPS)) u_sched (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .done(done),
    .mod_op(mod_op), .start(start), .first(first), .last(last), .bubble(bubble)
  );
  assign step_start = |start || bubble;

  wr_req_t in_wr;
  rd_req_t edge_rd, hf_own_rd, hf_prev_rd, hf_next_rd, vf_own_rd, vf_prev_rd, vf_next_rd, out_rd;
  rd_dat_t edge_q,  hf_own_q,  hf_prev_q,  hf_next_q,  vf_own_q,  vf_prev_q,  vf_next_q,  out_q;
  ob_wr_t  hf_ob_wr, vf_ob_wr;
  addr_t   out_ob_raddr;
  pix_t    out_ob_q;

  memory_banks #(.BANK_DEPTH(BANK_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_mem (
    .clk(clk), .mod_op(mod_op), .in_wr(in_wr),
    .edge_rd(edge_rd), .edge_q(edge_q),
    .hf_own_rd(hf_own_rd), .hf_prev_rd(hf_prev_rd), .hf_next_rd(hf_next_rd),
    .hf_own_q(hf_own_q), .hf_prev_q(hf_prev_q), .hf_next_q(hf_next_q), .hf_ob_wr(hf_ob_wr),
    .vf_own_rd(vf_own_rd), .vf_prev_rd(vf_prev_rd), .vf_next_rd(vf_next_rd),
    .vf_own_q(vf_own_q), .vf_prev_q(vf_prev_q), .vf_next_q(vf_next_q), .vf_ob_wr(vf_ob_wr),
    .out_rd(out_rd), .out_q(out_q), .out_ob_raddr(out_ob_raddr), .out_ob_q(out_ob_q)
  );

  // operation 0: signal input
  in_mapper #(.WIDTH(WIDTH)) u_in (
    .clk(clk), .rst_n(rst_n), .start(start[OP_WRITE]), .done(done[OP_WRITE]),
    .in_valid(in_valid), .in_ready(in_ready), .in_pix(in_pix), .wr(in_wr)
  );

  // operation 1: edge detection and direction classification
  logic        e_valid, e_hv, e_vv, e_last;
  pix_t        e_x, e_xr, e_xd;
  logic [15:0] e_blk;
  logic        k_inc, k_dec, l_inc, l_dec;
  logic        dir_we;
  logic [15:0] dir_widx;
  dir_t        dir_w;

  edge_mapper #(.WIDTH(WIDTH)) u_emap (
    .clk(clk), .rst_n(rst_n), .start(start[OP_EDGE]), .done(done[OP_EDGE]),
    .rd(edge_rd), .q(edge_q), .valid(e_valid), .x(e_x), .xr(e_xr), .xd(e_xd),
    .hv(e_hv), .vv(e_vv), .blk_last(e_last), .blk_idx(e_blk)
  );
  edge_detector u_edge (
    .x(e_x), .xr(e_xr), .xd(e_xd), .hv(e_hv), .vv(e_vv),
    .k_inc(k_inc), .k_dec(k_dec), .l_inc(l_inc), .l_dec(l_dec)
  );
  direction_detector #(.M(6)) u_dirdet (
    .clk(clk), .rst_n(rst_n), .valid(e_valid), .blk_last(e_last), .blk_idx(e_blk),
    .k_inc(k_inc), .k_dec(k_dec), .l_inc(l_inc), .l_dec(l_dec),
    .dir_we(dir_we), .dir_idx(dir_widx), .dir(dir_w)
  );

  logic [15:0] h_didx, v_didx;
  dir_t        h_dir, v_dir;
  dir_regs #(.NB(NB)) u_regs (
    .clk(clk), .we(dir_we), .wmod(mod_op[OP_EDGE]), .widx(dir_widx), .wdir(dir_w),
    .rmod_h(mod_op[OP_HFILT]), .ridx_h(h_didx), .rdir_h(h_dir),
    .rmod_v(mod_op[OP_VFILT]), .ridx_v(v_didx), .rdir_v(v_dir)
  );

  // operation 2: horizontal filtering (left/right block borders)
  logic h_wv, h_rv;
  pix_t h_win [9];
  pix_t h_res;
  filter_mapper #(.WIDTH(WIDTH), .VERT(1'b0)) u_hmap (
    .clk(clk), .rst_n(rst_n), .start(start[OP_HFILT]), .first(first[OP_HFILT]),
    .last(last[OP_HFILT]), .done(done[OP_HFILT]),
    .own_rd(hf_own_rd), .prev_rd(hf_prev_rd), .next_rd(hf_next_rd),
    .own_q(hf_own_q), .prev_q(hf_prev_q), .next_q(hf_next_q),
    .dir_idx(h_didx), .win_valid(h_wv), .win(h_win),
    .res_valid(h_rv), .res_pix(h_res), .ob_wr(hf_ob_wr)
  );
  bre_filter u_hfilt (
    .clk(clk), .rst_n(rst_n), .in_valid(h_wv), .dir(h_dir), .win(h_win),
    .out_valid(h_rv), .out_pix(h_res)
  );

  // operation 3: vertical filtering (top/bottom block borders)
  logic v_wv, v_rv;
  pix_t v_win [9];
  pix_t v_res;
  filter_mapper #(.WIDTH(WIDTH), .VERT(1'b1)) u_vmap (
    .clk(clk), .rst_n(rst_n), .start(start[OP_VFILT]), .first(first[OP_VFILT]),
    .last(last[OP_VFILT]), .done(done[OP_VFILT]),
    .own_rd(vf_own_rd), .prev_rd(vf_prev_rd), .next_rd(vf_next_rd),
    .own_q(vf_own_q), .prev_q(vf_prev_q), .next_q(vf_next_q),
    .dir_idx(v_didx), .win_valid(v_wv), .win(v_win),
    .res_valid(v_rv), .res_pix(v_res), .ob_wr(vf_ob_wr)
  );
  bre_filter u_vfilt (
    .clk(clk), .rst_n(rst_n), .in_valid(v_wv), .dir(v_dir), .win(v_win),
    .out_valid(v_rv), .out_pix(v_res)
  );

  // operation 4: signal output
  out_mapper #(.WIDTH(WIDTH)) u_out (
    .clk(clk), .rst_n(rst_n), .start(start[OP_READ]), .done(done[OP_READ]),
    .rd(out_rd), .q(out_q), .ob_raddr(out_ob_raddr), .ob_q(out_ob_q),
    .out_valid(out_valid), .out_ready(out_ready), .out_pix(out_pix)
  );
endmodule
