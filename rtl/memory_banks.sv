// The memory of the remover: six memory modules (54 input banks and six
// filtered-pixel banks) and the bus routing that connects each unit to the
// module its schedule step assigns it.
//
// mod_op[k] is the module that operation k works on in the current step
// (0 write, 1 edge detection, 2 horizontal filtering, 3 vertical filtering,
// 4 read-out). The filters also need one row of the strips above and below:
// the horizontal filter's strip s-1 is in module mod_op[3] and strip s+1 in
// mod_op[1]; the vertical filter's strip s-1 is in mod_op[4] and strip s+1 in
// mod_op[2]. Every module therefore has at most one "own" reader (port A)
// and one "neighbour" reader (port B) per step. The architecture drives the
// bank buses through tri-state buffers enabled by a decoder; here the same
// selection is made with multiplexers. Read data is steered back with the
// module indices delayed by one cycle, matching the bank read latency.
module memory_banks
  import bre_pkg::*;
#(
  parameter int BANK_DEPTH = 1920,
  parameter int OUT_DEPTH  = 6720
) (
  input  logic                 clk,
  input  mod_idx_t [NOPS-1:0]  mod_op,
  // operation 0: signal input
  input  wr_req_t              in_wr,
  // operation 1: edge detection
  input  rd_req_t              edge_rd,
  output rd_dat_t              edge_q,
  // operation 2: horizontal filtering
  input  rd_req_t              hf_own_rd, hf_prev_rd, hf_next_rd,
  output rd_dat_t              hf_own_q,  hf_prev_q,  hf_next_q,
  input  ob_wr_t               hf_ob_wr,
  // operation 3: vertical filtering
  input  rd_req_t              vf_own_rd, vf_prev_rd, vf_next_rd,
  output rd_dat_t              vf_own_q,  vf_prev_q,  vf_next_q,
  input  ob_wr_t               vf_ob_wr,
  // operation 4: signal output
  input  rd_req_t              out_rd,
  output rd_dat_t              out_q,
  input  addr_t                out_ob_raddr,
  output pix_t                 out_ob_q
);
  wr_req_t         wr   [NMOD];
  rd_req_t         rda  [NMOD];
  rd_req_t         rdb  [NMOD];
  ob_wr_t          obw  [NMOD];
  addr_t           obra [NMOD];
  rd_dat_t         qa   [NMOD];
  rd_dat_t         qb   [NMOD];
  pix_t            obq  [NMOD];
  mod_idx_t [NOPS-1:0] mod_q;

  // decoder: route every request to the module of its operation
  always_comb begin
    for (int m = 0; m < NMOD; m++) begin
      wr[m]   = '0;
      rda[m]  = '0;
      rdb[m]  = '0;
      obw[m]  = '0;
      obra[m] = '0;
      if (mod_op[OP_WRITE] == mod_idx_t'(m)) wr[m] = in_wr;
      if (mod_op[OP_EDGE]  == mod_idx_t'(m)) begin rda[m] = edge_rd;   rdb[m] = hf_next_rd; end
      if (mod_op[OP_HFILT] == mod_idx_t'(m)) begin rda[m] = hf_own_rd; rdb[m] = vf_next_rd; obw[m] = hf_ob_wr; end
      if (mod_op[OP_VFILT] == mod_idx_t'(m)) begin rda[m] = vf_own_rd; rdb[m] = hf_prev_rd; obw[m] = vf_ob_wr; end
      if (mod_op[OP_READ]  == mod_idx_t'(m)) begin rda[m] = out_rd;    rdb[m] = vf_prev_rd; obra[m] = out_ob_raddr; end
    end
  end

  for (genvar m = 0; m < NMOD; m++) begin : g_mod
    memory_module #(.BANK_DEPTH(BANK_DEPTH), .OUT_DEPTH(OUT_DEPTH)) u_mod (
      .clk      (clk),
      .wr       (wr[m]),
      .rda      (rda[m]),
      .qa       (qa[m]),
      .rdb      (rdb[m]),
      .qb       (qb[m]),
      .ob_wr    (obw[m]),
      .ob_raddr (obra[m]),
      .ob_q     (obq[m])
    );
  end

  always_ff @(posedge clk) mod_q <= mod_op;

  assign edge_q    = qa[mod_q[OP_EDGE]];
  assign hf_own_q  = qa[mod_q[OP_HFILT]];
  assign hf_prev_q = qb[mod_q[OP_VFILT]];
  assign hf_next_q = qb[mod_q[OP_EDGE]];
  assign vf_own_q  = qa[mod_q[OP_VFILT]];
  assign vf_prev_q = qb[mod_q[OP_READ]];
  assign vf_next_q = qb[mod_q[OP_HFILT]];
  assign out_q     = qa[mod_q[OP_READ]];
  assign out_ob_q  = obq[mod_q[OP_READ]];
endmodule
