// mmf_lsd_alg: the MMF-LSD search (tree pruning unit, partial candidate
// memory S, final candidate memory L and control logic CNTR).
//
// Given the triangular channel R and the rotated receive vector y~ of one
// subcarrier, the search visits tree nodes in increasing PED order
// (metric first), at most dmax of them, and leaves the N_CAND best complete
// candidates it found in L. Each iteration the TPU extends the current node
// into its first child and its next sibling while S and L finish the heap
// sorting caused by the previous iteration; CNTR then picks the next node
// among the two new nodes and the top of S. Extended nodes are kept in S
// only while their PED is below the memory sphere radius c_mem and the list
// radius C_0. The composition follows the source's block diagram; see the
// sub-modules for the details that are this design's own.
//
// Interface: pulse `start` when !busy with r, y, mt, qlog, dmax and c_mem
// stable until `done`. After `done` the list is in `list`/`list_count` (in
// heap order, largest ED first) and stays until the next start; `min_ed`
// is the smallest listed ED (all ones if the list is empty).
module mmf_lsd_alg
  import mmf_pkg::*;
#(
  parameter int D_MAX  = 150,
  parameter int N_CAND = 15,
  parameter int N_MUL  = 2,
  parameter int N_MAC  = 4,
  parameter int IT_W   = 8,
  parameter int CNT_W  = 16
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  logic [MTC_W-1:0]            mt,
  input  logic [QLOG_W-1:0]           qlog,
  input  logic [IT_W-1:0]             dmax,
  input  ped_t                        c_mem,
  input  wmat_t                       r,
  input  wvec_t                       y,
  output logic                        busy,
  output logic                        done,
  output logic [IT_W-1:0]             iters,
  output stop_e                       stop_reason,
  output cand_t [N_CAND-1:0]          list,
  output logic [$clog2(N_CAND+1)-1:0] list_count,
  output ped_t                        min_ed,
  output logic [CNT_W-1:0]            n_up,
  output logic [CNT_W-1:0]            n_down,
  output logic [CNT_W-1:0]            n_mem_drop,
  output logic                        s_overflow
);
  logic  tpu_start, tpu_done, nc_valid, nf_valid;
  node_t cur, nc, nf;
  logic  pm_clear, pm_upd_valid, pm_pop_top, pm_n0_valid, pm_n1_valid, pm_ready, pm_top_valid;
  node_t pm_n0, pm_n1, pm_top;
  logic  fm_clear, fm_leaf_valid, fm_ready, fm_rejected;
  cand_t fm_leaf;
  ped_t  c_zero;
  logic [$clog2(D_MAX+1)-1:0] pm_count;

  tpu #(.N_MUL(N_MUL), .N_MAC(N_MAC)) u_tpu (
    .clk, .rst_n, .start(tpu_start), .cur, .mt, .qlog, .r, .y,
    .done(tpu_done), .nc, .nc_valid, .nf, .nf_valid
  );

  part_mem #(.D_MAX(D_MAX), .CNT_W(CNT_W)) u_s (
    .clk, .rst_n, .clear(pm_clear), .upd_valid(pm_upd_valid), .pop_top(pm_pop_top),
    .n0_valid(pm_n0_valid), .n0(pm_n0), .n1_valid(pm_n1_valid), .n1(pm_n1),
    .c_mem, .c_zero, .upd_ready(pm_ready), .top(pm_top), .top_valid(pm_top_valid),
    .count(pm_count), .overflow(s_overflow), .n_up, .n_down, .n_mem_drop
  );

  final_mem #(.N_CAND(N_CAND)) u_l (
    .clk, .rst_n, .clear(fm_clear), .leaf_valid(fm_leaf_valid), .leaf(fm_leaf),
    .ready(fm_ready), .c_zero, .min_d(min_ed), .count(list_count), .entries(list),
    .rejected(fm_rejected)
  );

  cntr #(.D_MAX(D_MAX), .IT_W(IT_W)) u_cntr (
    .clk, .rst_n, .start, .mt, .dmax,
    .tpu_start, .cur, .tpu_done, .nc, .nc_valid, .nf, .nf_valid,
    .pm_clear, .pm_upd_valid, .pm_pop_top, .pm_n0_valid, .pm_n0, .pm_n1_valid, .pm_n1,
    .pm_ready, .pm_top, .pm_top_valid,
    .fm_clear, .fm_leaf_valid, .fm_leaf, .fm_ready, .c_zero,
    .busy, .done, .iters, .stop_reason
  );

  logic unused;
  assign unused = fm_rejected ^ (^pm_count);
endmodule
