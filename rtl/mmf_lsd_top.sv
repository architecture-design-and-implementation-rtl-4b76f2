// mmf_lsd_top: soft-output MMF-LSD MIMO detector.
//
// Detects one real-valued spatial-multiplexing vector per operation (one
// OFDM subcarrier): the metric-first list search (mmf_lsd_alg) finds up to
// N_CAND candidates within dmax iterations, the memory sphere radius unit
// (cmem_unit) averages the smallest listed ED over successive operations to
// form C_mem = W_R * E[min ED] for the next searches, and the LLR unit
// (llr_unit) turns the list into clipped max-log-MAP LLRs. The LLR unit
// copies the list when it starts, so it works on one subcarrier while the
// search runs on the next, as the source intends. The reciprocal of the
// noise variance is computed while the search runs, so after search_done
// the LLRs take only ceil(N_CAND/2) + mt*qlog cycles (this overlap is a
// choice of this design).
//
// Interface: pulse `start` while `ready` with r, y, mt (1..8 real layers,
// 2 N_T), qlog (real levels 2**qlog: 1 = 4-QAM, 2 = 16-QAM, 3 = 64-QAM) and
// dmax stable until `search_done`; noise (2 sigma^2 in PED units) is
// sampled with `start`. w_r/cmem_en set C_mem; cmem_clear restarts the average.
// LLRs leave on llr_valid/llr_idx/llr, llr_done marks the last one.
// Statistics of the last search: iterations, stop reason, heap operations
// and nodes discarded by C_mem.
module mmf_lsd_top
  import mmf_pkg::*;
#(
  parameter int D_MAX   = 150,
  parameter int N_CAND  = 15,
  parameter int N_MUL_B = 2,
  parameter int N_MAC   = 4,
  parameter int LLR_W   = 8,
  parameter int IT_W    = 8,
  parameter int CNT_W   = 16,
  parameter int WR_W    = 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [MTC_W-1:0]        mt,
  input  logic [QLOG_W-1:0]       qlog,
  input  logic [IT_W-1:0]         dmax,
  input  wmat_t                   r,
  input  wvec_t                   y,
  input  ped_t                    noise,
  input  logic [WR_W-1:0]         w_r,
  input  logic                    cmem_en,
  input  logic                    cmem_clear,
  output logic                    ready,
  output logic                    search_done,
  output logic [IT_W-1:0]         iters,
  output stop_e                   stop_reason,
  output logic [CNT_W-1:0]        n_up,
  output logic [CNT_W-1:0]        n_down,
  output logic [CNT_W-1:0]        n_mem_drop,
  output logic                    s_overflow,
  output ped_t                    c_mem,
  output ped_t                    min_ed,
  output logic                    llr_valid,
  output logic [4:0]              llr_idx,
  output logic signed [LLR_W-1:0] llr,
  output logic                    llr_done
);
  logic                        alg_busy, llr_busy, llr_pend, llr_start, llr_dwait;
  cand_t [N_CAND-1:0]          list;
  logic [$clog2(N_CAND+1)-1:0] list_count;
  logic [MTC_W-1:0]            mt_q;
  logic [QLOG_W-1:0]           ql_q;
  ped_t                        avg;

  assign ready     = !alg_busy && !llr_pend && !llr_dwait;
  assign llr_start = llr_pend && !llr_busy;

  mmf_lsd_alg #(.D_MAX(D_MAX), .N_CAND(N_CAND), .N_MUL(N_MUL_B), .N_MAC(N_MAC),
                .IT_W(IT_W), .CNT_W(CNT_W)) u_alg (
    .clk, .rst_n, .start(start && ready), .mt, .qlog, .dmax, .c_mem, .r, .y,
    .busy(alg_busy), .done(search_done), .iters, .stop_reason, .list, .list_count,
    .min_ed, .n_up, .n_down, .n_mem_drop, .s_overflow
  );

  cmem_unit #(.WR_W(WR_W)) u_cmem (
    .clk, .rst_n, .clear(cmem_clear), .enable(cmem_en), .w_r,
    .upd(search_done), .min_ed, .c_mem, .avg
  );

  llr_unit #(.N_CAND(N_CAND), .LLR_W(LLR_W)) u_llr (
    .clk, .rst_n, .start(llr_start), .list, .count(list_count), .mt(mt_q), .qlog(ql_q),
    .noise, .noise_load(start && ready), .div_wait(llr_dwait), .busy(llr_busy), .llr_valid, .llr_idx, .llr, .done(llr_done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      llr_pend <= 1'b0;
      mt_q     <= '0;
      ql_q     <= '0;
    end else begin
      if (start && ready) begin
        mt_q <= mt;
        ql_q <= qlog;
      end
      if (search_done)    llr_pend <= 1'b1;
      else if (llr_start) llr_pend <= 1'b0;
    end
  end

  logic unused;
  assign unused = ^avg;
endmodule
