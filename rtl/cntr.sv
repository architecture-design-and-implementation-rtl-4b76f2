// cntr: control logic (CNTR) of the MMF-LSD search.
//
// Runs the metric-first search one iteration at a time. An iteration
// extends the current node in the TPU into its child Nc and next sibling
// Nf; meanwhile the memories finish storing the previous iteration's nodes.
// When the TPU and both memories are done:
//   * leaf check: an extended node on layer 0 is a complete candidate and is
//     offered to the final list L (which compares it with C_0);
//   * the next node is the smallest-PED one of Nc, Nf and S_0 (top of the
//     partial memory S); ties prefer Nc, then Nf, then S_0;
//   * the unchosen extended nodes go to S (which applies C_mem and C_0); if
//     S_0 was chosen it is removed from S, otherwise it stays;
//   * the search ends when D = dmax iterations have run (STOP_LIMIT), when
//     no node is left (STOP_EMPTY) or when the next node's PED is not below
//     C_0, so that no better candidate can exist (STOP_RADIUS).
// Leaf nodes also take part in the selection: when one is chosen only its
// next sibling is formed. The root (lvl = mt, PED 0) starts the search.
// The selection among Nc, Nf and S_0, the iteration limit and the storing
// rules follow the source; the tie order, the radius-based stop and the
// handling of leaves are this design's reading of it.
//
// Interface: `start` (when !busy) with mt and dmax held for the
// whole search; `done` pulses once L holds the final list. `iters` counts
// TPU iterations D.
module cntr
  import mmf_pkg::*;
#(
  parameter int D_MAX = 150,
  parameter int IT_W  = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [MTC_W-1:0]  mt,
  input  logic [IT_W-1:0]   dmax,
  // TPU
  output logic              tpu_start,
  output node_t             cur,
  input  logic              tpu_done,
  input  node_t             nc,
  input  logic              nc_valid,
  input  node_t             nf,
  input  logic              nf_valid,
  // partial memory S
  output logic              pm_clear,
  output logic              pm_upd_valid,
  output logic              pm_pop_top,
  output logic              pm_n0_valid,
  output node_t             pm_n0,
  output logic              pm_n1_valid,
  output node_t             pm_n1,
  input  logic              pm_ready,
  input  node_t             pm_top,
  input  logic              pm_top_valid,
  // final memory L
  output logic              fm_clear,
  output logic              fm_leaf_valid,
  output cand_t             fm_leaf,
  input  logic              fm_ready,
  input  ped_t              c_zero,
  // status
  output logic              busy,
  output logic              done,
  output logic [IT_W-1:0]   iters,
  output stop_e             stop_reason
);
  typedef enum logic [2:0] {C_IDLE, C_CLR, C_EXT, C_WAIT, C_FIN} cstate_e;
  cstate_e state;

  logic           tdone;
  logic [IT_W-1:0] dlim;

  // selection
  logic  sel_c, sel_f, sel_s, any;
  node_t win;
  always_comb begin
    sel_c = 1'b0; sel_f = 1'b0; sel_s = 1'b0;
    win   = nc;
    if (nc_valid && (!nf_valid || nc.d <= nf.d) && (!pm_top_valid || nc.d <= pm_top.d)) begin
      sel_c = 1'b1; win = nc;
    end else if (nf_valid && (!pm_top_valid || nf.d <= pm_top.d)) begin
      sel_f = 1'b1; win = nf;
    end else if (pm_top_valid) begin
      sel_s = 1'b1; win = pm_top;
    end
    any = sel_c || sel_f || sel_s;
  end

  // leaf check
  logic  leaf_c, leaf_f;
  assign leaf_c = nc_valid && (nc.lvl == 0);
  assign leaf_f = nf_valid && (nf.lvl == 0);

  assign dlim = (int'(dmax) > D_MAX) ? IT_W'(D_MAX) : dmax;
  assign busy = (state != C_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= C_IDLE;
      tdone         <= 1'b0;
      cur           <= '0;
      iters         <= '0;
      tpu_start     <= 1'b0;
      pm_clear      <= 1'b0;
      fm_clear      <= 1'b0;
      pm_upd_valid  <= 1'b0;
      pm_pop_top    <= 1'b0;
      pm_n0_valid   <= 1'b0;
      pm_n1_valid   <= 1'b0;
      pm_n0         <= '0;
      pm_n1         <= '0;
      fm_leaf_valid <= 1'b0;
      fm_leaf       <= '0;
      done          <= 1'b0;
      stop_reason   <= STOP_NONE;
    end else begin
      tpu_start     <= 1'b0;
      pm_clear      <= 1'b0;
      fm_clear      <= 1'b0;
      pm_upd_valid  <= 1'b0;
      fm_leaf_valid <= 1'b0;
      done          <= 1'b0;
      if (tpu_done) tdone <= 1'b1;
      case (state)
        C_IDLE: if (start) begin
          pm_clear    <= 1'b1;
          fm_clear    <= 1'b1;
          iters       <= '0;
          stop_reason <= STOP_NONE;
          cur         <= '{d: '0, dpar: '0, lvl: LVL_W'(mt), rank: '0, x: '0};
          state       <= C_CLR;
        end
        C_CLR: state <= C_EXT;
        C_EXT: begin
          tpu_start <= 1'b1;
          tdone     <= 1'b0;
          iters     <= iters + 1'b1;
          state     <= C_WAIT;
        end
        C_WAIT: if (tdone && pm_ready && fm_ready) begin
          tdone <= 1'b0;
          if (leaf_c || leaf_f) begin
            fm_leaf_valid <= 1'b1;
            fm_leaf       <= leaf_c ? '{d: nc.d, x: nc.x} : '{d: nf.d, x: nf.x};
          end
          if (iters >= dlim) begin
            stop_reason <= STOP_LIMIT;
            state       <= C_FIN;
          end else if (!any) begin
            stop_reason <= STOP_EMPTY;
            state       <= C_FIN;
          end else if (win.d >= c_zero) begin
            stop_reason <= STOP_RADIUS;
            state       <= C_FIN;
          end else begin
            cur          <= win;
            pm_upd_valid <= 1'b1;
            pm_pop_top   <= sel_s;
            pm_n0_valid  <= nc_valid && !sel_c;
            pm_n0        <= nc;
            pm_n1_valid  <= nf_valid && !sel_f;
            pm_n1        <= nf;
            state        <= C_EXT;
          end
        end
        C_FIN: if (fm_ready && !fm_leaf_valid) begin
          done  <= 1'b1;
          state <= C_IDLE;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
