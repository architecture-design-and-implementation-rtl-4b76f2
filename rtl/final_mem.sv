// final_mem: final candidate memory L of the MMF-LSD search.
//
// An N_CAND-entry max-heap of complete candidates (symbol vector and
// Euclidean distance). Its top holds the worst listed candidate, whose ED is
// the list sphere radius C_0 once the list is full (all ones before). A new
// leaf is compared (COMP) with C_0: while the list is not full it is
// inserted (up-heap); when full it replaces the top (down-heap) only if its
// ED is smaller, otherwise it is rejected. The unit also tracks the smallest
// listed ED, used for the memory sphere radius. The max-heap and the
// comparison against the top follow the source; the one-entry input
// register and the running minimum are this design's choice.
//
// Timing: `leaf_valid` is accepted when `ready`; the heap sorts in the
// background. `c_zero`, `min_d`, `count` and `entries` are valid while
// `ready` is high.
module final_mem
  import mmf_pkg::*;
#(
  parameter int N_CAND = 15
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          clear,
  input  logic                          leaf_valid,
  input  cand_t                         leaf,
  output logic                          ready,
  output ped_t                          c_zero,
  output ped_t                          min_d,
  output logic [$clog2(N_CAND+1)-1:0]   count,
  output cand_t [N_CAND-1:0]            entries,
  output logic                          rejected   // pulse: leaf not listed
);
  logic       pend;
  cand_t      pdat;
  logic       h_ready, h_full, h_ovf, h_up, h_down, issue, accept;
  heap_op_e   op;
  logic [CAND_W-1:0] h_top;
  logic [N_CAND-1:0][CAND_W-1:0] h_entries;

  assign accept = !h_full || (pdat.d < c_zero);
  assign op     = h_full ? HOP_REPLACE : HOP_INSERT;
  assign issue  = pend && h_ready && accept;
  assign ready  = h_ready && !pend;
  cand_t      top_c;
  assign top_c  = cand_t'(h_top);
  assign c_zero = h_full ? top_c.d : PED_MAX;
  always_comb for (int i = 0; i < N_CAND; i++) entries[i] = cand_t'(h_entries[i]);

  heap_unit #(.DEPTH(N_CAND), .DATA_W(CAND_W), .KEY_W(PED_W), .MAX_HEAP(1'b1)) u_heap (
    .clk, .rst_n, .clear,
    .req_valid (issue),
    .req_op    (op),
    .req_data  (pdat),
    .ready     (h_ready),
    .top       (h_top),
    .count,
    .full      (h_full),
    .overflow  (h_ovf),
    .up_step   (h_up),
    .down_step (h_down),
    .entries   (h_entries)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend     <= 1'b0;
      pdat     <= '0;
      min_d    <= PED_MAX;
      rejected <= 1'b0;
    end else if (clear) begin
      pend     <= 1'b0;
      min_d    <= PED_MAX;
      rejected <= 1'b0;
    end else begin
      rejected <= 1'b0;
      if (pend && h_ready) begin
        pend <= 1'b0;
        if (accept) begin
          if (pdat.d < min_d) min_d <= pdat.d;
        end else begin
          rejected <= 1'b1;
        end
      end
      if (leaf_valid && ready) begin
        pend <= 1'b1;
        pdat <= leaf;
      end
    end
  end

  logic unused;
  assign unused = h_ovf ^ h_up ^ h_down;
endmodule
