// part_mem: partial candidate memory S of the MMF-LSD search.
//
// A D_MAX-entry min-heap of tree nodes (heap_unit) whose top S_0 is always
// the stored node with the smallest PED. After each iteration the control
// unit hands over up to two extended nodes that were not chosen as the next
// node, and says whether S_0 was taken. A node is stored only if its PED is
// below both the memory sphere radius C_mem and the list sphere radius C_0;
// the others are dropped. Stores are ordered to save memory accesses:
//   S_0 taken, >= 1 node kept: first node replaces the top (down-heap),
//                              the second is inserted (up-heap);
//   S_0 taken, none kept:      the last element moves to the top (pop);
//   S_0 not taken:             each kept node is inserted (up-heap).
// The store condition and the replace-at-top order follow the source; the
// two-entry operation queue is this design's choice. Counters report the
// up-heap and down-heap operations and the nodes dropped by C_mem.
//
// Timing: `upd_valid` is accepted when `upd_ready`; the heap then works in
// the background (one cycle per heap level) while the next node is being
// extended. `top`/`top_valid` are valid while `upd_ready` is high.
module part_mem
  import mmf_pkg::*;
#(
  parameter int D_MAX = 150,
  parameter int CNT_W = 16
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         clear,
  input  logic                         upd_valid,
  input  logic                         pop_top,
  input  logic                         n0_valid,
  input  node_t                        n0,
  input  logic                         n1_valid,
  input  node_t                        n1,
  input  ped_t                         c_mem,
  input  ped_t                         c_zero,
  output logic                         upd_ready,
  output node_t                        top,
  output logic                         top_valid,
  output logic [$clog2(D_MAX+1)-1:0]   count,
  output logic                         overflow,
  output logic [CNT_W-1:0]             n_up,
  output logic [CNT_W-1:0]             n_down,
  output logic [CNT_W-1:0]             n_mem_drop
);
  logic      a0, a1;
  logic      h_ready, h_full, h_ups, h_downs;
  logic [1:0] pend;
  heap_op_e  op_q [2];
  node_t     dat_q [2];
  logic      issue;
  logic [D_MAX-1:0][NODE_W-1:0] h_entries;
  logic [NODE_W-1:0] h_top;

  assign a0 = n0_valid && (n0.d < c_mem) && (n0.d < c_zero);
  assign a1 = n1_valid && (n1.d < c_mem) && (n1.d < c_zero);

  assign issue     = (pend != 0) && h_ready;
  assign upd_ready = h_ready && (pend == 0);
  assign top       = node_t'(h_top);
  assign top_valid = (count != 0);

  heap_unit #(.DEPTH(D_MAX), .DATA_W(NODE_W), .KEY_W(PED_W), .MAX_HEAP(1'b0)) u_heap (
    .clk, .rst_n, .clear,
    .req_valid (issue),
    .req_op    (op_q[0]),
    .req_data  (dat_q[0]),
    .ready     (h_ready),
    .top       (h_top),
    .count,
    .full      (h_full),
    .overflow,
    .up_step   (h_ups),
    .down_step (h_downs),
    .entries   (h_entries)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend       <= '0;
      op_q[0]    <= HOP_INSERT;
      op_q[1]    <= HOP_INSERT;
      dat_q[0]   <= '0;
      dat_q[1]   <= '0;
      n_up       <= '0;
      n_down     <= '0;
      n_mem_drop <= '0;
    end else if (clear) begin
      pend       <= '0;
      n_up       <= '0;
      n_down     <= '0;
      n_mem_drop <= '0;
    end else begin
      if (issue) begin
        if (op_q[0] == HOP_INSERT) n_up <= n_up + 1'b1;
        else                       n_down <= n_down + 1'b1;
        op_q[0]  <= op_q[1];
        dat_q[0] <= dat_q[1];
        pend     <= pend - 1'b1;
      end
      if (upd_valid && upd_ready) begin
        n_mem_drop <= n_mem_drop + CNT_W'(n0_valid && !(n0.d < c_mem) && (n0.d < c_zero))
                                 + CNT_W'(n1_valid && !(n1.d < c_mem) && (n1.d < c_zero));
        if (pop_top) begin
          if (a0 || a1) begin
            op_q[0]  <= HOP_REPLACE;
            dat_q[0] <= a0 ? n0 : n1;
            op_q[1]  <= HOP_INSERT;
            dat_q[1] <= n1;
            pend     <= (a0 && a1) ? 2'd2 : 2'd1;
          end else begin
            op_q[0]  <= HOP_POP;
            pend     <= (count != 0) ? 2'd1 : 2'd0;
          end
        end else begin
          op_q[0]  <= HOP_INSERT;
          dat_q[0] <= a0 ? n0 : n1;
          op_q[1]  <= HOP_INSERT;
          dat_q[1] <= n1;
          pend     <= 2'(a0) + 2'(a1);
        end
      end
    end
  end

  // Steps are counted by the heap; this unit counts whole operations.
  logic unused;
  assign unused = h_full ^ h_ups ^ h_downs ^ (^h_entries);
endmodule
