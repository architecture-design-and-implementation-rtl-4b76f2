// heap_unit: binary heap memory with up-heap and down-heap logic.
//
// Keeps up to DEPTH elements of DATA_W bits ordered by their KEY_W most
// significant bits: the smallest key at address 0 for a min-heap
// (MAX_HEAP = 0), the largest for a max-heap. Addresses are 0-based, so
// the children of X are 2X+1 and 2X+2 and its parent is (X-1)>>1.
// Operations (heap_op_e), accepted when `ready`:
//   HOP_INSERT  - write at the next free address, then up-heap;
//   HOP_REPLACE - overwrite the top, then down-heap (used when the top has
//                 just been taken and a new element is to be stored);
//   HOP_POP     - move the last element to the top, then down-heap.
// Each up- or down-heap step takes one cycle: the element being placed is
// held in a register, up to two memory words are read (parent, or both
// children) and one word is written. Insert on a full heap is dropped and
// flagged on `overflow`. `clear` empties the heap and aborts any operation.
// `top` and `entries` are valid while `ready` is high.
// The heap organisation, the three address generators and the compare
// against the moving element follow the source; the register-array memory
// with two read ports and one write port stands in for its dual-port memory.
module heap_unit
  import mmf_pkg::*;
#(
  parameter int DEPTH    = 150,
  parameter int DATA_W   = NODE_W,
  parameter int KEY_W    = PED_W,
  parameter bit MAX_HEAP = 1'b0
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  input  logic                     req_valid,
  input  heap_op_e                 req_op,
  input  logic [DATA_W-1:0]        req_data,
  output logic                     ready,
  output logic [DATA_W-1:0]        top,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     full,
  output logic                     overflow,
  output logic                     up_step,    // one up-heap step this cycle
  output logic                     down_step,  // one down-heap step this cycle
  output logic [DEPTH-1:0][DATA_W-1:0] entries
);
  localparam int AW = $clog2(DEPTH);

  typedef enum logic [1:0] {H_IDLE, H_UP, H_DOWN} hstate_e;
  hstate_e state;

  logic [DATA_W-1:0] mem [DEPTH];
  logic [DATA_W-1:0] elem;
  logic [AW-1:0]     pos;
  logic [AW:0]       cnt;

  // a ranks before b in this heap's order
  function automatic logic ranks_first(input logic [DATA_W-1:0] a, input logic [DATA_W-1:0] b);
    if (MAX_HEAP) return a[DATA_W-1 -: KEY_W] > b[DATA_W-1 -: KEY_W];
    else          return a[DATA_W-1 -: KEY_W] < b[DATA_W-1 -: KEY_W];
  endfunction

  // address generators (2X+1, 2X+2, (X-1)>>1)
  logic [AW:0]       lch, rch;
  logic [AW-1:0]     par;
  logic [DATA_W-1:0] lval, rval, pval, cval;
  logic [AW:0]       cidx;
  logic              has_child;
  always_comb begin
    lch  = {pos, 1'b1};
    rch  = {pos, 1'b0} + (AW + 1)'(2);
    par  = (pos - 1'b1) >> 1;
    lval = (lch < (AW + 1)'(DEPTH)) ? mem[lch[AW-1:0]] : '0;
    rval = (rch < (AW + 1)'(DEPTH)) ? mem[rch[AW-1:0]] : '0;
    pval = mem[par];
    has_child = (lch < cnt);
    if (rch < cnt && ranks_first(rval, lval)) begin
      cidx = rch;
      cval = rval;
    end else begin
      cidx = lch;
      cval = lval;
    end
  end

  assign ready    = (state == H_IDLE);
  assign top      = mem[0];
  assign count    = ($clog2(DEPTH+1))'(cnt);
  assign full     = (cnt == (AW + 1)'(DEPTH));
  always_comb for (int i = 0; i < DEPTH; i++) entries[i] = mem[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= H_IDLE;
      cnt       <= '0;
      pos       <= '0;
      elem      <= '0;
      overflow  <= 1'b0;
      up_step   <= 1'b0;
      down_step <= 1'b0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      overflow  <= 1'b0;
      up_step   <= 1'b0;
      down_step <= 1'b0;
      if (clear) begin
        state <= H_IDLE;
        cnt   <= '0;
      end else begin
        case (state)
          H_IDLE: if (req_valid) begin
            case (req_op)
              HOP_INSERT: begin
                if (full) overflow <= 1'b1;
                else begin
                  elem  <= req_data;
                  pos   <= cnt[AW-1:0];
                  cnt   <= cnt + 1'b1;
                  state <= H_UP;
                end
              end
              HOP_REPLACE: begin
                elem  <= req_data;
                pos   <= '0;
                if (cnt == 0) cnt <= 1;
                state <= H_DOWN;
              end
              HOP_POP: begin
                if (cnt > 1) begin
                  elem  <= mem[cnt[AW-1:0] - 1'b1];
                  pos   <= '0;
                  state <= H_DOWN;
                end
                if (cnt != 0) cnt <= cnt - 1'b1;
              end
              default: ;
            endcase
          end
          H_UP: begin
            up_step <= 1'b1;
            if (pos != 0 && ranks_first(elem, pval)) begin
              mem[pos] <= pval;
              pos      <= par;
            end else begin
              mem[pos] <= elem;
              state    <= H_IDLE;
            end
          end
          H_DOWN: begin
            down_step <= 1'b1;
            if (has_child && ranks_first(cval, elem)) begin
              mem[pos] <= cval;
              pos      <= cidx[AW-1:0];
            end else begin
              mem[pos] <= elem;
              state    <= H_IDLE;
            end
          end
          default: state <= H_IDLE;
        endcase
      end
    end
  end
endmodule
