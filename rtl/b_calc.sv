// b_calc: symbol-independent part of the partial Euclidean distance.
//
// Computes b = y~_row - sum_{j=row+1}^{mt-1} R[row][j] * w(x[j]), the
// interference of the already fixed layers on layer `row` (upper unit of the
// candidate extension datapath). N_MUL products are formed in parallel per
// clock and accumulated, so the unit takes max(1, ceil((mt-1-row)/N_MUL))
// cycles: few for the top layers and most for the lowest one, as the
// source describes. The accumulator is exact; the result is saturated to
// the W-bit data word. The number of multipliers (2 for 64-QAM) follows the
// source; the accumulator width and saturation are this design's choice.
//
// Interface: pulse `start` with the operands held stable until `done`;
// `done` pulses for one cycle with `b` valid (b stays until the next start).
module b_calc
  import mmf_pkg::*;
#(
  parameter int N_MUL = 2
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [LVL_W-1:0]      row,
  input  logic [MTC_W-1:0]      mt,
  input  logic [QLOG_W-1:0]     qlog,
  input  wvec_t                 rrow,   // R[row][*]
  input  word_t                 yi,     // y~[row]
  input  symvec_t               x,
  output logic                  done,
  output word_t                 b
);
  localparam int AW = W + 11;

  logic                 busy;
  logic [LVL_W:0]       j;       // first column of this cycle
  logic signed [AW-1:0] acc, acc_nxt;
  logic                 last;
  logic signed [W+4:0]  prod [N_MUL];

  always_comb begin
    acc_nxt = acc;
    for (int u = 0; u < N_MUL; u++) begin
      prod[u] = '0;
      if (int'(j) + u < int'(mt) && int'(j) + u < MT)
        prod[u] = $signed(rrow[int'(j) + u]) * sym_val(x[int'(j) + u], qlog);
      acc_nxt = acc_nxt - AW'(prod[u]);
    end
    last = (int'(j) + N_MUL >= int'(mt));
  end

  function automatic word_t sat_w(input logic signed [AW-1:0] v);
    if (v > AW'(2 ** (W - 1) - 1))  return word_t'(2 ** (W - 1) - 1);
    if (v < -AW'(2 ** (W - 1)))     return word_t'(-(2 ** (W - 1)));
    return word_t'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      j    <= '0;
      acc  <= '0;
      b    <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        j    <= (LVL_W + 1)'(row) + 1'b1;
        acc  <= AW'(yi);
      end else if (busy) begin
        acc <= acc_nxt;
        j   <= j + (LVL_W + 1)'(N_MUL);
        if (last) begin
          busy <= 1'b0;
          done <= 1'b1;
          b    <= sat_w(acc_nxt);
        end
      end
    end
  end
endmodule
