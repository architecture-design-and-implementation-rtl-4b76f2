// cmem_unit: memory sphere radius C_mem = W_R * E[min ED of the list].
//
// After every detection the smallest ED in the final list is folded into a
// running average, avg += (min_ed - avg) / 2**AVG_SH, so the average runs
// over successive subcarriers and symbols; the first sample loads it
// directly. The radius is avg * w_r with w_r an unsigned fixed-point factor
// with WR_FRAC fractional bits (2.0 = 32, 2.5 = 40 for WR_FRAC = 4),
// saturated to the PED width. Before the first sample, or with `enable`
// low, C_mem is all ones and so never discards a node (then only the list
// radius C_0 limits what is stored). The formula follows the source; the
// exponential averaging and the number formats are this design's choice.
//
// Timing: `upd` with `min_ed` is taken in one cycle; c_mem follows on the
// next clock. An empty list (min_ed all ones) is not averaged in.
module cmem_unit
  import mmf_pkg::*;
#(
  parameter int AVG_SH  = 4,
  parameter int WR_W    = 8,
  parameter int WR_FRAC = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            clear,
  input  logic            enable,
  input  logic [WR_W-1:0] w_r,
  input  logic            upd,
  input  ped_t            min_ed,
  output ped_t            c_mem,
  output ped_t            avg
);
  logic                          have;
  logic signed [PED_W+1:0]       diff;
  logic        [PED_W+WR_W-1:0]  prod;

  assign diff = $signed({2'b00, min_ed}) - $signed({2'b00, avg});
  assign prod = (PED_W + WR_W)'(avg) * (PED_W + WR_W)'(w_r);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have  <= 1'b0;
      avg   <= '0;
      c_mem <= PED_MAX;
    end else begin
      if (clear) begin
        have <= 1'b0;
        avg  <= '0;
      end else if (upd && min_ed != PED_MAX) begin
        have <= 1'b1;
        if (!have) avg <= min_ed;
        else       avg <= ped_t'($signed({2'b00, avg}) + (diff >>> AVG_SH));
      end
      if (!enable || !have)
        c_mem <= PED_MAX;
      else if ((prod >> WR_FRAC) > (PED_W + WR_W)'(PED_MAX))
        c_mem <= PED_MAX;
      else
        c_mem <= ped_t'(prod >> WR_FRAC);
    end
  end
endmodule
