// llr_unit: max-log-MAP soft outputs from the final candidate list.
//
// For every bit k of the detected vector,
//   L(b_k) = min{d(x) : x in L, b_k = 0} / (2 sigma^2)
//          - min{d(x) : x in L, b_k = 1} / (2 sigma^2),
// which is the max-log approximation of the LLR (positive favours b_k = 1).
// The unit works in three steps:
//   1. reciprocal: inv = 2**INV_SH / noise, where noise = 2 sigma^2 in PED
//      units (recip_div, INV_SH + 1 cycles);
//   2. scaling: every listed ED is multiplied by inv with N_MUL multipliers
//      (ceil(N_CAND / N_MUL) cycles) into LLR units (LLR_FRAC fractional
//      bits), saturating;
//   3. bit loop: one bit per cycle, N_CAND parallel comparators find both
//      minima; the difference is clipped to +-(2**(LLR_W-1) - 1), i.e.
//      |L| < 8 for LLR_W = 8, LLR_FRAC = 4. A bit value missing from the
//      list gives the clipped extreme.
// Bit k is bit qlog-1-(k mod qlog) of the Gray code g = x ^ (x >> 1) of the
// symbol index on layer k / qlog (layer 0 first, most significant bit
// first). The reciprocal, the two multipliers, the N_CAND parallel
// comparisons, the bit loop and the clipping follow the source; the Gray
// mapping, bit order and number formats are this design's choices.
//
// Timing: `start` (when !busy) samples the list, count, mt and qlog.
// LLRs leave on llr_valid/llr_idx/llr, one per cycle, and `done` pulses with
// the last one. The reciprocal can be prepared ahead: a `noise_load` pulse
// samples `noise` and runs the divider in the background (for instance
// while the search for the same vector is still running). A later `start`
// then uses that reciprocal and needs ceil(N_CAND/N_MUL) + mt*qlog
// cycles. Without a preceding load, `start` samples `noise` itself and
// waits for the divider: INV_SH + ceil(N_CAND/N_MUL) + mt*qlog + 3 cycles.
// A loaded reciprocal serves one `start` only. `div_wait` is high while a
// started vector waits for the divider; no new load may be issued then.
module llr_unit
  import mmf_pkg::*;
#(
  parameter int N_CAND   = 15,
  parameter int N_MUL    = 2,
  parameter int LLR_W    = 8,
  parameter int LLR_FRAC = 4,
  parameter int INV_SH   = 24,
  parameter int SC_W     = 12
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        start,
  input  cand_t [N_CAND-1:0]          list,
  input  logic [$clog2(N_CAND+1)-1:0] count,
  input  logic [MTC_W-1:0]            mt,
  input  logic [QLOG_W-1:0]           qlog,
  input  ped_t                        noise,
  input  logic                        noise_load,
  output logic                        busy,
  output logic                        div_wait,
  output logic                        llr_valid,
  output logic [4:0]                  llr_idx,
  output logic signed [LLR_W-1:0]     llr,
  output logic                        done
);
  localparam int LMAX = 2 ** (LLR_W - 1) - 1;
  localparam int PW   = PED_W + INV_SH + 1;
  localparam int MW   = $clog2(N_CAND + 1);

  typedef enum logic [1:0] {L_IDLE, L_DIV, L_SCALE, L_BITS} lstate_e;
  lstate_e state;

  cand_t [N_CAND-1:0]  lst;
  logic [MW-1:0]       cnt;
  logic [MTC_W-1:0]    mt_q;
  logic [QLOG_W-1:0]   ql_q;
  ped_t                noise_q;
  logic                div_start, div_done;
  logic [INV_SH:0]     inv_q;       // divider output
  logic [INV_SH:0]     inv;         // reciprocal used by the scaling
  logic                inv_ok;      // a loaded reciprocal is ready
  logic                div_run;     // the divider is working
  logic [SC_W-1:0]     sc [N_CAND];
  logic [MW-1:0]       m0;          // first ED scaled this cycle
  logic [MTC_W-1:0]    lay;         // layer of the current bit
  logic [QLOG_W-1:0]   bp;          // bit position within the layer (MSB first)
  logic [4:0]          k;

  recip_div #(.DEN_W(PED_W), .NUM_SH(INV_SH)) u_div (
    .clk, .rst_n, .start(div_start), .den(noise_q), .done(div_done), .q(inv_q)
  );

  function automatic logic [SC_W-1:0] scale(input ped_t d, input logic [INV_SH:0] f);
    logic [PW-1:0] p;
    p = PW'(d) * PW'(f);
    p = p >> (INV_SH - LLR_FRAC);
    return (p > PW'(2 ** SC_W - 1)) ? '1 : p[SC_W-1:0];
  endfunction

  // N_CAND parallel comparisons for the current bit
  logic [SC_W-1:0] min0, min1;
  logic            has0, has1;
  logic signed [SC_W+1:0] diff;
  logic signed [LLR_W-1:0] lval;
  always_comb begin
    min0 = '1; min1 = '1; has0 = 1'b0; has1 = 1'b0;
    for (int m = 0; m < N_CAND; m++) begin
      sym_t s, g;
      s = lst[m].x[lay[$clog2(MT)-1:0]];
      g = s ^ (s >> 1);
      if (m < int'(cnt)) begin
        if (g[bp]) begin
          has1 = 1'b1;
          if (sc[m] < min1) min1 = sc[m];
        end else begin
          has0 = 1'b1;
          if (sc[m] < min0) min0 = sc[m];
        end
      end
    end
    diff = $signed({2'b00, min0}) - $signed({2'b00, min1});
    if (!has0 && !has1)       lval = '0;
    else if (!has1)           lval = -LLR_W'(LMAX);
    else if (!has0)           lval = LLR_W'(LMAX);
    else if (diff > (SC_W + 2)'(LMAX))  lval = LLR_W'(LMAX);
    else if (diff < -(SC_W + 2)'(LMAX)) lval = -LLR_W'(LMAX);
    else                      lval = LLR_W'(diff);
  end

  assign busy     = (state != L_IDLE) || llr_valid;
  assign div_wait = (state == L_DIV);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= L_IDLE;
      lst       <= '0;
      cnt       <= '0;
      mt_q      <= '0;
      ql_q      <= '0;
      noise_q   <= '0;
      div_start <= 1'b0;
      inv       <= '0;
      inv_ok    <= 1'b0;
      div_run   <= 1'b0;
      m0        <= '0;
      lay       <= '0;
      bp        <= '0;
      k         <= '0;
      llr_valid <= 1'b0;
      llr_idx   <= '0;
      llr       <= '0;
      done      <= 1'b0;
      for (int m = 0; m < N_CAND; m++) sc[m] <= '0;
    end else begin
      div_start <= 1'b0;
      llr_valid <= 1'b0;
      done      <= 1'b0;
      if (div_done) begin
        div_run <= 1'b0;
        inv_ok  <= 1'b1;
      end
      if (noise_load && state != L_DIV) begin
        noise_q   <= noise;
        div_start <= 1'b1;
        div_run   <= 1'b1;
        inv_ok    <= 1'b0;
      end
      case (state)
        L_IDLE: if (start && !busy) begin
          lst   <= list;
          cnt   <= count;
          mt_q  <= mt;
          ql_q  <= qlog;
          m0    <= '0;
          if ((inv_ok || div_done) && !noise_load) begin
            inv    <= inv_q;
            inv_ok <= 1'b0;
            state  <= L_SCALE;
          end else begin
            if (!div_run && !noise_load) begin
              noise_q   <= noise;
              div_start <= 1'b1;
              div_run   <= 1'b1;
            end
            state <= L_DIV;
          end
        end
        L_DIV: if (div_done) begin
          inv    <= inv_q;
          inv_ok <= 1'b0;
          state  <= L_SCALE;
        end
        L_SCALE: begin
          for (int u = 0; u < N_MUL; u++)
            if (int'(m0) + u < N_CAND) sc[int'(m0) + u] <= scale(lst[int'(m0) + u].d, inv);
          m0 <= m0 + MW'(N_MUL);
          if (int'(m0) + N_MUL >= N_CAND) begin
            lay   <= '0;
            bp    <= ql_q - 1'b1;
            k     <= '0;
            state <= L_BITS;
          end
        end
        L_BITS: begin
          llr_valid <= 1'b1;
          llr_idx   <= k;
          llr       <= lval;
          k         <= k + 1'b1;
          if (bp == 0) begin
            bp  <= ql_q - 1'b1;
            lay <= lay + 1'b1;
            if (lay + 1'b1 == mt_q) begin
              done  <= 1'b1;
              state <= L_IDLE;
            end
          end else begin
            bp <= bp - 1'b1;
          end
        end
        default: state <= L_IDLE;
      endcase
    end
  end
endmodule
