// see_ped: Schnorr-Euchner enumeration and PED update without division.
//
// Lower unit of the candidate extension datapath. Instead of dividing b by
// R_ii to find the nearest symbol, the error magnitude |e_k| = |b - R_ii w(k)|
// is formed for every symbol k of the Q-level real alphabet with N_MAC
// parallel multiply-subtract units (ceil(Q/N_MAC) cycles). The symbol whose
// error has rank n (n = 0 is the closest, ties go to the lower index) is
// then selected, squared and added to the parent PED:
//   d = dbase + (|e_n|^2 >> FRAC), saturating.
// Error magnitudes saturate at 2**W - 1.
// The division-free enumeration, the n-th minimum search and the final
// square-and-add follow the source; the rank tie rule, saturation and the
// three-phase timing are this design's choices.
//
// Timing: `done` pulses ceil(Q/N_MAC) + 2 cycles after `start`; `ok` is low
// when n >= Q (no such symbol). Operands are held stable until `done`.
module see_ped
  import mmf_pkg::*;
#(
  parameter int N_MAC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  word_t             b,
  input  word_t             rii,
  input  sym_t              n,
  input  logic [QLOG_W-1:0] qlog,
  input  ped_t              dbase,
  output logic              done,
  output logic              ok,
  output sym_t              sym,
  output ped_t              d
);
  localparam int EW = W + 7;

  typedef enum logic [1:0] {S_IDLE, S_FILL, S_SEL, S_SQ} state_e;
  state_e state;

  logic [W-1:0]   ea [QMAX];      // |e_k|
  logic [SYM_W:0] k0;             // first symbol of this fill cycle
  logic [SYM_W:0] q;
  logic [W-1:0]   emin;
  sym_t           kmin;
  logic           found;

  assign q = (SYM_W + 1)'(1) << qlog;

  // |b - R_ii w(k)| saturated to W unsigned bits.
  function automatic logic [W-1:0] abs_err(input word_t bb, input word_t rr, input sym_t k,
                                           input logic [QLOG_W-1:0] ql);
    logic signed [EW-1:0] p, e;
    p = rr * sym_val(k, ql);
    e = EW'(bb) - p;
    if (e < 0) e = -e;
    if (e > EW'(2 ** W - 1)) return '1;
    return e[W-1:0];
  endfunction

  // n-th minimum: symbol k with exactly n smaller-ranked symbols.
  logic [W-1:0] sel_e;
  sym_t         sel_k;
  logic         sel_ok;
  always_comb begin
    sel_e  = '0;
    sel_k  = '0;
    sel_ok = 1'b0;
    for (int k = 0; k < QMAX; k++) begin
      int cnt;
      cnt = 0;
      for (int m = 0; m < QMAX; m++) begin
        if (m != k && m < int'(q) && (ea[m] < ea[k] || (ea[m] == ea[k] && m < k)))
          cnt++;
      end
      if (k < int'(q) && cnt == int'(n)) begin
        sel_e  = ea[k];
        sel_k  = sym_t'(k);
        sel_ok = 1'b1;
      end
    end
  end

  logic [2*W+PED_W-1:0] sq;
  ped_t                 inc;
  always_comb begin
    sq  = (2*W+PED_W)'(emin) * (2*W+PED_W)'(emin);
    sq  = sq >> FRAC;
    inc = (sq > (2*W+PED_W)'(PED_MAX)) ? PED_MAX : sq[PED_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      ok    <= 1'b0;
      sym   <= '0;
      d     <= '0;
      k0    <= '0;
      emin  <= '0;
      kmin  <= '0;
      found <= 1'b0;
      for (int k = 0; k < QMAX; k++) ea[k] <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          state <= S_FILL;
          k0    <= '0;
        end
        S_FILL: begin
          for (int u = 0; u < N_MAC; u++) begin
            if (int'(k0) + u < int'(q) && int'(k0) + u < QMAX)
              ea[int'(k0) + u] <= abs_err(b, rii, sym_t'(int'(k0) + u), qlog);
          end
          k0 <= k0 + (SYM_W + 1)'(N_MAC);
          if (int'(k0) + N_MAC >= int'(q)) state <= S_SEL;
        end
        S_SEL: begin
          emin  <= sel_e;
          kmin  <= sel_k;
          found <= sel_ok;
          state <= S_SQ;
        end
        S_SQ: begin
          d     <= ped_add(dbase, inc);
          sym   <= kmin;
          ok    <= found;
          done  <= 1'b1;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
