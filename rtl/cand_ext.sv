// cand_ext: one candidate extension module of the tree pruning unit.
//
// Extends a partial candidate by one symbol on layer `row`: b_calc first
// forms b = y~_row - sum_{j>row} R[row][j] w(x[j]); see_ped then picks the
// symbol of Schnorr-Euchner rank n for that layer and returns its PED
// d = dbase + |b - R[row][row] w(sym)|^2. With n = 0 and dbase = PED of the
// node this gives the node's first child; with n = rank+1 and dbase = PED of
// the node's parent it gives the node's next sibling. The two sub-units and
// their order follow the source; the start/done handshake is this design's.
//
// Timing: done pulses max(1, ceil((mt-1-row)/N_MUL)) + ceil(Q/N_MAC) + 3
// cycles after start. All operands are held stable until done.
module cand_ext
  import mmf_pkg::*;
#(
  parameter int N_MUL = 2,
  parameter int N_MAC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [LVL_W-1:0]  row,
  input  sym_t              n,
  input  ped_t              dbase,
  input  symvec_t           x,
  input  logic [MTC_W-1:0]  mt,
  input  logic [QLOG_W-1:0] qlog,
  input  wmat_t             r,
  input  wvec_t             y,
  output logic              done,
  output logic              ok,
  output sym_t              sym,
  output ped_t              d
);
  logic [$clog2(MT)-1:0] rsel;
  logic                  b_done;
  word_t                 b;

  assign rsel = row[$clog2(MT)-1:0];

  b_calc #(.N_MUL(N_MUL)) u_b (
    .clk, .rst_n, .start, .row, .mt, .qlog,
    .rrow (r[rsel]),
    .yi   (y[rsel]),
    .x,
    .done (b_done),
    .b
  );

  see_ped #(.N_MAC(N_MAC)) u_see (
    .clk, .rst_n,
    .start (b_done),
    .b,
    .rii   (r[rsel][rsel]),
    .n, .qlog, .dbase,
    .done, .ok, .sym, .d
  );
endmodule
