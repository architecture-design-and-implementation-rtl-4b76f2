// tpu: tree pruning unit with two candidate extension modules.
//
// On `start` the current node `cur` is extended in two directions at once:
//   child  (Nc): first Schnorr-Euchner child on layer cur.lvl-1, PED base =
//                cur.d; exists when cur.lvl > 0 (cur is not a leaf);
//   father (Nf): next sibling of cur on layer cur.lvl with rank cur.rank+1,
//                PED base = cur.dpar; exists when cur is not the root
//                (cur.lvl < mt) and rank+1 < Q.
// `done` pulses when both modules have finished (the lower layer needs more
// b-products, so the child module usually ends last); nc/nf and their valid
// flags hold until the next start. Two parallel extension modules follow
// the source; holding the parent PED in each node is this design's choice.
module tpu
  import mmf_pkg::*;
#(
  parameter int N_MUL = 2,
  parameter int N_MAC = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  node_t             cur,
  input  logic [MTC_W-1:0]  mt,
  input  logic [QLOG_W-1:0] qlog,
  input  wmat_t             r,
  input  wvec_t             y,
  output logic              done,
  output node_t             nc,
  output logic              nc_valid,
  output node_t             nf,
  output logic              nf_valid
);
  logic [LVL_W-1:0] c_row, f_row;
  sym_t             f_n;
  logic             c_done, f_done, c_ok, f_ok;
  sym_t             c_sym, f_sym;
  ped_t             c_d, f_d;
  logic             c_fin, f_fin, busy;
  logic             c_need, f_need;
  logic [SYM_W:0]   q;

  assign q      = (SYM_W + 1)'(1) << qlog;
  assign c_row  = (cur.lvl == 0) ? '0 : cur.lvl - 1'b1;
  assign f_row  = cur.lvl;
  assign f_n    = cur.rank + 1'b1;
  assign c_need = (cur.lvl != 0);
  assign f_need = ({1'b0, cur.lvl} < (LVL_W + 1)'(mt)) && ((SYM_W + 1)'(cur.rank) + 1'b1 < q);

  cand_ext #(.N_MUL(N_MUL), .N_MAC(N_MAC)) u_child (
    .clk, .rst_n, .start, .row(c_row), .n('0), .dbase(cur.d), .x(cur.x),
    .mt, .qlog, .r, .y, .done(c_done), .ok(c_ok), .sym(c_sym), .d(c_d)
  );

  cand_ext #(.N_MUL(N_MUL), .N_MAC(N_MAC)) u_father (
    .clk, .rst_n, .start, .row(f_row < LVL_W'(MT) ? f_row : '0), .n(f_n), .dbase(cur.dpar),
    .x(cur.x), .mt, .qlog, .r, .y, .done(f_done), .ok(f_ok), .sym(f_sym), .d(f_d)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy     <= 1'b0;
      c_fin    <= 1'b0;
      f_fin    <= 1'b0;
      done     <= 1'b0;
      nc       <= '0;
      nf       <= '0;
      nc_valid <= 1'b0;
      nf_valid <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy     <= 1'b1;
        c_fin    <= 1'b0;
        f_fin    <= 1'b0;
        nc_valid <= 1'b0;
        nf_valid <= 1'b0;
      end else if (busy) begin
        if (c_done) begin
          c_fin    <= 1'b1;
          nc_valid <= c_need && c_ok;
          nc       <= cur;
          nc.x[c_row[$clog2(MT)-1:0]] <= c_sym;
          nc.lvl   <= c_row;
          nc.rank  <= '0;
          nc.d     <= c_d;
          nc.dpar  <= cur.d;
        end
        if (f_done) begin
          f_fin    <= 1'b1;
          nf_valid <= f_need && f_ok;
          nf       <= cur;
          nf.x[f_row[$clog2(MT)-1:0]] <= f_sym;
          nf.rank  <= f_n;
          nf.d     <= f_d;
        end
        if ((c_fin || c_done) && (f_fin || f_done)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
