// tb_tpu: random current nodes (root, inner nodes and leaves) are extended;
// the child and next-sibling nodes, their existence flags and all node
// fields are checked against the reference extension.
module tb_tpu;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  node_t cur, nc, nf; logic nc_valid, nf_valid, done;
  logic [MTC_W-1:0] mt; logic [QLOG_W-1:0] qlog; wmat_t r; wvec_t y;
  int checks = 0, failures = 0;
  int n_root = 0, n_leaf = 0, n_last = 0;

  tpu #(.N_MUL(2), .N_MAC(4)) dut (.clk, .rst_n, .start, .cur, .mt, .qlog, .r, .y, .done,
                                   .nc, .nc_valid, .nf, .nf_valid);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic node_t ref_ext(input node_t c, input int row, input int rank, input longint dbase,
                                    input longint dnew_par, output bit ok);
    node_t o; longint bb; int s;
    o  = c;
    bb = ref_b(r, y, c.x, row, int'(mt), int'(qlog));
    s  = ref_rank_sym(bb, longint'($signed(r[row][row])), rank, int'(qlog));
    ok = (s >= 0);
    if (s < 0) s = 0;
    o.x[row] = sym_t'(s);
    o.lvl    = LVL_W'(row);
    o.rank   = sym_t'(rank);
    o.d      = ped_t'(ped_sat(dbase + ref_inc(ref_abs_e(bb, longint'($signed(r[row][row])), s, int'(qlog)))));
    o.dpar   = ped_t'(dnew_par);
    return o;
  endfunction

  initial begin
    cur = '0; mt = 8; qlog = 3; r = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      symvec_t xt; int lv, q; node_t ec, ef; bit okc, okf;
      qlog = QLOG_W'($urandom_range(3, 1));
      q    = 1 << qlog;
      mt   = MTC_W'($urandom_range(8, 2));
      gen_channel(int'(mt), int'(qlog), 300, r, y, xt);
      lv   = $urandom_range(int'(mt));
      cur  = '0;
      cur.lvl  = LVL_W'(lv);
      for (int j = lv; j < int'(mt); j++) cur.x[j] = sym_t'($urandom_range(q - 1));
      cur.rank = (lv == int'(mt)) ? '0 : sym_t'($urandom_range(q - 1));
      cur.dpar = ped_t'($urandom_range(20000));
      cur.d    = cur.dpar + ped_t'($urandom_range(20000));
      if (lv == int'(mt)) begin cur.d = 0; cur.dpar = 0; n_root++; end
      if (lv == 0) n_leaf++;
      if (int'(cur.rank) == q - 1) n_last++;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done) @(negedge clk);
      checks += 2;
      if (lv > 0) begin
        ec = ref_ext(cur, lv - 1, 0, longint'(cur.d), longint'(cur.d), okc);
        checks++;
        if (!nc_valid || nc != ec) begin failures++; $display("child mismatch t=%0d lvl=%0d", t, lv); end
      end else if (nc_valid) begin failures++; $display("leaf has a child"); end
      if (lv < int'(mt) && int'(cur.rank) + 1 < q) begin
        ef = ref_ext(cur, lv, int'(cur.rank) + 1, longint'(cur.dpar), longint'(cur.dpar), okf);
        checks++;
        if (!nf_valid || nf != ef) begin failures++; $display("sibling mismatch t=%0d lvl=%0d", t, lv); end
      end else if (nf_valid) begin failures++; $display("sibling not expected t=%0d", t); end
    end
    checks++;
    if (n_root == 0 || n_leaf == 0 || n_last == 0) begin failures++; $display("case not covered"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
