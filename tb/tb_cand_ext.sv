// tb_cand_ext: random channels, partial vectors, layers and ranks; the
// extended symbol and PED are checked against the reference b, ranking and
// PED update, and the latency against
// max(1, ceil((mt-1-row)/2)) + ceil(Q/4) + 3 cycles.
module tb_cand_ext;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [LVL_W-1:0] row; sym_t n; ped_t dbase; symvec_t x;
  logic [MTC_W-1:0] mt; logic [QLOG_W-1:0] qlog; wmat_t r; wvec_t y;
  logic done, ok; sym_t sym; ped_t d;
  int checks = 0, failures = 0;

  cand_ext #(.N_MUL(2), .N_MAC(4)) dut (.clk, .rst_n, .start, .row, .n, .dbase, .x, .mt, .qlog,
                                        .r, .y, .done, .ok, .sym, .d);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row = 0; n = 0; dbase = 0; x = '0; mt = 8; qlog = 3; r = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      int lat, q, terms, es, exp_lat; longint bb, e_d; symvec_t xt;
      qlog = QLOG_W'($urandom_range(3, 1));
      q    = 1 << qlog;
      mt   = MTC_W'($urandom_range(8, 1));
      row  = LVL_W'($urandom_range(int'(mt) - 1));
      gen_channel(int'(mt), int'(qlog), 300, r, y, xt);
      x     = xt;
      n     = sym_t'($urandom_range(q - 1));
      dbase = ped_t'($urandom_range(50000));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      terms   = int'(mt) - 1 - int'(row);
      exp_lat = (terms <= 0 ? 1 : (terms + 1) / 2) + (q + 3) / 4 + 3;
      bb  = ref_b(r, y, x, int'(row), int'(mt), int'(qlog));
      es  = ref_rank_sym(bb, longint'($signed(r[row[2:0]][row[2:0]])), int'(n), int'(qlog));
      e_d = ped_sat(longint'(dbase) + ref_inc(ref_abs_e(bb, longint'($signed(r[row[2:0]][row[2:0]])), es, int'(qlog))));
      checks += 2;
      if (lat != exp_lat) begin failures++; $display("latency %0d exp %0d", lat, exp_lat); end
      if (!ok || int'(sym) != es || longint'(d) != e_d) begin
        failures++;
        $display("t=%0d row=%0d n=%0d: got %0d/%0d exp %0d/%0d", t, row, n, sym, d, es, e_d);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
