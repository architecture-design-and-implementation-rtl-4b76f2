// tb_see_ped: random b, R_ii, rank and constellation; the selected symbol
// and PED are checked against a brute-force ranking of all symbols, the
// `ok` flag for ranks beyond the alphabet, and the latency against
// ceil(Q/N_MAC) + 2 cycles.
module tb_see_ped;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t b, rii; sym_t n; logic [QLOG_W-1:0] qlog; ped_t dbase;
  logic done, ok; sym_t sym; ped_t d;
  int checks = 0, failures = 0;

  see_ped #(.N_MAC(4)) dut (.clk, .rst_n, .start, .b, .rii, .n, .qlog, .dbase, .done, .ok, .sym, .d);
  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b = 0; rii = 0; n = 0; qlog = 3; dbase = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      int lat, q, es; longint e_d;
      qlog  = QLOG_W'($urandom_range(3, 1));
      q     = 1 << qlog;
      b     = word_t'(int'($urandom_range(4000)) - 2000);
      rii   = word_t'($urandom_range(400, 100));
      if (t % 97 == 3) b = 15'sh3fff;      // large errors
      n     = sym_t'($urandom_range(7));
      dbase = (t % 50 == 9) ? PED_MAX - 5 : ped_t'($urandom_range(100000));
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      es = ref_rank_sym(longint'(b), longint'(rii), int'(n), int'(qlog));
      checks += 2;
      if (lat != (q + 3) / 4 + 2) begin
        failures++; $display("latency %0d", lat);
      end
      if (es < 0) begin
        if (ok) begin failures++; $display("ok set for rank %0d of %0d", n, q); end
      end else begin
        e_d = ped_sat(longint'(dbase) + ref_inc(ref_abs_e(longint'(b), longint'(rii), es, int'(qlog))));
        checks++;
        if (!ok || int'(sym) != es || longint'(d) != e_d) begin
          failures++;
          $display("t=%0d b=%0d rii=%0d n=%0d q=%0d: got sym %0d d %0d exp %0d %0d", t, b, rii, n, q, sym, d, es, e_d);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
