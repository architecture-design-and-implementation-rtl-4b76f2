// tb_mmf_lsd_alg: end-to-end checks of the metric-first list search.
//
// Random channels and received vectors for 4-, 16- and 64-QAM and 1 to 8
// real layers. When the search stops before the iteration limit, the list
// must hold exactly the N_CAND smallest fixed-point EDs of all vectors
// (found by brute force); in every case each listed ED must be the true ED
// of its symbol vector, vectors must be distinct, and the iteration count
// must not exceed dmax. Every stop reason, C_mem discards and both heap
// operations must occur. Cycles per iteration are reported.
module tb_mmf_lsd_alg;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, start = 0;
  logic [MTC_W-1:0] mt; logic [QLOG_W-1:0] qlog; logic [7:0] dmax; ped_t c_mem;
  wmat_t r; wvec_t y;
  logic busy, done, s_overflow; logic [7:0] iters; stop_e stop_reason;
  cand_t [N-1:0] list; logic [$clog2(N+1)-1:0] list_count; ped_t min_ed;
  logic [15:0] n_up, n_down, n_mem_drop;
  int checks = 0, failures = 0;
  int n_stop [4] = '{0, 0, 0, 0};
  int tot_up = 0, tot_down = 0, tot_drop = 0, tot_cyc = 0, tot_it = 0;

  mmf_lsd_alg #(.D_MAX(150), .N_CAND(N)) dut (
    .clk, .rst_n, .start, .mt, .qlog, .dmax, .c_mem, .r, .y, .busy, .done, .iters, .stop_reason,
    .list, .list_count, .min_ed, .n_up, .n_down, .n_mem_drop, .s_overflow);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mt = 4; qlog = 2; dmax = 150; c_mem = PED_MAX; r = '0; y = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 150; t++) begin
      symvec_t xt; int m, q, nv, cyc, exp_n; longint eds [$]; longint got [$]; bit brute;
      eds.delete(); got.delete();
      qlog = QLOG_W'($urandom_range(3, 1));
      m = (qlog == 3) ? 4 : (qlog == 2) ? 6 : 8;
      mt = MTC_W'($urandom_range(m, 1));
      if (t % 10 == 9) begin mt = 8; qlog = 3; end   // full-size problem, consistency only
      q = 1 << qlog;
      gen_channel(int'(mt), int'(qlog), (t % 3 == 0) ? 600 : 100, r, y, xt);
      dmax  = (t % 7 == 3) ? 8'd10 : 8'd150;
      c_mem = (t % 5 == 4) ? ped_t'($urandom_range(3000, 300)) : PED_MAX;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      tot_cyc += cyc; tot_it += int'(iters);
      n_stop[int'(stop_reason)]++;
      tot_up += int'(n_up); tot_down += int'(n_down); tot_drop += int'(n_mem_drop);
      // listed EDs are true EDs, vectors distinct
      for (int i = 0; i < int'(list_count); i++) begin
        checks++;
        if (longint'(list[i].d) != ref_ed(r, y, list[i].x, int'(mt), int'(qlog))) begin
          failures++; $display("t=%0d entry %0d: ED %0d is not that of its vector", t, i, list[i].d);
        end
        for (int j = 0; j < i; j++) if (list[i].x == list[j].x) begin
          failures++; $display("t=%0d duplicate vector", t);
        end
        got.push_back(longint'(list[i].d));
      end
      checks += 2;
      if (int'(iters) > int'(dmax)) begin failures++; $display("t=%0d iterations %0d > %0d", t, iters, dmax); end
      if (stop_reason == STOP_NONE) begin failures++; $display("no stop reason"); end
      got.sort();
      // brute force where the tree is small enough
      brute = !(mt == 8 && qlog == 3);
      if (brute) begin
        nv = 1 << (int'(qlog) * int'(mt));
        for (int v = 0; v < nv; v++) begin
          symvec_t xv; xv = '0;
          for (int i = 0; i < int'(mt); i++) xv[i] = sym_t'((v >> (i * int'(qlog))) & (q - 1));
          eds.push_back(ref_ed(r, y, xv, int'(mt), int'(qlog)));
        end
        eds.sort();
        exp_n = nv < N ? nv : N;
        checks++;
        if (got.size() > 0 && got[0] < eds[0]) begin failures++; $display("t=%0d below ML", t); end
        if (stop_reason != STOP_LIMIT && c_mem == PED_MAX) begin
          checks++;
          if (got.size() != exp_n) begin
            failures++; $display("t=%0d list size %0d exp %0d", t, got.size(), exp_n);
          end else begin
            for (int i = 0; i < exp_n; i++) if (got[i] != eds[i]) begin
              failures++; $display("t=%0d list[%0d]=%0d exp %0d (mt %0d q %0d)", t, i, got[i], eds[i], mt, q); break;
            end
          end
        end
        if (stop_reason != STOP_LIMIT) begin
          // the ML vector is always found when the search is not cut short
          checks++;
          if (got.size() == 0 || got[0] != eds[0]) begin failures++; $display("t=%0d ML missed", t); end
        end
      end
      checks++;
      if (got.size() > 0 && longint'(min_ed) != got[0]) begin failures++; $display("min_ed wrong"); end
    end
    checks++;
    if (n_stop[1] == 0 || n_stop[2] == 0 || n_stop[3] == 0 || tot_up == 0 || tot_down == 0 || tot_drop == 0) begin
      failures++; $display("mechanism missing");
    end
    $display("stops: limit %0d empty %0d radius %0d; up-heaps %0d down-heaps %0d C_mem drops %0d",
             n_stop[1], n_stop[2], n_stop[3], tot_up, tot_down, tot_drop);
    $display("average %0d.%0d cycles per iteration", tot_cyc / tot_it, (tot_cyc * 10 / tot_it) % 10);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
