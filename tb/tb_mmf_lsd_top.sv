// tb_mmf_lsd_top: end-to-end test of the soft-output detector at its
// default parameters (D_MAX = 150, N_CAND = 15, 64-QAM, 4 x 4 antennas).
//
// A stream of subcarriers with random channels is detected back to back in
// 16- and 64-QAM with 8 real layers and in smaller configurations. A
// reference exhaustive list search (depth-first over all vectors, pruned by
// the 15th best ED) gives the exact 15-best list; whenever the detector's
// search ends before its iteration limit and C_mem is off, every LLR must
// equal the max-log-MAP LLR of that exact list. LLRs of searches cut by
// the iteration limit or C_mem are checked for count, order and range, and
// the hard decisions of low-noise subcarriers must equal the transmitted
// bits. C_mem is checked against the running-average model. Each mechanism
// (the three stop reasons, up- and down-heaps, C_mem discards, a constellation
// switch, LLR clipping, and the LLR unit working while the next search runs)
// must occur at least once. The noise reciprocal is computed during the
// search, so once a search of more than 26 cycles is done its LLRs must
// follow within ceil(N_CAND/2) + mt*qlog + 2 cycles (counted from the later
// of search_done and the previous vector's last LLR). Throughput at 250 MHz
// is reported.
module tb_mmf_lsd_top;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  localparam int N = 15;
  localparam int NS = 24;
  logic clk = 0, rst_n = 0, start = 0, cmem_en = 0, cmem_clear = 0;
  logic [MTC_W-1:0] mt; logic [QLOG_W-1:0] qlog; logic [7:0] dmax, w_r;
  wmat_t r; wvec_t y; ped_t noise;
  logic ready, search_done, s_overflow, llr_valid, llr_done;
  logic [7:0] iters; stop_e stop_reason; logic [15:0] n_up, n_down, n_mem_drop;
  ped_t c_mem, min_ed; logic [4:0] llr_idx; logic signed [7:0] llr;
  int checks = 0, failures = 0;

  mmf_lsd_top dut (.clk, .rst_n, .start, .mt, .qlog, .dmax, .r, .y, .noise, .w_r, .cmem_en,
                   .cmem_clear, .ready, .search_done, .iters, .stop_reason, .n_up, .n_down,
                   .n_mem_drop, .s_overflow, .c_mem, .min_ed, .llr_valid, .llr_idx, .llr, .llr_done);
  always #2ns clk = ~clk;  // 250 MHz

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // per-subcarrier records
  int     e_llr [NS][32];
  int     g_llr [NS][32];
  int     g_n   [NS];
  int     nbits [NS];
  bit     exact [NS];
  bit     lownoise [NS];
  symvec_t tx [NS];
  int     qlg [NS];
  stop_e  stp [NS];
  int     it_s [NS];
  int     n_stop [4] = '{0, 0, 0, 0};
  int     n_overlap = 0, n_clip = 0, n_switch = 0, s_done = 0, s_llr = 0;
  longint tot_up = 0, tot_down = 0, tot_drop = 0;

  // reference exhaustive list search
  longint best_d [N];
  symvec_t best_x [N];
  int nbest;
  function automatic void ref_insert(input longint d, input symvec_t x);
    int p;
    if (nbest == N && d >= best_d[N-1]) return;
    p = (nbest < N) ? nbest : N - 1;
    while (p > 0 && best_d[p-1] > d) begin best_d[p] = best_d[p-1]; best_x[p] = best_x[p-1]; p--; end
    best_d[p] = d; best_x[p] = x;
    if (nbest < N) nbest++;
  endfunction
  function automatic void ref_dfs(input int lvl, input longint d, input symvec_t x, input int m, input int ql);
    longint b, dn;
    if (lvl < 0) begin ref_insert(d, x); return; end
    b = ref_b(r, y, x, lvl, m, ql);
    for (int k = 0; k < (1 << ql); k++) begin
      dn = ped_sat(d + ref_inc(ref_abs_e(b, longint'($signed(r[lvl][lvl])), k, ql)));
      if (nbest == N && dn >= best_d[N-1]) continue;
      x[lvl] = sym_t'(k);
      ref_dfs(lvl - 1, dn, x, m, ql);
    end
  endfunction

  function automatic longint scaled(input longint d);
    longint inv, p;
    inv = (longint'(1) << 24) / longint'(noise);
    p = (d * inv) >>> 20;
    return p > 4095 ? 4095 : p;
  endfunction

  // max-log LLRs of the reference list
  function automatic void ref_llrs(input int s, input int m, input int ql);
    for (int k = 0; k < m * ql; k++) begin
      int lay, bp; longint m0, m1; bit h0, h1; longint dl;
      lay = k / ql; bp = ql - 1 - (k % ql);
      h0 = 0; h1 = 0; m0 = 0; m1 = 0;
      for (int i = 0; i < nbest; i++) begin
        int sv, g;
        sv = int'(best_x[i][lay]); g = sv ^ (sv >> 1);
        if (((g >> bp) & 1) != 0) begin if (!h1 || scaled(best_d[i]) < m1) m1 = scaled(best_d[i]); h1 = 1; end
        else               begin if (!h0 || scaled(best_d[i]) < m0) m0 = scaled(best_d[i]); h0 = 1; end
      end
      dl = !h1 ? -127 : !h0 ? 127 : m0 - m1;
      e_llr[s][k] = dl > 127 ? 127 : dl < -127 ? -127 : int'(dl);
    end
  endfunction

  int cycle = 0;
  always @(negedge clk) cycle++;

  // monitors
  int st_c [NS], sd_c [NS], ld_c [NS];
  int n_st = 0;
  always @(posedge clk) if (rst_n) begin
    if (start && ready && n_st < NS) begin st_c[n_st] = cycle; n_st++; end
    if (llr_valid && llr_done) ld_c[s_llr] = cycle;
    if (search_done) begin
      sd_c[s_done] = cycle;
      stp[s_done]  <= stop_reason;
      it_s[s_done] = int'(iters);
      n_stop[int'(stop_reason)]++;
      tot_up += longint'(n_up); tot_down += longint'(n_down); tot_drop += longint'(n_mem_drop);
      s_done++;
    end
    if (llr_valid) begin
      if (dut.u_alg.busy) n_overlap++;
      g_llr[s_llr][g_n[s_llr]] = int'(llr);
      checks++;
      if (int'(llr_idx) != g_n[s_llr]) begin failures++; $display("s=%0d LLR order", s_llr); end
      if (llr == 127 || llr == -127) n_clip++;
      g_n[s_llr]++;
      if (llr_done) s_llr++;
    end
  end

  longint m_avg = 0; bit have = 0;

  initial begin
    int cyc0, cyc1, bits_total;
    mt = 8; qlog = 3; dmax = 150; r = '0; y = '0; noise = 256; w_r = 8'd40;
    foreach (g_n[i]) g_n[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    bits_total = 0;
    @(negedge clk);
    cyc0 = cycle;
    for (int s = 0; s < NS; s++) begin
      symvec_t xt; int m, ql, amp;
      // configuration schedule
      case (s % 6)
        0, 1: begin m = 8; ql = 3; end      // 4x4 64-QAM
        2, 3: begin m = 8; ql = 2; end      // 4x4 16-QAM
        4:    begin m = 4; ql = 3; end      // 2x2 64-QAM
        default: begin m = 2; ql = 1; end   // 1x1 4-QAM (tree smaller than the list)
      endcase
      amp = (s % 4 == 1) ? 900 : 60;
      lownoise[s] = (amp == 60);
      gen_channel(m, ql, amp, r, y, xt);
      tx[s]  = xt; qlg[s] = ql; nbits[s] = m * ql;
      bits_total += m * ql;
      cmem_en = (s >= 12) && (s % 3 != 0);
      dmax    = (s == 7 || s == 13) ? 8'd12 : 8'd150;
      noise   = ped_t'(amp == 60 ? 400 : 3000);
      // reference
      nbest = 0;
      ref_dfs(m - 1, 0, '0, m, ql);
      ref_llrs(s, m, ql);
      exact[s] = !cmem_en;
      while (!ready) @(negedge clk);
      if (s > 0 && qlog != QLOG_W'(ql)) n_switch++;
      mt = MTC_W'(m); qlog = QLOG_W'(ql);
      start = 1;
      @(negedge clk);
      start = 0;
      while (s_done <= s) @(negedge clk);
      // C_mem model: updated with the list minimum after each search
      @(negedge clk); @(negedge clk);
      if (longint'(min_ed) != longint'(PED_MAX)) begin
        if (!have) m_avg = longint'(min_ed); else m_avg = m_avg + ((longint'(min_ed) - m_avg) >>> 4);
        have = 1;
      end
      checks++;
      begin
        longint e;
        e = (m_avg * 40) >>> 4;
        if (!cmem_en || !have || e > longint'(PED_MAX)) e = longint'(PED_MAX);
        if (longint'(c_mem) != e) begin failures++; $display("s=%0d c_mem %0d exp %0d", s, c_mem, e); end
      end
      checks++;
      if (stp[s] != STOP_LIMIT && longint'(min_ed) != best_d[0]) begin
        failures++; $display("s=%0d ML ED %0d exp %0d", s, min_ed, best_d[0]);
      end
    end
    while (s_llr < NS) @(negedge clk);
    cyc1 = cycle;
    for (int s = 0; s < NS; s++) begin
      int t0;
      t0 = (s > 0 && ld_c[s-1] > sd_c[s]) ? ld_c[s-1] : sd_c[s];
      if (sd_c[s] - st_c[s] > 26) begin
        checks++;
        if (ld_c[s] - t0 > (N + 1) / 2 + nbits[s] + 2) begin
          failures++; $display("s=%0d LLR latency %0d", s, ld_c[s] - t0);
        end
      end
      checks++;
      if (g_n[s] != nbits[s]) begin failures++; $display("s=%0d %0d LLRs exp %0d", s, g_n[s], nbits[s]); continue; end
      if (exact[s] && stp[s] != STOP_LIMIT) begin
        for (int k = 0; k < nbits[s]; k++) begin
          checks++;
          if (g_llr[s][k] != e_llr[s][k]) begin
            failures++; $display("s=%0d bit %0d LLR %0d exp %0d", s, k, g_llr[s][k], e_llr[s][k]);
          end
        end
      end
      if (lownoise[s] && stp[s] != STOP_LIMIT) begin
        // hard decisions equal the transmitted Gray bits
        for (int k = 0; k < nbits[s]; k++) begin
          int lay, bp, sv, g;
          lay = k / qlg[s]; bp = qlg[s] - 1 - (k % qlg[s]);
          sv = int'(tx[s][lay]); g = sv ^ (sv >> 1);
          checks++;
          if ((g_llr[s][k] > 0) != bit'((g >> bp) & 1)) begin
            failures++; $display("s=%0d bit %0d hard decision wrong (LLR %0d)", s, k, g_llr[s][k]);
          end
        end
      end
    end
    checks++;
    if (n_stop[1] == 0 || n_stop[2] == 0 || n_stop[3] == 0 || tot_up == 0 || tot_down == 0 ||
        tot_drop == 0 || n_switch == 0 || n_clip == 0 || n_overlap == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("stops: limit %0d empty %0d radius %0d; up-heaps %0d down-heaps %0d C_mem drops %0d",
             n_stop[1], n_stop[2], n_stop[3], tot_up, tot_down, tot_drop);
    $display("constellation switches %0d, clipped LLRs %0d, LLR cycles overlapping a search %0d",
             n_switch, n_clip, n_overlap);
    $display("%0d subcarriers, %0d bits in %0d cycles: %0d Mbit/s at 250 MHz", NS, bits_total,
             cyc1 - cyc0, bits_total * 250 / (cyc1 - cyc0));
    for (int s = 0; s < NS; s++) $write("%0d ", it_s[s]);
    $display("iterations per subcarrier");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
