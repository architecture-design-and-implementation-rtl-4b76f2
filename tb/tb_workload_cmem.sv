// tb_workload_cmem: the memory-sphere-radius workloads on the default
// detector (4 x 4 antennas, 15-entry list).
//
// For 16-QAM with dmax = 80, W_R = 2.0 and for 64-QAM with dmax = 150,
// W_R = 2.5, a stream of random channels is detected twice: once without
// the memory radius (only the list radius C_0 limits S) and once with it.
// Reported per configuration: average iterations, up-heap and down-heap
// operations per subcarrier, and nodes discarded by C_mem. Checked: every
// search stays within dmax and never overflows S, the searches without
// C_mem that end before the limit find the exhaustive ML distance, the
// memory radius actually discards nodes, and it lowers the average number
// of heap operations. The average time per iteration must stay within the
// 56 ns (16-QAM) and 68 ns (64-QAM) per iteration that a 250 MHz build of
// this architecture is expected to reach, i.e. 14 and 17 cycles.
module tb_workload_cmem;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  localparam int NCH = 40;
  logic clk = 0, rst_n = 0, start = 0, cmem_en = 0, cmem_clear = 0;
  logic [MTC_W-1:0] mt; logic [QLOG_W-1:0] qlog; logic [7:0] dmax, w_r;
  wmat_t r; wvec_t y; ped_t noise;
  logic ready, search_done, s_overflow, llr_valid, llr_done;
  logic [7:0] iters; stop_e stop_reason; logic [15:0] n_up, n_down, n_mem_drop;
  ped_t c_mem, min_ed; logic [4:0] llr_idx; logic signed [7:0] llr;
  int checks = 0, failures = 0;
  int cycle = 0, cyc_search = 0;
  always @(posedge clk) cycle++;

  mmf_lsd_top dut (.clk, .rst_n, .start, .mt, .qlog, .dmax, .r, .y, .noise, .w_r, .cmem_en,
                   .cmem_clear, .ready, .search_done, .iters, .stop_reason, .n_up, .n_down,
                   .n_mem_drop, .s_overflow, .c_mem, .min_ed, .llr_valid, .llr_idx, .llr, .llr_done);
  always #2ns clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // exhaustive ML distance (depth first, pruned by the best so far)
  longint ml;
  function automatic void ml_dfs(input int lvl, input longint d, input symvec_t x, input int ql);
    longint b, dn;
    if (lvl < 0) begin if (d < ml) ml = d; return; end
    b = ref_b(r, y, x, lvl, 8, ql);
    for (int k = 0; k < (1 << ql); k++) begin
      dn = ped_sat(d + ref_inc(ref_abs_e(b, longint'($signed(r[lvl][lvl])), k, ql)));
      if (dn >= ml) continue;
      x[lvl] = sym_t'(k);
      ml_dfs(lvl - 1, dn, x, ql);
    end
  endfunction

  task automatic detect(input bit use_cmem, output int it, output int up, output int dn, output int drop,
                        output stop_e st);
    cmem_en = use_cmem;
    while (!ready) @(negedge clk);
    start = 1;
    cyc_search = cycle;
    @(negedge clk);
    start = 0;
    while (!search_done) @(negedge clk);
    cyc_search = cycle - cyc_search;
    it = int'(iters); up = int'(n_up); dn = int'(n_down); drop = int'(n_mem_drop); st = stop_reason;
    checks += 2;
    if (int'(iters) > int'(dmax)) begin failures++; $display("iterations over dmax"); end
    if (s_overflow) begin failures++; $display("S overflowed"); end
  endtask

  initial begin
    mt = 8; qlog = 3; dmax = 150; w_r = 40; r = '0; y = '0; noise = 1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cfg = 0; cfg < 2; cfg++) begin
      int s_it [2], s_up [2], s_dn [2], s_drop [2], s_cyc [2];
      s_cyc = '{0, 0};
      s_it = '{0, 0}; s_up = '{0, 0}; s_dn = '{0, 0}; s_drop = '{0, 0};
      qlog = (cfg == 0) ? 2'd2 : 2'd3;
      dmax = (cfg == 0) ? 8'd80 : 8'd150;
      w_r  = (cfg == 0) ? 8'd32 : 8'd40;      // 2.0 and 2.5
      cmem_clear = 1; @(negedge clk); cmem_clear = 0;
      for (int c = 0; c < NCH; c++) begin
        symvec_t xt;
        gen_channel(8, int'(qlog), 250, r, y, xt);
        for (int m = 0; m < 2; m++) begin
          int it, up, dn, drop; stop_e st;
          detect(m == 1, it, up, dn, drop, st);
          s_it[m] += it; s_cyc[m] += cyc_search; s_up[m] += up; s_dn[m] += dn; s_drop[m] += drop;
          if (m == 0 && st != STOP_LIMIT) begin
            ml = longint'(PED_MAX);
            ml_dfs(7, 0, '0, int'(qlog));
            checks++;
            if (longint'(min_ed) != ml) begin failures++; $display("cfg %0d ch %0d: ML %0d exp %0d", cfg, c, min_ed, ml); end
          end
        end
      end
      $display("%0d-QAM dmax %0d: without C_mem D_avg %0d.%02d up %0d.%02d down %0d.%02d | W_R %0d/16: D_avg %0d.%02d up %0d.%02d down %0d.%02d, %0d nodes discarded",
               (cfg == 0) ? 16 : 64, dmax,
               s_it[0] / NCH, (s_it[0] * 100 / NCH) % 100, s_up[0] / NCH, (s_up[0] * 100 / NCH) % 100,
               s_dn[0] / NCH, (s_dn[0] * 100 / NCH) % 100, w_r,
               s_it[1] / NCH, (s_it[1] * 100 / NCH) % 100, s_up[1] / NCH, (s_up[1] * 100 / NCH) % 100,
               s_dn[1] / NCH, (s_dn[1] * 100 / NCH) % 100, s_drop[1]);
      for (int m = 0; m < 2; m++)
        $display("  %s C_mem: %0d cycles per search (%0d.%01d per iteration), %0d Mbit/s at 250 MHz",
                 (m != 0) ? "with" : "without", s_cyc[m] / NCH, s_cyc[m] / s_it[m], (s_cyc[m] * 10 / s_it[m]) % 10,
                 8 * int'(qlog) * 250 * NCH / s_cyc[m]);
      for (int m = 0; m < 2; m++) begin
        checks++;
        if (s_cyc[m] > ((cfg == 0) ? 14 : 17) * s_it[m]) begin
          failures++; $display("too slow: %0d cycles for %0d iterations", s_cyc[m], s_it[m]);
        end
      end
      checks += 2;
      if (s_drop[1] == 0) begin failures++; $display("C_mem never discarded a node"); end
      if (s_up[1] + s_dn[1] >= s_up[0] + s_dn[0]) begin failures++; $display("C_mem did not reduce heap operations"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
