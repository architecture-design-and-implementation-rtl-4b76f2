// tb_llr_unit: random candidate lists, constellations and noise variances;
// every LLR is checked against the max-log-MAP formula computed from the
// list (Gray-mapped bits, scaled EDs, clipping), as are the bit order, the
// number of LLRs and the total latency
// INV_SH + ceil(N_CAND/2) + mt*qlog + 3 cycles. Every other vector has its
// reciprocal loaded ahead with noise_load, after which the noise input is
// scrambled: the LLRs must still use the loaded value, and a vector whose
// reciprocal is ready must finish in ceil(N_CAND/2) + mt*qlog cycles.
// Clipping and a bit value missing from the list must both occur.
module tb_llr_unit;
  import mmf_pkg::*;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, start = 0, noise_load = 0, div_wait;
  cand_t [N-1:0] list; logic [$clog2(N+1)-1:0] count; logic [MTC_W-1:0] mt;
  logic [QLOG_W-1:0] qlog; ped_t noise, nref;
  logic busy, llr_valid, done; logic [4:0] llr_idx; logic signed [7:0] llr;
  int checks = 0, failures = 0, n_clip = 0, n_missing = 0;

  llr_unit #(.N_CAND(N)) dut (.clk, .rst_n, .start, .list, .count, .mt, .qlog, .noise, .noise_load, .div_wait, .busy,
                              .llr_valid, .llr_idx, .llr, .done);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint scaled(input ped_t d);
    longint inv, p;
    inv = (longint'(1) << 24) / longint'(nref);
    p = (longint'(d) * inv) >>> 20;
    return p > 4095 ? 4095 : p;
  endfunction

  function automatic int exp_llr(input int k);
    int lay, bp; longint m0, m1; bit h0, h1; longint dlt;
    lay = k / int'(qlog);
    bp  = int'(qlog) - 1 - (k % int'(qlog));
    h0 = 0; h1 = 0; m0 = 0; m1 = 0;
    for (int m = 0; m < int'(count); m++) begin
      int s, g;
      s = int'(list[m].x[lay]);
      g = s ^ (s >> 1);
      if (((g >> bp) & 1) != 0) begin if (!h1 || scaled(list[m].d) < m1) m1 = scaled(list[m].d); h1 = 1; end
      else               begin if (!h0 || scaled(list[m].d) < m0) m0 = scaled(list[m].d); h0 = 1; end
    end
    if (!h0 && !h1) return 0;
    if (!h1) begin n_missing++; return -127; end
    if (!h0) begin n_missing++; return 127; end
    dlt = m0 - m1;
    if (dlt > 127 || dlt < -127) n_clip++;
    return dlt > 127 ? 127 : (dlt < -127 ? -127 : int'(dlt));
  endfunction

  initial begin
    list = '0; count = 0; mt = 8; qlog = 3; noise = 256;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      int k, lat, nb, gap; bit pre;
      qlog  = QLOG_W'($urandom_range(3, 1));
      mt    = MTC_W'($urandom_range(8, 1));
      count = ($clog2(N+1))'($urandom_range(N, (t % 20 == 0) ? 1 : 4));
      noise = ped_t'($urandom_range(2000, 20));
      nref  = noise;
      for (int m = 0; m < N; m++) begin
        list[m].d = ped_t'($urandom_range((t % 4 == 0) ? 40000 : 3000));
        for (int i = 0; i < MT; i++) list[m].x[i] = sym_t'($urandom_range((1 << qlog) - 1));
      end
      nb = int'(mt) * int'(qlog);
      pre = (t % 2 == 1);
      gap = (t % 4 == 1) ? 30 : int'($urandom_range(12));
      if (pre) begin
        @(negedge clk); noise_load = 1;
        @(negedge clk); noise_load = 0;
        noise = ped_t'($urandom_range(2000, 20));
        repeat (gap) @(negedge clk);
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0; k = 0;
      while (1) begin
        @(negedge clk); lat++;
        if (llr_valid) begin
          int e;
          e = exp_llr(k);
          checks++;
          if (int'(llr_idx) != k || int'(llr) != e) begin
            failures++; $display("t=%0d bit %0d (idx %0d): llr %0d exp %0d", t, k, llr_idx, llr, e);
          end
          k++;
        end
        if (done) break;
      end
      checks += 2;
      if (k != nb) begin failures++; $display("t=%0d %0d LLRs, exp %0d", t, k, nb); end
      if (!pre && lat != 24 + (N + 1) / 2 + nb + 3) begin failures++; $display("latency %0d", lat); end
      if (pre && gap >= 26 && lat != (N + 1) / 2 + nb) begin
        failures++; $display("preloaded latency %0d nb %0d", lat, nb);
      end
      if (pre && gap < 26 && (lat > 24 + (N + 1) / 2 + nb + 3 || lat < (N + 1) / 2 + nb)) begin
        failures++; $display("overlapped latency %0d (gap %0d)", lat, gap);
      end
      @(negedge clk);
    end
    checks++;
    if (n_clip == 0 || n_missing == 0) begin failures++; $display("clip %0d missing %0d", n_clip, n_missing); end
    $display("clipped %0d, one-sided %0d", n_clip, n_missing);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
