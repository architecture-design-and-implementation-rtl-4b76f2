// tb_cmem_unit: random minimum-ED samples; the running average and
// C_mem = w_r * avg / 16 are checked against an integer model, including
// the disabled state, empty-list samples, saturation and clear.
module tb_cmem_unit;
  import mmf_pkg::*;
  logic clk = 0, rst_n = 0, clear = 0, enable = 1, upd = 0;
  logic [7:0] w_r; ped_t min_ed, c_mem, avg;
  int checks = 0, failures = 0;
  longint m_avg; bit have;

  cmem_unit dut (.clk, .rst_n, .clear, .enable, .w_r, .upd, .min_ed, .c_mem, .avg);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint e;
    w_r = 8'd40; min_ed = 0; have = 0; m_avg = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      w_r    = (t % 2 != 0) ? 8'd40 : 8'd32;
      enable = (t % 13) != 5;
      min_ed = (t % 17 == 3) ? PED_MAX : ped_t'($urandom_range(20000));
      if (t % 400 == 350) min_ed = PED_MAX - 1;   // drives C_mem into saturation
      @(negedge clk); upd = 1;
      @(negedge clk); upd = 0;
      if (min_ed != PED_MAX) begin
        if (!have) m_avg = longint'(min_ed);
        else m_avg = m_avg + ((longint'(min_ed) - m_avg) >>> 4);
        have = 1;
      end
      @(negedge clk);
      e = (m_avg * longint'(w_r)) >>> 4;
      if (e > longint'(PED_MAX) || !enable || !have) e = longint'(PED_MAX);
      checks += 2;
      if (longint'(avg) != m_avg) begin failures++; $display("t=%0d avg %0d exp %0d", t, avg, m_avg); end
      if (longint'(c_mem) != e) begin failures++; $display("t=%0d c_mem %0d exp %0d", t, c_mem, e); end
      if (t % 500 == 499) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0; have = 0; m_avg = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
