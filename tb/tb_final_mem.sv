// tb_final_mem: random complete candidates are offered; the list must always
// hold the N_CAND smallest EDs offered since the last clear, C_0 must be the
// largest listed ED once full (all ones before), min_d the smallest, and
// rejections must be signalled.
module tb_final_mem;
  import mmf_pkg::*;
  localparam int N = 15;
  logic clk = 0, rst_n = 0, clear = 0, leaf_valid = 0;
  cand_t leaf; logic ready, rejected; ped_t c_zero, min_d;
  logic [$clog2(N+1)-1:0] count;
  cand_t [N-1:0] entries;
  int checks = 0, failures = 0, n_rej = 0, e_rej = 0, n_repl = 0;
  int offered [$];

  final_mem #(.N_CAND(N)) dut (.clk, .rst_n, .clear, .leaf_valid, .leaf, .ready, .c_zero, .min_d,
                               .count, .entries, .rejected);
  always #5 clk = ~clk;
  always @(posedge clk) n_rej += int'(rejected);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    leaf = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1500; t++) begin
      int exp_n, got [$];
      got.delete();
      if (t % 300 == 0) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0;
        offered.delete();
      end
      leaf.d = ped_t'($urandom_range(5000));
      leaf.x = symvec_t'($urandom);
      if (int'(count) == N) begin
        if (!(leaf.d < c_zero)) e_rej++; else n_repl++;
      end
      offered.push_back(int'(leaf.d));
      @(negedge clk); leaf_valid = 1;
      @(negedge clk); leaf_valid = 0;
      while (!ready) @(negedge clk);
      offered.sort();
      exp_n = offered.size() < N ? offered.size() : N;
      for (int i = 0; i < int'(count); i++) got.push_back(int'(entries[i].d));
      got.sort();
      checks += 4;
      if (int'(count) != exp_n) begin failures++; $display("count %0d exp %0d", count, exp_n); end
      else for (int i = 0; i < exp_n; i++)
        if (got[i] != offered[i]) begin failures++; $display("t=%0d list differs at %0d", t, i); break; end
      if (longint'(min_d) != longint'(offered[0])) begin failures++; $display("min_d %0d exp %0d", min_d, offered[0]); end
      if (exp_n == N ? int'(c_zero) != offered[N-1] : c_zero != PED_MAX) begin
        failures++; $display("c_zero %0d", c_zero);
      end
    end
    repeat (3) @(negedge clk);
    checks += 2;
    if (n_rej != e_rej) begin failures++; $display("rejections %0d exp %0d", n_rej, e_rej); end
    if (n_rej == 0 || n_repl == 0) begin failures++; $display("replace/reject not exercised"); end
    $display("replacements %0d rejections %0d", n_repl, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
