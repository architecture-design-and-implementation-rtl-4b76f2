// tb_part_mem: random store updates (with and without taking S_0) against a
// reference list; checks which nodes are kept under C_mem and C_0, the top
// node, the count, and the up-heap / down-heap / C_mem-drop counters.
module tb_part_mem;
  import mmf_pkg::*;
  localparam int D = 40;
  logic clk = 0, rst_n = 0, clear = 0, upd_valid = 0, pop_top = 0, n0_valid = 0, n1_valid = 0;
  node_t n0, n1, top; ped_t c_mem, c_zero;
  logic upd_ready, top_valid, overflow;
  logic [$clog2(D+1)-1:0] count;
  logic [15:0] n_up, n_down, n_mem_drop;
  int checks = 0, failures = 0, e_up = 0, e_down = 0, e_drop = 0;
  node_t model [$];

  part_mem #(.D_MAX(D)) dut (.clk, .rst_n, .clear, .upd_valid, .pop_top, .n0_valid, .n0, .n1_valid, .n1,
                             .c_mem, .c_zero, .upd_ready, .top, .top_valid, .count, .overflow,
                             .n_up, .n_down, .n_mem_drop);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic node_t rnd_node();
    node_t v;
    v = '0;
    v.d    = ped_t'($urandom_range(1000));
    v.dpar = ped_t'($urandom);
    v.lvl  = LVL_W'($urandom_range(7));
    v.rank = sym_t'($urandom);
    v.x    = symvec_t'($urandom);
    return v;
  endfunction

  initial begin
    n0 = '0; n1 = '0; c_mem = PED_MAX; c_zero = PED_MAX;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      bit k0, k1; int mi;
      n0 = rnd_node(); n1 = rnd_node();
      n0_valid = $urandom_range(3) != 0;
      n1_valid = $urandom_range(3) != 0;
      pop_top  = (model.size() > 0) && ($urandom_range(2) == 0);
      c_mem    = ($urandom_range(2) == 0) ? PED_MAX : ped_t'($urandom_range(1000, 300));
      c_zero   = ($urandom_range(3) == 0) ? ped_t'($urandom_range(1000, 500)) : PED_MAX;
      if (model.size() >= D - 2) begin pop_top = 1; n1_valid = 0; end
      // reference
      k0 = n0_valid && n0.d < c_mem && n0.d < c_zero;
      k1 = n1_valid && n1.d < c_mem && n1.d < c_zero;
      e_drop += int'(n0_valid && !(n0.d < c_mem) && n0.d < c_zero) + int'(n1_valid && !(n1.d < c_mem) && n1.d < c_zero);
      if (pop_top) begin
        // the node at the top is removed (the one with smallest PED)
        mi = 0;
        foreach (model[i]) if (model[i] == top) mi = i;
        checks++;
        if (!top_valid || model[mi] != top) begin failures++; $display("top not in model"); end
        model.delete(mi);
        if (k0 || k1) e_down++; else if (model.size() > 0) e_down++;
        if (k0 && k1) e_up++;
      end else begin
        e_up += int'(k0) + int'(k1);
      end
      if (k0) model.push_back(n0);
      if (k1) model.push_back(n1);
      @(negedge clk); upd_valid = 1;
      @(negedge clk); upd_valid = 0;
      while (!upd_ready) @(negedge clk);
      checks += 2;
      if (int'(count) != model.size()) begin failures++; $display("t=%0d count %0d exp %0d", t, count, model.size()); end
      if (model.size() > 0) begin
        ped_t mn; mn = model[0].d;
        foreach (model[i]) if (model[i].d < mn) mn = model[i].d;
        if (!top_valid || top.d != mn) begin failures++; $display("t=%0d top %0d exp %0d", t, top.d, mn); end
      end else if (top_valid) begin failures++; $display("top_valid on empty"); end
    end
    checks += 3;
    if (int'(n_up) != e_up)         begin failures++; $display("n_up %0d exp %0d", n_up, e_up); end
    if (int'(n_down) != e_down)     begin failures++; $display("n_down %0d exp %0d", n_down, e_down); end
    if (int'(n_mem_drop) != e_drop) begin failures++; $display("drops %0d exp %0d", n_mem_drop, e_drop); end
    $display("ups %0d downs %0d drops %0d", n_up, n_down, n_mem_drop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
