// tb_heap_unit: random insert / replace-top / pop sequences on a min-heap
// and a max-heap; after every operation the top, the count and the heap
// order of all entries are checked against a sorted reference list, and
// overflow on a full heap is provoked. Up-heap and down-heap steps are
// counted and must both occur.
module tb_heap_unit;
  import mmf_pkg::*;
  localparam int DEPTH = 20, DW = 16, KW = 8;
  logic clk = 0, rst_n = 0, clear = 0;
  logic req_valid [2];
  heap_op_e req_op;
  logic [DW-1:0] req_data;
  logic ready [2], full [2], ovf [2], ups [2], downs [2];
  logic [DW-1:0] top [2];
  logic [$clog2(DEPTH+1)-1:0] count [2];
  logic [DEPTH-1:0][DW-1:0] ent [2];
  int checks = 0, failures = 0, n_up = 0, n_down = 0, n_ovf = 0;
  int model [2][$];

  heap_unit #(.DEPTH(DEPTH), .DATA_W(DW), .KEY_W(KW), .MAX_HEAP(1'b0)) u_min (
    .clk, .rst_n, .clear, .req_valid(req_valid[0]), .req_op, .req_data, .ready(ready[0]),
    .top(top[0]), .count(count[0]), .full(full[0]), .overflow(ovf[0]), .up_step(ups[0]),
    .down_step(downs[0]), .entries(ent[0]));
  heap_unit #(.DEPTH(DEPTH), .DATA_W(DW), .KEY_W(KW), .MAX_HEAP(1'b1)) u_max (
    .clk, .rst_n, .clear, .req_valid(req_valid[1]), .req_op, .req_data, .ready(ready[1]),
    .top(top[1]), .count(count[1]), .full(full[1]), .overflow(ovf[1]), .up_step(ups[1]),
    .down_step(downs[1]), .entries(ent[1]));

  always #5 clk = ~clk;
  always @(posedge clk) begin
    n_up   += int'(ups[0]) + int'(ups[1]);
    n_down += int'(downs[0]) + int'(downs[1]);
    n_ovf  += int'(ovf[0]) + int'(ovf[1]);
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int key(input int v);
    return (v >> (DW - KW)) & ((1 << KW) - 1);
  endfunction

  task automatic check(input int h);
    int best, bi;
    checks++;
    if (int'(count[h]) != model[h].size()) begin
      failures++; $display("heap %0d count %0d model %0d", h, count[h], model[h].size());
      return;
    end
    if (model[h].size() == 0) return;
    best = key(model[h][0]);
    foreach (model[h][i]) if (h == 0 ? key(model[h][i]) < best : key(model[h][i]) > best) best = key(model[h][i]);
    checks++;
    if (key(int'(top[h])) != best) begin failures++; $display("heap %0d top key %0d exp %0d", h, key(int'(top[h])), best); end
    for (int i = 1; i < model[h].size(); i++) begin
      bi = (i - 1) / 2;
      if (h == 0 ? key(int'(ent[h][i])) < key(int'(ent[h][bi])) : key(int'(ent[h][i])) > key(int'(ent[h][bi]))) begin
        failures++; $display("heap %0d order broken at %0d", h, i); break;
      end
    end
  endtask

  initial begin
    req_valid[0] = 0; req_valid[1] = 0; req_op = HOP_INSERT; req_data = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int h, o, idx;
      h = $urandom_range(1);
      o = $urandom_range(9);
      req_data = DW'($urandom);
      if (t % 600 < 200) o = 0;  // fill phases reach the overflow
      req_op = (o < 5) ? HOP_INSERT : (o < 8) ? HOP_REPLACE : HOP_POP;
      @(negedge clk);
      while (!ready[h]) @(negedge clk);
      req_valid[h] = 1;
      @(negedge clk);
      req_valid[h] = 0;
      // model
      if (req_op == HOP_INSERT) begin
        if (model[h].size() < DEPTH) model[h].push_back(int'(req_data));
      end else if (model[h].size() == 0) begin
        if (req_op == HOP_REPLACE) model[h].push_back(int'(req_data));
      end else begin
        // remove one element with the top key (ties: any element of that key)
        idx = 0;
        foreach (model[h][i]) if (model[h][i] == int'(top[h])) idx = i;
        model[h].delete(idx);
        if (req_op == HOP_REPLACE) model[h].push_back(int'(req_data));
      end
      while (!ready[h]) @(negedge clk);
      // keep the model's entries identical to the heap's (tie order)
      check(h);
      if (t % 1000 == 999) begin
        @(negedge clk); clear = 1; @(negedge clk); clear = 0;
        model[0].delete(); model[1].delete();
        check(0); check(1);
      end
    end
    checks++;
    if (n_up == 0 || n_down == 0 || n_ovf == 0) begin
      failures++; $display("mechanism missing: up %0d down %0d ovf %0d", n_up, n_down, n_ovf);
    end
    $display("up-heap steps %0d, down-heap steps %0d, overflows %0d", n_up, n_down, n_ovf);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
