// tb_b_calc: random layers, symbol vectors and constellations; b checked
// against the reference sum and the latency against
// max(1, ceil((mt-1-row)/N_MUL)) cycles.
module tb_b_calc;
  import mmf_pkg::*;
  import mmf_ref_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic [LVL_W-1:0] row;
  logic [MTC_W-1:0] mt;
  logic [QLOG_W-1:0] qlog;
  wmat_t r; wvec_t y; symvec_t x;
  logic done; word_t b;
  int checks = 0, failures = 0;

  b_calc #(.N_MUL(2)) dut (.clk, .rst_n, .start, .row, .mt, .qlog, .rrow(r[row[2:0]]),
                           .yi(y[row[2:0]]), .x, .done, .b);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    row = 0; mt = 8; qlog = 3; r = '0; y = '0; x = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      symvec_t xt;
      int lat, exp_lat, terms;
      qlog = QLOG_W'($urandom_range(3, 1));
      mt   = MTC_W'($urandom_range(8, 1));
      row  = LVL_W'($urandom_range(int'(mt) - 1));
      gen_channel(int'(mt), int'(qlog), 200, r, y, xt);
      x = xt;
      if (t % 50 == 7) begin  // drive the saturation
        for (int j = 0; j < 8; j++) r[row[2:0]][j] = (t % 100 == 7) ? 15'sh3fff : -15'sh3fff;
        for (int j = 0; j < 8; j++) x[j] = (1 << qlog) - 1;
      end
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      terms   = int'(mt) - 1 - int'(row);
      exp_lat = terms <= 0 ? 1 : (terms + 1) / 2;
      checks += 2;
      if (longint'(b) != ref_b(r, y, x, int'(row), int'(mt), int'(qlog))) begin
        failures++;
        $display("b mismatch t=%0d row=%0d mt=%0d got %0d exp %0d", t, row, mt, b,
                 ref_b(r, y, x, int'(row), int'(mt), int'(qlog)));
      end
      if (lat != exp_lat) begin
        failures++;
        $display("latency t=%0d got %0d exp %0d", t, lat, exp_lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
