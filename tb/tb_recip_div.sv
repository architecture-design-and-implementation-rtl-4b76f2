// tb_recip_div: reciprocals 2**24 / den for random and corner denominators,
// checked against integer division, with the NUM_SH + 1 cycle latency.
module tb_recip_div;
  logic clk = 0, rst_n = 0, start = 0;
  logic [23:0] den; logic done; logic [24:0] q;
  int checks = 0, failures = 0;

  recip_div #(.DEN_W(24), .NUM_SH(24)) dut (.clk, .rst_n, .start, .den, .done, .q);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    den = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      longint e; int lat;
      case (t)
        0: den = 1; 1: den = 2; 2: den = 24'hffffff; 3: den = 3; 4: den = 24'h800000;
        default: den = (t % 3 == 0) ? 24'($urandom_range(1000, 1)) : 24'($urandom);
      endcase
      if (den == 0) den = 7;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      lat = 0;
      while (!done) begin @(negedge clk); lat++; end
      e = (longint'(1) << 24) / longint'(den);
      checks += 2;
      if (longint'(q) != e) begin failures++; $display("den %0d q %0d exp %0d", den, q, e); end
      if (lat != 25) begin failures++; $display("latency %0d", lat); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
