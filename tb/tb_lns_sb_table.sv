// tb_lns_sb_table: sweep of the bipartite s_b unit.
// Every argument w from -20 to +20 (units of 2^-11) is applied and the
// output compared with log2(1 + 2^w). The bipartite approximation is
// required to stay within 1.5 units of 2^-11. Arguments above 0 exercise the
// folding s_b(w) = w + s_b(-w); arguments below -16 the zero region.
module tb_lns_sb_table;
  logic        clk = 0;
  logic signed [18:0] w, s;
  int checks = 0, failures = 0;
  int n_fold = 0, n_far = 0;
  real max_err = 0.0;

  lns_sb_table dut (.w, .s);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, ref_v, got, e;
    for (int i = -40960; i <= 40960; i += 1) begin
      w = 19'(i);
      #1;
      x     = real'(i) / 2048.0;
      ref_v = $ln(1.0 + $pow(2.0, x)) / $ln(2.0);
      got   = real'(s) / 2048.0;
      e     = (got > ref_v ? got - ref_v : ref_v - got) * 2048.0;
      if (e > max_err) max_err = e;
      if (i > 0) n_fold++;
      if (i < -32768) n_far++;
      checks++;
      if (e > 1.5) begin
        failures++;
        if (failures < 10) $display("FAIL: s_b(%f) = %f, expected %f", x, got, ref_v);
      end
      if (i % 8192 == 0) @(posedge clk);
    end
    $display("max error %f units of 2^-11, folded %0d, beyond domain %0d", max_err, n_fold, n_far);
    checks++;
    if (n_fold == 0 || n_far == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
