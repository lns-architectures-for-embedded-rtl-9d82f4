// tb_lns_f2_table: exhaustive check of the F2 cotransformation table.
// Every entry must equal log2(1 - 2^(z_l/512 - 1/8)) rounded to 2^-11
// (half a unit of error, plus a small allowance for real rounding).
module tb_lns_f2_table;
  logic        clk = 0;
  logic [5:0]  zl;
  logic signed [18:0] f2;
  int checks = 0, failures = 0;

  lns_f2_table dut (.zl, .f2);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real u, ref_v, got;
    for (int l = 0; l < 64; l++) begin
      zl = 6'(l);
      @(posedge clk);
      u     = real'(l) / 512.0 - 0.125;
      ref_v = $ln(1.0 - $pow(2.0, u)) / $ln(2.0);
      got   = real'(f2) / 2048.0;
      checks++;
      if ((got - ref_v) > 0.501 / 2048.0 || (ref_v - got) > 0.501 / 2048.0) begin
        failures++;
        $display("FAIL: F2[%0d] = %f, expected %f", l, got, ref_v);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
