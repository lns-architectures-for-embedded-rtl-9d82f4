// tb_lns_f1_table: exhaustive check of the F1 cotransformation table.
// Entry h stands for z_h = h/8 - 16; it must equal log2(2^v - 1) with
// v = -z_h - 1/8, rounded to 2^-11. The last entry (v = 0, minus infinity)
// must hold the stand-in value -2^K = -64.
module tb_lns_f1_table;
  logic        clk = 0;
  logic [6:0]  zh;
  logic signed [18:0] f1;
  int checks = 0, failures = 0;

  lns_f1_table dut (.zh, .f1);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real v, ref_v, got;
    for (int h = 0; h < 128; h++) begin
      zh = 7'(h);
      @(posedge clk);
      v   = 16.0 - real'(h + 1) / 8.0;
      got = real'(f1) / 2048.0;
      checks++;
      if (h == 127) begin
        if (got != -64.0) begin
          failures++;
          $display("FAIL: F1[127] = %f, expected -64", got);
        end
      end else begin
        ref_v = $ln($pow(2.0, v) - 1.0) / $ln(2.0);
        if ((got - ref_v) > 0.501 / 2048.0 || (ref_v - got) > 0.501 / 2048.0) begin
          failures++;
          $display("FAIL: F1[%0d] = %f, expected %f", h, got, ref_v);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
