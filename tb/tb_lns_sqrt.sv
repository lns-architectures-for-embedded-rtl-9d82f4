// tb_lns_sqrt: exhaustive check of the LNS square root over all 65536
// words. Expected: zero for the zero code; otherwise a positive result
// whose logarithm is floor(x * 512 / 2) / 512 (the right shift truncates).
module tb_lns_sqrt;
  import lns_tb_pkg::*;
  logic        clk = 0;
  logic [15:0] a, r;
  int checks = 0, failures = 0;

  lns_sqrt dut (.a, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp_r;
    for (int i = 0; i < 65536; i++) begin
      a = 16'(i);
      #1;
      if (is_zero(a)) exp_r = ZERO_W;
      else exp_r = make(0, $rtoi($floor(log_of(a) * 512.0 / 2.0)));
      checks++;
      if (r !== exp_r) begin
        failures++;
        if (failures < 10) $display("FAIL: sqrt(%h) = %h, expected %h", a, r, exp_r);
      end
      if (i % 4096 == 0) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
