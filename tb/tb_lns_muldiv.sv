// tb_lns_muldiv: self-checking testbench for the LNS multiplier/divider.
// Random and directed operands; the expected logarithm is x_a + x_b
// (multiply) or x_a - x_b (divide) computed in real arithmetic, with
// saturation at 32 and flush to zero at -32, zero operands, and division
// by zero giving the largest magnitude. Overflow, underflow, zero operands
// and division by zero are each counted and must all occur.
module tb_lns_muldiv;
  import lns_tb_pkg::*;
  logic        clk = 0;
  logic [15:0] a, b, r;
  logic        div;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_unf = 0, n_zero = 0, n_divz = 0;

  lns_muldiv dut (.a, .b, .div, .r);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [15:0] x, input logic [15:0] y, input bit d);
    logic [15:0] exp_r;
    real l;
    bit  s;
    a = x; b = y; div = d;
    #1;
    s = x[15] ^ y[15];
    l = d ? log_of(x) - log_of(y) : log_of(x) + log_of(y);
    if (is_zero(x) || (is_zero(y) && !d)) begin exp_r = ZERO_W; n_zero++; end
    else if (is_zero(y))        begin exp_r = {s, 15'h3fff}; n_divz++; end
    else if (l > XMAX)          begin exp_r = {s, 15'h3fff}; n_ovf++; end
    else if (l < XMIN)          begin exp_r = ZERO_W; n_unf++; end
    else                        exp_r = make(s, $rtoi(l * 512.0));
    checks++;
    if (r !== exp_r) begin
      failures++;
      if (failures < 10) $display("FAIL: %h %s %h = %h, expected %h", x, d ? "/" : "*", y, r, exp_r);
    end
  endtask

  initial begin
    check(ZERO_W, make(0, 100), 0);
    check(make(1, 100), ZERO_W, 0);
    check(make(1, 100), ZERO_W, 1);
    check(ZERO_W, make(0, 100), 1);
    check(make(0, 16383), make(1, 1), 0);
    check(make(0, 16383), make(1, -1), 1);
    check(make(0, -16383), make(1, -1), 0);
    check(make(0, -16383), make(1, 1), 1);
    check(make(0, 8192), make(1, 8191), 0);
    for (int i = 0; i < 50000; i++) begin
      check(rand_word(1), rand_word(i % 2), 1'($urandom_range(1, 0)));
      if (i % 1000 == 0) @(posedge clk);
    end
    checks++;
    if (n_ovf == 0 || n_unf == 0 || n_zero == 0 || n_divz == 0) begin
      failures++;
      $display("FAIL: a case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
