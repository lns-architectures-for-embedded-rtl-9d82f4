// tb_lns_addsub: self-checking testbench for the pipelined LNS
// adder/subtractor.
//
// Issues one operation per cycle (with occasional idle cycles), keeps the
// expected results in a queue and checks every output against a
// double-precision reference (lns_tb_pkg) within 1 unit in the last place
// of the logarithm, and checks that each result arrives exactly 4 cycles
// after issue. Directed cases cover zero operands, exact cancellation,
// near cancellation (the F1 = -infinity region z in [-1/8, 0)),
// overflow saturation, underflow flush and far-apart operands (z clamp).
// Each of these mechanisms is counted and a failure is counted for any
// that never occurred.
module tb_lns_addsub;
  import lns_tb_pkg::*;

  localparam int LAT = 4;
  localparam real TOL = 1.0;

  logic        clk = 0, rst_n = 0;
  logic        in_valid = 0, sub = 0;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [15:0] r;

  lns_addsub dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  real max_err = 0.0;
  typedef struct { logic [15:0] a, b; bit sub; int t; } op_t;
  op_t q[$];

  // mechanism counters
  int n_add = 0, n_sub = 0, n_zero_op = 0, n_cancel = 0, n_near = 0,
      n_ovf = 0, n_unf = 0, n_clamp = 0;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic classify(input logic [15:0] x, input logic [15:0] y, input bit s);
    real d;
    bit  rz, rs; real rl;
    d = log_of(x) - log_of(y);
    if (is_zero(x) || is_zero(y)) begin n_zero_op++; return; end
    if ((x[15] ^ y[15] ^ s) == 0) n_add++; else n_sub++;
    if ((x[15] ^ y[15] ^ s) && d == 0.0) n_cancel++;
    if ((x[15] ^ y[15] ^ s) && d != 0.0 && d > -0.125 && d < 0.125) n_near++;
    if (d > 16.0 || d < -16.0) n_clamp++;
    ref_addsub(x, y, s, rz, rs, rl);
    if (!rz && rl > XMAX + 0.5 * ULP) n_ovf++;
    if (!rz && rl < XMIN - 0.5 * ULP) n_unf++;
  endtask

  task automatic issue(input logic [15:0] x, input logic [15:0] y, input bit s);
    op_t o;
    @(negedge clk);
    in_valid = 1; a = x; b = y; sub = s;
    o.a = x; o.b = y; o.sub = s; o.t = cycle;
    q.push_back(o);
    classify(x, y, s);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  // output checker (outputs are sampled away from the active clock edge)
  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      bit  rz, rs, ok;
      real rl, err;
      if (q.size() == 0) begin
        failures++; checks++;
        $display("FAIL: unexpected output %h", r);
      end else begin
        o = q.pop_front();
        ref_addsub(o.a, o.b, o.sub, rz, rs, rl);
        ok = check_result(rz, rs, rl, r, TOL, err);
        if (err > max_err) max_err = err;
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 20)
            $display("FAIL: %h %s %h -> %h, expected zero=%0d sign=%0d log=%f (err %f ulp)",
                     o.a, o.sub ? "-" : "+", o.b, r, rz, rs, rl, err);
        end
        checks++;
        if (cycle - o.t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - o.t, LAT);
        end
      end
    end
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] x, y;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // directed: zeros
    issue(ZERO_W, ZERO_W, 0);
    issue(ZERO_W, make(1, 300), 0);
    issue(ZERO_W, make(0, 300), 1);
    issue(make(1, -700), ZERO_W, 1);
    // exact cancellation and doubling
    issue(make(0, 1234), make(0, 1234), 1);
    issue(make(1, -50), make(0, -50), 0);
    issue(make(0, 1234), make(0, 1234), 0);
    // overflow and underflow
    issue(make(0, 16383), make(0, 16383), 0);
    issue(make(1, 16000), make(1, 16200), 0);
    issue(make(0, -16383), make(0, -16382), 1);
    issue(make(1, -16000), make(0, -16001), 0);
    // far apart
    issue(make(0, 5000), make(0, -5000), 0);
    issue(make(0, 5000), make(0, -5000), 1);
    // exhaustive near-cancellation sweep over the smaller operand
    for (int k = -200; k <= 200; k++) begin
      issue(make(0, 100), make(0, 100 + k), 1);
      if (k % 7 == 0) @(posedge clk);   // idle gaps
    end
    // sweep of z over the table domain, both operations
    for (int k = 0; k <= 8400; k += 3) begin
      issue(make(0, -k + 37), make(0, 37), 1);
      issue(make(1, 37), make(1, 37 - k), 0);
    end
    // random
    for (int i = 0; i < 20000; i++) begin
      x = rand_word(i % 2);
      y = (i % 3 == 0) ? make($urandom_range(1, 0), int'($signed(x[14:0])) + int'($urandom_range(200, 0)) - 100)
                       : rand_word(i % 2);
      if (is_zero(y)) y = make(0, 0);
      issue(x, y, 1'($urandom_range(1, 0)));
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: %0d results missing", q.size()); end
    $display("max error %f ulp", max_err);
    $display("mechanisms: add=%0d sub=%0d zero_op=%0d cancel=%0d near=%0d ovf=%0d unf=%0d clamp=%0d",
             n_add, n_sub, n_zero_op, n_cancel, n_near, n_ovf, n_unf, n_clamp);
    if (n_add == 0 || n_sub == 0 || n_zero_op == 0 || n_cancel == 0 || n_near == 0 ||
        n_ovf == 0 || n_unf == 0 || n_clamp == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
