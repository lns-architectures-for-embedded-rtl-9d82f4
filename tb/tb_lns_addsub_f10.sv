// tb_lns_addsub_f10: the adder/subtractor regenerated at a different word
// length: K = 6, F = 10 (17-bit words). All tables are regenerated; the
// bipartite s_b table keeps its 5/5 split, so its third field grows to 6
// bits and its error grows with it.
//
// The reference model here is written for any K and F: operands are decoded
// from the parameterized word and the exact result computed in double
// precision. Checks: every result within 1.25 ulp (2^-10) of the exact
// value, with the correct sign, zero and saturation; the latency of
// exactly 4 cycles. Covers a sweep of z across the table domain for both
// operations, near cancellation and random operands.
module tb_lns_addsub_f10;
  localparam int K = 6, F = 10, LW = K + F, W = LW + 1;
  localparam int LAT = 4;
  localparam real ULP = 1.0 / real'(2 ** F);
  localparam logic [W-1:0] ZERO_W = {1'b0, 1'b1, {(LW-1){1'b0}}};
  localparam real XMAX = real'(2 ** (K - 1)) - ULP;
  localparam real XMIN = -real'(2 ** (K - 1)) + ULP;

  logic         clk = 0, rst_n = 0, in_valid = 0, sub = 0;
  logic [W-1:0] a = '0, b = '0, r;
  logic         out_valid;

  lns_addsub #(.K(K), .F(F)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  real max_err = 0.0;
  typedef struct { logic [W-1:0] a, b; bit sub; int t; } op_t;
  op_t q[$];

  always @(posedge clk) cycle <= cycle + 1;

  function automatic bit is_zero(input logic [W-1:0] w);
    return w[LW-1:0] == ZERO_W[LW-1:0];
  endfunction

  function automatic real log_of(input logic [W-1:0] w);
    return real'($signed(w[LW-1:0])) * ULP;
  endfunction

  function automatic logic [W-1:0] make(input bit s, input int xcode);
    return {s, LW'(xcode)};
  endfunction

  // 1 when r is an acceptable result of a (+/-) b
  function automatic bit ok_result(input logic [W-1:0] x, input logic [W-1:0] y,
                                   input bit s, input logic [W-1:0] res, output real err);
    bit  sa, sb, rs;
    real xa, xb, mx, z, rl;
    err = 0.0;
    sa = x[W-1]; sb = y[W-1] ^ s;
    xa = log_of(x); xb = log_of(y);
    if (is_zero(x) && is_zero(y)) return is_zero(res);
    if (is_zero(x)) return res == {sb, y[LW-1:0]};
    if (is_zero(y)) return res == x;
    if (xa >= xb) begin mx = xa; z = xb - xa; rs = sa; end
    else          begin mx = xb; z = xa - xb; rs = sb; end
    if (sa == sb) rl = mx + $ln(1.0 + $pow(2.0, z)) / $ln(2.0);
    else begin
      if (z == 0.0) return res == ZERO_W;
      rl = mx + $ln(1.0 - $pow(2.0, z)) / $ln(2.0);
    end
    if (rl > XMAX + ULP) return res == {rs, 1'b0, {(LW-1){1'b1}}};
    if (rl < XMIN - ULP) return res == ZERO_W;
    if (is_zero(res)) return rl < XMIN + ULP;
    if (res[W-1] != rs) return 0;
    err = (log_of(res) > rl ? log_of(res) - rl : rl - log_of(res)) / ULP;
    return err <= 1.25;
  endfunction

  task automatic issue(input logic [W-1:0] x, input logic [W-1:0] y, input bit s);
    op_t o;
    @(negedge clk);
    in_valid = 1; a = x; b = y; sub = s;
    o.a = x; o.b = y; o.sub = s; o.t = cycle;
    q.push_back(o);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t o;
      real err;
      checks++;
      if (q.size() == 0) begin failures++; $display("FAIL: unexpected output"); end
      else begin
        o = q.pop_front();
        if (!ok_result(o.a, o.b, o.sub, r, err) || cycle - o.t != LAT) begin
          failures++;
          if (failures < 20)
            $display("FAIL: %h %s %h -> %h (err %f ulp, latency %0d)", o.a, o.sub ? "-" : "+",
                     o.b, r, err, cycle - o.t);
        end
        if (err > max_err) max_err = err;
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
    int x;
    repeat (3) @(posedge clk);
    rst_n = 1;
    issue(ZERO_W, make(1, 99), 1);
    issue(make(0, 4000), make(0, 4000), 1);
    issue(make(0, 2 ** (LW - 1) - 1), make(0, 2 ** (LW - 1) - 1), 0);
    issue(make(0, -(2 ** (LW - 1)) + 2), make(1, -(2 ** (LW - 1)) + 3), 0);
    for (int k = -300; k <= 300; k++) issue(make(0, 50), make(0, 50 + k), 1);
    for (int k = 0; k <= 17000; k += 5) begin
      issue(make(0, 37 - k), make(0, 37), 1);
      issue(make(1, 37), make(1, 37 - k), 0);
    end
    for (int i = 0; i < 10000; i++) begin
      x = int'($urandom_range(2 ** LW - 1, 1)) - 2 ** (LW - 1);
      issue(make(1'($urandom_range(1, 0)), x),
            make(1'($urandom_range(1, 0)), (i % 2) ? x + int'($urandom_range(400, 0)) - 200
                                                   : int'($urandom_range(2 ** LW - 1, 1)) - 2 ** (LW - 1)),
            1'($urandom_range(1, 0)));
    end
    while (q.size() != 0) @(negedge clk);
    $display("max error %f ulp", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
