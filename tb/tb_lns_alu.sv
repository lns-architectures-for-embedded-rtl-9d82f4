// tb_lns_alu: end-to-end testbench of the LNS ALU at its default
// (16-bit, K = 6, F = 9) configuration.
//
// Part 1 issues a random mix of ADD, SUB, MUL, DIV and SQRT every cycle,
// with directed corner cases, and checks each result against the reference
// model in lns_tb_pkg (add/sub within 1 unit in the last place, the others
// exactly) and its arrival exactly 4 cycles after issue, in order.
// Part 2 runs small control-algorithm kernels through the ALU the way a
// processor would: a 9-element dot product (nine multiplies issued back to
// back, then a chain of dependent additions, each waiting for the previous
// result) and a vector 2-norm (squares, accumulation, square root). The
// kernel results are compared with real arithmetic: the norm within 9
// units in the last place, the signed dot product (which may cancel)
// within 2 % of sum |u_i v_i|.
// Mechanisms counted (each must occur): every operation, effective
// addition and subtraction, zero-operand bypass, exact cancellation, near
// cancellation (|z| < 1/8, the F1 stand-in path), overflow saturation,
// underflow flush, division by zero, back-to-back issue of different
// operations, and dependent (stalled) issue in the kernels.
module tb_lns_alu;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  localparam int LAT = 4;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  lns_op_e     op = OP_ADD;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [15:0] r;

  lns_alu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { logic [15:0] a, b; lns_op_e op; int t; } op_t;
  op_t q[$];
  logic [15:0] last_r;
  logic [15:0] res_q[$];      // every result, in arrival order

  int n_op [5];
  int n_add = 0, n_sub = 0, n_zero_op = 0, n_cancel = 0, n_near = 0,
      n_ovf = 0, n_unf = 0, n_divz = 0, n_b2b = 0, n_dep = 0;
  lns_op_e prev_op = OP_ADD;
  int      prev_t = -10;

  always @(posedge clk) cycle <= cycle + 1;

  task automatic classify(input logic [15:0] x, input logic [15:0] y, input lns_op_e o);
    bit  rz, rs; real rl, d;
    n_op[int'(o)]++;
    if (o == OP_ADD || o == OP_SUB) begin
      if (is_zero(x) || is_zero(y)) begin n_zero_op++; return; end
      d = log_of(x) - log_of(y);
      if ((x[15] ^ y[15] ^ (o == OP_SUB)) == 0) n_add++; else n_sub++;
      if ((x[15] ^ y[15] ^ (o == OP_SUB)) && d == 0.0) n_cancel++;
      if ((x[15] ^ y[15] ^ (o == OP_SUB)) && d != 0.0 && d > -0.125 && d < 0.125) n_near++;
      ref_addsub(x, y, o == OP_SUB, rz, rs, rl);
      if (!rz && rl > XMAX + 0.5 * ULP) n_ovf++;
      if (!rz && rl < XMIN - 0.5 * ULP) n_unf++;
    end else if (o == OP_MUL || o == OP_DIV) begin
      d = (o == OP_DIV) ? log_of(x) - log_of(y) : log_of(x) + log_of(y);
      if (o == OP_DIV && is_zero(y) && !is_zero(x)) n_divz++;
      else if (!is_zero(x) && !is_zero(y) && d > XMAX) n_ovf++;
      else if (!is_zero(x) && !is_zero(y) && d < XMIN) n_unf++;
    end
  endtask

  task automatic issue(input logic [15:0] x, input logic [15:0] y, input lns_op_e o);
    op_t e;
    @(negedge clk);
    in_valid = 1; a = x; b = y; op = o;
    e.a = x; e.b = y; e.op = o; e.t = cycle;
    if (prev_t == cycle - 1 && prev_op != o) n_b2b++;
    prev_t = cycle; prev_op = o;
    q.push_back(e);
    classify(x, y, o);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  // wait until every issued operation has returned; the last result is in last_r
  task automatic drain();
    while (q.size() != 0) @(negedge clk);
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t e;
      bit  rz, rs, ok;
      real rl, err;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output %h", r);
      end else begin
        e = q.pop_front();
        case (e.op)
          OP_ADD, OP_SUB: begin
            ref_addsub(e.a, e.b, e.op == OP_SUB, rz, rs, rl);
            ok = check_result(rz, rs, rl, r, 1.0, err);
          end
          OP_MUL, OP_DIV: ok = (r == ref_muldiv(e.a, e.b, e.op == OP_DIV));
          default:        ok = (r == ref_sqrt(e.a));
        endcase
        if (!ok) begin
          failures++;
          if (failures < 20) $display("FAIL: op %s %h %h -> %h", e.op.name(), e.a, e.b, r);
        end
        checks++;
        if (cycle - e.t != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cycle - e.t, LAT);
        end
        last_r = r;
        res_q.push_back(r);
      end
    end
  end

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real value(input logic [15:0] w);
    if (is_zero(w)) return 0.0;
    return (w[15] ? -1.0 : 1.0) * $pow(2.0, log_of(w));
  endfunction

  // dot product of two length-9 vectors through the ALU; returns |error|
  // of log2|result| in ulps relative to the exact dot product of the inputs
  task automatic kernel_dot(input bit norm, output real err_ulp);
    logic [15:0] u [9], v [9], p [9], acc;
    real exact, got, mag;
    exact = 0.0; mag = 0.0;
    for (int i = 0; i < 9; i++) begin
      u[i] = make(norm ? 0 : 1'($urandom_range(1, 0)), int'($urandom_range(1023, 0)) - 512);
      v[i] = norm ? u[i] : make(0, int'($urandom_range(1023, 0)) - 512);
      exact += value(u[i]) * value(v[i]);
      mag   += (value(u[i]) * value(v[i]) > 0.0) ? value(u[i]) * value(v[i]) : -value(u[i]) * value(v[i]);
    end
    drain();
    res_q.delete();
    for (int i = 0; i < 9; i++) issue(u[i], v[i], OP_MUL);   // back to back
    drain();
    for (int i = 0; i < 9; i++) p[i] = res_q[i];
    acc = p[0];
    for (int i = 1; i < 9; i++) begin
      issue(acc, p[i], OP_ADD);
      n_dep++;
      drain();                 // dependent: wait for the sum
      acc = last_r;
    end
    if (norm) begin
      issue(acc, '0, OP_SQRT);
      drain();
      acc = last_r;
      exact = $sqrt(exact);
    end
    got = value(acc);
    if (exact == 0.0 || got == 0.0) err_ulp = 0.0;
    else err_ulp = ($ln(got > 0 ? got : -got) - $ln(exact > 0 ? exact : -exact)) / $ln(2.0) / ULP;
    if (err_ulp < 0) err_ulp = -err_ulp;
    // a signed dot product may cancel, so its error is bounded relative to
    // sum |u_i v_i| (2 %: 17 chained operations of at most 0.14 % each);
    // the norm has no cancellation and keeps the ulp bound
    if (!norm) err_ulp = ((got - exact > 0.02 * mag) || (exact - got > 0.02 * mag)) ? 1000.0 : 0.0;
  endtask

  initial begin
    logic [15:0] x, y;
    lns_op_e     o;
    real         e;
    foreach (n_op[i]) n_op[i] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed corners
    issue(ZERO_W, make(1, 77), OP_SUB);
    issue(make(0, 900), make(0, 900), OP_SUB);
    issue(make(0, 900), make(0, 899), OP_SUB);
    issue(make(0, 16383), make(0, 16383), OP_ADD);
    issue(make(0, -16383), make(0, -16380), OP_SUB);
    issue(make(1, 12000), make(0, 12000), OP_MUL);
    issue(make(1, -12000), make(0, 12000), OP_DIV);
    issue(make(1, 1000), ZERO_W, OP_DIV);
    issue(make(1, 1001), '0, OP_SQRT);
    issue(make(1, -3), make(0, 5), OP_MUL);
    // random stream, one operation per cycle
    for (int i = 0; i < 20000; i++) begin
      o = lns_op_e'($urandom_range(4, 0));
      x = rand_word(i % 2);
      y = (i % 4 == 0) ? make($urandom_range(1, 0), int'($signed(x[14:0])) + int'($urandom_range(64, 0)) - 32)
                       : rand_word(i % 2);
      if (is_zero(y)) y = make(0, 1);
      issue(x, y, o);
    end
    drain();
    // kernels
    for (int k = 0; k < 20; k++) begin
      kernel_dot(k % 2, e);
      checks++;
      if (e > 9.0) begin
        failures++;
        $display("FAIL: kernel %s error %f ulp", (k % 2) ? "norm" : "dot", e);
      end
    end
    repeat (LAT + 2) @(posedge clk);
    checks++;
    if (q.size() != 0) begin failures++; $display("FAIL: results missing"); end
    $display("ops: add=%0d sub=%0d mul=%0d div=%0d sqrt=%0d", n_op[0], n_op[1], n_op[2], n_op[3], n_op[4]);
    $display("mechanisms: eff_add=%0d eff_sub=%0d zero_op=%0d cancel=%0d near=%0d ovf=%0d unf=%0d divz=%0d b2b=%0d dependent=%0d",
             n_add, n_sub, n_zero_op, n_cancel, n_near, n_ovf, n_unf, n_divz, n_b2b, n_dep);
    checks++;
    if (n_op[0] == 0 || n_op[1] == 0 || n_op[2] == 0 || n_op[3] == 0 || n_op[4] == 0 ||
        n_add == 0 || n_sub == 0 || n_zero_op == 0 || n_cancel == 0 || n_near == 0 ||
        n_ovf == 0 || n_unf == 0 || n_divz == 0 || n_b2b == 0 || n_dep == 0) begin
      failures++;
      $display("FAIL: a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
