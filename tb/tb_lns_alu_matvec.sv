// tb_lns_alu_matvec: matrix-vector products through the LNS ALU, scheduled
// as a pipelined processor would issue them.
//
// y = M * v for an N x 9 matrix (N = 9 and N = 3). All N*9 products are
// issued back to back; then the accumulations are issued in waves, one
// addition per row per wave, each waiting only until its own previous sum
// has come back (a scoreboard of result tags). With 9 rows the dependency
// distance (9 cycles) exceeds the 4-cycle latency and the ALU must accept
// an operation every cycle with no stall: the run must take exactly
// (81 + 72) issue cycles + 4. With 3 rows the distance is 3 cycles and the
// scheduler must stall; the stall count must be nonzero. Every individual
// result is checked against the reference model, and every y_i against the
// exact real product within 2 % of sum_j |m_ij * v_j| (17 chained
// operations of at most 0.14 % relative error each).
module tb_lns_alu_matvec;
  import lns_pkg::*;
  import lns_tb_pkg::*;

  localparam int LAT = 4;
  localparam int NC  = 9;

  logic        clk = 0, rst_n = 0, in_valid = 0;
  lns_op_e     op = OP_ADD;
  logic [15:0] a = '0, b = '0;
  logic        out_valid;
  logic [15:0] r;

  lns_alu dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, cycle = 0;
  typedef struct { logic [15:0] a, b; lns_op_e op; int t; int tag; } op_t;
  op_t         q[$];
  logic [15:0] res [4096];
  bit          ready [4096];
  int          next_tag = 0;

  always @(posedge clk) cycle <= cycle + 1;

  // issue one operation in the current cycle; returns its tag
  task automatic issue(input logic [15:0] x, input logic [15:0] y, input lns_op_e o,
                       output int tag);
    op_t e;
    @(negedge clk);
    in_valid = 1; a = x; b = y; op = o;
    tag = next_tag++;
    ready[tag] = 0;
    e.a = x; e.b = y; e.op = o; e.t = cycle; e.tag = tag;
    q.push_back(e);
    @(posedge clk);
    #1 in_valid = 0;
  endtask

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      op_t e;
      bit  rz, rs, ok;
      real rl, err;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL: unexpected output");
      end else begin
        e = q.pop_front();
        if (e.op == OP_MUL) ok = (r == ref_muldiv(e.a, e.b, 0));
        else begin
          ref_addsub(e.a, e.b, 0, rz, rs, rl);
          ok = check_result(rz, rs, rl, r, 1.0, err);
        end
        if (!ok || cycle - e.t != LAT) begin
          failures++;
          $display("FAIL: %s %h %h -> %h (latency %0d)", e.op.name(), e.a, e.b, r, cycle - e.t);
        end
        res[e.tag]   = r;
        ready[e.tag] = 1;
      end
    end
  end

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real value(input logic [15:0] w);
    if (is_zero(w)) return 0.0;
    return (w[15] ? -1.0 : 1.0) * $pow(2.0, log_of(w));
  endfunction

  task automatic matvec(input int nr, output int cycles, output int stalls);
    logic [15:0] m [9][NC], v [NC];
    int          ptag [9][NC], acc [9];
    real         exact [9], mag [9], got;
    int          t0;
    for (int j = 0; j < NC; j++) v[j] = make(1'($urandom_range(1, 0)), int'($urandom_range(2047, 0)) - 1024);
    for (int i = 0; i < nr; i++) begin
      exact[i] = 0.0; mag[i] = 0.0;
      for (int j = 0; j < NC; j++) begin
        m[i][j] = make(1'($urandom_range(1, 0)), int'($urandom_range(2047, 0)) - 1024);
        exact[i] += value(m[i][j]) * value(v[j]);
        mag[i]   += (value(m[i][j]) * value(v[j]) > 0) ? value(m[i][j]) * value(v[j])
                                                       : -value(m[i][j]) * value(v[j]);
      end
    end
    stalls = 0;
    @(negedge clk);
    t0 = cycle + 1;    // the first issue happens at the next falling edge
    for (int i = 0; i < nr; i++)
      for (int j = 0; j < NC; j++) issue(m[i][j], v[j], OP_MUL, ptag[i][j]);
    for (int i = 0; i < nr; i++) acc[i] = ptag[i][0];
    for (int k = 1; k < NC; k++)
      for (int i = 0; i < nr; i++) begin
        // operands: the row's running sum and its k-th product
        while (!ready[acc[i]] || !ready[ptag[i][k]]) begin
          @(negedge clk);
          stalls++;
        end
        issue(res[acc[i]], res[ptag[i][k]], OP_ADD, acc[i]);
      end
    while (q.size() != 0) @(negedge clk);
    cycles = cycle - t0;
    for (int i = 0; i < nr; i++) begin
      got = value(res[acc[i]]);
      checks++;
      if ((got - exact[i] > 0.02 * mag[i]) || (exact[i] - got > 0.02 * mag[i])) begin
        failures++;
        $display("FAIL: row %0d = %g, expected %g", i, got, exact[i]);
      end
    end
  endtask

  initial begin
    int cyc, st;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 5; rep++) begin
      matvec(9, cyc, st);
      $display("9 x 9: %0d cycles, %0d stall cycles", cyc, st);
      checks++;
      if (st != 0 || cyc != 9 * NC + 9 * (NC - 1) + LAT) begin
        failures++;
        $display("FAIL: expected %0d cycles without stalls", 9 * NC + 9 * (NC - 1) + LAT);
      end
      matvec(3, cyc, st);
      $display("3 x 9: %0d cycles, %0d stall cycles", cyc, st);
      checks++;
      if (st == 0) begin
        failures++;
        $display("FAIL: a 3-row schedule must stall");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
