// lns_tb_pkg: reference model for the LNS testbenches.
//
// Decodes 16-bit LNS words (sign, two's-complement base-2 logarithm with 9
// fraction bits, most negative logarithm code = zero) and computes expected
// results in double-precision real arithmetic, independently of the RTL.
// check_result() accepts a result whose logarithm is within `tol` units in
// the last place (2^-9) of the exact value, with the right sign; near the
// overflow and underflow limits it accepts either the saturated/flushed
// code or a regular result.
package lns_tb_pkg;

  localparam int          F      = 9;
  localparam real         ULP    = 1.0 / 512.0;
  localparam logic [15:0] ZERO_W = 16'h4000;
  localparam real         XMAX   = 32.0 - ULP;     // largest logarithm
  localparam real         XMIN   = -32.0 + ULP;    // smallest nonzero

  function automatic bit is_zero(input logic [15:0] w);
    return w[14:0] == 15'h4000;
  endfunction

  function automatic real log_of(input logic [15:0] w);
    return real'($signed(w[14:0])) / 512.0;
  endfunction

  function automatic logic [15:0] make(input bit s, input int xcode);
    logic [14:0] x;
    x = 15'(xcode);
    return {s, x};
  endfunction

  // exact result, as (is_zero, sign, log2|value|)
  function automatic void ref_addsub(input logic [15:0] a, input logic [15:0] b,
                                     input bit sub, output bit rz,
                                     output bit rs, output real rl);
    bit  sa, sb;
    real xa, xb, mx, z, t;
    sa = a[15];
    sb = b[15] ^ sub;
    xa = log_of(a);
    xb = log_of(b);
    rz = 0; rs = 0; rl = 0.0;
    if (is_zero(a) && is_zero(b)) begin rz = 1; return; end
    if (is_zero(a)) begin rs = sb; rl = xb; return; end
    if (is_zero(b)) begin rs = sa; rl = xa; return; end
    if (xa >= xb) begin mx = xa; z = xb - xa; rs = sa; end
    else          begin mx = xb; z = xa - xb; rs = sb; end
    if (sa == sb) begin
      rl = mx + $ln(1.0 + $pow(2.0, z)) / $ln(2.0);
    end else begin
      if (z == 0.0) begin rz = 1; rs = 0; return; end
      t  = 1.0 - $pow(2.0, z);
      rl = mx + $ln(t) / $ln(2.0);
    end
  endfunction

  // 1 = acceptable. err returns |log error| in ulps for regular results.
  function automatic bit check_result(input bit rz, input bit rs, input real rl,
                                      input logic [15:0] r, input real tol,
                                      output real err);
    real lo;
    err = 0.0;
    if (rz) return r == ZERO_W;
    if (rl > XMAX + tol * ULP)
      return r == {rs, 15'h3fff};
    if (rl < XMIN - tol * ULP)
      return r == ZERO_W;
    if (is_zero(r)) return rl < XMIN + tol * ULP;
    if (r[15] != rs) return 0;
    lo  = log_of(r);
    err = (lo > rl ? lo - rl : rl - lo) / ULP;
    return err <= tol;
  endfunction

  // exact multiply/divide result (the logarithms add or subtract exactly)
  function automatic logic [15:0] ref_muldiv(input logic [15:0] x,
                                             input logic [15:0] y, input bit d);
    real l;
    bit  s;
    s = x[15] ^ y[15];
    l = d ? log_of(x) - log_of(y) : log_of(x) + log_of(y);
    if (is_zero(x) || (is_zero(y) && !d)) return ZERO_W;
    if (is_zero(y))  return {s, 15'h3fff};
    if (l > XMAX)    return {s, 15'h3fff};
    if (l < XMIN)    return ZERO_W;
    return make(s, $rtoi(l * 512.0));
  endfunction

  // square root: half the logarithm, truncated toward minus infinity
  function automatic logic [15:0] ref_sqrt(input logic [15:0] x);
    if (is_zero(x)) return ZERO_W;
    return make(0, $rtoi($floor(log_of(x) * 512.0 / 2.0)));
  endfunction

  // random nonzero word; `wide` selects the full exponent range, otherwise
  // logarithms within +-4
  function automatic logic [15:0] rand_word(input bit wide);
    int x;
    if (wide) x = int'($urandom_range(32767, 1)) - 16384;   // -16383 .. 16383
    else      x = int'($urandom_range(4095, 0)) - 2048;
    return make(1'($urandom_range(1, 0)), x);
  endfunction

endpackage
