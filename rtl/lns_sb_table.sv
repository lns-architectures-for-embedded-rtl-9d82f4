// lns_sb_table: s_b(w) = log2(1 + 2^w) for any signed w, from a bipartite
// (two-table multipartite) approximation.
//
// For w <= 0 the magnitude a = -w, restricted to [0, 2^ZI), is split into
// three fields a0 (A0 bits), a1 (A1 bits) and a2 (the rest). The result is
//   TIV(a0,a1) + TO(a0,a2)
// where TIV holds s_b at the centre of the a2 interval and TO holds the
// correction s_b(a0, mid a1, a2) - s_b(a0, mid a1, mid a2), which depends
// on a1 only through its midpoint. For a >= 2^ZI, s_b is below half a unit
// in the last place and the result is 0. For w > 0 the unit folds the
// argument: s_b(w) = w + s_b(-w). The folding lets the cotransformation
// path feed it differences of either sign.
// The use of a multipartite table follows the published design; its exact
// split (5/5/5 bits of a 15-bit index), the folding and the guard bits are
// choices of this design.
//
// Interface: w and s are signed, units of 2^-(F+G), K+2 integer bits.
// Purely combinational.
module lns_sb_table #(
  parameter int unsigned K  = lns_pkg::LNS_K,
  parameter int unsigned F  = lns_pkg::LNS_F,
  parameter int unsigned G  = lns_pkg::LNS_G,
  parameter int unsigned ZI = lns_pkg::LNS_ZI,
  parameter int unsigned A0 = 5,
  parameter int unsigned A1 = 5,
  localparam int unsigned IW = K + 2 + F + G,
  localparam int unsigned FI = F + G,
  localparam int unsigned AW = ZI + FI,          // index width
  localparam int unsigned A2 = AW - A0 - A1
) (
  input  logic signed [IW-1:0] w,
  output logic signed [IW-1:0] s
);

  localparam int unsigned TW = FI + 2;   // table entry width (signed)

  function automatic real a_real(input real units);
    return units * $pow(2.0, -real'(FI));
  endfunction

  function automatic int tiv_val(input int i);
    real ar;
    ar = a_real(real'(i) * $pow(2.0, real'(A2)) + ($pow(2.0, real'(A2)) - 1.0) / 2.0);
    return lns_pkg::fix_r(lns_pkg::sb_r(-ar), FI);
  endfunction

  function automatic int to_val(input int i);
    int   i0, i2;
    real  base, a1m, a2m;
    i0   = i >> A2;
    i2   = i % (2 ** A2);
    base = real'(i0) * $pow(2.0, real'(A1 + A2));
    a1m  = ($pow(2.0, real'(A1)) - 1.0) / 2.0 * $pow(2.0, real'(A2));
    a2m  = ($pow(2.0, real'(A2)) - 1.0) / 2.0;
    return lns_pkg::fix_r(lns_pkg::sb_r(-a_real(base + a1m + real'(i2)))
                        - lns_pkg::sb_r(-a_real(base + a1m + a2m)), FI);
  endfunction

  logic signed [TW-1:0] tiv_rom [2**(A0+A1)];
  logic signed [TW-1:0] to_rom  [2**(A0+A2)];

  for (genvar i = 0; i < 2**(A0+A1); i++) begin : g_tiv
    localparam int V = tiv_val(i);
    assign tiv_rom[i] = TW'(V);
  end

  for (genvar i = 0; i < 2**(A0+A2); i++) begin : g_to
    localparam int V = to_val(i);
    assign to_rom[i] = TW'(V);
  end

  logic signed [IW-1:0] base, a;
  logic                 out_of_range;
  logic [AW-1:0]        idx;
  logic signed [TW-1:0] tiv, tov;

  always_comb begin
    if (w > 0) begin
      base = w;
      a    = w;
    end else begin
      base = '0;
      a    = -w;
    end
    out_of_range = (a >= IW'(2 ** AW));
    idx = a[AW-1:0];
    tiv = tiv_rom[idx[AW-1 -: A0+A1]];
    tov = to_rom[{idx[AW-1 -: A0], idx[A2-1:0]}];
    s   = out_of_range ? base : base + IW'(tiv) + IW'(tov);
  end

endmodule
