// lns_addsub: four-stage pipelined LNS adder/subtractor using cotransformation.
//
// It computes R = A + B or R = A - B. All operands are LNS words (see
// lns_pkg). With x >= y the larger and y the smaller logarithm and
// z = y - x <= 0, the result is
//   add (effective): r = x + s_b(z)
//   sub (effective): r = x + d_b(z),
//     d_b(z) = P + s_b(F2(z_l) - P),  P = z + F1(z_h),
// which is the cotransformation identity: d_b is never tabulated, only the
// small F1 and F2 tables and the s_b table. The structure follows the
// published block diagram: two parallel subtractors (x-y and y-x) whose
// sign selects z and the larger operand; F1 and F2 fed by the high and low
// bits of z; an adder forming P = z + F1 and a three-input adder forming
// F2 - z - F1; a multiplexer choosing the s_b argument (z for addition,
// F2 - P for subtraction); a multiplexer choosing 0 or P; and a final
// three-input adder max + (0 | P) + s_b.
//
// Pipeline (each stage ends in a register; latency 4 cycles, one new
// operation accepted every cycle, no stalls):
//   1  subtractors, operand select, sign logic, special cases, clamp of z
//   2  F1 and F2 lookup, P and F2 - P
//   3  s_b lookup
//   4  final addition, rounding to F bits, overflow/underflow handling
// Four stages match the published estimate (17.9 ns of logic split for a
// 5 ns clock); where the stage boundaries fall is a choice of this design.
//
// Choices of this design where the source is silent: base 2; z below -2^ZI
// is clamped to -2^ZI (s_b and d_b there are under half a unit in the last
// place); results of magnitude 2^32 or more saturate to the largest code,
// results at or below the zero code flush to zero; exact cancellation
// (|A| = |B| under effective subtraction) gives zero; zero operands
// bypass the datapath. Internal values carry G = 2 guard bits and the
// result is rounded to nearest.
//
// Interface: in_valid/sub/a/b in, out_valid/r out, synchronous active-low
// reset of the valid bits only.
module lns_addsub #(
  parameter int unsigned K  = lns_pkg::LNS_K,
  parameter int unsigned F  = lns_pkg::LNS_F,
  parameter int unsigned G  = lns_pkg::LNS_G,
  parameter int unsigned ZI = lns_pkg::LNS_ZI,
  parameter int unsigned J  = lns_pkg::LNS_J,
  localparam int unsigned LW = K + F,          // logarithm width
  localparam int unsigned W  = 1 + LW,         // word width
  localparam int unsigned IW = K + 2 + F + G,  // internal width
  localparam int unsigned CW = ZI + F + 1      // clamped z + 2^ZI
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic         sub,
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic         out_valid,
  output logic [W-1:0] r
);

  localparam logic [LW-1:0] ZERO_X = {1'b1, {(LW-1){1'b0}}};
  localparam logic [LW-1:0] MAX_X  = {1'b0, {(LW-1){1'b1}}};
  localparam logic [W-1:0]  ZERO_W = {1'b0, ZERO_X};

  // ---------------- stage 1: operand compare and select ----------------
  logic                 sa, sb_eff, za, zb, x_ge, eff_sub, rsign, spec;
  logic signed [LW-1:0] xa, xb, mx;
  logic signed [LW:0]   dxy, dyx, z;
  logic [CW-1:0]        zc;
  logic [W-1:0]         spec_val;

  always_comb begin
    sa      = a[W-1];
    sb_eff  = b[W-1] ^ sub;
    xa      = a[LW-1:0];
    xb      = b[LW-1:0];
    za      = (a[LW-1:0] == ZERO_X);
    zb      = (b[LW-1:0] == ZERO_X);
    dxy     = (LW+1)'(xa) - (LW+1)'(xb);
    dyx     = (LW+1)'(xb) - (LW+1)'(xa);
    x_ge    = ~dxy[LW];
    mx      = x_ge ? xa : xb;
    z       = x_ge ? dyx : dxy;
    rsign   = x_ge ? sa : sb_eff;
    eff_sub = sa ^ sb_eff;
    // clamp z to [-2^ZI, 0] and offset it by 2^ZI
    if (z < -(LW+1)'(2 ** (ZI + F))) zc = '0;
    else                             zc = CW'(z + (LW+1)'(2 ** (ZI + F)));
    spec     = 1'b1;
    spec_val = ZERO_W;
    if (za && zb)                      spec_val = ZERO_W;
    else if (za)                       spec_val = {sb_eff, xb};
    else if (zb)                       spec_val = a;
    else if (eff_sub && dxy == '0)     spec_val = ZERO_W;
    else                               spec = 1'b0;
  end

  logic                 s1_v, s1_sub, s1_sign, s1_spec;
  logic [CW-1:0]        s1_zc;
  logic signed [LW-1:0] s1_mx;
  logic [W-1:0]         s1_spec_val;

  always_ff @(posedge clk) begin
    if (!rst_n) s1_v <= 1'b0;
    else        s1_v <= in_valid;
    s1_sub      <= eff_sub;
    s1_sign     <= rsign;
    s1_spec     <= spec;
    s1_spec_val <= spec_val;
    s1_zc       <= zc;
    s1_mx       <= mx;
  end

  // ---------------- stage 2: F1, F2 and the s_b argument ----------------
  logic signed [IW-1:0] f1, f2, zi, p, d, sb_arg, padd;

  lns_f1_table #(.K(K), .F(F), .G(G), .ZI(ZI), .J(J)) u_f1 (
    .zh (s1_zc[ZI+F-1:J]),
    .f1 (f1)
  );

  lns_f2_table #(.K(K), .F(F), .G(G), .J(J)) u_f2 (
    .zl (s1_zc[J-1:0]),
    .f2 (f2)
  );

  always_comb begin
    zi     = (IW'(s1_zc) - IW'(2 ** (ZI + F))) <<< G;   // z, in 2^-(F+G)
    p      = zi + f1;
    d      = f2 - zi - f1;                           // three-input adder
    sb_arg = s1_sub ? d : zi;
    padd   = s1_sub ? p : '0;
  end

  logic                 s2_v, s2_sign, s2_spec;
  logic signed [IW-1:0] s2_arg, s2_padd;
  logic signed [LW-1:0] s2_mx;
  logic [W-1:0]         s2_spec_val;

  always_ff @(posedge clk) begin
    if (!rst_n) s2_v <= 1'b0;
    else        s2_v <= s1_v;
    s2_sign     <= s1_sign;
    s2_spec     <= s1_spec;
    s2_spec_val <= s1_spec_val;
    s2_arg      <= sb_arg;
    s2_padd     <= padd;
    s2_mx       <= s1_mx;
  end

  // ---------------- stage 3: s_b ----------------
  logic signed [IW-1:0] sbv;

  lns_sb_table #(.K(K), .F(F), .G(G), .ZI(ZI)) u_sb (
    .w (s2_arg),
    .s (sbv)
  );

  logic                 s3_v, s3_sign, s3_spec;
  logic signed [IW-1:0] s3_sb, s3_padd;
  logic signed [LW-1:0] s3_mx;
  logic [W-1:0]         s3_spec_val;

  always_ff @(posedge clk) begin
    if (!rst_n) s3_v <= 1'b0;
    else        s3_v <= s2_v;
    s3_sign     <= s2_sign;
    s3_spec     <= s2_spec;
    s3_spec_val <= s2_spec_val;
    s3_sb       <= sbv;
    s3_padd     <= s2_padd;
    s3_mx       <= s2_mx;
  end

  // ---------------- stage 4: final add, round, saturate ----------------
  localparam logic signed [IW-1:0] RND = (G > 0) ? IW'(2 ** (G - 1)) : '0;
  logic signed [IW-1:0] sum, rnd;
  logic [W-1:0]         res;

  always_comb begin
    sum = (IW'(s3_mx) <<< G) + s3_padd + s3_sb;
    rnd = (sum + RND) >>> G;
    if (s3_spec)                                  res = s3_spec_val;
    else if (rnd >= IW'(2 ** (LW - 1)))           res = {s3_sign, MAX_X};
    else if (rnd <= -IW'(2 ** (LW - 1)))          res = ZERO_W;
    else                                          res = {s3_sign, rnd[LW-1:0]};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= s3_v;
    r <= res;
  end

  // The clamped difference used by the subtraction path never reaches the
  // excluded end point z = 0 (that case is the exact-cancellation bypass).
  a_sub_range : assert property (@(posedge clk) disable iff (!rst_n)
    (s1_v && s1_sub && !s1_spec) |-> (s1_zc < CW'(2 ** (ZI + F))));

endmodule
