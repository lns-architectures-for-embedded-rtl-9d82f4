// lns_pkg: shared constants, operation codes and table-generation functions
// for the 16-bit logarithmic-number-system (LNS) ALU.
//
// Number format (word of 1 + K + F bits, K = 6, F = 9, 16 bits in all):
//   bit  [K+F]     S_X, the sign of the real number X
//   bits [K+F-1:0] x = log2|X|, a two's-complement fixed-point value with
//                  K integer bits (the top one is its sign) and F fraction bits.
// X = (-1)^S_X * 2^x. The most negative code of x (1 followed by zeros) is
// reserved for X = 0, so nonzero magnitudes span 2^(-32+2^-9) .. 2^(32-2^-9).
// The base 2, the zero code and the two's-complement exponent are choices of
// this design; K, F and the 16-bit width follow the published configuration.
//
// Inside the adder/subtractor, logarithms are carried with G extra guard
// fraction bits (FI = F + G) in a signed word of K + 2 integer bits.
//
// The real-valued functions below are evaluated only while the design is
// elaborated: they fill the constant tables (F1, F2, and the two sub-tables
// of the bipartite s_b table), which synthesize to combinational logic.
package lns_pkg;

  localparam int unsigned LNS_K  = 6;   // integer bits of the logarithm
  localparam int unsigned LNS_F  = 9;   // fraction bits of the logarithm
  localparam int unsigned LNS_G  = 2;   // guard bits inside the adder
  localparam int unsigned LNS_ZI = 4;   // s_b/d_b domain is z in [-2^ZI, 0)
  localparam int unsigned LNS_J  = 6;   // low bits of z that index F2

  typedef enum logic [2:0] {
    OP_ADD  = 3'd0,
    OP_SUB  = 3'd1,
    OP_MUL  = 3'd2,
    OP_DIV  = 3'd3,
    OP_SQRT = 3'd4
  } lns_op_e;

  // log base 2 of a positive real
  function automatic real log2r(input real v);
    return $ln(v) / $ln(2.0);
  endfunction

  // s_b(z) = log2(1 + 2^z)
  function automatic real sb_r(input real z);
    return log2r(1.0 + $pow(2.0, z));
  endfunction

  // d_b(z) = log2|1 - 2^z| (z != 0); for z < 0 this is the usual d_b,
  // for z > 0 it is log2(2^z - 1), the form the F1 table needs.
  function automatic real db_r(input real z);
    real t;
    t = 1.0 - $pow(2.0, z);
    if (t < 0.0) t = -t;
    return log2r(t);
  endfunction

  // round a real to the nearest multiple of 2^-fbits, as an integer count
  function automatic int fix_r(input real v, input int fbits);
    return $rtoi($floor(v * $pow(2.0, fbits) + 0.5));
  endfunction

endpackage
