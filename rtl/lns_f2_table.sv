// lns_f2_table: the F2 table of the cotransformation adder/subtractor.
//
// F2(z_l) = d_b(z_l - delta_h) = log2(1 - 2^(z_l - delta_h)), where z_l is
// the low J bits of the (negative) difference z, read as an unsigned
// fraction 0 <= z_l < delta_h, and delta_h = 2^(J-F) is the weight of the
// lowest bit of the high part z_h. The table follows the cotransformation
// identity; its size (J = 6, 64 entries) and the guard bits of its output
// are choices of this design.
//
// Interface: zl is the index (units of 2^-F); f2 is the signed result in
// units of 2^-(F+G), K+2 integer bits. Purely combinational: every entry is
// a constant computed at elaboration and the read is a multiplexer.
module lns_f2_table #(
  parameter int unsigned K = lns_pkg::LNS_K,
  parameter int unsigned F = lns_pkg::LNS_F,
  parameter int unsigned G = lns_pkg::LNS_G,
  parameter int unsigned J = lns_pkg::LNS_J,
  localparam int unsigned IW = K + 2 + F + G
) (
  input  logic [J-1:0]         zl,
  output logic signed [IW-1:0] f2
);

  function automatic int f2_val(input int l);
    real u;
    u = real'(l - (2 ** J)) * $pow(2.0, -real'(F));
    return lns_pkg::fix_r(lns_pkg::db_r(u), F + G);
  endfunction

  logic signed [IW-1:0] rom [2**J];

  for (genvar l = 0; l < 2**J; l++) begin : g_rom
    localparam int V = f2_val(l);
    assign rom[l] = IW'(V);
  end

  assign f2 = rom[zl];

endmodule
