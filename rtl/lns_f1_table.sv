// lns_f1_table: the F1 table of the cotransformation adder/subtractor.
//
// The difference z (in [-2^ZI, 0), F fraction bits) is split into a high
// part z_h, a multiple of delta_h = 2^(J-F), and a low part 0 <= z_l <
// delta_h. F1(z_h) = d_b(-z_h - delta_h) with d_b(w) = log2|1 - 2^w|; since
// -z_h - delta_h >= 0, the entry is log2(2^(-z_h-delta_h) - 1).
// For the top entry (z_h = -delta_h, i.e. -delta_h <= z < 0) the argument
// is 0 and F1 is minus infinity; the table then holds a large negative
// constant, -2^K. With that value the rest of the datapath returns
// d_b(z) = F2(z_l) (see lns_addsub). Table size (7 index bits) and the
// saturation constant are choices of this design.
//
// Interface: zh is the index: the high ZI+F-J bits of z + 2^ZI. f1 is the
// signed result in units of 2^-(F+G), K+2 integer bits. Combinational.
module lns_f1_table #(
  parameter int unsigned K  = lns_pkg::LNS_K,
  parameter int unsigned F  = lns_pkg::LNS_F,
  parameter int unsigned G  = lns_pkg::LNS_G,
  parameter int unsigned ZI = lns_pkg::LNS_ZI,
  parameter int unsigned J  = lns_pkg::LNS_J,
  localparam int unsigned IW = K + 2 + F + G,
  localparam int unsigned HW = ZI + F - J
) (
  input  logic [HW-1:0]        zh,
  output logic signed [IW-1:0] f1
);

  function automatic int f1_val(input int h);
    real v;
    // v = -z_h - delta_h, with z_h = h*delta_h - 2^ZI
    v = $pow(2.0, real'(ZI)) - real'(h + 1) * $pow(2.0, real'(J) - real'(F));
    if (v <= 0.0) return -(2 ** (K + F + G));
    return lns_pkg::fix_r(lns_pkg::db_r(v), F + G);
  endfunction

  logic signed [IW-1:0] rom [2**HW];

  for (genvar h = 0; h < 2**HW; h++) begin : g_rom
    localparam int V = f1_val(h);
    assign rom[h] = IW'(V);
  end

  assign f1 = rom[zh];

endmodule
