// lns_sqrt: LNS square root.
//
// The logarithm of sqrt|A| is half the logarithm of |A|: an arithmetic right
// shift by one bit, which truncates toward minus infinity, as the source
// describes ("square root ... right-shift"). The result is positive.
// Choices of this design: sqrt(0) = 0; a negative operand returns
// sqrt|A| (the sign is dropped; no exception is raised).
//
// Interface: a in, r out, LNS words. Purely combinational.
module lns_sqrt #(
  parameter int unsigned K = lns_pkg::LNS_K,
  parameter int unsigned F = lns_pkg::LNS_F,
  localparam int unsigned LW = K + F,
  localparam int unsigned W  = 1 + LW
) (
  input  logic [W-1:0] a,
  output logic [W-1:0] r
);

  localparam logic [LW-1:0] ZERO_X = {1'b1, {(LW-1){1'b0}}};

  always_comb begin
    if (a[LW-1:0] == ZERO_X) r = {1'b0, ZERO_X};
    else                     r = {1'b0, a[LW-1], a[LW-1:1]};
  end

endmodule
