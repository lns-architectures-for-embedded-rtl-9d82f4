// lns_muldiv: LNS multiplier/divider.
//
// In LNS a product is the sum of the logarithms and a quotient their
// difference; the sign is the exclusive-or of the signs. This unit is a
// single (K+F+1)-bit adder/subtractor plus range handling, as the source
// describes it ("multiplication ... consist[s] in fixed point addition").
// Choices of this design: a zero operand gives zero (0 / B = 0); division
// by zero gives the largest magnitude with the sign S_A ^ S_B; a result
// logarithm of 32 or more saturates to the largest code and one at or below
// the zero code flushes to zero.
//
// Interface: a, b LNS words, div selects A / B (else A * B), r the result.
// Purely combinational; the ALU registers it.
module lns_muldiv #(
  parameter int unsigned K = lns_pkg::LNS_K,
  parameter int unsigned F = lns_pkg::LNS_F,
  localparam int unsigned LW = K + F,
  localparam int unsigned W  = 1 + LW
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         div,
  output logic [W-1:0] r
);

  localparam logic [LW-1:0] ZERO_X = {1'b1, {(LW-1){1'b0}}};
  localparam logic [LW-1:0] MAX_X  = {1'b0, {(LW-1){1'b1}}};

  logic                 za, zb, sign;
  logic signed [LW:0]   sum;

  always_comb begin
    za   = (a[LW-1:0] == ZERO_X);
    zb   = (b[LW-1:0] == ZERO_X);
    sign = a[W-1] ^ b[W-1];
    sum  = div ? (LW+1)'($signed(a[LW-1:0])) - (LW+1)'($signed(b[LW-1:0]))
               : (LW+1)'($signed(a[LW-1:0])) + (LW+1)'($signed(b[LW-1:0]));
    if (za || (zb && !div))                     r = {1'b0, ZERO_X};
    else if (zb)                                r = {sign, MAX_X};
    else if (sum >= (LW+1)'(2 ** (LW - 1)))     r = {sign, MAX_X};
    else if (sum <= -(LW+1)'(2 ** (LW - 1)))    r = {1'b0, ZERO_X};
    else                                        r = {sign, sum[LW-1:0]};
  end

endmodule
