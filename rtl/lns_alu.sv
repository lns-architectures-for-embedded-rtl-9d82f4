// lns_alu: 16-bit logarithmic-number-system ALU for an embedded model
// predictive control (MPC) datapath.
//
// Operations (lns_pkg::lns_op_e): ADD, SUB, MUL, DIV, SQRT on LNS words
// (sign bit plus a two's-complement base-2 logarithm with K = 6 integer and
// F = 9 fraction bits). MUL/DIV and SQRT are fixed-point add/subtract and
// shift (lns_muldiv, lns_sqrt) and fit in one clock; ADD/SUB uses the
// four-stage cotransformation adder/subtractor (lns_addsub), the only unit
// the source says needs pipelining.
//
// Timing: one operation may be issued every cycle (in_valid). Every
// operation returns its result exactly 4 cycles later with out_valid, in
// issue order. The single-cycle results are delayed through a 4-deep
// register line so that all operations share one result port and one
// latency. That equal-latency scheme, the operation encoding and the
// handling of unused op codes (result is zero) are choices of this design;
// the set of operations and the 4-stage adder follow the source.
//
// Reset: synchronous, active low; clears the valid bits.
module lns_alu #(
  parameter int unsigned K  = lns_pkg::LNS_K,
  parameter int unsigned F  = lns_pkg::LNS_F,
  parameter int unsigned G  = lns_pkg::LNS_G,
  parameter int unsigned ZI = lns_pkg::LNS_ZI,
  parameter int unsigned J  = lns_pkg::LNS_J,
  localparam int unsigned W  = 1 + K + F,
  localparam int unsigned LAT = 4
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  lns_pkg::lns_op_e op,
  input  logic [W-1:0]    a,
  input  logic [W-1:0]    b,
  output logic            out_valid,
  output logic [W-1:0]    r
);

  import lns_pkg::*;

  logic         is_addsub;
  logic         as_valid;
  logic [W-1:0] as_r, md_r, sq_r, short_r;

  assign is_addsub = (op == OP_ADD) || (op == OP_SUB);

  lns_addsub #(.K(K), .F(F), .G(G), .ZI(ZI), .J(J)) u_addsub (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && is_addsub),
    .sub       (op == OP_SUB),
    .a         (a),
    .b         (b),
    .out_valid (as_valid),
    .r         (as_r)
  );

  lns_muldiv #(.K(K), .F(F)) u_muldiv (
    .a   (a),
    .b   (b),
    .div (op == OP_DIV),
    .r   (md_r)
  );

  lns_sqrt #(.K(K), .F(F)) u_sqrt (
    .a (a),
    .r (sq_r)
  );

  always_comb begin
    unique case (op)
      OP_MUL, OP_DIV: short_r = md_r;
      OP_SQRT:        short_r = sq_r;
      default:        short_r = {1'b0, 1'b1, {(K+F-1){1'b0}}};   // zero
    endcase
  end

  // delay line for the single-cycle units
  logic [LAT-1:0]  dl_v, dl_as;
  logic [W-1:0]    dl_r [LAT];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      dl_v  <= '0;
      dl_as <= '0;
    end else begin
      dl_v  <= {dl_v[LAT-2:0], in_valid};
      dl_as <= {dl_as[LAT-2:0], in_valid && is_addsub};
    end
    dl_r[0] <= short_r;
    for (int i = 1; i < LAT; i++) dl_r[i] <= dl_r[i-1];
  end

  assign out_valid = dl_v[LAT-1];
  assign r         = dl_as[LAT-1] ? as_r : dl_r[LAT-1];

  // the adder pipeline and the delay line must agree on every result slot
  a_lat : assert property (@(posedge clk) disable iff (!rst_n)
    as_valid == dl_as[LAT-1]);

endmodule
