// isa_top: the inexact speculative adder in both of its sub-adder variants,
// side by side.
//
// The same operand stream drives two 16-bit, 4-block ISAs: one whose blocks
// are carry look-ahead adders (the main design) and one whose blocks are
// Brent-Kung adders (the modified design). Both have five register ranks
// from operands to result, accept one addition per cycle while in_valid is
// high, and report, with each result, the speculated carries into bits 4, 8
// and 12, the carries the blocks below really produced, which boundaries were
// mis-speculated and which of those were balanced rather than corrected.
// Putting both variants on one operand stream mirrors the reference design's
// paired simulations of the two; the shared ports are this design's choice.
module isa_top
  import isa_pkg::*;
#(
  parameter int unsigned N         = ISA_N,
  parameter int unsigned BLK       = ISA_BLK,
  parameter int unsigned SPEC_BITS = ISA_SPEC_BITS,
  localparam int unsigned NB       = N / BLK
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  // carry look-ahead variant
  output logic          cla_valid,
  output logic [N:0]    cla_sum,
  output logic [NB-1:1] cla_spec_c,
  output logic [NB-1:1] cla_real_c,
  output logic [NB-1:1] cla_err,
  output logic [NB-1:1] cla_bal,
  // Brent-Kung variant
  output logic          bka_valid,
  output logic [N:0]    bka_sum,
  output logic [NB-1:1] bka_spec_c,
  output logic [NB-1:1] bka_real_c,
  output logic [NB-1:1] bka_err,
  output logic [NB-1:1] bka_bal
);

  isa_adder #(.N(N), .BLK(BLK), .SPEC_BITS(SPEC_BITS), .ADDER(ADDER_CLA)) u_isa_cla (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         (a),
    .b         (b),
    .cin       (cin),
    .out_valid (cla_valid),
    .sum       (cla_sum),
    .spec_c    (cla_spec_c),
    .real_c    (cla_real_c),
    .err       (cla_err),
    .bal       (cla_bal)
  );

  isa_adder #(.N(N), .BLK(BLK), .SPEC_BITS(SPEC_BITS), .ADDER(ADDER_BKA)) u_isa_bka (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .a         (a),
    .b         (b),
    .cin       (cin),
    .out_valid (bka_valid),
    .sum       (bka_sum),
    .spec_c    (bka_spec_c),
    .real_c    (bka_real_c),
    .err       (bka_err),
    .bal       (bka_bal)
  );

endmodule
