// pspec: pipelined carry speculator of the inexact speculative adder.
//
// The speculator predicts the carry entering block i from the operand bits
// of block i-1 alone, so that block i can start adding without waiting for
// the carry chain below it. It looks at a window of the SPEC_BITS most
// significant bit pairs of block i-1: if the window generates a carry the
// guess is 1, if it kills it the guess is 0, and if every bit of the window
// propagates, the guess is bit a[BLK-SPEC_BITS-1] of the lower block (the bit
// just under the window; 0 when the window covers the whole block). Taking
// operand a's bit is exact whenever that bit does not itself propagate.
//
// Pipeline (two ranks, as the speculator spans two pipeline stages):
//   stage 1: per-bit generate/propagate and the window's group (G, P),
//            registered in rank 1 together with the guess bit (enable ce[0]).
//   stage 2: spec_c = G | P & guess, combinational from rank 1. It feeds the
//            carry-in of the sub-adder's second stage in the same cycle, and
//            is registered in rank 2 as spec_q (enable ce[1]) for the
//            compensation stage, aligned with the sub-adder's sum register.
// The enables are clock-gating conditions: a rank keeps its value while its
// enable is low. The window width and the guess rule are this design's own
// choices; the split into two pipeline stages follows the reference design.
module pspec
  import isa_pkg::*;
#(
  parameter int unsigned BLK       = ISA_BLK,
  parameter int unsigned SPEC_BITS = ISA_SPEC_BITS
) (
  input  logic           clk,
  input  logic           rst_n,     // synchronous, active low
  input  logic [1:0]     ce,        // rank enables: [0] stage 1, [1] stage 2
  input  logic [BLK-1:0] a_prev,    // operand a of the block below
  input  logic [BLK-1:0] b_prev,    // operand b of the block below
  output logic           spec_c,    // speculated carry, stage 2 (combinational)
  output logic           spec_q     // speculated carry, registered in rank 2
);

  if (SPEC_BITS < 1 || SPEC_BITS > BLK) begin : g_bad_window
    $error("pspec: SPEC_BITS must be between 1 and BLK");
  end

  gp_t  win_d, win_q;
  logic guess_d, guess_q;

  // Stage 1: group generate/propagate of the window, most significant first.
  always_comb begin
    gp_t bit_gp;
    win_d = '{g: 1'b0, p: 1'b1};
    for (int k = BLK - SPEC_BITS; k < BLK; k++) begin
      bit_gp = '{g: a_prev[k] & b_prev[k], p: a_prev[k] ^ b_prev[k]};
      win_d  = gp_combine(bit_gp, win_d);
    end
  end

  if (SPEC_BITS < BLK) begin : g_guess_bit
    assign guess_d = a_prev[BLK-SPEC_BITS-1];
  end else begin : g_guess_zero
    assign guess_d = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      win_q   <= '0;
      guess_q <= 1'b0;
    end else if (ce[0]) begin
      win_q   <= win_d;
      guess_q <= guess_d;
    end
  end

  // Stage 2: resolve the guess.
  assign spec_c = win_q.g | (win_q.p & guess_q);

  always_ff @(posedge clk) begin
    if (!rst_n)     spec_q <= 1'b0;
    else if (ce[1]) spec_q <= spec_c;
  end

endmodule
