// pcla4: pipelined carry look-ahead sub-adder (4 bits by default).
//
// One block of the inexact speculative adder. Stage 1 forms the per-bit
// propagate p = a ^ b and generate g = a & b and, in carry look-ahead style,
// the group terms of every prefix k:0 as flat sums of products:
//   G[k:0] = g[k] | p[k] g[k-1] | ... | p[k]..p[1] g[0],  P[k:0] = p[k]..p[0].
// These are registered in rank 1 (enable ce[0]). Stage 2 applies the block's
// carry-in, which arrives one cycle after the operands (it is the speculated
// carry from pspec): c[k+1] = G[k:0] | P[k:0] & cin, sum[k] = p[k] ^ c[k],
// cout = c[W]. Sum and carry-out are registered in rank 2 (enable ce[1]).
// The carry look-ahead sub-adder in two pipeline stages follows the reference
// design; where exactly the stage boundary lies is this design's choice.
module pcla4
  import isa_pkg::*;
#(
  parameter int unsigned W = ISA_BLK
) (
  input  logic         clk,
  input  logic         rst_n,    // synchronous, active low
  input  logic [1:0]   ce,       // rank enables
  input  logic [W-1:0] a,        // stage 1 operands
  input  logic [W-1:0] b,
  input  logic         cin,      // stage 2 carry-in (one cycle after a, b)
  output logic [W-1:0] sum_q,    // rank 2
  output logic         cout_q    // rank 2
);

  logic [W-1:0] p_d, g_d, p_q;
  logic [W-1:0] gg_d, pp_d, gg_q, pp_q;   // prefix group terms k:0

  assign p_d = a ^ b;
  assign g_d = a & b;

  // Flat look-ahead equations, one per prefix.
  always_comb begin
    for (int k = 0; k < W; k++) begin
      logic term;
      gg_d[k] = 1'b0;
      pp_d[k] = 1'b1;
      for (int j = 0; j <= k; j++) begin
        term = g_d[j];
        for (int m = j + 1; m <= k; m++) term = term & p_d[m];
        gg_d[k] = gg_d[k] | term;
        pp_d[k] = pp_d[k] & p_d[j];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      p_q  <= '0;
      gg_q <= '0;
      pp_q <= '0;
    end else if (ce[0]) begin
      p_q  <= p_d;
      gg_q <= gg_d;
      pp_q <= pp_d;
    end
  end

  logic [W:0] c;
  assign c[0]     = cin;
  assign c[W:1]   = gg_q | (pp_q & {W{cin}});

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q  <= '0;
      cout_q <= 1'b0;
    end else if (ce[1]) begin
      sum_q  <= p_q ^ c[W-1:0];
      cout_q <= c[W];
    end
  end

endmodule
