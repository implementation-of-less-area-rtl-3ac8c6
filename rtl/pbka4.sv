// pbka4: pipelined Brent-Kung sub-adder (4 bits by default).
//
// Drop-in replacement for pcla4 in the modified inexact speculative adder,
// with the same ports and timing. Instead of flat look-ahead equations it
// builds the prefix group terms with a Brent-Kung tree of two-input carry
// operators (g, p) o (g', p') = (g | p g', p p'). For 4 bits the tree is:
//   level 1: (G,P)[1:0] = (1) o (0),       (G,P)[3:2] = (3) o (2)
//   level 2: (G,P)[3:0] = [3:2] o [1:0],   (G,P)[2:0] = (2) o [1:0]
// so the carries out of bits 0..3 are G0, G[1:0], G[2:0] and G[3:0] (the last
// is the block carry-out), and sum bit 0 needs only a0 ^ b0 ^ cin. Wider
// powers of two use the same up-sweep / down-sweep pattern.
// Stage 1 (rank 1, enable ce[0]): per-bit p, g and the whole tree, computed
// with carry-in 0. Stage 2 (rank 2, enable ce[1]): the carry-in, which comes
// one cycle later from the speculator, is applied as c[k+1] = G[k:0] |
// P[k:0] & cin, then sum[k] = p[k] ^ c[k]. The tree follows the reference
// design's 4-bit Brent-Kung diagram, which is drawn with carry-in 0; folding a
// nonzero carry-in in after the tree, and the stage boundary, are this
// design's choices.
module pbka4
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

  if (W < 2 || (W & (W - 1)) != 0) begin : g_bad_width
    $error("pbka4: W must be a power of two of at least 2");
  end

  logic [W-1:0] p_d, p_q;
  gp_t  [W-1:0] node;                     // node[k] ends as prefix k:0
  logic [W-1:0] gg_d, pp_d, gg_q, pp_q;

  assign p_d = a ^ b;

  always_comb begin
    for (int k = 0; k < W; k++) node[k] = '{g: a[k] & b[k], p: a[k] ^ b[k]};
    // Up-sweep.
    for (int d = 1; d < W; d = d * 2)
      for (int k = 2 * d - 1; k < W; k += 2 * d)
        node[k] = gp_combine(node[k], node[k-d]);
    // Down-sweep.
    for (int d = W / 4; d >= 1; d = d / 2)
      for (int k = 3 * d - 1; k < W; k += 2 * d)
        node[k] = gp_combine(node[k], node[k-d]);
    for (int k = 0; k < W; k++) begin
      gg_d[k] = node[k].g;
      pp_d[k] = node[k].p;
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
  assign c[0]   = cin;
  assign c[W:1] = gg_q | (pp_q & {W{cin}});

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
