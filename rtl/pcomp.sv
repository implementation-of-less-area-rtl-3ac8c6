// pcomp: pipelined bidirectional error compensation of the inexact
// speculative adder.
//
// Block i (i = 1 .. NB-1) of the adder was summed with a speculated carry-in
// spec[i]. The carry that block i-1 really produced, real_c[i], arrives with
// the sums. Where the two differ the block's sum is off by one unit of the
// block (2^(BLK*i)): too small when the real carry is 1 (error "up"), too big
// when it is 0 (error "down"). The compensation is bidirectional:
//   * correction: block i's sum is incremented (error up) or decremented
//     (error down), which repairs the error exactly, provided the step does
//     not wrap the block (sum all ones for up, all zeros for down);
//   * balancing: when it would wrap, block i is left as it is and the sum of
//     block i-1 is forced to all ones (error up) or all zeros (error down),
//     which shrinks the error instead of removing it.
// The top block is corrected together with the final carry-out, a BLK+1 bit
// value that can never wrap, so it is always repaired exactly. Boundaries are
// handled from the least significant up; balancing by block i overrides
// whatever block i-1 did to itself.
//
// Pipeline (two ranks): stage 1 detects errors, their direction and whether a
// correction is possible, registered with the sums in rank 1 (enable ce[0]);
// stage 2 applies the corrections and balancing, registered in rank 2 (enable
// ce[1]). Latency 2 cycles. Bidirectional compensation in two pipeline stages
// follows the reference design; the exact correct-or-balance rule above is
// this design's own choice, as the reference does not spell it out.
module pcomp
  import isa_pkg::*;
#(
  parameter int unsigned N   = ISA_N,
  parameter int unsigned BLK = ISA_BLK,
  localparam int unsigned NB = N / BLK
) (
  input  logic          clk,
  input  logic          rst_n,     // synchronous, active low
  input  logic [1:0]    ce,        // rank enables
  input  logic [N-1:0]  sum_in,    // speculative sums of all blocks
  input  logic          cout_in,   // carry-out of the top block
  input  logic [NB-1:1] spec,      // speculated carry into block i
  input  logic [NB-1:1] real_c,    // carry produced by block i-1
  output logic [N:0]    sum_q,     // compensated result, rank 2
  output logic [NB-1:1] err_q,     // mis-speculation at boundary i, rank 2
  output logic [NB-1:1] bal_q      // boundary i was balanced, not corrected
);

  if (NB < 2 || NB * BLK != N) begin : g_bad_split
    $error("pcomp: N must be a multiple of BLK with at least two blocks");
  end

  // ---------------- stage 1: detection ----------------
  logic [NB-1:1] err_d, up_d, ok_d;

  always_comb begin
    for (int i = 1; i < NB; i++) begin
      logic [BLK-1:0] s;
      s        = sum_in[i*BLK +: BLK];
      err_d[i] = spec[i] ^ real_c[i];
      up_d[i]  = real_c[i];
      if (i == NB - 1) ok_d[i] = 1'b1;                 // never wraps
      else if (up_d[i]) ok_d[i] = (s != '1);
      else              ok_d[i] = (s != '0);
    end
  end

  logic [N-1:0]  sum1_q;
  logic          cout1_q;
  logic [NB-1:1] err1_q, up1_q, ok1_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum1_q  <= '0;
      cout1_q <= 1'b0;
      err1_q  <= '0;
      up1_q   <= '0;
      ok1_q   <= '0;
    end else if (ce[0]) begin
      sum1_q  <= sum_in;
      cout1_q <= cout_in;
      err1_q  <= err_d;
      up1_q   <= up_d;
      ok1_q   <= ok_d;
    end
  end

  // ---------------- stage 2: correction / balancing ----------------
  logic [N:0]    res_d;
  logic [NB-1:1] bal_d;

  always_comb begin
    res_d = {cout1_q, sum1_q};
    bal_d = '0;
    for (int i = 1; i < NB; i++) begin
      if (err1_q[i]) begin
        if (ok1_q[i]) begin
          if (i == NB - 1) begin
            if (up1_q[i]) res_d[(NB-1)*BLK +: BLK+1] = res_d[(NB-1)*BLK +: BLK+1] + 1'b1;
            else          res_d[(NB-1)*BLK +: BLK+1] = res_d[(NB-1)*BLK +: BLK+1] - 1'b1;
          end else begin
            if (up1_q[i]) res_d[i*BLK +: BLK] = res_d[i*BLK +: BLK] + 1'b1;
            else          res_d[i*BLK +: BLK] = res_d[i*BLK +: BLK] - 1'b1;
          end
        end else begin
          bal_d[i] = 1'b1;
          res_d[(i-1)*BLK +: BLK] = {BLK{up1_q[i]}};
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sum_q <= '0;
      err_q <= '0;
      bal_q <= '0;
    end else if (ce[1]) begin
      sum_q <= res_d;
      err_q <= err1_q;
      bal_q <= bal_d;
    end
  end

endmodule
