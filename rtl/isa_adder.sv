// isa_adder: pipelined inexact speculative adder (ISA).
//
// An N-bit adder cut into NB = N/BLK sub-adders that run in parallel. The
// carry into block 0 is the real carry-in; the carry into every other block
// is predicted by a speculator (pspec) from the top bits of the block below,
// so no carry ripples across block boundaries and the critical path is one
// short block. A wrong prediction is caught afterwards by the compensation
// unit (pcomp), which either corrects the affected block exactly or, when that
// would overflow the block, balances the block below to shrink the error.
// The result is therefore exact most of the time and approximate otherwise.
//
// ADDER selects the sub-adder: ADDER_CLA builds every block as a carry
// look-ahead adder (pcla4, the main design), ADDER_BKA as a Brent-Kung adder
// (pbka4, the modified design). Both have identical timing.
//
// Timing: operands are taken when in_valid is high and the result appears
// ISA_LATENCY = 5 clock edges later with out_valid high:
//   rank 0  input register (a, b, cin)
//   rank 1  speculator stage 1  |  sub-adder stage 1 (p, g, group terms)
//   rank 2  speculator stage 2 -> sub-adder stage 2 (carry-in, sums)
//   rank 3  compensation stage 1 (error detection)
//   rank 4  compensation stage 2 (correction / balancing) -> outputs
// One new addition can be started every cycle. Each rank loads only when
// the data reaching it is valid, i.e. its clock is gated by the valid bit of
// the rank before; with no traffic the datapath registers stay still. The
// two-stage speculator, sub-adders and compensation and the gated clock
// follow the reference design; the input rank, the valid-bit enables and the
// synchronous active-low reset are this design's own choices.
module isa_adder
  import isa_pkg::*;
#(
  parameter int unsigned N         = ISA_N,
  parameter int unsigned BLK       = ISA_BLK,
  parameter int unsigned SPEC_BITS = ISA_SPEC_BITS,
  parameter adder_kind_e ADDER     = ADDER_CLA,
  localparam int unsigned NB       = N / BLK
) (
  input  logic          clk,
  input  logic          rst_n,      // synchronous, active low
  input  logic          in_valid,
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  output logic          out_valid,
  output logic [N:0]    sum,        // {carry-out, N-bit sum}
  output logic [NB-1:1] spec_c,     // speculated carries into blocks 1..NB-1
  output logic [NB-1:1] real_c,     // carries blocks 0..NB-2 produced
  output logic [NB-1:1] err,        // mis-speculation per boundary
  output logic [NB-1:1] bal         // boundary balanced instead of corrected
);

  // ---------------- valid pipeline / clock enables ----------------
  logic [ISA_LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ISA_LATENCY-2:0], in_valid};
  end

  assign out_valid = vld[ISA_LATENCY-1];

  // ---------------- rank 0: input register ----------------
  logic [N-1:0] a_r, b_r;
  logic         cin_r, cin_r1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_r   <= '0;
      b_r   <= '0;
      cin_r <= 1'b0;
    end else if (in_valid) begin
      a_r   <= a;
      b_r   <= b;
      cin_r <= cin;
    end
  end

  // The real carry-in enters block 0 at the sub-adder's second stage.
  always_ff @(posedge clk) begin
    if (!rst_n)      cin_r1 <= 1'b0;
    else if (vld[0]) cin_r1 <= cin_r;
  end

  // ---------------- ranks 1-2: speculators and sub-adders ----------------
  logic [NB-1:0] blk_cin;      // stage-2 carry-in of each block
  logic [NB-1:1] spec_q;       // speculated carries, rank 2
  logic [N-1:0]  blk_sum;      // speculative sums, rank 2
  logic [NB-1:0] blk_cout;     // block carry-outs, rank 2

  assign blk_cin[0] = cin_r1;

  for (genvar i = 1; i < NB; i++) begin : g_spec
    pspec #(.BLK(BLK), .SPEC_BITS(SPEC_BITS)) u_pspec (
      .clk    (clk),
      .rst_n  (rst_n),
      .ce     (vld[1:0]),
      .a_prev (a_r[(i-1)*BLK +: BLK]),
      .b_prev (b_r[(i-1)*BLK +: BLK]),
      .spec_c (blk_cin[i]),
      .spec_q (spec_q[i])
    );
  end

  for (genvar i = 0; i < NB; i++) begin : g_blk
    if (ADDER == ADDER_BKA) begin : g_bka
      pbka4 #(.W(BLK)) u_add (
        .clk    (clk),
        .rst_n  (rst_n),
        .ce     (vld[1:0]),
        .a      (a_r[i*BLK +: BLK]),
        .b      (b_r[i*BLK +: BLK]),
        .cin    (blk_cin[i]),
        .sum_q  (blk_sum[i*BLK +: BLK]),
        .cout_q (blk_cout[i])
      );
    end else begin : g_cla
      pcla4 #(.W(BLK)) u_add (
        .clk    (clk),
        .rst_n  (rst_n),
        .ce     (vld[1:0]),
        .a      (a_r[i*BLK +: BLK]),
        .b      (b_r[i*BLK +: BLK]),
        .cin    (blk_cin[i]),
        .sum_q  (blk_sum[i*BLK +: BLK]),
        .cout_q (blk_cout[i])
      );
    end
  end

  // ---------------- ranks 3-4: compensation ----------------
  pcomp #(.N(N), .BLK(BLK)) u_pcomp (
    .clk     (clk),
    .rst_n   (rst_n),
    .ce      (vld[3:2]),
    .sum_in  (blk_sum),
    .cout_in (blk_cout[NB-1]),
    .spec    (spec_q),
    .real_c  (blk_cout[NB-2:0]),
    .sum_q   (sum),
    .err_q   (err),
    .bal_q   (bal)
  );

  // Speculated and real carries, delayed to line up with the result.
  logic [NB-1:1] spec_d3, real_d3;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      spec_d3 <= '0;
      real_d3 <= '0;
      spec_c  <= '0;
      real_c  <= '0;
    end else begin
      if (vld[2]) begin
        spec_d3 <= spec_q;
        real_d3 <= blk_cout[NB-2:0];
      end
      if (vld[3]) begin
        spec_c <= spec_d3;
        real_c <= real_d3;
      end
    end
  end

endmodule
