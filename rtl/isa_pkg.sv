// isa_pkg: types and constants shared by the inexact speculative adder (ISA).
//
// The ISA splits an N-bit addition into N/BLK independent sub-adders. Each
// sub-adder gets a speculated carry-in instead of waiting for the real one;
// a compensation stage afterwards repairs or shrinks the error a wrong guess
// causes. The defaults (16 bits, 4-bit blocks) follow the 16-bit operands and
// the carries at bits 4, 8 and 12 shown in the reference simulations; the
// speculation window width is this design's own choice.
package isa_pkg;

  // Which sub-adder each block uses: carry look-ahead (the main design) or
  // Brent-Kung (the modified design).
  typedef enum logic [0:0] {
    ADDER_CLA = 1'b0,
    ADDER_BKA = 1'b1
  } adder_kind_e;

  localparam int unsigned ISA_N         = 16;  // operand width
  localparam int unsigned ISA_BLK       = 4;   // sub-adder width
  localparam int unsigned ISA_SPEC_BITS = 2;   // speculation window (own choice)

  // Register ranks between the operand inputs and the result output:
  // input rank, two ranks for speculation / sub-addition, two for compensation.
  localparam int unsigned ISA_LATENCY   = 5;

  // Carry operator of parallel-prefix adders on (generate, propagate) pairs:
  // (g_hi, p_hi) o (g_lo, p_lo) = (g_hi | p_hi & g_lo, p_hi & p_lo).
  typedef struct packed {
    logic g;
    logic p;
  } gp_t;

  function automatic gp_t gp_combine(gp_t hi, gp_t lo);
    gp_t r;
    r.g = hi.g | (hi.p & lo.g);
    r.p = hi.p & lo.p;
    return r;
  endfunction

endpackage
