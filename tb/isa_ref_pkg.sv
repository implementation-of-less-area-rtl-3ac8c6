// isa_ref_pkg: arithmetic reference model of the inexact speculative adder,
// for the testbenches. It works on integers rather than gates: a block's
// speculated carry is the carry out of (window of a) + (window of b) + guess,
// each block sum is an ordinary addition, and the compensation rule is applied
// to block values. Sizes are arguments so one model serves every
// configuration up to 62 bits.
package isa_ref_pkg;

  typedef struct {
    longint unsigned sum;     // {carry-out, N-bit result}
    longint unsigned spec;    // bit i: speculated carry into block i
    longint unsigned realc;   // bit i: carry produced by block i-1
    longint unsigned err;     // bit i: mis-speculation at boundary i
    longint unsigned bal;     // bit i: boundary i balanced
  } isa_ref_t;

  function automatic longint unsigned field(longint unsigned v, int lo, int w);
    return (v >> lo) & ((64'd1 << w) - 1);
  endfunction

  // Speculated carry into block i (i >= 1).
  function automatic bit ref_spec(longint unsigned a, longint unsigned b,
                                  int i, int blk, int x);
    longint unsigned aw, bw, guess;
    aw    = field(a, i*blk - x, x);
    bw    = field(b, i*blk - x, x);
    guess = (x < blk) ? field(a, i*blk - x - 1, 1) : 0;
    return bit'((aw + bw + guess) >> x);
  endfunction

  // Compensation of speculative block sums.
  function automatic isa_ref_t ref_comp(longint unsigned sums, bit cout_top,
                                        longint unsigned spec,
                                        longint unsigned realc,
                                        int n, int blk);
    isa_ref_t r;
    int nb = n / blk;
    longint unsigned blkv [64];
    longint unsigned maxv = (64'd1 << blk) - 1;
    for (int i = 0; i < nb; i++) blkv[i] = field(sums, i*blk, blk);
    blkv[nb-1] += longint'(cout_top) << blk;    // top block keeps the carry
    r.spec = spec; r.realc = realc; r.err = spec ^ realc; r.bal = 0;
    for (int i = 1; i < nb; i++) begin
      if (r.err[i]) begin
        bit up = realc[i];
        if (i == nb - 1 || (up && blkv[i] != maxv) || (!up && blkv[i] != 0)) begin
          if (up) blkv[i] = blkv[i] + 1;
          else    blkv[i] = blkv[i] - 1;
          // The top block is BLK+1 bits wide; it cannot wrap for operands
          // the adder produces, but arbitrary stimulus may make it.
          if (i != nb - 1) blkv[i] &= maxv;
          else             blkv[i] &= (maxv << 1) | 1;
        end else begin
          r.bal[i]    = 1'b1;
          blkv[i-1] = up ? maxv : 0;
        end
      end
    end
    r.sum = 0;
    for (int i = 0; i < nb; i++) r.sum += blkv[i] << (i*blk);
    return r;
  endfunction

  // Whole adder.
  function automatic isa_ref_t ref_isa(longint unsigned a, longint unsigned b,
                                       bit cin, int n, int blk, int x);
    int nb = n / blk;
    longint unsigned sums = 0, spec = 0, realc = 0;
    bit c = cin;
    bit cout_top = 0;
    for (int i = 0; i < nb; i++) begin
      longint unsigned t;
      if (i > 0) begin
        realc[i] = c;
        c        = ref_spec(a, b, i, blk, x);
        spec[i]  = c;
      end
      t    = field(a, i*blk, blk) + field(b, i*blk, blk) + longint'(c);
      sums += field(t, 0, blk) << (i*blk);
      c    = bit'(t >> blk);
      cout_top = c;
    end
    return ref_comp(sums, cout_top, spec, realc, n, blk);
  endfunction

endpackage
