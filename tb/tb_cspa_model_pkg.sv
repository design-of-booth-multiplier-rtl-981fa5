// tb_cspa_model_pkg: arithmetic reference model of the carry speculative adder
// for the testbenches.
//
// Everything here is worked out with whole-number additions on 64-bit values,
// not with the propagate/generate logic of the design: the true carry out of a
// block is bit (lo+w) of the sum of the operands' low lo+w bits, and the
// predicted carry is the carry out of adding only the block's top k bits.
// Blocks are x bits wide except the leftmost, which takes the rest of n; the
// predictor of a block narrower than k uses the whole block. Widths up to 62.
package tb_cspa_model_pkg;

  typedef logic [63:0] u64_t;

  function automatic u64_t lowbits(u64_t v, int unsigned nb);
    return (nb >= 64) ? v : (v & ((u64_t'(1) << nb) - 1));
  endfunction

  function automatic int unsigned nblocks(int unsigned n, int unsigned x);
    return (n + x - 1) / x;
  endfunction

  function automatic int unsigned blk_w(int unsigned i, int unsigned n, int unsigned x);
    return (i == nblocks(n, x) - 1) ? n - i * x : x;
  endfunction

  // true carry out of block i
  function automatic bit true_cout(u64_t a, u64_t b, int unsigned i, int unsigned n, int unsigned x);
    int unsigned top = i * x + blk_w(i, n, x);
    u64_t s = lowbits(a, top) + lowbits(b, top);
    return s[top];
  endfunction

  // predicted carry out of block i: carry of its top k bits alone
  function automatic bit pred_cout(u64_t a, u64_t b, int unsigned i, int unsigned n,
                                   int unsigned x, int unsigned k);
    int unsigned w   = blk_w(i, n, x);
    int unsigned kk  = (k < w) ? k : w;
    int unsigned top = i * x + w;
    u64_t s = lowbits(a >> (top - kk), kk) + lowbits(b >> (top - kk), kk);
    return s[kk];
  endfunction

  // mask of blocks whose carry out is mispredicted
  function automatic u64_t mispredict(u64_t a, u64_t b, int unsigned n, int unsigned x,
                                      int unsigned k);
    u64_t m = '0;
    for (int unsigned i = 0; i < nblocks(n, x); i++)
      m[i] = true_cout(a, b, i, n, x) ^ pred_cout(a, b, i, n, x, k);
    return m;
  endfunction

  // the speculative sum: every block adds the carry predicted for the block below
  function automatic u64_t spec_sum(u64_t a, u64_t b, int unsigned n, int unsigned x,
                                    int unsigned k);
    u64_t r = '0;
    for (int unsigned i = 0; i < nblocks(n, x); i++) begin
      int unsigned w  = blk_w(i, n, x);
      int unsigned lo = i * x;
      u64_t cin = (i == 0) ? 0 : u64_t'(pred_cout(a, b, i - 1, n, x, k));
      u64_t s = lowbits(lowbits(a >> lo, w) + lowbits(b >> lo, w) + cin, w);
      r |= s << lo;
    end
    return r;
  endfunction

  // index of the lowest set bit, -1 for none
  function automatic int lowest(u64_t m);
    for (int i = 0; i < 64; i++) if (m[i]) return i;
    return -1;
  endfunction

endpackage
