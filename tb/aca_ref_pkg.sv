// aca_ref_pkg: reference models for the testbenches, written at word level
// so that they do not share structure with the bit-level RTL.
//
// sara_ref adds segment by segment with integer arithmetic. Segment k gets
// the chain carry c_hat = (boundary approximate) ? g of the bit below : the
// real carry-out of segment k-1; its sum is (a_k + b_k + c_hat), except that
// its lowest sum bit is recomputed with the real carry. dar_ref forms the
// boundary modes from the W propagate bits below each boundary.
package aca_ref_pkg;

  function automatic logic [63:0] mask(int n);
    return (n >= 64) ? '1 : ((64'd1 << n) - 64'd1);
  endfunction

  // returns {cout, sum} in the low n+1 bits
  function automatic logic [64:0] sara_ref(logic [63:0] a, logic [63:0] b, logic cin,
                                           logic [63:0] approx, int n, int l);
    logic [63:0] sum   = '0;
    logic        cprev = cin;
    logic [64:0] r;
    for (int k = 0; k < n / l; k++) begin
      int          lo = k * l;
      logic [63:0] av = (a >> lo) & mask(l);
      logic [63:0] bv = (b >> lo) & mask(l);
      logic        chain;
      logic [64:0] t;
      logic [63:0] seg;
      if (k == 0)          chain = cin;
      else if (approx[k-1]) chain = a[lo-1] & b[lo-1];
      else                 chain = cprev;
      t      = {1'b0, av} + {1'b0, bv} + {64'd0, chain};
      seg    = t[63:0] & mask(l);
      seg[0] = a[lo] ^ b[lo] ^ cprev;
      sum    = sum | (seg << lo);
      cprev  = t[l];
    end
    r = {1'b0, sum};
    r[n] = cprev;
    return r;
  endfunction

  function automatic logic [63:0] dar_ref(logic [63:0] a, logic [63:0] b, int n, int l, int w);
    logic [63:0] p = a ^ b;
    logic [63:0] r = '0;
    for (int k = 1; k < n / l; k++) begin
      int hi = k * l - 1;
      int lo = (hi - w + 1 < 0) ? 0 : hi - w + 1;
      logic [63:0] win = (p >> lo) & mask(hi - lo + 1);
      r[k-1] = (win == mask(hi - lo + 1));
    end
    return r;
  endfunction

endpackage
