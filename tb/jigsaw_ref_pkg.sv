// jigsaw_ref_pkg: reference model used by the JIGSAW testbenches.
//
// Written from the gridding definition rather than from the RTL: a sample at
// coordinate c reaches grid point g when (c - g) mod N lies in [0, W); the
// model finds that point by searching all tiles of the column, computes the
// table entry from the rounded, folded distance, and forms complex products
// directly as (ac - bd, ad + bc) with 64-bit integers before rescaling and
// saturating like the fixed-point datapath.
package jigsaw_ref_pkg;
  import jigsaw_pkg::*;

  // Weight table content used by all tests: entry a (distance a/L from the
  // window centre) has re = 32767 - 120a, im = (73a mod 4001) - 2000.
  function automatic wcplx_t tab_entry(int a);
    wcplx_t e;
    e.re = 16'(32767 - 120 * a);
    e.im = 16'(((73 * a) % 4001) - 2000);
    return e;
  endfunction

  // One dimension: does coordinate c reach column col, in which tile, and at
  // which table entry?
  function automatic void ref_dim(input longint c, input int col, input int nt,
                                  input int t, input int w, input int log2l,
                                  input int tab_depth,
                                  output bit hit, output int tile, output int tab);
    longint one = longint'(1) << COORD_FRAC;
    longint n   = longint'(nt) * t * one;
    hit = 0; tile = 0; tab = 0;
    for (int k = 0; k < nt; k++) begin
      longint g = longint'(k * t + col) * one;
      longint d = ((c - g) % n + n) % n;
      if (d < longint'(w) * one) begin
        longint idx, ctr, f;
        hit  = 1;
        tile = k;
        idx  = (d * (longint'(1) << log2l) + one / 2) / one;
        ctr  = (longint'(w) * (longint'(1) << log2l)) / 2;
        f    = idx > ctr ? idx - ctr : ctr - idx;
        tab  = int'(f > tab_depth - 1 ? tab_depth - 1 : f);
      end
    end
  endfunction

  function automatic longint sat(longint v, int ow);
    longint hi = (longint'(1) << (ow - 1)) - 1;
    longint lo = -(longint'(1) << (ow - 1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  // complex product, arithmetic shift right, saturation to ow bits
  function automatic void ref_cmul(input longint ar, input longint ai,
                                   input longint br, input longint bi,
                                   input int shift, input int ow,
                                   output longint pr, output longint pi);
    pr = sat((ar * br - ai * bi) >>> shift, ow);
    pi = sat((ar * bi + ai * br) >>> shift, ow);
  endfunction

  // 2-D weight from two table entries (Q1.15)
  function automatic wcplx_t ref_weight(int tx, int ty);
    wcplx_t a = tab_entry(tx), b = tab_entry(ty), r;
    longint pr, pi;
    ref_cmul(longint'(a.re), longint'(a.im), longint'(b.re), longint'(b.im), 15, 16, pr, pi);
    r.re = 16'(pr);
    r.im = 16'(pi);
    return r;
  endfunction

  // contribution of a sample value with a 2-D weight
  function automatic cplx_t ref_contrib(cplx_t v, wcplx_t wt);
    cplx_t r;
    longint pr, pi;
    ref_cmul(longint'(v.re), longint'(v.im), longint'(wt.re), longint'(wt.im), 15, 32, pr, pi);
    r.re = 32'(pr);
    r.im = 32'(pi);
    return r;
  endfunction

  function automatic cplx_t cadd(cplx_t a, cplx_t b);
    cplx_t r;
    r.re = a.re + b.re;
    r.im = a.im + b.im;
    return r;
  endfunction

endpackage
