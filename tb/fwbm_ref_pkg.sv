// fwbm_ref_pkg: integer reference models for the fixed-width Booth
// multiplier testbenches.
//
// fw_ref() rebuilds the kept part of the radix-4 partial-product matrix with
// plain integer arithmetic, not with adders. Each digit d_i is taken from
// y as y[2i-1] + y[2i] - 2*y[2i+1]. Row i is the (L+1)-bit pattern of
// d_i*xd - neg_i with its top bit inverted, weighted by 4^i; neg_i is added
// as 4^i. Bits below column L-1 are masked off. The sign constant and the
// bias floor(3L/16)+1 (in units of 2^(L-1)), plus ds in column L-1, are
// added, and the sum is taken mod 2^2L. The result is bits 2L-1..L.
// dst_ref() adds the one-bit data scaling around it.
package fwbm_ref_pkg;

  function automatic longint sext(input longint v, input int bits);
    longint m = (longint'(1) << bits) - 1;
    v = v & m;
    if (((v >> (bits - 1)) & 1) != 0) v = v - (longint'(1) << bits);
    return v;
  endfunction

  // Upper L bits (as an unsigned L-bit pattern) of the truncated product.
  function automatic longint fw_ref(input longint xd_s, input longint y_u,
                                    input bit ds, input int L);
    longint tot = 0;
    longint mask_hi = ~((longint'(1) << (L - 1)) - 1);
    longint modv = longint'(1) << (2 * L);
    for (int i = 0; i < L / 2; i++) begin
      longint bm1 = (i == 0) ? 0 : (y_u >> (2*i - 1)) & 1;
      longint b0  = (y_u >> (2*i)) & 1;
      longint b1  = (y_u >> (2*i + 1)) & 1;
      longint d   = bm1 + b0 - 2 * b1;
      longint ng  = (d < 0) ? 1 : 0;
      longint pat = (d * xd_s - ng) & ((longint'(1) << (L + 1)) - 1);
      longint row = pat ^ (longint'(1) << L);
      tot += (row << (2*i)) & mask_hi;
      tot += (ng << (2*i)) & mask_hi;
    end
    for (int i = 0; i < L / 2; i++) tot -= longint'(1) << (L + 2*i);
    tot += longint'((3 * L) / 16 + 1) << (L - 1);
    tot += longint'(ds) << (L - 1);
    tot = ((tot % modv) + modv) % modv;
    return tot >> L;
  endfunction

  // Full DST-FWBM: signed L-bit result.
  function automatic longint dst_ref(input longint x_s, input longint y_s, input int L,
                                     output bit scaled);
    longint xd;
    longint pd;
    scaled = (x_s >= -(longint'(1) << (L - 2))) && (x_s < (longint'(1) << (L - 2)));
    xd = scaled ? 2 * x_s : x_s;
    pd = sext(fw_ref(xd, y_s & ((longint'(1) << L) - 1), scaled, L), L);
    return scaled ? (pd >>> 1) : pd;
  endfunction

endpackage
