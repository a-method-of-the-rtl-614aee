// fp_pp_ref_pkg -- reference arithmetic for the adder testbenches.
//
// Works on plain integers rather than bit vectors: an aligned mantissa is the
// floor of m / 2^d (what an arithmetic right shift that drops low bits gives),
// computed by division and a correction for negative remainders, and the
// reference sum follows the textbook order: pick the larger exponent, align
// the other mantissa by the exponent distance, add.
package fp_pp_ref_pkg;

  // value of an n-bit two's complement word
  function automatic longint sval(longint unsigned w, int unsigned n);
    longint v;
    v = longint'(w & ((64'd1 << n) - 1));
    if (v >= (64'sd1 <<< (n - 1))) v = v - (64'sd1 <<< n);
    return v;
  endfunction

  // floor(m / 2^d)
  function automatic longint floor_shift(longint m, int unsigned d);
    longint p, q;
    if (d >= 62) return (m < 0) ? -1 : 0;
    p = 64'sd1 <<< d;
    q = m / p;
    if ((m % p) != 0 && m < 0) q = q - 1;
    return q;
  endfunction

  // reference mantissa sum and exponent
  function automatic void ref_add(input longint am, input int unsigned ae,
                                  input longint bm, input int unsigned be,
                                  output longint sm, output int unsigned se);
    if (ae >= be) begin
      se = ae;
      sm = am + floor_shift(bm, ae - be);
    end else begin
      se = be;
      sm = bm + floor_shift(am, be - ae);
    end
  endfunction

endpackage
