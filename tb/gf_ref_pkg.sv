// Reference arithmetic for the testbenches: GF(2^m) multiplication written
// the textbook way (carry-less schoolbook product of full length, then
// long division by the field polynomial), independent of the systolic
// shift-and-reduce order used by the RTL. Widths up to 32 bits.
package gf_ref_pkg;

  // Carry-less product of a (m bits) and b (k bits), up to 64 bits long.
  function automatic longint unsigned clmul(input int unsigned a, input int unsigned b);
    longint unsigned acc = 0;
    for (int i = 0; i < 32; i++)
      if (b[i]) acc ^= longint'(a) << i;
    return acc;
  endfunction

  // Remainder of v divided by the polynomial x^m + f_low.
  function automatic int unsigned polymod(input longint unsigned v, input int m,
                                          input int unsigned f_low);
    longint unsigned full = (longint'(1) << m) | longint'(f_low);
    for (int i = 63; i >= m; i--)
      if (v[i]) v ^= full << (i - m);
    return int'(v);
  endfunction

  function automatic int unsigned gf_mul(input int unsigned a, input int unsigned b,
                                         input int m, input int unsigned f_low);
    return polymod(clmul(a, b), m, f_low);
  endfunction

endpackage
