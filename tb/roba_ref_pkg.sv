// Reference arithmetic for the RoBA testbenches.
//
// Computes the expected results with plain integer arithmetic, independently of
// the bit-level structure of the RTL: the nearest power of two by comparing the
// distances to the powers below and above, and the approximate product
// Ar*B + Br*A - Ar*Br on magnitudes with the sign applied afterwards.
package roba_ref_pkg;

  // Nearest power of two of x (x < 2^62). Midpoints 3*2^p go to the larger
  // power, except 12, which goes to 8. Zero stays zero.
  function automatic longint unsigned ref_round(input longint unsigned x);
    longint unsigned lo, hi;
    if (x == 0) return 0;
    if (x == 12) return 8;
    lo = 1;
    while (lo * 2 <= x) lo = lo * 2;
    hi = lo * 2;
    return ((x - lo) >= (hi - x)) ? hi : lo;
  endfunction

  // Approximate product of two magnitudes.
  function automatic longint unsigned ref_umul(input longint unsigned a, input longint unsigned b);
    longint unsigned ar, br;
    ar = ref_round(a);
    br = ref_round(b);
    return ar * b + br * a - ar * br;
  endfunction

  // Approximate product of two n-bit operands, as a 2n-bit word.
  // variant: 0 = exact signed, 1 = signed with inversion-only negation, 2 = unsigned.
  function automatic longint unsigned ref_mul(input int n, input int variant,
                                              input longint unsigned a,
                                              input longint unsigned b);
    longint unsigned mask_n, mask_p, ma, mb, m;
    bit sa, sb;
    mask_n = (64'd1 << n) - 1;
    mask_p = (n == 32) ? '1 : ((64'd1 << (2 * n)) - 1);
    a  = a & mask_n;
    b  = b & mask_n;
    if (variant == 2) return ref_umul(a, b) & mask_p;
    sa = a[n-1];
    sb = b[n-1];
    ma = sa ? ((~a + 1) & mask_n) : a;
    mb = sb ? ((~b + 1) & mask_n) : b;
    m  = ref_umul(ma, mb);
    if (sa ^ sb) m = (variant == 0) ? (~m + 1) : ~m;
    return m & mask_p;
  endfunction

endpackage
