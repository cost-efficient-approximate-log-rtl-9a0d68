// tb_ref_pkg: arithmetic reference models for the testbenches.
//
// Each model computes the expected result from the algorithm's arithmetic
// (leading-one position found by a loop, wide integer shifts), not from the
// circuit structure, so a testbench compares two independent descriptions.
//   ref_mitch   : Mitchell (w = n) and Mitch-w products, unsigned or C1 signed,
//                 biased or unbiased; Mitch-w results are truncated below bit
//                 n-w, as the antilogarithm block's output field is.
//   ref_tuple   : the {A[0], A[n-1], k, mantissa} encoding of RMitch-w.
//   ref_stage / ref_iter : the two-stage iterative log multiplier.
package tb_ref_pkg;
  typedef logic [127:0] u128;

  function automatic int msb_pos(u128 v);
    for (int i = 127; i >= 0; i--) if (v[i]) return i;
    return 0;
  endfunction

  function automatic u128 mask(int bits);
    return (bits >= 128) ? '1 : ((u128'(1) << bits) - 1);
  endfunction

  function automatic int clog2(int v);
    int r = 0;
    while ((1 << r) < v) r++;
    return r;
  endfunction

  // Positive-domain value used by the leading-one logic.
  function automatic u128 pos_dom(u128 a, int n, bit sgn);
    if (sgn && a[n-1]) return ~a & mask(n);
    return a & mask(n);
  endfunction

  // Mantissa bits below the leading one, w-1 of them.
  function automatic u128 mant_w(u128 ap, int n, int w);
    int  k = msb_pos(ap);
    u128 xn = (ap << (n - 1 - k)) & mask(n);
    return (xn >> (n - w)) & mask(w - 1);
  endfunction

  function automatic u128 ref_mitch(u128 a, u128 b, int n, int w, bit sgn, bit unb);
    u128 ap = pos_dom(a, n, sgn), bp = pos_dom(b, n, sgn);
    int  ka = msb_pos(ap), kb = msb_pos(bp);
    u128 ma = mant_w(ap, n, w), mb = mant_w(bp, n, w);
    u128 l, m, d;
    int  c;
    bit  nz;
    if (unb) begin ma[0] = 1'b1; mb[0] = 1'b1; end
    l = (u128'(ka) << (w - 1)) + ma + (u128'(kb) << (w - 1)) + mb;
    if (unb && w >= 5) l = l + (u128'(1) << (w - 5));
    c = int'(l >> (w - 1));
    m = (u128'(1) << (w - 1)) | (l & mask(w - 1));
    if (c >= 2 * n) d = mask(2 * n);
    else begin
      d = (m << c) >> (w - 1);
      if (w < n) d = d & ~mask(n - w);
    end
    if (sgn) nz = ((ka > 0) || a[n-1] || a[0]) && ((kb > 0) || b[n-1] || b[0]);
    else     nz = ((a & mask(n)) != 0) && ((b & mask(n)) != 0);
    if (sgn && (a[n-1] ^ b[n-1])) d = ~d & mask(2 * n);
    return nz ? d : u128'(0);
  endfunction

  function automatic u128 ref_tuple(u128 a, int n, int w);
    int  s  = clog2(n);
    u128 ap = pos_dom(a, n, 1'b1);
    u128 t;
    t = (u128'(a[0]) << (s + w)) | (u128'(a[n-1]) << (s + w - 1)) |
        (u128'(msb_pos(ap)) << (w - 1)) | mant_w(ap, n, w);
    return t;
  endfunction

  // One stage of the iterative multiplier, mb mantissa bits, carry-in 1.
  function automatic void ref_stage(input u128 a, input u128 b, input int n, input int mb,
                                    output u128 c, output bit carry,
                                    output u128 ra, output u128 rb,
                                    output u128 mska, output u128 mskb);
    int  ka = msb_pos(a), kb = msb_pos(b);
    u128 fa = ((((a << (n - 1 - ka)) & mask(n)) >> (n - 1 - mb)) & mask(mb));
    u128 fb = ((((b << (n - 1 - kb)) & mask(n)) >> (n - 1 - mb)) & mask(mb));
    u128 s  = fa + fb + 1;
    int  chr;
    carry = s[mb];
    chr   = ka + kb + int'(carry);
    c     = ((((u128'(1) << mb) | (s & mask(mb))) << chr) >> mb) & mask(2 * n);
    if (a == 0 || b == 0) c = 0;
    mska = (a == 0) ? u128'(0) : mask(ka);
    mskb = (b == 0) ? u128'(0) : mask(kb);
    ra   = a & mska;
    rb   = b & mskb;
  endfunction

  function automatic u128 ref_iter(u128 a, u128 b, int n, int n1, int n2);
    u128 c1, c2, ra, rb, ma, mb, a2, b2, t1, t2, t3, t4;
    bit  cy, cy2;
    ref_stage(a, b, n, n1, c1, cy, ra, rb, ma, mb);
    a2 = cy ? (ma - ra) : ra;
    b2 = cy ? (mb - rb) : rb;
    ref_stage(a2, b2, n, n2, c2, cy2, t1, t2, t3, t4);
    if (a == 0 || b == 0) return 0;
    return (c1 + c2) & mask(2 * n);
  endfunction

  // Product as the convolution core accumulates it: the C1 Mitch-w product
  // pattern (2n bits), bits frac+accw-1..frac.
  function automatic logic [31:0] conv_prod(u128 a, u128 b, int n, int w, int frac, int accw);
    u128 p = ref_mitch(a, b, n, w, 1'b1, 1'b0);
    return 32'((p >> frac) & mask(accw));
  endfunction

  // Signed Q16.16 test value of random magnitude below 2^maxbits, sometimes zero.
  function automatic logic [31:0] rnd_fix(int maxbits);
    logic [31:0] v = $urandom & ((32'(1) << maxbits) - 1);
    v = v >> ($urandom % 8);
    if ($urandom % 10 == 0) v = 0;
    if ($urandom % 2 == 0) v = -v;
    return v;
  endfunction

  // Random operand with a random magnitude, so small and large values occur.
  function automatic u128 rnd_op(int n);
    u128 v = {$urandom, $urandom, $urandom, $urandom};
    v = v & mask(n);
    return v >> ($urandom % n);
  endfunction
endpackage
