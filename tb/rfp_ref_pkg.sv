// Reference arithmetic for the reduced floating-point testbenches. Values are
// handled exactly as a signed integer times a power of two (128-bit integers),
// and rounded once to a format of M mantissa bits with ties away from zero,
// exponent bias B and E exponent bits, flushing underflow to zero and
// saturating overflow, as the hardware format defines.
package rfp_ref_pkg;
  typedef logic signed [127:0] big_t;

  // exact value of an encoded number: (-1)^s * (2^M + m) * 2^(e - bias - M)
  // returned as integer n and exponent x (value = n * 2^x); zero gives n = 0.
  function automatic void decode(logic s, int e, int m, int M, int bias,
                                 output big_t n, output int x);
    if (e == 0) begin n = 0; x = 0; return; end
    n = big_t'((1 << M) + m);
    if (s) n = -n;
    x = e - bias - M;
  endfunction

  // round n * 2^x to the format; returns {s, e, m} packed in the low bits
  function automatic longint encode(big_t n, int x, int M, int E, int bias);
    logic s; big_t a, q; int msb, sh, ef;
    if (n == 0) return 0;
    s = n < 0; a = s ? -n : n;
    msb = 0;
    for (int i = 0; i < 127; i++) if (a[i]) msb = i;
    if (msb > M) begin
      sh = msb - M;
      q = (a >> sh) + ((a >> (sh - 1)) & 1);
      if (q == (big_t'(1) << (M + 1))) begin q = q >> 1; sh++; end
    end else begin
      sh = -(M - msb);
      q = a << (M - msb);
    end
    ef = x + sh + M + bias;
    if (ef <= 0) return 0;
    if (ef > (1 << E) - 1) return (longint'(s) << (E + M)) | ((longint'(1) << (E + M)) - 1);
    return (longint'(s) << (E + M)) | (longint'(ef) << M) | (longint'(q) & ((longint'(1) << M) - 1));
  endfunction

  function automatic longint ref_add(logic [19:0] a, logic [19:0] b);
    big_t na, nb; int xa, xb, xm;
    decode(a[19], int'(a[18:13]), int'(a[12:0]), 13, 31, na, xa);
    decode(b[19], int'(b[18:13]), int'(b[12:0]), 13, 31, nb, xb);
    if (na == 0) return (nb == 0) ? 0 : encode(nb, xb, 13, 6, 31);
    if (nb == 0) return encode(na, xa, 13, 6, 31);
    xm = (xa < xb) ? xa : xb;
    return encode((na <<< (xa - xm)) + (nb <<< (xb - xm)), xm, 13, 6, 31);
  endfunction

  function automatic longint ref_mul(logic [19:0] a, logic [19:0] b);
    big_t na, nb; int xa, xb;
    decode(a[19], int'(a[18:13]), int'(a[12:0]), 13, 31, na, xa);
    decode(b[19], int'(b[18:13]), int'(b[12:0]), 13, 31, nb, xb);
    return encode(na * nb, xa + xb, 13, 6, 31);
  endfunction

  // random internal operand; small exponent spread most of the time
  function automatic logic [19:0] rnd_int(int ebase);
    logic [19:0] v = 20'($urandom);
    int k = $urandom_range(0, 9);
    if (k < 6) v[18:13] = 6'(ebase + $urandom_range(0, 8) - 4);
    else if (k == 6) v[18:13] = 0;
    return v;
  endfunction
endpackage
