// fft_model_pkg: word-level reference model used by the testbenches.
// It computes, one whole word at a time, what the bit-slice pipeline must
// produce: 4-bit two's complement sums that wrap, products of a 4-bit word by a
// 4-bit twiddle keeping product bits [TWF+W-1:TWF], complex products built from
// four such truncated real products, the butterfly cells, the eight-point
// split-radix block and the whole 8 x 8 decomposed 64-point transform.
// Twiddles are derived here from $cos/$sin, independently of the RTL's table.
package fft_model_pkg;
  import fft_pkg::W;
  import fft_pkg::TWF;
  import fft_pkg::word_t;
  import fft_pkg::cword_t;
  import fft_pkg::algo_e;
  import fft_pkg::ALG_SPLIT;
  import fft_pkg::ALG_MIXED;
  import fft_pkg::ALG_RADIX2;

  localparam real PI = 3.14159265358979323846;

  function automatic word_t m_mul(word_t a, word_t w);
    int p;
    p = int'(a) * int'(w);
    return word_t'(p >>> TWF);
  endfunction

  function automatic cword_t c_add(cword_t a, cword_t b);
    cword_t r; r.re = a.re + b.re; r.im = a.im + b.im; return r;
  endfunction
  function automatic cword_t c_sub(cword_t a, cword_t b);
    cword_t r; r.re = a.re - b.re; r.im = a.im - b.im; return r;
  endfunction
  // a - j*b
  function automatic cword_t c_sub_j(cword_t a, cword_t b);
    cword_t r; r.re = a.re + b.im; r.im = a.im - b.re; return r;
  endfunction
  // a + j*b
  function automatic cword_t c_add_j(cword_t a, cword_t b);
    cword_t r; r.re = a.re - b.im; r.im = a.im + b.re; return r;
  endfunction
  function automatic cword_t c_mul(cword_t a, cword_t w);
    cword_t r;
    r.re = m_mul(a.re, w.re) - m_mul(a.im, w.im);
    r.im = m_mul(a.re, w.im) + m_mul(a.im, w.re);
    return r;
  endfunction

  function automatic word_t q_round(real v);
    return word_t'(int'($floor(v * real'(1 << TWF) + 0.5)));
  endfunction

  // W_n^k = exp(-j*2*pi*k/n)
  function automatic cword_t m_tw(int k, int n);
    cword_t t;
    t.re = q_round($cos(2.0 * PI * k / n));
    t.im = q_round(-$sin(2.0 * PI * k / n));
    return t;
  endfunction

  function automatic void m_r2(input cword_t a, b, w, output cword_t y0, y1);
    y0 = c_add(a, b);
    y1 = c_mul(c_sub(a, b), w);
  endfunction

  function automatic void m_sr(input cword_t a, b, c, d, w1, w3,
                               output cword_t u0, u1, z1, z3);
    cword_t d0, d1;
    u0 = c_add(a, c);
    u1 = c_add(b, d);
    d0 = c_sub(a, c);
    d1 = c_sub(b, d);
    z1 = c_mul(c_sub_j(d0, d1), w1);
    z3 = c_mul(c_add_j(d0, d1), w3);
  endfunction

  function automatic void m_r4(input cword_t a, b, c, d, w1, w2, w3,
                               output cword_t y0, y1, y2, y3);
    cword_t s0, s1, d0, d1;
    s0 = c_add(a, c);  s1 = c_add(b, d);
    d0 = c_sub(a, c);  d1 = c_sub(b, d);
    y0 = c_add(s0, s1);
    y1 = c_mul(c_sub_j(d0, d1), w1);
    y2 = c_mul(c_sub(s0, s1), w2);
    y3 = c_mul(c_add_j(d0, d1), w3);
  endfunction

  typedef cword_t cvec8_t [8];
  typedef cword_t cvec64_t [64];

  // Eight-point DIF with the chosen cells, outputs in natural order.
  function automatic cvec8_t m_blk8(cvec8_t x, algo_e algo = ALG_SPLIT);
    cvec8_t y, a, b, c;
    cword_t u [4], z1 [2], z3 [2];
    cword_t one;
    one = m_tw(0, 8);
    if (algo == ALG_MIXED) begin
      for (int n = 0; n < 4; n++) m_r2(x[n], x[n+4], m_tw(n, 8), a[n], a[n+4]);
      m_r4(a[0], a[1], a[2], a[3], one, one, one, y[0], y[2], y[4], y[6]);
      m_r4(a[4], a[5], a[6], a[7], one, one, one, y[1], y[3], y[5], y[7]);
      return y;
    end
    if (algo == ALG_RADIX2) begin
      for (int n = 0; n < 4; n++) m_r2(x[n], x[n+4], m_tw(n, 8), a[n], a[n+4]);
      for (int h = 0; h < 2; h++)
        for (int m = 0; m < 2; m++)
          m_r2(a[4*h+m], a[4*h+m+2], m_tw(m, 4), b[4*h+m], b[4*h+m+2]);
      for (int q = 0; q < 4; q++) m_r2(b[2*q], b[2*q+1], one, c[2*q], c[2*q+1]);
      // output position i of the last rank holds bin bit-reverse(i)
      y[0] = c[0]; y[4] = c[1]; y[2] = c[2]; y[6] = c[3];
      y[1] = c[4]; y[5] = c[5]; y[3] = c[6]; y[7] = c[7];
      return y;
    end
    for (int n = 0; n < 2; n++)
      m_sr(x[n], x[n+2], x[n+4], x[n+6], m_tw(n, 8), m_tw(3*n, 8),
           u[n], u[n+2], z1[n], z3[n]);
    m_r4(u[0], u[1], u[2], u[3], one, one, one, y[0], y[2], y[4], y[6]);
    m_r2(z1[0], z1[1], one, y[1], y[5]);
    m_r2(z3[0], z3[1], one, y[3], y[7]);
    return y;
  endfunction

  // 64-point transform by 8 x 8 decomposition: x(i + 8m) -> X(k + 8m).
  function automatic cvec64_t m_fft64(cvec64_t x, algo_e algo = ALG_SPLIT);
    cvec8_t s, t;
    cword_t z [8][8];
    cvec64_t X;
    for (int i = 0; i < 8; i++) begin
      for (int m = 0; m < 8; m++) s[m] = x[i + 8*m];
      t = m_blk8(s, algo);
      for (int k = 0; k < 8; k++) z[i][k] = c_mul(t[k], m_tw(i * k, 64));
    end
    for (int k = 0; k < 8; k++) begin
      for (int i = 0; i < 8; i++) s[i] = z[i][k];
      t = m_blk8(s, algo);
      for (int m = 0; m < 8; m++) X[k + 8*m] = t[m];
    end
    return X;
  endfunction

endpackage
