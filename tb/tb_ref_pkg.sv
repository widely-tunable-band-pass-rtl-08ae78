// tb_ref_pkg: reference models for the decimator testbenches.
//
// The reference of every decimator is its overall impulse response referred
// to the input rate, built here by polynomial algebra independently of the
// RTL: boxcar (1 + z^-1 + ... + z^-(n-1)), powers, up-sampled copies p(z^f)
// for filters that run after a rate change (noble identity), and the corrector
// polynomials retyped from their published values. A decimator by M whose
// stages each keep the sample that contains the last input of its group
// produces y[m] = sum_j h[j] x[M(m+1) - 1 - j]; dec_ref evaluates that sum.
// The transfer functions follow the published structures; the choice of kept
// sample that fixes this alignment is the design's own.
package tb_ref_pkg;

  typedef longint poly_t[$];

  function automatic poly_t pmul(poly_t a, poly_t b);
    poly_t r;
    for (int i = 0; i < a.size() + b.size() - 1; i++) r.push_back(0);
    foreach (a[i]) foreach (b[j]) r[i+j] += a[i] * b[j];
    return r;
  endfunction

  function automatic poly_t ppow(poly_t a, int k);
    poly_t r = '{1};
    repeat (k) r = pmul(r, a);
    return r;
  endfunction

  function automatic poly_t box(int n);
    poly_t r;
    repeat (n) r.push_back(1);
    return r;
  endfunction

  // p(z^f)
  function automatic poly_t upsample(poly_t a, int f);
    poly_t r;
    foreach (a[i]) begin
      r.push_back(a[i]);
      if (i != a.size() - 1) repeat (f - 1) r.push_back(0);
    end
    return r;
  endfunction

  // p1(z) - p2(z), aligned at z^0
  function automatic poly_t psub(poly_t a, poly_t b);
    poly_t r;
    int n = (a.size() > b.size()) ? a.size() : b.size();
    for (int i = 0; i < n; i++)
      r.push_back((i < a.size() ? a[i] : 0) - (i < b.size() ? b[i] : 0));
    return r;
  endfunction

  function automatic poly_t pscale_delay(poly_t a, longint s, int d);
    poly_t r;
    repeat (d) r.push_back(0);
    foreach (a[i]) r.push_back(a[i] * s);
    return r;
  endfunction

  // corrector filters, K = 1..5
  function automatic poly_t ck(int k);
    case (k)
      1: return '{-3, 2, 17, 17, 2, -3};
      2: return '{1, -1, -5, 3, 18, 18, 3, -5, -1, 1};
      3: return '{1, -1, -6, 2, 21, 21, 2, -6, -1, 1};
      4: return '{1, 1, -2, -8, 1, 24, 24, 1, -8, -2, 1, 1};
      default: return '{1, 2, -2, -11, 0, 27, 27, 0, -11, -2, 2, 1};
    endcase
  endfunction

  class dec_ref;
    poly_t  h;
    longint x[$];
    longint t[$];     // cycle of each accepted input
    int     m;
    function new(poly_t h_, int m_);
      h = h_;
      m = m_;
    endfunction
    function void push(longint v, longint cyc);
      x.push_back(v);
      t.push_back(cyc);
    endfunction
    // index of the last input sample that output k contains
    function int last_index(int k);
      return m * (k + 1) - 1;
    endfunction
    function longint expected(int k);
      longint s = 0;
      int n = last_index(k);
      foreach (h[j]) if (n - j >= 0) s += h[j] * x[n-j];
      return s;
    endfunction
  endclass

endpackage
