// rs_tb_pkg: reference model for the RS decoder testbenches.
//
// GF(2^8) arithmetic here is table based (exp/log tables over the primitive
// polynomial 0x11D, alpha = 2), a different method from the shift-and-add
// logic of the RTL, so the testbenches check the RTL against an independent
// model. Call build_tables() once before anything else.
//
// Also provided: a systematic RS encoder (c(x) = m(x) x^2t + remainder of
// m(x) x^2t divided by g(x), g(x) = prod_{j=1..2t} (x + alpha^j)),
// polynomial evaluation, syndromes, the error locator and Omega polynomials
// of a known error pattern, and injection of random errors at distinct
// positions. Codeword arrays hold the coefficient of x^i at index i.
package rs_tb_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t cw_t [255];

  sym_t gexp [512];
  int   glog [256];

  function automatic void build_tables();
    int x;
    x = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i]       = sym_t'(x);
      gexp[i + 255] = sym_t'(x);
      glog[x]       = i;
      x = x << 1;
      if ((x & 'h100) != 0) x = x ^ 'h11D;
    end
    gexp[510] = gexp[0];
    gexp[511] = gexp[1];
    glog[0]   = -1;
  endfunction

  function automatic sym_t gm(sym_t a, sym_t b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  function automatic sym_t gdiv(sym_t a, sym_t b);
    if (a == 0) return 0;
    return gexp[(glog[a] - glog[b] + 255) % 255];
  endfunction

  // alpha^e for any integer e
  function automatic sym_t apow(int e);
    return gexp[((e % 255) + 255) % 255];
  endfunction

  // Evaluate p(x) = sum_{i<len} p[i] x^i at x (Horner).
  function automatic sym_t peval(const ref cw_t p, input int len, input sym_t x);
    sym_t acc;
    acc = 0;
    for (int i = len - 1; i >= 0; i--) acc = gm(acc, x) ^ p[i];
    return acc;
  endfunction

  // Systematic encoder for a code of length n with 2t check symbols.
  // msg[i] (i < n-2t) is the coefficient of x^(i+2t).
  function automatic void encode(const ref cw_t msg, input int n, input int t, ref cw_t cw);
    sym_t g [17];
    sym_t rem [16];
    sym_t fb;
    int   nc;
    nc = 2 * t;
    for (int i = 0; i <= 16; i++) g[i] = 0;
    g[0] = 1;
    for (int j = 1; j <= nc; j++) begin          // g(x) *= (x + alpha^j)
      for (int i = j; i >= 1; i--) g[i] = g[i - 1] ^ gm(g[i], apow(j));
      g[0] = gm(g[0], apow(j));
    end
    for (int i = 0; i < 16; i++) rem[i] = 0;
    for (int i = n - nc - 1; i >= 0; i--) begin  // LFSR division
      fb = msg[i] ^ rem[nc - 1];
      for (int r = nc - 1; r >= 1; r--) rem[r] = rem[r - 1] ^ gm(fb, g[r]);
      rem[0] = gm(fb, g[0]);
    end
    for (int i = 0; i < 255; i++) cw[i] = 0;
    for (int i = 0; i < n - nc; i++) cw[i + nc] = msg[i];
    for (int i = 0; i < nc; i++) cw[i] = rem[i];
  endfunction

  // Random message and its codeword.
  function automatic void random_codeword(int n, int t, ref cw_t cw);
    cw_t msg;
    for (int i = 0; i < 255; i++) msg[i] = (i < n - 2 * t) ? sym_t'($urandom) : 0;
    encode(msg, n, t, cw);
  endfunction

  // Error vector with nerr nonzero values at distinct random positions < n.
  function automatic void random_errors(int n, int nerr, ref cw_t e);
    int p;
    for (int i = 0; i < 255; i++) e[i] = 0;
    for (int k = 0; k < nerr; k++) begin
      do p = $urandom_range(n - 1); while (e[p] != 0);
      e[p] = sym_t'($urandom_range(255, 1));
    end
  endfunction

  // S_j = r(alpha^j), j = 1..2t; s[0] unused.
  function automatic void syndromes(const ref cw_t r, input int n, input int t, ref sym_t s [17]);
    for (int j = 0; j <= 16; j++) s[j] = 0;
    for (int j = 1; j <= 2 * t; j++) s[j] = peval(r, n, apow(j));
  endfunction

  // sigma(x) = prod over error positions p of (1 + alpha^p x); returns degree.
  function automatic int locator(const ref cw_t e, input int n, ref sym_t sg [17]);
    int deg;
    for (int i = 0; i <= 16; i++) sg[i] = 0;
    sg[0] = 1;
    deg = 0;
    for (int p = 0; p < n; p++) if (e[p] != 0) begin
      deg++;
      for (int i = deg; i >= 1; i--) sg[i] = sg[i] ^ gm(sg[i - 1], apow(p));
    end
    return deg;
  endfunction

  // Omega_j = sum_{i<=j} sigma_i S'_{j-i}, S'_0 = 1, for j = 0..t.
  function automatic void omega_of(const ref sym_t sg [17], const ref sym_t s [17],
                                   input int t, ref sym_t om [17]);
    sym_t sp;
    for (int j = 0; j <= 16; j++) om[j] = 0;
    for (int j = 0; j <= t; j++)
      for (int i = 0; i <= j; i++) begin
        sp = (j - i == 0) ? sym_t'(1) : s[j - i];
        om[j] = om[j] ^ gm(sg[i], sp);
      end
  endfunction

endpackage
