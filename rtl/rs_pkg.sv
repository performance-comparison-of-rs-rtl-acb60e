// rs_pkg: Galois-field GF(2^8) arithmetic and code constants shared by the
// RS(255,239) decoder blocks.
//
// Symbols are 8-bit elements of GF(2^8). The field is built from the primitive
// polynomial p(x) = x^8 + x^4 + x^3 + x^2 + 1 (0x11D) with alpha = 0x02. The
// code is RS(255,239): n = 255 symbols, k = 239 data symbols, 2t = 16 check
// symbols, so up to t = 8 symbol errors are corrected. The generator
// polynomial has the consecutive roots alpha^1 .. alpha^2t.
//
// The code size (255,239) is the one the decoder is built for; the choice of
// field polynomial and of the first root alpha^1 are this design's own (the
// common choices for this code), since neither is fixed in the source
// description beyond "roots starting at alpha^1".
//
// All functions are pure combinational logic and synthesize:
//   gf_mul   - shift-and-add multiply with reduction modulo p(x)
//   gf_sq    - squaring (linear in GF(2^m))
//   gf_inv   - inverse as a^254 = a^2 * a^4 * ... * a^128 (0 maps to 0)
//   gf_alpha - alpha^e for a constant exponent, used to elaborate the
//              constant multipliers of the Horner and Chien stages
package rs_pkg;

  localparam int unsigned M         = 8;
  localparam logic [8:0]  PRIM_POLY = 9'h11D;
  localparam int unsigned NMAX      = (1 << M) - 1;  // 255, longest codeword

  typedef logic [M-1:0] gf_t;

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    logic [M-1:0] p;
    logic [M-1:0] x;
    p = '0;
    x = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) p = p ^ x;
      // x <- x * alpha, reduced by p(x)
      x = x[M-1] ? ((x << 1) ^ PRIM_POLY[M-1:0]) : (x << 1);
    end
    return p;
  endfunction

  function automatic gf_t gf_sq(gf_t a);
    return gf_mul(a, a);
  endfunction

  function automatic gf_t gf_inv(gf_t a);
    gf_t r;
    gf_t s;
    s = gf_sq(a);           // a^2
    r = s;
    for (int i = 0; i < 6; i++) begin
      s = gf_sq(s);         // a^4 .. a^128
      r = gf_mul(r, s);
    end
    return r;               // a^254 = a^-1 for a != 0, 0 for a == 0
  endfunction

  function automatic gf_t gf_alpha(int unsigned e);
    gf_t x;
    x = 8'h01;
    for (int unsigned i = 0; i < (e % NMAX); i++)
      x = x[M-1] ? ((x << 1) ^ PRIM_POLY[M-1:0]) : (x << 1);
    return x;
  endfunction

endpackage
