// gf_ref_pkg: reference arithmetic for the testbenches, written independently of the RTL.
//
// Field elements of up to 128 bits are held in logic [127:0]; w is the field width. The
// multiplication is the bit-serial shift-and-add method with reduction at every step (the
// RTL instead multiplies fully and reduces once). Polynomials are evaluated term by term
// (not by Horner's rule) and X^-1 is found by Gauss-Jordan elimination.
package gf_ref_pkg;

  typedef logic [127:0] elem_t;
  typedef elem_t vec_t [16];
  typedef elem_t mat_t [16][16];

  function automatic elem_t low_poly(input int w);
    case (w)
      8:       return 128'h1B;
      16:      return 128'h2B;
      32:      return 128'h8D;
      64:      return 128'h1B;
      default: return 128'h87;
    endcase
  endfunction

  function automatic elem_t mask(input int w);
    return (w == 128) ? '1 : ((128'h1 << w) - 1);
  endfunction

  function automatic elem_t gf_mul(input elem_t a, input elem_t b, input int w);
    elem_t r, t;
    logic  top;
    r = '0;
    t = a & mask(w);
    for (int i = 0; i < w; i++) begin
      if (b[i]) r ^= t;
      top = t[w-1];
      t = (t << 1) & mask(w);
      if (top) t ^= low_poly(w);
    end
    return r;
  endfunction

  // carry-less product of two w-bit values, 2w-1 bits (w <= 64)
  function automatic elem_t clmul_ref(input elem_t a, input elem_t b, input int w);
    elem_t r;
    r = '0;
    for (int i = 0; i < w; i++)
      for (int j = 0; j < w; j++)
        r[i+j] = r[i+j] ^ (a[i] & b[j]);
    return r;
  endfunction

  function automatic elem_t gf_inv(input elem_t a, input int w);
    elem_t r, s;
    r = 128'h1;
    s = a;
    for (int i = 1; i < w; i++) begin
      s = gf_mul(s, s, w);
      r = gf_mul(r, s, w);
    end
    return r;
  endfunction

  function automatic elem_t gf_pow(input elem_t a, input int e, input int w);
    elem_t r;
    r = 128'h1;
    for (int i = 0; i < e; i++) r = gf_mul(r, a, w);
    return r;
  endfunction

  // f(x) = sum c[i] x^i, k coefficients
  function automatic elem_t poly_eval(input vec_t c, input int k, input elem_t x, input int w);
    elem_t r;
    r = '0;
    for (int i = 0; i < k; i++) r ^= gf_mul(c[i], gf_pow(x, i, w), w);
    return r;
  endfunction

  // inverse of the Vandermonde matrix X[j][i] = xs[j]^i, k x k
  function automatic mat_t vandermonde_inv(input vec_t xs, input int k, input int w);
    mat_t  a, inv;
    elem_t f, p;
    int    piv;
    for (int r = 0; r < k; r++)
      for (int c = 0; c < k; c++) begin
        a[r][c]   = gf_pow(xs[r], c, w);
        inv[r][c] = (r == c) ? 128'h1 : 128'h0;
      end
    for (int c = 0; c < k; c++) begin
      piv = c;
      while (a[piv][c] == 0) piv++;
      for (int cc = 0; cc < k; cc++) begin
        f = a[c][cc];   a[c][cc]   = a[piv][cc];   a[piv][cc]   = f;
        f = inv[c][cc]; inv[c][cc] = inv[piv][cc]; inv[piv][cc] = f;
      end
      p = gf_inv(a[c][c], w);
      for (int cc = 0; cc < k; cc++) begin
        a[c][cc]   = gf_mul(a[c][cc], p, w);
        inv[c][cc] = gf_mul(inv[c][cc], p, w);
      end
      for (int r = 0; r < k; r++)
        if (r != c && a[r][c] != 0) begin
          f = a[r][c];
          for (int cc = 0; cc < k; cc++) begin
            a[r][cc]   ^= gf_mul(f, a[c][cc], w);
            inv[r][cc] ^= gf_mul(f, inv[c][cc], w);
          end
        end
    end
    return inv;
  endfunction

  function automatic elem_t rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
