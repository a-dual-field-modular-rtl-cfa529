// tb_umd_ref_pkg: reference arithmetic for the divider testbenches.
//
// Plain (non-redundant) models, independent of the RTL: modular
// multiplication in GF(p) and GF(2^n), a direct transcription of the unified
// division loop that reports the quotient and the number of iterations, and
// a small primality test for random test moduli.
package tb_umd_ref_pkg;

  localparam int MAXW = 600;
  typedef logic signed [MAXW-1:0] big_t;

  // a * b mod p (integers, 0 <= a, b < p), bit-serial, MSB first.
  function automatic big_t mulmod_p(big_t a, big_t b, big_t p, int n);
    big_t r = '0;
    for (int i = n - 1; i >= 0; i--) begin
      r = r <<< 1;
      if (r >= p) r = r - p;
      if (b[i]) begin
        r = r + a;
        if (r >= p) r = r - p;
      end
    end
    return r;
  endfunction

  // a(x) * b(x) mod p(x), deg p = n, deg a, deg b < n.
  function automatic big_t mulmod_2n(big_t a, big_t b, big_t p, int n);
    big_t r = '0;
    for (int i = n - 1; i >= 0; i--) begin
      r = r << 1;
      if (r[n]) r = r ^ p;
      if (b[i]) r = r ^ a;
    end
    return r;
  endfunction

  // Unified modular division on plain integers / polynomials.
  // Returns the quotient reduced into [0, p) and the iteration count; ok is
  // cleared when gcd(Y, p) != 1 (no quotient exists).
  function automatic void umd_ref(big_t x, big_t y, big_t p, bit gfp,
                                  output big_t z, output int iters, output bit ok,
                                  output bit d_neg);
    big_t c = y, u = x, d = p, w = '0, t;
    int   delta = 0;
    bit   kneg;
    iters = 0;
    while (c != 0) begin
      iters++;
      if (!c[0]) begin
        c = c >>> 1;
        delta--;
      end else begin
        if (delta < 0) begin
          t = c; c = d; d = t;
          t = u; u = w; w = t;
          delta = -delta;
        end
        kneg = 1'b0;
        if (gfp && (((c + d) & 3) != 0)) kneg = 1'b1;
        else delta--;
        if (gfp) begin
          c = kneg ? (c - d) >>> 1 : (c + d) >>> 1;
          u = kneg ? u - w : u + w;
        end else begin
          c = (c ^ d) >> 1;
          u = u ^ w;
        end
      end
      if (u[0]) u = gfp ? u + p : u ^ p;
      u = gfp ? u >>> 1 : u >> 1;
      if (iters > 8 * MAXW) break;
    end
    d_neg = (d == -1);
    ok    = (d == 1) || (gfp && d == -1);
    if (gfp) begin
      z = d_neg ? -w : w;
      while (z < 0) z = z + p;
      while (z >= p) z = z - p;
    end else begin
      z = w;
    end
  endfunction

  function automatic bit is_prime32(longint unsigned q);
    if (q < 2) return 1'b0;
    if (q % 2 == 0) return q == 2;
    for (longint unsigned k = 3; k * k <= q; k += 2)
      if (q % k == 0) return 1'b0;
    return 1'b1;
  endfunction

endpackage
