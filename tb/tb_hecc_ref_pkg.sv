// tb_hecc_ref_pkg: bit-level reference model for the testbenches.
//
// Field arithmetic in GF(2^89) mod x^89 + x^38 + 1 by shift-and-add, inversion
// by exponentiation (a^(2^89 - 2)), and the group formulae written as plain
// straight-line code: the projective doubling, the affine addition, conversion
// to affine form and the left-to-right binary scalar multiplication. The
// on-curve test checks that v^2 + x*v + x^5 + f1*x + f0 = 0 mod u, and
// rand_div draws a random weight-two divisor together with the curve constants
// f1, f0 that make it lie on the curve.
package tb_hecc_ref_pkg;
  localparam int M = 89;
  localparam int K = 38;
  typedef logic [M-1:0] fe;
  typedef struct { fe u1, u0, v1, v0, z; } pdiv_t;
  typedef struct { fe u1, u0, v1, v0; } adiv_t;

  function automatic fe rnd();
    return fe'({$urandom, $urandom, $urandom});
  endfunction

  function automatic fe gmul(fe a, fe b);
    fe r = '0;
    fe x = a;
    for (int i = 0; i < M; i++) begin
      if (b[i]) r ^= x;
      x = {x[M-2:0], 1'b0} ^ (x[M-1] ? ((fe'(1) << K) | fe'(1)) : fe'(0));
    end
    return r;
  endfunction

  function automatic fe gsq(fe a);
    return gmul(a, a);
  endfunction

  function automatic fe ginv(fe a);
    fe r = fe'(1);
    for (int i = 1; i < M; i++) begin
      a = gsq(a);
      r = gmul(r, a);
    end
    return r;
  endfunction

  // (v^2 + x v + x^5 + f1 x + f0) mod (x^2 + u1 x + u0), returned as {r1, r0}
  function automatic void curve_rem(adiv_t d, fe f1, fe f0, output fe r1, output fe r0);
    fe p [6];
    for (int i = 0; i < 6; i++) p[i] = '0;
    p[5] = fe'(1); p[1] ^= f1; p[0] ^= f0;
    p[2] ^= gsq(d.v1); p[0] ^= gsq(d.v0);
    p[2] ^= d.v1;      p[1] ^= d.v0;
    for (int i = 5; i >= 2; i--) begin
      fe c = p[i];
      p[i] = '0;
      p[i-1] ^= gmul(c, d.u1);
      p[i-2] ^= gmul(c, d.u0);
    end
    r1 = p[1];
    r0 = p[0];
  endfunction

  function automatic bit on_curve(adiv_t d, fe f1, fe f0);
    fe r1, r0;
    curve_rem(d, f1, f0, r1, r0);
    return (r1 == '0) && (r0 == '0);
  endfunction

  function automatic void rand_div(output adiv_t d, output fe f1, output fe f0);
    d.u1 = rnd(); d.u0 = rnd(); d.v1 = rnd(); d.v0 = rnd();
    curve_rem(d, '0, '0, f1, f0);
  endfunction

  function automatic pdiv_t dbl(pdiv_t q);
    fe Z2, w0, w1, w3, k0, w4, w5, s3, s1, s0, R, Rt, S1, S0, s4, s5, S, Rpp;
    fe l2, l0, l1, U0pp, U1pp, l3, w6, w7;
    pdiv_t o;
    Z2 = gsq(q.z); w0 = gsq(q.v1); w1 = gsq(q.u1); w3 = gmul(q.u1, q.z);
    k0 = gmul(q.u1, w1) ^ gmul(q.z, gmul(q.z, q.v1) ^ w0);
    w4 = gmul(k0, w3); w5 = gmul(w1, q.z);
    s3 = gmul(w3 ^ q.z, k0 ^ w1) ^ w4 ^ gmul(fe'(1) ^ q.u1, w5);
    s1 = gmul(s3, q.z); s0 = w4 ^ gmul(gmul(q.z, q.u0), w5);
    R = gmul(gsq(Z2), q.u0); Rt = gmul(R, s1); S1 = gsq(s1); S0 = gsq(s0);
    s4 = gmul(s3, s1); s5 = gmul(s0, s3); S = gmul(s5, q.z); Rpp = gmul(Rt, s4);
    l2 = gmul(q.u1, s4); l0 = gmul(q.u0, s5); l1 = gmul(s4 ^ s5, q.u1 ^ q.u0) ^ l2 ^ l0;
    U0pp = S0 ^ gmul(gmul(R, s3), q.z); U1pp = gsq(R);
    l3 = l2 ^ S ^ U1pp;
    w6 = gmul(U0pp, l3) ^ gmul(S1, l0);
    w7 = gmul(U1pp, l3) ^ gmul(S1, U0pp ^ l1);
    o.z = gmul(S1, Rt); o.u1 = gmul(Rt, U1pp); o.u0 = gmul(Rt, U0pp);
    o.v0 = w6 ^ gmul(Rpp, q.v0); o.v1 = w7 ^ gmul(Rpp, q.v1) ^ o.z;
    return o;
  endfunction

  function automatic adiv_t to_aff(pdiv_t q);
    adiv_t a;
    fe zi = ginv(q.z);
    a.u1 = gmul(q.u1, zi); a.u0 = gmul(q.u0, zi);
    a.v1 = gmul(q.v1, zi); a.v0 = gmul(q.v0, zi);
    return a;
  endfunction

  function automatic pdiv_t to_proj(adiv_t a);
    pdiv_t q;
    q.u1 = a.u1; q.u0 = a.u0; q.v1 = a.v1; q.v0 = a.v0; q.z = fe'(1);
    return q;
  endfunction

  // affine addition, general case, h = x, f4 = 0
  function automatic adiv_t add_aff(adiv_t a, adiv_t b);
    fe z1, z2, z3, r, w0, w1, w2, w3, w4, w5, s1p, s0p, s0pp, l2, l1, l0;
    adiv_t o;
    z1 = a.u1 ^ b.u1; z2 = b.u0 ^ a.u0; z3 = gmul(a.u1, z1) ^ z2;
    r  = gmul(z2, z3) ^ gmul(gsq(z1), a.u0);
    w0 = a.v0 ^ b.v0; w1 = a.v1 ^ b.v1; w2 = gmul(z3, w0); w3 = gmul(z1, w1);
    s1p = gmul(z3 ^ z1, w0 ^ w1) ^ w2 ^ gmul(w3, fe'(1) ^ a.u1);
    s0p = w2 ^ gmul(a.u0, w3);
    w1 = ginv(gmul(r, s1p)); w2 = gmul(r, w1); w3 = gmul(gsq(s1p), w1);
    w4 = gmul(r, w2); w5 = gsq(w4); s0pp = gmul(s0p, w2);
    l2 = b.u1 ^ s0pp; l1 = gmul(b.u1, s0pp) ^ b.u0; l0 = gmul(b.u0, s0pp);
    o.u0 = gmul(s0pp ^ a.u1, s0pp ^ z1) ^ a.u0 ^ l1 ^ w4 ^ gmul(z1, w5);
    o.u1 = z1 ^ w5;
    w1 = l2 ^ o.u1;
    w2 = gmul(o.u1, w1) ^ o.u0 ^ l1;
    o.v1 = gmul(w2, w3) ^ b.v1 ^ fe'(1);
    w2 = gmul(o.u0, w1) ^ l0;
    o.v0 = gmul(w2, w3) ^ b.v0;
    return o;
  endfunction

  // Inversion-free mixed addition Q + P (Q projective, P affine), written out
  // as one straight-line formula.
  function automatic pdiv_t add_proj(pdiv_t q, adiv_t p);
    fe Z1, Z2, W0, W1, Z3, R, W3, S1, S0, T, a, b, c, qq, N1, L1, N0, L2, W, Y, T2q;
    pdiv_t o;
    Z1 = q.u1 ^ gmul(p.u1, q.z); Z2 = gmul(p.u0, q.z) ^ q.u0;
    W0 = q.v0 ^ gmul(p.v0, q.z); W1 = q.v1 ^ gmul(p.v1, q.z);
    Z3 = gmul(q.u1, Z1) ^ gmul(q.z, Z2);
    R  = gmul(Z2, Z3) ^ gmul(gsq(Z1), q.u0);
    W3 = gmul(Z1, W1);
    S1 = gmul(q.z, gmul(Z2, W1) ^ gmul(Z1, W0));
    S0 = gmul(Z3, W0) ^ gmul(q.u0, W3);
    T = gmul(q.z, S1); a = gmul(q.z, S0); b = gmul(q.u1, S1); c = gmul(Z1, S1); qq = gmul(q.z, R);
    N1 = gmul(c, T) ^ gsq(qq);
    L1 = gmul(p.u1, a) ^ gmul(p.u0, T);
    N0 = gmul(T, gmul(a ^ b, a ^ c) ^ gmul(gmul(q.u0, S1) ^ L1 ^ qq, T)) ^ gmul(c, gsq(qq));
    L2 = gmul(p.u1, T) ^ a;
    W  = gmul(L2, T) ^ N1;
    Y  = gmul(N1, W) ^ gmul(T, N0 ^ gmul(L1, gsq(T)));
    T2q = gmul(gsq(T), qq);
    o.z  = gmul(gsq(T), T2q);
    o.u1 = gmul(N1, T2q);
    o.u0 = gmul(N0, gmul(T, qq));
    o.v1 = gmul(T, Y) ^ gmul(fe'(1) ^ p.v1, o.z);
    o.v0 = gmul(N0, W) ^ gmul(gsq(gsq(T)), gmul(p.u0, a) ^ gmul(p.v0, qq));
    return o;
  endfunction

  // k*P by the left-to-right binary method, as the coprocessor schedules it
  function automatic adiv_t kmul(logic [255:0] k, int nbits, adiv_t p);
    pdiv_t q;
    int i = nbits - 1;
    while (i >= 0 && !k[i]) i--;
    q = to_proj(p);
    for (int j = i - 1; j >= 0; j--) begin
      q = dbl(q);
      if (k[j]) q = to_proj(add_aff(to_aff(q), p));
    end
    return to_aff(q);
  endfunction
endpackage
