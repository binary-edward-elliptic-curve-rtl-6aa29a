// ecc_tb_pkg: reference arithmetic for the testbenches of the Ed25519 core.
//
// Plain wide-integer models of the field and curve operations, written
// independently of the RTL: modular add/sub/mul with the % operator, inversion
// by Fermat (b^(p-2)), and the projective point addition and doubling
// formulas of the twisted Edwards curve with a = -1.
package ecc_tb_pkg;
  import ecc_pkg::*;

  typedef logic [511:0] wide_t;

  function automatic fe_t rand_fe();
    logic [255:0] v;
    for (int i = 0; i < 8; i++) v[32*i +: 32] = $urandom;
    v[255] = 1'b0;
    if (v >= P_MOD) v = v - P_MOD;
    return v;
  endfunction

  function automatic fe_t f_add(fe_t a, fe_t b);
    wide_t s = (wide_t'(a) + wide_t'(b)) % wide_t'(P_MOD);
    return s[255:0];
  endfunction

  function automatic fe_t f_sub(fe_t a, fe_t b);
    wide_t s = (wide_t'(a) + wide_t'(P_MOD) - wide_t'(b)) % wide_t'(P_MOD);
    return s[255:0];
  endfunction

  function automatic fe_t f_mul(fe_t a, fe_t b);
    wide_t s = (wide_t'(a) * wide_t'(b)) % wide_t'(P_MOD);
    return s[255:0];
  endfunction

  function automatic fe_t f_inv(fe_t b);
    logic [255:0] e = P_MOD - 256'd2;
    fe_t r = 256'd1;
    fe_t x = b;
    for (int i = 0; i < 256; i++) begin
      if (e[i]) r = f_mul(r, x);
      x = f_mul(x, x);
    end
    return r;
  endfunction

  function automatic point_t pt_add(point_t p1, point_t p2);
    fe_t a, b, c, d, e, f, g;
    point_t r;
    a = f_mul(p1.z, p2.z);
    b = f_mul(a, a);
    c = f_mul(p1.x, p2.x);
    d = f_mul(p1.y, p2.y);
    e = f_mul(D_CURVE, f_mul(c, d));
    f = f_sub(b, e);
    g = f_add(b, e);
    r.x = f_mul(f_mul(a, f), f_add(f_mul(p1.x, p2.y), f_mul(p1.y, p2.x)));
    r.y = f_mul(f_mul(a, g), f_add(c, d));
    r.z = f_mul(f, g);
    return r;
  endfunction

  function automatic point_t pt_dbl(point_t p1);
    fe_t c, d, h, j;
    point_t r;
    c = f_mul(p1.x, p1.x);
    d = f_mul(p1.y, p1.y);
    h = f_mul(p1.z, p1.z);
    j = f_sub(f_sub(d, c), f_add(h, h));
    r.x = f_mul(f_add(f_mul(p1.x, p1.y), f_mul(p1.x, p1.y)), j);
    r.y = f_mul(f_sub(c, d), f_add(c, d));
    r.z = f_mul(f_sub(d, c), j);
    return r;
  endfunction

  // true when (X:Y:Z) satisfies (-X^2 + Y^2) Z^2 = Z^4 + d X^2 Y^2
  function automatic bit on_curve(point_t q);
    fe_t x2, y2, z2, lhs, rhs;
    x2  = f_mul(q.x, q.x);
    y2  = f_mul(q.y, q.y);
    z2  = f_mul(q.z, q.z);
    lhs = f_mul(f_sub(y2, x2), z2);
    rhs = f_add(f_mul(z2, z2), f_mul(D_CURVE, f_mul(x2, y2)));
    return lhs == rhs;
  endfunction
endpackage
