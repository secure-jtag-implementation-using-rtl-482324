// ec_ref_pkg: reference arithmetic for the testbenches, written without any
// of the design's modules: P-192 field and group operations in affine
// coordinates on wide integers (products reduced with %, inverses by
// Fermat's little theorem), scalar multiplication by double-and-add, and the
// Schnorr and ECDSA equations. Slow but simple.
//
// Plain textbook modular arithmetic and affine point formulas, written
// independently of the RTL.
package ec_ref_pkg;
  import secjtag_pkg::*;

  typedef logic [191:0] u192;
  typedef logic [383:0] u384;
  typedef struct packed { bit inf; u192 x; u192 y; } pt_t;

  function automatic u192 mmul(u192 a, u192 b, u192 m);
    u384 t = (u384'(a) * u384'(b)) % u384'(m);
    return t[191:0];
  endfunction

  function automatic u192 madd(u192 a, u192 b, u192 m);
    logic [192:0] t = {1'b0, a} + {1'b0, b};
    if (t >= {1'b0, m}) t = t - {1'b0, m};
    return t[191:0];
  endfunction

  function automatic u192 msub(u192 a, u192 b, u192 m);
    return (a >= b) ? a - b : a + (m - b);
  endfunction

  function automatic u192 mpow(u192 b, u192 e, u192 m);
    u192 r = 192'd1;
    for (int i = 191; i >= 0; i--) begin
      r = mmul(r, r, m);
      if (e[i]) r = mmul(r, b, m);
    end
    return r;
  endfunction

  function automatic u192 minv(u192 a, u192 m);
    return mpow(a, m - 192'd2, m);
  endfunction

  function automatic pt_t padd(pt_t p1, pt_t p2);
    u192 s, x3, y3, pm;
    pm = P192_P;
    if (p1.inf) return p2;
    if (p2.inf) return p1;
    if (p1.x == p2.x) begin
      if (madd(p1.y, p2.y, pm) == '0) return '{1'b1, '0, '0};
      s = mmul(madd(mmul(192'd3, mmul(p1.x, p1.x, pm), pm), P192_A, pm),
               minv(madd(p1.y, p1.y, pm), pm), pm);
    end else begin
      s = mmul(msub(p1.y, p2.y, pm), minv(msub(p1.x, p2.x, pm), pm), pm);
    end
    x3 = msub(msub(mmul(s, s, pm), p1.x, pm), p2.x, pm);
    y3 = msub(mmul(s, msub(p1.x, x3, pm), pm), p1.y, pm);
    return '{1'b0, x3, y3};
  endfunction

  function automatic pt_t pmul(u192 k, pt_t p);
    pt_t r = '{1'b1, '0, '0};
    for (int i = 191; i >= 0; i--) begin
      r = padd(r, r);
      if (k[i]) r = padd(r, p);
    end
    return r;
  endfunction

  function automatic pt_t gen();
    return '{1'b0, P192_GX, P192_GY};
  endfunction
endpackage
