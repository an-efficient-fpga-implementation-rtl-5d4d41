// gf_tower_pkg: arithmetic for the composite-field AES S-box.
//
// The S-box inverts in GF(((2^2)^2)^2) using normal bases at every level:
//   GF(4)   = {W^2, W}     with W^2 + W + 1 = 0        (2 bits: {coef W^2, coef W})
//   GF(16)  = {Z^4, Z}     with Z^2 + Z + N = 0, N = W^2 (4 bits: {coef Z^4, coef Z})
//   GF(256) = {Y^16, Y}    with Y^2 + Y + NU = 0, NU = W*Z (8 bits: {coef Y^16, coef Y})
// In a normal basis the unit element is all ones, squaring in GF(4) is a bit swap
// and inversion in GF(4) is the same swap. A GF(16) product needs three GF(4)
// products, one of them scaled by N, which is the multiplier drawn inside the
// S-box sub-blocks. The choice of bases is this design's own; the matching
// basis-change matrices live in sbox_lin_map and sbox_inv_lin_map.
package gf_tower_pkg;

  typedef logic [1:0] gf4_t;
  typedef logic [3:0] gf16_t;

  // NU = W*Z : Z^4 coefficient 0, Z coefficient W (2'b01)
  localparam gf16_t NU = 4'b0001;

  function automatic gf4_t gf4_mul(gf4_t a, gf4_t b);
    logic e;
    e = (a[1] ^ a[0]) & (b[1] ^ b[0]);
    return {(a[1] & b[1]) ^ e, (a[0] & b[0]) ^ e};
  endfunction

  // squaring and inversion in GF(4), normal basis
  function automatic gf4_t gf4_sq(gf4_t a);
    return {a[0], a[1]};
  endfunction

  // multiply by N = W^2
  function automatic gf4_t gf4_scl_n(gf4_t a);
    return {a[0], a[1] ^ a[0]};
  endfunction

  function automatic gf16_t gf16_mul(gf16_t g, gf16_t d);
    gf4_t e;
    e = gf4_scl_n(gf4_mul(g[3:2] ^ g[1:0], d[3:2] ^ d[1:0]));
    return {gf4_mul(g[3:2], d[3:2]) ^ e, gf4_mul(g[1:0], d[1:0]) ^ e};
  endfunction

  function automatic gf16_t gf16_sq(gf16_t g);
    gf4_t e;
    e = gf4_scl_n(gf4_sq(g[3:2] ^ g[1:0]));
    return {gf4_sq(g[3:2]) ^ e, gf4_sq(g[1:0]) ^ e};
  endfunction

  // x^2 * NU, the square-scale unit of S1
  function automatic gf16_t gf16_sq_scl(gf16_t g);
    return gf16_mul(gf16_sq(g), NU);
  endfunction

endpackage
