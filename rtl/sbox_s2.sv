// sbox_s2: GF(16) inverter of the compact S-box.
//
// With the input g = g1*Z^4 + g0*Z (2-bit GF(4) halves) it forms
//   t = (g1 ^ g0)^2 * N  ^  g1 * g0        (a GF(4) value)
// inverts t in GF(4) (a bit swap in the normal basis) and returns
//   g^-1 = (t^-1 * g0) * Z^4 + (t^-1 * g1) * Z.
// The input 0 gives 0, as the AES S-box needs. Purely combinational.
module sbox_s2
  import gf_tower_pkg::*;
(
  input  logic [3:0] s13,
  output logic [3:0] s21
);
  gf4_t g1, g0, t, ti;
  assign g1  = s13[3:2];
  assign g0  = s13[1:0];
  assign t   = gf4_scl_n(gf4_sq(g1 ^ g0)) ^ gf4_mul(g1, g0);
  assign ti  = gf4_sq(t);                 // inverse in GF(4)
  assign s21 = {gf4_mul(ti, g0), gf4_mul(ti, g1)};
endmodule
