// sbox_s1: first stage of the GF(256) inversion.
//
// The tower element S11 = g1*Y^16 + g0*Y is split into its GF(16) halves, which
// leave as S12 (g1) and S14 (g0). S13 is the GF(16) "norm" whose inverse the
// next stage computes:  S13 = (g1 ^ g0)^2 * NU  ^  g1 * g0.
// The square-scale and the three-multiplier GF(16) product follow the two
// sub-units of the published stage. S12 and S14 are plain wires to the input
// halves by construction; they are outputs because S3 needs them. Purely
// combinational.
module sbox_s1
  import gf_tower_pkg::*;
(
  input  logic [7:0] s11,
  output logic [3:0] s12,
  output logic [3:0] s13,
  output logic [3:0] s14
);
  gf16_t g1, g0;
  assign g1  = s11[7:4];
  assign g0  = s11[3:0];
  assign s12 = g1;
  assign s14 = g0;
  assign s13 = gf16_sq_scl(g1 ^ g0) ^ gf16_mul(g1, g0);
endmodule
