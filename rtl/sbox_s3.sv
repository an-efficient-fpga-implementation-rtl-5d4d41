// sbox_s3: last stage of the GF(256) inversion.
//
// Two GF(16) multipliers scale the halves from S1 by the inverted norm S21.
// In the normal basis {Y^16, Y} the inverse of g1*Y^16 + g0*Y is
// (d^-1*g0)*Y^16 + (d^-1*g1)*Y, so the upper nibble of S31 is S21*S14 and the
// lower nibble is S21*S12. Purely combinational.
module sbox_s3
  import gf_tower_pkg::*;
(
  input  logic [3:0] s12,
  input  logic [3:0] s21,
  input  logic [3:0] s14,
  output logic [7:0] s31
);
  assign s31 = {gf16_mul(s21, s14), gf16_mul(s21, s12)};
endmodule
