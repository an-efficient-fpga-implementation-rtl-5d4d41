// aes_sbox: compact AES S-box (SubBytes) in composite-field arithmetic.
//
// S_in -> lin. map -> S1 -> (S12, S13, S14) -> S2 inverts S13 -> S3 -> inv. lin. map -> S_out.
// The multiplicative inverse in GF(2^8) is computed with GF(2^4) and GF(2^2)
// operations instead of a 256-entry table, which is what makes the core small.
// The chain of stages follows the published block structure; the particular
// normal bases (see gf_tower_pkg) and the folding of the affine transform into
// the output map are this design's choices. Purely combinational, one byte in,
// one byte out.
module aes_sbox (
  input  logic [7:0] s_in,
  output logic [7:0] s_out
);
  logic [7:0] s11, s31;
  logic [3:0] s12, s13, s14, s21;

  sbox_lin_map     u_lin (.a(s_in), .y(s11));
  sbox_s1          u_s1  (.s11(s11), .s12(s12), .s13(s13), .s14(s14));
  sbox_s2          u_s2  (.s13(s13), .s21(s21));
  sbox_s3          u_s3  (.s12(s12), .s21(s21), .s14(s14), .s31(s31));
  sbox_inv_lin_map u_inv (.a(s31), .y(s_out));
endmodule
