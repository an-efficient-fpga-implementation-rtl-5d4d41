// sbox_inv_lin_map: inverse linear map at the output of the compact S-box.
//
// Converts the tower-field inverse back to the AES polynomial basis. The AES
// affine transform is merged into the same 8x8 GF(2) matrix and its constant
// 0x63 is added afterwards, so the output is the final S-box value. Output bit i
// is the parity of (input AND ROW[i]) XOR bit i of 0x63. Purely combinational.
module sbox_inv_lin_map (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam logic [7:0] ROW [8] = '{8'h32, 8'ha7, 8'h3b, 8'h67, 8'hd6, 8'h6c, 8'hee, 8'h8d};
  localparam logic [7:0] AFF_C = 8'h63;

  always_comb
    for (int i = 0; i < 8; i++) y[i] = (^(a & ROW[i])) ^ AFF_C[i];
endmodule
