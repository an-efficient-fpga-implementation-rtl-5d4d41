// sbox_lin_map: linear map at the input of the compact S-box.
//
// Converts a byte from the AES polynomial basis (x^8+x^4+x^3+x+1) to the
// normal-basis tower representation used by sbox_s1/s2/s3. It is an 8x8 matrix
// over GF(2): output bit i is the parity of (input AND ROW[i]). The rows follow
// from the basis choice in gf_tower_pkg (columns of the inverse matrix are the
// products W^a * Z^b * Y^c written as AES field elements). Purely combinational.
module sbox_lin_map (
  input  logic [7:0] a,
  output logic [7:0] y
);
  localparam logic [7:0] ROW [8] = '{8'h23, 8'h87, 8'h0b, 8'h15, 8'hff, 8'h89, 8'ha9, 8'hc5};

  always_comb
    for (int i = 0; i < 8; i++) y[i] = ^(a & ROW[i]);
endmodule
