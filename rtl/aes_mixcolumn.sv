// aes_mixcolumn: AES MixColumns on one column.
//
// col_in = {b0, b1, b2, b3} with b0 in the top byte. Each output byte is
// 2*b_i ^ 3*b_(i+1) ^ b_(i+2) ^ b_(i+3) over GF(2^8), built from xtime.
// Purely combinational; the 8-bit core calls it once every four clocks when a
// column of S-box outputs is complete.
module aes_mixcolumn
  import aes_pkg::*;
(
  input  logic [31:0] col_in,
  output logic [31:0] col_out
);
  logic [7:0] b [4];
  logic [7:0] o [4];

  always_comb begin
    for (int i = 0; i < 4; i++) b[i] = col_in[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++)
      o[i] = xtime(b[i]) ^ xtime(b[(i+1)%4]) ^ b[(i+1)%4] ^ b[(i+2)%4] ^ b[(i+3)%4];
    col_out = {o[0], o[1], o[2], o[3]};
  end
endmodule
