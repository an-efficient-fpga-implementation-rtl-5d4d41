// aes_byte_perm: ShiftRows expressed as a read order.
//
// The 8-bit core reads the state one byte per clock. For output position pos
// (column c = pos/4, row r = pos%4) ShiftRows takes state byte
// src = 4*((c + r) mod 4) + r, so the permutation costs only a 16:1 byte
// multiplexer instead of moving any data. Also returns src, which the core
// needs to pick the matching round-key byte. Purely combinational.
module aes_byte_perm (
  input  logic [127:0] state,
  input  logic [3:0]   pos,
  output logic [7:0]   byte_out,
  output logic [3:0]   src
);
  logic [1:0] c, r;
  assign c        = pos[3:2];
  assign r        = pos[1:0];
  assign src      = {c + r, r};
  assign byte_out = state[127 - 8*src -: 8];
endmodule
