// aes_key_expansion: byte-serial AES-128 key schedule with one S-box.
//
// rk holds round key r-1 for the whole of round r. In clock pos of round r the
// unit produces byte pos of round key r on nk_byte:
//   pos 0..3 : rk[pos] ^ S(rk[12 + (pos+1) mod 4]) ^ (pos == 0 ? Rcon(r) : 0)
//   pos 4..15: rk[pos] ^ nk[pos-4]
// and, when `step` is high, stores it in the next-key register nk. In the last
// clock of the round (pos 15) rk takes the completed key. One S-box serves all
// four SubWord bytes because they are needed in four different clocks.
// `load` copies the cipher key into rk. Synchronous active-high reset.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic [127:0] key,
  input  logic [3:0]   pos,
  input  logic [3:0]   rnd,
  input  logic         step,
  output logic [127:0] rk,
  output logic [7:0]   nk_byte
);
  logic [127:0] nk;
  logic [7:0]   sb_in, sb_out;
  logic [1:0]   rot;

  assign rot   = pos[1:0] + 2'd1;
  assign sb_in = get_byte(rk, 12 + int'(rot));

  aes_sbox u_sbox2 (.s_in(sb_in), .s_out(sb_out));

  always_comb begin
    if (pos < 4) nk_byte = get_byte(rk, int'(pos)) ^ sb_out ^ ((pos == 0) ? rcon(rnd) : 8'h00);
    else         nk_byte = get_byte(rk, int'(pos)) ^ get_byte(nk, int'(pos) - 4);
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      rk <= '0;
      nk <= '0;
    end else if (load) begin
      rk <= key;
    end else if (step) begin
      nk[127 - 8*pos -: 8] <= nk_byte;
      if (pos == 4'd15) rk <= {nk[127:8], nk_byte};
    end
  end
endmodule
