// aes_pkg: shared AES-128 constants and helpers.
//
// Byte k of a 128-bit block (k = 0 is the first byte on the wire) sits at bits
// [127-8k -: 8]; column c of the AES state is bytes 4c..4c+3. Used by the 8-bit
// AES core, its key expansion and the CCM framing logic.
package aes_pkg;

  localparam int unsigned NROUNDS = 10;  // 10 rounds x 16 clocks = 160-clock frame

  function automatic logic [7:0] get_byte(logic [127:0] v, int unsigned k);
    return v[127 - 8*k -: 8];
  endfunction

  // multiply by x in GF(2^8) modulo x^8+x^4+x^3+x+1
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // round constant for round r = 1..10
  function automatic logic [7:0] rcon(logic [3:0] r);
    logic [7:0] c;
    c = 8'h01;
    for (int i = 1; i < 10; i++)
      if (i < int'(r)) c = xtime(c);
    return c;
  endfunction

endpackage
