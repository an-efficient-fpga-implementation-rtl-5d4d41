// aes_ref_pkg: behavioural reference models for the testbenches.
//
// A straightforward AES-128 encryption (S-box computed as the GF(2^8) inverse
// by exponentiation followed by the FIPS-197 affine transform, no tables, no
// composite fields) and an AES-CCM generation-encryption model following
// NIST SP 800-38C. Written independently of the RTL so the testbenches can
// compare against it. Byte 0 of a block is bits [127:120].
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= a;
      a = {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
    end
    return r;
  endfunction

  // FIPS-197 affine transform without its constant 0x63
  function automatic logic [7:0] ref_affine(logic [7:0] x);
    logic [7:0] r;
    for (int i = 0; i < 8; i++)
      r[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8];
    return r;
  endfunction

  function automatic logic [7:0] ref_sbox(logic [7:0] x);
    logic [7:0] inv;
    inv = 8'h01;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);   // x^254 = x^-1, 0 -> 0
    if (x == 0) inv = 0;
    return ref_affine(inv) ^ 8'h63;
  endfunction

  // GF(256) product in the tower normal basis {Y^16, Y} (Y^2 + Y + NU = 0)
  function automatic logic [7:0] tower_mul(logic [7:0] a, logic [7:0] b);
    logic [3:0] e;
    e = gf_tower_pkg::gf16_mul(gf_tower_pkg::gf16_mul(a[7:4] ^ a[3:0], b[7:4] ^ b[3:0]), gf_tower_pkg::NU);
    return {gf_tower_pkg::gf16_mul(a[7:4], b[7:4]) ^ e, gf_tower_pkg::gf16_mul(a[3:0], b[3:0]) ^ e};
  endfunction

  // round key r (0..10) of AES-128
  function automatic logic [127:0] ref_round_key(logic [127:0] key, int r);
    logic [7:0] k [16], rc;
    for (int i = 0; i < 16; i++) k[i] = bget(key, i);
    rc = 8'h01;
    for (int j = 1; j <= r; j++) begin
      k[0] ^= ref_sbox(k[13]) ^ rc; k[1] ^= ref_sbox(k[14]); k[2] ^= ref_sbox(k[15]); k[3] ^= ref_sbox(k[12]);
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = gmul(rc, 8'h02);
    end
    for (int i = 0; i < 16; i++) key[127-8*i -: 8] = k[i];
    return key;
  endfunction

  function automatic logic [7:0] bget(logic [127:0] v, int k);
    return v[127-8*k -: 8];
  endfunction

  function automatic logic [127:0] ref_aes(logic [127:0] pt, logic [127:0] key);
    logic [7:0] s [16], t [16], k [16], rc;
    for (int i = 0; i < 16; i++) begin s[i] = bget(pt, i) ^ bget(key, i); k[i] = bget(key, i); end
    rc = 8'h01;
    for (int r = 1; r <= 10; r++) begin
      // key schedule
      k[0] ^= ref_sbox(k[13]) ^ rc; k[1] ^= ref_sbox(k[14]); k[2] ^= ref_sbox(k[15]); k[3] ^= ref_sbox(k[12]);
      for (int i = 4; i < 16; i++) k[i] ^= k[i-4];
      rc = gmul(rc, 8'h02);
      // SubBytes + ShiftRows
      for (int c = 0; c < 4; c++)
        for (int rw = 0; rw < 4; rw++)
          t[4*c+rw] = ref_sbox(s[4*((c+rw)%4)+rw]);
      // MixColumns
      for (int c = 0; c < 4; c++)
        for (int rw = 0; rw < 4; rw++)
          s[4*c+rw] = (r == 10) ? t[4*c+rw] :
                      gmul(t[4*c+rw], 2) ^ gmul(t[4*c+(rw+1)%4], 3) ^ t[4*c+(rw+2)%4] ^ t[4*c+(rw+3)%4];
      for (int i = 0; i < 16; i++) s[i] ^= k[i];
    end
    for (int i = 0; i < 16; i++) pt[127-8*i -: 8] = s[i];
    return pt;
  endfunction

  // AES-CCM generation-encryption (SP 800-38C), 2-byte associated-data length
  // encoding. Returns payload ciphertext followed by the tag in ct[0..plen+tlen-1].
  function automatic void ref_ccm(input logic [127:0] key, input logic [7:0] n [], input logic [7:0] a [],
                                  input logic [7:0] p [], input int tlen, output logic [7:0] ct []);
    int nlen, alen, plen, q, na, np;
    logic [7:0] abuf [$];
    logic [127:0] x, b, ctr, s0, s;
    nlen = n.size(); alen = a.size(); plen = p.size(); q = 15 - nlen;
    ct = new[plen + tlen];
    b = 0;
    b[127:120] = ((alen > 0) ? 8'h40 : 8'h00) | 8'((tlen-2)/2 << 3) | 8'(q-1);
    for (int i = 0; i < nlen; i++) b[127-8*(1+i) -: 8] = n[i];
    for (int i = 0; i < q; i++) b[127-8*(15-i) -: 8] = 8'(plen >> (8*i));
    x = ref_aes(b, key);
    if (alen > 0) begin
      abuf.push_back(8'(alen >> 8)); abuf.push_back(8'(alen));
      foreach (a[i]) abuf.push_back(a[i]);
      while (abuf.size() % 16 != 0) abuf.push_back(8'h00);
      for (int blk = 0; blk < abuf.size()/16; blk++) begin
        for (int i = 0; i < 16; i++) b[127-8*i -: 8] = abuf[16*blk+i];
        x = ref_aes(x ^ b, key);
      end
    end
    np = (plen + 15) / 16;
    for (int blk = 0; blk < np; blk++) begin
      b = 0;
      for (int i = 0; i < 16; i++) if (16*blk+i < plen) b[127-8*i -: 8] = p[16*blk+i];
      x = ref_aes(x ^ b, key);
    end
    for (int j = 0; j <= np; j++) begin
      ctr = 0;
      ctr[127:120] = 8'(q-1);
      for (int i = 0; i < nlen; i++) ctr[127-8*(1+i) -: 8] = n[i];
      for (int i = 0; i < q; i++) ctr[127-8*(15-i) -: 8] = 8'(j >> (8*i));
      s = ref_aes(ctr, key);
      if (j == 0) s0 = s;
      else for (int i = 0; i < 16; i++) if (16*(j-1)+i < plen) ct[16*(j-1)+i] = p[16*(j-1)+i] ^ s[127-8*i -: 8];
    end
    for (int i = 0; i < tlen; i++) ct[plen+i] = x[127-8*i -: 8] ^ s0[127-8*i -: 8];
  endfunction

endpackage
