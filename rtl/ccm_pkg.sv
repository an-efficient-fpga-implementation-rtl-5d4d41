// ccm_pkg: block counts and header bytes of AES-CCM (NIST SP 800-38C formatting).
//
// For a nonce of NLEN bytes, q = 15 - NLEN bytes encode the payload length and
// the block counter. Associated data of ALEN bytes is prefixed with its 2-byte
// length and zero padded to whole blocks; the payload is zero padded too. The
// CBC-MAC then runs over 1 + num_a_blocks + num_p_blocks blocks and counter
// mode over num_p_blocks + 1 counter blocks (CTR0 masks the tag).
package ccm_pkg;

  function automatic int num_a_blocks(int alen);
    return (alen == 0) ? 0 : (alen + 2 + 15) / 16;
  endfunction

  function automatic int num_p_blocks(int plen);
    return (plen + 15) / 16;
  endfunction

  // flags byte of B0: Adata, (t-2)/2, q-1
  function automatic logic [7:0] b0_flags(int nlen, int alen, int tlen);
    return ((alen > 0) ? 8'h40 : 8'h00) | 8'(((tlen - 2) / 2) << 3) | 8'(15 - nlen - 1);
  endfunction

  // flags byte of a counter block: q-1
  function automatic logic [7:0] ctr_flags(int nlen);
    return 8'(15 - nlen - 1);
  endfunction

endpackage
