// framing_format: captures the message fields and formats the CBC-MAC blocks.
//
// While load_in is high, clock i delivers byte i of the nonce, the associated
// data and the payload on their own byte buses; each field keeps the first
// NLEN / ALEN / PLEN bytes. The load counter restarts when load_in is low.
// The formatted blocks follow NIST SP 800-38C:
//   B0                 = flags | nonce | payload length in q = 15-NLEN bytes
//   B1 .. B(NA)        = 2-byte ALEN | associated data | zero padding
//   B(NA+1) .. B(NA+NP) = payload, last block zero padded
// blk returns B(blk_idx) and b0 always B0 (the CTR block derives CTR0 from
// it); pay_blk returns payload block pay_idx (0-based),
// which the ciphertext path XORs with the key stream. The fields are stored
// once and the blocks are assembled by multiplexers rather than kept as
// separate 128-bit registers. Synchronous active-high reset.
module framing_format
  import ccm_pkg::*;
#(
  parameter int unsigned NLEN = 8,
  parameter int unsigned ALEN = 16,
  parameter int unsigned PLEN = 16,
  parameter int unsigned TLEN = 6
) (
  input  logic              clk,
  input  logic              reset,
  input  logic              load_in,
  input  logic [7:0]        nonce,
  input  logic [7:0]        associated_data,
  input  logic [7:0]        payload,
  input  logic [7:0]        blk_idx,
  output logic [127:0]      blk,
  output logic [127:0]      b0,
  input  logic [7:0]        pay_idx,
  output logic [127:0]      pay_blk
);
  localparam int unsigned NA  = num_a_blocks(ALEN);
  localparam int unsigned AL  = (ALEN > 0) ? ALEN : 1;   // storage size
  localparam int unsigned MAXL = (NLEN > ALEN) ? ((NLEN > PLEN) ? NLEN : PLEN)
                                               : ((ALEN > PLEN) ? ALEN : PLEN);
  localparam int unsigned CW  = $clog2(MAXL + 1);

  logic [7:0]    n_r [NLEN];
  logic [7:0]    a_r [AL];
  logic [7:0]    p_r [PLEN];
  logic [CW-1:0] ld_cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      ld_cnt <= '0;
      n_r    <= '{default: '0};
      a_r    <= '{default: '0};
      p_r    <= '{default: '0};
    end else if (load_in) begin
      if (ld_cnt < CW'(NLEN)) n_r[int'(ld_cnt)] <= nonce;
      if (ld_cnt < CW'(ALEN)) a_r[int'(ld_cnt)] <= associated_data;
      if (ld_cnt < CW'(PLEN)) p_r[int'(ld_cnt)] <= payload;
      if (ld_cnt < CW'(MAXL)) ld_cnt <= ld_cnt + 1'b1;
    end else begin
      ld_cnt <= '0;
    end
  end

  function automatic logic [127:0] payload_block(int j);
    logic [127:0] b;
    b = '0;
    // the payload block index is never negative in use; guard anyway
    if (j < 0) return b;
    for (int i = 0; i < 16; i++)
      if (16*j + i < PLEN) b[127-8*i -: 8] = p_r[16*j + i];
    return b;
  endfunction

  always_comb begin
    b0 = '0;
    b0[127:120] = b0_flags(NLEN, ALEN, TLEN);
    for (int i = 0; i < NLEN; i++) b0[127-8*(1+i) -: 8] = n_r[i];
    for (int i = 0; i < 15 - NLEN; i++) b0[127-8*(15-i) -: 8] = 8'(PLEN >> (8*i));
  end

  always_comb begin
    int idx, pos;
    idx = int'(blk_idx);
    pos = 0;
    blk = '0;
    if (idx == 0) begin
      blk = b0;
    end else if (idx <= NA) begin
      for (int i = 0; i < 16; i++) begin
        pos = 16*(idx-1) + i;
        if (pos == 0)            blk[127-8*i -: 8] = 8'(ALEN >> 8);
        else if (pos == 1)       blk[127-8*i -: 8] = 8'(ALEN);
        else if (pos - 2 < ALEN) blk[127-8*i -: 8] = a_r[pos-2];
      end
    end else begin
      blk = payload_block(idx - 1 - NA);
    end
  end

  assign pay_blk = payload_block(int'(pay_idx));
endmodule
