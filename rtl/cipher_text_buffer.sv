// cipher_text_buffer: holds the finished ciphertext and hands it out byte by byte.
//
// wr_blk writes a 16-byte ciphertext block at byte offset 16*blk_idx (bytes
// beyond PLEN are dropped); mac_wr writes the first TLEN bytes of mac after
// the payload. out_en starts the read-out: bit_req goes high, cipher_text shows
// byte 0, and every clock with get_c high advances one byte. bit_req falls
// after the last of the PLEN+TLEN bytes has been taken; cipher_text is 0 while
// bit_req is low. Synchronous active-high reset.
module cipher_text_buffer #(
  parameter int unsigned PLEN = 16,
  parameter int unsigned TLEN = 6
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         wr_blk,
  input  logic [7:0]   blk_idx,
  input  logic [127:0] blk,
  input  logic         mac_wr,
  input  logic [127:0] mac,
  input  logic         out_en,
  input  logic         get_c,
  output logic [7:0]   cipher_text,
  output logic         bit_req
);
  localparam int unsigned TOTAL = PLEN + TLEN;
  localparam int unsigned PW    = $clog2(TOTAL + 1);

  logic [7:0]    ct [TOTAL];
  logic [PW-1:0] rd_ptr;

  always_ff @(posedge clk) begin
    if (reset) begin
      ct      <= '{default: '0};
      rd_ptr  <= '0;
      bit_req <= 1'b0;
    end else begin
      if (wr_blk)
        for (int i = 0; i < 16; i++)
          if (16*int'(blk_idx) + i < PLEN) ct[16*int'(blk_idx) + i] <= blk[127-8*i -: 8];
      if (mac_wr)
        for (int i = 0; i < TLEN; i++) ct[PLEN + i] <= mac[127-8*i -: 8];
      if (out_en) begin
        rd_ptr  <= '0;
        bit_req <= 1'b1;
      end else if (bit_req && get_c) begin
        rd_ptr <= rd_ptr + 1'b1;
        if (rd_ptr == PW'(TOTAL - 1)) bit_req <= 1'b0;
      end
    end
  end

  assign cipher_text = bit_req ? ct[rd_ptr] : 8'h00;

  a_ptr_range: assert property (@(posedge clk) disable iff (reset) bit_req |-> rd_ptr < PW'(TOTAL));
endmodule
