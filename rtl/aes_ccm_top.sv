// aes_ccm_top: AES-CCM authenticated-encryption core built around one 8-bit AES.
//
// The message is loaded byte-serially: while load_in is high, clock i carries
// byte i of the key, the nonce, the associated data and the payload on their
// four buses. A start_in pulse then runs the whole generation-encryption on a
// single AES core: the CBC-MAC over B0, the associated-data blocks and the
// payload blocks, then counter mode over CTR0..CTR(NP). Every AES loop takes
// 162 clocks (start clock, 160-clock AES frame, clock in which done_aes is
// seen); the default message (8-byte nonce, 16 bytes of associated data,
// 16 bytes of payload, 6-byte tag) needs six loops, and bit_req rises
// 6 x 162 + 3 = 975 clocks after the clock that samples start_in. The result is then read
// one byte per clock with get_c: first the PLEN payload ciphertext bytes, then
// the TLEN-byte MAC. bit_req is high while bytes remain.
//
// Block structure (framing format, key shift register, CTR generator, input
// multiplexers sel1..sel3, AES core, sel4 output stage with Tag/S0, ciphertext
// register, FSM and loop counter) follows the published architecture; the
// message formatting follows NIST SP 800-38C. Field lengths are fixed by the
// parameters (defaults are the published example). Only encryption is built.
// Synchronous active-high reset.
module aes_ccm_top
  import ccm_pkg::*;
#(
  parameter int unsigned NLEN = 8,    // nonce bytes (7..13)
  parameter int unsigned TLEN = 6,    // MAC bytes (4, 6, .., 16)
  parameter int unsigned ALEN = 16,   // associated-data bytes (0 .. 65279)
  parameter int unsigned PLEN = 16    // payload bytes (>= 1)
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       load_in,
  input  logic       get_c,
  input  logic       start_in,
  input  logic [7:0] key_in,
  input  logic [7:0] nonce,
  input  logic [7:0] payload,
  input  logic [7:0] associated_data,
  output logic [7:0] cipher_text,
  output logic       bit_req
);
  localparam int unsigned NA   = num_a_blocks(ALEN);
  localparam int unsigned NP   = num_p_blocks(PLEN);
  localparam int unsigned NCBC = 1 + NA + NP;

  logic [127:0]      key, blk, b0, pay_blk, ctr, aes_data, aes_out, ct_blk, mac;
  logic [7:0]        cnt, idx, pay_idx;
  logic              sel1, sel2, sel3, we, reset_cnt, ctr_init, ctr_inc, store, mac_wr, out_en, done_aes, busy;
  logic [1:0]        sel4;

  assign pay_idx = idx - 8'd1;

  key_shift_reg u_key (.clk, .reset, .load_in(load_in && !busy), .key_in, .key);

  framing_format #(.NLEN(NLEN), .ALEN(ALEN), .PLEN(PLEN), .TLEN(TLEN)) u_frame (
    .clk, .reset, .load_in(load_in && !busy), .nonce, .associated_data, .payload,
    .blk_idx(idx), .blk, .b0, .pay_idx, .pay_blk
  );

  ctr_gen #(.NLEN(NLEN)) u_ctr (.clk, .reset, .init(ctr_init), .inc(ctr_inc), .b0, .ctr);

  ccm_input_mux u_in (.blk, .ctr, .prev(aes_out), .sel1, .sel2, .sel3, .data(aes_data));

  aes_core_8bit u_aes (
    .clk, .reset, .we, .data(aes_data), .key, .done_aes, .dataout_aes(aes_out)
  );

  loop_counter u_cnt (.clk, .reset, .reset_cnt, .done_aes, .cnt);

  ccm_fsm #(.NCBC(NCBC), .NP(NP)) u_fsm (
    .clk, .reset, .start_in, .done_aes, .cnt, .sel1, .sel2, .sel3, .sel4,
    .we, .reset_cnt, .ctr_init, .ctr_inc, .idx, .store, .mac_wr, .out_en, .busy
  );

  ccm_output_stage u_outst (
    .clk, .reset, .data_out(aes_out), .sel4, .store, .pay_blk, .ct_blk, .mac
  );

  cipher_text_buffer #(.PLEN(PLEN), .TLEN(TLEN)) u_ct (
    .clk, .reset, .wr_blk(store && sel4 == 2'd2), .blk_idx(pay_idx), .blk(ct_blk),
    .mac_wr, .mac, .out_en, .get_c, .cipher_text, .bit_req
  );
endmodule
