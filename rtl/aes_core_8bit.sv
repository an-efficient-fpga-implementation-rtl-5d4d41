// aes_core_8bit: AES-128 forward cipher with an 8-bit datapath.
//
// One byte of the state passes through the single data S-box (S-box 1) per
// clock: 16 clocks per round, 10 rounds, 160 clocks per 128-bit block.
// Per clock (position pos of round rnd):
//   state byte chosen by the byte permutation (ShiftRows read order)
//   -> XOR with the matching byte of round key rnd-1 (AddRoundKey)
//   -> S-box 1 -> column buffer.
// Every fourth clock the completed column goes through MixColumn into the
// parallel-to-serial state buffer. In round 10 MixColumn is skipped and the
// S-box byte is XORed with the byte of round key 10 that the key expansion
// produces in the same clock, then shifted into the output register.
//
// Interface: `we` loads `data` and `key` (priority over a running block) and
// starts. done_aes is a one-clock pulse exactly 160 clocks (NROUNDS x 16) after
// the `we` clock; dataout_aes then holds the ciphertext and stays until the
// last round of the next block shifts in new bytes. The 160-clock frame and the loop structure follow the
// published core; loading data and key in parallel instead of through input
// shift registers, and the double-buffered state, are this design's choices.
// Synchronous active-high reset.
module aes_core_8bit
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         reset,
  input  logic         we,
  input  logic [127:0] data,
  input  logic [127:0] key,
  output logic         done_aes,
  output logic [127:0] dataout_aes
);
  logic         busy;
  logic [3:0]   rnd;          // 1..10
  logic [3:0]   pos;          // 0..15
  logic [127:0] state, rk;
  logic [7:0]   pbyte, xbyte, sbyte, nk_byte;
  logic [3:0]   src;
  logic [7:0]   cb [3];       // S-box bytes of rows 0..2 of the current column
  logic [31:0]  col, mc;
  logic         last_round, col_end;

  assign last_round = (rnd == 4'(NROUNDS));
  assign col_end    = (pos[1:0] == 2'd3);

  aes_p2s_converter u_p2s (
    .clk, .reset,
    .load(we), .load_data(data),
    .col_wr(busy && col_end && !last_round), .col(pos[3:2]), .col_data(mc),
    .swap(busy && pos == 4'd15 && !last_round),
    .state
  );

  aes_byte_perm u_perm (.state, .pos, .byte_out(pbyte), .src);

  aes_key_expansion u_kexp (
    .clk, .reset, .load(we), .key, .pos, .rnd, .step(busy), .rk, .nk_byte
  );

  assign xbyte = pbyte ^ get_byte(rk, int'(src));

  aes_sbox u_sbox1 (.s_in(xbyte), .s_out(sbyte));

  assign col = {cb[0], cb[1], cb[2], sbyte};
  aes_mixcolumn u_mc (.col_in(col), .col_out(mc));

  aes_out_shift_reg u_out (
    .clk, .reset, .shift(busy && last_round), .din(sbyte ^ nk_byte), .dout(dataout_aes)
  );

  always_ff @(posedge clk) begin
    if (reset) begin
      busy     <= 1'b0;
      rnd      <= 4'd1;
      pos      <= 4'd0;
      done_aes <= 1'b0;
      cb       <= '{default: '0};
    end else begin
      done_aes <= 1'b0;
      if (we) begin
        busy <= 1'b1;
        rnd  <= 4'd1;
        pos  <= 4'd0;
      end else if (busy) begin
        if (!col_end) cb[pos[1:0]] <= sbyte;
        pos <= pos + 4'd1;
        if (pos == 4'd15) begin
          if (last_round) begin
            busy     <= 1'b0;
            done_aes <= 1'b1;
          end
          rnd <= rnd + 4'd1;
        end
      end
    end
  end

  // the round counter never leaves 1..10 while a block is in flight
  a_rnd_range: assert property (@(posedge clk) disable iff (reset) busy |-> (rnd >= 4'd1 && rnd <= 4'(NROUNDS)));
endmodule
