// aes_p2s_converter: state buffer of the 8-bit AES core.
//
// Holds the current round state (read byte-serially through aes_byte_perm) and
// a next-state buffer that MixColumn fills one 32-bit column at a time. On
// `swap` (last clock of a round) the next state, including a column written in
// that same clock, becomes the current state. `load` writes a whole block in
// parallel at the start of an encryption. The double buffer is needed because
// ShiftRows reads bytes from columns that are already rewritten; it is this
// design's choice. Synchronous active-high reset; load has priority over swap.
module aes_p2s_converter (
  input  logic         clk,
  input  logic         reset,
  input  logic         load,
  input  logic [127:0] load_data,
  input  logic         col_wr,
  input  logic [1:0]   col,
  input  logic [31:0]  col_data,
  input  logic         swap,
  output logic [127:0] state
);
  logic [127:0] nxt, nxt_w;

  always_comb begin
    nxt_w = nxt;
    if (col_wr) nxt_w[127 - 32*col -: 32] = col_data;
  end

  always_ff @(posedge clk) begin
    if (reset) begin
      state <= '0;
      nxt   <= '0;
    end else begin
      if (col_wr) nxt <= nxt_w;
      if (load)      state <= load_data;
      else if (swap) state <= nxt_w;
    end
  end
endmodule
