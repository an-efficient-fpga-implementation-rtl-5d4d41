// ccm_output_stage: routes AES results and forms ciphertext and MAC.
//
// When `store` is high, sel4 sends the AES output to the Tag register (0, the
// last CBC-MAC value), to the S0 register (1, encrypted CTR0), or to the
// ciphertext path (2), where ct_blk = S_i XOR payload block is formed
// combinationally for the ciphertext buffer. mac = Tag XOR S0; its first TLEN
// bytes are the authentication value the buffer appends. Synchronous
// active-high reset.
module ccm_output_stage (
  input  logic         clk,
  input  logic         reset,
  input  logic [127:0] data_out,
  input  logic [1:0]   sel4,
  input  logic         store,
  input  logic [127:0] pay_blk,
  output logic [127:0] ct_blk,
  output logic [127:0] mac
);
  logic [127:0] tag_r, s0_r;

  always_ff @(posedge clk) begin
    if (reset) begin
      tag_r <= '0;
      s0_r  <= '0;
    end else if (store) begin
      if (sel4 == 2'd0) tag_r <= data_out;
      if (sel4 == 2'd1) s0_r  <= data_out;
    end
  end

  assign ct_blk = data_out ^ pay_blk;
  assign mac    = tag_r ^ s0_r;
endmodule
