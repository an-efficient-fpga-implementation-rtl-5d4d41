// loop_counter: AES loop index for the CCM controller.
//
// Counts done_aes pulses, i.e. completed AES encryptions, so the FSM knows
// which block (B_i or CTR_i) to feed next. reset_cnt clears it between the
// CBC-MAC and the counter-mode phases and has priority over counting.
// Synchronous active-high reset.
module loop_counter (
  input  logic       clk,
  input  logic       reset,
  input  logic       reset_cnt,
  input  logic       done_aes,
  output logic [7:0] cnt
);
  always_ff @(posedge clk) begin
    if (reset || reset_cnt) cnt <= '0;
    else if (done_aes)      cnt <= cnt + 8'd1;
  end
endmodule
