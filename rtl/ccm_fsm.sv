// ccm_fsm: controller of the AES-CCM core.
//
// One AES core is reused for every encryption. After start_in the FSM runs
//   CBC-MAC : B0, B1 .. B(NCBC-1), each block after B0 XORed with the previous
//             AES output (sel1 = 0, sel2 = sel3 = 1 except for B0); the last
//             result is stored as the Tag (sel4 = 0);
//   CTR     : CTR0 -> S0 register (sel4 = 1), CTR1 .. CTR(NP) -> ciphertext
//             blocks (sel4 = 2, ciphertext block idx-1);
//   MAC     : writes Tag XOR S0 (first TLEN bytes) behind the payload;
//   OUT     : starts the byte-serial read-out (out_en).
// ctr_init (at start) makes the CTR block derive CTR0 from B0 and ctr_inc
// (after each counter-mode loop) advances it. The loop index comes from loop_counter, which counts done_aes and is cleared
// with reset_cnt at start and between the two phases. Each AES loop costs one
// start clock, the 160-clock frame and one clock in which done_aes is seen. The state sequence and encodings are
// this design's own; the select signals are the ones of the published block
// diagram. start_in is ignored while a message is being processed.
// Synchronous active-high reset.
module ccm_fsm #(
  parameter int unsigned NCBC = 4,   // blocks in CBC-MAC: 1 + assoc blocks + payload blocks
  parameter int unsigned NP   = 1    // payload blocks
) (
  input  logic       clk,
  input  logic       reset,
  input  logic       start_in,
  input  logic       done_aes,
  input  logic [7:0] cnt,
  output logic       sel1,
  output logic       sel2,
  output logic       sel3,
  output logic [1:0] sel4,
  output logic       we,
  output logic       reset_cnt,
  output logic       ctr_init,
  output logic       ctr_inc,
  output logic [7:0] idx,
  output logic       store,
  output logic       mac_wr,
  output logic       out_en,
  output logic       busy
);
  typedef enum logic [2:0] {
    S_IDLE, S_CBC_GO, S_CBC_WAIT, S_CTR_GO, S_CTR_WAIT, S_MAC, S_OUT
  } state_t;

  state_t st, st_n;

  always_ff @(posedge clk) begin
    if (reset) st <= S_IDLE;
    else       st <= st_n;
  end

  always_comb begin
    st_n      = st;
    sel1      = 1'b0;
    sel2      = 1'b0;
    sel3      = 1'b0;
    sel4      = 2'd0;
    we        = 1'b0;
    reset_cnt = 1'b0;
    ctr_init  = 1'b0;
    ctr_inc   = 1'b0;
    store     = 1'b0;
    mac_wr    = 1'b0;
    out_en    = 1'b0;
    idx       = cnt;
    busy      = (st != S_IDLE);
    unique case (st)
      S_IDLE: if (start_in) begin
        reset_cnt = 1'b1;
        ctr_init  = 1'b1;
        st_n      = S_CBC_GO;
      end
      S_CBC_GO: begin
        sel2 = (cnt != 8'd0);
        sel3 = (cnt != 8'd0);
        we   = 1'b1;
        st_n = S_CBC_WAIT;
      end
      S_CBC_WAIT: if (done_aes) begin
        if (cnt == 8'(NCBC - 1)) begin
          sel4      = 2'd0;
          store     = 1'b1;
          reset_cnt = 1'b1;
          st_n      = S_CTR_GO;
        end else begin
          st_n = S_CBC_GO;
        end
      end
      S_CTR_GO: begin
        sel1 = 1'b1;
        we   = 1'b1;
        st_n = S_CTR_WAIT;
      end
      S_CTR_WAIT: if (done_aes) begin
        sel4    = (cnt == 8'd0) ? 2'd1 : 2'd2;
        store   = 1'b1;
        ctr_inc = 1'b1;
        st_n  = (cnt == 8'(NP)) ? S_MAC : S_CTR_GO;
      end
      S_MAC: begin
        mac_wr = 1'b1;
        st_n   = S_OUT;
      end
      S_OUT: begin
        out_en = 1'b1;
        st_n   = S_IDLE;
      end
      default: st_n = S_IDLE;
    endcase
  end

  // the AES core is only started from the two GO states
  a_we_go: assert property (@(posedge clk) disable iff (reset) we |-> (st == S_CBC_GO || st == S_CTR_GO));
endmodule
