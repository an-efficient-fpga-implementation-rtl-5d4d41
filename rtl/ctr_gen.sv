// ctr_gen: counter-block register for the CTR part of AES-CCM.
//
// `init` derives CTR0 from the formatted block B0: the flags byte becomes q-1
// (q = 15-NLEN), the nonce is kept and the q-byte counter field is cleared
// (NIST SP 800-38C, A.3). Each `inc` adds one to the counter field, a q-byte
// big-endian increment, giving CTR1, CTR2, ... for the payload blocks. CTR0
// masks the tag; CTR1.. give the payload key stream. The published block
// diagram feeds this block from B0; keeping a register and incrementing it is
// this design's reading of that. Only the nonce bytes of B0 are used; its
// flags and length bytes are replaced. Synchronous active-high reset; init wins.
module ctr_gen
  import ccm_pkg::*;
#(
  parameter int unsigned NLEN = 8
) (
  input  logic         clk,
  input  logic         reset,
  input  logic         init,
  input  logic         inc,
  input  logic [127:0] b0,
  output logic [127:0] ctr
);
  localparam int unsigned QB = 8 * (15 - NLEN);   // counter field bits

  always_ff @(posedge clk) begin
    if (reset) begin
      ctr <= '0;
    end else if (init) begin
      ctr <= {ctr_flags(NLEN), b0[119 -: 8*NLEN], QB'(0)};
    end else if (inc) begin
      ctr[QB-1:0] <= ctr[QB-1:0] + 1'b1;
    end
  end
endmodule
