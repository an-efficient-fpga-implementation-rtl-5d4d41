// ccm_input_mux: selects the data block for the AES core.
//
// sel1 picks the formatted block B_i (0) or the counter block CTR_i (1).
// sel2 routes that block either straight on (0) or into the chaining XOR with
// the previous AES output (1); sel3 picks which branch drives the AES Data
// input. CBC-MAC uses the XOR branch for every block after B0; B0 and all
// counter blocks go straight through. Purely combinational.
module ccm_input_mux (
  input  logic [127:0] blk,
  input  logic [127:0] ctr,
  input  logic [127:0] prev,
  input  logic         sel1,
  input  logic         sel2,
  input  logic         sel3,
  output logic [127:0] data
);
  logic [127:0] m1, direct, chained;

  always_comb begin
    m1      = sel1 ? ctr : blk;
    direct  = sel2 ? '0 : m1;
    chained = sel2 ? (m1 ^ prev) : '0;
    data    = sel3 ? chained : direct;
  end
endmodule
