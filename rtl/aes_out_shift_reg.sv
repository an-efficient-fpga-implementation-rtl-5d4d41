// aes_out_shift_reg: output shift register of the 8-bit AES core.
//
// During the last round the core produces one ciphertext byte per clock
// (byte 0 first). Each clock with `shift` high moves the register up one byte
// and inserts din at the bottom, so after 16 shifts byte 0 is at the top and
// dout is the 128-bit result. Synchronous active-high reset.
module aes_out_shift_reg (
  input  logic         clk,
  input  logic         reset,
  input  logic         shift,
  input  logic [7:0]   din,
  output logic [127:0] dout
);
  always_ff @(posedge clk) begin
    if (reset)      dout <= '0;
    else if (shift) dout <= {dout[119:0], din};
  end
endmodule
