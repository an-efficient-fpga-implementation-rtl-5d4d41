// key_shift_reg: byte-serial key loading.
//
// While load_in is high the register shifts in one key byte per clock, first
// byte ending up in the top byte (AES byte 0) after 16 clocks. It stops after
// 16 bytes even if load_in stays high longer (other fields may be longer than
// the key); its byte counter restarts whenever load_in is low. The 128-bit key
// stays stable for the AES core until the next load. Synchronous active-high reset.
module key_shift_reg (
  input  logic         clk,
  input  logic         reset,
  input  logic         load_in,
  input  logic [7:0]   key_in,
  output logic [127:0] key
);
  logic [4:0] cnt;

  always_ff @(posedge clk) begin
    if (reset) begin
      key <= '0;
      cnt <= '0;
    end else if (load_in) begin
      if (cnt < 5'd16) begin
        key <= {key[119:0], key_in};
        cnt <= cnt + 5'd1;
      end
    end else begin
      cnt <= '0;
    end
  end
endmodule
