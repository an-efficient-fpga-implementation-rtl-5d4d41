// tb_aes_sbox: exhaustive check of the composite-field S-box against the
// S-box computed from its definition (GF(2^8) inverse by exponentiation and
// the FIPS-197 affine transform), plus the two values printed in FIPS-197.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] s_in, s_out;
  aes_sbox dut (.*);
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int x = 0; x < 256; x++) begin
      s_in = 8'(x); #1;
      checks++;
      if (s_out !== ref_sbox(8'(x))) begin failures++; $display("S(%h) = %h, expected %h", x, s_out, ref_sbox(8'(x))); end
    end
    s_in = 8'h53; #1; checks++; if (s_out !== 8'hed) failures++;
    s_in = 8'h00; #1; checks++; if (s_out !== 8'h63) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
