// tb_sbox_s3: S1, S2 and S3 together must invert every tower-field element:
// x (x) S3(S1(x), S2(S13)) = unit (0xFF) for x != 0, and 0 -> 0. S1 also must
// hand the two halves through unchanged. The other two stages are helpers.
module tb_sbox_s3;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] s11, s31;
  logic [3:0] s12, s13, s14, s21;
  sbox_s1 h1 (.*);
  sbox_s2 h2 (.*);
  sbox_s3 dut (.*);
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
      s11 = 8'(x); #1;
      checks += 2;
      if (x == 0 ? (s31 !== 8'h00) : (tower_mul(8'(x), s31) !== 8'hff)) begin failures++; $display("inv(%h) = %h", x, s31); end
      if ({s12, s14} !== 8'(x)) begin failures++; $display("halves of %h", x); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
