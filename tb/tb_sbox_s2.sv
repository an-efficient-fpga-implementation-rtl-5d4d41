// tb_sbox_s2: the GF(16) inverter: g * S2(g) must be the unit (4'hF in the
// normal basis) for every g != 0, and S2(0) = 0.
module tb_sbox_s2;
  import gf_tower_pkg::*;
  int checks = 0, failures = 0;
  logic [3:0] s13, s21;
  sbox_s2 dut (.*);
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
    for (int g = 0; g < 16; g++) begin
      s13 = 4'(g); #1;
      checks++;
      if (g == 0 ? (s21 !== 4'h0) : (gf16_mul(4'(g), s21) !== 4'hf)) begin failures++; $display("inv(%h) = %h", g, s21); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
