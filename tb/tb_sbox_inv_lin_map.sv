// tb_sbox_inv_lin_map: the output map must undo the input map and apply the
// AES affine transform: inv(lin(x)) = affine(x) ^ 0x63 for every byte x. The
// input map is instantiated as a helper.
module tb_sbox_inv_lin_map;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] x, t, a, y;
  sbox_lin_map helper (.a(x), .y(t));
  assign a = t;
  sbox_inv_lin_map dut (.a, .y);
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
    for (int i = 0; i < 256; i++) begin
      x = 8'(i); #1;
      checks++;
      if (y !== (ref_affine(8'(i)) ^ 8'h63)) begin failures++; $display("x=%h y=%h", i, y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
