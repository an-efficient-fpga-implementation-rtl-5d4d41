// tb_sbox_lin_map: the input map must be a field isomorphism from the AES
// polynomial basis to the tower basis: bijective, 1 -> tower unit 0xFF, and
// lin(a*b) = lin(a) (x) lin(b) with the tower product, for random pairs.
module tb_sbox_lin_map;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a, y;
  logic [7:0] img [256];
  bit seen [256];
  sbox_lin_map dut (.*);
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
    for (int x = 0; x < 256; x++) begin a = 8'(x); #1; img[x] = y; end
    checks++;
    for (int x = 0; x < 256; x++) seen[img[x]] = 1;
    for (int x = 0; x < 256; x++) if (!seen[x]) begin failures++; $display("not bijective"); break; end
    checks++; if (img[1] !== 8'hff) begin failures++; $display("lin(1) = %h", img[1]); end
    for (int t = 0; t < 500; t++) begin
      logic [7:0] p, q;
      p = 8'($urandom); q = 8'($urandom);
      checks++;
      if (img[gmul(p, q)] !== tower_mul(img[p], img[q])) begin failures++; $display("product %h*%h", p, q); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
