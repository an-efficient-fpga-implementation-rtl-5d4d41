// tb_aes_mixcolumn: MixColumns on the test columns printed in FIPS-197 and on
// random columns against a GF(2^8) reference.
module tb_aes_mixcolumn;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [31:0] col_in, col_out;
  aes_mixcolumn dut (.*);
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic [31:0] i, input logic [31:0] e);
    col_in = i; #1; checks++;
    if (col_out !== e) begin failures++; $display("MC(%h) = %h exp %h", i, col_out, e); end
  endtask
  initial begin
    chk(32'hdb135345, 32'h8e4da1bc);
    chk(32'hf20a225c, 32'h9fdc589d);
    chk(32'h01010101, 32'h01010101);
    chk(32'hd4d4d4d5, 32'hd5d5d7d6);
    chk(32'h2d26314c, 32'h4d7ebdf8);
    chk(32'hd4bf5d30, 32'h046681e5);  // FIPS-197 Appendix B, round 1, column 0
    for (int t = 0; t < 200; t++) begin
      logic [7:0] b [4];
      logic [31:0] e;
      for (int i = 0; i < 4; i++) b[i] = 8'($urandom);
      for (int i = 0; i < 4; i++)
        e[31-8*i -: 8] = gmul(b[i], 2) ^ gmul(b[(i+1)%4], 3) ^ b[(i+2)%4] ^ b[(i+3)%4];
      chk({b[0], b[1], b[2], b[3]}, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
