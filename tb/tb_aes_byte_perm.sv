// tb_aes_byte_perm: reading positions 0..15 through the permutation must give
// ShiftRows of the state: out[4c+r] = in[4((c+r) mod 4)+r]. Checked with the
// FIPS-197 Appendix B round-1 state and with random states.
module tb_aes_byte_perm;
  import aes_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] state;
  logic [3:0] pos, src;
  logic [7:0] byte_out;
  aes_byte_perm dut (.*);
  logic clk = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input logic [127:0] st, input logic [127:0] exp);
    logic [127:0] got;
    state = st;
    for (int p = 0; p < 16; p++) begin
      pos = 4'(p); #1; got[127-8*p -: 8] = byte_out;
      checks++;
      if (byte_out !== bget(st, int'(src))) begin failures++; $display("src %0d mismatch", src); end
    end
    checks++;
    if (got !== exp) begin failures++; $display("SR(%h) = %h exp %h", st, got, exp); end
  endtask
  initial begin
    // after SubBytes of round 1 and after ShiftRows of round 1 (FIPS-197 Appendix B)
    chk(128'hd42711aee0bf98f1b8b45de51e415230, 128'hd4bf5d30e0b452aeb84111f11e2798e5);
    for (int t = 0; t < 20; t++) begin
      logic [127:0] st, e;
      st = {$urandom, $urandom, $urandom, $urandom};
      for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) e[127-8*(4*c+r) -: 8] = bget(st, 4*((c+r)%4)+r);
      chk(st, e);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
