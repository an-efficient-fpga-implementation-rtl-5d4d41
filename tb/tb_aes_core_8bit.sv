// tb_aes_core_8bit: checks the 8-bit AES core against the FIPS-197 Appendix C.1
// vector and against the reference model for random blocks, and checks that
// done_aes arrives exactly 160 clocks after we. Also checks that a new `we` in the
// middle of a block restarts the core.
module tb_aes_core_8bit;
  import aes_ref_pkg::*;
  logic clk = 0, reset = 1, we = 0, done_aes;
  logic [127:0] data, key, dataout_aes;
  int checks = 0, failures = 0;

  aes_core_8bit dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [127:0] d, input logic [127:0] k, input logic [127:0] exp);
    int n;
    @(negedge clk); data = d; key = k; we = 1;
    @(negedge clk); we = 0; data = '0; key = '0;   // core must have captured them
    n = 0;   // clocks after the one that captured we
    while (!done_aes) begin @(negedge clk); n++; end
    checks += 2;
    if (n != 160) begin failures++; $display("latency %0d, expected 160", n); end
    if (dataout_aes !== exp) begin failures++; $display("got %h exp %h", dataout_aes, exp); end
  endtask

  initial begin
    logic [127:0] d, k;
    data = 0; key = 0;
    repeat (3) @(negedge clk); reset = 0;
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    // FIPS-197 Appendix B
    run(128'h3243f6a8885a308d313198a2e0370734, 128'h2b7e151628aed2a6abf7158809cf4f3c,
        128'h3925841d02dc09fbdc118597196a0b32);
    // a new we in the middle of a block restarts the core with the new block
    @(negedge clk); data = 128'h0; key = 128'h1; we = 1;
    @(negedge clk); we = 0;
    repeat (70) @(negedge clk);
    checks++;
    if (done_aes) begin failures++; $display("early done"); end
    run(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int t = 0; t < 12; t++) begin
      d = {$urandom, $urandom, $urandom, $urandom};
      k = {$urandom, $urandom, $urandom, $urandom};
      run(d, k, ref_aes(d, k));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
