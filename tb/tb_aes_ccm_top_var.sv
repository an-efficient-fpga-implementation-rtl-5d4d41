// tb_aes_ccm_top_var: the AES-CCM core at other message shapes, three
// instances side by side:
//   NIST SP 800-38C Example 1: 7-byte nonce, 8 bytes AD, 4 bytes payload, 4-byte MAC
//   NIST SP 800-38C Example 3: 12-byte nonce, 20 bytes AD, 24 bytes payload, 8-byte MAC
//   no associated data, 13-byte nonce, 40-byte payload (partial last block), 16-byte MAC
//   8-byte nonce, 16 bytes AD, 64-byte payload, 6-byte MAC (the smallest payload
//   that reaches 10 Mbit/s at 44 MHz; its clock count is checked by the harness)
// each with random messages against the reference model as well.
module tb_aes_ccm_top_var;
  int checks = 0, failures = 0;
  logic d1, d3, d0, d4;
  int c1, c3, c0, c4, f1, f3, f0, f4;
  logic clk = 0;
  always #5 clk = ~clk;

  ccm_harness #(.NLEN(7),  .TLEN(4),  .ALEN(8),  .PLEN(4),  .EXAMPLE(1)) h1 (.done(d1), .checks(c1), .failures(f1));
  ccm_harness #(.NLEN(12), .TLEN(8),  .ALEN(20), .PLEN(24), .EXAMPLE(3)) h3 (.done(d3), .checks(c3), .failures(f3));
  ccm_harness #(.NLEN(13), .TLEN(16), .ALEN(0),  .PLEN(40), .EXAMPLE(0)) h0 (.done(d0), .checks(c0), .failures(f0));
  ccm_harness #(.NLEN(8),  .TLEN(6),  .ALEN(16), .PLEN(64), .EXAMPLE(0)) h4 (.done(d4), .checks(c4), .failures(f4));

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + c1 + c3 + c0 + c4, failures + f1 + f3 + f0 + f4);
    $finish;
  end

  initial begin
    #1;
    wait (d1 && d3 && d0 && d4);
    checks = c1 + c3 + c0 + c4;
    failures = f1 + f3 + f0 + f4;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
