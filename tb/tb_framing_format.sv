// tb_framing_format: loads the published example (nonce 10..17, associated
// data 00..0f, payload 20..2f) and checks the formatted blocks B0..B3 as listed
// for NIST SP 800-38C Example 2, the payload blocks and the b0 output.
// A second instance with 13-byte nonce, 30 bytes of associated data, 20 bytes
// of payload and a 16-byte tag checks padding and multi-block fields.
module tb_framing_format;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic reset = 1, load_in = 0;
  logic [7:0] nonce = 0, associated_data = 0, payload = 0, blk_idx = 0, pay_idx = 0;
  logic [127:0] blk, b0, pay_blk, blk2, b02, pay_blk2;
  framing_format dut (.*);
  framing_format #(.NLEN(13), .ALEN(30), .PLEN(20), .TLEN(16)) dut2 (
    .clk, .reset, .load_in, .nonce, .associated_data, .payload,
    .blk_idx, .blk(blk2), .b0(b02), .pay_idx, .pay_blk(pay_blk2));
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    load_in = 1;
    for (int i = 0; i < 30; i++) begin
      nonce = 8'h10 + 8'(i); associated_data = 8'(i); payload = 8'h20 + 8'(i);
      @(negedge clk);
    end
    load_in = 0; nonce = 0; associated_data = 0; payload = 0;
    @(negedge clk);
    blk_idx = 0; #1; check(blk === 128'h56101112131415161700000000000010, $sformatf("B0 %h", blk));
    check(b0 === 128'h56101112131415161700000000000010, "b0 output");
    blk_idx = 1; #1; check(blk === 128'h0010000102030405060708090a0b0c0d, $sformatf("B1 %h", blk));
    blk_idx = 2; #1; check(blk === 128'h0e0f0000000000000000000000000000, $sformatf("B2 %h", blk));
    blk_idx = 3; #1; check(blk === 128'h202122232425262728292a2b2c2d2e2f, $sformatf("B3 %h", blk));
    pay_idx = 0; #1; check(pay_blk === 128'h202122232425262728292a2b2c2d2e2f, "payload block 0");
    // second instance: q = 2, Adata, t = 16 -> flags 0x40 | 7<<3 | 1 = 0x79
    blk_idx = 0; #1; check(blk2 === 128'h79101112131415161718191a1b1c0014, $sformatf("B0' %h", blk2));
    check(b02 === blk2, "b0 output, second instance");
    blk_idx = 1; #1; check(blk2 === 128'h001e000102030405060708090a0b0c0d, $sformatf("B1' %h", blk2));
    blk_idx = 2; #1; check(blk2 === 128'h0e0f101112131415161718191a1b1c1d, $sformatf("B2' %h", blk2));
    blk_idx = 3; #1; check(blk2 === 128'h202122232425262728292a2b2c2d2e2f, $sformatf("B3' %h", blk2));
    blk_idx = 4; #1; check(blk2 === 128'h30313233000000000000000000000000, $sformatf("B4' %h", blk2));
    pay_idx = 1; #1; check(pay_blk2 === 128'h30313233000000000000000000000000, "payload block 1, padded");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
