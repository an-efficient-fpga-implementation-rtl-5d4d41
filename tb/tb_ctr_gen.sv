// tb_ctr_gen: CTR0 derived from the published example's B0 (flags 0x06,
// nonce 10..17, counter 0), the following counter blocks, a carry across
// bytes of the counter field, and that init restarts the sequence.
module tb_ctr_gen;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic reset = 1, init = 0, inc = 0;
  logic [127:0] b0 = 128'h56101112131415161700000000000010, ctr;
  ctr_gen dut (.*);
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    init = 1; @(negedge clk); init = 0;
    for (int i = 0; i < 300; i++) begin
      check(ctr === {8'h06, 64'h1011121314151617, 56'(i)}, $sformatf("CTR%0d = %h", i, ctr));
      inc = 1; @(negedge clk); inc = 0;
      if (i % 7 == 0) @(negedge clk);   // idle clock must hold the value
    end
    b0 = {8'h56, 64'hdeadbeef01234567, 56'h10};
    init = 1; @(negedge clk); init = 0;
    check(ctr === {8'h06, 64'hdeadbeef01234567, 56'h0}, "re-init from a new B0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
