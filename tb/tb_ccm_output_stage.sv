// tb_ccm_output_stage: Tag and S0 are only written on store with their sel4
// code, mac = Tag ^ S0, and ct_blk = AES output ^ payload block.
module tb_ccm_output_stage;
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
  logic reset = 1, store = 0;
  logic [1:0] sel4 = 0;
  logic [127:0] data_out = 0, pay_blk = 0, ct_blk, mac;
  ccm_output_stage dut (.*);
  initial begin
    logic [127:0] tag, s0;
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 20; t++) begin
      tag = {$urandom, $urandom, $urandom, $urandom};
      s0  = {$urandom, $urandom, $urandom, $urandom};
      data_out = tag; sel4 = 0; store = 1; @(negedge clk);
      data_out = s0;  sel4 = 1; store = 1; @(negedge clk);
      store = 0;
      data_out = {$urandom, $urandom, $urandom, $urandom}; sel4 = 2'($urandom_range(0, 1)); @(negedge clk);  // no store
      check(mac === (tag ^ s0), "mac = Tag ^ S0");
      pay_blk = {$urandom, $urandom, $urandom, $urandom}; sel4 = 2; store = 1; @(negedge clk); store = 0;
      check(ct_blk === (data_out ^ pay_blk), "ct = S ^ P");
      check(mac === (tag ^ s0), "sel4 = 2 must not touch Tag or S0");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
