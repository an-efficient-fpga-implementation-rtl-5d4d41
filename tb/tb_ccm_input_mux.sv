// tb_ccm_input_mux: the AES data input for all select combinations used by
// the controller: B_i direct, B_i chained with the previous output, CTR_i direct.
module tb_ccm_input_mux;
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
  logic [127:0] blk, ctr, prev, data;
  logic sel1, sel2, sel3;
  ccm_input_mux dut (.*);
  initial begin
    for (int t = 0; t < 50; t++) begin
      blk = {$urandom, $urandom, $urandom, $urandom};
      ctr = {$urandom, $urandom, $urandom, $urandom};
      prev = {$urandom, $urandom, $urandom, $urandom};
      sel1 = 0; sel2 = 0; sel3 = 0; #1; check(data === blk, "B direct");
      sel1 = 0; sel2 = 1; sel3 = 1; #1; check(data === (blk ^ prev), "B chained");
      sel1 = 1; sel2 = 0; sel3 = 0; #1; check(data === ctr, "CTR direct");
      sel1 = 1; sel2 = 1; sel3 = 1; #1; check(data === (ctr ^ prev), "CTR chained");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
