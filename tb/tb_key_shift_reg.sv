// tb_key_shift_reg: a load burst longer than 16 clocks must keep the first 16
// key bytes, first byte on top; a new burst must load a new key.
module tb_key_shift_reg;
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
  logic reset = 1, load_in = 0;
  logic [7:0] key_in = 0;
  logic [127:0] key;
  key_shift_reg dut (.*);
  initial begin
    logic [127:0] v;
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 8; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      load_in = 1;
      for (int i = 0; i < 16 + 4*t; i++) begin
        key_in = (i < 16) ? v[127-8*i -: 8] : 8'($urandom);
        @(negedge clk);
      end
      load_in = 0; repeat (2) @(negedge clk);
      check(key === v, $sformatf("got %h exp %h", key, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
