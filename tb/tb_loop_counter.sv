// tb_loop_counter: counts done_aes pulses; reset_cnt clears and wins over a
// simultaneous pulse.
module tb_loop_counter;
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
  logic reset = 1, reset_cnt = 0, done_aes = 0;
  logic [7:0] cnt;
  int model = 0;
  loop_counter dut (.*);
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    check(cnt === 8'd0, "reset value");
    for (int t = 0; t < 300; t++) begin
      done_aes = $urandom_range(0, 1); reset_cnt = ($urandom_range(0, 15) == 0);
      @(negedge clk);
      if (reset_cnt) model = 0; else if (done_aes) model = (model + 1) % 256;
      check(cnt === 8'(model), $sformatf("cnt %0d exp %0d", cnt, model));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
