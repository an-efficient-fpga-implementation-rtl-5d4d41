// tb_aes_p2s_converter: parallel load, column writes into the next-state
// buffer that must not disturb the current state, and a swap that includes a
// column written in the same clock. Load must win over swap.
module tb_aes_p2s_converter;
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
  logic reset = 1, load = 0, col_wr = 0, swap = 0;
  logic [127:0] load_data = 0, state;
  logic [1:0] col = 0;
  logic [31:0] col_data = 0;
  aes_p2s_converter dut (.*);
  initial begin
    logic [127:0] a, b;
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 20; t++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      load = 1; load_data = a; @(negedge clk); load = 0;
      check(state === a, "parallel load");
      for (int c = 0; c < 3; c++) begin
        col_wr = 1; col = 2'(c); col_data = b[127-32*c -: 32]; @(negedge clk);
        check(state === a, "current state disturbed by a column write");
      end
      col_wr = 1; col = 2'd3; col_data = b[31:0]; swap = 1; @(negedge clk);
      col_wr = 0; swap = 0;
      check(state === b, $sformatf("swap gave %h exp %h", state, b));
      // load has priority over swap
      load = 1; load_data = a; swap = 1; @(negedge clk); load = 0; swap = 0;
      check(state === a, "load over swap");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
