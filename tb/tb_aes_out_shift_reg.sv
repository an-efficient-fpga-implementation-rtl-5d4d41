// tb_aes_out_shift_reg: 16 shifted bytes must come out as one block with the
// first byte on top; clocks without shift must hold the value.
module tb_aes_out_shift_reg;
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
  logic reset = 1, shift = 0;
  logic [7:0] din = 0;
  logic [127:0] dout;
  aes_out_shift_reg dut (.*);
  initial begin
    logic [127:0] v;
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 10; t++) begin
      v = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) begin
        shift = 1; din = v[127-8*i -: 8]; @(negedge clk);
        shift = 0; din = 8'($urandom); if (i % 3 == 0) @(negedge clk);
      end
      check(dout === v, $sformatf("got %h exp %h", dout, v));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
