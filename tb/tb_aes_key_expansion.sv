// tb_aes_key_expansion: steps the byte-serial key schedule through ten rounds
// of 16 clocks and compares every produced byte with the reference round keys,
// for the FIPS-197 key (round key 10 = d014f9a8c9ee2589e13f0cc8b6630ca6) and
// random keys. rk must hold round key r-1 during all of round r.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  logic reset = 1, load = 0, step = 0;
  logic [127:0] key = 0, rk;
  logic [3:0] pos = 0, rnd = 1;
  logic [7:0] nk_byte;
  aes_key_expansion dut (.*);
  task automatic run(input logic [127:0] k);
    logic [127:0] rks [11];
    for (int r = 0; r <= 10; r++) rks[r] = ref_round_key(k, r);
    key = k; load = 1; @(negedge clk); load = 0;
    step = 1;
    for (int r = 1; r <= 10; r++)
      for (int p = 0; p < 16; p++) begin
        rnd = 4'(r); pos = 4'(p); #1;
        check(rk === rks[r-1], $sformatf("rk in round %0d", r));
        check(nk_byte === bget(rks[r], p), $sformatf("round %0d byte %0d got %h exp %h", r, p, nk_byte, bget(rks[r], p)));
        @(negedge clk);
      end
    step = 0;
    check(rk === rks[10], "final round key");
  endtask
  initial begin
    repeat (2) @(negedge clk); reset = 0;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    check(rk === 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 round key 10");
    for (int t = 0; t < 5; t++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
