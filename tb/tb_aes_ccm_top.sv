// tb_aes_ccm_top: end-to-end test of the AES-CCM core at its default sizes
// (8-byte nonce, 16 bytes associated data, 16 bytes payload, 6-byte MAC).
//
// Message 1 is the published example (NIST SP 800-38C Example 2), checked byte
// by byte against its known 22-byte ciphertext. Further messages with random
// key, nonce, associated data and payload are checked against the reference
// model in aes_ref_pkg. The test also checks the number of clocks from
// start_in to bit_req (six AES loops of 162 clocks plus 3), that bit_req drops
// after the last byte, that load_in and start_in are ignored while a message is
// in progress, and counts every mechanism of the core (chained CBC loops,
// direct loops, Tag/S0/ciphertext stores, MAC write, read-out) so that one that
// never happens is reported as a failure.
module tb_aes_ccm_top;
  import aes_ref_pkg::*;
  localparam int NLEN = 8, ALEN = 16, PLEN = 16, TLEN = 6;
  localparam int LOOPS = 6;
  // ciphertext of the published example: 16 payload bytes, then the 6-byte MAC
  localparam logic [7:0] EX2 [22] = '{8'hd2, 8'ha1, 8'hf0, 8'he0, 8'h51, 8'hea, 8'h5f, 8'h62, 8'h08, 8'h1a, 8'h77,
                                      8'h92, 8'h07, 8'h3d, 8'h59, 8'h3d, 8'h1f, 8'hc6, 8'h4f, 8'hbf, 8'hac, 8'hcd};

  logic clk = 0, reset = 1, load_in = 0, get_c = 0, start_in = 0;
  logic [7:0] key_in = 0, nonce = 0, payload = 0, associated_data = 0;
  logic [7:0] cipher_text;
  logic bit_req;
  int checks = 0, failures = 0;
  int n_chain = 0, n_direct = 0, n_tag = 0, n_s0 = 0, n_ct = 0, n_mac = 0, n_read = 0, n_ignored = 0;

  aes_ccm_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters, observed inside the core
  always @(posedge clk) if (!reset) begin
    if (dut.we && dut.sel3)  n_chain++;
    if (dut.we && !dut.sel3) n_direct++;
    if (dut.store && dut.sel4 == 2'd0) n_tag++;
    if (dut.store && dut.sel4 == 2'd1) n_s0++;
    if (dut.store && dut.sel4 == 2'd2) n_ct++;
    if (dut.mac_wr) n_mac++;
    if (bit_req && get_c) n_read++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic load(input logic [127:0] k, input logic [7:0] n [], input logic [7:0] a [], input logic [7:0] p []);
    @(negedge clk);
    load_in = 1;
    for (int i = 0; i < 16; i++) begin
      key_in = k[127-8*i -: 8];
      nonce = (i < NLEN) ? n[i] : 8'h00;
      associated_data = (i < ALEN) ? a[i] : 8'h00;
      payload = (i < PLEN) ? p[i] : 8'h00;
      @(negedge clk);
    end
    load_in = 0; key_in = 0; nonce = 0; associated_data = 0; payload = 0;
  endtask

  task automatic run_and_check(input logic [7:0] exp [], input string name);
    int cyc;
    @(negedge clk); start_in = 1;
    @(negedge clk); start_in = 0;
    cyc = 1;
    // disturb the inputs while busy: a second start and a load burst must be ignored
    repeat (5) @(negedge clk);
    cyc += 5;
    start_in = 1; load_in = 1; key_in = 8'hff; payload = 8'hff; nonce = 8'hff; associated_data = 8'hff;
    @(negedge clk); cyc++;
    start_in = 0; load_in = 0; key_in = 0; payload = 0; nonce = 0; associated_data = 0;
    n_ignored++;
    while (!bit_req) begin @(negedge clk); cyc++; end
    check(cyc == LOOPS * 162 + 3, $sformatf("%s: %0d clocks from start_in to bit_req, expected %0d", name, cyc, LOOPS*162+3));
    for (int i = 0; i < PLEN + TLEN; i++) begin
      check(bit_req == 1'b1, $sformatf("%s: bit_req low at byte %0d", name, i));
      check(cipher_text == exp[i], $sformatf("%s: byte %0d got %h exp %h", name, i, cipher_text, exp[i]));
      get_c = 1;
      @(negedge clk);
      // hold get_c low every few bytes to check that the output waits
      if (i % 5 == 4) begin get_c = 0; @(negedge clk); end
    end
    get_c = 0;
    check(bit_req == 1'b0, $sformatf("%s: bit_req still high after last byte", name));
  endtask

  initial begin
    logic [127:0] k;
    logic [7:0] n [], a [], p [], exp [];
    repeat (3) @(negedge clk); reset = 0;

    // published example
    k = 128'h404142434445464748494a4b4c4d4e4f;
    n = new[NLEN]; a = new[ALEN]; p = new[PLEN];
    foreach (n[i]) n[i] = 8'h10 + 8'(i);
    foreach (a[i]) a[i] = 8'(i);
    foreach (p[i]) p[i] = 8'h20 + 8'(i);
    exp = new[22];
    foreach (exp[i]) exp[i] = EX2[i];
    load(k, n, a, p);
    run_and_check(exp, "example 2");

    // random messages against the reference model
    for (int t = 0; t < 3; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      foreach (n[i]) n[i] = 8'($urandom);
      foreach (a[i]) a[i] = 8'($urandom);
      foreach (p[i]) p[i] = 8'($urandom);
      ref_ccm(k, n, a, p, TLEN, exp);
      load(k, n, a, p);
      run_and_check(exp, $sformatf("random %0d", t));
    end

    check(n_chain  > 0, "no chained CBC loop");
    check(n_direct > 0, "no direct (B0 / CTR) loop");
    check(n_tag    > 0, "Tag never stored");
    check(n_s0     > 0, "S0 never stored");
    check(n_ct     > 0, "no ciphertext block stored");
    check(n_mac    > 0, "MAC never written");
    check(n_read   > 0, "no byte read out");
    check(n_ignored > 0, "busy-time start/load never exercised");
    $display("mechanisms: chained=%0d direct=%0d tag=%0d s0=%0d ct=%0d mac=%0d read=%0d ignored=%0d",
             n_chain, n_direct, n_tag, n_s0, n_ct, n_mac, n_read, n_ignored);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
