// tb_cipher_text_buffer: two ciphertext blocks (PLEN = 20, the second one cut
// to 4 bytes) and a 6-byte MAC are written, then read out with get_c held in
// an irregular pattern. Checks order, bit_req timing and that bytes beyond
// PLEN of a block are dropped.
module tb_cipher_text_buffer;
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
  localparam int PLEN = 20, TLEN = 6;
  logic reset = 1, wr_blk = 0, mac_wr = 0, out_en = 0, get_c = 0;
  logic [7:0] blk_idx = 0, cipher_text;
  logic [127:0] blk = 0, mac = 0;
  logic bit_req;
  cipher_text_buffer #(.PLEN(PLEN), .TLEN(TLEN)) dut (.*);
  initial begin
    logic [7:0] exp [PLEN+TLEN];
    logic [127:0] b0, b1, m;
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 4; t++) begin
      b0 = {$urandom, $urandom, $urandom, $urandom};
      b1 = {$urandom, $urandom, $urandom, $urandom};
      m  = {$urandom, $urandom, $urandom, $urandom};
      for (int i = 0; i < 16; i++) exp[i] = b0[127-8*i -: 8];
      for (int i = 0; i < 4; i++) exp[16+i] = b1[127-8*i -: 8];
      for (int i = 0; i < TLEN; i++) exp[PLEN+i] = m[127-8*i -: 8];
      // write the second block first, then the first one: order of writes must not matter
      wr_blk = 1; blk_idx = 1; blk = b1; @(negedge clk);
      blk_idx = 0; blk = b0; @(negedge clk);
      wr_blk = 0; mac_wr = 1; mac = m; @(negedge clk);
      mac_wr = 0;
      check(bit_req === 1'b0, "bit_req before out_en");
      out_en = 1; @(negedge clk); out_en = 0;
      for (int i = 0; i < PLEN + TLEN; i++) begin
        while ($urandom_range(0, 2) == 0) begin
          get_c = 0; @(negedge clk);
          check(bit_req && cipher_text === exp[i], "byte held while get_c is low");
        end
        check(bit_req === 1'b1, $sformatf("bit_req at byte %0d", i));
        check(cipher_text === exp[i], $sformatf("byte %0d got %h exp %h", i, cipher_text, exp[i]));
        get_c = 1; @(negedge clk);
      end
      get_c = 0;
      check(bit_req === 1'b0, "bit_req after the last byte");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
