// ccm_harness: drives one aes_ccm_top instance of a given message shape.
//
// Loads each message byte-serially, starts the core, reads the ciphertext with
// get_c and compares it with the reference model in aes_ref_pkg. EXAMPLE
// selects an additional known-answer message from NIST SP 800-38C
// (1: Example 1, 3: Example 3, 0: none). Also checks the number of clocks
// from start_in to bit_req: 162 per AES loop plus 3. Raises `done` when
// finished and reports its check and failure counts.
module ccm_harness #(
  parameter int NLEN = 8,
  parameter int TLEN = 6,
  parameter int ALEN = 16,
  parameter int PLEN = 16,
  parameter int EXAMPLE = 0,
  parameter int MSGS = 2
) (
  output logic done,
  output int   checks,
  output int   failures
);
  import aes_ref_pkg::*;
  localparam int NA = (ALEN == 0) ? 0 : (ALEN + 2 + 15) / 16;
  localparam int NP = (PLEN + 15) / 16;
  localparam int LOOPS = 1 + NA + NP + 1 + NP;
  localparam int LD = (ALEN > PLEN) ? ((ALEN > 16) ? ALEN : 16) : ((PLEN > 16) ? PLEN : 16);

  logic clk = 0, reset = 1, load_in = 0, get_c = 0, start_in = 0;
  logic [7:0] key_in = 0, nonce = 0, payload = 0, associated_data = 0, cipher_text;
  logic bit_req;

  aes_ccm_top #(.NLEN(NLEN), .TLEN(TLEN), .ALEN(ALEN), .PLEN(PLEN)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (N%0d T%0d A%0d P%0d): %s", NLEN, TLEN, ALEN, PLEN, what); end
  endtask

  task automatic run(input logic [127:0] k, input logic [7:0] n [], input logic [7:0] a [],
                     input logic [7:0] p [], input logic [7:0] exp []);
    int cyc;
    @(negedge clk);
    load_in = 1;
    for (int i = 0; i < LD; i++) begin
      key_in = (i < 16) ? k[127-8*i -: 8] : 8'h00;
      nonce = (i < NLEN) ? n[i] : 8'h00;
      associated_data = (i < ALEN) ? a[i] : 8'h00;
      payload = (i < PLEN) ? p[i] : 8'h00;
      @(negedge clk);
    end
    load_in = 0;
    start_in = 1; @(negedge clk); start_in = 0;
    cyc = 1;
    while (!bit_req) begin @(negedge clk); cyc++; end
    check(cyc == LOOPS * 162 + 3, $sformatf("%0d clocks to bit_req, expected %0d", cyc, LOOPS * 162 + 3));
    for (int i = 0; i < PLEN + TLEN; i++) begin
      check(bit_req && cipher_text == exp[i], $sformatf("byte %0d got %h exp %h", i, cipher_text, exp[i]));
      get_c = 1; @(negedge clk);
    end
    get_c = 0;
    check(!bit_req, "bit_req after the last byte");
  endtask

  initial begin
    logic [127:0] k;
    logic [7:0] n [], a [], p [], exp [], known [];
    done = 0; checks = 0; failures = 0;
    n = new[NLEN]; a = new[ALEN]; p = new[PLEN];
    repeat (3) @(negedge clk); reset = 0;
    if (EXAMPLE != 0) begin
      k = 128'h404142434445464748494a4b4c4d4e4f;
      foreach (n[i]) n[i] = 8'h10 + 8'(i);
      foreach (a[i]) a[i] = 8'(i);
      foreach (p[i]) p[i] = 8'h20 + 8'(i);
      if (EXAMPLE == 1) known = '{8'h71, 8'h62, 8'h01, 8'h5b, 8'h4d, 8'hac, 8'h25, 8'h5d};
      else known = '{8'he3, 8'hb2, 8'h01, 8'ha9, 8'hf5, 8'hb7, 8'h1a, 8'h7a, 8'h9b, 8'h1c, 8'hea, 8'hec,
                     8'hcd, 8'h97, 8'he7, 8'h0b, 8'h61, 8'h76, 8'haa, 8'hd9, 8'ha4, 8'h42, 8'h8a, 8'ha5,
                     8'h48, 8'h43, 8'h92, 8'hfb, 8'hc1, 8'hb0, 8'h99, 8'h51};
      ref_ccm(k, n, a, p, TLEN, exp);
      check(exp == known, "reference model against the published example");
      run(k, n, a, p, known);
    end
    for (int t = 0; t < MSGS; t++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      foreach (n[i]) n[i] = 8'($urandom);
      foreach (a[i]) a[i] = 8'($urandom);
      foreach (p[i]) p[i] = 8'($urandom);
      ref_ccm(k, n, a, p, TLEN, exp);
      run(k, n, a, p, exp);
    end
    done = 1;
  end
endmodule
