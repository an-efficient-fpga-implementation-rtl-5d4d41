// tb_ccm_fsm: runs the controller with a loop counter and a stand-in for the
// AES core (done_aes a fixed number of clocks after we) for the default
// message shape (4 CBC blocks, 1 payload block) and checks the sequence of
// loops: each we with its sel1/sel2/sel3 and block index, each store with its
// sel4 code, then MAC write and out_en, and that start_in is ignored while busy.
module tb_ccm_fsm;
  logic clk = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  localparam int NCBC = 4, NP = 1;
  logic reset = 1, start_in = 0, done_aes = 0;
  logic [7:0] cnt, idx;
  logic sel1, sel2, sel3, we, reset_cnt, ctr_init, ctr_inc, store, mac_wr, out_en, busy;
  logic [1:0] sel4;
  string log_we [$], log_st [$];
  int delay = 0;
  ccm_fsm #(.NCBC(NCBC), .NP(NP)) dut (.*);
  loop_counter u_cnt (.clk, .reset, .reset_cnt, .done_aes, .cnt);
  // AES stand-in: done 7 clocks after we
  always @(posedge clk) begin
    done_aes <= 1'b0;
    if (we) delay <= 7;
    else if (delay > 0) begin delay <= delay - 1; if (delay == 1) done_aes <= 1'b1; end
    if (we)     log_we.push_back($sformatf("%0d%0d%0d:%0d", sel1, sel2, sel3, idx));
    if (store)  log_st.push_back($sformatf("%0d:%0d", sel4, idx));
    if (mac_wr) log_st.push_back("mac");
    if (ctr_init) log_st.push_back("init");
    if (ctr_inc) log_st.push_back("inc");
    if (out_en) log_st.push_back("out");
  end
  initial begin
    string exp_we [$], exp_st [$];
    repeat (2) @(negedge clk); reset = 0;
    for (int t = 0; t < 2; t++) begin
      log_we.delete(); log_st.delete();
      start_in = 1; @(negedge clk); start_in = 0;
      check(busy === 1'b1, "busy after start");
      repeat (3) @(negedge clk);
      start_in = 1; @(negedge clk); start_in = 0;   // must be ignored
      while (busy) @(negedge clk);
      @(negedge clk);
      exp_we = '{"000:0", "011:1", "011:2", "011:3", "100:0", "100:1"};
      exp_st = '{"init", "0:3", "1:0", "inc", "2:1", "inc", "mac", "out"};
      check(log_we.size() == exp_we.size(), $sformatf("%0d AES loops, expected %0d", log_we.size(), exp_we.size()));
      foreach (exp_we[i]) check(i < log_we.size() && log_we[i] == exp_we[i], $sformatf("loop %0d: %s", i, (i < log_we.size()) ? log_we[i] : "none"));
      check(log_st.size() == exp_st.size(), "number of stores");
      foreach (exp_st[i]) check(i < log_st.size() && log_st[i] == exp_st[i], $sformatf("store %0d: %s", i, (i < log_st.size()) ? log_st[i] : "none"));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
