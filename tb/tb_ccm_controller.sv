// tb_ccm_controller: runs the toggle scheduler against a model AES core
// (busy for a random number of cycles per job) and a model block source
// (blocks arrive after random delays) and compares the sequence of jobs and
// register loads with the expected CCM schedule: CBC-MAC only for AUTH
// blocks, CTR then CBC-MAC for each MSG block, then A_0 and the final step.
module tb_ccm_controller;
  import aes_ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, has_mic, decrypt;
  logic cur_exists, cur_is_msg, blk_valid, blk_is_msg, blk_release;
  logic aes_busy, aes_start;
  pt_sel_e pt_sel;
  logic ctr_init, ctr_inc, ctr_zero;
  op_sel_e op_sel;
  logic keep_all, load_cipher, load_mac, ct_strobe, mac_strobe, check, busy, done;
  int checks = 0, failures = 0;

  ccm_controller dut (.*);

  always #5 clk = ~clk;

  // model AES core
  int aes_left;
  always @(posedge clk) begin
    if (aes_start && !aes_busy) aes_left <= $urandom_range(3, 12);
    else if (aes_left > 0) aes_left <= aes_left - 1;
  end
  assign aes_busy = (aes_left > 0);

  // model block source: blk_types[idx] = 1 for MSG
  bit blk_types [$];
  int idx, delay;
  always @(posedge clk) begin
    if (blk_release) begin
      idx   <= idx + 1;
      delay <= $urandom_range(0, 30);
    end else if (delay > 0) delay <= delay - 1;
  end
  always_comb begin
    cur_exists = idx < blk_types.size();
    cur_is_msg = cur_exists && blk_types[idx];
    blk_valid  = cur_exists && (delay == 0);
    blk_is_msg = cur_is_msg;
  end

  // event log
  string log [$];
  always @(posedge clk) if (rst_n) begin
    if (load_cipher) log.push_back(keep_all ? {"LC:", op_sel.name(), "*"} : {"LC:", op_sel.name()});
    if (load_mac)    log.push_back($sformatf("LM:%s", op_sel.name()));
    if (aes_start)   log.push_back($sformatf("S:%s", pt_sel.name()));
    if (ctr_zero)    log.push_back("Z");
    if (mac_strobe)  log.push_back(check ? "MAC+CHK" : "MAC");
  end

  task automatic expect_ok(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int na, input int nm, input bit mic, input bit dec);
    string exp [$];
    bit first;
    int n_ct, n_inc;
    blk_types = {};
    for (int i = 0; i < na; i++) blk_types.push_back(0);
    for (int i = 0; i < nm; i++) blk_types.push_back(1);
    first = 1;
    foreach (blk_types[i]) begin
      if (blk_types[i]) begin
        exp.push_back("S:PT_CTR");
        exp.push_back("LC:OP_DATA");
      end
      if (mic) begin
        exp.push_back(first ? "S:PT_IV" : "S:PT_MAC");
        exp.push_back((dec && blk_types[i]) ? "LM:OP_CIPH" : "LM:OP_DATA");
        first = 0;
      end
    end
    if (mic) begin
      exp.push_back("Z");
      exp.push_back("S:PT_CTR");
      exp.push_back("LC:OP_DATA*");
      exp.push_back(first ? "S:PT_IV" : "S:PT_MAC");
      exp.push_back("LM:OP_CIPH");
      exp.push_back(dec ? "MAC+CHK" : "MAC");
    end
    @(negedge clk);
    idx = 0; delay = $urandom_range(0, 30);
    has_mic = mic; decrypt = dec; log = {};
    n_ct = 0; n_inc = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin
      if (ct_strobe) n_ct++;
      if (ctr_inc) n_inc++;
      @(negedge clk);
    end
    @(negedge clk);
    expect_ok(!busy, "idle after done");
    expect_ok(log.size() == exp.size(), $sformatf("na=%0d nm=%0d mic=%0d dec=%0d: %0d events, expected %0d",
                                                  na, nm, mic, dec, log.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < log.size(); i++)
      expect_ok(log[i] == exp[i], $sformatf("event %0d: %s expected %s", i, log[i], exp[i]));
    expect_ok(n_ct == nm && n_inc == nm, "one ciphertext strobe and counter step per MSG block");
    expect_ok(idx == na + nm, "every block released");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; has_mic = 1; decrypt = 0; idx = 0; delay = 0; aes_left = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(2, 3, 1, 0);
    run(2, 3, 1, 1);
    run(0, 2, 0, 0);    // encryption only
    run(2, 2, 0, 1);    // encryption only, AUTH dropped
    run(3, 0, 1, 0);    // authentication only
    run(0, 0, 1, 0);    // empty packet
    for (int i = 0; i < 10; i++)
      run($urandom_range(0, 3), $urandom_range(0, 4), $urandom_range(0, 1), $urandom_range(0, 1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
