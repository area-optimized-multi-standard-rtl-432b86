// tb_ccm_block_generator: feeds AUTH and MSG byte streams with random gaps,
// releases blocks after random delays and compares B0 and every formatted
// block (length prefix, data, zero padding, byte mask, AUTH/MSG tag) with a
// model built from the CCM formatting rules.
module tb_ccm_block_generator;
  import aes_ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start, auth_valid, auth_ready, msg_valid, msg_ready;
  logic [7:0] auth_data, msg_data;
  ccm_cfg_t cfg;
  block_t b_iv, b_data;
  logic blk_valid, blk_is_msg, blk_release, cur_exists, cur_is_msg;
  logic [15:0] blk_keep;
  int checks = 0, failures = 0;

  ccm_block_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  logic [7:0] abytes [$], mbytes [$];
  int ai, mi;

  // byte sources with random gaps
  always @(posedge clk) begin
    if (auth_valid && auth_ready) ai <= ai + 1;
    if (msg_valid && msg_ready) mi <= mi + 1;
  end
  always_comb begin
    auth_data = (ai < abytes.size()) ? abytes[ai] : 8'h00;
    msg_data  = (mi < mbytes.size()) ? mbytes[mi] : 8'h00;
  end

  task automatic run(input int alen, input int mlen, input int mic);
    block_t exp_blocks [$];
    logic [15:0] exp_keep [$];
    bit exp_msg [$];
    logic [7:0] stream [$];
    block_t b;
    logic [15:0] kp;
    int nblk;
    abytes = {}; mbytes = {};
    for (int i = 0; i < alen; i++) abytes.push_back(8'($urandom));
    for (int i = 0; i < mlen; i++) mbytes.push_back(8'($urandom));
    // expected blocks
    if (alen > 0) begin
      stream = {8'(alen >> 8), 8'(alen)};
      foreach (abytes[i]) stream.push_back(abytes[i]);
      for (int k = 0; k < stream.size(); k += 16) begin
        b = '0; kp = '0;
        for (int j = 0; j < 16 && k + j < stream.size(); j++) begin
          b[127 - 8*j -: 8] = stream[k + j]; kp[15 - j] = 1'b1;
        end
        exp_blocks.push_back(b); exp_keep.push_back(kp); exp_msg.push_back(0);
      end
    end
    for (int k = 0; k < mlen; k += 16) begin
      b = '0; kp = '0;
      for (int j = 0; j < 16 && k + j < mlen; j++) begin
        b[127 - 8*j -: 8] = mbytes[k + j]; kp[15 - j] = 1'b1;
      end
      exp_blocks.push_back(b); exp_keep.push_back(kp); exp_msg.push_back(1);
    end
    @(negedge clk);
    cfg.a_len = 16'(alen); cfg.m_len = 16'(mlen); cfg.mic_code = 3'(mic);
    cfg.decrypt = 0; cfg.nonce = {$urandom, $urandom, $urandom, 8'($urandom)};
    ai = 0; mi = 0;
    start = 1;
    @(negedge clk);
    start = 0;
    check(b_iv === {1'b0, alen != 0, 3'(mic), 3'd1, cfg.nonce, 16'(mlen)}, "B0 format");
    nblk = 0;
    while (cur_exists && nblk < 100) begin
      auth_valid = ($urandom_range(0, 3) != 0) && (ai < abytes.size());
      msg_valid  = ($urandom_range(0, 3) != 0) && (mi < mbytes.size());
      if (blk_valid && $urandom_range(0, 2) == 0) begin
        check(nblk < exp_blocks.size(), "no extra block");
        if (nblk < exp_blocks.size()) begin
          check(b_data === exp_blocks[nblk], $sformatf("block %0d data %032h expected %032h",
                                                       nblk, b_data, exp_blocks[nblk]));
          check(blk_keep === exp_keep[nblk], $sformatf("block %0d keep %04h", nblk, blk_keep));
          check(blk_is_msg === exp_msg[nblk], $sformatf("block %0d msg flag", nblk));
          check(cur_is_msg === exp_msg[nblk], $sformatf("block %0d cur_is_msg", nblk));
        end
        blk_release = 1;
        nblk++;
      end else begin
        if (!blk_valid) check(b_data === '0, "b_data zero when empty");
        blk_release = 0;
      end
      @(negedge clk);
      blk_release = 0;
    end
    auth_valid = 0; msg_valid = 0;
    check(nblk == exp_blocks.size(), $sformatf("block count %0d expected %0d", nblk, exp_blocks.size()));
    check(ai == alen && mi == mlen, "all bytes consumed");
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; auth_valid = 0; msg_valid = 0; blk_release = 0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(8, 23, 3);      // RFC 3610 packet 1 shape
    run(14, 16, 1);     // AUTH exactly one block with prefix, MSG one block
    run(0, 5, 7);       // no AUTH
    run(30, 0, 1);      // AUTH only
    run(0, 0, 1);       // nothing
    for (int i = 0; i < 10; i++) run($urandom_range(0, 60), $urandom_range(0, 60), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
