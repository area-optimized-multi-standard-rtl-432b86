// tb_wpan_workloads: the two target links, one largest frame each way.
//
// IEEE 802.15.4 at 6 MHz: a 127-byte PSDU (23-byte secured MAC header as
// AUTH, 94-byte payload, MIC-64, 2-byte FCS) must be secured within its air
// time at 250 kb/s: 127 * 8 / 250e3 s = 24384 cycles.
// IEEE 802.15.6 at 35 MHz: a 7-byte MAC header as AUTH, 251-byte payload and
// MIC-32 (255-byte frame body) plus 2-byte FCS, 264 bytes in all, within its
// air time at 10 Mb/s: 264 * 8 / 10e6 s = 7392 cycles.
// Frame sizes are the standards' maxima; header sizes are typical values.
// Each frame is encrypted, then decrypted and verified, with gap-free byte
// streams; results are compared with the reference CCM model and the cycle
// count from start to done with the air-time budget.
module tb_wpan_workloads;
  import aes_ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic start;
  ccm_cfg_t cfg;
  block_t key, tag_in, ct_data, mac;
  logic [7:0] auth_data, msg_data;
  logic auth_valid, auth_ready, msg_valid, msg_ready;
  logic ct_valid, mac_valid, valid, checked, busy, done;
  logic [15:0] ct_keep;
  int checks = 0, failures = 0;

  aes_ccm_engine dut (.*);

  always #5 clk = ~clk;

  bytes_t abytes, mbytes, got;
  int ai, mi;
  always @(posedge clk) begin
    if (auth_valid && auth_ready) ai <= ai + 1;
    if (msg_valid && msg_ready) mi <= mi + 1;
  end
  always_comb begin
    auth_valid = ai < abytes.size();
    msg_valid  = mi < mbytes.size();
    auth_data  = auth_valid ? abytes[ai] : 8'h00;
    msg_data   = msg_valid ? mbytes[mi] : 8'h00;
  end
  always @(posedge clk)
    if (ct_valid)
      for (int k = 0; k < 16; k++)
        if (ct_keep[15 - k]) got.push_back(ct_data[127 - 8*k -: 8]);

  task automatic expect_ok(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic op(input block_t k, input logic [103:0] nonce, input bytes_t a, input bytes_t m,
                    input int mic, input bit dec, input block_t tag, output int cycles);
    @(negedge clk);
    abytes = a; mbytes = m; ai = 0; mi = 0; got = {};
    cfg.decrypt = dec; cfg.mic_code = 3'((mic - 2) / 2);
    cfg.a_len = 16'(a.size()); cfg.m_len = 16'(m.size()); cfg.nonce = nonce;
    key = k; tag_in = tag;
    start = 1;
    @(negedge clk);
    start = 0;
    cycles = 1;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic frame(input string name, input int alen, input int mlen, input int mic,
                       input int budget);
    bytes_t a, m, c_ref;
    block_t u_ref, k;
    logic [103:0] n;
    int cy_enc, cy_dec;
    k = {$urandom, $urandom, $urandom, $urandom};
    n = {$urandom, $urandom, $urandom, 8'($urandom)};
    for (int i = 0; i < alen; i++) a.push_back(8'($urandom));
    for (int i = 0; i < mlen; i++) m.push_back(8'($urandom));
    r_ccm(k, n, a, m, mic, c_ref, u_ref);
    op(k, n, a, m, mic, 0, '0, cy_enc);
    expect_ok(got == c_ref, {name, ": ciphertext"});
    expect_ok(mac === u_ref, {name, ": MAC"});
    op(k, n, a, c_ref, mic, 1, u_ref, cy_dec);
    expect_ok(got == m, {name, ": plaintext"});
    expect_ok(valid && checked, {name, ": tag verified"});
    $display("%s: encrypt %0d cycles, decrypt %0d cycles, budget %0d", name, cy_enc, cy_dec, budget);
    expect_ok(cy_enc <= budget, $sformatf("%s: encryption %0d cycles over budget %0d", name, cy_enc, budget));
    expect_ok(cy_dec <= budget, $sformatf("%s: decryption %0d cycles over budget %0d", name, cy_dec, budget));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; cfg = '0; key = '0; tag_in = '0; ai = 0; mi = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame("IEEE 802.15.4, 6 MHz, 250 kb/s", 23, 94, 8, 24384);
    frame("IEEE 802.15.6, 35 MHz, 10 Mb/s", 7, 251, 4, 7392);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
