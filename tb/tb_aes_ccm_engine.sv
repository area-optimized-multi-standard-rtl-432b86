// tb_aes_ccm_engine: end-to-end test of the AES-CCM security engine.
//
// Packets are encrypted and then decrypted, and outputs are compared with the
// reference CCM model: RFC 3610 packet vector 1 (as published), IEEE 802.15.6
// style MIC-32 packets, IEEE 802.15.4 CCM* MIC-32/64/128, encryption only
// (M' = 0) and authentication only (no MSG). Decryption is run once with the
// correct tag (Valid must rise) and once with a corrupted one (it must not).
// The input streams get random gaps, so the engine also has to wait for data.
// A gap-free 8-block packet checks the message throughput: at most 448 cycles
// per 16-byte block, which is 10 Mb/s at 35 MHz; 250 kb/s at 6 MHz would allow
// 3072.
//
// Mechanisms counted (each must occur): AUTH-phase CBC-MAC jobs, CTR/CBC-MAC
// toggling in the MSG phase, B_CIPH feedback (decryption and the final MAC
// step), stalls waiting for a data block, a zero-padded short block,
// encryption only, authentication only, tag accepted, tag rejected.
module tb_aes_ccm_engine;
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

  // ---------------- stimulus streams ----------------
  bytes_t abytes, mbytes, got;
  int ai, mi;
  int gaps;        // 0: none, 1: one cycle in eight idle, 2: one byte in 24 cycles
  always @(posedge clk) begin
    if (auth_valid && auth_ready) ai <= ai + 1;
    if (msg_valid && msg_ready) mi <= mi + 1;
  end
  function automatic bit gap_ok();
    case (gaps)
      0: return 1;
      1: return $urandom_range(0, 7) != 0;
      default: return $urandom_range(0, 23) == 0;
    endcase
  endfunction
  always @(negedge clk) begin
    auth_valid <= (ai < abytes.size()) && gap_ok();
    msg_valid  <= (mi < mbytes.size()) && gap_ok();
  end
  always_comb begin
    auth_data = (ai < abytes.size()) ? abytes[ai] : 8'h00;
    msg_data  = (mi < mbytes.size()) ? mbytes[mi] : 8'h00;
  end

  // ---------------- output capture ----------------
  longint cyc, last_ct_cyc, max_ct_gap;
  int n_ct;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (ct_valid) begin
      for (int k = 0; k < 16; k++)
        if (ct_keep[15 - k]) got.push_back(ct_data[127 - 8*k -: 8]);
      if (n_ct > 0 && cyc - last_ct_cyc > max_ct_gap) max_ct_gap <= cyc - last_ct_cyc;
      last_ct_cyc <= cyc;
      n_ct <= n_ct + 1;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_auth_cbc, n_toggle, n_ciph, n_stall, n_pad, n_enc_only, n_auth_only, n_pass, n_reject;
  logic last_was_ctr;
  always @(posedge clk) if (rst_n) begin
    if (dut.aes_start) begin
      if (dut.pt_sel != PT_CTR && !dut.cur_is_msg && dut.cur_exists) n_auth_cbc++;
      if (dut.pt_sel != PT_CTR && last_was_ctr && dut.cur_is_msg) n_toggle++;
      last_was_ctr <= (dut.pt_sel == PT_CTR);
    end
    if ((dut.load_mac || dut.load_cipher) && dut.op_sel == OP_CIPH) n_ciph++;
    if ((dut.u_ctrl.state_q == dut.u_ctrl.S_CTR || dut.u_ctrl.state_q == dut.u_ctrl.S_CBC)
        && !dut.aes_busy && !dut.blk_valid) n_stall++;
    if (ct_valid && ct_keep != 16'hffff) n_pad++;
  end

  task automatic expect_ok(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // run one operation; returns the MAC output and the stream output
  task automatic op(input block_t k, input logic [103:0] nonce, input bytes_t a,
                    input bytes_t m, input int mic, input bit dec, input block_t tag,
                    output bytes_t out, output block_t mac_out, output bit ok_tag,
                    output longint cycles);
    longint t0;
    @(negedge clk);
    abytes = a; mbytes = m; ai = 0; mi = 0; got = {};
    cfg.decrypt = dec; cfg.mic_code = 3'((mic == 0) ? 0 : (mic - 2) / 2);
    cfg.a_len = 16'(a.size()); cfg.m_len = 16'(m.size()); cfg.nonce = nonce;
    key = k; tag_in = tag;
    n_ct = 0; max_ct_gap = 0;
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    cfg = '0; key = '0;           // latched at start
    while (!done) @(negedge clk);
    cycles = cyc - t0;
    out = got; mac_out = mac; ok_tag = valid;
    expect_ok(checked == (dec && mic != 0), "checked flag");
    expect_ok(ai == a.size() && mi == m.size(), "all input bytes consumed");
  endtask

  task automatic packet(input block_t k, input logic [103:0] nonce, input int alen,
                        input int mlen, input int mic);
    bytes_t a, m, c_ref, c_got, p_got;
    block_t u_ref, mac_got, bad;
    bit ok;
    longint cy;
    for (int i = 0; i < alen; i++) a.push_back(8'($urandom));
    for (int i = 0; i < mlen; i++) m.push_back(8'($urandom));
    r_ccm(k, nonce, a, m, mic, c_ref, u_ref);
    // encrypt
    op(k, nonce, a, m, mic, 0, '0, c_got, mac_got, ok, cy);
    expect_ok(c_got == c_ref, $sformatf("ciphertext a=%0d m=%0d M=%0d", alen, mlen, mic));
    if (mic != 0) expect_ok(mac_got === u_ref, $sformatf("MAC a=%0d m=%0d M=%0d: %032h expected %032h",
                                           alen, mlen, mic, mac_got, u_ref));
    // decrypt with the right tag
    op(k, nonce, a, c_ref, mic, 1, u_ref, p_got, mac_got, ok, cy);
    expect_ok(p_got == m, $sformatf("plaintext a=%0d m=%0d M=%0d", alen, mlen, mic));
    if (mic != 0) begin
      expect_ok(ok, $sformatf("tag accepted a=%0d m=%0d M=%0d", alen, mlen, mic));
      if (ok) n_pass++;
      // decrypt with a corrupted tag (one bit inside the first M bytes)
      bad = u_ref;
      bad[127 - $urandom_range(0, 8*mic - 1)] ^= 1'b1;
      op(k, nonce, a, c_ref, mic, 1, bad, p_got, mac_got, ok, cy);
      expect_ok(!ok, $sformatf("corrupted tag rejected a=%0d m=%0d M=%0d", alen, mlen, mic));
      if (!ok) n_reject++;
    end else begin
      n_enc_only++;
    end
    if (mlen == 0 && alen > 0 && mic != 0) n_auth_only++;
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t a, m, c, exp_c;
    block_t mac_got, k;
    logic [103:0] n;
    bit ok;
    longint cy;
    start = 0; cfg = '0; key = '0; tag_in = '0; gaps = 1;
    ai = 0; mi = 0; cyc = 0; n_ct = 0; last_ct_cyc = 0; max_ct_gap = 0; last_was_ctr = 0;
    {n_auth_cbc, n_toggle, n_ciph, n_stall, n_pad, n_enc_only, n_auth_only, n_pass, n_reject} = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // RFC 3610 packet vector 1: M = 8, 8 AUTH bytes, 23 MSG bytes
    for (int i = 0; i < 8; i++) a.push_back(8'(i));
    for (int i = 8; i < 31; i++) m.push_back(8'(i));
    exp_c = {8'h58, 8'h8c, 8'h97, 8'h9a, 8'h61, 8'hc6, 8'h63, 8'hd2, 8'hf0, 8'h66, 8'hd0, 8'hc2,
             8'hc0, 8'hf9, 8'h89, 8'h80, 8'h6d, 8'h5f, 8'h6b, 8'h61, 8'hda, 8'hc3, 8'h84};
    op(128'hc0c1c2c3c4c5c6c7c8c9cacbcccdcecf, 104'h00000003020100a0a1a2a3a4a5, a, m, 8, 0, '0,
       c, mac_got, ok, cy);
    expect_ok(c == exp_c, "RFC 3610 vector 1 ciphertext");
    expect_ok(mac_got === {64'h17e8d12cfdf926e0, 64'h0}, $sformatf("RFC 3610 vector 1 MAC %032h", mac_got));

    k = {$urandom, $urandom, $urandom, $urandom};
    n = {$urandom, $urandom, $urandom, 8'($urandom)};
    // IEEE 802.15.6 style: MIC-32
    packet(k, n, 7, 40, 4);
    packet(k, n, 0, 16, 4);
    // IEEE 802.15.4 CCM*: MIC-32/64/128, encryption only, authentication only
    packet(k, n, 21, 35, 8);
    packet(k, n, 13, 50, 16);
    packet(k, n, 9, 20, 0);
    packet(k, n, 30, 0, 8);
    packet(k, n, 0, 0, 4);
    for (int i = 0; i < 4; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      n = {$urandom, $urandom, $urandom, 8'($urandom)};
      packet(k, n, $urandom_range(0, 40), $urandom_range(1, 70), 2 * $urandom_range(1, 7) + 2);
    end

    // slow byte source: the core has to wait for data blocks
    gaps = 2;
    packet(k, n, 20, 40, 8);

    // throughput: gap-free 8-block message
    gaps = 0;
    a = {};
    m = {};
    for (int i = 0; i < 128; i++) m.push_back(8'($urandom));
    op(k, n, a, m, 8, 0, '0, c, mac_got, ok, cy);
    $display("8-block packet: %0d cycles, at most %0d cycles between ciphertext blocks", cy, max_ct_gap);
    expect_ok(max_ct_gap <= 448, $sformatf("block interval %0d above 448 cycles (10 Mb/s at 35 MHz)", max_ct_gap));
    expect_ok(max_ct_gap >= 400, $sformatf("block interval %0d below two AES jobs", max_ct_gap));

    $display("mechanisms: auth-cbc=%0d toggle=%0d b_ciph=%0d stall=%0d pad=%0d enc-only=%0d auth-only=%0d pass=%0d reject=%0d",
             n_auth_cbc, n_toggle, n_ciph, n_stall, n_pad, n_enc_only, n_auth_only, n_pass, n_reject);
    expect_ok(n_auth_cbc > 0, "AUTH-phase CBC-MAC occurred");
    expect_ok(n_toggle > 0, "CTR/CBC-MAC toggling occurred");
    expect_ok(n_ciph > 0, "B_CIPH operand used");
    expect_ok(n_stall > 0, "stall waiting for data occurred");
    expect_ok(n_pad > 0, "short block occurred");
    expect_ok(n_enc_only > 0, "encryption-only mode occurred");
    expect_ok(n_auth_only > 0, "authentication-only mode occurred");
    expect_ok(n_pass > 0, "tag accepted");
    expect_ok(n_reject > 0, "tag rejected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
