// tb_ccm_cipher_mac_gen: ciphertext strobes and MAC truncation to
// M = 0, 4, 6, .. 16 bytes for every M'.
module tb_ccm_cipher_mac_gen;
  import aes_ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [2:0] mic_code;
  block_t cipher_q, mac_q, tag_in, ct_data, mac, d_mac, tag, m;
  logic ct_strobe, mac_strobe, ct_valid, mac_valid;
  logic [15:0] ct_keep_in, ct_keep;
  int checks = 0, failures = 0;

  ccm_cipher_mac_gen dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ct_strobe = 0; mac_strobe = 0; mic_code = 0; cipher_q = '0; mac_q = '0; tag_in = '0;
    ct_keep_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      int mb;
      mic_code = 3'(i % 8);
      mb = (mic_code == 0) ? 0 : 2 * mic_code + 2;
      m = '0;
      for (int k = 0; k < mb; k++) m[127 - 8*k -: 8] = 8'hff;
      cipher_q = {$urandom, $urandom, $urandom, $urandom};
      mac_q    = {$urandom, $urandom, $urandom, $urandom};
      tag_in   = {$urandom, $urandom, $urandom, $urandom};
      ct_keep_in = 16'($urandom);
      #1;
      check(d_mac === (mac_q & m), $sformatf("D_MAC M'=%0d", mic_code));
      check(tag === (tag_in & m), $sformatf("Tag M'=%0d", mic_code));
      begin
        block_t c_new;
        logic [15:0] k_exp;
        c_new = {$urandom, $urandom, $urandom, $urandom};
        k_exp = ct_keep_in;
        ct_strobe = 1; mac_strobe = 1;
        @(negedge clk);
        ct_strobe = 0; mac_strobe = 0;
        check(mac_valid && !ct_valid, "MAC strobe after one cycle");
        check(mac === (mac_q & m), $sformatf("MAC M'=%0d", mic_code));
        cipher_q = c_new;            // the Cipher Register loads at the strobe
        ct_keep_in = 16'($urandom);
        mac_q = '0;
        @(negedge clk);
        check(ct_valid && !mac_valid, "ciphertext strobe after two cycles");
        check(ct_data === c_new && ct_keep === k_exp, "ciphertext block");
        cipher_q = '0;
        @(negedge clk);
        check(!ct_valid && !mac_valid, "strobes are pulses");
      end
      check(mac === (d_mac | mac), "MAC held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
