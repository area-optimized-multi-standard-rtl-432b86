// tb_aes_key_schedule: steps the on-the-fly key schedule through ten rounds,
// feeding SubWord bytes from the reference S-box, and compares every round
// key with the FIPS-197 appendix A.1 expansion (first and last given as
// published constants, all others from the reference expansion).
module tb_aes_key_schedule;
  import aes_ccm_pkg::*;
  import ccm_ref_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load, sub_we, advance;
  logic [1:0] sub_idx;
  logic [7:0] sub_byte, rot_byte;
  block_t key_in, next_key;
  int checks = 0, failures = 0;

  aes_key_schedule dut (.*);

  always #5 clk = ~clk;

  // reference expansion
  function automatic block_t ref_round_key(input block_t key, input int r);
    logic [31:0] w [44];
    logic [31:0] t;
    logic [7:0] rc;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    rc = 8'h01;
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = {r_sbox(t[23:16]), r_sbox(t[15:8]), r_sbox(t[7:0]), r_sbox(t[31:24])}
            ^ {rc, 24'h0};
        rc = r_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  task automatic expect_key(input block_t got, input block_t exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %032h expected %032h", what, got, exp);
    end
  endtask

  task automatic run(input block_t key);
    @(negedge clk);
    key_in = key; load = 1;
    @(negedge clk);
    load = 0;
    for (int r = 1; r <= 10; r++) begin
      for (int k = 0; k < 4; k++) begin
        sub_idx = 2'(k);
        #1;
        sub_byte = r_sbox(rot_byte);
        sub_we = 1;
        @(negedge clk);
        sub_we = 0;
      end
      expect_key(next_key, ref_round_key(key, r), $sformatf("round key %0d", r));
      if (key == 128'h2b7e151628aed2a6abf7158809cf4f3c) begin
        if (r == 1)  expect_key(next_key, 128'ha0fafe1788542cb123a339392a6c7605, "published K1");
        if (r == 10) expect_key(next_key, 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "published K10");
      end
      advance = 1;
      @(negedge clk);
      advance = 0;
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; sub_we = 0; advance = 0; sub_idx = 0; sub_byte = 0; key_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run(128'h2b7e151628aed2a6abf7158809cf4f3c);
    for (int i = 0; i < 5; i++) run({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
