// tb_aes_core_8bit: encrypts the FIPS-197 example blocks and random blocks
// and compares with the reference AES; checks that every block takes the
// 201 cycles of the folded schedule (start cycle plus 10 rounds of 20) and
// that busy stays high for the whole job.
module tb_aes_core_8bit;
  import aes_ccm_pkg::*;
  import ccm_ref_pkg::*;

  localparam int LATENCY = 201;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  block_t pt, key, ct;
  int checks = 0, failures = 0;

  aes_core_8bit dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt(input block_t k, input block_t p, input block_t exp);
    int cycles;
    @(negedge clk);
    key = k; pt = p; start = 1;
    @(negedge clk);
    start = 0;
    key = '0; pt = '0;           // inputs are only needed in the start cycle
    cycles = 1;
    while (!done) begin
      if (!busy) begin
        check(0, "busy dropped before done");
        break;
      end
      @(negedge clk);
      cycles++;
      if (cycles > 1000) break;
    end
    check(cycles == LATENCY, $sformatf("latency %0d expected %0d", cycles, LATENCY));
    check(ct === exp, $sformatf("ct %032h expected %032h", ct, exp));
    @(negedge clk);
    check(ct === exp, "ct held after done");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    block_t k, p;
    start = 0; pt = '0; key = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    encrypt(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
            128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    encrypt(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
            128'h3925841d02dc09fbdc118597196a0b32);
    for (int i = 0; i < 20; i++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      encrypt(k, p, r_aes(k, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
