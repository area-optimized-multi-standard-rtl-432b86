// tb_ccm_count_generator: checks the counter block layout
// flags {01} | nonce | i for A_1.. after init, increments and A_0.
module tb_ccm_count_generator;
  import aes_ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [103:0] nonce;
  logic init, inc, zero;
  block_t b_ctr;
  int checks = 0, failures = 0;

  ccm_count_generator dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: b_ctr=%032h", what, b_ctr);
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
    init = 0; inc = 0; zero = 0;
    nonce = 104'h00000003020100a0a1a2a3a4a5;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 4; p++) begin
      int n;
      n = $urandom_range(1, 40);
      init = 1; @(negedge clk); init = 0;
      check(b_ctr === {8'h01, nonce, 16'd1}, "A_1 after init");
      for (int i = 1; i < n; i++) begin
        inc = 1; @(negedge clk); inc = 0;
        if ($urandom_range(0, 1)) @(negedge clk);
        check(b_ctr === {8'h01, nonce, 16'(i + 1)}, $sformatf("A_%0d", i + 1));
      end
      zero = 1; @(negedge clk); zero = 0;
      check(b_ctr === {8'h01, nonce, 16'd0}, "A_0");
      nonce = {$urandom, $urandom, $urandom, 8'($urandom)};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
