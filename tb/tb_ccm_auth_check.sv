// tb_ccm_auth_check: Valid after matching and mismatching tags (one bit
// flipped), held until clear.
module tb_ccm_auth_check;
  import aes_ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  logic clear, check, valid, checked;
  block_t d_mac, tag;
  int checks = 0, failures = 0;

  ccm_auth_check dut (.*);

  always #5 clk = ~clk;

  task automatic expect_ok(input bit ok, input string what);
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
    clear = 0; check = 0; d_mac = '0; tag = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 200; i++) begin
      bit same;
      same = $urandom_range(0, 1);
      clear = 1; @(negedge clk); clear = 0;
      expect_ok(!valid && !checked, "cleared");
      d_mac = {$urandom, $urandom, $urandom, $urandom};
      tag = d_mac;
      if (!same) tag[$urandom_range(0, 127)] ^= 1'b1;
      check = 1; @(negedge clk); check = 0;
      expect_ok(checked && valid == same, $sformatf("valid=%0d expected %0d", valid, same));
      d_mac = ~d_mac;
      @(negedge clk);
      expect_ok(checked && valid == same, "result held");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
