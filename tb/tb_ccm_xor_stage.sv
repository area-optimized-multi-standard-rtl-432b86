// tb_ccm_xor_stage: random loads of the Cipher and MAC Registers with both
// operands (B_DATA, B_CIPH feedback) and byte masks, against a register model.
module tb_ccm_xor_stage;
  import aes_ccm_pkg::*;

  logic clk = 0, rst_n = 0;
  block_t d_en, b_data, cipher_q, mac_q, exp_c, exp_m, opnd, mask;
  op_sel_e op_sel;
  logic [15:0] keep;
  logic load_cipher, load_mac;
  int checks = 0, failures = 0;

  ccm_xor_stage dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_cipher = 0; load_mac = 0; op_sel = OP_DATA; keep = '1; d_en = '0; b_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    exp_c = '0; exp_m = '0;
    for (int i = 0; i < 400; i++) begin
      d_en   = {$urandom, $urandom, $urandom, $urandom};
      b_data = {$urandom, $urandom, $urandom, $urandom};
      op_sel = op_sel_e'($urandom_range(0, 1));
      keep   = ($urandom_range(0, 1)) ? 16'hffff : 16'($urandom);
      load_cipher = $urandom_range(0, 1);
      load_mac    = $urandom_range(0, 1);
      opnd = (op_sel == OP_CIPH) ? exp_c : b_data;
      for (int k = 0; k < 16; k++) mask[127 - 8*k -: 8] = keep[15 - k] ? 8'hff : 8'h00;
      @(negedge clk);
      if (load_cipher) exp_c = (d_en ^ opnd) & mask;
      if (load_mac)    exp_m = d_en ^ opnd;
      checks++;
      if (cipher_q !== exp_c || mac_q !== exp_m) begin
        failures++;
        $display("FAIL step %0d: cipher %032h/%032h mac %032h/%032h", i, cipher_q, exp_c, mac_q, exp_m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
