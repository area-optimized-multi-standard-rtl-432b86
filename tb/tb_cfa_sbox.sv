// tb_cfa_sbox: exhaustive check of the composite-field S-box against a
// reference S-box computed as a^254 followed by the affine transform, plus
// two published S-box entries.
module tb_cfa_sbox;
  import ccm_ref_pkg::*;

  logic [7:0] in_byte, out_byte;
  int checks = 0, failures = 0;

  cfa_sbox dut (.in_byte(in_byte), .out_byte(out_byte));

  task automatic expect_eq(input logic [7:0] got, input logic [7:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      in_byte = 8'(i);
      #1;
      expect_eq(out_byte, r_sbox(8'(i)), $sformatf("S(%02h)", i));
    end
    in_byte = 8'h00; #1; expect_eq(out_byte, 8'h63, "S(00) published");
    in_byte = 8'h53; #1; expect_eq(out_byte, 8'hed, "S(53) published");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
