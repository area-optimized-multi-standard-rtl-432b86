// tb_mix_column: MixColumns of one column against published examples and a
// reference built from GF(2^8) multiplication.
module tb_mix_column;
  import ccm_ref_pkg::*;

  logic [31:0] col_in, col_out, exp;
  int checks = 0, failures = 0;

  mix_column dut (.col_in(col_in), .col_out(col_out));

  function automatic logic [31:0] ref_mix(input logic [31:0] c);
    logic [7:0] a [4];
    for (int i = 0; i < 4; i++) a[i] = c[31 - 8*i -: 8];
    return {r_mul(a[0], 2) ^ r_mul(a[1], 3) ^ a[2] ^ a[3],
            a[0] ^ r_mul(a[1], 2) ^ r_mul(a[2], 3) ^ a[3],
            a[0] ^ a[1] ^ r_mul(a[2], 2) ^ r_mul(a[3], 3),
            r_mul(a[0], 3) ^ a[1] ^ a[2] ^ r_mul(a[3], 2)};
  endfunction

  task automatic check(input logic [31:0] c, input logic [31:0] e);
    col_in = c;
    #1;
    checks++;
    if (col_out !== e) begin
      failures++;
      $display("FAIL mix(%08h) = %08h expected %08h", c, col_out, e);
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
    check(32'hdb135345, 32'h8e4da1bc);
    check(32'hf20a225c, 32'h9fdc589d);
    check(32'hd4bf5d30, 32'h046681e5);   // FIPS-197 appendix B, round 1
    for (int i = 0; i < 500; i++) begin
      exp = $urandom;
      check(exp, ref_mix(exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
