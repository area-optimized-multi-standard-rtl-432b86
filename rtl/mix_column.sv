// mix_column: one AES MixColumns unit for a single 32-bit column.
//
// Each output byte is {02}*a_i + {03}*a_(i+1) + a_(i+2) + a_(i+3) in the AES
// field, built from xtime (multiply by {02}) and XORs. The folded core holds
// only one of these and uses it once per column, four times per round.
//
// Interface: combinational; col_in[31:24] is row 0, col_in[7:0] row 3.
module mix_column
  import aes_ccm_pkg::*;
(
  input  logic [31:0] col_in,
  output logic [31:0] col_out
);

  logic [7:0] a [4];
  logic [7:0] r [4];

  always_comb begin
    for (int i = 0; i < 4; i++) a[i] = col_in[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++)
      r[i] = xtime(a[i]) ^ xtime(a[(i + 1) % 4]) ^ a[(i + 1) % 4]
           ^ a[(i + 2) % 4] ^ a[(i + 3) % 4];
    col_out = {r[0], r[1], r[2], r[3]};
  end

endmodule
