// cfa_sbox: forward AES S-box built from composite-field logic, with no table.
//
// The byte is moved into GF(((2^2)^2)^2) by the isomorphic mapping delta and
// split into s_h*z + s_l with s_h, s_l in GF(2^4). Its inverse is
//   (s_h*z + s_l)^-1 = (s_h*D)*z + (s_h + s_l)*D,
//   D = (s_h^2*lambda + s_l*(s_h + s_l))^-1,
// computed with one GF(2^4) squarer, one constant multiplier (x lambda), three
// GF(2^4) multipliers and one GF(2^4) inverter, which itself works in
// GF((2^2)^2). The result is mapped back by delta^-1 and passed through the
// AES affine transform S' = M*S^-1 + {63}. Input 0 gives 0 before the affine
// step, as AES requires.
//
// The structure (mapping, squarer, x lambda, three multipliers, inverter,
// inverse mapping, affine transform) is the one the engine is specified with.
// The field polynomials, lambda = {1100} and the mapping matrices are this
// design's own choice: they are the usual tower-field constants, and the
// matrices were derived for them (see aes_ccm_pkg).
//
// Interface: purely combinational, in_byte -> out_byte.
module cfa_sbox
  import aes_ccm_pkg::*;
(
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);

  logic [7:0] mapped;       // after delta
  logic [3:0] s_h, s_l;
  logic [3:0] s_sum;        // s_h + s_l
  logic [3:0] d_in;         // s_h^2*lambda + s_l*(s_h+s_l)
  logic [3:0] delta_inv;    // D
  logic [7:0] inv_comp;     // inverse in the composite field
  logic [7:0] inv_aes;      // inverse back in the AES field

  always_comb begin
    mapped    = gf2_mat8(DELTA_COLS, in_byte);
    s_h       = mapped[7:4];
    s_l       = mapped[3:0];
    s_sum     = s_h ^ s_l;
    d_in      = gf16_mul_lambda(gf16_sq(s_h)) ^ gf16_mul(s_sum, s_l);
    delta_inv = gf16_inv(d_in);
    inv_comp  = {gf16_mul(s_h, delta_inv), gf16_mul(s_sum, delta_inv)};
    inv_aes   = gf2_mat8(DELTA_INV_COLS, inv_comp);
    for (int i = 0; i < 8; i++)
      out_byte[i] = inv_aes[i] ^ inv_aes[(i + 4) % 8] ^ inv_aes[(i + 5) % 8]
                  ^ inv_aes[(i + 6) % 8] ^ inv_aes[(i + 7) % 8];
    out_byte ^= 8'h63;
  end

endmodule
