// aes_ccm_pkg: types, constants and Galois-field helpers shared by the AES-CCM
// security engine.
//
// Byte order: a 128-bit block holds byte 0 in bits [127:120] and byte 15 in
// bits [7:0], the order in which CCM blocks and AES test vectors are written.
// As an AES state, byte k sits in row k%4 of column k/4.
//
// Composite field used by the S-box (this design's choice, see cfa_sbox):
//   GF(2^2)            : x^2 + x + 1
//   GF((2^2)^2)        : y^2 + y + PHI,    PHI    = {10}
//   GF(((2^2)^2)^2)    : z^2 + z + LAMBDA, LAMBDA = {1100}
// The isomorphic mapping DELTA and its inverse were found by locating a root
// of the AES polynomial x^8+x^4+x^3+x+1 in that tower field; column i of a
// matrix is the image of input bit i.
package aes_ccm_pkg;

  typedef logic [127:0] block_t;

  localparam int unsigned NR = 10;            // AES-128 rounds

  // Engine configuration, taken from the IV inputs at start.
  typedef struct packed {
    logic         decrypt;    // 1: inputs are ciphertext, check the tag
    logic [2:0]   mic_code;   // M' of the flags byte: 0 = no MIC, else M = 2*M'+2 bytes
    logic [15:0]  a_len;      // authentication-data length l(a) in bytes, below 16'hFF00
    logic [15:0]  m_len;      // message length l(m) in bytes
    logic [103:0] nonce;      // 13-byte nonce, byte 0 in the top bits
  } ccm_cfg_t;

  // AES input (PT) selection of the engine
  typedef enum logic [1:0] {PT_IV, PT_CTR, PT_MAC} pt_sel_e;
  // Second XOR operand after the AES core
  typedef enum logic {OP_DATA, OP_CIPH} op_sel_e;

  localparam logic [1:0] PHI    = 2'b10;
  localparam logic [3:0] LAMBDA = 4'b1100;

  localparam logic [7:0] DELTA_COLS [8] = '{8'h01, 8'h42, 8'h6a, 8'h60,
                                           8'h5f, 8'h91, 8'h51, 8'hc6};
  localparam logic [7:0] DELTA_INV_COLS [8] = '{8'h01, 8'hbc, 8'h5c, 8'hb0,
                                               8'hff, 8'hb6, 8'hbe, 8'hde};

  // ---- GF(2^2) ----
  function automatic logic [1:0] gf4_mul(input logic [1:0] a, input logic [1:0] b);
    logic hh;
    hh = a[1] & b[1];
    return {(a[1] & b[0]) ^ (a[0] & b[1]) ^ hh, (a[0] & b[0]) ^ hh};
  endfunction

  function automatic logic [1:0] gf4_sq(input logic [1:0] a);
    return {a[1], a[1] ^ a[0]};
  endfunction

  // multiply by PHI = {10}
  function automatic logic [1:0] gf4_mul_phi(input logic [1:0] a);
    return gf4_mul(a, PHI);
  endfunction

  // ---- GF((2^2)^2) ----
  function automatic logic [3:0] gf16_mul(input logic [3:0] a, input logic [3:0] b);
    logic [1:0] hh;
    hh = gf4_mul(a[3:2], b[3:2]);
    return {gf4_mul(a[3:2], b[1:0]) ^ gf4_mul(a[1:0], b[3:2]) ^ hh,
            gf4_mul(a[1:0], b[1:0]) ^ gf4_mul_phi(hh)};
  endfunction

  function automatic logic [3:0] gf16_sq(input logic [3:0] a);
    logic [1:0] h2;
    h2 = gf4_sq(a[3:2]);
    return {h2, gf4_mul_phi(h2) ^ gf4_sq(a[1:0])};
  endfunction

  function automatic logic [3:0] gf16_mul_lambda(input logic [3:0] a);
    return gf16_mul(a, LAMBDA);
  endfunction

  // Inversion in GF((2^2)^2), decomposed into GF(2^2) operations
  // (in GF(2^2) the inverse of a is a^2, and 0 maps to 0).
  function automatic logic [3:0] gf16_inv(input logic [3:0] a);
    logic [1:0] d;
    d = gf4_sq(gf4_mul_phi(gf4_sq(a[3:2])) ^ gf4_mul(a[1:0], a[3:2] ^ a[1:0]));
    return {gf4_mul(a[3:2], d), gf4_mul(a[3:2] ^ a[1:0], d)};
  endfunction

  // 8x8 GF(2) matrix given by its columns
  function automatic logic [7:0] gf2_mat8(input logic [7:0] cols [8], input logic [7:0] v);
    logic [7:0] r;
    r = '0;
    for (int i = 0; i < 8; i++)
      if (v[i]) r ^= cols[i];
    return r;
  endfunction

  // multiply by {02} in the AES field
  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] block_byte(input block_t b, input logic [3:0] k);
    return b[127 - 8*k -: 8];
  endfunction

  // MIC length in bytes from M'
  function automatic logic [4:0] mic_bytes(input logic [2:0] mic_code);
    return (mic_code == 3'd0) ? 5'd0 : {1'b0, mic_code, 1'b0} + 5'd2;
  endfunction

  // mask keeping the first n bytes of a block (n = 0..16)
  function automatic block_t keep_first_bytes(input logic [4:0] n);
    block_t m;
    for (int k = 0; k < 16; k++)
      m[127 - 8*k -: 8] = (k < n) ? 8'hff : 8'h00;
    return m;
  endfunction

endpackage
