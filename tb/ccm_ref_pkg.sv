// ccm_ref_pkg: reference models for the testbenches.
//
// A plain byte-array AES-128 encryption (S-box from a^254 and the affine
// transform, full key expansion, textbook round order) and a CCM model
// (RFC 3610 / NIST SP 800-38C with L = 2, plus M = 0 for CCM* encryption
// only). They share no code with the RTL and serve only to compute expected
// values.
package ccm_ref_pkg;

  typedef logic [7:0] bytes_t [$];

  function automatic logic [7:0] r_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r, x;
    r = 0; x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) r ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1b) : (x << 1);
    end
    return r;
  endfunction

  function automatic logic [7:0] r_sbox(input logic [7:0] a);
    logic [7:0] inv, p, s;
    // a^254 = a^-1 (0 -> 0)
    inv = 8'h01; p = a;
    for (int e = 254, k = 0; k < 8; k++) begin
      if (e[k]) inv = r_mul(inv, p);
      p = r_mul(p, p);
    end
    s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]}
        ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    return s;
  endfunction

  function automatic logic [127:0] r_aes(input logic [127:0] key, input logic [127:0] pt);
    logic [7:0] w [176];
    logic [7:0] s [16];
    logic [7:0] t [16];
    logic [7:0] tmp [4];
    logic [7:0] rcon;
    logic [127:0] out;
    for (int i = 0; i < 16; i++) w[i] = key[127 - 8*i -: 8];
    rcon = 8'h01;
    for (int i = 4; i < 44; i++) begin
      for (int k = 0; k < 4; k++) tmp[k] = w[4*(i-1) + k];
      if (i % 4 == 0) begin
        logic [7:0] t0;
        t0 = tmp[0];
        tmp[0] = r_sbox(tmp[1]) ^ rcon;
        tmp[1] = r_sbox(tmp[2]);
        tmp[2] = r_sbox(tmp[3]);
        tmp[3] = r_sbox(t0);
        rcon = r_mul(rcon, 8'h02);
      end
      for (int k = 0; k < 4; k++) w[4*i + k] = w[4*(i-4) + k] ^ tmp[k];
    end
    for (int i = 0; i < 16; i++) s[i] = pt[127 - 8*i -: 8] ^ w[i];
    for (int r = 1; r <= 10; r++) begin
      for (int i = 0; i < 16; i++) s[i] = r_sbox(s[i]);
      // ShiftRows: byte (row, col) <- (row, col+row)
      for (int c = 0; c < 4; c++)
        for (int rr = 0; rr < 4; rr++) t[4*c + rr] = s[4*((c + rr) % 4) + rr];
      if (r != 10) begin
        for (int c = 0; c < 4; c++) begin
          s[4*c + 0] = r_mul(t[4*c], 2) ^ r_mul(t[4*c+1], 3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c + 1] = t[4*c] ^ r_mul(t[4*c+1], 2) ^ r_mul(t[4*c+2], 3) ^ t[4*c+3];
          s[4*c + 2] = t[4*c] ^ t[4*c+1] ^ r_mul(t[4*c+2], 2) ^ r_mul(t[4*c+3], 3);
          s[4*c + 3] = r_mul(t[4*c], 3) ^ t[4*c+1] ^ t[4*c+2] ^ r_mul(t[4*c+3], 2);
        end
      end else begin
        s = t;
      end
      for (int i = 0; i < 16; i++) s[i] ^= w[16*r + i];
    end
    for (int i = 0; i < 16; i++) out[127 - 8*i -: 8] = s[i];
    return out;
  endfunction

  // CCM with L = 2. m_out gets the ciphertext (encryption), u the encrypted
  // MAC (M bytes, rest zero, byte 0 in the top bits).
  function automatic void r_ccm(input logic [127:0] key, input logic [103:0] nonce,
                                input bytes_t a, input bytes_t m, input int mic,
                                output bytes_t c, output logic [127:0] u);
    logic [127:0] x, blk, s, b0, ai;
    bytes_t abuf;
    int mprime;
    mprime = (mic == 0) ? 0 : (mic - 2) / 2;
    b0 = {1'b0, (a.size() != 0), 3'(mprime), 3'd1, nonce, 16'(m.size())};
    x = r_aes(key, b0);
    if (a.size() != 0) begin
      abuf = {};
      abuf.push_back(8'(a.size() >> 8));
      abuf.push_back(8'(a.size()));
      foreach (a[i]) abuf.push_back(a[i]);
      for (int k = 0; k < abuf.size(); k += 16) begin
        blk = '0;
        for (int j = 0; j < 16 && k + j < abuf.size(); j++) blk[127 - 8*j -: 8] = abuf[k + j];
        x = r_aes(key, x ^ blk);
      end
    end
    c = {};
    for (int k = 0; k < m.size(); k += 16) begin
      blk = '0;
      for (int j = 0; j < 16 && k + j < m.size(); j++) blk[127 - 8*j -: 8] = m[k + j];
      x = r_aes(key, x ^ blk);
      ai = {8'h01, nonce, 16'(k / 16 + 1)};
      s = r_aes(key, ai);
      for (int j = 0; j < 16 && k + j < m.size(); j++)
        c.push_back(m[k + j] ^ s[127 - 8*j -: 8]);
    end
    s = r_aes(key, {8'h01, nonce, 16'd0});
    u = '0;
    for (int j = 0; j < mic; j++) u[127 - 8*j -: 8] = x[127 - 8*j -: 8] ^ s[127 - 8*j -: 8];
  endfunction

endpackage
