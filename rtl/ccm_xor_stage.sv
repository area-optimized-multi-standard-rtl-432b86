// ccm_xor_stage: the XOR after the AES core and the two result registers.
//
// The AES output D_EN is XORed with either B_DATA (a formatted data block) or
// B_CIPH (the Cipher Register's own content, fed back). The result is loaded
// into the Cipher Register (CTR results) or the MAC Register (CBC-MAC chain).
// The MAC Register's content is MAC_TEMP, the next CBC-MAC input of the AES
// core. Bytes cleared in `keep` are stored as zero in the Cipher Register, so
// a short last block leaves zeros behind its end; that zero padding is what
// the CBC-MAC needs when it reuses a decrypted block through B_CIPH.
//
// The mux, XOR and the two registers follow the engine's block structure; the
// byte mask is this design's addition.
//
// Interface: load_cipher / load_mac (one cycle) store d_en ^ operand.
module ccm_xor_stage
  import aes_ccm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      d_en,
  input  block_t      b_data,
  input  op_sel_e     op_sel,
  input  logic [15:0] keep,
  input  logic        load_cipher,
  input  logic        load_mac,
  output block_t      cipher_q,
  output block_t      mac_q
);

  block_t operand, result, keep_mask;

  always_comb begin
    for (int k = 0; k < 16; k++) keep_mask[127 - 8*k -: 8] = {8{keep[15 - k]}};
    operand = (op_sel == OP_CIPH) ? cipher_q : b_data;
    result  = d_en ^ operand;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cipher_q <= '0;
      mac_q    <= '0;
    end else begin
      if (load_cipher) cipher_q <= result & keep_mask;
      if (load_mac)    mac_q    <= result;
    end
  end

endmodule
