// ccm_cipher_mac_gen: forms the engine's Ciphertext and MAC outputs.
//
// ct_strobe comes in the cycle in which the Cipher Register is loaded, so one
// cycle later it copies the Cipher Register to the ciphertext output with the
// mask of its valid bytes (taken at the strobe) and pulses ct_valid; in
// decryption the same path carries the recovered plaintext. On mac_strobe it copies the MAC Register,
// cut to the MIC length M = 2*M'+2 bytes (bytes beyond M are zero), to the MAC
// output and pulses mac_valid. For the Authentication Check it supplies D_MAC
// (the MAC Register cut to M bytes) and Tag (the received tag input cut to M
// bytes), both combinational.
//
// The block is named in the engine's structure without detail; the output
// registers, byte masks and strobes are this design's choices.
module ccm_cipher_mac_gen
  import aes_ccm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic [2:0]  mic_code,
  input  block_t      cipher_q,
  input  block_t      mac_q,
  input  logic        ct_strobe,
  input  logic [15:0] ct_keep_in,
  input  logic        mac_strobe,
  input  block_t      tag_in,
  output logic        ct_valid,
  output block_t      ct_data,
  output logic [15:0] ct_keep,
  output logic        mac_valid,
  output block_t      mac,
  output block_t      d_mac,
  output block_t      tag
);

  block_t      mic_mask;
  logic        ct_pend_q;
  logic [15:0] keep_pend_q;

  always_comb begin
    mic_mask = keep_first_bytes(mic_bytes(mic_code));
    d_mac    = mac_q & mic_mask;
    tag      = tag_in & mic_mask;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ct_pend_q   <= 1'b0;
      keep_pend_q <= '0;
      ct_valid  <= 1'b0;
      ct_data   <= '0;
      ct_keep   <= '0;
      mac_valid <= 1'b0;
      mac       <= '0;
    end else begin
      ct_pend_q <= ct_strobe;
      if (ct_strobe) keep_pend_q <= ct_keep_in;
      ct_valid  <= ct_pend_q;
      mac_valid <= mac_strobe;
      if (ct_pend_q) begin
        ct_data <= cipher_q;
        ct_keep <= keep_pend_q;
      end
      if (mac_strobe) mac <= d_mac;
    end
  end

endmodule
