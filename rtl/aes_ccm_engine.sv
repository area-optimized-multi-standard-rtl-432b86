// aes_ccm_engine: area-optimized AES-CCM / CCM* security engine for
// IEEE 802.15.4 (WPAN) and IEEE 802.15.6 (WBAN).
//
// A single 8-bit folded AES-128 encryption core (aes_core_8bit) serves both
// halves of CCM: CBC-MAC for authentication and CTR for encryption. The
// controller toggles the core between the two modes block by block. The
// Block Generator formats B0 (B_IV) and the AUTH/MSG data blocks (B_DATA), the
// Count Generator the counter blocks A_i (B_CTR). The AES input PT is chosen
// from B_IV, B_CTR and MAC_TEMP; the AES output D_EN is XORed with B_DATA or
// B_CIPH into the Cipher Register or the MAC Register. The Cipher/MAC
// Generator presents ciphertext blocks and the (encrypted) MAC, and the
// Authentication Check compares the MAC with a received tag when decrypting.
//
// Security mode, chosen per operation through the IV inputs (cfg):
//   M' = 0          : CCM* encryption only (no MAC)
//   M' = 1 / 3 / 7  : MIC-32 / MIC-64 / MIC-128 (other M' give CCM's 6..14)
//   m_len = 0       : authentication only (all data as AUTH)
//   decrypt         : MSG carries ciphertext; the plaintext comes out on
//                     ct_data and `valid` reports whether tag_in matched.
// IEEE 802.15.6 uses MIC-32 with a two-octet length, IEEE 802.15.4 CCM* all
// of the above; both use a 13-byte nonce and L = 2.
//
// Timing: one AES job takes 201 cycles plus one dispatch cycle. A message
// block costs two jobs (CTR and CBC-MAC), about 404 cycles for 128 bits; an
// AUTH block one job; the end of a packet two jobs (A_0 and the last CBC-MAC
// step). Data bytes are accepted one per cycle while the core works.
//
// The block structure, the toggle method, the 8-bit core and the hardware
// tag check follow the engine's specification. The byte-stream inputs,
// 128-bit block outputs with byte masks, the cfg layout and the start/done
// handshake are this design's own interface.
//
// Interface: `start` while !busy latches cfg and key; tag_in must be stable
// until done. Outputs: ct_valid pulses with each ciphertext (or plaintext)
// block, ct_keep marking its valid bytes; mac_valid pulses with the MAC (first
// M bytes of `mac`); done pulses at the end, with `valid`/`checked` settled.
module aes_ccm_engine
  import aes_ccm_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  ccm_cfg_t    cfg,
  input  block_t      key,
  input  block_t      tag_in,
  input  logic [7:0]  auth_data,
  input  logic        auth_valid,
  output logic        auth_ready,
  input  logic [7:0]  msg_data,
  input  logic        msg_valid,
  output logic        msg_ready,
  output logic        ct_valid,
  output block_t      ct_data,
  output logic [15:0] ct_keep,
  output logic        mac_valid,
  output block_t      mac,
  output logic        valid,
  output logic        checked,
  output logic        busy,
  output logic        done
);

  ccm_cfg_t cfg_q;
  block_t   key_q;
  logic     start_q;
  logic     ctrl_busy, ctrl_done;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cfg_q   <= '0;
      key_q   <= '0;
      start_q <= 1'b0;
      done    <= 1'b0;
    end else begin
      start_q <= start && !busy;
      done    <= ctrl_done;       // aligned with mac_valid and valid
      if (start && !busy) begin
        cfg_q <= cfg;
        key_q <= key;
      end
    end
  end

  assign busy = ctrl_busy || start_q || done;

  // ---------------- Block Generator / Count Generator ----------------
  block_t      b_iv, b_data, b_ctr;
  logic        blk_valid, blk_is_msg, blk_release;
  logic [15:0] blk_keep;
  logic        cur_exists, cur_is_msg;
  logic        ctr_init, ctr_inc, ctr_zero;

  ccm_block_generator u_blkgen (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_q),
    .cfg        (cfg_q),
    .auth_data  (auth_data),
    .auth_valid (auth_valid),
    .auth_ready (auth_ready),
    .msg_data   (msg_data),
    .msg_valid  (msg_valid),
    .msg_ready  (msg_ready),
    .b_iv       (b_iv),
    .b_data     (b_data),
    .blk_valid  (blk_valid),
    .blk_is_msg (blk_is_msg),
    .blk_keep   (blk_keep),
    .blk_release(blk_release),
    .cur_exists (cur_exists),
    .cur_is_msg (cur_is_msg)
  );

  ccm_count_generator u_ctrgen (
    .clk  (clk),
    .rst_n(rst_n),
    .nonce(cfg_q.nonce),
    .init (ctr_init),
    .inc  (ctr_inc),
    .zero (ctr_zero),
    .b_ctr(b_ctr)
  );

  // ---------------- PT mux and AES core ----------------
  pt_sel_e pt_sel;
  block_t  pt, d_en, cipher_q, mac_q;
  logic    aes_start, aes_busy, aes_done;

  always_comb begin
    unique case (pt_sel)
      PT_IV:   pt = b_iv;
      PT_CTR:  pt = b_ctr;
      default: pt = mac_q;      // MAC_TEMP
    endcase
  end

  aes_core_8bit u_aes (
    .clk  (clk),
    .rst_n(rst_n),
    .start(aes_start),
    .pt   (pt),
    .key  (key_q),
    .busy (aes_busy),
    .done (aes_done),
    .ct   (d_en)
  );

  // the core finishes a job only after one was started, and then is idle
  a_core_done_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                     aes_done |-> !aes_busy);

  // ---------------- XOR stage, Cipher and MAC Registers ----------------
  op_sel_e op_sel;
  logic    keep_all, load_cipher, load_mac;

  ccm_xor_stage u_xor (
    .clk        (clk),
    .rst_n      (rst_n),
    .d_en       (d_en),
    .b_data     (b_data),
    .op_sel     (op_sel),
    .keep       (keep_all ? 16'hffff : blk_keep),
    .load_cipher(load_cipher),
    .load_mac   (load_mac),
    .cipher_q   (cipher_q),
    .mac_q      (mac_q)
  );

  // ---------------- Controller ----------------
  logic ct_strobe, mac_strobe, check;

  ccm_controller u_ctrl (
    .clk        (clk),
    .rst_n      (rst_n),
    .start      (start_q),
    .has_mic    (cfg_q.mic_code != 3'd0),
    .decrypt    (cfg_q.decrypt),
    .cur_exists (cur_exists),
    .cur_is_msg (cur_is_msg),
    .blk_valid  (blk_valid),
    .blk_is_msg (blk_is_msg),
    .blk_release(blk_release),
    .aes_busy   (aes_busy),
    .aes_start  (aes_start),
    .pt_sel     (pt_sel),
    .ctr_init   (ctr_init),
    .ctr_inc    (ctr_inc),
    .ctr_zero   (ctr_zero),
    .op_sel     (op_sel),
    .keep_all   (keep_all),
    .load_cipher(load_cipher),
    .load_mac   (load_mac),
    .ct_strobe  (ct_strobe),
    .mac_strobe (mac_strobe),
    .check      (check),
    .busy       (ctrl_busy),
    .done       (ctrl_done)
  );

  // ---------------- Cipher/MAC Generator and Authentication Check ----------------
  block_t d_mac, tag_m;

  ccm_cipher_mac_gen u_outgen (
    .clk       (clk),
    .rst_n     (rst_n),
    .mic_code  (cfg_q.mic_code),
    .cipher_q  (cipher_q),
    .mac_q     (mac_q),
    .ct_strobe (ct_strobe),
    .ct_keep_in(blk_keep),
    .mac_strobe(mac_strobe),
    .tag_in    (tag_in),
    .ct_valid  (ct_valid),
    .ct_data   (ct_data),
    .ct_keep   (ct_keep),
    .mac_valid (mac_valid),
    .mac       (mac),
    .d_mac     (d_mac),
    .tag       (tag_m)
  );

  ccm_auth_check u_auth (
    .clk    (clk),
    .rst_n  (rst_n),
    .clear  (start_q),
    .check  (check),
    .d_mac  (d_mac),
    .tag    (tag_m),
    .valid  (valid),
    .checked(checked)
  );

endmodule
