// ccm_block_generator: formats the CCM input blocks.
//
// B_IV (B0) is formed combinationally from the configuration:
//   flags = {0, Adata, M'[2:0], L'=1} | nonce (13 bytes) | l(m) (2 bytes).
// B_DATA is assembled one byte per cycle from two byte streams. The AUTH
// stream comes first: its blocks start with the two-byte length l(a), then the
// AUTH bytes, and the last AUTH block is zero-padded. The MSG stream follows,
// starting on a fresh block, its last block zero-padded too. A full block is
// held (blk_valid) until the consumer pulses blk_release; b_data is zero while
// no block is held, so an XOR with it leaves the other operand unchanged.
// While one block is held, nothing else is assembled.
//
// Side information for the held block: blk_is_msg and blk_keep (one bit per
// byte, set for bytes that carry data, byte 0 in bit 15). cur_exists and
// cur_is_msg describe the block that is held or being assembled, so the
// controller can pick its next job before the block is complete.
//
// Block formats follow CCM with a two-octet length field (L = 2), which both
// IEEE 802.15.4 (CCM*) and IEEE 802.15.6 use. The byte-stream interface, the
// valid/ready handshake and the limit l(a) < 2^16 - 2^8 (two-byte length
// prefix only) are this design's choices.
//
// Interface: `start` (one cycle) takes cfg and restarts formatting. A byte is
// accepted on a cycle where *_valid and *_ready are both high.
module ccm_block_generator
  import aes_ccm_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  ccm_cfg_t   cfg,
  // byte streams
  input  logic [7:0] auth_data,
  input  logic       auth_valid,
  output logic       auth_ready,
  input  logic [7:0] msg_data,
  input  logic       msg_valid,
  output logic       msg_ready,
  // formatted blocks
  output block_t     b_iv,
  output block_t     b_data,
  output logic       blk_valid,
  output logic       blk_is_msg,
  output logic [15:0] blk_keep,
  input  logic       blk_release,
  output logic       cur_exists,
  output logic       cur_is_msg
);

  typedef enum logic [2:0] {PH_LEN0, PH_LEN1, PH_AUTH, PH_MSG, PH_DONE} phase_e;

  phase_e      phase_q;
  block_t      buf_q;
  logic [3:0]  ptr_q;
  logic [15:0] keep_q;
  logic        full_q, is_msg_q;
  logic [15:0] a_left_q, m_left_q, a_len_q;

  // byte source of this cycle
  logic       take;          // a byte is written this cycle
  logic [7:0] byte_in;
  logic       seg_end;       // this byte is the last of its segment
  phase_e     phase_next;

  always_comb begin
    take       = 1'b0;
    byte_in    = 8'h00;
    seg_end    = 1'b0;
    phase_next = phase_q;
    auth_ready = 1'b0;
    msg_ready  = 1'b0;
    if (!full_q) begin
      unique case (phase_q)
        PH_LEN0: begin
          take = 1'b1; byte_in = a_len_q[15:8]; phase_next = PH_LEN1;
        end
        PH_LEN1: begin
          take = 1'b1; byte_in = a_len_q[7:0]; phase_next = PH_AUTH;
        end
        PH_AUTH: begin
          auth_ready = 1'b1;
          take       = auth_valid;
          byte_in    = auth_data;
          seg_end    = (a_left_q == 16'd1);
          if (take && seg_end) phase_next = (m_left_q != 16'd0) ? PH_MSG : PH_DONE;
        end
        PH_MSG: begin
          msg_ready = 1'b1;
          take      = msg_valid;
          byte_in   = msg_data;
          seg_end   = (m_left_q == 16'd1);
          if (take && seg_end) phase_next = PH_DONE;
        end
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q  <= PH_DONE;
      buf_q    <= '0;
      ptr_q    <= '0;
      keep_q   <= '0;
      full_q   <= 1'b0;
      is_msg_q <= 1'b0;
      a_left_q <= '0;
      m_left_q <= '0;
      a_len_q  <= '0;
    end else if (start) begin
      phase_q  <= (cfg.a_len != 16'd0) ? PH_LEN0 :
                  (cfg.m_len != 16'd0) ? PH_MSG : PH_DONE;
      buf_q    <= '0;
      ptr_q    <= '0;
      keep_q   <= '0;
      full_q   <= 1'b0;
      a_left_q <= cfg.a_len;
      m_left_q <= cfg.m_len;
      a_len_q  <= cfg.a_len;
    end else begin
      if (full_q && blk_release) begin
        full_q <= 1'b0;
        buf_q  <= '0;
        keep_q <= '0;
        ptr_q  <= '0;
      end
      if (take) begin
        buf_q[127 - 8*ptr_q -: 8] <= byte_in;
        keep_q[15 - ptr_q]        <= 1'b1;
        ptr_q                     <= ptr_q + 4'd1;
        phase_q                   <= phase_next;
        if (phase_q == PH_AUTH) a_left_q <= a_left_q - 16'd1;
        if (phase_q == PH_MSG)  m_left_q <= m_left_q - 16'd1;
        if (ptr_q == 4'd15 || seg_end) begin
          full_q   <= 1'b1;
          is_msg_q <= (phase_q == PH_MSG);
        end
      end
    end
  end

  assign b_iv = {1'b0, cfg.a_len != 16'd0, cfg.mic_code, 3'd1, cfg.nonce, cfg.m_len};

  assign blk_valid  = full_q;
  assign b_data     = full_q ? buf_q : '0;
  assign blk_is_msg = is_msg_q;
  assign blk_keep   = full_q ? keep_q : '0;
  assign cur_exists = full_q || (phase_q != PH_DONE);
  assign cur_is_msg = full_q ? is_msg_q : (phase_q == PH_MSG);

endmodule
