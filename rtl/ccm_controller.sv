// ccm_controller: toggle-method scheduler of the single AES core.
//
// One AES core serves both CCM modes by turns. During the AUTH phase only
// CBC-MAC jobs run. In the MSG phase every message block gets a CTR job
// followed by a CBC-MAC job, so the core toggles between the two modes and
// the MAC is finished together with the last ciphertext block, as in a
// two-core parallel engine but with one core.
//
// Jobs and where their result goes (D_EN = AES output):
//   CBC job j : PT = B_IV (first job) or MAC_TEMP;
//               MAC Register <= D_EN ^ B_DATA(block j)   (encryption, AUTH)
//               MAC Register <= D_EN ^ B_CIPH            (decryption, MSG:
//                                          B_CIPH is the recovered plaintext)
//   CTR job i : PT = B_CTR(A_i); Cipher Register <= D_EN ^ B_DATA(block)
//   end       : CTR job A_0, Cipher Register <= D_EN (=S_0, no block held);
//               last CBC job, MAC Register <= D_EN ^ B_CIPH = T ^ S_0 = U;
//               U is the encrypted MAC; in decryption it is checked
//               against the received tag.
// The MAC Register thus always holds the next CBC-MAC input X_(j-1) ^ B_j.
// The CTR job of a message block runs before its CBC job so that decryption
// has the plaintext ready for the MAC. A job is started before its data block
// has arrived; the controller waits at the end of the job until it has.
// With M' = 0 (CCM* encryption only) no CBC job runs and AUTH blocks are
// dropped.
//
// The toggle order of CBC-MAC and CTR, the operand choice between B_DATA and
// B_CIPH and the selection of PT by state follow the engine's description;
// the exact state sequence, the job order inside a message block and the
// end-of-packet sequence through A_0 are this design's choices.
//
// Interface: `start` in IDLE begins an operation; `done` pulses at its end.
// aes_start pulses one cycle with pt_sel valid; results are taken once
// aes_busy is low and, where needed, blk_valid is high.
module ccm_controller
  import aes_ccm_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  input  logic    has_mic,
  input  logic    decrypt,
  // block generator
  input  logic    cur_exists,
  input  logic    cur_is_msg,
  input  logic    blk_valid,
  input  logic    blk_is_msg,
  output logic    blk_release,
  // AES core
  input  logic    aes_busy,
  output logic    aes_start,
  output pt_sel_e pt_sel,
  // count generator
  output logic    ctr_init,
  output logic    ctr_inc,
  output logic    ctr_zero,
  // XOR stage
  output op_sel_e op_sel,
  output logic    keep_all,
  output logic    load_cipher,
  output logic    load_mac,
  // outputs
  output logic    ct_strobe,
  output logic    mac_strobe,
  output logic    check,
  output logic    busy,
  output logic    done
);

  typedef enum logic [2:0] {
    S_IDLE, S_DISPATCH, S_CTR, S_CBC, S_A0, S_S0, S_FINAL, S_CHECK
  } state_e;

  state_e state_q, state_d;
  logic   first_q, first_d;         // next CBC job uses B_IV
  logic   ctr_done_q, ctr_done_d;   // CTR job of the current block done

  always_comb begin
    state_d     = state_q;
    first_d     = first_q;
    ctr_done_d  = ctr_done_q;
    blk_release = 1'b0;
    aes_start   = 1'b0;
    pt_sel      = first_q ? PT_IV : PT_MAC;
    ctr_init    = 1'b0;
    ctr_inc     = 1'b0;
    ctr_zero    = 1'b0;
    op_sel      = OP_DATA;
    keep_all    = 1'b0;
    load_cipher = 1'b0;
    load_mac    = 1'b0;
    ct_strobe   = 1'b0;
    mac_strobe  = 1'b0;
    check       = 1'b0;
    done        = 1'b0;

    unique case (state_q)
      S_IDLE: begin
        if (start) begin
          ctr_init   = 1'b1;
          first_d    = 1'b1;
          ctr_done_d = 1'b0;
          state_d    = S_DISPATCH;
        end
      end
      S_DISPATCH: begin
        if (cur_exists) begin
          if (cur_is_msg && !ctr_done_q) begin
            aes_start = 1'b1;
            pt_sel    = PT_CTR;
            state_d   = S_CTR;
          end else if (has_mic) begin
            aes_start = 1'b1;
            state_d   = S_CBC;
          end else if (blk_valid) begin
            blk_release = 1'b1;       // no MIC: the block has no CBC job
            ctr_done_d  = 1'b0;
          end
        end else if (has_mic) begin
          ctr_zero = 1'b1;
          state_d  = S_A0;
        end else begin
          done    = 1'b1;
          state_d = S_IDLE;
        end
      end
      S_CTR: begin
        if (!aes_busy && blk_valid) begin
          load_cipher = 1'b1;
          ct_strobe   = 1'b1;
          ctr_inc     = 1'b1;
          ctr_done_d  = 1'b1;
          state_d     = S_DISPATCH;
        end
      end
      S_CBC: begin
        if (!aes_busy && blk_valid) begin
          load_mac    = 1'b1;
          op_sel      = (decrypt && blk_is_msg) ? OP_CIPH : OP_DATA;
          blk_release = 1'b1;
          first_d     = 1'b0;
          ctr_done_d  = 1'b0;
          state_d     = S_DISPATCH;
        end
      end
      S_A0: begin
        aes_start = 1'b1;
        pt_sel    = PT_CTR;
        state_d   = S_S0;
      end
      S_S0: begin
        if (!aes_busy) begin
          load_cipher = 1'b1;         // S_0 = E(A_0), no block held
          keep_all    = 1'b1;
          aes_start   = 1'b1;         // last CBC job, PT = B_IV or MAC_TEMP
          state_d     = S_FINAL;
        end
      end
      S_FINAL: begin
        if (!aes_busy) begin
          load_mac = 1'b1;
          op_sel   = OP_CIPH;         // U = T ^ S_0
          state_d  = S_CHECK;
        end
      end
      S_CHECK: begin
        mac_strobe = 1'b1;
        check      = decrypt;
        done       = 1'b1;
        state_d    = S_IDLE;
      end
      default: state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_IDLE;
      first_q    <= 1'b1;
      ctr_done_q <= 1'b0;
    end else begin
      state_q    <= state_d;
      first_q    <= first_d;
      ctr_done_q <= ctr_done_d;
    end
  end

  assign busy = (state_q != S_IDLE);

  // a job is only started on an idle core
  property p_start_idle;
    @(posedge clk) disable iff (!rst_n) aes_start |-> !aes_busy;
  endproperty
  a_start_idle: assert property (p_start_idle);

  // a block is only released while one is held
  property p_release_held;
    @(posedge clk) disable iff (!rst_n) blk_release |-> blk_valid;
  endproperty
  a_release_held: assert property (p_release_held);

endmodule
