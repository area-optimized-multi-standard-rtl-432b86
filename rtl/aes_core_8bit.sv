// aes_core_8bit: folded, encryption-only AES-128 core with an 8-bit datapath.
//
// One S-box (cfa_sbox) and one MixColumns unit (mix_column) serve all sixteen
// bytes of a round. A 16:1 byte multiplexer reads the state in ShiftRows
// order, so ShiftRows costs no logic: new byte (row i, column c) is S(old byte
// (row i, column (c+i) mod 4)). Three bytes of each column wait in a column
// register; when the fourth arrives the column goes through MixColumns (skipped
// in the final round) and AddRoundKey and is written to the column buffer.
// The round's last column goes straight into the state together with the
// buffered three, and the round key advances.
//
// The KeyExpansion is computed on the fly (aes_key_schedule) and borrows the
// same S-box for SubWord during the first four cycles of every round, so a
// round takes 4 + 16 = 20 cycles and a block 10 * 20 = 200 cycles after the
// start cycle, in which the initial AddRoundKey (pt ^ key) is done.
//
// The 8-bit folding, the single S-box and MixColumns unit, the 16:1 multiplexer
// and the column buffers follow the architecture this engine is specified
// with; the per-round cycle schedule, the S-box sharing with the key path and
// the buffer of three (not four) columns are this design's choices.
//
// Interface: `start` (one cycle, while !busy) takes pt and key. busy is high
// from the next cycle for 200 cycles; `done` pulses one cycle after the last
// round, and ct then holds the ciphertext until the next start.
module aes_core_8bit
  import aes_ccm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t pt,
  input  block_t key,
  output logic   busy,
  output logic   done,
  output block_t ct
);

  block_t      state_q;
  logic [31:0] colbuf_q [3];    // new columns 0..2 of the round
  logic [7:0]  colreg_q [3];    // rows 0..2 of the column being formed
  logic [3:0]  round_q;         // 1..NR
  logic [4:0]  cnt_q;           // 0..19 within a round
  logic        busy_q, done_q;

  // datapath signals
  logic        key_phase;
  logic [3:0]  j;               // byte slot in the SubBytes phase
  logic [1:0]  row, col;
  logic [3:0]  src_idx;         // state byte read through the 16:1 mux
  logic [7:0]  sbox_in, sbox_out;
  logic [7:0]  rot_byte;
  logic [31:0] column, mixed, new_col;
  block_t      next_key;
  logic        last_round;

  assign key_phase  = (cnt_q < 5'd4);
  assign j          = 4'(cnt_q - 5'd4);
  assign row        = j[1:0];
  assign col        = j[3:2];
  assign src_idx    = {2'(col + row), row};
  assign last_round = (round_q == 4'(NR));

  always_comb begin
    sbox_in = key_phase ? rot_byte : block_byte(state_q, src_idx);
    column  = {colreg_q[0], colreg_q[1], colreg_q[2], sbox_out};
    new_col = (last_round ? column : mixed) ^ next_key[127 - 32*col -: 32];
  end

  cfa_sbox u_sbox (.in_byte(sbox_in), .out_byte(sbox_out));

  mix_column u_mix (.col_in(column), .col_out(mixed));

  aes_key_schedule u_ks (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (start && !busy_q),
    .key_in   (key),
    .sub_idx  (cnt_q[1:0]),
    .sub_we   (busy_q && key_phase),
    .sub_byte (sbox_out),
    .advance  (busy_q && cnt_q == 5'd19),
    .rot_byte (rot_byte),
    .next_key (next_key)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= '0;
      colbuf_q <= '{default: '0};
      colreg_q <= '{default: '0};
      round_q  <= 4'd1;
      cnt_q    <= '0;
      busy_q   <= 1'b0;
      done_q   <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (!busy_q) begin
        if (start) begin
          state_q <= pt ^ key;          // initial AddRoundKey
          round_q <= 4'd1;
          cnt_q   <= '0;
          busy_q  <= 1'b1;
        end
      end else begin
        if (!key_phase) begin
          if (row != 2'd3) begin
            colreg_q[row] <= sbox_out;
          end else if (col != 2'd3) begin
            colbuf_q[col] <= new_col;
          end else begin
            state_q <= {colbuf_q[0], colbuf_q[1], colbuf_q[2], new_col};
          end
        end
        if (cnt_q == 5'd19) begin
          cnt_q <= '0;
          if (last_round) begin
            busy_q <= 1'b0;
            done_q <= 1'b1;
          end else begin
            round_q <= round_q + 4'd1;
          end
        end else begin
          cnt_q <= cnt_q + 5'd1;
        end
      end
    end
  end

  assign busy = busy_q;
  assign done = done_q;
  assign ct   = state_q;

endmodule
