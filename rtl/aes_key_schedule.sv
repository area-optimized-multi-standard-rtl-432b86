// aes_key_schedule: on-the-fly AES-128 KeyExpansion for the folded core.
//
// Holds the current round key Key_i (128 bits) and the round constant. Each
// round, the core spends four cycles passing the bytes of RotWord(w3) through
// its single S-box; this block captures the four results (SubWord) and from
// them forms the next round key combinationally:
//   t = SubWord(RotWord(w3)) ^ {rcon,0,0,0}
//   w0' = w0^t, w1' = w1^w0', w2' = w2^w1', w3' = w3^w2'.
// On `advance` the next key replaces the current one and rcon is doubled in
// GF(2^8). Only the forward schedule exists: the engine never decrypts with
// AES, so no inverse schedule is kept.
//
// Sharing the S-box with SubBytes (no second S-box for the key path) is this
// design's reading of "only one S-box" in the folded core.
//
// Interface (all registers on clk rising edge, active-low async reset):
//   load      : Key_0 <= key_in, rcon <= {01}
//   sub_idx   : which RotWord byte is requested; rot_byte is that byte
//   sub_we    : capture sub_byte (the S-box output for rot_byte) at sub_idx
//   advance   : move to the next round key
//   next_key  : the key of the following round, formed from the current one
module aes_key_schedule
  import aes_ccm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  block_t       key_in,
  input  logic [1:0]   sub_idx,
  input  logic         sub_we,
  input  logic [7:0]   sub_byte,
  input  logic         advance,
  output logic [7:0]   rot_byte,
  output block_t       next_key
);

  block_t      rk_q;
  logic [7:0]  rcon_q;
  logic [31:0] sub_q;

  logic [31:0] w [4];
  logic [31:0] nw [4];
  logic [31:0] t;
  logic [1:0]  rot_idx;

  always_comb begin
    for (int i = 0; i < 4; i++) w[i] = rk_q[127 - 32*i -: 32];
    // RotWord(w3) byte sub_idx is byte (sub_idx+1)%4 of w3
    rot_idx  = sub_idx + 2'd1;
    rot_byte = w[3][31 - 8*rot_idx -: 8];
    t     = sub_q ^ {rcon_q, 24'h0};
    nw[0] = w[0] ^ t;
    nw[1] = w[1] ^ nw[0];
    nw[2] = w[2] ^ nw[1];
    nw[3] = w[3] ^ nw[2];
    next_key  = {nw[0], nw[1], nw[2], nw[3]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk_q   <= '0;
      rcon_q <= 8'h01;
      sub_q  <= '0;
    end else begin
      if (load) begin
        rk_q   <= key_in;
        rcon_q <= 8'h01;
      end else if (advance) begin
        rk_q   <= next_key;
        rcon_q <= xtime(rcon_q);
      end
      if (sub_we) sub_q[31 - 8*sub_idx -: 8] <= sub_byte;
    end
  end

endmodule
