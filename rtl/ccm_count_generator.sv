// ccm_count_generator: produces the CTR-mode counter blocks A_i.
//
// A_i = flags | nonce (13 bytes) | i (2 bytes), with flags = L' = 1 for the
// two-octet counter of CCM/CCM*. The counter starts at 1 for the message
// blocks (A_1 .. A_n) and is set to 0 for A_0, whose key stream encrypts the
// MAC at the end.
//
// The counter block layout follows CCM; the init / increment / zero controls
// are this design's interface.
//
// Interface: `init` sets i = 1, `inc` adds one, `zero` sets i = 0 (init has
// priority, then zero). b_ctr is combinational from nonce and i.
module ccm_count_generator
  import aes_ccm_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic [103:0] nonce,
  input  logic         init,
  input  logic         inc,
  input  logic         zero,
  output block_t       b_ctr
);

  logic [15:0] cnt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     cnt_q <= 16'd1;
    else if (init)  cnt_q <= 16'd1;
    else if (zero)  cnt_q <= 16'd0;
    else if (inc)   cnt_q <= cnt_q + 16'd1;
  end

  assign b_ctr = {8'h01, nonce, cnt_q};

endmodule
