// ccm_auth_check: hardware tag verification.
//
// In the verification state (check pulse) it compares the computed MAC D_MAC
// with the received Tag, both already cut to the MIC length, and registers the
// result as Valid. Valid stays until `clear` (the next operation's start);
// `checked` marks that a comparison has been made since then, so a Valid of 0
// after `checked` means the tag was rejected.
//
// A dedicated comparator instead of a software check is what the engine
// specifies; the clear/checked handshake is this design's choice.
module ccm_auth_check
  import aes_ccm_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   clear,
  input  logic   check,
  input  block_t d_mac,
  input  block_t tag,
  output logic   valid,
  output logic   checked
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid   <= 1'b0;
      checked <= 1'b0;
    end else if (clear) begin
      valid   <= 1'b0;
      checked <= 1'b0;
    end else if (check) begin
      valid   <= (d_mac == tag);
      checked <= 1'b1;
    end
  end

endmodule
