// rcon: the round-constant register of the on-the-fly key expansion.
//
// Holds the constant of the current round, x^(r-1) in GF(2^8): 01, 02, 04,
// ..., 80, 1b, 36. On a rising edge of its (gated) clock it loads 01
// (op = RC_INIT), steps forward by one multiplication by x (RC_NEXT) or
// back by one division by x (RC_PREV, used when the decryption core walks
// the keys from round 10 down). Because the constant is distinct in every
// round, the control units also read the round number from it (36 = round
// 10, 01 = round 1), so no separate round counter is needed.
// The RCON register itself follows the published design; stepping it by
// xtime and reading the round from it are this implementation's choices.
module rcon
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic [1:0] op,
  output byte_t      rc
);

  always_ff @(posedge clk) begin
    unique case (op)
      RC_NEXT: rc <= xtime(rc);
      RC_PREV: rc <= inv_xtime(rc);
      default: rc <= RCON_FIRST;
    endcase
  end
endmodule
