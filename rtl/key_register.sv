// key_register: the 16-byte round key held as a byte-wide shift register with
// one byte input and two byte outputs.
//
// On every rising edge of clk the bytes move one place towards the head
// (reg[i] <= reg[i+1]) and din enters at the tail (reg[15]). Out 1 is the
// head byte, used by AddRoundKey and as the byte being replaced during key
// expansion. Out 2 is a second tap, needed because expanding a key byte
// combines two bytes of the previous key at once. Which register Out 2 reads
// is chosen by tap_sel:
//   TAP_W3   : register 13 -- byte of the last word during cycles 0..2 of a
//              key-expansion pass (RotWord order k13,k14,k15),
//   TAP_W3R  : register 9  -- byte k12 during cycle 3 of that pass,
//   TAP_PREV : register 12 -- the new byte produced four cycles earlier.
// Feeding Out 1 straight back to din rotates the key: after 16 clocks it is
// back in place. There is no load enable; the register runs on a gated clock.
// One input and two outputs follow the published design; the tap positions
// are this implementation's.
module key_register
  import aes_pkg::*;
(
  input  logic        clk,
  input  byte_t       din,
  input  logic [1:0]  tap_sel,
  output byte_t       out1,
  output byte_t       out2
);

  block_t k;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NB_BYTES - 1; i++) k[i] <= k[i + 1];
    k[NB_BYTES - 1] <= din;
  end

  assign out1 = k[0];

  always_comb begin
    unique case (tap_sel)
      TAP_W3:   out2 = k[13];
      TAP_W3R:  out2 = k[9];
      default:  out2 = k[12];
    endcase
  end
endmodule
