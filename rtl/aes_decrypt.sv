// aes_decrypt: AES-128 decryption core with an 8-bit datapath, built from
// the same units as aes_encrypt with each round step replaced by its inverse.
//
// Round datapath, one byte per clock: State-Register head -> InvSub-Bytes ->
// XOR Key-Register Out 1 -> InvMix-Columns (8-bit in/out, four clocks
// latency, bypassed in the last round) -> back into the State-Register tail,
// or to the output register in the last round. InvShiftRows is a one-clock
// permutation by wiring in the State-Register.
//
// Round keys are needed last first, and only one key is stored. After the
// key is loaded, the forward expansion is run ten times in place (one
// forward S-box, as in the encryption core) to reach the round-10 key.
// Each round then recovers the previous key in place in two passes:
//   INVKEY_A: k_j ^= k_(j-4) (old values, j = 4..15); the old bytes are
//             taken from a 4-byte delay line fed with Out 1,
//   INVKEY_B: k_j ^= S(Out 2) ^ (j==0 ? RCON : 0), j = 0..3, with Out 2 =
//             k13,k14,k15,k12 of the key just recovered; RCON steps back.
//
// Low power: State-Register, InvMix-Columns registers, Key-Register, the
// delay line and RCON each have their own gated clock.
//
// Interface: as aes_encrypt. text_in (ciphertext) and key must stay valid
// for the 16 clocks after ld; text_out (plaintext) is valid and done high
// from 722 clocks after ld until the next ld.
// Only the inverse algorithm and the existence of a decryption unit come
// from the published design; this hardware structure, including the inverse
// key walk and the delay line, is this implementation's own.
module aes_decrypt
  import aes_pkg::*;
(
  input  logic         clk,
  input  logic         rst,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] text_out,
  output logic         done
);
  phase_e     phase;
  logic [3:0] cnt;
  logic [1:0] pos;
  logic       state_ce, mix_ce, key_ce, dly_ce, rcon_ce, out_we;
  logic [1:0] rcon_op;
  byte_t      rc;

  dec_control_unit u_ctrl (
    .clk, .rst, .ld,
    .rc_first (rc == RCON_FIRST),
    .rc_last  (rc == RCON_LAST),
    .phase, .cnt, .pos,
    .state_ce, .mix_ce, .key_ce, .dly_ce, .rcon_ce, .rcon_op,
    .out_we, .done
  );

  logic state_clk, mix_clk, key_clk, dly_clk, rcon_clk;
  clock_gating u_cg_state (.clk, .en(state_ce), .gclk(state_clk));
  clock_gating u_cg_mix   (.clk, .en(mix_ce),   .gclk(mix_clk));
  clock_gating u_cg_key   (.clk, .en(key_ce),   .gclk(key_clk));
  clock_gating u_cg_dly   (.clk, .en(dly_ce),   .gclk(dly_clk));
  clock_gating u_cg_rcon  (.clk, .en(rcon_ce),  .gclk(rcon_clk));

  byte_t in_byte, key_byte;
  assign in_byte  = text_in[8*(15 - int'(cnt)) +: 8];
  assign key_byte = key[8*(15 - int'(cnt)) +: 8];

  byte_t st_head, st_din;
  byte_t k_out1, k_out2, k_din;
  logic [1:0] tap_sel;
  byte_t ksb_out, isb_out, mc_out;
  byte_t dly [4];

  state_register #(.INV(1'b1)) u_state (
    .clk (state_clk), .sr_sel(phase == PH_SHIFT), .din(st_din), .dout(st_head)
  );

  key_register u_key (
    .clk (key_clk), .din(k_din), .tap_sel, .out1(k_out1), .out2(k_out2)
  );

  rcon u_rcon (.clk(rcon_clk), .op(rcon_op), .rc);

  sub_bytes     u_key_sbox (.din(k_out2),  .dout(ksb_out));
  inv_sub_bytes u_inv_sbox (.din(st_head), .dout(isb_out));

  mix_columns #(.INV(1'b1)) u_mix (
    .clk (mix_clk), .pos, .bypass(rc == RCON_FIRST),
    .din (isb_out ^ k_out1), .dout(mc_out)
  );

  always_comb begin
    unique case (phase)
      PH_LOAD:   st_din = in_byte;
      PH_ADDKEY: st_din = st_head ^ k_out1;
      default:   st_din = mc_out;
    endcase
  end

  always_comb begin
    if (cnt < 4'd3)       tap_sel = TAP_W3;
    else if (cnt == 4'd3) tap_sel = TAP_W3R;
    else                  tap_sel = TAP_PREV;
  end

  // Old key bytes of the last four clocks, for INVKEY_A.
  always_ff @(posedge dly_clk) begin
    dly[0:2] <= dly[1:3];
    dly[3]   <= k_out1;
  end

  always_comb begin
    unique case (phase)
      PH_LOAD:     k_din = key_byte;
      PH_KEYEXP:   k_din = (cnt < 4'd4)
                           ? k_out1 ^ ksb_out ^ ((cnt == 4'd0) ? rc : 8'h00)
                           : k_out1 ^ k_out2;
      PH_INVKEY_A: k_din = (cnt < 4'd4) ? k_out1 : k_out1 ^ dly[0];
      PH_INVKEY_B: k_din = (cnt < 4'd4)
                           ? k_out1 ^ ksb_out ^ ((cnt == 4'd0) ? rc : 8'h00)
                           : k_out1;
      default:     k_din = k_out1;        // rotate (ADDKEY, DATA)
    endcase
  end

  always_ff @(posedge clk) begin
    if (out_we) text_out <= {text_out[119:0], mc_out};
  end
endmodule
