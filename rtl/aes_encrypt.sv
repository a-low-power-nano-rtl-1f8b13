// aes_encrypt: AES-128 encryption core with an 8-bit datapath.
//
// One block is encrypted at a time, one byte per clock, by five units around
// a single byte-wide path:
//   State-Register  16-byte shift register; ShiftRows is a one-clock
//                   permutation by wiring (state_register),
//   Sub-Bytes       one S-box, shared by the rounds and the key expansion,
//   Mix-Columns     8-bit in / 8-bit out, four clocks latency (mix_columns),
//                   followed by the AddRoundKey XOR with Key-Register Out 1,
//   Key-Register    16-byte shift register with outputs Out 1 and Out 2; the
//                   round keys are expanded on the fly, in place,
//   RCON            round-constant register, gated into the key path only in
//                   the first byte of each expansion pass.
// The result of the XOR goes back into the State-Register, or, in the tenth
// round, to the output register.
//
// Key expansion, byte j of the new key (j = 0..15, head byte k_j):
//   j < 4 : k_j ^ S(Out 2) ^ (j==0 ? RCON : 0), Out 2 = k13,k14,k15,k12,
//   j >= 4: k_j ^ Out 2, Out 2 = new byte j-4 (Key-Register position 12).
// Only the last word reaches the S-box, as in the FIPS-197 schedule.
//
// Low power: the State-Register, the Mix-Columns registers, the
// Key-Register and RCON each run on their own gated clock (clock_gating),
// enabled only in the phases that use them; during key expansion the
// State-Register and Mix-Columns clocks are stopped.
//
// Interface: on ld (one clock) the core starts; text_in and key must stay
// valid for the 16 clocks that follow (the LOAD pass reads one byte of each
// per clock, byte 0 = bits [127:120] first). The initial AddRoundKey is done
// while loading. text_out is valid and done is high from 386 clocks after ld
// until the next ld. See enc_control_unit for the phase sequence.
// The units, the byte datapath, the shared S-box, ShiftRows by wiring and
// the four gated register groups follow the published Nano-AES architecture.
// The cycle schedule, the Out 2 taps, the initial AddRoundKey during loading
// and the handshake are this implementation's choices.
module aes_encrypt
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
  logic       state_ce, mix_ce, key_ce, rcon_ce, out_we;
  logic [1:0] rcon_op;
  byte_t      rc;

  enc_control_unit u_ctrl (
    .clk, .rst, .ld,
    .rc_last (rc == RCON_LAST),
    .phase, .cnt, .pos,
    .state_ce, .mix_ce, .key_ce, .rcon_ce, .rcon_op,
    .out_we, .done
  );

  // Gated clocks of the four register groups.
  logic state_clk, mix_clk, key_clk, rcon_clk;
  clock_gating u_cg_state (.clk, .en(state_ce), .gclk(state_clk));
  clock_gating u_cg_mix   (.clk, .en(mix_ce),   .gclk(mix_clk));
  clock_gating u_cg_key   (.clk, .en(key_ce),   .gclk(key_clk));
  clock_gating u_cg_rcon  (.clk, .en(rcon_ce),  .gclk(rcon_clk));

  // Byte cnt of the inputs during LOAD.
  byte_t in_byte, key_byte;
  assign in_byte  = text_in[8*(15 - int'(cnt)) +: 8];
  assign key_byte = key[8*(15 - int'(cnt)) +: 8];

  byte_t st_head, st_din;
  byte_t k_out1, k_out2, k_din;
  logic [1:0] tap_sel;
  byte_t sb_in, sb_out, mc_out, round_out;

  state_register #(.INV(1'b0)) u_state (
    .clk (state_clk), .sr_sel(phase == PH_SHIFT), .din(st_din), .dout(st_head)
  );

  key_register u_key (
    .clk (key_clk), .din(k_din), .tap_sel, .out1(k_out1), .out2(k_out2)
  );

  rcon u_rcon (.clk(rcon_clk), .op(rcon_op), .rc);

  // The single S-box: key bytes during KEYEXP, state bytes otherwise.
  assign sb_in = (phase == PH_KEYEXP) ? k_out2 : st_head;
  sub_bytes u_sbox (.din(sb_in), .dout(sb_out));

  mix_columns #(.INV(1'b0)) u_mix (
    .clk (mix_clk), .pos, .bypass(rc == RCON_LAST), .din(sb_out), .dout(mc_out)
  );

  assign round_out = mc_out ^ k_out1;
  assign st_din    = (phase == PH_LOAD) ? (in_byte ^ key_byte) : round_out;

  always_comb begin
    if (cnt < 4'd3)       tap_sel = TAP_W3;
    else if (cnt == 4'd3) tap_sel = TAP_W3R;
    else                  tap_sel = TAP_PREV;
  end

  always_comb begin
    unique case (phase)
      PH_LOAD:   k_din = key_byte;
      PH_KEYEXP: k_din = (cnt < 4'd4)
                         ? k_out1 ^ sb_out ^ ((cnt == 4'd0) ? rc : 8'h00)
                         : k_out1 ^ k_out2;
      default:   k_din = k_out1;          // rotate during the rounds
    endcase
  end

  always_ff @(posedge clk) begin
    if (out_we) text_out <= {text_out[119:0], round_out};
  end
endmodule
