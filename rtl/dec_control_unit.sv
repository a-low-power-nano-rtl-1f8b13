// dec_control_unit: sequencer of the byte-serial AES-128 decryption core.
//
// Same counters as the encryption side (a 4-bit byte counter and a 2-bit
// drain counter); the round is read from the RCON register. Decryption needs
// the round keys from last to first, so after loading the cipher key it first
// runs the forward expansion up to the round-10 key, then walks back one key
// per round. Sequence after ld:
//   LOAD     16 cycles  ciphertext into the State-Register, key into the
//                       Key-Register, RCON := 01
//   KEYEXP   16 cycles  forward key expansion, repeated until the round-10
//                       key is formed (10 times, RCON 01 .. 36)
//   ADDKEY   16 cycles  state XOR round-10 key
//   then for round keys 9 down to 0:
//   INVKEY_A 16 cycles  inverse expansion of words 1..3
//   INVKEY_B 16 cycles  inverse expansion of word 0 (S-box, RCON)
//   SHIFT     1 cycle   InvShiftRows by wiring
//   DATA     16 cycles  state bytes through InvSub-Bytes, key XOR,
//                       InvMix-Columns
//   DRAIN     4 cycles  last four results written back
//   when the round with RCON 01 ends: DONE, done = 1 until the next ld.
// Total from ld to done: 16 + 160 + 16 + 10*53 = 722 clocks.
// ld is accepted in any phase and restarts the core. rst is asynchronous.
// The published design does not describe this unit; it mirrors
// enc_control_unit with a decryption schedule of this implementation's own.
module dec_control_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ld,
  input  logic       rc_first,    // RCON holds 01 (round key 0 is next)
  input  logic       rc_last,     // RCON holds 36 (round-10 key reached)
  output phase_e     phase,
  output logic [3:0] cnt,
  output logic [1:0] pos,
  output logic       state_ce,
  output logic       mix_ce,
  output logic       key_ce,
  output logic       dly_ce,      // clock enable, 4-byte delay line of INVKEY_A
  output logic       rcon_ce,
  output logic [1:0] rcon_op,
  output logic       out_we,
  output logic       done
);
  logic [1:0] dcnt;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      phase <= PH_IDLE;
      cnt   <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else if (ld) begin
      phase <= PH_LOAD;
      cnt   <= '0;
      dcnt  <= '0;
      done  <= 1'b0;
    end else begin
      unique case (phase)
        PH_LOAD, PH_KEYEXP, PH_ADDKEY, PH_INVKEY_A, PH_INVKEY_B, PH_DATA: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) begin
            unique case (phase)
              PH_LOAD:     phase <= PH_KEYEXP;
              PH_KEYEXP:   phase <= rc_last ? PH_ADDKEY : PH_KEYEXP;
              PH_ADDKEY:   phase <= PH_INVKEY_A;
              PH_INVKEY_A: phase <= PH_INVKEY_B;
              PH_INVKEY_B: phase <= PH_SHIFT;
              default:     phase <= PH_DRAIN;   // PH_DATA
            endcase
          end
        end
        PH_SHIFT: phase <= PH_DATA;
        PH_DRAIN: begin
          dcnt <= dcnt + 2'd1;
          if (dcnt == 2'd3) begin
            if (rc_first) begin
              phase <= PH_DONE;
              done  <= 1'b1;
            end else begin
              phase <= PH_INVKEY_A;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign pos      = (phase == PH_DRAIN) ? dcnt : cnt[1:0];
  assign state_ce = phase inside {PH_LOAD, PH_ADDKEY, PH_SHIFT, PH_DATA, PH_DRAIN};
  assign mix_ce   = phase inside {PH_DATA, PH_DRAIN};
  // In decryption the key byte is added before InvMix-Columns, so the key
  // rotates in step with the state bytes, during DATA.
  assign key_ce   = phase inside {PH_LOAD, PH_KEYEXP, PH_ADDKEY, PH_INVKEY_A,
                                  PH_INVKEY_B, PH_DATA};
  assign dly_ce   = (phase == PH_INVKEY_A);
  assign rcon_ce  = (phase == PH_LOAD && cnt == 4'd0) ||
                    (phase == PH_KEYEXP && cnt == 4'd15 && !rc_last) ||
                    (phase == PH_DRAIN && dcnt == 2'd3 && !rc_first);
  assign rcon_op  = (phase == PH_LOAD)   ? RC_INIT :
                    (phase == PH_KEYEXP) ? RC_NEXT : RC_PREV;
  assign out_we   = rc_first && ((phase == PH_DATA && cnt >= 4'd4) || phase == PH_DRAIN);
endmodule
