// enc_control_unit: sequencer of the byte-serial AES-128 encryption core.
//
// Its counters are one 4-bit counter (byte within a 16-cycle pass) and one
// 2-bit counter (the four drain cycles of the Mix-Columns pipeline); the
// round number is read from the RCON register (rc_last = constant 36, round
// 10). Sequence after ld:
//   LOAD   16 cycles  plaintext XOR key into the State-Register, key into the
//                     Key-Register, RCON := 01
//   then per round (10 times):
//   KEYEXP 16 cycles  next round key computed in place; State-Register and
//                     Mix-Columns clocks stopped
//   SHIFT   1 cycle   ShiftRows by wiring in the State-Register
//   DATA   16 cycles  state bytes through Sub-Bytes, Mix-Columns, key XOR
//   DRAIN   4 cycles  last four results written back (Mix-Columns latency)
//   after round 10: DONE, result held, done = 1 until the next ld.
// Total from ld to done: 16 + 10*37 = 386 clocks.
// Outputs are Moore functions of phase and counters: the clock enables of
// the four gated register groups, and the datapath selects.
// ld is accepted in any phase and restarts the core. rst is asynchronous.
// The 4-bit and 2-bit counters follow the published design; the phases
// and the use of RCON as round counter are this implementation's. rcon_op[1]
// is always 0 here: encryption never steps RCON backwards.
module enc_control_unit
  import aes_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic       ld,
  input  logic       rc_last,     // RCON holds the constant of round 10
  output phase_e     phase,
  output logic [3:0] cnt,         // byte counter of a 16-cycle pass
  output logic [1:0] pos,         // row of the byte entering Mix-Columns
  output logic       state_ce,    // clock enable, State-Register
  output logic       mix_ce,      // clock enable, Mix-Columns registers
  output logic       key_ce,      // clock enable, Key-Register
  output logic       rcon_ce,     // clock enable, RCON register
  output logic [1:0] rcon_op,
  output logic       out_we,      // a ciphertext byte is on the datapath output
  output logic       done
);
  logic [1:0] dcnt;   // 2-bit counter of the drain cycles

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
        PH_LOAD, PH_KEYEXP: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) phase <= (phase == PH_LOAD) ? PH_KEYEXP : PH_SHIFT;
        end
        PH_SHIFT: phase <= PH_DATA;
        PH_DATA: begin
          cnt <= cnt + 4'd1;
          if (cnt == 4'd15) phase <= PH_DRAIN;
        end
        PH_DRAIN: begin
          dcnt <= dcnt + 2'd1;
          if (dcnt == 2'd3) begin
            if (rc_last) begin
              phase <= PH_DONE;
              done  <= 1'b1;
            end else begin
              phase <= PH_KEYEXP;
            end
          end
        end
        default: ;
      endcase
    end
  end

  assign pos      = (phase == PH_DRAIN) ? dcnt : cnt[1:0];
  assign state_ce = phase inside {PH_LOAD, PH_SHIFT, PH_DATA, PH_DRAIN};
  assign mix_ce   = phase inside {PH_DATA, PH_DRAIN};
  // The key rotates while the Mix-Columns results meet it: 4 clocks after
  // the first state byte leaves, for 16 clocks.
  assign key_ce   = phase inside {PH_LOAD, PH_KEYEXP, PH_DRAIN} ||
                    (phase == PH_DATA && cnt >= 4'd4);
  assign rcon_ce  = (phase == PH_LOAD && cnt == 4'd0) ||
                    (phase == PH_DRAIN && dcnt == 2'd3 && !rc_last);
  assign rcon_op  = (phase == PH_LOAD) ? RC_INIT : RC_NEXT;
  assign out_we   = rc_last && ((phase == PH_DATA && cnt >= 4'd4) || phase == PH_DRAIN);
endmodule
