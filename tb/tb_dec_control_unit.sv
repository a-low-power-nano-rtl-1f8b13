// tb_dec_control_unit: runs the decryption sequencer with a behavioural
// RCON model and counts, from ld to done, the clocks of each phase and
// clock enable, against numbers worked out from the schedule (16 load,
// 10 x 16 forward key expansion, 16 AddRoundKey, then per round 16 + 16
// inverse key expansion, 1 InvShiftRows, 16 data, 4 drain): 722 clocks,
// State-Register enabled 242, Mix-Columns 200, Key-Register 672, delay line
// 160, RCON 19 (1 init, 9 forward, 9 back), output 16. Checks that RCON runs
// 01..36 and back to 01, and that the State-Register and Mix-Columns clocks
// are stopped during every key-expansion clock.
module tb_dec_control_unit;
  import aes_pkg::*;
  logic clk = 0, rst = 1, ld = 0;
  logic [7:0] rc = 8'h00;
  phase_e phase;
  logic [3:0] cnt;
  logic [1:0] pos, rcon_op;
  logic state_ce, mix_ce, key_ce, dly_ce, rcon_ce, out_we, done;
  int checks = 0, failures = 0;

  dec_control_unit dut (
    .clk, .rst, .ld, .rc_first(rc == 8'h01), .rc_last(rc == 8'h36),
    .phase, .cnt, .pos, .state_ce, .mix_ce, .key_ce, .dly_ce, .rcon_ce,
    .rcon_op, .out_we, .done
  );

  always #5 clk = ~clk;

  always_ff @(posedge clk) begin
    if (rcon_ce) begin
      case (rcon_op)
        2'd0: rc <= 8'h01;
        2'd1: rc <= {rc[6:0], 1'b0} ^ (rc[7] ? 8'h1b : 8'h00);
        default: rc <= {1'b0, rc[7:1]} ^ (rc[0] ? 8'h8d : 8'h00);
      endcase
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_state, n_mix, n_key, n_dly, n_rcon, n_out, n_kx, n_kx_bad, n_cyc, max_rc_seen;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 2; rep++) begin
      @(negedge clk); ld = 1; @(negedge clk); ld = 0;
      n_state = 0; n_mix = 0; n_key = 0; n_dly = 0; n_rcon = 0; n_out = 0;
      n_kx = 0; n_kx_bad = 0; n_cyc = 0; max_rc_seen = 0;
      while (!done && n_cyc < 2000) begin
        n_cyc++;
        n_state += int'(state_ce);
        n_mix   += int'(mix_ce);
        n_key   += int'(key_ce);
        n_dly   += int'(dly_ce);
        n_rcon  += int'(rcon_ce);
        n_out   += int'(out_we);
        if (phase inside {PH_KEYEXP, PH_INVKEY_A, PH_INVKEY_B}) begin
          n_kx++;
          if (state_ce || mix_ce) n_kx_bad++;
        end
        if (phase == PH_ADDKEY && rc == 8'h36) max_rc_seen++;
        @(negedge clk);
      end
      expect_eq("clocks ld->done", n_cyc, 722);
      expect_eq("State-Register enabled", n_state, 242);
      expect_eq("Mix-Columns enabled", n_mix, 200);
      expect_eq("Key-Register enabled", n_key, 672);
      expect_eq("delay line enabled", n_dly, 160);
      expect_eq("RCON enabled", n_rcon, 19);
      expect_eq("output bytes", n_out, 16);
      expect_eq("key-expansion clocks", n_kx, 480);
      expect_eq("key-expansion clocks with state/mix clock on", n_kx_bad, 0);
      expect_eq("AddRoundKey clocks with RCON 36", max_rc_seen, 16);
      expect_eq("final rcon", int'(rc), 'h01);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
