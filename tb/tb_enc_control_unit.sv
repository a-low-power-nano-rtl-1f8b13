// tb_enc_control_unit: runs the encryption sequencer with a behavioural
// RCON model and counts, from ld to done, the clocks of each phase and of
// each clock enable, against numbers worked out from the schedule
// (16-clock load; per round 16 key-expansion, 1 ShiftRows, 16 data, 4 drain
// clocks; 10 rounds): 386 clocks in all, State-Register enabled 226 clocks,
// Mix-Columns 200, Key-Register 336, RCON 10, output 16. It also checks that
// the State-Register and Mix-Columns clocks are stopped through every
// key-expansion clock and that pos counts 0..3 through data and drain. A
// second ld in mid-operation must restart the sequence.
module tb_enc_control_unit;
  import aes_pkg::*;
  logic clk = 0, rst = 1, ld = 0;
  logic [7:0] rc = 8'h00;
  phase_e phase;
  logic [3:0] cnt;
  logic [1:0] pos, rcon_op;
  logic state_ce, mix_ce, key_ce, rcon_ce, out_we, done;
  int checks = 0, failures = 0;

  enc_control_unit dut (
    .clk, .rst, .ld, .rc_last(rc == 8'h36), .phase, .cnt, .pos,
    .state_ce, .mix_ce, .key_ce, .rcon_ce, .rcon_op, .out_we, .done
  );

  always #5 clk = ~clk;

  // Behavioural RCON register.
  always_ff @(posedge clk) begin
    if (rcon_ce) begin
      case (rcon_op)
        2'd0: rc <= 8'h01;
        2'd1: rc <= {rc[6:0], 1'b0} ^ (rc[7] ? 8'h1b : 8'h00);
        default: rc <= 8'hxx;
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
    int n_state, n_mix, n_key, n_rcon, n_out, n_kx, n_kx_bad, n_cyc, n_pos_bad, stream;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int rep = 0; rep < 3; rep++) begin
      if (rep == 1) begin
        // restart in the middle of an operation
        @(negedge clk); ld = 1; @(negedge clk); ld = 0;
        repeat (150) @(negedge clk);
      end
      @(negedge clk); ld = 1; @(negedge clk); ld = 0;
      n_state = 0; n_mix = 0; n_key = 0; n_rcon = 0; n_out = 0;
      n_kx = 0; n_kx_bad = 0; n_cyc = 0; n_pos_bad = 0; stream = 0;
      while (!done && n_cyc < 1000) begin
        n_cyc++;
        n_state += int'(state_ce);
        n_mix   += int'(mix_ce);
        n_key   += int'(key_ce);
        n_rcon  += int'(rcon_ce);
        n_out   += int'(out_we);
        if (phase == PH_KEYEXP) begin
          n_kx++;
          if (state_ce || mix_ce) n_kx_bad++;
        end
        if (phase inside {PH_DATA, PH_DRAIN}) begin
          if (pos != 2'(stream)) n_pos_bad++;
          stream++;
        end
        @(negedge clk);
      end
      expect_eq("clocks ld->done", n_cyc, 386);
      expect_eq("State-Register enabled", n_state, 226);
      expect_eq("Mix-Columns enabled", n_mix, 200);
      expect_eq("Key-Register enabled", n_key, 336);
      expect_eq("RCON enabled", n_rcon, 10);
      expect_eq("output bytes", n_out, 16);
      expect_eq("key-expansion clocks", n_kx, 160);
      expect_eq("key-expansion clocks with state/mix clock on", n_kx_bad, 0);
      expect_eq("pos errors", n_pos_bad, 0);
      expect_eq("final rcon", int'(rc), 'h36);
      repeat (5) @(negedge clk);
      checks++;
      if (!done || phase != PH_DONE || state_ce || key_ce || mix_ce) begin
        failures++;
        $display("FAIL not idle in DONE");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
