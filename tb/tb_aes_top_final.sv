// tb_aes_top_final: end-to-end test of the whole design at its only size
// (AES-128). Random blocks and keys, plus the FIPS-197 vector, are encrypted
// and then decrypted by the chained units while en is switched on and off.
// For every block: enc_data must equal the reference ciphertext, dec_data
// must give back the plaintext, and the enabled-clock counts ld->enc_done
// and enc_done->dec_done must be 386 and 1+722.
// It also counts how often each mechanism of the design happened and fails
// if one never did: module-level clock gating (en low), State-Register and
// Mix-Columns clocks stopped during key expansion, ShiftRows and
// InvShiftRows by wiring, the final round without MixColumns on both sides,
// the forward and inverse on-the-fly key expansion, the decryptor started by
// enc_done, and a restart by ld in the middle of an encryption.
module tb_aes_top_final;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  logic clk = 0, en = 0, rst = 1, ld = 0;
  logic [127:0] key, text_in, enc_data, dec_data;
  logic enc_done, dec_done;
  int checks = 0, failures = 0;

  aes_top_final dut (.*);

  always #5 clk = ~clk;

  // Mechanism counters, sampled on every enabled clock.
  int n_gated, n_kx_stopped, n_sr, n_isr, n_enc_bypass, n_dec_bypass;
  int n_fwd_kx, n_inv_kx, n_dec_start, n_restart;
  initial begin
    n_gated = 0; n_kx_stopped = 0; n_sr = 0; n_isr = 0; n_enc_bypass = 0;
    n_dec_bypass = 0; n_fwd_kx = 0; n_inv_kx = 0; n_dec_start = 0; n_restart = 0;
  end
  always @(posedge clk) begin
    if (!rst && !en) n_gated++;
    if (!rst && en) begin
      if (dut.u_enc.u_core.phase == PH_KEYEXP && !dut.u_enc.u_core.state_ce
          && !dut.u_enc.u_core.mix_ce) n_kx_stopped++;
      if (dut.u_enc.u_core.phase == PH_SHIFT) n_sr++;
      if (dut.u_dec.u_core.phase == PH_SHIFT) n_isr++;
      if (dut.u_enc.u_core.phase == PH_DATA && dut.u_enc.u_core.rc == 8'h36) n_enc_bypass++;
      if (dut.u_dec.u_core.phase == PH_DATA && dut.u_dec.u_core.rc == 8'h01) n_dec_bypass++;
      if (dut.u_enc.u_core.phase == PH_KEYEXP || dut.u_dec.u_core.phase == PH_KEYEXP) n_fwd_kx++;
      if (dut.u_dec.u_core.phase inside {PH_INVKEY_A, PH_INVKEY_B}) n_inv_kx++;
      if (dut.dec_ld) n_dec_start++;
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step();
    en = ($urandom_range(0, 4) != 0);
    @(negedge clk);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run(blk k, blk p, bit restart);
    automatic blk exp_ct = encrypt(p, k);
    automatic int e_cyc = 0, d_cyc = 0;
    if (restart) begin
      // start a block with another plaintext, then restart mid-way
      @(negedge clk);
      en = 1; key = k; text_in = ~p; ld = 1;
      @(negedge clk);
      ld = 0;
      repeat (100) step();
      n_restart++;
    end
    @(negedge clk);
    en = 1; key = k; text_in = p; ld = 1;
    @(negedge clk);
    ld = 0;
    while (!enc_done && e_cyc < 3000) begin
      step();
      if (en) e_cyc++;
    end
    // enc_done is seen here; count enabled clocks until dec_done
    while (!dec_done || d_cyc == 0) begin
      step();
      if (en) d_cyc++;
      if (d_cyc > 3000) break;
    end
    checks += 2;
    if (enc_data !== exp_ct) begin
      failures++;
      $display("FAIL enc_data %h exp %h", enc_data, exp_ct);
    end
    if (dec_data !== p) begin
      failures++;
      $display("FAIL dec_data %h exp %h", dec_data, p);
    end
    expect_eq("enabled clocks ld->enc_done", e_cyc, 386);
    expect_eq("enabled clocks enc_done->dec_done", d_cyc, 723);
  endtask

  task automatic expect_seen(string what, int n);
    checks++;
    $display("mechanism %-40s %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    key = '0; text_in = '0;
    repeat (2) @(negedge clk);
    en = 1;
    @(negedge clk);
    rst = 0;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff, 0);
    for (int i = 0; i < 6; i++) run(rand_blk(), rand_blk(), i == 2);
    expect_seen("module clock gated (en low)", n_gated);
    expect_seen("state/mix clocks stopped in key expansion", n_kx_stopped);
    expect_seen("ShiftRows by wiring", n_sr);
    expect_seen("InvShiftRows by wiring", n_isr);
    expect_seen("last round without MixColumns (enc)", n_enc_bypass);
    expect_seen("last round without InvMixColumns (dec)", n_dec_bypass);
    expect_seen("forward key expansion clocks", n_fwd_kx);
    expect_seen("inverse key expansion clocks", n_inv_kx);
    expect_seen("decryptor started by enc_done", n_dec_start);
    expect_seen("restart by ld mid-operation", n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
