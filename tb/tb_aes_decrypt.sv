// tb_aes_decrypt: self-checking test of the AES-128 decryption core.
// Checks the FIPS-197 Appendix C.1 vector, then random blocks and keys
// against the reference model, and that done rises exactly 722 clocks
// after ld. Also checks that text_out holds between operations.
module tb_aes_decrypt;
  import aes_ref_pkg::*;

  localparam int LATENCY = 722;

  logic clk = 0, rst = 1, ld = 0;
  logic [127:0] key, text_in, text_out;
  logic done;
  int checks = 0, failures = 0;

  aes_decrypt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(blk k, blk p);
    int cycles = 0;
    blk exp_ct = decrypt(p, k);
    @(negedge clk);
    key = k; text_in = p; ld = 1;
    @(negedge clk);
    ld = 0;
    while (!done) begin
      @(negedge clk);
      cycles++;
    end
    checks += 2;
    if (text_out !== exp_ct) begin
      failures++;
      $display("FAIL ct: pt=%h key=%h got=%h exp=%h", p, k, text_out, exp_ct);
    end
    if (cycles != LATENCY) begin
      failures++;
      $display("FAIL latency: %0d clocks, expected %0d", cycles, LATENCY);
    end
    // Result must be held while idle.
    repeat (7) @(negedge clk);
    checks++;
    if (!done || text_out !== exp_ct) begin
      failures++;
      $display("FAIL result not held");
    end
  endtask

  initial begin
    // Reference self-check against the published vectors.
    checks++;
    if (encrypt(128'h00112233445566778899aabbccddeeff, 128'h000102030405060708090a0b0c0d0e0f)
        !== 128'h69c4e0d86a7b0430d8cdb78070b4c55a) begin
      failures++;
      $display("FAIL reference model");
    end
    key = '0; text_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    run(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff);
    run(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734);
    for (int i = 0; i < 20; i++) run(rand_blk(), rand_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
