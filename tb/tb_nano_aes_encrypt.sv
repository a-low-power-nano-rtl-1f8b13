// tb_nano_aes_encrypt: encrypts random blocks through the clock-gated
// encryption unit while en is switched on and off at random. Results must
// match the reference model, and done must rise after exactly 386 enabled
// clocks, however many disabled clocks were mixed in (with en low the unit
// must stand still, outputs included).
module tb_nano_aes_encrypt;
  import aes_ref_pkg::*;
  localparam int LATENCY = 386;
  logic clk = 0, en = 0, rst = 1, ld = 0;
  logic [127:0] key, text_in, text_out;
  logic done;
  int checks = 0, failures = 0;
  int gated = 0;

  nano_aes_encrypt dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(blk k, blk p);
    automatic int enabled = 0;
    automatic blk exp_ct = encrypt(p, k);
    @(negedge clk);
    key = k; text_in = p; ld = 1; en = 1;
    @(negedge clk);
    ld = 0;
    while (!done && enabled < 2000) begin
      en = ($urandom_range(0, 3) != 0);
      if (!en) gated++;
      else     enabled++;
      @(negedge clk);
    end
    checks += 2;
    if (text_out !== exp_ct) begin
      failures++;
      $display("FAIL ct got=%h exp=%h", text_out, exp_ct);
    end
    if (enabled != LATENCY) begin
      failures++;
      $display("FAIL latency %0d enabled clocks, expected %0d", enabled, LATENCY);
    end
  endtask

  initial begin
    key = '0; text_in = '0;
    repeat (3) @(negedge clk);
    en = 1;
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 8; i++) run(rand_blk(), rand_blk());
    checks++;
    if (gated == 0) begin
      failures++;
      $display("FAIL clock never gated");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
