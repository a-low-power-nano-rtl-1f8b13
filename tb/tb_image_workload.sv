// tb_image_workload: image cryptography workload on the full design. A
// 256 x 256 colour test image is generated (R = x, G = y, B = x XOR y),
// converted to 8-bit grey (Y = (77 R + 150 G + 29 B) / 256), and its
// 65536 grey bytes are sent row by row as 4096 AES-128 blocks through
// aes_top_final: each block is encrypted, the decryptor restores it from the
// ciphertext, and the restored image must equal the original byte for byte.
// Ciphertext blocks are compared with the reference model. Blocks overlap:
// the next block is loaded 340 clocks after enc_done, so its encryption
// runs while the decryptor still works and ends just after the decryptor
// has finished (386 + 341 > 723).
module tb_image_workload;
  import aes_ref_pkg::*;

  localparam int W = 256, H = 256;
  localparam int NBLK = W * H / 16;
  localparam int GAP = 340;

  logic clk = 0, en = 1, rst = 1, ld = 0;
  logic [127:0] key, text_in, enc_data, dec_data;
  logic enc_done, dec_done;
  int checks = 0, failures = 0;

  aes_top_final dut (.*);

  always #5 clk = ~clk;

  u8 grey [W*H];
  u8 restored [W*H];
  blk expect_q [$];
  int n_dec = 0;
  longint cycles = 0;

  always @(posedge clk) cycles++;

  initial begin
    repeat (NBLK * 800 + 10000) @(posedge clk);
    failures++;
    $display("watchdog expired after %0d blocks", n_dec);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic blk pixels(int b);
    blk v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = grey[16*b + i];
    return v;
  endfunction

  // Decryptor side: collect each restored block when dec_done rises.
  logic dec_done_q = 0;
  always @(posedge clk) begin
    dec_done_q <= dec_done;
    if (dec_done && !dec_done_q && !rst) begin
      automatic blk got = dec_data;
      for (int i = 0; i < 16; i++) restored[16*n_dec + i] = got[127 - 8*i -: 8];
      n_dec++;
    end
  end

  initial begin
    int diff, same_ct;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        automatic int r = x;
        automatic int g = y;
        automatic int b = x ^ y;
        grey[y*W + x] = u8'((77*r + 150*g + 29*b) >> 8);
      end
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    text_in = '0;
    repeat (3) @(negedge clk);
    rst = 0;
    same_ct = 0;
    for (int b = 0; b < NBLK; b++) begin
      automatic blk p = pixels(b);
      @(negedge clk);
      text_in = p; ld = 1;
      @(negedge clk);
      ld = 0;
      while (!enc_done) @(negedge clk);
      checks++;
      if (enc_data !== encrypt(p, key)) begin
        failures++;
        if (failures < 10) $display("FAIL ciphertext of block %0d", b);
      end
      if (enc_data == p) same_ct++;
      repeat (GAP) @(negedge clk);
    end
    while (n_dec < NBLK) @(negedge clk);
    diff = 0;
    for (int i = 0; i < W*H; i++) if (restored[i] !== grey[i]) diff++;
    checks++;
    if (diff != 0) begin
      failures++;
      $display("FAIL %0d pixels differ after decryption", diff);
    end
    checks++;
    if (same_ct != 0) begin
      failures++;
      $display("FAIL %0d blocks left unencrypted", same_ct);
    end
    $display("image %0dx%0d: %0d blocks, %0d clocks (%0d per block)", W, H, NBLK, cycles, cycles / NBLK);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
