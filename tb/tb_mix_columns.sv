// tb_mix_columns: streams random blocks, one byte per clock, through the
// forward and inverse 8-bit Mix-Columns units, and checks every output byte
// against the reference (Inv)MixColumns of the block exactly four clocks
// after the matching input byte. Blocks alternate with bypass blocks, whose
// bytes must come out unchanged, also four clocks later.
module tb_mix_columns;
  import aes_ref_pkg::*;
  logic clk = 0, bypass = 0;
  logic [1:0] pos = 0;
  u8 din = 0, dout_f, dout_i;
  int checks = 0, failures = 0;

  mix_columns #(.INV(1'b0)) dut_f (.clk, .pos, .bypass, .din, .dout(dout_f));
  mix_columns #(.INV(1'b1)) dut_i (.clk, .pos, .bypass, .din, .dout(dout_i));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk b [40];
    logic byp [40];
    for (int t = 0; t < 40; t++) begin
      b[t] = rand_blk();
      byp[t] = (t % 4 == 3);
    end
    // 40 blocks back to back, plus 4 clocks to drain; output of stream
    // byte n is checked in the clock of stream byte n+4.
    for (int n = 0; n < 40*16 + 4; n++) begin
      automatic int t = n / 16;
      automatic int i = n % 16;
      automatic int tp = (n - 4) / 16;
      automatic int ip = (n - 4) % 16;
      pos = 2'(n % 4);
      if (t < 40) begin
        din = get(b[t], i);
        bypass = byp[t];
      end
      #1;
      if (n >= 4) begin
        automatic u8 ef = byp[tp] ? get(b[tp], ip) : get(mix_cols(b[tp], 0), ip);
        automatic u8 ei = byp[tp] ? get(b[tp], ip) : get(mix_cols(b[tp], 1), ip);
        checks += 2;
        if (dout_f !== ef) begin
          failures++;
          $display("FAIL MixColumns block %0d byte %0d: %h exp %h", tp, ip, dout_f, ef);
        end
        if (dout_i !== ei) begin
          failures++;
          $display("FAIL InvMixColumns block %0d byte %0d: %h exp %h", tp, ip, dout_i, ei);
        end
      end
      #4 clk = 1;
      #5 clk = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
