// tb_state_register: checks both variants of the State-Register (ShiftRows
// and InvShiftRows wiring). Random blocks are shifted in, permuted with
// sr_sel for one clock and shifted out; the bytes leaving the head must be
// the reference (Inv)ShiftRows of the block, in order. Also checks plain
// shifting (a block in, the same block out) and that 16 clocks move it.
module tb_state_register;
  import aes_ref_pkg::*;
  logic clk = 0;
  logic sr_sel = 0;
  u8 din = 0, dout_f, dout_i;
  int checks = 0, failures = 0;

  state_register #(.INV(1'b0)) dut_f (.clk, .sr_sel, .din, .dout(dout_f));
  state_register #(.INV(1'b1)) dut_i (.clk, .sr_sel, .din, .dout(dout_i));

  task automatic tick();
    #5 clk = 1;
    #5 clk = 0;
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 30; t++) begin
      automatic blk b = rand_blk();
      automatic blk ef = (t % 3 == 0) ? b : shift_rows(b, 0);
      automatic blk ei = (t % 3 == 0) ? b : shift_rows(b, 1);
      sr_sel = 0;
      for (int i = 0; i < 16; i++) begin
        din = get(b, i);
        tick();
      end
      if (t % 3 != 0) begin
        sr_sel = 1;
        tick();
        sr_sel = 0;
      end
      for (int i = 0; i < 16; i++) begin
        checks += 2;
        if (dout_f !== get(ef, i)) begin
          failures++;
          $display("FAIL ShiftRows byte %0d: %h exp %h", i, dout_f, get(ef, i));
        end
        if (dout_i !== get(ei, i)) begin
          failures++;
          $display("FAIL InvShiftRows byte %0d: %h exp %h", i, dout_i, get(ei, i));
        end
        din = 8'h00;
        tick();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
