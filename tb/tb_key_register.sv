// tb_key_register: shifts random keys into the Key-Register and checks
// Out 1 (head) and the three Out 2 taps (registers 12, 13, 9) against a
// model of the register contents, including rotation (Out 1 fed back), after
// which the key must be back in place after 16 clocks.
module tb_key_register;
  import aes_ref_pkg::*;
  logic clk = 0;
  u8 din = 0, out1, out2;
  logic [1:0] tap_sel = 0;
  u8 model [16];
  int checks = 0, failures = 0;

  key_register dut (.clk, .din, .tap_sel, .out1, .out2);

  task automatic tick();
    #5 clk = 1;
    for (int i = 0; i < 15; i++) model[i] = model[i+1];
    model[15] = din;
    #5 clk = 0;
  endtask

  task automatic check_taps();
    automatic int pos [3] = '{12, 13, 9};
    #1;
    checks++;
    if (out1 !== model[0]) begin
      failures++;
      $display("FAIL out1 %h exp %h", out1, model[0]);
    end
    for (int s = 0; s < 3; s++) begin
      tap_sel = 2'(s);
      #1;
      checks++;
      if (out2 !== model[pos[s]]) begin
        failures++;
        $display("FAIL tap %0d: %h exp %h", s, out2, model[pos[s]]);
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 10; t++) begin
      automatic blk k = rand_blk();
      for (int i = 0; i < 16; i++) begin
        din = get(k, i);
        tick();
      end
      check_taps();
      // rotate: the key must come back to the same place
      for (int i = 0; i < 16; i++) begin
        checks++;
        if (out1 !== get(k, i)) begin
          failures++;
          $display("FAIL rotation byte %0d", i);
        end
        din = out1;
        tick();
        check_taps();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
