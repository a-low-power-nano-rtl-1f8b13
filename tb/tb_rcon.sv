// tb_rcon: checks the RCON register: INIT gives 01, ten NEXT steps walk
// 01 02 04 08 10 20 40 80 1b 36 (FIPS-197), PREV walks back to 01, and the
// register holds when its clock does not pulse.
module tb_rcon;
  import aes_pkg::RC_INIT, aes_pkg::RC_NEXT, aes_pkg::RC_PREV;
  logic clk = 0;
  logic [1:0] op = 0;
  logic [7:0] rc;
  int checks = 0, failures = 0;
  logic [7:0] seq [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  rcon dut (.clk, .op, .rc);

  task automatic tick();
    #5 clk = 1;
    #5 clk = 0;
  endtask

  task automatic expect_rc(logic [7:0] e, string what);
    checks++;
    if (rc !== e) begin
      failures++;
      $display("FAIL %s: rc=%h exp %h", what, rc, e);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      op = RC_INIT; tick();
      expect_rc(seq[0], "init");
      for (int i = 1; i < 10; i++) begin
        op = RC_NEXT; tick();
        expect_rc(seq[i], "next");
      end
      #50 expect_rc(seq[9], "hold");
      for (int i = 8; i >= 0; i--) begin
        op = RC_PREV; tick();
        expect_rc(seq[i], "prev");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
