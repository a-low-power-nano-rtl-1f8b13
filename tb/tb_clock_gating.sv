// tb_clock_gating: checks the clock gate cycle by cycle. A random enable is
// changed while clk is low (as a flop on clk would change it); every clk
// period, gclk must pulse exactly when en was high, must never be high while
// clk is low, and must not react to en changing while clk is high.
module tb_clock_gating;
  logic clk = 0, en = 0, gclk;
  int checks = 0, failures = 0;
  int gedges = 0, expected = 0;

  clock_gating dut (.clk, .en, .gclk);

  always @(posedge gclk) gedges++;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cyc = 0; cyc < 400; cyc++) begin
      logic e;
      e = 1'($urandom_range(0, 1));
      #2 en = e;                        // clk low: enable changes
      #3 clk = 1;                       // rising edge
      if (e) expected++;
      #1;
      checks++;
      if (gclk !== e) begin
        failures++;
        $display("FAIL cycle %0d: gclk=%b en=%b", cyc, gclk, e);
      end
      en = ~e;                          // glitch on en while clk high
      #1;
      checks++;
      if (gclk !== e) begin
        failures++;
        $display("FAIL cycle %0d: gclk followed en while clk high", cyc);
      end
      #3 clk = 0;
      #1;
      checks++;
      if (gclk !== 1'b0) begin
        failures++;
        $display("FAIL cycle %0d: gclk high while clk low", cyc);
      end
    end
    checks++;
    if (gedges != expected) begin
      failures++;
      $display("FAIL %0d gated edges, expected %0d", gedges, expected);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
