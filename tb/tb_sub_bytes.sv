// tb_sub_bytes: exhaustive check of the S-box against the reference S-box
// (generated differently, see aes_ref_pkg) and FIPS-197 spot values.
module tb_sub_bytes;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  sub_bytes dut (.din, .dout);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    u8 s [256], is [256];
    make_sbox(s, is);
    for (int i = 0; i < 256; i++) begin
      din = u8'(i);
      #1;
      checks++;
      if (dout !== s[i]) begin
        failures++;
        $display("FAIL S(%h) = %h, expected %h", din, dout, s[i]);
      end
    end
    // Published values: S(00)=63, S(53)=ed, S(ff)=16.
    din = 8'h00; #1; checks++; if (dout !== 8'h63) failures++;
    din = 8'h53; #1; checks++; if (dout !== 8'hed) failures++;
    din = 8'hff; #1; checks++; if (dout !== 8'h16) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
