// tb_inv_sub_bytes: exhaustive check of the inverse S-box against the reference inverse
// (generated differently, see aes_ref_pkg) and FIPS-197 spot values.
module tb_inv_sub_bytes;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  inv_sub_bytes dut (.din, .dout);

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
      if (dout !== is[i]) begin
        failures++;
        $display("FAIL S(%h) = %h, expected %h", din, dout, is[i]);
      end
    end
    // Published values: InvS(63)=00, InvS(ed)=53, InvS(16)=ff.
    din = 8'h63; #1; checks++; if (dout !== 8'h00) failures++;
    din = 8'hed; #1; checks++; if (dout !== 8'h53) failures++;
    din = 8'h16; #1; checks++; if (dout !== 8'hff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
