// mix_columns: MixColumns (INV=0) or InvMixColumns (INV=1) with an 8-bit
// input and an 8-bit output.
//
// The four bytes of a column arrive on consecutive clocks, row 0 first; pos
// (0..3) gives the row of the byte on din. Each byte a_j is multiplied by
// the four matrix coefficients of its column j and added into four
// accumulators, out_i = sum_j M[i][j]*a_j, with M[i][j] = {2,3,1,1}[(j-i)%4]
// forward and {14,11,13,9}[(j-i)%4] inverse. When the fourth byte is in,
// the accumulators move to an output buffer, from which the column is sent
// out one byte per clock, row 0 first, while the next column accumulates.
// Latency is therefore exactly four clocks: the byte entering with pos=p of
// column c leaves with pos=p of column c+1. With bypass=1 the byte is only
// delayed by the same four clocks (last round, which skips MixColumns).
// Runs on a gated clock; pos=0 overwrites the accumulators, so no reset or
// clear is needed.
// The 8-bit input and output follow the published design; the accumulator
// structure and the inverse variant (INV) are this implementation's.
module mix_columns
  import aes_pkg::*;
#(
  parameter bit INV = 1'b0
) (
  input  logic       clk,
  input  logic [1:0] pos,
  input  logic       bypass,
  input  byte_t      din,
  output byte_t      dout
);
  byte_t acc  [4];
  byte_t obuf [4];
  byte_t acc_next [4];

  function automatic byte_t coef(logic [1:0] k);
    if (INV) begin
      unique case (k)
        2'd0: return 8'h0e;
        2'd1: return 8'h0b;
        2'd2: return 8'h0d;
        default: return 8'h09;
      endcase
    end else begin
      unique case (k)
        2'd0: return 8'h02;
        2'd1: return 8'h03;
        default: return 8'h01;
      endcase
    end
  endfunction

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      byte_t term;
      if (bypass) term = (pos == 2'(i)) ? din : 8'h00;
      else        term = gf_mul(din, coef(pos - 2'(i)));
      acc_next[i] = (pos == 2'd0) ? term : acc[i] ^ term;
    end
  end

  always_ff @(posedge clk) begin
    acc <= acc_next;
    if (pos == 2'd3) obuf <= acc_next;
  end

  assign dout = obuf[pos];
endmodule
