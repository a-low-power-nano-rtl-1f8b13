// state_register: the 16-byte AES state held as a byte-wide shift register,
// with (Inv)ShiftRows done by wiring.
//
// Register 0 is the head, whose byte feeds the datapath (dout); register 15
// is the tail, which takes the byte coming back from the datapath (din). On
// every rising edge of clk each register loads one of two inputs through a
// 2:1 multiplexer:
//   sr_sel = 0 : the next register (reg[i] <= reg[i+1], reg[15] <= din),
//   sr_sel = 1 : the register that ShiftRows (INV=0) or InvShiftRows (INV=1)
//                moves into position i, so the whole permutation takes one
//                clock and no logic beyond the multiplexers.
// There is no load enable: the register is meant to run on a gated clock
// (clock_gating), which is what holds it when the core does not use it.
// Byte i of the state is row i%4, column i/4, so 16 shifts bring a block in
// or out in FIPS-197 byte order.
// Sixteen byte registers, each with a 2:1 mux, and ShiftRows done by wiring
// follow the published design; applying the permutation in one separate
// clock and the InvShiftRows variant (INV) are this implementation's.
module state_register
  import aes_pkg::*;
#(
  parameter bit INV = 1'b0   // 0: ShiftRows wiring, 1: InvShiftRows wiring
) (
  input  logic  clk,
  input  logic  sr_sel,
  input  byte_t din,
  output byte_t dout
);
  block_t st;

  always_ff @(posedge clk) begin
    for (int i = 0; i < NB_BYTES; i++) begin
      if (sr_sel)             st[i] <= st[shift_rows_src(i, INV)];
      else if (i == NB_BYTES - 1) st[i] <= din;
      else                    st[i] <= st[i + 1];
    end
  end

  assign dout = st[0];
endmodule
