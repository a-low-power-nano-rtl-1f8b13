// sub_bytes: the AES S-box, one byte in, one byte out, purely combinational.
//
// Implemented as a 256-entry lookup table, the straightforward form of the
// block. The table is computed at elaboration by aes_pkg::sbox_table() from
// the S-box definition (GF(2^8) inverse, then the affine map), not typed in.
// One instance of this block is shared by the round datapath and the key
// expansion of the encryption core; the decryption core uses one for its key
// expansion only.
// Sharing one S-box and its lookup-table form follow the published design;
// generating the table from the definition is this implementation's.
module sub_bytes
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);
  localparam table_t SBOX = sbox_table();
  assign dout = SBOX[din];
endmodule
