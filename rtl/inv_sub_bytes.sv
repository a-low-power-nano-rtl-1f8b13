// inv_sub_bytes: the AES inverse S-box, one byte in, one byte out,
// combinational. A 256-entry lookup table computed at elaboration as the
// inverse permutation of the forward S-box (aes_pkg::inv_sbox_table()).
// Used by the round datapath of the decryption core.
// The inverse S-box is named in the published algorithm only; the table
// form matches the forward S-box.
module inv_sub_bytes
  import aes_pkg::*;
(
  input  byte_t din,
  output byte_t dout
);
  localparam table_t INV_SBOX = inv_sbox_table();
  assign dout = INV_SBOX[din];
endmodule
