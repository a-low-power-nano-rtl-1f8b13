// aes_top_final: encryption and decryption of AES-128 blocks side by side,
// the encryptor's ciphertext feeding the decryptor.
//
// nano_aes_encrypt encrypts text_in with key; enc_data is the ciphertext and
// enc_done marks it valid. The rising edge of enc_done starts
// nano_aes_decrypt on enc_data with the same key, and dec_data / dec_done
// give back the plaintext. Both units share clk, en (module-level clock
// gate), rst (asynchronous, active high) and key.
//
// Timing: pulse ld for one clock with text_in and key valid; keep them valid
// for 16 more clocks. enc_done rises 386 enabled clocks after ld, dec_done
// 1 + 722 enabled clocks after that. The next ld may follow enc_done at any
// time once the decryptor has loaded (17 clocks), since the ciphertext held
// on enc_data only changes in the last round of the next block.
// The two clock-gated units and the ciphertext bus from the encryptor to the
// decryptor follow the published top-level schematic; starting the decryptor
// from the rising edge of enc_done is this implementation's choice. A new
// enc_done restarts the decryptor, so for every block to be recovered the
// next ld should come at least 337 clocks after enc_done.
module aes_top_final (
  input  logic         clk,
  input  logic         en,
  input  logic         rst,
  input  logic         ld,
  input  logic [127:0] key,
  input  logic [127:0] text_in,
  output logic [127:0] enc_data,
  output logic         enc_done,
  output logic [127:0] dec_data,
  output logic         dec_done
);
  logic enc_done_q;
  logic dec_ld;

  nano_aes_encrypt u_enc (
    .clk, .en, .rst, .ld, .key, .text_in,
    .text_out (enc_data), .done(enc_done)
  );

  // Start the decryptor once per finished encryption.
  always_ff @(posedge clk or posedge rst) begin
    if (rst)     enc_done_q <= 1'b0;
    else if (en) enc_done_q <= enc_done;
  end
  assign dec_ld = enc_done & ~enc_done_q;

  nano_aes_decrypt u_dec (
    .clk, .en, .rst, .ld(dec_ld), .key, .text_in(enc_data),
    .text_out (dec_data), .done(dec_done)
  );
endmodule
