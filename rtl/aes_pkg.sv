// aes_pkg: types, constants and arithmetic shared by the byte-serial AES-128
// encryption and decryption cores.
//
// The AES field is GF(2^8) with reduction polynomial x^8+x^4+x^3+x+1 (0x11B).
// The S-box tables are not typed in: sbox_table() builds them at elaboration
// from their definition (multiplicative inverse followed by the affine map
// b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63), and
// inv_sbox_table() inverts that table. Synthesis turns either into a 256x8
// lookup table, which is how the S-box is implemented in this design.
//
// Byte order everywhere: a 128-bit block is bytes 0..15 with byte 0 in bits
// [127:120]; byte i of the AES state sits in row i%4, column i/4 (FIPS-197).
package aes_pkg;

  typedef logic [7:0] byte_t;
  typedef byte_t      block_t [16];

  localparam int unsigned NB_BYTES = 16;   // bytes per block and per round key
  localparam byte_t       RCON_FIRST = 8'h01;
  localparam byte_t       RCON_LAST  = 8'h36; // round constant of round 10

  // Phases of the byte-serial cores. Shared by both control units.
  typedef enum logic [3:0] {
    PH_IDLE,      // waiting for ld
    PH_LOAD,      // 16 cycles: block and key shifted in byte by byte
    PH_KEYEXP,    // 16 cycles: forward key expansion in the Key-Register
    PH_ADDKEY,    // 16 cycles: AddRoundKey only (decryption, first step)
    PH_INVKEY_A,  // 16 cycles: inverse key expansion, words 1..3
    PH_INVKEY_B,  // 16 cycles: inverse key expansion, word 0
    PH_SHIFT,     // 1 cycle : (Inv)ShiftRows by wiring in the State-Register
    PH_DATA,      // 16 cycles: state bytes streamed through the round datapath
    PH_DRAIN,     // 4 cycles : last Mix-Columns outputs written back
    PH_DONE       // result held on the output
  } phase_e;

  // Out 2 tap of the Key-Register (see key_register).
  localparam logic [1:0] TAP_PREV = 2'd0;  // register 12
  localparam logic [1:0] TAP_W3   = 2'd1;  // register 13
  localparam logic [1:0] TAP_W3R  = 2'd2;  // register 9

  // Operations of the RCON register (see rcon).
  localparam logic [1:0] RC_INIT = 2'd0;
  localparam logic [1:0] RC_NEXT = 2'd1;
  localparam logic [1:0] RC_PREV = 2'd2;

  // Multiply by x in GF(2^8).
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // Divide by x in GF(2^8): inverse of xtime (walks the round constants back).
  function automatic byte_t inv_xtime(byte_t a);
    return {1'b0, a[7:1]} ^ (a[0] ? 8'h8d : 8'h00);
  endfunction

  // General GF(2^8) product, shift-and-add.
  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  // Forward S-box entry from its definition: inverse (a^254, 0 -> 0), then affine map.
  function automatic byte_t sbox_entry(byte_t a);
    byte_t inv = 8'h01;
    byte_t sq  = a;
    // a^254 = a^(2+4+8+16+32+64+128)
    for (int i = 1; i < 8; i++) begin
      sq  = gf_mul(sq, sq);
      inv = gf_mul(inv, sq);
    end
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  typedef byte_t table_t [256];

  function automatic table_t sbox_table();
    table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_entry(byte_t'(i));
    return t;
  endfunction

  function automatic table_t inv_sbox_table();
    table_t t;
    for (int i = 0; i < 256; i++) t[sbox_entry(byte_t'(i))] = byte_t'(i);
    return t;
  endfunction

  // Source index of ShiftRows: new[r+4c] = old[r+4((c+r)%4)].
  // InvShiftRows:              new[r+4c] = old[r+4((c-r)%4)].
  function automatic int unsigned shift_rows_src(int unsigned i, bit inverse);
    int unsigned r = i % 4;
    int unsigned c = i / 4;
    return inverse ? r + 4 * ((c + 4 - r) % 4) : r + 4 * ((c + r) % 4);
  endfunction

endpackage
