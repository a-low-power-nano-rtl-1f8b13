// aes_ref_pkg: behavioural AES-128 reference for the testbenches, written
// independently of the RTL. The S-box is generated with the multiply-by-3 /
// divide-by-3 walk over GF(2^8) (p runs through all non-zero elements as
// powers of the generator 3, q = 1/p), not with the RTL's exponentiation.
// Blocks are 128-bit vectors, byte 0 in bits [127:120].
package aes_ref_pkg;

  typedef logic [7:0]   u8;
  typedef logic [127:0] blk;

  function automatic u8 mul2(u8 a);
    return (a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic u8 mul(u8 a, u8 b);
    u8 r = 0;
    while (b != 0) begin
      if (b[0]) r ^= a;
      a = mul2(a);
      b = b >> 1;
    end
    return r;
  endfunction

  function automatic u8 rol(u8 x, int s);
    return u8'((x << s) | (x >> (8 - s)));
  endfunction

  function automatic void make_sbox(output u8 s [256], output u8 is [256]);
    u8 p = 1, q = 1;
    do begin
      p = p ^ mul2(p);                 // p *= 3
      q = q ^ (q << 1);                // q /= 3
      q = q ^ (q << 2);
      q = q ^ (q << 4);
      if (q[7]) q = q ^ 8'h09;
      s[p] = q ^ rol(q, 1) ^ rol(q, 2) ^ rol(q, 3) ^ rol(q, 4) ^ 8'h63;
    end while (p != 1);
    s[0] = 8'h63;
    for (int i = 0; i < 256; i++) is[s[i]] = u8'(i);
  endfunction

  function automatic u8 sb(u8 a);
    u8 s [256], is [256];
    make_sbox(s, is);
    return s[a];
  endfunction

  function automatic u8 isb(u8 a);
    u8 s [256], is [256];
    make_sbox(s, is);
    return is[a];
  endfunction

  function automatic u8 get(blk b, int i);
    return b[127 - 8*i -: 8];
  endfunction

  function automatic blk put(blk b, int i, u8 v);
    b[127 - 8*i -: 8] = v;
    return b;
  endfunction

  // Round keys 0..10.
  function automatic void expand(blk key, output blk rk [11]);
    logic [31:0] w [44];
    u8 s [256], is [256];
    u8 rc = 1;
    make_sbox(s, is);
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {s[t[23:16]] ^ rc, s[t[15:8]], s[t[7:0]], s[t[31:24]]};
        rc = mul2(rc);
      end
      w[i] = w[i-4] ^ t;
    end
    for (int r = 0; r < 11; r++) rk[r] = {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
  endfunction

  function automatic blk sub_all(blk b, bit inv);
    u8 s [256], is [256];
    make_sbox(s, is);
    for (int i = 0; i < 16; i++) b = put(b, i, inv ? is[get(b, i)] : s[get(b, i)]);
    return b;
  endfunction

  function automatic blk shift_rows(blk b, bit inv);
    blk o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o = put(o, r + 4*c, get(b, r + 4*(inv ? (c + 4 - r) % 4 : (c + r) % 4)));
    return o;
  endfunction

  function automatic blk mix_cols(blk b, bit inv);
    blk o;
    for (int c = 0; c < 4; c++) begin
      u8 a0 = get(b, 4*c), a1 = get(b, 4*c+1), a2 = get(b, 4*c+2), a3 = get(b, 4*c+3);
      if (!inv) begin
        o = put(o, 4*c,   mul(a0,2) ^ mul(a1,3) ^ a2 ^ a3);
        o = put(o, 4*c+1, a0 ^ mul(a1,2) ^ mul(a2,3) ^ a3);
        o = put(o, 4*c+2, a0 ^ a1 ^ mul(a2,2) ^ mul(a3,3));
        o = put(o, 4*c+3, mul(a0,3) ^ a1 ^ a2 ^ mul(a3,2));
      end else begin
        o = put(o, 4*c,   mul(a0,14) ^ mul(a1,11) ^ mul(a2,13) ^ mul(a3,9));
        o = put(o, 4*c+1, mul(a0,9) ^ mul(a1,14) ^ mul(a2,11) ^ mul(a3,13));
        o = put(o, 4*c+2, mul(a0,13) ^ mul(a1,9) ^ mul(a2,14) ^ mul(a3,11));
        o = put(o, 4*c+3, mul(a0,11) ^ mul(a1,13) ^ mul(a2,9) ^ mul(a3,14));
      end
    end
    return o;
  endfunction

  function automatic blk encrypt(blk pt, blk key);
    blk rk [11];
    blk s;
    expand(key, rk);
    s = pt ^ rk[0];
    for (int r = 1; r <= 10; r++) begin
      s = shift_rows(sub_all(s, 0), 0);
      if (r != 10) s = mix_cols(s, 0);
      s ^= rk[r];
    end
    return s;
  endfunction

  function automatic blk decrypt(blk ct, blk key);
    blk rk [11];
    blk s;
    expand(key, rk);
    s = ct ^ rk[10];
    for (int r = 9; r >= 0; r--) begin
      s = sub_all(shift_rows(s, 1), 1) ^ rk[r];
      if (r != 0) s = mix_cols(s, 1);
    end
    return s;
  endfunction

  function automatic blk rand_blk();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
