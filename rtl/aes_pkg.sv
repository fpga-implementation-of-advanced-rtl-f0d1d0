// aes_pkg: types, constants and functions shared by the AES-128 cipher and
// decipher.
//
// A 128-bit state (or key) is a vector of 16 bytes, byte 0 in bits 127:120
// and byte 15 in bits 7:0. Bytes fill the 4x4 state matrix column by column,
// as FIPS-197 specifies: byte i sits in row i%4 of column i/4. Each column is
// one 32-bit word.
//
// The S-box and its inverse are not typed in as numbers. They are computed at
// elaboration from their definition: the multiplicative inverse in GF(2^8)
// modulo x^8+x^4+x^3+x+1 (binary 100011011), followed by the affine map
// b' = b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 8'h63.
// The resulting localparam arrays are constant look-up tables, which
// synthesis turns into ROM/LUT logic.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;
  typedef logic [3:0]   round_t;

  localparam int unsigned NR = 10;   // rounds of AES-128

  // States of the cipher and decipher controllers: INIT waits for go_i, S0
  // selects the next step from the round count, S1 is the first round (add
  // round key only), S2 a full round, S3 the last round (no (inverse) mix
  // column, result register loaded) and S4 restarts the round count.
  typedef enum logic [2:0] {ST_INIT, ST_S0, ST_S1, ST_S2, ST_S3, ST_S4} fsm_state_t;

  // ---------------------------------------------------------------- GF(2^8)
  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gf_mul(byte_t a, byte_t b);
    byte_t p = 8'h00;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // a^254 = a^-1 for a != 0, and 0 for a == 0
  function automatic byte_t gf_inv(byte_t a);
    byte_t r = 8'h01;
    byte_t sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // exponent 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  // inverse affine map: b = rotl(b',1) ^ rotl(b',3) ^ rotl(b',6) ^ 8'h05
  function automatic byte_t inv_sbox_calc(byte_t a);
    return gf_inv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  typedef byte_t sbox_t [256];

  function automatic sbox_t make_sbox(bit inverse);
    sbox_t t;
    for (int i = 0; i < 256; i++)
      t[i] = inverse ? inv_sbox_calc(byte_t'(i)) : sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam sbox_t SBOX     = make_sbox(1'b0);
  localparam sbox_t INV_SBOX = make_sbox(1'b1);

  // ------------------------------------------------------------ byte access
  function automatic byte_t get_byte(block_t s, int i);
    return s[127 - 8*i -: 8];
  endfunction

  // byte of row r, column c
  function automatic byte_t get_rc(block_t s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

  // --------------------------------------------------- state transformations
  function automatic block_t sub_bytes(block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = SBOX[get_byte(s, i)];
    return o;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t o;
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = INV_SBOX[get_byte(s, i)];
    return o;
  endfunction

  // row r rotates left by r columns
  function automatic block_t shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_rc(s, r, (c + r) % 4);
    return o;
  endfunction

  // row r rotates right by r columns
  function automatic block_t inv_shift_rows(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = get_rc(s, r, (c + 4 - r) % 4);
    return o;
  endfunction

  // one column times the circulant matrix {2 3 1 1}
  function automatic word_t mix_word(word_t w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    byte_t t  = a0 ^ a1 ^ a2 ^ a3;
    return {a0 ^ t ^ xtime(a0 ^ a1),
            a1 ^ t ^ xtime(a1 ^ a2),
            a2 ^ t ^ xtime(a2 ^ a3),
            a3 ^ t ^ xtime(a3 ^ a0)};
  endfunction

  // one column times the circulant matrix {e b d 9}
  function automatic word_t inv_mix_word(word_t w);
    byte_t a0 = w[31:24], a1 = w[23:16], a2 = w[15:8], a3 = w[7:0];
    return {gf_mul(a0, 8'h0e) ^ gf_mul(a1, 8'h0b) ^ gf_mul(a2, 8'h0d) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0e) ^ gf_mul(a2, 8'h0b) ^ gf_mul(a3, 8'h0d),
            gf_mul(a0, 8'h0d) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0e) ^ gf_mul(a3, 8'h0b),
            gf_mul(a0, 8'h0b) ^ gf_mul(a1, 8'h0d) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0e)};
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = mix_word(s[127 - 32*c -: 32]);
    return o;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t o;
    for (int c = 0; c < 4; c++) o[127 - 32*c -: 32] = inv_mix_word(s[127 - 32*c -: 32]);
    return o;
  endfunction

  // ----------------------------------------------------------- key schedule
  function automatic word_t sub_word(word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic word_t rot_word(word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // round key of round r+1 from that of round r; rc = RC[r+1]
  function automatic block_t next_round_key(block_t k, byte_t rc);
    word_t w0 = k[127:96], w1 = k[95:64], w2 = k[63:32], w3 = k[31:0];
    w0 = w0 ^ sub_word(rot_word(w3)) ^ {rc, 24'h0};
    w1 = w1 ^ w0;
    w2 = w2 ^ w1;
    w3 = w3 ^ w2;
    return {w0, w1, w2, w3};
  endfunction

endpackage
