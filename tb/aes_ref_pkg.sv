// aes_ref_pkg: reference model of AES-128 for the testbenches.
//
// Written independently of the RTL package: the state is an array of 16
// bytes (index i = 4*column + row), the S-box inverse is found by search,
// the affine map is applied bit by bit from its FIPS-197 formula, and the
// key schedule is the word-array form w[0..43]. Also provides a byte
// transpose used to compare with waveform values given in row-by-row order.
package aes_ref_pkg;

  typedef bit [7:0] rb_t;
  typedef rb_t st_t [16];

  function automatic rb_t rmul(rb_t a, rb_t b);
    bit [15:0] p = 0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h011b << (i - 8);
    return p[7:0];
  endfunction

  function automatic rb_t rinv(rb_t a);
    if (a == 0) return 0;
    for (int y = 1; y < 256; y++) if (rmul(a, rb_t'(y)) == 8'h01) return rb_t'(y);
    return 0;
  endfunction

  function automatic rb_t rsbox(rb_t a);
    rb_t b = rinv(a), o;
    rb_t c = 8'h63;
    for (int i = 0; i < 8; i++)
      o[i] = b[i] ^ b[(i + 4) % 8] ^ b[(i + 5) % 8] ^ b[(i + 6) % 8] ^ b[(i + 7) % 8] ^ c[i];
    return o;
  endfunction

  rb_t sb_tab [256];
  rb_t isb_tab [256];
  bit  tabs_ready = 0;

  function automatic void build_tabs();
    if (tabs_ready) return;
    for (int i = 0; i < 256; i++) begin
      sb_tab[i] = rsbox(rb_t'(i));
      isb_tab[sb_tab[i]] = rb_t'(i);
    end
    tabs_ready = 1;
  endfunction

  function automatic st_t to_st(bit [127:0] v);
    st_t s;
    for (int i = 0; i < 16; i++) s[i] = v[127 - 8*i -: 8];
    return s;
  endfunction

  function automatic bit [127:0] from_st(st_t s);
    bit [127:0] v;
    for (int i = 0; i < 16; i++) v[127 - 8*i -: 8] = s[i];
    return v;
  endfunction

  // swap rows and columns of the 4x4 byte matrix
  function automatic bit [127:0] transpose(bit [127:0] v);
    st_t s = to_st(v), t;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++) t[4*c + r] = s[4*r + c];
    return from_st(t);
  endfunction

  function automatic bit [127:0] r_sub(bit [127:0] v, bit inv);
    st_t s = to_st(v);
    build_tabs();
    foreach (s[i]) s[i] = inv ? isb_tab[s[i]] : sb_tab[s[i]];
    return from_st(s);
  endfunction

  function automatic bit [127:0] r_shift(bit [127:0] v, bit inv);
    st_t s = to_st(v), t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (!inv) t[4*c + r] = s[4*((c + r) % 4) + r];
        else      t[4*((c + r) % 4) + r] = s[4*c + r];
    return from_st(t);
  endfunction

  function automatic bit [127:0] r_mix(bit [127:0] v, bit inv);
    st_t s = to_st(v), t;
    rb_t m [4] = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[4*c + r] = 0;
        for (int k = 0; k < 4; k++) t[4*c + r] ^= rmul(m[(k - r + 4) % 4], s[4*c + k]);
      end
    return from_st(t);
  endfunction

  // round key `round` (0..10) of the FIPS-197 key schedule
  function automatic bit [127:0] r_round_key(bit [127:0] key, int round);
    bit [31:0] w [44];
    rb_t rc = 8'h01;
    build_tabs();
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      bit [31:0] t = w[i - 1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb_tab[t[31:24]], sb_tab[t[23:16]], sb_tab[t[15:8]], sb_tab[t[7:0]]};
        t ^= {rc, 24'h0};
        rc = rmul(rc, 8'h02);
      end
      w[i] = w[i - 4] ^ t;
    end
    return {w[4*round], w[4*round + 1], w[4*round + 2], w[4*round + 3]};
  endfunction

  function automatic bit [127:0] r_encrypt(bit [127:0] pt, bit [127:0] key);
    bit [127:0] s = pt ^ r_round_key(key, 0);
    for (int r = 1; r <= 10; r++) begin
      s = r_shift(r_sub(s, 0), 0);
      if (r != 10) s = r_mix(s, 0);
      s ^= r_round_key(key, r);
    end
    return s;
  endfunction

  function automatic bit [127:0] r_decrypt(bit [127:0] ct, bit [127:0] key);
    bit [127:0] s = ct ^ r_round_key(key, 10);
    for (int r = 9; r >= 0; r--) begin
      s = r_sub(r_shift(s, 1), 1) ^ r_round_key(key, r);
      if (r != 0) s = r_mix(s, 1);
    end
    return s;
  endfunction

  function automatic bit [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

endpackage
