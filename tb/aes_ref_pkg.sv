// aes_ref_pkg: a plain software model of AES-256 that the testbenches compare
// the RTL against.
//
// It is written independently of the RTL. The S-box comes from a brute-force
// search for the GF(2^8) inverse and the bit-matrix form of the affine
// transform. The state is a 4x4 byte array. The key schedule fills the
// whole 60-word array the textbook way. Call ref_init() once before using it.
package aes_ref_pkg;

  typedef logic [7:0] byte_t;
  byte_t sbox_tab [256];
  byte_t isbox_tab [256];
  bit    ready_tab = 0;

  function automatic byte_t ref_gmul(byte_t a, byte_t b);
    int unsigned x = 32'(a), y = 32'(b), p = 0;
    while (y != 0) begin
      if ((y & 1) != 0) p ^= x;
      x <<= 1;
      if ((x & 'h100) != 0) x ^= 'h11b;
      y >>= 1;
    end
    return byte_t'(p);
  endfunction

  function automatic void ref_init();
    for (int a = 0; a < 256; a++) begin
      byte_t inv = 0, s;
      for (int b = 1; b < 256; b++)
        if (ref_gmul(byte_t'(a), byte_t'(b)) == 8'h01) inv = byte_t'(b);
      for (int i = 0; i < 8; i++)
        s[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8]
               ^ 1'((8'h63 >> i) & 1);
      sbox_tab[a] = s;
      isbox_tab[s] = byte_t'(a);
    end
    ready_tab = 1;
  endfunction

  function automatic byte_t ref_sbox(byte_t a);     return sbox_tab[a];  endfunction
  function automatic byte_t ref_inv_sbox(byte_t a); return isbox_tab[a]; endfunction

  // 128-bit vector <-> 4x4 state (st[r][c] = byte r+4c, byte 0 = [127:120]).
  typedef byte_t st_t [4][4];
  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) s[r][c] = v[127-8*(r+4*c) -: 8];
    return s;
  endfunction
  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int c = 0; c < 4; c++) for (int r = 0; r < 4; r++) v[127-8*(r+4*c) -: 8] = s[r][c];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v, bit inv);
    st_t s = to_st(v);
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      s[r][c] = inv ? isbox_tab[s[r][c]] : sbox_tab[s[r][c]];
    return from_st(s);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v, bit inv);
    st_t s = to_st(v), o;
    for (int r = 0; r < 4; r++) for (int c = 0; c < 4; c++)
      if (inv) o[r][(c+r)%4] = s[r][c];
      else     o[r][c] = s[r][(c+r)%4];
    return from_st(o);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v, bit inv);
    st_t s = to_st(v), o;
    byte_t m [4];
    if (inv) m = '{8'h0e, 8'h0b, 8'h0d, 8'h09};
    else     m = '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        o[r][c] = 0;
        for (int k = 0; k < 4; k++) o[r][c] ^= ref_gmul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(o);
  endfunction

  typedef logic [31:0] w60_t [60];
  function automatic w60_t ref_expand(logic [255:0] key);
    w60_t w;
    byte_t rc = 8'h01;
    for (int i = 0; i < 8; i++) w[i] = key[255-32*i -: 32];
    for (int i = 8; i < 60; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 8 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
        t[31:24] ^= rc;
        rc = ref_gmul(rc, 8'h02);
      end else if (i % 8 == 4) begin
        t = {sbox_tab[t[31:24]], sbox_tab[t[23:16]], sbox_tab[t[15:8]], sbox_tab[t[7:0]]};
      end
      w[i] = w[i-8] ^ t;
    end
    return w;
  endfunction

  function automatic logic [127:0] ref_round_key(logic [255:0] key, int k);
    w60_t w = ref_expand(key);
    return {w[4*k], w[4*k+1], w[4*k+2], w[4*k+3]};
  endfunction

  // Decryption key of the processor: the last eight expanded words.
  function automatic logic [255:0] ref_dec_key(logic [255:0] key);
    w60_t w = ref_expand(key);
    return {w[52], w[53], w[54], w[55], w[56], w[57], w[58], w[59]};
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [255:0] key, logic [127:0] pt);
    w60_t w = ref_expand(key);
    logic [127:0] s = pt ^ {w[0], w[1], w[2], w[3]};
    for (int r = 1; r <= 14; r++) begin
      s = ref_sub_bytes(s, 0);
      s = ref_shift_rows(s, 0);
      if (r != 14) s = ref_mix_columns(s, 0);
      s ^= {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
    end
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [255:0] key, logic [127:0] ct);
    w60_t w = ref_expand(key);
    logic [127:0] s = ct ^ {w[56], w[57], w[58], w[59]};
    for (int r = 13; r >= 0; r--) begin
      s = ref_shift_rows(s, 1);
      s = ref_sub_bytes(s, 1);
      s ^= {w[4*r], w[4*r+1], w[4*r+2], w[4*r+3]};
      if (r != 0) s = ref_mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction
  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

endpackage
