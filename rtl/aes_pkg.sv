// aes_pkg: types, constants and GF(2^8) helpers shared by the AES-256
// crypto-processor.
//
// A 128-bit state holds 16 bytes in FIPS-197 order. Byte 0 is bits
// [127:120], and byte r+4c is the state element S(r,c) in row r, column c.
// A 32-bit word holds one column, with row 0 in bits [31:24].
// The field is GF(2^8) with the AES reduction polynomial
// x^8 + x^4 + x^3 + x + 1. xtime() multiplies by {02}: a shift left, then a
// conditional XOR with {1b}.
//
// The S-box tables are computed here, while the design is elaborated, from
// the multiplicative inverse and the affine transform. The modules that use
// them hold them as constant look-up tables, so no table is typed in by hand.
package aes_pkg;

  localparam int unsigned NR_256    = 14;           // rounds for a 256-bit key

  typedef logic [127:0]       state_t;
  typedef logic [31:0]        word_t;
  typedef logic [255:0][7:0]  sbox_table_t;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) multiply by shift-and-add.
  function automatic logic [7:0] gf_mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // Multiplicative inverse as a^254 (square-and-multiply); 0 maps to 0.
  function automatic logic [7:0] gf_inv(input logic [7:0] a);
    logic [7:0] r, sq;
    r  = 8'h01;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gf_mul(r, sq);   // 254 = 0b11111110
      sq = gf_mul(sq, sq);
    end
    return r;
  endfunction

  function automatic logic [7:0] rotl8(input logic [7:0] b, input int unsigned n);
    return (b << n) | (b >> (8 - n));
  endfunction

  function automatic logic [7:0] sbox_calc(input logic [7:0] a);
    logic [7:0] b;
    b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic sbox_table_t build_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(8'(i));
    return t;
  endfunction

  function automatic sbox_table_t build_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[sbox_calc(8'(i))] = 8'(i);
    return t;
  endfunction

  localparam sbox_table_t SBOX     = build_sbox();
  localparam sbox_table_t INV_SBOX = build_inv_sbox();

  function automatic word_t sub_word(input word_t w);
    return {SBOX[w[31:24]], SBOX[w[23:16]], SBOX[w[15:8]], SBOX[w[7:0]]};
  endfunction

  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  // Rcon(j) = {02}^(j-1), j >= 1, in the top byte of a word.
  function automatic word_t rcon(input int unsigned j);
    logic [7:0] r;
    r = 8'h01;
    for (int unsigned i = 1; i < j; i++) r = xtime(r);
    return {r, 24'h0};
  endfunction

endpackage
