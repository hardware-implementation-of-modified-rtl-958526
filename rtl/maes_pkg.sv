// maes_pkg: shared types, constants and functions of the secure-image core.
//
// AES-128 part: the byte S-box and its inverse are not typed in as tables but
// built at elaboration time by constant functions (multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 followed by the affine map of the AES
// standard), together with the round-function helpers (SubBytes, ShiftRows,
// MixColumns and their inverses) used by the cipher cores and the key
// schedule. State and key words use the usual AES byte order: byte 0 of a
// block is bits [127:120], bytes fill the state column by column.

package maes_pkg;

  typedef logic [127:0] block_t;
  typedef logic [7:0]   byte_t;

  localparam int NR = 10;  // AES-128: Nk = 4, Nr = 10

  // ---------------------------------------------------------------- GF(2^8)
  function automatic byte_t xtime(byte_t x);
    return {x[6:0], 1'b0} ^ (x[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t x, byte_t y);
    byte_t acc = '0;
    byte_t t   = x;
    for (int i = 0; i < 8; i++) begin
      if (y[i]) acc ^= t;
      t = xtime(t);
    end
    return acc;
  endfunction

  // x^254 = x^-1 in GF(2^8) (0 maps to 0)
  function automatic byte_t ginv(byte_t x);
    byte_t r = 8'h01;
    byte_t p = x;
    for (int i = 0; i < 8; i++) begin
      if (i != 0) r = gmul(r, p);   // exponent 254 = 0b11111110
      p = gmul(p, p);
    end
    return r;
  endfunction

  function automatic byte_t sbox_calc(byte_t x);
    byte_t v = ginv(x);
    byte_t s;
    for (int i = 0; i < 8; i++)
      s[i] = v[i] ^ v[(i+4)%8] ^ v[(i+5)%8] ^ v[(i+6)%8] ^ v[(i+7)%8];
    return s ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[sbox_calc(byte_t'(i))] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_table_t SBOX     = gen_sbox();
  localparam sbox_table_t INV_SBOX = gen_inv_sbox();

  // ------------------------------------------------------- round functions
  function automatic byte_t get_byte(block_t s, int i);
    return s[127-8*i -: 8];
  endfunction

  function automatic block_t sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = SBOX[get_byte(s, i)];
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(block_t s);
    block_t r;
    for (int i = 0; i < 16; i++) r[127-8*i -: 8] = INV_SBOX[get_byte(s, i)];
    return r;
  endfunction

  // byte index i = row + 4*col; row r is rotated left by r columns
  function automatic block_t shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 4; w++)
        r[127-8*(w+4*c) -: 8] = get_byte(s, w + 4*((c+w)%4));
    return r;
  endfunction

  function automatic block_t inv_shift_rows(block_t s);
    block_t r;
    for (int c = 0; c < 4; c++)
      for (int w = 0; w < 4; w++)
        r[127-8*(w+4*((c+w)%4)) -: 8] = get_byte(s, w + 4*c);
    return r;
  endfunction

  function automatic block_t mix_columns(block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127-8*(4*c)   -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      r[127-8*(4*c+1) -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      r[127-8*(4*c+2) -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      r[127-8*(4*c+3) -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return r;
  endfunction

  function automatic block_t inv_mix_columns(block_t s);
    block_t r;
    byte_t a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = get_byte(s, 4*c);   a1 = get_byte(s, 4*c+1);
      a2 = get_byte(s, 4*c+2); a3 = get_byte(s, 4*c+3);
      r[127-8*(4*c)   -: 8] = gmul(a0,8'h0e) ^ gmul(a1,8'h0b) ^ gmul(a2,8'h0d) ^ gmul(a3,8'h09);
      r[127-8*(4*c+1) -: 8] = gmul(a0,8'h09) ^ gmul(a1,8'h0e) ^ gmul(a2,8'h0b) ^ gmul(a3,8'h0d);
      r[127-8*(4*c+2) -: 8] = gmul(a0,8'h0d) ^ gmul(a1,8'h09) ^ gmul(a2,8'h0e) ^ gmul(a3,8'h0b);
      r[127-8*(4*c+3) -: 8] = gmul(a0,8'h0b) ^ gmul(a1,8'h0d) ^ gmul(a2,8'h09) ^ gmul(a3,8'h0e);
    end
    return r;
  endfunction

endpackage
