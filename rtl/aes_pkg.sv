// Shared AES arithmetic: GF(2^8) helpers, the S-box and its inverse,
// MixColumns and InvMixColumns.
//
// The S-box is not stored as a list of numbers: it is computed at
// elaboration time from its definition, the multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 (with 0 mapped to 0) followed by the affine
// map b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63.  The result is
// a constant table, so each S-box use synthesizes to a 256-entry ROM.  The
// inverse S-box is the same table inverted, also at elaboration time.
//
// Byte order follows the AES standard: the 128-bit block's most significant
// byte is byte 0, and state byte (row r, column c) is byte 4c + r.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [127:0] block_t;

  function automatic byte_t xtime(byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic byte_t gmul(byte_t a, byte_t b);
    byte_t p, x;
    p = '0;
    x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic byte_t rotl8(byte_t b, int n);
    return byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic byte_t sbox_calc(byte_t x);
    byte_t inv, p;
    inv = '0;
    // x^254 = x^-1 (0 maps to 0)
    p = x;
    for (int i = 0; i < 6; i++) begin
      p = gmul(p, p);        // x^(2^(i+1))
      inv = (i == 0) ? p : gmul(inv, p);
    end
    // inv = x^2 * x^4 * ... * x^64 = x^126; one more square gives x^252,
    // times x^2 gives x^254
    inv = gmul(gmul(inv, inv), gmul(x, x));
    return inv ^ rotl8(inv, 1) ^ rotl8(inv, 2) ^ rotl8(inv, 3) ^ rotl8(inv, 4) ^ 8'h63;
  endfunction

  typedef byte_t sbox_table_t [256];

  function automatic sbox_table_t sbox_gen();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[i] = sbox_calc(byte_t'(i));
    return t;
  endfunction

  localparam sbox_table_t SBOX = sbox_gen();

  function automatic byte_t sbox(byte_t x);
    return SBOX[x];
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic logic [31:0] mix_column(logic [31:0] c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  // Inverse S-box, built by inverting the forward table.
  function automatic sbox_table_t inv_sbox_gen();
    sbox_table_t t;
    for (int i = 0; i < 256; i++) t[SBOX[i]] = byte_t'(i);
    return t;
  endfunction

  localparam sbox_table_t INV_SBOX = inv_sbox_gen();

  function automatic byte_t inv_sbox(byte_t x);
    return INV_SBOX[x];
  endfunction

  // InvMixColumns on one column: multiply by {0e,0b,0d,09} circulant.
  function automatic logic [31:0] inv_mix_column(logic [31:0] c);
    byte_t a0, a1, a2, a3;
    {a0, a1, a2, a3} = c;
    return {gmul(a0, 8'h0e) ^ gmul(a1, 8'h0b) ^ gmul(a2, 8'h0d) ^ gmul(a3, 8'h09),
            gmul(a0, 8'h09) ^ gmul(a1, 8'h0e) ^ gmul(a2, 8'h0b) ^ gmul(a3, 8'h0d),
            gmul(a0, 8'h0d) ^ gmul(a1, 8'h09) ^ gmul(a2, 8'h0e) ^ gmul(a3, 8'h0b),
            gmul(a0, 8'h0b) ^ gmul(a1, 8'h0d) ^ gmul(a2, 8'h09) ^ gmul(a3, 8'h0e)};
  endfunction

  // Byte 4c+r of a block.
  function automatic byte_t st_byte(block_t s, int r, int c);
    return s[127 - 8*(4*c + r) -: 8];
  endfunction

endpackage
