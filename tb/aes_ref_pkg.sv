// Reference AES model (128-, 192- and 256-bit keys) for the testbenches.
//
// Written independently of the RTL: the S-box is generated by walking the
// multiplicative group with generator 3 (p * 3 and q / 3 in lock step, so
// q = p^-1), the key schedule is expanded into 60 words up front, and the
// state is a byte array.
package aes_ref_pkg;

  typedef logic [7:0] u8;

  function automatic u8 rl(u8 x, int n);
    return u8'((x << n) | (x >> (8 - n)));
  endfunction

  function automatic void make_sbox(output u8 sb [256]);
    u8 p, q, x;
    p = 8'd1; q = 8'd1;
    do begin
      p = p ^ u8'(p << 1) ^ (p[7] ? 8'h1b : 8'h00);
      q = q ^ u8'(q << 1);
      q = q ^ u8'(q << 2);
      q = q ^ u8'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rl(q, 1) ^ rl(q, 2) ^ rl(q, 3) ^ rl(q, 4);
      sb[p] = x ^ 8'h63;
    end while (p != 8'd1);
    sb[0] = 8'h63;
  endfunction

  function automatic u8 mul2(u8 a);
    return u8'(a << 1) ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  // One full round on a byte-array state (s[4c+r]).
  function automatic logic [127:0] ref_round(logic [127:0] st, logic [127:0] rk, bit last);
    u8 sb [256];
    u8 s [16], t [16];
    logic [127:0] o;
    make_sbox(sb);
    for (int i = 0; i < 16; i++) s[i] = st[127 - 8*i -: 8];
    for (int i = 0; i < 16; i++) s[i] = sb[s[i]];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[4*c + r] = s[4*((c + r) % 4) + r];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        u8 a0, a1, a2, a3;
        a0 = t[4*c]; a1 = t[4*c+1]; a2 = t[4*c+2]; a3 = t[4*c+3];
        t[4*c]   = mul2(a0) ^ (mul2(a1) ^ a1) ^ a2 ^ a3;
        t[4*c+1] = a0 ^ mul2(a1) ^ (mul2(a2) ^ a2) ^ a3;
        t[4*c+2] = a0 ^ a1 ^ mul2(a2) ^ (mul2(a3) ^ a3);
        t[4*c+3] = (mul2(a0) ^ a0) ^ a1 ^ a2 ^ mul2(a3);
      end
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = t[i];
    return o ^ rk;
  endfunction

  // Round key n of a key of NK words (4, 6 or 8), given left-aligned in
  // 256 bits: the whole schedule is expanded word by word up front.
  function automatic logic [127:0] ref_round_key_k(logic [255:0] key, int nk, int n);
    u8 sb [256];
    logic [31:0] w [60];
    logic [31:0] t;
    u8 rc;
    make_sbox(sb);
    for (int i = 0; i < nk; i++) w[i] = key[255 - 32*i -: 32];
    rc = 8'h01;
    for (int i = nk; i < 60; i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {sb[t[31:24]] ^ rc, sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
        rc = mul2(rc);
      end else if (nk == 8 && i % nk == 4) begin
        t = {sb[t[31:24]], sb[t[23:16]], sb[t[15:8]], sb[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
    return {w[4*n], w[4*n+1], w[4*n+2], w[4*n+3]};
  endfunction

  // Round key n (0..10) of a 128-bit key.
  function automatic logic [127:0] ref_round_key(logic [127:0] key, int n);
    return ref_round_key_k({key, 128'h0}, 4, n);
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] key, logic [127:0] pt);
    logic [127:0] s;
    s = pt ^ key;
    for (int r = 1; r <= 10; r++) s = ref_round(s, ref_round_key(key, r), r == 10);
    return s;
  endfunction

  // One inverse round: InvShiftRows, InvSubBytes, AddRoundKey and, unless
  // LAST, InvMixColumns.  The inverse S-box is found by searching the forward
  // one; InvMixColumns multiplies by 9, 11, 13 and 14 built from doublings.
  function automatic logic [127:0] ref_inv_round(logic [127:0] st, logic [127:0] rk, bit last);
    u8 sb [256], isb [256];
    u8 s [16], t [16];
    logic [127:0] o;
    make_sbox(sb);
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) if (sb[j] == u8'(i)) isb[i] = u8'(j);
    for (int i = 0; i < 16; i++) s[i] = st[127 - 8*i -: 8];
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) t[4*((c + r) % 4) + r] = s[4*c + r];
    for (int i = 0; i < 16; i++) t[i] = isb[t[i]] ^ rk[127 - 8*i -: 8];
    if (!last)
      for (int c = 0; c < 4; c++) begin
        u8 a [4], m2 [4], m4 [4], m8 [4];
        for (int k = 0; k < 4; k++) begin
          a[k] = t[4*c+k]; m2[k] = mul2(a[k]); m4[k] = mul2(m2[k]); m8[k] = mul2(m4[k]);
        end
        for (int k = 0; k < 4; k++)
          t[4*c+k] = (m8[k] ^ m4[k] ^ m2[k])                           // 14 * a[k]
                   ^ (m8[(k+1)%4] ^ m2[(k+1)%4] ^ a[(k+1)%4])          // 11 * a[k+1]
                   ^ (m8[(k+2)%4] ^ m4[(k+2)%4] ^ a[(k+2)%4])          // 13 * a[k+2]
                   ^ (m8[(k+3)%4] ^ a[(k+3)%4]);                       //  9 * a[k+3]
      end
    for (int i = 0; i < 16; i++) o[127 - 8*i -: 8] = t[i];
    return o;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] key, logic [127:0] ct);
    logic [127:0] s;
    s = ct ^ ref_round_key(key, 10);
    for (int r = 9; r >= 0; r--) s = ref_inv_round(s, ref_round_key(key, r), r == 0);
    return s;
  endfunction

  // Encryption and decryption with an NK-word key (Nr = NK + 6 rounds).
  function automatic logic [127:0] ref_encrypt_k(logic [255:0] key, int nk, logic [127:0] pt);
    logic [127:0] s;
    int nr;
    nr = nk + 6;
    s = pt ^ ref_round_key_k(key, nk, 0);
    for (int r = 1; r <= nr; r++) s = ref_round(s, ref_round_key_k(key, nk, r), r == nr);
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt_k(logic [255:0] key, int nk, logic [127:0] ct);
    logic [127:0] s;
    int nr;
    nr = nk + 6;
    s = ct ^ ref_round_key_k(key, nk, nr);
    for (int r = nr - 1; r >= 0; r--) s = ref_inv_round(s, ref_round_key_k(key, nk, r), r == 0);
    return s;
  endfunction

endpackage
