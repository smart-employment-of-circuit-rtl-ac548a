// aes_pkg -- arithmetic of the AES block cipher (FIPS-197) shared by the
// key-expansion and round datapaths of the protected crypto core.
//
// Everything here is combinational and computed, not tabulated: the S-box
// is the multiplicative inverse in GF(2^8) (reduction polynomial 0x11B),
// obtained as x^254 by repeated squaring, followed by the affine map with
// constant 0x63; the inverse S-box undoes the affine map (rotations by 1, 3
// and 6, constant 0x05) and then inverts. A 128-bit state holds byte n of
// the FIPS-197 input sequence in bits [127-8n -: 8]; byte n sits in row
// n%4, column n/4 of the state matrix.
package aes_pkg;

  typedef logic [7:0]   byte_t;
  typedef logic [31:0]  word_t;
  typedef logic [127:0] block_t;

  function automatic byte_t xtime(input byte_t a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1B : 8'h00);
  endfunction

  function automatic byte_t gf_mul(input byte_t a, input byte_t b);
    byte_t p = '0;
    byte_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = xtime(x);
    end
    return p;
  endfunction

  // x^254 = (x^127)^2; x^(2^(k+1)-1) = (x^(2^k-1))^2 * x. 0 maps to 0.
  function automatic byte_t gf_inv(input byte_t a);
    byte_t t = a;
    for (int k = 0; k < 6; k++) t = gf_mul(gf_mul(t, t), a);
    return gf_mul(t, t);
  endfunction

  function automatic byte_t rotl8(input byte_t a, input int n);
    return byte_t'((a << n) | (a >> (8 - n)));
  endfunction

  function automatic byte_t sbox(input byte_t a);
    byte_t b = gf_inv(a);
    return b ^ rotl8(b, 1) ^ rotl8(b, 2) ^ rotl8(b, 3) ^ rotl8(b, 4) ^ 8'h63;
  endfunction

  function automatic byte_t inv_sbox(input byte_t a);
    return gf_inv(rotl8(a, 1) ^ rotl8(a, 3) ^ rotl8(a, 6) ^ 8'h05);
  endfunction

  function automatic word_t sub_word(input word_t w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic word_t rot_word(input word_t w);
    return {w[23:0], w[31:24]};
  endfunction

  function automatic byte_t get_byte(input block_t s, input int n);
    return s[127 - 8*n -: 8];
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127 - 8*n -: 8] = sbox(get_byte(s, n));
    return r;
  endfunction

  function automatic block_t inv_sub_bytes(input block_t s);
    block_t r;
    for (int n = 0; n < 16; n++) r[127 - 8*n -: 8] = inv_sbox(get_byte(s, n));
    return r;
  endfunction

  // Row r is rotated left by r positions.
  function automatic block_t shift_rows(input block_t s);
    block_t r;
    for (int row = 0; row < 4; row++)
      for (int c = 0; c < 4; c++)
        r[127 - 8*(row + 4*c) -: 8] = get_byte(s, row + 4*((c + row) % 4));
    return r;
  endfunction

  function automatic block_t inv_shift_rows(input block_t s);
    block_t r;
    for (int row = 0; row < 4; row++)
      for (int c = 0; c < 4; c++)
        r[127 - 8*(row + 4*c) -: 8] = get_byte(s, row + 4*((c + 4 - row) % 4));
    return r;
  endfunction

  function automatic word_t mix_column(input word_t col);
    byte_t a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    return {xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3,
            a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3,
            a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3,
            xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3)};
  endfunction

  function automatic word_t inv_mix_column(input word_t col);
    byte_t a0 = col[31:24], a1 = col[23:16], a2 = col[15:8], a3 = col[7:0];
    return {gf_mul(a0, 8'h0E) ^ gf_mul(a1, 8'h0B) ^ gf_mul(a2, 8'h0D) ^ gf_mul(a3, 8'h09),
            gf_mul(a0, 8'h09) ^ gf_mul(a1, 8'h0E) ^ gf_mul(a2, 8'h0B) ^ gf_mul(a3, 8'h0D),
            gf_mul(a0, 8'h0D) ^ gf_mul(a1, 8'h09) ^ gf_mul(a2, 8'h0E) ^ gf_mul(a3, 8'h0B),
            gf_mul(a0, 8'h0B) ^ gf_mul(a1, 8'h0D) ^ gf_mul(a2, 8'h09) ^ gf_mul(a3, 8'h0E)};
  endfunction

  function automatic block_t mix_columns(input block_t s);
    return {mix_column(s[127:96]), mix_column(s[95:64]),
            mix_column(s[63:32]),  mix_column(s[31:0])};
  endfunction

  function automatic block_t inv_mix_columns(input block_t s);
    return {inv_mix_column(s[127:96]), inv_mix_column(s[95:64]),
            inv_mix_column(s[63:32]),  inv_mix_column(s[31:0])};
  endfunction

endpackage
