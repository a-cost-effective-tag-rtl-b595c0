// aes_pkg: AES-128 round functions (FIPS-197), used by the nonce encryptor.
//
// The S-box is computed, not tabulated: the multiplicative inverse in
// GF(2^8) modulo x^8+x^4+x^3+x+1 is taken as x^254 by square-and-multiply,
// followed by the affine map b ^ rotl(b,1..4) ^ 0x63. A 128-bit block holds
// the state bytes in FIPS-197 order: bits [127:120] are byte 0 (row 0,
// column 0), bytes fill column by column.
package aes_pkg;
  typedef logic [127:0] block_t;

  function automatic logic [7:0] xtime(input logic [7:0] a);
    return {a[6:0], 1'b0} ^ (a[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] p, x;
    p = 8'h00;
    x = a;
    for (int k = 0; k < 8; k++) begin
      if (b[k]) p = p ^ x;
      x = xtime(x);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(input logic [7:0] a);
    logic [7:0] r, base, b;
    r    = 8'h01;
    base = a;
    // 254 = 8'b1111_1110 (0 maps to 0 because 0^254 = 0)
    for (int k = 0; k < 8; k++) begin
      if (k != 0) r = gmul(r, base);
      base = gmul(base, base);
    end
    b = r;
    return b ^ {b[6:0], b[7]} ^ {b[5:0], b[7:6]} ^ {b[4:0], b[7:5]}
             ^ {b[3:0], b[7:4]} ^ 8'h63;
  endfunction

  function automatic logic [31:0] sub_word(input logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  // Next round key from the current one; rcon is the round constant byte.
  function automatic block_t next_key(input block_t k, input logic [7:0] rcon);
    logic [31:0] w0, w1, w2, w3, t;
    t  = sub_word({k[23:0], k[31:24]}) ^ {rcon, 24'h0};
    w0 = k[127:96] ^ t;
    w1 = k[95:64]  ^ w0;
    w2 = k[63:32]  ^ w1;
    w3 = k[31:0]   ^ w2;
    return {w0, w1, w2, w3};
  endfunction

  function automatic block_t sub_bytes(input block_t s);
    block_t o;
    for (int b = 0; b < 16; b++) o[8*b +: 8] = sbox(s[8*b +: 8]);
    return o;
  endfunction

  // Byte (r,c) sits at bits [127-8*(4c+r) -: 8]; row r shifts left by r.
  function automatic block_t shift_rows(input block_t s);
    block_t o;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        o[127 - 8*(4*c + r) -: 8] = s[127 - 8*(4*((c + r) % 4) + r) -: 8];
    return o;
  endfunction

  function automatic block_t mix_columns(input block_t s);
    block_t o;
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = s[127 - 32*c -: 8];
      a1 = s[119 - 32*c -: 8];
      a2 = s[111 - 32*c -: 8];
      a3 = s[103 - 32*c -: 8];
      o[127 - 32*c -: 8] = xtime(a0) ^ xtime(a1) ^ a1 ^ a2 ^ a3;
      o[119 - 32*c -: 8] = a0 ^ xtime(a1) ^ xtime(a2) ^ a2 ^ a3;
      o[111 - 32*c -: 8] = a0 ^ a1 ^ xtime(a2) ^ xtime(a3) ^ a3;
      o[103 - 32*c -: 8] = xtime(a0) ^ a0 ^ a1 ^ a2 ^ xtime(a3);
    end
    return o;
  endfunction
endpackage
