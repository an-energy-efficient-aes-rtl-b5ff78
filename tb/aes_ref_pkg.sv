// aes_ref_pkg: a plain, byte-oriented AES-128 reference model for the
// testbenches. It shares no code with the RTL: the S-box is computed as the
// GF(2^8) inverse x^254 (by repeated multiplication) followed by the FIPS-197
// affine transform, and MixColumns uses a general GF(2^8) multiplier.
// Blocks and keys are 128-bit values with byte 0 in bits [127:120].
package aes_ref_pkg;

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p;
    p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
    end
    return p;
  endfunction

  function automatic logic [7:0] sbox(logic [7:0] x);
    logic [7:0] inv, r;
    inv = 8'h01;
    for (int i = 0; i < 254; i++) inv = gmul(inv, x);
    if (x == 0) inv = 0;
    for (int i = 0; i < 8; i++)
      r[i] = inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
    return r ^ 8'h63;
  endfunction

  function automatic logic [31:0] sub_word(logic [31:0] w);
    return {sbox(w[31:24]), sbox(w[23:16]), sbox(w[15:8]), sbox(w[7:0])};
  endfunction

  function automatic logic [31:0] mix_col(logic [31:0] c);
    logic [7:0] a [4];
    logic [31:0] o;
    for (int r = 0; r < 4; r++) a[r] = c[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      o[31-8*r -: 8] = gmul(8'h02, a[r]) ^ gmul(8'h03, a[(r+1)%4]) ^ a[(r+2)%4] ^ a[(r+3)%4];
    return o;
  endfunction

  // All 44 words of the AES-128 key schedule.
  function automatic void expand_key(input logic [127:0] key, output logic [31:0] w [44]);
    logic [7:0] rcon;
    logic [31:0] t;
    rcon = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127-32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      t = w[i-1];
      if (i % 4 == 0) begin
        t = sub_word({t[23:0], t[31:24]}) ^ {rcon, 24'h0};
        rcon = gmul(rcon, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] key, logic [127:0] pt);
    logic [31:0] w [44];
    logic [7:0] s [4][4], t [4][4];
    logic [31:0] c;
    logic [127:0] out;
    expand_key(key, w);
    for (int col = 0; col < 4; col++)
      for (int r = 0; r < 4; r++)
        s[r][col] = pt[127 - 8*(4*col + r) -: 8] ^ w[col][31-8*r -: 8];
    for (int rnd = 1; rnd <= 10; rnd++) begin
      for (int col = 0; col < 4; col++)
        for (int r = 0; r < 4; r++)
          t[r][col] = sbox(s[r][(col + r) % 4]);
      for (int col = 0; col < 4; col++) begin
        c = {t[0][col], t[1][col], t[2][col], t[3][col]};
        if (rnd != 10) c = mix_col(c);
        c ^= w[4*rnd + col];
        for (int r = 0; r < 4; r++) s[r][col] = c[31-8*r -: 8];
      end
    end
    for (int col = 0; col < 4; col++)
      for (int r = 0; r < 4; r++)
        out[127 - 8*(4*col + r) -: 8] = s[r][col];
    return out;
  endfunction

endpackage
