// aes_sbox: one AES S-box computed in a composite (tower) field.
//
// The byte is mapped by a fixed linear transform from GF(2^8) (AES
// polynomial x^8+x^4+x^3+x+1) into GF((2^4)^2), where the field is built as
// GF(2^4)[y]/(y^2 + y + 8) over GF(2^4) = GF(2)[x]/(x^4 + x + 1). There the
// inverse of a = ah*y + al is  d^-1 * (ah*y + (ah ^ al))  with the norm
// d = 8*ah^2 ^ ah*al ^ al^2, so only one GF(2^4) inversion and three GF(2^4)
// multiplications are needed. The GF(2^4) inverse is d^14 = d^2*d^4*d^8
// (squaring is linear). A second fixed linear transform maps back and applies
// the AES affine matrix in one step; the constant 0x63 is added last.
// Inversion of 0 gives 0, as AES requires.
//
// Following the document, the S-box is of the compact composite-field kind
// (Canright). The exact field basis and gate netlist are this design's own:
// polynomial bases are used. The columns of the two matrices are
//   MAP[i]     = beta^i in the tower field, beta = {2,0} the first root of
//                the AES polynomial found there;
//   MAP_INV[j] = affine(preimage of tower basis vector j).
// Purely combinational: in[7:0] -> out[7:0].
module aes_sbox
  import aes_pkg::*;
(
  input  byte_t in,
  output byte_t out
);

  localparam logic [3:0] LAMBDA = 4'h8;
  localparam byte_t MAP     [8] = '{8'h01, 8'h20, 8'h46, 8'h4c, 8'h3c, 8'hd5, 8'h34, 8'he5};
  localparam byte_t MAP_INV [8] = '{8'h1f, 8'hb2, 8'hab, 8'h36, 8'h52, 8'h3e, 8'h65, 8'h60};

  // GF(2^4) product modulo x^4 + x + 1.
  function automatic logic [3:0] gf16_mul(logic [3:0] a, logic [3:0] b);
    logic [6:0] p;
    p = '0;
    for (int i = 0; i < 4; i++)
      if (b[i]) p ^= 7'(a) << i;
    for (int i = 6; i >= 4; i--)
      if (p[i]) p ^= 7'(5'b10011) << (i - 4);
    return p[3:0];
  endfunction

  // GF(2^4) square: linear in the bits.
  function automatic logic [3:0] gf16_sq(logic [3:0] a);
    return {a[3], a[3] ^ a[1], a[2], a[2] ^ a[0]};
  endfunction

  function automatic logic [3:0] gf16_inv(logic [3:0] a);
    logic [3:0] a2, a4, a8;
    a2 = gf16_sq(a);
    a4 = gf16_sq(a2);
    a8 = gf16_sq(a4);
    return gf16_mul(gf16_mul(a2, a4), a8);
  endfunction

  function automatic byte_t lin_map(byte_t a, byte_t cols [8]);
    byte_t r;
    r = '0;
    for (int i = 0; i < 8; i++)
      if (a[i]) r ^= cols[i];
    return r;
  endfunction

  byte_t      t;       // input in the tower field
  logic [3:0] ah, al;  // high and low GF(2^4) halves
  logic [3:0] norm, norm_inv;
  byte_t      t_inv;

  always_comb begin
    t        = lin_map(in, MAP);
    ah       = t[7:4];
    al       = t[3:0];
    norm     = gf16_mul(gf16_sq(ah), LAMBDA) ^ gf16_mul(ah, al) ^ gf16_sq(al);
    norm_inv = gf16_inv(norm);
    t_inv    = {gf16_mul(ah, norm_inv), gf16_mul(ah ^ al, norm_inv)};
    out      = lin_map(t_inv, MAP_INV) ^ 8'h63;
  end

endmodule
