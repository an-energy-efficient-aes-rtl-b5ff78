// aes_mix_column: MixColumns of one 32-bit state column, purely combinational.
//
// Each output byte is  2*a[r] ^ 3*a[r+1] ^ a[r+2] ^ a[r+3]  (indices mod 4,
// products in GF(2^8)), written here with xtime only. Row 0 is in bits
// [31:24]. The document calls for a combinational MixColumns on the 32-bit
// column; the XOR network is the usual one.
module aes_mix_column
  import aes_pkg::*;
(
  input  word_t in,
  output word_t out
);

  byte_t a [4];
  byte_t m [4];

  always_comb begin
    for (int r = 0; r < 4; r++) a[r] = in[31-8*r -: 8];
    for (int r = 0; r < 4; r++)
      m[r] = xtime(a[r] ^ a[(r+1)%4]) ^ a[(r+1)%4] ^ a[(r+2)%4] ^ a[(r+3)%4];
    for (int r = 0; r < 4; r++) out[31-8*r -: 8] = m[r];
  end

endmodule
