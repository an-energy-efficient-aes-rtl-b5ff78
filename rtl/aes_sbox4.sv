// aes_sbox4: the four S-boxes of the 32-bit datapath.
//
// One S-box per byte of a 32-bit word. The same four S-boxes serve SubBytes
// of one state column in cycles 0..3 of a round slot and SubWord of the key
// schedule in cycle 4, which is how the core gets by with four S-boxes
// instead of eight. Purely combinational.
module aes_sbox4
  import aes_pkg::*;
(
  input  word_t in,
  output word_t out
);

  for (genvar i = 0; i < 4; i++) begin : g_sbox
    aes_sbox u_sbox (
      .in (in[8*i +: 8]),
      .out(out[8*i +: 8])
    );
  end

endmodule
