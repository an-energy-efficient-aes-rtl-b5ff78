// aes_key_expansion: AES-128 key schedule computed on the fly, one 32-bit
// word per cycle, with four 32-bit shift-register words and one 32-bit XOR.
//
// Registers W0..W3 form a shift register; the current round-key word is
// always the last one, W3 (round_key_word). Operations, one per cycle:
//   load : shift key_in in (four cycles load the cipher key, W0 = word 0);
//          the round constant is set to 01.
//   exp  : shift in W0 ^ SubWord(RotWord(W3)) ^ {rcon,000000}; rcon doubles.
//          RotWord(W3) leaves on rot_word, goes through the four S-boxes
//          shared with the data path, and returns on sub_word.
//   step : shift in W0 ^ W3 (the next word of the new round key).
// After one exp and three steps W0..W3 hold the next round key, so a round
// key is ready word by word exactly when the data path needs it. The document
// describes four 32-bit shift registers and a 32-bit XOR, and runs the
// S-box part of the schedule in the fifth cycle of each round; spreading the
// word XORs over the following cycles is this design's reading of how one
// XOR suffices. Synchronous active-high reset.
module aes_key_expansion
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  load,
  input  logic  exp,
  input  logic  step,
  input  word_t key_in,
  input  word_t sub_word,
  output word_t rot_word,
  output word_t round_key_word
);

  word_t w_q [4];
  byte_t rcon_q;
  word_t xor_out;

  assign rot_word       = {w_q[3][23:0], w_q[3][31:24]};
  assign round_key_word = w_q[3];
  // The single shared 32-bit XOR of the key path.
  assign xor_out = w_q[0] ^ (exp ? (sub_word ^ {rcon_q, 24'h0}) : w_q[3]);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) w_q[i] <= '0;
      rcon_q <= 8'h01;
    end else if (load || exp || step) begin
      w_q[0] <= w_q[1];
      w_q[1] <= w_q[2];
      w_q[2] <= w_q[3];
      w_q[3] <= load ? key_in : xor_out;
      if (load)     rcon_q <= 8'h01;
      else if (exp) rcon_q <= xtime(rcon_q);
    end
  end

endmodule
