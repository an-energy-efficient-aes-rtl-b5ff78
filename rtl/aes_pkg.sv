// aes_pkg: types, constants and small GF(2^8) helpers shared by the AES-128
// encryption core.
//
// A 128-bit AES state is handled as four 32-bit column words. Inside a word
// the byte of row 0 sits in bits [31:24] and the byte of row 3 in bits [7:0],
// so column word 0 holds the first four bytes of a block in FIPS-197 order.
// The controller drives the datapath through one packed struct (ctrl_t) that
// names every enable and mux select of the 54-cycle schedule.
package aes_pkg;

  typedef logic [7:0]  byte_t;
  typedef logic [31:0] word_t;

  // Number of rounds of AES-128 and cycles in one round slot.
  localparam int unsigned NR           = 10;
  localparam int unsigned ROUND_CYCLES = 5;
  // Cycles from the first loaded word to the last output word.
  localparam int unsigned BLOCK_CYCLES = NR * ROUND_CYCLES + 4;

  // Source of the word presented to the four shared S-boxes.
  typedef enum logic [1:0] {
    SBOX_SRC_LOAD = 2'd0,  // data_in ^ key_in (initial AddRoundKey)
    SBOX_SRC_ROUND = 2'd1, // MixColumns(shift delay) ^ round-key word
    SBOX_SRC_KEY  = 2'd2   // RotWord of the last round-key word
  } sbox_src_e;

  // Per-cycle control word produced by aes_ctrl.
  typedef struct packed {
    sbox_src_e sbox_src;   // S-box input select
    logic      sr_shift;   // ShiftRows register: shift a new column in
    logic      sr_permute; // ShiftRows register: permute rows and emit column 0
    logic      dly_en;     // shift delay: load the next ShiftRows column
    logic      key_load;   // key register: shift key_in in
    logic      key_exp;    // key register: first word of the next round key
    logic      key_step;   // key register: next word of the round key
    logic      out_valid;  // data_out carries a ciphertext word
  } ctrl_t;

  // Multiply by x in GF(2^8) modulo x^8 + x^4 + x^3 + x + 1.
  function automatic byte_t xtime(byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

endpackage
