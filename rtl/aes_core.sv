// aes_core: AES-128 encryption core with a 32-bit datapath and four shared
// S-boxes, 54 clock cycles per 128-bit block.
//
// Data path (one 32-bit column per cycle):
//   S-box input  = data_in ^ key_in            (cycles 0..3, first AddRoundKey)
//                | MixColumns(delay) ^ rk word (later rounds)
//                | RotWord(last key word)      (fifth cycle of each round)
//   four S-boxes -> ShiftRows register (128 bit) -> shift delay (32 bit)
//   -> MixColumns -> XOR round-key word -> back to the S-boxes.
// In the last round MixColumns is skipped: data_out = delay ^ round-key word.
//
// Interface: pulse 'start' with word 0 of the plaintext on data_in and word 0
// of the key on key_in, and present words 1..3 in the next three cycles
// ('load' is high in all four; word 0 is bytes 0..3, byte 0 in bits [31:24]).
// The ciphertext appears on data_out as words 0..3 in cycles 50..53 counted
// from the start cycle, with out_valid high; data_out is 0 otherwise. 'busy'
// is high from the cycle after start to cycle 53; a new block can be started
// in the cycle after the last output word. Synchronous active-high reset.
//
// The 32-bit datapath, the four S-boxes reused by the key schedule, the
// shift-register ShiftRows, the shift delay, the combinational MixColumns
// and the 5-cycle round with 54 cycles per block follow the document; the port
// protocol, reset and the gated output are this design's own.
module aes_core
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  input  word_t data_in,
  input  word_t key_in,
  output logic  load,
  output logic  busy,
  output word_t data_out,
  output logic  out_valid,
  output logic  done
);

  ctrl_t ctrl;
  word_t sbox_in, sbox_out;
  word_t sr_out, dly_q, mc_out;
  word_t rot_word, rk_word;

  aes_ctrl u_ctrl (
    .clk  (clk),
    .rst  (rst),
    .start(start),
    .busy (busy),
    .done (done),
    .ctrl (ctrl)
  );

  always_comb begin
    unique case (ctrl.sbox_src)
      SBOX_SRC_LOAD: sbox_in = data_in ^ key_in;
      SBOX_SRC_KEY:  sbox_in = rot_word;
      default:       sbox_in = mc_out ^ rk_word;
    endcase
  end

  aes_sbox4 u_sbox4 (
    .in (sbox_in),
    .out(sbox_out)
  );

  aes_shift_rows u_shift_rows (
    .clk       (clk),
    .rst       (rst),
    .shift     (ctrl.sr_shift),
    .permute   (ctrl.sr_permute),
    .column_in (sbox_out),
    .column_out(sr_out)
  );

  aes_shift_delay u_shift_delay (
    .clk(clk),
    .rst(rst),
    .en (ctrl.dly_en),
    .d  (sr_out),
    .q  (dly_q)
  );

  aes_mix_column u_mix_column (
    .in (dly_q),
    .out(mc_out)
  );

  aes_key_expansion u_key_expansion (
    .clk           (clk),
    .rst           (rst),
    .load          (ctrl.key_load),
    .exp           (ctrl.key_exp),
    .step          (ctrl.key_step),
    .key_in        (key_in),
    .sub_word      (sbox_out),
    .rot_word      (rot_word),
    .round_key_word(rk_word)
  );

  assign load      = ctrl.key_load;
  assign out_valid = ctrl.out_valid;
  assign data_out  = ctrl.out_valid ? (dly_q ^ rk_word) : '0;

endmodule
