// aes_ctrl: the schedule of one 54-cycle AES-128 encryption.
//
// A block occupies ten round slots of five cycles and four output cycles.
// Cycle 0 is the cycle in which 'start' is seen while idle. In cycles 0..3 of
// a slot the four S-boxes substitute one state column each (slot 0 takes the
// loaded words data_in ^ key_in, later slots take MixColumns ^ round key), and
// the results enter the ShiftRows register. In cycle 4 the S-boxes serve the
// key schedule, the next round key begins, and ShiftRows rotates its rows and
// hands the first shifted column to the shift delay. After slot 9 the last
// round skips MixColumns: cycles 50..53 put the four ciphertext words on
// data_out (ShiftRows keeps shifting to deliver its last three columns; what
// it takes in then is never used). Counters: round 0..10, phase 0..4. The 5-cycle round and the
// 54-cycle total follow the document's time schedule; the exact assignment of
// the operations to the cycles is this design's own.
// Synchronous active-high reset; 'start' is ignored while busy.
module aes_ctrl
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  start,
  output logic  busy,
  output logic  done,
  output ctrl_t ctrl
);

  logic       busy_q;
  logic [3:0] round_q, round;
  logic [2:0] phase_q, phase;
  logic       active;
  localparam logic [2:0] LAST_PHASE = 3'(ROUND_CYCLES - 1);
  logic       last;

  assign active = busy_q || start;
  assign round  = busy_q ? round_q : '0;
  assign phase  = busy_q ? phase_q : '0;
  assign last   = (round == 4'(NR)) && (phase == 3'd3);
  assign busy   = busy_q;
  assign done   = active && last;

  always_comb begin
    ctrl = '0;
    ctrl.sbox_src = SBOX_SRC_ROUND;
    if (active) begin
      if (round < 4'(NR)) begin
        if (phase < LAST_PHASE) begin
          ctrl.sbox_src = (round == 0) ? SBOX_SRC_LOAD : SBOX_SRC_ROUND;
          ctrl.sr_shift = 1'b1;
          ctrl.key_load = (round == 0);
          ctrl.key_step = (round != 0) && (phase < 3'd3);
          ctrl.dly_en   = (round != 0) && (phase < 3'd3);
        end else begin
          ctrl.sbox_src   = SBOX_SRC_KEY;
          ctrl.sr_permute = 1'b1;
          ctrl.key_exp    = 1'b1;
          ctrl.dly_en     = 1'b1;
        end
      end else begin
        ctrl.out_valid = 1'b1;
        ctrl.sr_shift  = (phase < 3'd3);
        ctrl.key_step  = (phase < 3'd3);
        ctrl.dly_en    = (phase < 3'd3);
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      busy_q  <= 1'b0;
      round_q <= '0;
      phase_q <= '0;
    end else if (active) begin
      busy_q <= !last;
      if (last) begin
        round_q <= '0;
        phase_q <= '0;
      end else if (phase == LAST_PHASE) begin
        round_q <= round + 4'd1;
        phase_q <= '0;
      end else begin
        round_q <= round;
        phase_q <= phase + 3'd1;
      end
    end
  end

  // At most one operation on the ShiftRows register and on the key register.
  a_sr_onehot : assert property (@(posedge clk) disable iff (rst)
    !(ctrl.sr_shift && ctrl.sr_permute));
  a_key_onehot : assert property (@(posedge clk) disable iff (rst)
    $onehot0({ctrl.key_load, ctrl.key_exp, ctrl.key_step}));
  a_phase_range : assert property (@(posedge clk) disable iff (rst)
    busy_q |-> (phase_q <= LAST_PHASE && round_q <= 4'(NR)));

  // A block started from idle ends with 'done' BLOCK_CYCLES - 1 cycles later.
  a_block_length : assert property (@(posedge clk) disable iff (rst)
    (start && !busy_q) |-> ##(BLOCK_CYCLES - 1) done);

endmodule
