// aes_shift_rows: ShiftRows over a 128-bit register that is filled and
// emptied one 32-bit column per cycle.
//
// The register holds four column words C0..C3. While S-box results arrive
// ('shift' high) the columns move one place towards C0 and the new column
// enters at C3, so after four cycles C0..C3 hold SubBytes columns 0..3. In the
// round's fifth cycle ('permute' high) the row rotation is applied in place:
// column_out is the first shifted column (byte r taken from C[r], row r) and
// C0..C2 are loaded with shifted columns 1..3; C3 keeps its old value. In the
// next three cycles the remaining shifted columns leave from C0 while the
// next round's columns enter at C3, so the four-word register is never more
// than full and reading and writing overlap without extra storage.
//
// column_out is C0 when 'permute' is low. Flip-flops only load on 'shift' or
// 'permute', so between those cycles the register does not switch. The
// document's block is a 128-bit shift register with an enable that permutes
// the bytes in four cycles; this particular arrangement of the shift and the
// in-place rotation is this design's own. Synchronous active-high reset.
module aes_shift_rows
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  shift,
  input  logic  permute,
  input  word_t column_in,
  output word_t column_out
);

  word_t c_q [4];
  word_t p   [4];  // the four columns after the row rotation

  always_comb begin
    for (int col = 0; col < 4; col++)
      for (int r = 0; r < 4; r++)
        p[col][31-8*r -: 8] = c_q[(col + r) % 4][31-8*r -: 8];
    column_out = permute ? p[0] : c_q[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < 4; i++) c_q[i] <= '0;
    end else if (permute) begin
      c_q[0] <= p[1];
      c_q[1] <= p[2];
      c_q[2] <= p[3];
    end else if (shift) begin
      c_q[0] <= c_q[1];
      c_q[1] <= c_q[2];
      c_q[2] <= c_q[3];
      c_q[3] <= column_in;
    end
  end

endmodule
