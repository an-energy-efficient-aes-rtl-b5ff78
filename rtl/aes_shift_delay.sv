// aes_shift_delay: the one-column register between ShiftRows and MixColumns.
//
// It holds a shifted column for one cycle so that MixColumns, the round-key
// XOR and the S-boxes of the next round see it in the following cycle. It only
// loads when 'en' is high (four times per round), so it does not toggle in
// the other cycles. Synchronous active-high reset clears it.
module aes_shift_delay
  import aes_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  en,
  input  word_t d,
  output word_t q
);

  always_ff @(posedge clk) begin
    if (rst)     q <= '0;
    else if (en) q <= d;
  end

endmodule
