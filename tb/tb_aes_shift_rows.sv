// tb_aes_shift_rows: runs the ShiftRows register through the core's round
// pattern (four column shifts, one permute cycle) for 30 rounds with random
// columns, then drains it. The column leaving in the permute cycle and in the
// three shifts after it must be columns 0..3 of ShiftRows applied to the
// previous four columns, computed here byte by byte. Idle cycles with neither
// enable are inserted at random and must change nothing.
module tb_aes_shift_rows;
  logic clk = 0, rst = 1, shift = 0, permute = 0;
  logic [31:0] column_in = 0, column_out;
  logic [31:0] cols [4], prev [4];
  logic [31:0] expected [4];
  int checks = 0, failures = 0;

  aes_shift_rows dut (.clk(clk), .rst(rst), .shift(shift), .permute(permute),
                      .column_in(column_in), .column_out(column_out));

  always #5 clk = ~clk;

  function automatic logic [31:0] shifted(logic [31:0] c [4], int col);
    logic [31:0] o;
    for (int r = 0; r < 4; r++) o[31-8*r -: 8] = c[(col + r) % 4][31-8*r -: 8];
    return o;
  endfunction

  task automatic check(logic [31:0] exp, string what);
    checks++;
    if (column_out !== exp) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, column_out, exp);
    end
  endtask

  task automatic idle_maybe();
    if ($urandom % 4 == 0) begin
      shift = 0; permute = 0; column_in = $urandom;
      @(posedge clk); #1;
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst = 0;
    for (int rnd = 0; rnd < 30; rnd++) begin
      for (int c = 0; c < 4; c++) begin
        cols[c] = $urandom;
        shift = 1; permute = 0; column_in = cols[c];
        #1;
        if (rnd > 0 && c < 3) check(expected[c + 1], $sformatf("round %0d col %0d", rnd - 1, c + 1));
        @(posedge clk); #1;
        idle_maybe();
      end
      for (int c = 0; c < 4; c++) expected[c] = shifted(cols, c);
      shift = 0; permute = 1; column_in = $urandom;
      #1;
      check(expected[0], $sformatf("round %0d col 0", rnd));
      @(posedge clk); #1;
      idle_maybe();
    end
    for (int c = 1; c < 4; c++) begin
      shift = 1; permute = 0; column_in = $urandom;
      #1;
      check(expected[c], $sformatf("drain col %0d", c));
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
