// tb_aes_sbox: applies all 256 inputs to the composite-field S-box and
// compares each with the reference S-box (x^254 and the affine map), plus
// three FIPS-197 table entries written out by hand.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  logic [7:0] in, out;
  int checks = 0, failures = 0;

  aes_sbox dut (.in(in), .out(out));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %02h expected %02h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      in = 8'(i);
      #1;
      check(out, sbox(8'(i)), $sformatf("sbox(%02h)", i));
    end
    in = 8'h00; #1; check(out, 8'h63, "fips 00");
    in = 8'h53; #1; check(out, 8'hed, "fips 53");
    in = 8'hff; #1; check(out, 8'h16, "fips ff");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
