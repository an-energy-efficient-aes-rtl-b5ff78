// tb_aes_mix_column: checks MixColumns on the known column db 13 53 45 ->
// 8e 4d a1 bc, on f2 0a 22 5c -> 9f dc 58 9d, and on random columns against a
// reference built from a general GF(2^8) multiplier.
module tb_aes_mix_column;
  import aes_ref_pkg::*;

  logic [31:0] in, out;
  int checks = 0, failures = 0;

  aes_mix_column dut (.in(in), .out(out));

  task automatic check(logic [31:0] exp);
    checks++;
    if (out !== exp) begin
      failures++;
      $display("FAIL in=%08h got %08h expected %08h", in, out, exp);
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
    in = 32'hdb135345; #1; check(32'h8e4da1bc);
    in = 32'hf20a225c; #1; check(32'h9fdc589d);
    for (int i = 0; i < 500; i++) begin
      in = $urandom;
      #1;
      check(mix_col(in));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
