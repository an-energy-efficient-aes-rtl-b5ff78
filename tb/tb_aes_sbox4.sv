// tb_aes_sbox4: drives random and corner words through the four S-boxes and
// checks every byte lane against the reference S-box.
module tb_aes_sbox4;
  import aes_ref_pkg::*;

  logic [31:0] in, out;
  int checks = 0, failures = 0;

  aes_sbox4 dut (.in(in), .out(out));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      in = (i == 0) ? 32'h0 : (i == 1) ? 32'h00102030 : $urandom;
      #1;
      checks++;
      if (out !== sub_word(in)) begin
        failures++;
        $display("FAIL in=%08h got %08h expected %08h", in, out, sub_word(in));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
