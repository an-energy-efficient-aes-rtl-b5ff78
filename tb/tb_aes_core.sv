// tb_aes_core: end-to-end test of the AES-128 encryption core at its only
// configuration. Encrypts the two FIPS-197 example blocks (appendix B and
// C.1) with their published ciphertexts, then random key/plaintext pairs
// checked against the reference model. For every block it checks that the
// four ciphertext words come out in cycles 50..53 after the start cycle (54
// cycles per block) and that 'done' marks cycle 53. Blocks run back to back
// or after idle gaps, and a stray 'start' is raised in the middle of some
// blocks (it must be ignored). The mechanisms of the design are counted and
// each must occur: S-box cycles spent on the key schedule, ShiftRows
// row-rotation cycles, final-round words that bypass MixColumns,
// back-to-back starts and ignored starts.
module tb_aes_core;
  import aes_ref_pkg::*;
  import aes_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic [31:0] data_in = 0, key_in = 0, data_out;
  logic load, busy, out_valid, done;
  int checks = 0, failures = 0;
  int n_key_sbox = 0, n_permute = 0, n_bypass = 0, n_back_to_back = 0, n_ignored_start = 0;

  aes_core dut (.clk(clk), .rst(rst), .start(start), .data_in(data_in), .key_in(key_in),
                .load(load), .busy(busy), .data_out(data_out), .out_valid(out_valid),
                .done(done));

  always #5 clk = ~clk;

  // Mechanism counters, sampled from the control word inside the core.
  always @(posedge clk) if (!rst) begin
    if (dut.ctrl.sbox_src == SBOX_SRC_KEY) n_key_sbox++;
    if (dut.ctrl.sr_permute) n_permute++;
    if (out_valid) n_bypass++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic encrypt_block(logic [127:0] key, logic [127:0] pt, logic [127:0] expected,
                               bit stray_start);
    logic [127:0] got;
    got = '0;
    for (int n = 0; n < BLOCK_CYCLES; n++) begin
      start   = (n == 0) || (stray_start && n == 17);
      if (stray_start && n == 17) n_ignored_start++;
      data_in = (n < 4) ? pt[127-32*n -: 32] : $urandom;
      key_in  = (n < 4) ? key[127-32*n -: 32] : $urandom;
      #1;
      check(load == (n < 4), $sformatf("load in cycle %0d", n));
      check(out_valid == (n >= 50), $sformatf("out_valid in cycle %0d", n));
      check(done == (n == BLOCK_CYCLES - 1), $sformatf("done in cycle %0d", n));
      if (n >= 50) got[127-32*(n-50) -: 32] = data_out;
      else check(data_out == 0, $sformatf("data_out idle in cycle %0d", n));
      @(posedge clk); #1;
    end
    start = 0;
    check(got == expected, $sformatf("ciphertext %032h expected %032h", got, expected));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [127:0] k, p;
    repeat (2) @(posedge clk);
    #1;
    rst = 0;
    @(posedge clk); #1;
    check(!busy && !out_valid, "idle after reset");
    encrypt_block(128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h3243f6a8885a308d313198a2e0370734,
                  128'h3925841d02dc09fbdc118597196a0b32, 0);
    n_back_to_back++;
    encrypt_block(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
                  128'h69c4e0d86a7b0430d8cdb78070b4c55a, 1);
    for (int b = 0; b < 40; b++) begin
      k = {$urandom, $urandom, $urandom, $urandom};
      p = {$urandom, $urandom, $urandom, $urandom};
      if ($urandom % 2 == 1) begin
        repeat ($urandom % 5 + 1) @(posedge clk);
        #1;
        check(!busy, "idle between blocks");
      end else begin
        n_back_to_back++;
      end
      encrypt_block(k, p, encrypt(k, p), (b % 3) == 0);
    end
    $display("mechanisms: key_sbox=%0d permute=%0d bypass=%0d back_to_back=%0d ignored_start=%0d",
             n_key_sbox, n_permute, n_bypass, n_back_to_back, n_ignored_start);
    check(n_key_sbox == 42 * 10, "S-boxes used by the key schedule 10 times per block");
    check(n_permute == 42 * 10, "ShiftRows rotation 10 times per block");
    check(n_bypass == 42 * 4, "MixColumns bypass for 4 words per block");
    check(n_back_to_back > 0, "back-to-back blocks occurred");
    check(n_ignored_start > 0, "start during a block occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
