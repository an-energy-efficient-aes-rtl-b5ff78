// tb_aes_key_expansion: loads a key in four cycles, then runs ten rounds of
// one 'exp' cycle (sub_word supplied from the reference S-box applied to
// rot_word) and three 'step' cycles, with a hold cycle in between as in the
// core. round_key_word must show w[4k+c] of the reference key schedule in
// the c-th cycle of round k. Uses the FIPS-197 key 2b7e1516... (whose last
// word is b6630ca6) and random keys.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  logic clk = 0, rst = 1, load = 0, exp = 0, step = 0;
  logic [31:0] key_in = 0, sub_word_in, rot_word, round_key_word;
  logic [31:0] w [44];
  logic [127:0] key;
  int checks = 0, failures = 0;

  aes_key_expansion dut (.clk(clk), .rst(rst), .load(load), .exp(exp), .step(step),
                         .key_in(key_in), .sub_word(sub_word_in), .rot_word(rot_word),
                         .round_key_word(round_key_word));

  assign sub_word_in = sub_word(rot_word);

  always #5 clk = ~clk;

  task automatic check(logic [31:0] got, logic [31:0] expv, string what);
    checks++;
    if (got !== expv) begin
      failures++;
      $display("FAIL %s: got %08h expected %08h", what, got, expv);
    end
  endtask

  task automatic run_key(logic [127:0] k);
    expand_key(k, w);
    for (int i = 0; i < 4; i++) begin
      load = 1; exp = 0; step = 0; key_in = k[127-32*i -: 32];
      @(posedge clk); #1;
    end
    load = 0;
    check(round_key_word, w[3], "key word 3");
    for (int rnd = 1; rnd <= 10; rnd++) begin
      check(rot_word, {w[4*rnd-1][23:0], w[4*rnd-1][31:24]}, "rot_word");
      exp = 1; step = 0;
      @(posedge clk); #1;
      exp = 0;
      for (int c = 0; c < 4; c++) begin
        check(round_key_word, w[4*rnd + c], $sformatf("round %0d word %0d", rnd, c));
        step = (c < 3);
        @(posedge clk); #1;
        step = 0;
      end
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst = 0;
    key = 128'h2b7e151628aed2a6abf7158809cf4f3c;
    run_key(key);
    check(w[43], 32'hb6630ca6, "reference model last word");
    for (int t = 0; t < 20; t++) run_key({$urandom, $urandom, $urandom, $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
