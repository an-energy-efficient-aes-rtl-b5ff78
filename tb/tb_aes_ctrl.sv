// tb_aes_ctrl: checks the control word of every cycle of a block against the
// schedule written out directly from the cycle number n = 0..53 (round slot
// n/5, phase n%5), the busy and done outputs, that 'start' during a block is
// ignored, and that a block can start right after another ends or after idle.
module tb_aes_ctrl;
  import aes_pkg::*;

  logic clk = 0, rst = 1, start = 0;
  logic busy, done;
  ctrl_t ctrl, expc;
  int checks = 0, failures = 0;

  aes_ctrl dut (.clk(clk), .rst(rst), .start(start), .busy(busy), .done(done), .ctrl(ctrl));

  always #5 clk = ~clk;

  function automatic ctrl_t expected(int n);
    ctrl_t e;
    int rnd, ph;
    e = '0;
    e.sbox_src = SBOX_SRC_ROUND;
    rnd = n / 5;
    ph = n % 5;
    if (n >= 50) begin
      e.out_valid = 1;
      e.sr_shift = (n <= 52);
      e.key_step = (n <= 52);
      e.dly_en = (n <= 52);
    end else if (ph == 4) begin
      e.sbox_src = SBOX_SRC_KEY;
      e.sr_permute = 1;
      e.key_exp = 1;
      e.dly_en = 1;
    end else begin
      e.sbox_src = (n < 4) ? SBOX_SRC_LOAD : SBOX_SRC_ROUND;
      e.sr_shift = 1;
      e.key_load = (n < 4);
      e.key_step = (n >= 5) && (ph < 3);
      e.dly_en = (n >= 5) && (ph < 3);
    end
    return e;
  endfunction

  task automatic run_block(bit poke_start);
    for (int n = 0; n < 54; n++) begin
      start = (n == 0) || (poke_start && n == 20);
      #1;
      expc = expected(n);
      checks++;
      if (ctrl !== expc || done !== (n == 53) || busy !== (n != 0)) begin
        failures++;
        $display("FAIL cycle %0d: ctrl %b expected %b done %b busy %b", n, ctrl, expc, done, busy);
      end
      @(posedge clk); #1;
    end
    start = 0;
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    @(posedge clk); #1;
    rst = 0;
    repeat (3) @(posedge clk);
    #1;
    checks++;
    if (busy || ctrl != ctrl_t'({SBOX_SRC_ROUND, 7'b0})) begin failures++; $display("FAIL idle"); end
    run_block(0);
    run_block(1);    // back to back, with a stray start in the middle
    checks++;
    if (busy) begin failures++; $display("FAIL busy after block"); end
    repeat (4) @(posedge clk);
    #1;
    run_block(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
