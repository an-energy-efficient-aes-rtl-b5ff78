// tb_aes_shift_delay: random enable and data; the output must follow the
// input one cycle after an enabled edge and hold otherwise, and reset clears it.
module tb_aes_shift_delay;
  logic clk = 0, rst = 1, en = 0;
  logic [31:0] d = 0, q, model;
  int checks = 0, failures = 0;

  aes_shift_delay dut (.clk(clk), .rst(rst), .en(en), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    model = 0;
    @(posedge clk); #1;
    rst = 0;
    checks++;
    if (q !== 0) begin failures++; $display("FAIL reset value %08h", q); end
    for (int i = 0; i < 500; i++) begin
      en = ($urandom % 3) != 0;
      d  = $urandom;
      @(posedge clk);
      if (en) model = d;
      #1;
      checks++;
      if (q !== model) begin
        failures++;
        $display("FAIL cycle %0d got %08h expected %08h", i, q, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
