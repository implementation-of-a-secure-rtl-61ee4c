// tb_post_processor: random raw bits with random strobes; each output must
// be the XOR of the strobed raw bit and the previous strobed raw bit, one
// clock later, and nothing may change without a strobe.
`timescale 1ps/1ps
module tb_post_processor;
  logic clk = 0, rst = 1, raw_bit = 0, raw_valid = 0, rnd_bit, rnd_valid;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #1250 clk = ~clk;
  post_processor dut (.*);
  initial begin : watchdog
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic prev, exp_bit;
  initial begin
    prev = 0; exp_bit = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 2000; i++) begin
      raw_bit = 1'($urandom);
      raw_valid = 1'($urandom);
      @(posedge clk); #1;
      if (raw_valid) begin exp_bit = raw_bit ^ prev; prev = raw_bit; end
      check(rnd_valid == raw_valid, "strobe delayed by one clock");
      check(rnd_bit == exp_bit, $sformatf("rnd_bit at %0d", i));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
