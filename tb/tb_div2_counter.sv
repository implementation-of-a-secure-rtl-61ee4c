// tb_div2_counter: q must toggle on each clock while t is high and hold
// while t is low; an asynchronous reset clears it without a clock edge.
`timescale 1ps/1ps
module tb_div2_counter;
  logic clk = 0, rst = 1, t = 0, q;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #1250 clk = ~clk;
  div2_counter dut (.*);
  initial begin : watchdog
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic exp;
  initial begin
    repeat (2) @(posedge clk);
    #1 rst = 0;
    exp = 0;
    for (int i = 0; i < 500; i++) begin
      t = (i < 100) ? 1'b1 : 1'($urandom);
      @(posedge clk); #1;
      if (t) exp = ~exp;
      check(q == exp, $sformatf("q at %0d", i));
    end
    t = 1;
    @(posedge clk); #1;
    exp = ~exp;
    if (!q) begin @(posedge clk); #1; end
    #300 rst = 1;
    #10 check(q == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
