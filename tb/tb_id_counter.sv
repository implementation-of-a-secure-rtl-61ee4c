// tb_id_counter: the DCO must toggle on every clock without carries and
// hold for exactly the clocks where a carry is present; compared with a
// model over random carry patterns.
`timescale 1ps/1ps
module tb_id_counter;
  logic clk = 0, rst = 1, carry = 0, id_out;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #625 clk = ~clk;
  id_counter dut (.*);

  initial begin : watchdog
    #50us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic exp;
  int toggles;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    exp = 0;
    check(id_out == 0, "reset value");
    toggles = 0;
    for (int i = 0; i < 1000; i++) begin
      carry = (i < 200) ? 1'b0 : (($urandom % 5) == 0);
      @(posedge clk); #1;
      if (!carry) exp = ~exp;
      check(id_out == exp, $sformatf("id_out at %0d", i));
      if (i < 200 && id_out != exp) toggles++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
