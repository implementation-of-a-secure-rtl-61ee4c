// tb_pulse_generator: after reset release the enable must rise exactly
// START_CYCLES+1 clocks later, together with a one-clock start pulse, and
// stay high; a second reset clears it.
`timescale 1ps/1ps
module tb_pulse_generator;
  logic clk = 0, rst = 1, start_pulse, ro_en;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;
  pulse_generator #(.START_CYCLES(16)) dut (.*);

  initial begin : watchdog
    #10us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n;
  int pulses = 0;
  always @(posedge clk) if (start_pulse) pulses++;
  initial begin
    repeat (3) @(posedge clk);
    #1 rst = 0;
    n = 0;
    while (!ro_en) begin
      @(posedge clk);
      #1 n++;
      check(ro_en || !start_pulse, "no pulse before enable");
    end
    check(n == 17, $sformatf("enable after %0d clocks, expected 17", n));
    check(start_pulse, "start pulse with enable");
    @(posedge clk); #1;
    check(!start_pulse && ro_en, "pulse one clock wide, enable held");
    repeat (20) @(posedge clk);
    #1 check(ro_en && pulses == 1, "enable stays, one pulse only");
    rst = 1;
    @(posedge clk); #1;
    check(!ro_en, "reset clears enable");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
