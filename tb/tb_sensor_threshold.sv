// tb_sensor_threshold: random 12-bit samples, including the values next to
// the threshold; detect must be (sample > 2048) one clock after each
// strobe and must hold between strobes.
`timescale 1ps/1ps
module tb_sensor_threshold;
  logic clk = 0, rst = 1, sample_valid = 0, detect, detect_valid;
  logic [11:0] sample = 0;
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask
  always #5000 clk = ~clk;
  sensor_threshold dut (.*);
  initial begin : watchdog
    #100us;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic exp;
  initial begin
    exp = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int i = 0; i < 1000; i++) begin
      case (i % 4)
        0: sample = 12'd2048;
        1: sample = 12'd2049;
        default: sample = 12'($urandom);
      endcase
      sample_valid = (i % 3) != 2;
      @(posedge clk); #1;
      if (sample_valid) exp = (sample > 12'd2048);
      check(detect == exp, $sformatf("detect for sample %0d", sample));
      check(detect_valid == sample_valid, "strobe");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
